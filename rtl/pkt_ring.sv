// pkt_ring: circular packet buffer between the Ethernet producer and the
// ICAP consumer.
//
// SLOTS slots of SLOT_BYTES bytes each hold the bitstream data of one packet
// apiece. The producer writes the bytes of the packet it is receiving into the
// tail slot (wr_en, wr_off, wr_data) and, once the packet has proved good,
// commits the slot with its length; a packet that is not committed costs
// nothing, its slot is simply written again. The consumer reads the head slot
// by offset (rd_en, rd_off; rd_data is registered and valid the cycle after
// rd_en, held until the next read) and frees it with pop. count, empty and
// full are registered. flush empties the buffer in one cycle. Pointers wrap
// at SLOTS, which need not be a power of two.
//
// The defaults are the design's sizing, 2P+1 = 7 slots for P = 3, of 1500
// bytes: 10.5 KB of storage. Keeping only the data bytes, not whole frames,
// is this design's own choice.
module pkt_ring #(
  parameter int unsigned SLOTS      = 7,
  parameter int unsigned SLOT_BYTES = 1500,
  localparam int unsigned OW = $clog2(SLOT_BYTES),
  localparam int unsigned LW = $clog2(SLOT_BYTES + 1),
  localparam int unsigned SW = (SLOTS > 1) ? $clog2(SLOTS) : 1,
  localparam int unsigned CW = $clog2(SLOTS + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  // producer
  input  logic          wr_en,
  input  logic [OW-1:0] wr_off,
  input  logic [7:0]    wr_data,
  input  logic          commit,
  input  logic [LW-1:0] commit_len,
  // consumer
  input  logic          rd_en,
  input  logic [OW-1:0] rd_off,
  output logic [7:0]    rd_data,
  output logic [LW-1:0] head_len,
  input  logic          pop,
  // status
  output logic [CW-1:0] count,
  output logic          empty,
  output logic          full
);

  localparam int unsigned DEPTH = SLOTS * SLOT_BYTES;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic [7:0]    mem [DEPTH];
  logic [LW-1:0] lens [SLOTS];
  logic [SW-1:0] head, tail;

  function automatic logic [SW-1:0] inc(input logic [SW-1:0] p);
    return (p == SW'(SLOTS - 1)) ? '0 : p + 1'b1;
  endfunction

  logic do_commit, do_pop;
  assign do_commit = commit && !full && !flush;
  assign do_pop    = pop && !empty && !flush;
  assign empty     = (count == '0);
  assign full      = (count == CW'(SLOTS));
  assign head_len  = lens[head];

  always_ff @(posedge clk) begin
    if (wr_en)
      mem[AW'(tail) * AW'(SLOT_BYTES) + AW'(wr_off)] <= wr_data;
    if (rd_en)
      rd_data <= mem[AW'(head) * AW'(SLOT_BYTES) + AW'(rd_off)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      for (int i = 0; i < SLOTS; i++) lens[i] <= '0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      if (do_commit) begin
        lens[tail] <= commit_len;
        tail       <= inc(tail);
      end
      if (do_pop) head <= inc(head);
      count <= count + CW'(do_commit) - CW'(do_pop);
    end
  end

  // a producer that respects the flow control never commits into a full buffer
  assert property (@(posedge clk) disable iff (!rst_n) commit |-> !full);
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
