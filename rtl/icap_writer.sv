// icap_writer: consumer side of the packet buffer; feeds bitstream bytes into
// the FPGA's internal configuration access port (ICAP).
//
// Whenever the head slot of pkt_ring holds a packet, its bytes are read in
// order and written to the ICAP, and the slot is popped as its last byte is
// read. The path is a two-stage pipeline: the buffer's registered read output
// is the first stage and the ICAP data register the second, so with
// icap_busy low one byte reaches the port every clock, the ICAP's peak rate,
// across slot boundaries too. icap_busy high holds the byte on the port and
// stalls the pipeline without losing data.
//
// ICAP side (Virtex-II style, 8 bits): icap_ce_n and icap_write_n are low in
// every cycle that icap_i carries a byte; the byte is taken at that rising
// clock edge unless icap_busy is high. flush drops what the pipeline holds
// (used when a reconfiguration is restarted). bytes_written counts every byte
// taken by the ICAP since reset.
//
// The rate of one byte per clock is the ICAP's; the pipeline and the handling
// of busy are this design's own choices.
module icap_writer #(
  parameter int unsigned SLOT_BYTES = 1500,
  localparam int unsigned OW = $clog2(SLOT_BYTES),
  localparam int unsigned LW = $clog2(SLOT_BYTES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  // packet buffer
  input  logic          empty,
  input  logic [LW-1:0] head_len,
  output logic          rd_en,
  output logic [OW-1:0] rd_off,
  input  logic [7:0]    rd_data,
  output logic          pop,
  // ICAP
  output logic          icap_ce_n,
  output logic          icap_write_n,
  output logic [7:0]    icap_i,
  input  logic          icap_busy,
  output logic [31:0]   bytes_written
);

  logic          s_valid;            // rd_data holds a byte not yet moved on
  logic          o_valid;
  logic [7:0]    o_data;
  logic [OW-1:0] off;

  logic accept, o_free, s_take, s_free, last;
  assign accept = o_valid && !icap_busy;
  assign o_free = !o_valid || accept;
  assign s_take = s_valid && o_free;
  assign s_free = !s_valid || s_take;
  assign rd_en  = !flush && !empty && (head_len != '0) && s_free;
  assign rd_off = off;
  assign last   = (LW'(off) == head_len - LW'(1));
  assign pop    = rd_en && last;

  assign icap_ce_n    = !o_valid;
  assign icap_write_n = !o_valid;
  assign icap_i       = o_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid       <= 1'b0;
      o_valid       <= 1'b0;
      o_data        <= '0;
      off           <= '0;
      bytes_written <= '0;
    end else begin
      if (accept) bytes_written <= bytes_written + 32'd1;
      if (flush) begin
        s_valid <= 1'b0;
        o_valid <= 1'b0;
        off     <= '0;
      end else begin
        if (rd_en) off <= last ? '0 : off + 1'b1;
        if (rd_en)       s_valid <= 1'b1;
        else if (s_take) s_valid <= 1'b0;
        if (s_take) begin
          o_valid <= 1'b1;
          o_data  <= rd_data;
        end else if (accept) begin
          o_valid <= 1'b0;
        end
      end
    end
  end

  // the byte on the port must not change while the ICAP is busy
  assert property (@(posedge clk) disable iff (!rst_n || flush)
                   (o_valid && icap_busy) |=> (o_valid && $stable(o_data)));

endmodule
