// trace_uart: serial trace line of the target platform.
//
// Protocol events arrive as one-cycle ev_valid pulses with a character
// (ev_char, codes in rdp_pkg) and are queued in a FIFO of FIFO_DEPTH entries;
// an event that finds the FIFO full is dropped and counted in dropped. The
// characters are sent on txd as 8N1 frames (start bit 0, eight data bits LSB
// first, stop bit 1) of CLK_DIV clocks per bit; txd idles high.
// The design has a serial line for instrumentation and trace but says no more
// about it: the event codes, the rate (115200 baud from 100 MHz by default)
// and the FIFO are this design's own choices.
module trace_uart #(
  parameter int unsigned CLK_DIV    = 868,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ev_valid,
  input  logic [7:0]  ev_char,
  output logic        txd,
  output logic [15:0] dropped
);

  localparam int unsigned AW = $clog2(FIFO_DEPTH);
  localparam int unsigned DW = $clog2(CLK_DIV);

  logic [7:0]  fifo [FIFO_DEPTH];
  logic [AW:0] wp, rp;
  logic        f_empty, f_full;
  assign f_empty = (wp == rp);
  assign f_full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);

  logic          sending;
  logic [9:0]    shreg;     // stop, data[7:0], start; sent LSB first
  logic [3:0]    nbits;
  logic [DW-1:0] div;

  always_ff @(posedge clk) begin
    if (ev_valid && !f_full) fifo[wp[AW-1:0]] <= ev_char;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp      <= '0;
      rp      <= '0;
      dropped <= '0;
      sending <= 1'b0;
      shreg   <= '1;
      nbits   <= '0;
      div     <= '0;
      txd     <= 1'b1;
    end else begin
      if (ev_valid) begin
        if (f_full) dropped <= dropped + 16'd1;
        else        wp      <= wp + 1'b1;
      end
      if (!sending) begin
        txd <= 1'b1;
        if (!f_empty) begin
          shreg   <= {1'b1, fifo[rp[AW-1:0]], 1'b0};
          rp      <= rp + 1'b1;
          sending <= 1'b1;
          nbits   <= '0;
          div     <= '0;
        end
      end else begin
        txd <= shreg[0];
        if (div == DW'(CLK_DIV - 1)) begin
          div   <= '0;
          shreg <= {1'b1, shreg[9:1]};
          nbits <= nbits + 4'd1;
          if (nbits == 4'd9) sending <= 1'b0;
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end

endmodule
