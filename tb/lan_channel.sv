// lan_channel: testbench model of the LAN between two MACs. Forwards the
// byte stream one clock late. Armed with corrupt_next, it flips one bit of
// the 30th byte of the next frame; armed with drop_next, it swallows the
// next frame entirely; with dead set, nothing passes.
module lan_channel (
  input  logic       clk,
  input  logic       in_dv,
  input  logic       in_stb,
  input  logic [7:0] in_d,
  output logic       out_dv,
  output logic       out_stb,
  output logic [7:0] out_d
);
  bit corrupt_next = 0, drop_next = 0, dead = 0;
  int corrupted = 0, dropped = 0;
  bit in_frame = 0, do_corrupt = 0, do_drop = 0;
  int nbyte = 0;

  initial begin out_dv = 0; out_stb = 0; out_d = 0; end

  always @(posedge clk) begin
    if (in_dv && !in_frame) begin
      in_frame   = 1;
      nbyte      = 0;
      do_corrupt = corrupt_next;
      do_drop    = drop_next;
      if (corrupt_next) begin corrupt_next = 0; corrupted++; end
      if (drop_next)    begin drop_next = 0;    dropped++;   end
    end
    if (!in_dv) in_frame = 0;
    out_dv  <= in_dv && !do_drop && !dead;
    out_stb <= in_stb && !do_drop && !dead;
    out_d   <= (do_corrupt && in_stb && nbyte == 30) ? (in_d ^ 8'h01) : in_d;
    if (in_dv && in_stb) nbyte++;
  end
endmodule
