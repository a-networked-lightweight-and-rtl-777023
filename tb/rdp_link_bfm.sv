// rdp_link_bfm: testbench model of a network peer on the MAC byte interface.
// send() puts a frame on the wire (one byte every byte_cycles clocks),
// optionally with one bit flipped; the monitor collects every frame seen on
// the DUT's transmit side, checks its CRC and keeps its payload in rx_q.
module rdp_link_bfm
  import tb_util_pkg::*;
#(
  parameter logic [47:0] MY_MAC = 48'h02_00_00_00_00_10
) (
  input  logic       clk,
  output logic       dv,
  output logic       stb,
  output logic [7:0] d,
  input  logic       mon_dv,
  input  logic       mon_stb,
  input  logic [7:0] mon_d
);

  bq_t          rx_q[$];      // payloads of good frames
  logic [47:0]  rx_dst_q[$];
  int           rx_bad = 0;   // frames whose CRC or framing was wrong

  initial begin
    dv = 0; stb = 0; d = 0;
  end

  task automatic send(input logic [47:0] dst, input bq_t pay, input int byte_cycles = 8,
                      input int flip_at = -1, input logic [15:0] etype = ETYPE);
    bq_t w = eth_frame(dst, MY_MAC, etype, pay);
    if (flip_at >= 0) w[8 + 14 + flip_at] ^= 8'h10;
    foreach (w[i]) begin
      @(posedge clk);
      dv <= 1; stb <= 1; d <= w[i];
      for (int k = 1; k < byte_cycles; k++) begin
        @(posedge clk);
        stb <= 0;
      end
    end
    @(posedge clk);
    dv <= 0; stb <= 0;
    repeat (12 * byte_cycles) @(posedge clk);
  endtask

  // monitor
  bq_t cur;
  always @(posedge clk) begin
    if (mon_dv && mon_stb) cur.push_back(mon_d);
    if (!mon_dv && cur.size() > 0) begin
      automatic bq_t f;
      automatic int s = 0;
      while (s < cur.size() && cur[s] == 8'h55) s++;
      if (s != 7 || cur[s] != 8'hD5 || cur.size() < 8 + 64) rx_bad++;
      else begin
        for (int i = 8; i < cur.size() - 4; i++) f.push_back(cur[i]);
        if ({cur[cur.size()-1], cur[cur.size()-2], cur[cur.size()-3], cur[cur.size()-4]} != crc32(f) ||
            {f[12], f[13]} != ETYPE)
          rx_bad++;
        else begin
          automatic bq_t p;
          for (int i = 14; i < f.size(); i++) p.push_back(f[i]);
          rx_dst_q.push_back({f[0], f[1], f[2], f[3], f[4], f[5]});
          rx_q.push_back(p);
        end
      end
      cur.delete();
    end
  end

endmodule
