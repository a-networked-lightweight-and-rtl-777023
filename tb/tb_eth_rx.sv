// tb_eth_rx: checks the receive MAC against frames built by the reference
// model: payload passed on byte-exact without FCS, frm_ok on good frames,
// CRC errors flagged, frames for other stations or other EtherTypes ignored,
// broadcast accepted, and back-to-back bytes (one per clock) handled.
module tb_eth_rx;
  import tb_util_pkg::*;

  localparam logic [47:0] MAC = 48'h02_00_00_00_00_01;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       dv, stb;
  logic [7:0] d;
  logic       pay_valid, frm_end, frm_ok;
  logic [7:0] pay_data;
  logic [47:0] frm_src;

  eth_rx #(.MAC_ADDR(MAC)) dut (.clk, .rst_n, .rx_dv(dv), .rx_stb(stb), .rxd(d),
    .pay_valid, .pay_data, .frm_end, .frm_ok, .frm_src);

  rdp_link_bfm #(.MY_MAC(48'h02_00_00_00_00_10)) peer (.clk, .dv, .stb, .d,
    .mon_dv(1'b0), .mon_stb(1'b0), .mon_d(8'h00));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bq_t got;
  int  ends = 0, oks = 0;
  always @(posedge clk) begin
    if (pay_valid) got.push_back(pay_data);
    if (frm_end) begin ends++; if (frm_ok) oks++; end
  end

  task automatic one(input logic [47:0] dst, input int len, input int bc, input int flip,
                     input logic [15:0] et, input bit expect_seen, input bit expect_ok);
    bq_t pay;
    int e0 = ends, o0 = oks;
    for (int i = 0; i < len; i++) pay.push_back(bs_byte(i + len));
    got.delete();
    peer.send(dst, pay, bc, flip, et);
    repeat (3) @(posedge clk);
    check((ends - e0) == (expect_seen ? 1 : 0), $sformatf("frame end count len=%0d", len));
    if (expect_seen) begin
      check((oks - o0) == (expect_ok ? 1 : 0), $sformatf("frm_ok len=%0d flip=%0d", len, flip));
      if (expect_ok) begin
        automatic bit same = (got.size() == ((len < 46) ? 46 : len));
        for (int i = 0; i < len && same; i++) same = (got[i] == pay[i]);
        check(same, $sformatf("payload bytes len=%0d got=%0d", len, got.size()));
        check(frm_src == 48'h02_00_00_00_00_10, "source address");
      end
    end else begin
      check(got.size() == 0, "no payload for a foreign frame");
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(MAC, 100, 8, -1, ETYPE, 1, 1);
    one(MAC, 10, 8, -1, ETYPE, 1, 1);                 // padded
    one(MAC, 1500, 1, -1, ETYPE, 1, 1);               // maximum, one byte per clock
    one(MAC, 200, 2, 57, ETYPE, 1, 0);                // bit error in payload
    one(MAC, 60, 8, 1, ETYPE, 1, 0);                  // bit error in header
    one(48'h02_00_00_00_00_99, 80, 4, -1, ETYPE, 0, 0);  // other station
    one(MAC, 80, 4, -1, 16'h0800, 0, 0);              // other EtherType
    one(48'hFFFF_FFFF_FFFF, 64, 3, -1, ETYPE, 1, 1);  // broadcast
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
