// tb_rdp_system_full: the system at its default parameters (7 slots of 1500
// bytes, P = 3, 100 Mb/s link from a 100 MHz clock, 1 000 000-cycle timers,
// 115200-baud trace) downloading the two bitstream sizes of the design's
// measurements, 60 KB and 200 KB, over a clean link. Checks that each
// bitstream reaches the ICAP whole and in order, that P = 3 was negotiated,
// that no restart occurred, and reports the speed in Mb/s at 100 MHz, which
// must be at least the 40 Mb/s sustained rate reported for the design.
module tb_rdp_system_full;
  import tb_util_pkg::*;

  localparam int NB = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        srv_rx_dv, srv_rx_stb, srv_tx_dv, srv_tx_stb;
  logic [7:0]  srv_rxd, srv_txd;
  logic        tgt_rx_dv, tgt_rx_stb, tgt_tx_dv, tgt_tx_stb;
  logic [7:0]  tgt_rxd, tgt_txd;
  logic        srv_push = 0, srv_req_valid, srv_busy, srv_done;
  logic [31:0] srv_push_len = 0, bs_addr;
  logic [NB-1:0][7:0] srv_req_name;
  logic [7:0]  bs_data;
  logic [15:0] srv_restarts, srv_n;
  logic        tgt_name_req = 0;
  logic [NB-1:0][7:0] tgt_name = '0;
  logic [2:0]  tgt_mem_slots = 3'd7;
  logic        icap_ce_n, icap_write_n, icap_busy, uart_txd;
  logic [7:0]  icap_i;
  logic        tgt_active, tgt_done, tgt_err;
  logic [7:0]  tgt_err_code;
  logic [15:0] tgt_pkt_cnt, tgt_p;
  logic [2:0]  tgt_ring_count;
  logic [31:0] icap_bytes;

  rdp_system dut (.*);

  lan_channel down (.clk, .in_dv(srv_tx_dv), .in_stb(srv_tx_stb), .in_d(srv_txd),
                    .out_dv(tgt_rx_dv), .out_stb(tgt_rx_stb), .out_d(tgt_rxd));
  lan_channel up   (.clk, .in_dv(tgt_tx_dv), .in_stb(tgt_tx_stb), .in_d(tgt_txd),
                    .out_dv(srv_rx_dv), .out_stb(srv_rx_stb), .out_d(srv_rxd));
  icap_model icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy));

  int unsigned base = 0;
  always_ff @(posedge clk) bs_data <= bs_byte(bs_addr + base);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic run(input int len, input string what);
    automatic longint t0, t1;
    automatic int t = 0;
    automatic int n = (len + 1493) / 1494;
    automatic bit same;
    automatic real mbps;
    icap.data_q.delete();
    @(posedge clk) begin srv_push <= 1; srv_push_len <= len; end
    t0 = cyc;
    @(posedge clk) srv_push <= 0;
    while (!srv_done && t < 5000000) begin @(posedge clk); t++; end
    check(srv_done, {what, ": transfer finished"});
    while ((tgt_ring_count != 0 || !icap_ce_n) && t < 6000000) begin @(posedge clk); t++; end
    t1 = cyc;
    repeat (10) @(posedge clk);
    same = (icap.data_q.size() == len);
    for (int i = 0; i < len && same; i++) same = (icap.data_q[i] == bs_byte(i + base));
    check(same, $sformatf("%s: ICAP received %0d of %0d bytes, in order", what, icap.data_q.size(), len));
    check(srv_n == 16'(n) && tgt_pkt_cnt == 16'(n), $sformatf("%s: N = %0d packets", what, n));
    check(tgt_p == 16'd3, $sformatf("%s: P = 3", what));
    check(srv_restarts == 0, $sformatf("%s: no restart", what));
    mbps = real'(len) * 8.0 / real'(t1 - t0) * 100.0;
    $display("%s: %0d bytes in %0d cycles = %0.1f Mb/s at 100 MHz (%0.3f Mb/s per MHz)",
             what, len, t1 - t0, mbps, mbps / 100.0);
    check(mbps >= 40.0, $sformatf("%s: at least 40 Mb/s", what));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    base = 0;
    run(60 * 1024, "60 KB bitstream");
    base = 12345;
    run(200 * 1024, "200 KB bitstream");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
