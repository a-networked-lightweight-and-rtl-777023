// tb_rdp_server_node: the server node on its network pins. A link model
// plays the target: it answers with P and ACK frames and checks the N and
// DATA frames the node sends (addressing, numbering, content read from the
// bitstream store), the wait for an ACK after each burst of P, a NACK
// restart, and a NAME request reaching the store interface.
module tb_rdp_server_node;
  import tb_util_pkg::*;

  localparam logic [47:0] TGT = 48'h02_00_00_00_00_01;
  localparam logic [47:0] SRV = 48'h02_00_00_00_00_10;
  localparam int NB = 16, MD = 1494;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        rx_dv, rx_stb, tx_dv, tx_stb;
  logic [7:0]  rxd, txd, bs_data;
  logic        push = 0, req_valid, busy, done;
  logic [31:0] push_len = 0, bs_addr;
  logic [NB-1:0][7:0] req_name;
  logic [15:0] restarts, cur_n;

  rdp_server_node #(.MAC_ADDR(SRV), .TARGET_MAC(TGT), .TIMEOUT_CYCLES(300000)) dut (.*);

  rdp_link_bfm #(.MY_MAC(TGT)) tgt (.clk, .dv(rx_dv), .stb(rx_stb), .d(rxd),
    .mon_dv(tx_dv), .mon_stb(tx_stb), .mon_d(txd));

  always_ff @(posedge clk) bs_data <= bs_byte(bs_addr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int dones = 0, names = 0;
  always @(posedge clk) begin
    if (done) dones++;
    if (req_valid && req_name[0] == 8'h61) names++;
  end

  task automatic get(output bq_t m);
    automatic int t = 0;
    while (tgt.rx_q.size() == 0 && t < 200000) begin @(posedge clk); t++; end
    m.delete();
    if (tgt.rx_q.size() > 0) m = tgt.rx_q.pop_front();
    if (tgt.rx_dst_q.size() > 0) check(tgt.rx_dst_q.pop_front() == TGT, "frame addressed to the target");
  endtask

  task automatic expect_data(input int seq, input int len_total);
    bq_t m;
    int off = (seq - 1) * MD;
    int dl = (len_total - off > MD) ? MD : len_total - off;
    bit same;
    get(m);
    same = (m.size() >= 6 + dl) && m[0] == 8'h04 && {m[2], m[3]} == 16'(seq) && {m[4], m[5]} == 16'(dl);
    for (int i = 0; i < dl && same; i++) same = (m[6 + i] == bs_byte(off + i));
    check(same, $sformatf("DATA %0d of %0d bytes", seq, dl));
  endtask

  task automatic expect_n(input int n);
    bq_t m;
    get(m);
    check(m.size() >= 6 && m[0] == 8'h02 && {m[4], m[5]} == 16'(n), $sformatf("N = %0d", n));
  endtask

  bq_t none;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    @(posedge clk) begin push <= 1; push_len <= 4000; end
    @(posedge clk) push <= 0;
    expect_n(3);
    tgt.send(SRV, msg(8'h03, 0, 2, none));
    expect_data(1, 4000); expect_data(2, 4000);
    repeat (3000) @(posedge clk);
    check(tgt.rx_q.size() == 0 && busy, "waits for ACK after P = 2 packets");
    tgt.send(SRV, msg(8'h06, 2, 3, none));
    expect_n(3);
    check(restarts == 1, "NACK restarts the bitstream");
    tgt.send(SRV, msg(8'h03, 0, 2, none));
    expect_data(1, 4000); expect_data(2, 4000);
    tgt.send(SRV, msg(8'h05, 2, 2, none));
    expect_data(3, 4000);
    tgt.send(SRV, msg(8'h05, 3, 2, none));
    repeat (100) @(posedge clk);
    check(dones == 1 && !busy, "transfer done");
    check(tgt.rx_bad == 0, "all frames well-formed");
    begin
      automatic bq_t nm;
      for (int i = 0; i < NB; i++) nm.push_back(8'(8'h61 + i));
      tgt.send(SRV, msg(8'h01, 0, NB, nm));
      repeat (10) @(posedge clk);
      check(names == 1, "name request reaches the store");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
