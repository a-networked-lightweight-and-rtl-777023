// tb_eth_tx: checks the transmit MAC: the exact wire image of a frame
// (preamble, SFD, header, payload read through the index interface from a
// memory with one cycle of latency, zero padding, FCS) against the reference
// model, the byte spacing of BYTE_CYCLES clocks, and the 12-byte gap before
// tx_done.
module tb_eth_tx;
  import tb_util_pkg::*;

  localparam logic [47:0] MAC = 48'h02_00_00_00_00_10;
  localparam int BC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        tx_start = 0, tx_busy, tx_done, tx_dv, tx_stb;
  logic [47:0] tx_dst = 48'h02_00_00_00_00_01;
  logic [10:0] tx_len = 0, pay_idx;
  logic [7:0]  pay_byte, txd;

  eth_tx #(.MAC_ADDR(MAC), .BYTE_CYCLES(BC)) dut (.clk, .rst_n, .tx_start, .tx_dst, .tx_len,
    .tx_busy, .tx_done, .pay_idx, .pay_byte, .tx_dv, .tx_stb, .txd);

  // payload memory with one cycle of read latency
  int seed = 0;
  always_ff @(posedge clk) pay_byte <= bs_byte(32'(pay_idx) + seed);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bq_t wire_q;
  longint last_stb = -1, cyc = 0;
  int bad_gap = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_stb) begin
      if (!tx_dv) bad_gap++;
      if (last_stb >= 0 && wire_q.size() > 0 && cyc - last_stb != BC) bad_gap++;
      wire_q.push_back(txd);
      last_stb = cyc;
    end
  end

  task automatic one(input int len, input int s);
    bq_t pay, exp;
    longint t0, t_done;
    seed = s;
    for (int i = 0; i < len; i++) pay.push_back(bs_byte(i + s));
    exp = eth_frame(tx_dst, MAC, ETYPE, pay);
    wire_q.delete();
    bad_gap = 0;
    @(posedge clk);
    tx_start <= 1; tx_len <= 11'(len);
    @(posedge clk);
    tx_start <= 0;
    t0 = cyc;
    @(posedge clk iff tx_done);
    t_done = cyc;
    check(wire_q.size() == exp.size(), $sformatf("frame length %0d vs %0d", wire_q.size(), exp.size()));
    begin
      automatic bit same = (wire_q.size() == exp.size());
      for (int i = 0; i < exp.size() && same; i++) same = (wire_q[i] == exp[i]);
      check(same, $sformatf("wire image len=%0d", len));
    end
    check(bad_gap == 0, "one byte every BYTE_CYCLES clocks");
    // busy for the frame plus 12 idle byte times
    check(t_done - t0 >= longint'((exp.size() + 12) * BC) - BC &&
          t_done - t0 <= longint'((exp.size() + 12) * BC) + 2, $sformatf("frame time %0d", t_done - t0));
    @(posedge clk);
    check(!tx_busy && !tx_dv, "idle after done");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(6, 3);
    one(100, 17);
    one(1500, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
