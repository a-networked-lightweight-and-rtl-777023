// tb_rdp_server: drives the server protocol engine at the payload level (the
// testbench stands in for both MACs and for the bitstream store). Checks N =
// ceil(len/MAX_DATA), bursts of exactly P DATA packets with the right
// numbers, lengths and content, the wait for an ACK after each burst and
// after packet N, restart from N after a NACK and after a timeout, an ACK
// with a wrong number ignored, and the name request of a master-mode target.
module tb_rdp_server;
  import tb_util_pkg::*;

  localparam int MD = 1494, NB = 16, TO = 4000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               push = 0, req_valid;
  logic [31:0]        push_len = 0, bs_addr;
  logic [NB-1:0][7:0] req_name;
  logic [7:0]         bs_data;
  logic               rx_pay_valid = 0, rx_frm_end = 0, rx_frm_ok = 0;
  logic [7:0]         rx_pay_data = 0;
  logic               tx_start, tx_busy = 0, tx_done = 0;
  logic [10:0]        tx_len, tx_pay_idx;
  logic [7:0]         tx_pay_byte;
  logic               busy, done;
  logic [15:0]        restarts, cur_n, cur_p;

  rdp_server #(.MAX_DATA_BYTES(MD), .NAME_BYTES(NB), .TIMEOUT_CYCLES(TO)) dut (.*);

  always_ff @(posedge clk) bs_data <= bs_byte(bs_addr);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // transmit side: one byte every 3 clocks through the index port
  bq_t tx_q[$];
  bq_t tx_cur;
  int  tx_cnt = 0, tx_n = 0, tx_ph = 0;
  initial tx_pay_idx = 0;
  always @(posedge clk) begin
    tx_done <= 0;
    if (!tx_busy) begin
      if (tx_start) begin
        tx_busy <= 1; tx_n = tx_len; tx_cnt = 0; tx_ph = 0; tx_pay_idx <= 0;
        tx_cur.delete();
      end
    end else if (tx_cnt < tx_n) begin
      tx_ph++;
      if (tx_ph == 3) begin
        tx_ph = 0;
        tx_cur.push_back(tx_pay_byte);
        tx_cnt++;
        tx_pay_idx <= 11'(tx_cnt);
      end
    end else if (tx_cnt < tx_n + 20) begin
      tx_cnt++;
    end else if (!tx_done) begin
      tx_q.push_back(tx_cur);
      tx_done <= 1;
      tx_busy <= 0;
    end
  end

  int  names = 0;
  logic [NB-1:0][7:0] last_name;
  always @(posedge clk) if (req_valid) begin names++; last_name = req_name; end
  int dones = 0;
  always @(posedge clk) if (done) dones++;

  task automatic rx(input bq_t m, input bit ok = 1);
    foreach (m[i]) begin
      @(posedge clk);
      rx_pay_valid <= 1; rx_pay_data <= m[i];
      @(posedge clk);
      rx_pay_valid <= 0;
    end
    @(posedge clk);
    rx_frm_end <= 1; rx_frm_ok <= ok;
    @(posedge clk);
    rx_frm_end <= 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic get(output bq_t m, input int wait_cycles = 30000);
    int t = 0;
    while (tx_q.size() == 0 && t < wait_cycles) begin @(posedge clk); t++; end
    if (tx_q.size() == 0) m = {};
    else m = tx_q.pop_front();
  endtask

  task automatic expect_n(input int n, input string what, input int wait_cycles = 30000);
    bq_t m;
    get(m, wait_cycles);
    check(m.size() == 6 && m[0] == 8'h02 && {m[4], m[5]} == 16'(n),
          $sformatf("%s: N message (size %0d)", what, m.size()));
  endtask

  task automatic expect_data(input int seq, input int len_total);
    bq_t m;
    int off = (seq - 1) * MD;
    int dl = (len_total - off > MD) ? MD : len_total - off;
    bit same;
    get(m);
    same = (m.size() == 6 + dl) && m[0] == 8'h04 && {m[2], m[3]} == 16'(seq) && {m[4], m[5]} == 16'(dl);
    for (int i = 0; i < dl && same; i++) same = (m[6 + i] == bs_byte(off + i));
    check(same, $sformatf("DATA %0d of %0d bytes (got size %0d)", seq, dl, m.size()));
  endtask

  task automatic no_msg(input int cycles, input string what);
    repeat (cycles) @(posedge clk);
    check(tx_q.size() == 0 && !tx_busy, what);
  endtask

  task automatic start(input int len);
    @(posedge clk) begin push <= 1; push_len <= len; end
    @(posedge clk) push <= 0;
  endtask

  bq_t none;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. 5000 bytes: N = 4, P = 3
    start(5000);
    expect_n(4, "first session");
    rx(msg(8'h03, 0, 3, none));
    expect_data(1, 5000); expect_data(2, 5000); expect_data(3, 5000);
    no_msg(300, "waits for ACK after P packets");
    rx(msg(8'h05, 3, 3, none));
    expect_data(4, 5000);
    no_msg(300, "waits for ACK after packet N");
    check(dones == 0 && busy, "not done before the last ACK");
    rx(msg(8'h05, 4, 3, none));
    repeat (5) @(posedge clk);
    check(dones == 1 && !busy, "done after the last ACK");

    // 2. NACK restarts the bitstream; a wrong ACK is ignored
    start(3000);
    expect_n(3, "second session");
    rx(msg(8'h03, 0, 2, none));
    expect_data(1, 3000); expect_data(2, 3000);
    rx(msg(8'h06, 2, 3, none));
    expect_n(3, "restart after NACK");
    check(restarts == 1, "restart counted");
    rx(msg(8'h03, 0, 2, none));
    expect_data(1, 3000); expect_data(2, 3000);
    rx(msg(8'h05, 1, 2, none));
    no_msg(300, "ACK with a wrong number ignored");
    rx(msg(8'h05, 2, 2, none));
    expect_data(3, 3000);
    rx(msg(8'h05, 3, 2, none));
    repeat (5) @(posedge clk);
    check(dones == 2, "second session done");

    // 3. timeout while waiting for P
    start(100);
    expect_n(1, "third session");
    no_msg(TO - 500, "nothing before the timer expires");
    expect_n(1, "restart after timeout", 2000);
    check(restarts == 2, "timeout restart counted");
    rx(msg(8'h03, 0, 3, none));
    expect_data(1, 100);
    rx(msg(8'h05, 1, 3, none));
    repeat (5) @(posedge clk);
    check(dones == 3, "third session done");

    // 4. name request
    begin
      bq_t nm;
      for (int i = 0; i < NB; i++) nm.push_back(8'(8'h41 + i));
      rx(msg(8'h01, 0, NB, nm));
      check(names == 1 && last_name[0] == 8'h41 && last_name[NB-1] == 8'(8'h41 + NB - 1),
            "name request passed to the store");
      no_msg(100, "no transfer before the store answers");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
