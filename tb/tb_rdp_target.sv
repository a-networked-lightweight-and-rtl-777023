// tb_rdp_target: drives the target protocol engine at the payload level (the
// testbench stands in for both MACs) with a real packet buffer behind it.
// Checks the N/P negotiation and P = (slots-1)/2, the ACK after every P
// packets and after packet N, the data that reaches the buffer, ACKs held
// back until the buffer has room, NACK with the right error code and a
// flushed buffer for a sequence error, an FCS error, a wrong message type
// and a short packet, the master-mode name request and its repetition on
// timeout, and the timeout while waiting for packets.
module tb_rdp_target;
  import tb_util_pkg::*;

  localparam int SLOTS = 7, SB = 1500, NB = 16, TO = 3000;
  localparam int OW = $clog2(SB), LW = $clog2(SB + 1), CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                name_req = 0;
  logic [NB-1:0][7:0]  name = '0;
  logic [CW-1:0]       mem_slots = CW'(SLOTS);
  logic                rx_pay_valid = 0, rx_frm_end = 0, rx_frm_ok = 0;
  logic [7:0]          rx_pay_data = 0;
  logic                tx_start, tx_busy = 0, tx_done = 0;
  logic [10:0]         tx_len, tx_pay_idx;
  logic [7:0]          tx_pay_byte;
  logic                ring_wr_en, ring_commit, ring_flush, ring_full, ring_empty;
  logic [OW-1:0]       ring_wr_off, rd_off = 0;
  logic [7:0]          ring_wr_data, rd_data;
  logic [LW-1:0]       ring_commit_len, head_len;
  logic [CW-1:0]       ring_count;
  logic                rd_en = 0, pop = 0;
  logic                sess_active, sess_done, sess_err, trace_valid;
  logic [7:0]          err_code, trace_char;
  logic [15:0]         cur_n, cur_p, pkt_cnt;

  rdp_target #(.SLOTS(SLOTS), .SLOT_BYTES(SB), .NAME_BYTES(NB), .TIMEOUT_CYCLES(TO)) dut (.*);

  pkt_ring #(.SLOTS(SLOTS), .SLOT_BYTES(SB)) ring (.clk, .rst_n, .flush(ring_flush),
    .wr_en(ring_wr_en), .wr_off(ring_wr_off), .wr_data(ring_wr_data), .commit(ring_commit),
    .commit_len(ring_commit_len), .rd_en, .rd_off, .rd_data, .head_len, .pop,
    .count(ring_count), .empty(ring_empty), .full(ring_full));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- transmit side: read each reply through the index port ----
  bq_t tx_q[$];
  int  tx_cnt = 0, tx_n = 0;
  bq_t tx_cur;
  initial tx_pay_idx = 0;
  always @(posedge clk) begin
    tx_done <= 0;
    if (!tx_busy) begin
      if (tx_start) begin
        tx_busy <= 1; tx_n = tx_len; tx_cnt = 0; tx_pay_idx <= 0;
        tx_cur.delete();
      end
    end else if (tx_cnt < tx_n) begin
      tx_cur.push_back(tx_pay_byte);
      tx_cnt++;
      tx_pay_idx <= 11'(tx_cnt);
    end else if (tx_cnt < tx_n + 30) begin
      tx_cnt++;
    end else if (!tx_done) begin
      tx_q.push_back(tx_cur);
      tx_done <= 1;
      tx_busy <= 0;
    end
  end

  // ---- consumer: drains the buffer when allowed, keeps what it read ----
  bit  drain = 1;
  int  rd_idx;
  bq_t drained;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (drain && !ring_empty && !ring_flush) begin
        automatic int n = head_len;
        for (int i = 0; i < n; i++) begin
          rd_idx = i;
          rd_en <= 1; rd_off <= OW'(rd_idx);
          @(posedge clk);
          rd_en <= 0;
          @(negedge clk);
          drained.push_back(rd_data);
        end
        @(posedge clk) pop <= 1;
        @(posedge clk) pop <= 0;
      end
    end
  end

  string trace;
  always @(posedge clk) if (trace_valid) trace = {trace, string'(trace_char)};

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

  bq_t sent_data;
  task automatic data(input int seq, input int len, input bit ok = 1, input int claim = -1);
    bq_t body;
    for (int i = 0; i < len; i++) body.push_back(bs_byte(seq * 3001 + i));
    if (ok && claim < 0) foreach (body[i]) sent_data.push_back(body[i]);
    rx(msg(8'h04, seq, claim < 0 ? len : claim, body), ok);
  endtask

  task automatic expect_msg(input byte unsigned typ, input int seq, input int val, input string what,
                            input int wait_cycles = 2000);
    int t = 0;
    while (tx_q.size() == 0 && t < wait_cycles) begin @(posedge clk); t++; end
    if (tx_q.size() == 0) check(0, {what, ": no reply"});
    else begin
      bq_t m = tx_q.pop_front();
      check(m.size() >= 6 && m[0] == typ && {m[2], m[3]} == 16'(seq) && {m[4], m[5]} == 16'(val),
            $sformatf("%s: got type %0d seq %0d val %0d", what, m[0], {m[2], m[3]}, {m[4], m[5]}));
    end
  endtask

  task automatic no_msg(input int cycles, input string what);
    repeat (cycles) @(posedge clk);
    check(tx_q.size() == 0, what);
  endtask

  bq_t none;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. slave mode, N = 5, P = 3
    rx(msg(8'h02, 0, 5, none));
    expect_msg(8'h03, 0, 3, "P for 7 slots");
    check(sess_active && cur_n == 5, "session open");
    data(1, 100); data(2, 1494); no_msg(100, "no ACK before P packets");
    data(3, 7);
    expect_msg(8'h05, 3, 3, "ACK after burst 1");
    data(4, 1500); data(5, 33);
    expect_msg(8'h05, 5, 3, "ACK after packet N");
    repeat (5000) @(posedge clk);
    check(drained == sent_data, $sformatf("buffer carried all data (%0d bytes)", drained.size()));
    check(!sess_active, "session closed");
    check(trace == "NAD", {"trace ", trace});

    // 2. sequence error, then FCS error
    rx(msg(8'h02, 0, 4, none));
    expect_msg(8'h03, 0, 3, "P");
    data(1, 50); data(3, 50);
    expect_msg(8'h06, 1, 3, "NACK for a missing packet");
    rx(msg(8'h02, 0, 2, none));
    expect_msg(8'h03, 0, 3, "P after restart");
    data(1, 60, 0);
    expect_msg(8'h06, 0, 1, "NACK for an FCS error");
    rx(msg(8'h02, 0, 2, none));
    expect_msg(8'h03, 0, 3, "P");
    rx(msg(8'h05, 1, 0, none));
    expect_msg(8'h06, 0, 2, "NACK for a wrong message type");
    rx(msg(8'h02, 0, 2, none));
    expect_msg(8'h03, 0, 3, "P");
    data(1, 60, 1, 80);
    expect_msg(8'h06, 0, 4, "NACK for a short packet");
    data(1, 60, 1, 0);
    no_msg(200, "DATA outside a session ignored");
    rx(msg(8'h02, 0, 2, none));
    expect_msg(8'h03, 0, 3, "P");
    data(1, 60); data(1, 60);
    expect_msg(8'h06, 1, 3, "NACK for a duplicated packet");

    // 3. ACK waits for room: consumer stopped
    repeat (3000) @(posedge clk);
    drain = 0;
    drained.delete(); sent_data.delete();
    rx(msg(8'h02, 0, 9, none));
    expect_msg(8'h03, 0, 3, "P");
    data(1, 10); data(2, 10); data(3, 10);
    expect_msg(8'h05, 3, 3, "ACK with room left");
    data(4, 10); data(5, 10); data(6, 10);
    no_msg(500, "ACK held while the buffer lacks room");
    check(ring_count == 6, "six packets buffered");
    drain = 1;
    expect_msg(8'h05, 6, 3, "ACK once the buffer drained");
    data(7, 10); data(8, 10); data(9, 10);
    expect_msg(8'h05, 9, 3, "final ACK");

    // 4. fewer slots granted: P = 1
    mem_slots = 3;
    rx(msg(8'h02, 0, 2, none));
    expect_msg(8'h03, 0, 1, "P for 3 slots");
    data(1, 20);
    expect_msg(8'h05, 1, 1, "ACK every packet");
    data(2, 20);
    expect_msg(8'h05, 2, 1, "ACK packet N");
    mem_slots = CW'(SLOTS);

    // 5. timeout while waiting for packets
    rx(msg(8'h02, 0, 3, none));
    expect_msg(8'h03, 0, 3, "P");
    data(1, 20);
    no_msg(TO - 500, "no reply before the timer expires");
    expect_msg(8'h06, 1, 6, "NACK on timeout", 2000);

    // 6. master mode: name request, repeated after a timeout
    for (int i = 0; i < NB; i++) name[i] = 8'(8'h61 + i);
    @(posedge clk) name_req <= 1;
    @(posedge clk) name_req <= 0;
    begin
      automatic bit same;
      automatic bq_t m;
      @(posedge clk iff tx_q.size() > 0);
      m = tx_q.pop_front();
      same = (m.size() == 6 + NB) && m[0] == 8'h01 && {m[4], m[5]} == 16'(NB);
      for (int i = 0; i < NB && same; i++) same = (m[6 + i] == 8'(8'h61 + i));
      check(same, "NAME message carries the name");
    end
    expect_msg(8'h01, 0, NB, "NAME repeated after timeout", TO + 2000);
    rx(msg(8'h02, 0, 1, none));
    expect_msg(8'h03, 0, 3, "P after name");
    data(1, 5);
    expect_msg(8'h05, 1, 3, "ACK");
    repeat (100) @(posedge clk);
    check(trace.substr(trace.len() - 4, trace.len() - 1) == "RTND", {"trace ", trace});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
