// tb_rdp_platform: the target platform on its network pins. A link model
// plays the server: it sends real Ethernet frames (N, DATA packets) and
// decodes the platform's replies. Checks the whole path from the wire to
// the ICAP model: P = 3, ACK every 3 packets, every bitstream byte written to
// the ICAP in order with random ICAP busy stalls, a frame with a bit error
// answered by a NACK and a restart, frames for another station ignored, the
// trace characters on the serial line, and a master-mode name request.
module tb_rdp_platform;
  import tb_util_pkg::*;

  localparam logic [47:0] TGT = 48'h02_00_00_00_00_01;
  localparam logic [47:0] SRV = 48'h02_00_00_00_00_10;
  localparam int NB = 16, DIV = 8, MD = 1494;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       rx_dv, rx_stb, tx_dv, tx_stb;
  logic [7:0] rxd, txd;
  logic       name_req = 0;
  logic [NB-1:0][7:0] name = '0;
  logic [2:0] mem_slots = 3'd7;
  logic       ce_n, write_n, busy, uart_txd;
  logic [7:0] icap_i;
  logic       sess_active, sess_done, sess_err;
  logic [7:0] err_code;
  logic [15:0] pkt_cnt, cur_p;
  logic [2:0] ring_count;
  logic [31:0] icap_bytes;

  rdp_platform #(.MAC_ADDR(TGT), .SERVER_MAC(SRV), .TIMEOUT_CYCLES(200000), .UART_DIV(DIV)) dut (
    .clk, .rst_n, .rx_dv, .rx_stb, .rxd, .tx_dv, .tx_stb, .txd, .name_req, .name, .mem_slots,
    .icap_ce_n(ce_n), .icap_write_n(write_n), .icap_i, .icap_busy(busy), .uart_txd,
    .sess_active, .sess_done, .sess_err, .err_code, .pkt_cnt, .cur_p, .ring_count, .icap_bytes);

  rdp_link_bfm #(.MY_MAC(SRV)) srv (.clk, .dv(rx_dv), .stb(rx_stb), .d(rxd),
    .mon_dv(tx_dv), .mon_stb(tx_stb), .mon_d(txd));

  icap_model icap (.clk, .ce_n, .write_n, .i(icap_i), .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // serial trace decoder
  string trace;
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge uart_txd);
      repeat (DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        c[i] = uart_txd;
      end
      repeat (DIV) @(posedge clk);
      trace = {trace, string'(c)};
    end
  end

  task automatic expect_reply(input byte unsigned typ, input int seq, input int val, input string what);
    automatic int t = 0;
    bq_t m;
    while (srv.rx_q.size() == 0 && t < 100000) begin @(posedge clk); t++; end
    if (srv.rx_q.size() == 0) begin check(0, {what, ": no reply"}); return; end
    m = srv.rx_q.pop_front();
    check(m[0] == typ && {m[2], m[3]} == 16'(seq) && {m[4], m[5]} == 16'(val),
          $sformatf("%s: got type %0d seq %0d val %0d", what, m[0], {m[2], m[3]}, {m[4], m[5]}));
  endtask

  bq_t none, bits;
  task automatic data(input int seq, input int len, input int flip = -1);
    bq_t body;
    for (int i = 0; i < len; i++) body.push_back(bs_byte((seq - 1) * MD + i));
    srv.send(TGT, msg(8'h04, seq, len, body), 8, flip);
  endtask

  task automatic session(input int len, input bit expect_ok);
    int n = (len + MD - 1) / MD;
    srv.send(TGT, msg(8'h02, 0, n, none));
    expect_reply(8'h03, 0, 3, "P = 3");
    for (int s = 1; s <= n; s++) begin
      int dl = (s * MD <= len) ? MD : len - (s - 1) * MD;
      data(s, dl);
      if (s % 3 == 0 || s == n) expect_reply(8'h05, s, 3, $sformatf("ACK %0d", s));
    end
  endtask

  initial begin
    icap.busy_pct = 20;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. a 10 000-byte bitstream: N = 7, bursts 3 + 3 + 1
    session(10000, 1);
    repeat (2000) @(posedge clk);
    begin
      automatic bit same = (icap.data_q.size() == 10000);
      for (int i = 0; i < 10000 && same; i++) same = (icap.data_q[i] == bs_byte(i));
      check(same, $sformatf("ICAP got the bitstream (%0d bytes)", icap.data_q.size()));
    end
    check(icap_bytes == 10000, "ICAP byte count");
    check(icap.stalls > 0, "ICAP busy stalls happened");
    check(srv.rx_bad == 0, "replies are well-formed frames");

    // 2. bit error in packet 2: NACK, then the server restarts
    srv.send(TGT, msg(8'h02, 0, 4, none));
    expect_reply(8'h03, 0, 3, "P");
    data(1, 300);
    data(2, 300, 100);
    expect_reply(8'h06, 1, 1, "NACK for an FCS error");
    repeat (200) @(posedge clk);
    check(ring_count == 0 && !sess_active, "session stopped and buffer flushed");
    // a frame for another station is ignored
    srv.send(48'h02_00_00_00_00_77, msg(8'h02, 0, 4, none));
    repeat (500) @(posedge clk);
    check(srv.rx_q.size() == 0 && !sess_active, "foreign frame ignored");

    // 3. master mode: the platform asks by name
    for (int i = 0; i < NB; i++) name[i] = 8'(8'h30 + i);
    @(posedge clk) name_req <= 1;
    @(posedge clk) name_req <= 0;
    begin
      automatic int t = 0;
      bq_t m;
      bit same;
      while (srv.rx_q.size() == 0 && t < 100000) begin @(posedge clk); t++; end
      m = (srv.rx_q.size() > 0) ? srv.rx_q.pop_front() : none;
      same = m.size() >= 6 + NB && m[0] == 8'h01;
      for (int i = 0; i < NB && same; i++) same = (m[6 + i] == 8'(8'h30 + i));
      check(same, "NAME request on the wire");
      check(srv.rx_dst_q[srv.rx_dst_q.size() - 1] == SRV, "sent to the server");
    end
    icap.data_q.delete();
    session(2000, 1);
    repeat (3000) @(posedge clk);
    begin
      automatic bit same = (icap.data_q.size() == 2000);
      for (int i = 0; i < 2000 && same; i++) same = (icap.data_q[i] == bs_byte(i));
      check(same, "ICAP got the named bitstream");
    end
    repeat (200 * DIV) @(posedge clk);
    check(trace == "NAADNERND", {"trace ", trace});

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
