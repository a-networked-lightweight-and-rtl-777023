// tb_rdp_system: end-to-end test of the networked reconfiguration system.
// The server and the target talk through two LAN channel models that can
// corrupt, drop or cut frames; a bitstream store feeds the server and an
// ICAP model takes the target's output. Sessions exercise, and the test
// counts: slave-mode transfers, a master-mode name request, bursts of P = 3
// with ACKs and a short final burst, a bit error (FCS NACK and restart), a
// lost packet (sequence NACK and restart), a lost ACK (server timeout), a
// link cut (target timeout), ACKs held back by a slow ICAP (buffer room),
// ICAP busy stalls, and a smaller memory grant (P = 1). After every session
// the ICAP must have received the whole bitstream, in order, last of all.
// The clean transfer's speed is measured in Mb/s at a 100 MHz clock.
module tb_rdp_system;
  import tb_util_pkg::*;

  localparam int NB = 16, TO = 100000, DIV = 8;

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

  rdp_system #(.TIMEOUT_CYCLES(TO), .UART_DIV(DIV)) dut (.*);

  lan_channel down (.clk, .in_dv(srv_tx_dv), .in_stb(srv_tx_stb), .in_d(srv_txd),
                    .out_dv(tgt_rx_dv), .out_stb(tgt_rx_stb), .out_d(tgt_rxd));
  lan_channel up   (.clk, .in_dv(tgt_tx_dv), .in_stb(tgt_tx_stb), .in_d(tgt_txd),
                    .out_dv(srv_rx_dv), .out_stb(srv_rx_stb), .out_d(srv_rxd));
  icap_model icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n), .i(icap_i), .busy(icap_busy));

  // bitstream store: content depends on the session's base address
  int unsigned base = 0;
  always_ff @(posedge clk) bs_data <= bs_byte(bs_addr + base);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- mechanism counters ----
  int n_ack = 0, n_nack = 0, n_tmo = 0, n_done = 0, n_name = 0, n_room_wait = 0, n_p1 = 0;
  int n_nack_fcs = 0, n_nack_seq = 0, n_short_burst = 0, n_srv_done = 0;
  always @(posedge clk) begin
    if (dut.u_target.tr_valid) begin
      case (dut.u_target.tr_char)
        "A": n_ack++;
        "E": n_nack++;
        "T": n_tmo++;
        "D": n_done++;
        "R": n_name++;
        default: ;
      endcase
    end
    if (tgt_err && tgt_err_code == 8'd1) n_nack_fcs++;
    if (tgt_err && tgt_err_code == 8'd3) n_nack_seq++;
    if (dut.u_target.u_target.st == 3'd4 &&
        !dut.u_target.u_target.room && tgt_pkt_cnt != dut.u_target.u_target.cur_n) n_room_wait++;
    if (tgt_done && tgt_p == 16'd1) n_p1++;
    if (tgt_done && (tgt_pkt_cnt % tgt_p) != 0) n_short_burst++;
    if (srv_done) n_srv_done++;
  end

  // the store answers a name request with the length it knows for that name
  int unsigned named_len = 0, push_req_len = 0;
  bit push_req = 0;
  always @(posedge clk) begin
    srv_push <= 0;
    if (push_req) begin
      push_req = 0;
      srv_push <= 1;
      srv_push_len <= push_req_len;
    end else if (srv_req_valid) begin
      srv_push <= 1;
      srv_push_len <= named_len;
    end
  end

  task automatic wait_done(input string what, input int max_cycles = 3000000);
    automatic int t = 0;
    automatic int d0 = n_srv_done;
    while (n_srv_done == d0 && t < max_cycles) begin @(posedge clk); t++; end
    check(n_srv_done > d0, {what, ": server finished"});
    // let the ICAP drain
    t = 0;
    while ((tgt_ring_count != 0 || !icap_ce_n) && t < 2000000) begin @(posedge clk); t++; end
    repeat (20) @(posedge clk);
  endtask

  task automatic check_icap(input int len, input string what);
    automatic int s = icap.data_q.size();
    automatic bit same = (s >= len);
    for (int i = 0; i < len && same; i++) same = (icap.data_q[s - len + i] == bs_byte(i + base));
    check(same, $sformatf("%s: ICAP holds the %0d-byte bitstream at its end (%0d bytes in all)", what, len, s));
    icap.data_q.delete();
  endtask

  task automatic push(input int len);
    push_req_len = len;
    push_req = 1;
    @(posedge clk iff srv_push);
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    longint t0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);

    // 1. clean slave-mode transfer, 10 000 bytes: N = 7, bursts 3 + 3 + 1
    base = 0;
    icap.busy_pct = 20;
    t0 = cyc;
    push(10000);
    wait_done("clean transfer");
    check_icap(10000, "clean transfer");
    begin
      automatic real mbps = 10000.0 * 8.0 / real'(cyc - t0) * 100.0;
      $display("clean transfer: %0d cycles, %0.1f Mb/s at 100 MHz", cyc - t0, mbps);
      check(mbps > 40.0, "at least the 40 Mb/s sustained rate reported for the design");
      check(mbps < 100.0, "below the 100 Mb/s line rate");
    end
    check(srv_restarts == 0, "no restart on a clean link");

    // 2. bit error in packet 2
    base = 111;
    push(6000);
    @(posedge clk iff tgt_pkt_cnt == 1);
    down.corrupt_next = 1;
    wait_done("bit error");
    check_icap(6000, "after a bit error");

    // 3. packet 2 lost
    base = 222;
    push(6000);
    @(posedge clk iff tgt_pkt_cnt == 1);
    down.drop_next = 1;
    wait_done("lost packet");
    check_icap(6000, "after a lost packet");

    // 4. first ACK lost: server times out
    base = 333;
    push(6000);
    @(posedge clk iff tgt_pkt_cnt == 3);
    up.drop_next = 1;
    wait_done("lost ACK");
    check_icap(6000, "after a lost ACK");

    // 5. link cut in the middle of a burst: target times out
    base = 444;
    push(8000);
    @(posedge clk iff tgt_pkt_cnt == 4);
    down.dead = 1;
    repeat (TO + 5000) @(posedge clk);
    down.dead = 0;
    wait_done("link cut");
    check_icap(8000, "after a link cut");

    // 6. master mode
    base = 555;
    named_len = 3000;
    for (int i = 0; i < NB; i++) tgt_name[i] = 8'(8'h61 + i);
    @(posedge clk) tgt_name_req <= 1;
    @(posedge clk) tgt_name_req <= 0;
    wait_done("master mode");
    check_icap(3000, "master mode");
    check(srv_req_name[0] == 8'h61 && srv_req_name[NB-1] == 8'(8'h61 + NB - 1), "name seen by the store");

    // 7. slow ICAP: ACKs wait for buffer room
    base = 666;
    icap.busy_pct = 95;
    push(24000);
    wait_done("slow ICAP");
    check_icap(24000, "slow ICAP");
    icap.busy_pct = 20;

    // 8. less memory granted: P = 1
    base = 777;
    tgt_mem_slots = 3'd3;
    push(4000);
    wait_done("P = 1");
    check_icap(4000, "P = 1");
    tgt_mem_slots = 3'd7;

    // mechanisms seen
    $display("ack=%0d nack=%0d (fcs %0d, seq %0d) timeout=%0d done=%0d name=%0d room_wait=%0d p1=%0d short=%0d restarts=%0d stalls=%0d",
             n_ack, n_nack, n_nack_fcs, n_nack_seq, n_tmo, n_done, n_name, n_room_wait, n_p1,
             n_short_burst, srv_restarts, icap.stalls);
    check(n_ack > 0, "burst ACKs happened");
    check(n_done == 8, "eight sessions ended with packet N");
    check(n_nack_fcs > 0, "FCS error NACK happened");
    check(n_nack_seq > 0, "sequence error NACK happened");
    check(n_tmo > 0, "target timeout happened");
    check(srv_restarts >= 4 && srv_restarts <= 8, "server restarts happened");
    check(n_name == 1, "name request happened");
    check(n_room_wait > 0, "ACK held for buffer room happened");
    check(n_p1 == 1, "session with P = 1 happened");
    check(n_short_burst > 0, "short final burst happened");
    check(icap.stalls > 0, "ICAP busy stalls happened");
    check(down.corrupted == 1 && down.dropped == 1 && up.dropped == 1, "channel faults injected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
