// tb_icap_writer: the ICAP writer draining a real packet buffer. Checks that
// every committed byte reaches the ICAP model in order, that with busy low a
// full buffer streams at exactly one byte per clock across slot boundaries,
// that random busy stalls lose nothing, and that flush empties the pipeline.
module tb_icap_writer;
  import tb_util_pkg::*;

  localparam int SLOTS = 7, SB = 1500;
  localparam int OW = $clog2(SB), LW = $clog2(SB + 1), CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          flush = 0, wr_en = 0, commit = 0, rd_en, pop;
  logic [OW-1:0] wr_off = 0, rd_off;
  logic [7:0]    wr_data = 0, rd_data;
  logic [LW-1:0] commit_len = 0, head_len;
  logic [CW-1:0] count;
  logic          empty, full;
  logic          ce_n, write_n, busy;
  logic [7:0]    icap_i;
  logic [31:0]   bytes_written;

  logic hold = 0;   // keeps the writer from seeing data until the buffer is full

  pkt_ring #(.SLOTS(SLOTS), .SLOT_BYTES(SB)) ring (.*);
  icap_writer #(.SLOT_BYTES(SB)) dut (.clk, .rst_n, .flush, .empty(empty || hold), .head_len, .rd_en, .rd_off,
    .rd_data, .pop, .icap_ce_n(ce_n), .icap_write_n(write_n), .icap_i, .icap_busy(busy),
    .bytes_written);
  icap_model icap (.clk, .ce_n, .write_n, .i(icap_i), .busy);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bq_t exp;
  int  n = 0;
  task automatic put(input int len);
    for (int i = 0; i < len; i++) begin
      @(posedge clk);
      wr_en <= 1; wr_off <= OW'(i); wr_data <= bs_byte(n); exp.push_back(bs_byte(n)); n++;
    end
    @(posedge clk);
    wr_en <= 0; commit <= 1; commit_len <= LW'(len);
    @(posedge clk);
    commit <= 0;
  endtask

  task automatic compare(input string what);
    automatic bit same = (icap.data_q.size() == exp.size());
    for (int i = 0; i < exp.size() && same; i++) same = (icap.data_q[i] == exp[i]);
    check(same, $sformatf("%s: %0d bytes vs %0d", what, icap.data_q.size(), exp.size()));
  endtask

  longint cyc = 0, first = -1, lastc = -1;
  always @(posedge clk) begin
    cyc++;
    if (!ce_n && !busy) begin if (first < 0) first = cyc; lastc = cyc; end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill while the writer is held off, then release: full-rate run
    hold <= 1;
    for (int k = 0; k < SLOTS; k++) put(100 + 37 * k);
    @(posedge clk);
    hold <= 0;
    repeat (3000) @(posedge clk);
    compare("full-rate stream");
    check(lastc - first + 1 == longint'(exp.size()), $sformatf("one byte per clock: %0d bytes in %0d cycles",
          exp.size(), lastc - first + 1));
    check(bytes_written == 32'(exp.size()), "bytes_written");
    check(empty, "buffer drained");
    // random busy
    icap.busy_pct = 40;
    for (int k = 0; k < 12; k++) put(1 + $urandom % 300);
    repeat (8000) @(posedge clk);
    compare("stream with busy stalls");
    check(icap.stalls > 0, "busy stalls happened");
    icap.busy_pct = 0;
    // flush in the middle of a packet: what is left is dropped, the buffer empties
    put(500);
    repeat (50) @(posedge clk);
    flush <= 1;
    @(posedge clk);
    flush <= 0;
    repeat (10) @(posedge clk);
    check(empty && ce_n, "flush empties buffer and pipeline");
    check(icap.data_q.size() > exp.size() - 500 && icap.data_q.size() < exp.size() - 400,
          $sformatf("flush stopped the stream after %0d bytes", icap.data_q.size() - (exp.size() - 500)));
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
