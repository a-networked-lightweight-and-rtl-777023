// tb_pkt_ring: checks the circular packet buffer against a queue model:
// packets of random length written, committed, read back byte-exact in order
// and popped, over many wrap-arounds of the 7 slots; full/empty/count; an
// uncommitted packet is overwritten; flush empties the buffer.
module tb_pkt_ring;
  import tb_util_pkg::*;

  localparam int SLOTS = 7, SB = 1500;
  localparam int OW = $clog2(SB), LW = $clog2(SB + 1), CW = $clog2(SLOTS + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          flush = 0, wr_en = 0, commit = 0, rd_en = 0, pop = 0;
  logic [OW-1:0] wr_off = 0, rd_off = 0;
  logic [7:0]    wr_data = 0, rd_data;
  logic [LW-1:0] commit_len = 0, head_len;
  logic [CW-1:0] count;
  logic          empty, full;

  pkt_ring #(.SLOTS(SLOTS), .SLOT_BYTES(SB)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  bq_t model[$];
  int  seed_n = 0;

  task automatic put(input int len, input bit do_commit = 1);
    bq_t p;
    for (int i = 0; i < len; i++) begin
      p.push_back(bs_byte(seed_n * 7919 + i));
      @(posedge clk);
      wr_en <= 1; wr_off <= OW'(i); wr_data <= p[i];
    end
    @(posedge clk);
    wr_en <= 0;
    commit <= do_commit; commit_len <= LW'(len);
    @(posedge clk);
    commit <= 0;
    seed_n++;
    if (do_commit) model.push_back(p);
    @(posedge clk);
  endtask

  task automatic get();
    bq_t p = model.pop_front();
    bit same;
    check(!empty && head_len == LW'(p.size()), $sformatf("head length %0d vs %0d", head_len, p.size()));
    same = 1;
    for (int i = 0; i < p.size(); i++) begin
      @(posedge clk);
      rd_en <= 1; rd_off <= OW'(i);
      @(posedge clk);
      rd_en <= 0;
      @(negedge clk);
      if (rd_data != p[i]) same = 0;
    end
    check(same, "packet bytes read back");
    @(posedge clk);
    pop <= 1;
    @(posedge clk);
    pop <= 0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(empty && count == 0, "empty after reset");
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < SLOTS; k++) put(1 + ($urandom % 40) + (k == 3 ? SB - 41 : 0));
      check(full && count == CW'(SLOTS), "full with 7 packets");
      for (int k = 0; k < 3 + r; k++) get();
      check(count == CW'(SLOTS - 3 - r), "count after reads");
      put(20, 0);                                  // never committed
      while (model.size() > 0) get();
      check(empty, "empty after draining");
    end
    put(30); put(30); put(30);
    @(posedge clk) flush <= 1;
    @(posedge clk) flush <= 0;
    @(posedge clk);
    model.delete();
    check(empty && count == 0, "flush empties");
    put(12); get();
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
