// tb_trace_uart: decodes the serial line at the bit centres and checks the
// characters, their order, the 8N1 framing and bit time, and that events
// beyond the FIFO depth are dropped and counted.
module tb_trace_uart;
  localparam int DIV = 16, DEPTH = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       ev_valid = 0, txd;
  logic [7:0] ev_char = 0;
  logic [15:0] dropped;

  trace_uart #(.CLK_DIV(DIV), .FIFO_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  byte unsigned got[$];
  int framing_err = 0;
  initial begin
    forever begin
      logic [7:0] c;
      @(negedge txd);
      repeat (DIV / 2) @(posedge clk);
      if (txd != 0) framing_err++;
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(posedge clk);
        c[i] = txd;
      end
      repeat (DIV) @(posedge clk);
      if (txd != 1) framing_err++;
      got.push_back(c);
    end
  end

  byte unsigned sent[$];
  initial begin
    string s = "NAAAD";
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    check(txd == 1, "idle high");
    for (int i = 0; i < s.len(); i++) begin
      @(posedge clk); ev_valid <= 1; ev_char <= s[i]; sent.push_back(s[i]);
      @(posedge clk); ev_valid <= 0;
      repeat ($urandom % 50) @(posedge clk);
    end
    repeat (12 * DIV * 6) @(posedge clk);
    check(got.size() == sent.size(), $sformatf("%0d characters", got.size()));
    check(got == sent, "characters in order");
    check(framing_err == 0, "start and stop bits at bit centres");
    check(dropped == 0, "nothing dropped");
    // burst of 20 events in consecutive cycles: FIFO holds 16, one is in the shifter
    got.delete(); sent.delete();
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); ev_valid <= 1; ev_char <= 8'(8'h41 + i);
    end
    @(posedge clk); ev_valid <= 0;
    repeat (12 * DIV * 22) @(posedge clk);
    check(dropped == 16'd3, $sformatf("dropped %0d", dropped));
    check(got.size() == 17 && got[0] == 8'h41 && got[16] == 8'h51, "first 17 sent");
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
