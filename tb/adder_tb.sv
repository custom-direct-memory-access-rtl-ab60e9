// adder_tb: self-checking test of the clocked 64-bit adder. Random operands
// with random start pulses; checks that done follows start by exactly one
// clock, that q holds a + b of the cycle start was high (wrapping at 64 bits)
// and that q keeps its value while start is low.
module adder_tb;
  logic        clk = 0, reset = 1, start = 0;
  logic [63:0] a = 0, b = 0, q;
  logic        done;
  int checks = 0, failures = 0;
  logic [63:0] exp_q = 0;
  logic        exp_done = 0;

  adder #(.WIDTH(64)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: q=%h exp=%h", what, $time, q, exp_q);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    @(posedge clk) #1 begin
      check(done == 0, "done after reset");
      check(q == 0, "q after reset");
    end
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      start = ($urandom_range(0, 2) == 0);
      a = {$urandom, $urandom};
      b = (i % 7 == 0) ? ~64'd0 : {$urandom, $urandom};
      if (start) exp_q = a + b;
      exp_done = start;
      @(posedge clk) #1;
      check(done == exp_done, "done");
      check(q == exp_q, "q");
    end
    // the document's example: {30,20} + {50,40} = {80,60}
    @(negedge clk) begin start = 1; a = {32'd30, 32'd20}; b = {32'd50, 32'd40}; end
    @(posedge clk) #1 check(q == {32'd80, 32'd60} && done, "example sum");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
