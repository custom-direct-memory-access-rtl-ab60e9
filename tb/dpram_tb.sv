// dpram_tb: self-checking test of the dual-port RAM at its default 64 x 32
// size with 7-bit addresses. Random reads and writes on both ports at once
// against an array model: one-cycle read latency, old data on a read that
// collides with a write, port 2 winning a double write, reads beyond the
// 64 words returning 0 and writes there being dropped, and the output
// registers clearing on reset.
module dpram_tb;
  logic        clk = 0, reset = 1;
  logic [6:0]  Address1 = 0, Address2 = 0;
  logic [31:0] DataIn1 = 0, DataIn2 = 0, DataOut1, DataOut2;
  logic        WriteRead1 = 0, WriteRead2 = 0;
  int checks = 0, failures = 0;
  logic [31:0] model [64];
  logic [31:0] exp1, exp2;

  dpram dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    exp1 = 0; exp2 = 0;
    // fill the memory through both ports
    @(negedge clk) reset = 0;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      WriteRead1 = 1; Address1 = 7'(i);      DataIn1 = $urandom; model[i]      = DataIn1;
      WriteRead2 = 1; Address2 = 7'(i + 32); DataIn2 = $urandom; model[i + 32] = DataIn2;
    end
    @(negedge clk) begin WriteRead1 = 0; WriteRead2 = 0; end
    @(posedge clk) #1 begin exp1 = model[31]; exp2 = model[63]; end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      WriteRead1 = $urandom_range(0, 1);
      WriteRead2 = $urandom_range(0, 1);
      Address1   = (i % 50 == 0) ? 7'(64 + $urandom_range(0, 63)) : 7'($urandom_range(0, 63));
      Address2   = (i % 3 == 0) ? Address1 : 7'($urandom_range(0, 63));
      DataIn1    = $urandom;
      DataIn2    = $urandom;
      // expected outputs (from the memory before this edge)
      if (!WriteRead1) exp1 = (Address1 < 64) ? model[Address1[5:0]] : 0;
      if (!WriteRead2) exp2 = (Address2 < 64) ? model[Address2[5:0]] : 0;
      @(posedge clk) #1;
      if (WriteRead1 && Address1 < 64 && !(WriteRead2 && Address2 == Address1)) model[Address1[5:0]] = DataIn1;
      if (WriteRead2 && Address2 < 64) model[Address2[5:0]] = DataIn2;
      check(DataOut1 == exp1, "DataOut1");
      check(DataOut2 == exp2, "DataOut2");
    end
    // read the whole memory back
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) begin WriteRead1 = 0; WriteRead2 = 0; Address1 = 7'(i); Address2 = 7'(63 - i); end
      @(posedge clk) #1;
      check(DataOut1 == model[i], "final read 1");
      check(DataOut2 == model[63 - i], "final read 2");
    end
    @(negedge clk) reset = 1;
    @(posedge clk) #1 check(DataOut1 == 0 && DataOut2 == 0, "outputs cleared by reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
