// fifo_tb: self-checking test of the 32 x 4 FIFO.
// First the sequence of the original behavioural simulation (write 5, 9, 25,
// 550, read them back in order), then 3000 cycles of random writes, reads and
// occasional clears compared against a queue model: head word, full, empty,
// first, last and second-last flags every cycle, and the ignoring of writes
// when full and reads when empty.
module fifo_tb;
  logic        Clk = 0, Rst = 0, FClr = 0, FIn = 0, FOut = 0;
  logic [31:0] Data_In = 0, F_Data;
  logic        F_Full, F_Empty, F_First, F_Last, F_SLast;
  int checks = 0, failures = 0;
  logic [31:0] model [$];

  fifo dut (.*);

  always #5 Clk = ~Clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic check_flags();
    int n = model.size();
    check(F_Full  == (n == 4), "F_Full");
    check(F_Empty == (n == 0), "F_Empty");
    check(F_First == (n == 1), "F_First");
    check(F_Last  == (n == 3), "F_Last");
    check(F_SLast == (n == 2), "F_SLast");
    if (n > 0) check(F_Data == model[0], "F_Data");
  endtask

  // one clock with the given strobes; model updated to match
  task automatic step(input logic wr, input logic rd, input logic clr, input logic [31:0] d);
    @(negedge Clk);
    FIn = wr; FOut = rd; FClr = clr; Data_In = d;
    @(posedge Clk);
    #1;
    if (clr) model.delete();
    else begin
      logic full = (model.size() == 4), empty = (model.size() == 0);
      if (rd && !empty) void'(model.pop_front());
      if (wr && !full) model.push_back(d);
    end
    check_flags();
  endtask

  initial begin
    repeat (3) @(posedge Clk);
    @(negedge Clk) Rst = 1;
    #1 check_flags();
    // original sequence
    step(1, 0, 0, 5);
    step(1, 0, 0, 9);
    step(1, 0, 0, 25);
    step(1, 0, 0, 550);
    check(F_Full, "full after four writes");
    step(1, 0, 0, 777);            // ignored: full
    check(F_Data == 5, "head is 5");
    step(0, 1, 0, 0);
    check(F_Data == 9, "head is 9");
    step(0, 1, 0, 0);
    step(0, 1, 0, 0);
    check(F_Data == 550, "head is 550");
    step(0, 1, 0, 0);
    check(F_Empty, "empty after four reads");
    step(0, 1, 0, 0);              // ignored: empty
    check(F_Empty, "still empty");
    // random traffic
    for (int i = 0; i < 3000; i++)
      step($urandom_range(0, 1), $urandom_range(0, 1), ($urandom_range(0, 99) == 0), $urandom);
    // reset in the middle of traffic
    step(1, 0, 0, 1); step(1, 0, 0, 2);
    @(negedge Clk) begin Rst = 0; FIn = 0; FOut = 0; FClr = 0; end
    @(posedge Clk) #1 model.delete();
    check_flags();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge Clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
