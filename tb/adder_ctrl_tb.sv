// adder_ctrl_tb: self-checking test of the adder core's five-state control
// unit against behavioural models of its input FIFO (show-ahead, 4 words),
// its clocked adder and its output FIFO. Checks: it stays in s0 while start
// is low or the input FIFO is not full; the exact state sequence of one
// operation (s0 s1 s3 s1 s3 s1 s3 s1 s3 s1 s2 s4 s4 s0); four pops; the
// operands {w1,w0} and {w3,w2}; the two result words, low word first; the
// cycle count; and that s4 holds while the output FIFO is full.
module adder_ctrl_tb;
  import dma_pkg::*;
  logic        clk = 0, init = 1, start = 0;
  logic        F_Full, F_Empty, FOut1, startadder, done, o_full, FIn2;
  logic [31:0] d, result;
  logic [63:0] num1, num2, result1;
  ctrl_state_t state;
  int checks = 0, failures = 0;

  logic [31:0] inq [$];
  logic [31:0] outq [$];
  logic        hold_out = 0;
  logic [63:0] add_q = 0;
  logic        add_done = 0;

  adder_ctrl dut (.*);

  always #5 clk = ~clk;

  // models
  assign F_Full  = (inq.size() == 4);
  assign F_Empty = (inq.size() == 0);
  assign d       = (inq.size() > 0) ? inq[0] : 32'hDEAD_BEEF;
  assign o_full  = hold_out || (outq.size() == 4);
  assign result1 = add_q;
  assign done    = add_done;
  // The models sample the strobes at the clock edge and update just after
  // it, so the controller always sees the values of before the edge.
  always @(posedge clk) begin
    logic        pop, push, st;
    logic [31:0] r;
    logic [63:0] s;
    pop  = FOut1 && inq.size() > 0;
    push = FIn2 && !o_full;
    r    = result;
    st   = startadder;
    s    = num1 + num2;
    #1;
    if (pop)  void'(inq.pop_front());
    if (push) outq.push_back(r);
    add_done = st;
    if (st) add_q = s;
  end

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t (state %0d)", what, $time, state);
    end
  endtask

  ctrl_state_t trace [$];
  always @(posedge clk) if (!init) trace.push_back(state);

  task automatic load4(input logic [31:0] w0, w1, w2, w3);
    @(negedge clk);
    inq.push_back(w0); inq.push_back(w1); inq.push_back(w2); inq.push_back(w3);
  endtask

  task automatic one_op(input logic [31:0] w0, w1, w2, w3);
    logic [63:0] s;
    int cyc;
    s = {w1, w0} + {w3, w2};
    outq.delete();
    trace.delete();
    load4(w0, w1, w2, w3);
    cyc = 0;
    while (outq.size() < 2 && cyc < 100) begin @(posedge clk); cyc++; end
    #2;
    check(outq.size() == 2, "two result words");
    if (outq.size() == 2) begin
      check(outq[0] == s[31:0],  "low word");
      check(outq[1] == s[63:32], "high word");
    end
    check(num1 == {w1, w0} && num2 == {w3, w2}, "operands");
    check(inq.size() == 0, "four words popped");
    // cycles counted from the edge after loading until the second word is stored
    check(cyc == 14, $sformatf("latency %0d", cyc));
    repeat (2) @(posedge clk);
    #1 check(state == S0_WAIT, "back in s0");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) init = 0;
    // start low: must stay in s0 even with a full FIFO
    load4(1, 2, 3, 4);
    repeat (10) @(posedge clk);
    #1 check(state == S0_WAIT && inq.size() == 4, "waits for start");
    inq.delete();
    @(negedge clk) start = 1;
    // not full: must stay in s0
    @(negedge clk) begin inq.push_back(7); inq.push_back(8); inq.push_back(9); end
    repeat (10) @(posedge clk);
    #1 check(state == S0_WAIT && inq.size() == 3, "waits for a full FIFO");
    inq.delete();
    repeat (2) @(posedge clk);
    // the document's example: 20, 30, 40, 50 -> 60, 80
    one_op(20, 30, 40, 50);
    check(outq[0] == 60 && outq[1] == 80, "example 60, 80");
    begin
      ctrl_state_t exp_seq [] = '{S0_WAIT, S1_COUNT, S3_READ, S1_COUNT, S3_READ, S1_COUNT, S3_READ,
                                   S1_COUNT, S3_READ, S1_COUNT, S2_ADD, S4_WRITE, S4_WRITE, S0_WAIT};
      int base = -1;
      for (int i = 0; i < trace.size(); i++) if (trace[i] == S1_COUNT) begin base = i - 1; break; end
      check(base >= 0, "s1 reached");
      for (int i = 0; i < exp_seq.size(); i++)
        check(base >= 0 && base + i < trace.size() && trace[base + i] == exp_seq[i],
              $sformatf("state sequence step %0d", i));
    end
    for (int k = 0; k < 50; k++) one_op($urandom, $urandom, $urandom, $urandom);
    one_op(32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'h1, 32'h0);   // carry between words, wrap at 64 bits
    // output FIFO full: s4 must hold
    outq.delete();
    hold_out = 1;
    load4(5, 6, 7, 8);
    repeat (30) @(posedge clk);
    #1 check(state == S4_WRITE && outq.size() == 0, "s4 holds while output full");
    @(negedge clk) hold_out = 0;
    repeat (4) @(posedge clk);
    #1 check(outq.size() == 2 && outq[0] == 12 && outq[1] == 14, "released after output full");
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
