// adder_core_tb: self-checking test of the adder-core processing element
// through its DMA-facing ports. Replays the original example (20, 30, 40, 50
// in, 60 and 80 out), then random operations with the words written as fast
// as fi_full allows and results read as soon as fo_empty falls, and finally
// a run in which results are not read, so the output FIFO fills and the core
// must hold its third result until room appears. Checks each sum, word
// order, fi_full, the number of fo_enable pulses and the latency from the
// fourth input word to the first result word.
module adder_core_tb;
  import dma_pkg::*;
  logic        clk = 0, rstF = 1, rstC = 1, start = 1, FIn1 = 0, fo_read = 0;
  logic [31:0] fi_datain = 0, fo_out;
  logic        fi_full, fo_empty, fo_enable;
  ctrl_state_t ctrl_state;
  int checks = 0, failures = 0, enables = 0;
  localparam int LATENCY = 12;

  adder_core dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (fo_enable) enables++;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic put(input logic [31:0] w);
    @(negedge clk);
    while (fi_full) @(negedge clk);
    FIn1 = 1; fi_datain = w;
    @(negedge clk) FIn1 = 0;
  endtask

  task automatic get(output logic [31:0] w);
    @(negedge clk);
    while (fo_empty) @(negedge clk);
    w = fo_out;
    fo_read = 1;
    @(negedge clk) fo_read = 0;
  endtask

  task automatic op_check(input logic [31:0] w0, w1, w2, w3, input logic timed);
    logic [63:0] s;
    logic [31:0] lo, hi;
    int cyc;
    s = {w1, w0} + {w3, w2};
    put(w0); put(w1); put(w2);
    @(negedge clk) begin FIn1 = 1; fi_datain = w3; end
    @(posedge clk) #1 begin
      FIn1 = 0;
      check(fi_full, "fi_full after four words");
    end
    cyc = 0;
    while (fo_empty && cyc < 100) begin @(posedge clk); #1; cyc++; end
    if (timed) check(cyc == LATENCY, $sformatf("latency %0d", cyc));
    get(lo); get(hi);
    check(lo == s[31:0] && hi == s[63:32], "sum");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) begin rstF = 0; rstC = 0; end
    check(fo_empty && !fi_full, "empty after reset");
    op_check(20, 30, 40, 50, 1);
    for (int k = 0; k < 40; k++) op_check($urandom, $urandom, $urandom, $urandom, 1);
    check(enables == 2 * 41, "fo_enable pulses");
    // back-to-back operations, results left unread: the core holds the third
    begin
      logic [31:0] w [12];
      logic [63:0] s [3];
      logic [31:0] r;
      for (int i = 0; i < 12; i++) w[i] = $urandom;
      for (int j = 0; j < 3; j++) s[j] = {w[4*j+1], w[4*j]} + {w[4*j+3], w[4*j+2]};
      for (int i = 0; i < 12; i++) put(w[i]);
      repeat (40) @(posedge clk);
      #1 check(ctrl_state == S4_WRITE, "third result held while output FIFO full");
      for (int j = 0; j < 3; j++) begin
        get(r); check(r == s[j][31:0],  "queued low word");
        get(r); check(r == s[j][63:32], "queued high word");
      end
      repeat (5) @(posedge clk);
      #1 check(fo_empty && ctrl_state == S0_WAIT, "idle after draining");
    end
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
