// sync_ram_tb: self-checking test of the 64 x 51-bit synchronous RAM.
// Writes every word, then random reads and writes against an array model:
// one-cycle read latency, old word returned on a write cycle, output cleared
// by reset. Also replays the addresses of the original simulation (write
// 17 at 6, 23 at 35, read them back).
module sync_ram_tb;
  logic        clock = 0, reset = 1, we = 0;
  logic [5:0]  address = 0;
  logic [50:0] datain = 0, dataout;
  int checks = 0, failures = 0;
  logic [50:0] model [64];
  logic [50:0] exp_out;

  sync_ram dut (.*);

  always #5 clock = ~clock;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: got %h exp %h", what, $time, dataout, exp_out);
    end
  endtask

  function automatic logic [50:0] rnd51();
    return {$urandom, $urandom} & {51{1'b1}};
  endfunction

  task automatic op(input logic w, input logic [5:0] a, input logic [50:0] d);
    @(negedge clock);
    we = w; address = a; datain = d;
    exp_out = model[a];
    @(posedge clock) #1;
    if (w) model[a] = d;
    check(dataout == exp_out, "dataout");
  endtask

  initial begin
    @(negedge clock) reset = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clock) begin we = 1; address = 6'(i); datain = rnd51(); model[i] = datain; end
    end
    op(1, 6, 51'd17);
    op(1, 35, 51'd23);
    op(0, 6, 0);
    check(dataout == 51'd17, "read 17 at 6");
    op(0, 35, 0);
    check(dataout == 51'd23, "read 23 at 35");
    for (int i = 0; i < 3000; i++) op($urandom_range(0, 1), 6'($urandom_range(0, 63)), rnd51());
    @(negedge clock) begin reset = 1; we = 0; end
    @(posedge clock) #1 begin exp_out = 0; check(dataout == 0, "reset clears dataout"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
