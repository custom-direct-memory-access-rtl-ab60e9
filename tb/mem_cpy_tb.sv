// mem_cpy_tb: self-checking test of the DMA engine at its default sizes
// (8 element ports, 11-bit addresses, control block at word 1024, 64-entry
// request queue). The testbench models the processor side of the shared
// memory (one-cycle read latency, like dpram port 2) and eight processing
// elements, each with a 4-word input and a 4-word output FIFO that turns
// every word w into w + i + 1 at a random pace. It posts requests through
// the control block exactly as software would and checks: every received word
// at its destination, go cleared on acceptance, the completion count at
// CTRL+4, done pulses, zeros for an element index beyond the ports, requests
// of 20 words that need results drained while the input FIFO is full, and a
// burst of 70 requests that fills the 64-entry queue.
module mem_cpy_tb;
  import dma_pkg::*;
  localparam int N_PE = 8, ADDR_W = 11, CTRL = 1024, QDEPTH = 64;

  logic clk_i = 0, rst_ni = 0;
  logic [ADDR_W-1:0] bram_addr;
  logic [31:0] bram_wdata, bram_rdata;
  logic bram_we;
  logic [N_PE-1:0] PE_fi_full, PE_fi_wr, PE_fo_empty, PE_fo_rd;
  logic [31:0] PE_fi_data;
  logic [N_PE-1:0][31:0] PE_fo_data;
  logic busy, done_pulse;
  logic [6:0] queue_level;

  mem_cpy dut (.*);

  always #5 clk_i = ~clk_i;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- shared memory model ----------------
  logic [31:0] mem [2048];
  always @(posedge clk_i) begin
    if (bram_we) mem[bram_addr] <= bram_wdata;
    else         bram_rdata     <= mem[bram_addr];
  end

  // ---------------- processing-element models ----------------
  logic [31:0] inq  [N_PE][$];
  logic [31:0] outq [N_PE][$];
  int          pace = 2;      // 1 in pace cycles an element moves a word
  logic        freeze = 0;
  int          fi_full_waits = 0, drained_in_send = 0;
  task automatic drive_pe();
    for (int i = 0; i < N_PE; i++) begin
      PE_fi_full[i]  = (inq[i].size() >= 4);
      PE_fo_empty[i] = (outq[i].size() == 0);
      PE_fo_data[i]  = (outq[i].size() > 0) ? outq[i][0] : 32'h0;
    end
  endtask
  initial drive_pe();
  always @(posedge clk_i) begin
    logic [N_PE-1:0] wr, rd;
    logic [31:0] din;
    wr = PE_fi_wr; rd = PE_fo_rd; din = PE_fi_data;
    if (dut.estate == dut.E_SPUSH && (PE_fi_full != 0)) fi_full_waits++;
    if (dut.estate == dut.E_SPUSH && rd != 0) drained_in_send++;
    #1;
    for (int i = 0; i < N_PE; i++) begin
      if (rd[i]) void'(outq[i].pop_front());
      if (!freeze && inq[i].size() > 0 && outq[i].size() < 4 && $urandom_range(1, pace) == 1)
        outq[i].push_back(inq[i].pop_front() + 32'(i) + 1);
      if (wr[i]) inq[i].push_back(din);
    end
    drive_pe();
  end

  // ---------------- request bookkeeping ----------------
  typedef struct { int pe, src, n_send, n_recv, dst; } req_t;
  req_t pending [$];
  int   completed = 0, max_level = 0;

  always @(posedge clk_i) if (queue_level > max_level) max_level = queue_level;

  always @(posedge clk_i) if (rst_ni && done_pulse) begin
    req_t r;
    #2;
    check(pending.size() > 0, "done with a request pending");
    if (pending.size() > 0) begin
      r = pending.pop_front();
      completed++;
      for (int k = 0; k < r.n_recv; k++) begin
        automatic logic [31:0] e = (r.pe < N_PE) ? mem[r.src + k] + 32'(r.pe) + 1 : 32'h0;
        check(mem[r.dst + k] == e, $sformatf("word %0d of request to element %0d: %h, expected %h", k, r.pe, mem[r.dst + k], e));
      end
      check(mem[CTRL + 4] == 32'(completed), "completion count");
    end
  end

  // processor posts one request; waits until the control block is free first
  task automatic post(input int pe, src, n, dst);
    req_t r;
    @(negedge clk_i);
    while (mem[CTRL][31]) @(negedge clk_i);
    r = '{pe: pe, src: src, n_send: n, n_recv: n, dst: dst};
    pending.push_back(r);
    mem[CTRL + 1] = 32'(src);
    mem[CTRL + 2] = 32'(n) | (32'(n) << 16);
    mem[CTRL + 3] = 32'(dst);
    mem[CTRL]     = (32'd1 << 31) | 32'(pe);
  endtask

  task automatic wait_idle();
    int t = 0;
    while ((pending.size() != 0 || mem[CTRL][31]) && t < 200000) begin @(posedge clk_i); t++; end
    repeat (4) @(posedge clk_i);
    check(pending.size() == 0, "all requests completed");
  endtask

  initial begin
    for (int i = 0; i < 2048; i++) mem[i] = (i < 512) ? $urandom : 32'h0;
    repeat (3) @(posedge clk_i);
    @(negedge clk_i) rst_ni = 1;
    // 1. a single request, checked in detail
    post(2, 100, 5, 600);
    @(negedge clk_i);
    while (mem[CTRL][31]) @(negedge clk_i);
    check(mem[CTRL] == 32'd2, "go cleared, element index kept");
    wait_idle();
    check(completed == 1, "one request completed");
    // 2. random requests to valid elements, up to 20 words each
    for (int k = 0; k < 60; k++)
      post($urandom_range(0, N_PE - 1), $urandom_range(0, 480), $urandom_range(0, 20),
           $urandom_range(600, 980));
    wait_idle();
    // 3. an element index beyond the ports
    post(9, 10, 3, 700);
    wait_idle();
    // 4. a burst that fills the queue: elements frozen, the first request
    //    blocks in its send phase while the others queue up
    freeze = 1;
    fork
      begin
        wait (max_level == QDEPTH);
        repeat (200) @(posedge clk_i);
        freeze = 0;
      end
    join_none
    for (int k = 0; k < 70; k++) begin
      post(k % N_PE, $urandom_range(0, 480), 1 + (k % 3), 600 + 4 * (k % 90));
    end
    wait_idle();
    check(max_level == QDEPTH, $sformatf("queue filled (max level %0d)", max_level));
    check(fi_full_waits > 0, "send phase stalled on a full input FIFO");
    check(drained_in_send > 0, "results drained during the send phase");
    check(completed == 1 + 60 + 1 + 70, "completed count");
    $display("queue max %0d, fi_full waits %0d, drains in send %0d", max_level, fi_full_waits, drained_in_send);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk_i);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
