// dma_system_tb: end-to-end test of the DMA system at its default sizes
// (2048-word memories, 8 element ports, control block at word 1024).
//
// The testbench plays the processor: it uses only the processor ports of the
// two memories, writes operands and the control block, polls the go bit and
// the completion count, and reads results back. Element 1 is a testbench
// model on the external ports (it returns w ^ 0x5A5A5A5A for each word w).
// Workloads:
//   * the example request of the original test program, two 64-bit words
//     {0, 2} (16 bytes) to be summed by the adder core, with its cycle count;
//   * random 64-bit sums on the adder core, single and two to four per
//     request (2..4 pairs of numbers, so the input FIFO fills and stalls the
//     DMA, the output FIFO fills and stalls the core, and results are taken
//     while the DMA is still sending);
//   * requests posted back to back so that several wait in the queue;
//   * transfers to the external element, and to an element index beyond
//     the ports;
//   * processor reads and writes on port 1 while the DMA uses port 2;
//   * a program image written to the instruction memory through one port and
//     read back through the other.
// Each of these mechanisms is counted, and one that never happened counts as
// a failure.
module dma_system_tb;
  import dma_pkg::*;
  localparam int CTRL = 1024;
  // Cycles from the clock edge that stores go to the done pulse, for one sum
  // on an idle system: up to 3 cycles for the poller to see go, 7 to read the
  // rest of the block and clear go, 3 to pass the queue, 9 to send four words,
  // 12 in the adder core from the fourth word to the first result, and 3 for
  // the two result words and the status write.
  localparam int LAT_MIN = 35, LAT_MAX = 37;
  int lat_seen_min = 1000, lat_seen_max = 0, expected_ops = 0;

  logic        clk_i = 0, reset_i = 0;
  logic [10:0] imem_addr0 = 0, imem_addr1 = 0, dmem_addr = 0;
  logic [31:0] imem_din0 = 0, imem_din1 = 0, dmem_din = 0;
  logic        imem_we0 = 0, imem_we1 = 0, dmem_we = 0;
  logic [31:0] imem_dout0, imem_dout1, dmem_dout;
  logic [6:0]  ext_fi_full, ext_fi_wr, ext_fo_empty, ext_fo_rd;
  logic [31:0] ext_fi_data;
  logic [6:0][31:0] ext_fo_data;
  logic        dma_busy, dma_done, pe0_fo_enable;
  logic [6:0]  dma_queue_level;
  ctrl_state_t pe0_state;

  dma_system dut (.*);

  always #5 clk_i = ~clk_i;

  int checks = 0, failures = 0;
  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- external element 1 ----------------
  logic [31:0] x_in [$], x_out [$];
  task automatic drive_ext();
    ext_fi_full  = '0;
    ext_fo_empty = '1;
    ext_fo_data  = '0;
    ext_fi_full[0]  = (x_in.size() >= 4);
    ext_fo_empty[0] = (x_out.size() == 0);
    ext_fo_data[0]  = (x_out.size() > 0) ? x_out[0] : 32'h0;
  endtask
  initial drive_ext();
  always @(posedge clk_i) begin
    logic wr, rd;
    logic [31:0] d;
    wr = ext_fi_wr[0]; rd = ext_fo_rd[0]; d = ext_fi_data;
    #1;
    if (rd) void'(x_out.pop_front());
    if (x_in.size() > 0 && x_out.size() < 4) x_out.push_back(x_in.pop_front() ^ 32'h5A5A_5A5A);
    if (wr) x_in.push_back(d);
    drive_ext();
  end

  // ---------------- mechanism counters ----------------
  int n_in_full_stall = 0, n_out_full_stall = 0, n_drain_in_send = 0, n_queued2 = 0,
      n_ext = 0, n_bad_pe = 0, n_dual_port = 0, n_adder_ops = 0, n_imem = 0;
  always @(posedge clk_i) if (reset_i) begin
    if (dut.odbem.estate == dut.odbem.E_SPUSH && dut.adder1.fi_full) n_in_full_stall++;
    if (pe0_state == S4_WRITE && dut.adder1.f2_full) n_out_full_stall++;
    if (dut.odbem.estate == dut.odbem.E_SPUSH && dut.odbem.rx_fire) n_drain_in_send++;
    if (dma_queue_level >= 2) n_queued2++;
    if (dma_busy && dmem_we) n_dual_port++;
    if (pe0_state == S2_ADD && dut.adder1.add_done) n_adder_ops++;
  end

  // ---------------- processor-side accesses ----------------
  task automatic dwrite(input int a, input logic [31:0] d);
    @(negedge clk_i);
    dmem_addr = 11'(a); dmem_din = d; dmem_we = 1;
    @(negedge clk_i) dmem_we = 0;
  endtask
  task automatic dread(input int a, output logic [31:0] d);
    @(negedge clk_i);
    dmem_addr = 11'(a); dmem_we = 0;
    @(posedge clk_i) #1 d = dmem_dout;
  endtask

  int completed = 0;
  int cycle = 0, go_cycle = 0, done_cycle = 0;
  always @(posedge clk_i) begin
    cycle++;
    if (dmem_we && dmem_addr == 11'(CTRL) && dmem_din[31]) go_cycle = cycle;
    if (dma_done) done_cycle = cycle;
  end
  // post a request and wait until it has completed; returns the cycles from
  // the write of go to the completion count appearing
  task automatic run(input int pe, src, n_send, n_recv, dst, output int cycles);
    logic [31:0] w;
    int t;
    dread(CTRL, w);
    while (w[31]) dread(CTRL, w);
    dwrite(CTRL + 1, 32'(src));
    dwrite(CTRL + 2, 32'(n_send) | (32'(n_recv) << 16));
    dwrite(CTRL + 3, 32'(dst));
    dwrite(CTRL, (32'd1 << 31) | 32'(pe));
    t = 0;
    do begin dread(CTRL + 4, w); t++; end while (w != 32'(completed + 1) && t < 5000);
    completed++;
    check(w == 32'(completed), "completion count");
    cycles = t;
  endtask

  // n pairs of 64-bit numbers summed by the adder core in one request
  task automatic adder_request(input int npairs, input int src, dst, input logic timed = 0,
                               input logic [63:0] fa = 0, input logic [63:0] fb = 0,
                               input logic fixed = 0);
    logic [63:0] a [4], b [4];
    logic [31:0] lo, hi;
    int cyc;
    for (int p = 0; p < npairs; p++) begin
      a[p] = fixed ? fa : {$urandom, $urandom};
      b[p] = fixed ? fb : {$urandom, $urandom};
      dwrite(src + 4 * p,     a[p][31:0]);
      dwrite(src + 4 * p + 1, a[p][63:32]);
      dwrite(src + 4 * p + 2, b[p][31:0]);
      dwrite(src + 4 * p + 3, b[p][63:32]);
    end
    run(0, src, 4 * npairs, 2 * npairs, dst, cyc);
    for (int p = 0; p < npairs; p++) begin
      logic [63:0] s = a[p] + b[p];
      dread(dst + 2 * p, lo);
      dread(dst + 2 * p + 1, hi);
      check({hi, lo} == s, $sformatf("sum %0d of %0d: %h, expected %h", p, npairs, {hi, lo}, s));
    end
    // one sum: from the edge that stores go to the done pulse
    if (timed) check(done_cycle - go_cycle >= LAT_MIN && done_cycle - go_cycle <= LAT_MAX,
                     $sformatf("one-sum latency %0d cycles", done_cycle - go_cycle));
    if (timed && (done_cycle - go_cycle) > lat_seen_max) lat_seen_max = done_cycle - go_cycle;
    if (timed && (done_cycle - go_cycle) < lat_seen_min) lat_seen_min = done_cycle - go_cycle;
    expected_ops += npairs;
  endtask

  initial begin
    logic [31:0] w;
    int cyc;
    repeat (4) @(posedge clk_i);
    @(negedge clk_i) reset_i = 1;

    // program image: write through instruction port 0, read through port 1
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_i) begin imem_addr0 = 11'(i); imem_din0 = 32'h0000_2117 + 32'(i * 7); imem_we0 = 1; end
    end
    @(negedge clk_i) imem_we0 = 0;
    for (int i = 0; i < 64; i++) begin
      @(negedge clk_i) imem_addr1 = 11'(i);
      @(posedge clk_i) #1 begin
        check(imem_dout1 == 32'h0000_2117 + 32'(i * 7), "instruction memory read back");
        n_imem++;
      end
    end

    // the original example: request[2] = {0x0, 0x2}, request_size = 16 bytes
    adder_request(1, 0, 64, 1, 64'h0, 64'h2, 1);
    dread(64, w);
    check(w == 32'd2, "example sum is 2");

    for (int k = 0; k < 20; k++) adder_request(1, 100, 200, 1);
    for (int k = 0; k < 20; k++) adder_request($urandom_range(2, 4), 300, 400);

    // external element 1
    for (int k = 0; k < 10; k++) begin
      automatic int n = $urandom_range(1, 20);
      for (int i = 0; i < n; i++) dwrite(500 + i, $urandom);
      run(1, 500, n, n, 600, cyc);
      for (int i = 0; i < n; i++) begin
        logic [31:0] s, r;
        dread(500 + i, s);
        dread(600 + i, r);
        check(r == (s ^ 32'h5A5A_5A5A), "external element result");
      end
      n_ext++;
    end

    // an element index beyond the ports: zeros come back
    for (int i = 0; i < 3; i++) dwrite(700 + i, 32'hFFFF_FFFF);
    run(12, 500, 3, 3, 700, cyc);
    for (int i = 0; i < 3; i++) begin dread(700 + i, w); check(w == 0, "zeros from a missing element"); end
    n_bad_pe++;

    // back-to-back requests of four sums each: post the next as soon as go
    // is cleared, while earlier ones still run
    begin
      logic [63:0] a [24], b [24];
      logic [31:0] lo, hi;
      for (int k = 0; k < 24; k++) begin
        a[k] = {$urandom, $urandom}; b[k] = {$urandom, $urandom};
        dwrite(800 + 4 * k, a[k][31:0]); dwrite(801 + 4 * k, a[k][63:32]);
        dwrite(802 + 4 * k, b[k][31:0]); dwrite(803 + 4 * k, b[k][63:32]);
      end
      for (int r = 0; r < 6; r++) begin
        dread(CTRL, w);
        while (w[31]) dread(CTRL, w);
        dwrite(CTRL + 1, 32'(800 + 16 * r));
        dwrite(CTRL + 2, 32'd16 | (32'd8 << 16));
        dwrite(CTRL + 3, 32'(1300 + 8 * r));
        dwrite(CTRL, 32'h8000_0000);
      end
      completed += 6;
      expected_ops += 24;
      cyc = 0;
      do begin dread(CTRL + 4, w); cyc++; end while (w != 32'(completed) && cyc < 5000);
      check(w == 32'(completed), "six queued requests completed");
      for (int k = 0; k < 24; k++) begin
        dread(1300 + 2 * k, lo); dread(1301 + 2 * k, hi);
        check({hi, lo} == a[k] + b[k], "queued request sum");
      end
    end

    // send-only request of three sums, results left in the core (its output
    // FIFO fills and the core holds the third sum), then a receive-only one
    begin
      logic [63:0] a [3], b [3];
      logic [31:0] lo, hi;
      for (int k = 0; k < 3; k++) begin
        a[k] = {$urandom, $urandom}; b[k] = {$urandom, $urandom};
        dwrite(1100 + 4 * k, a[k][31:0]); dwrite(1101 + 4 * k, a[k][63:32]);
        dwrite(1102 + 4 * k, b[k][31:0]); dwrite(1103 + 4 * k, b[k][63:32]);
      end
      run(0, 1100, 12, 0, 0, cyc);
      repeat (40) @(posedge clk_i);
      #1 check(pe0_state == S4_WRITE, "core holds its third sum");
      run(0, 0, 0, 6, 1200, cyc);
      for (int k = 0; k < 3; k++) begin
        dread(1200 + 2 * k, lo); dread(1201 + 2 * k, hi);
        check({hi, lo} == a[k] + b[k], "sum collected by a receive-only request");
      end
      expected_ops += 3;
    end

    $display("one-sum latency %0d..%0d cycles", lat_seen_min, lat_seen_max);
    $display("mechanisms: in_full_stall=%0d out_full_stall=%0d drain_in_send=%0d queued>=2=%0d ext=%0d bad_pe=%0d dual_port=%0d adder_ops=%0d imem=%0d",
             n_in_full_stall, n_out_full_stall, n_drain_in_send, n_queued2, n_ext, n_bad_pe,
             n_dual_port, n_adder_ops, n_imem);
    check(n_in_full_stall > 0, "DMA stalled on a full input FIFO");
    check(n_out_full_stall > 0, "adder core stalled on a full output FIFO");
    check(n_drain_in_send > 0, "results taken during the send phase");
    check(n_queued2 > 0, "two or more requests queued");
    check(n_dual_port > 0, "both memory ports in use at once");
    check(n_adder_ops == expected_ops, $sformatf("adder operations %0d, expected %0d", n_adder_ops, expected_ops));
    check(n_ext == 10 && n_bad_pe == 1 && n_imem == 64, "other mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk_i);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
