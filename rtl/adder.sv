// adder: clocked adder of the processing element.
//
// The sum itself is combinational; it is captured in a register when start is
// high, and done rises one clock later for one cycle (while start stays high,
// done stays high and q follows the operands with one cycle of delay). This
// registered stage is the "clock added to maintain some delay" of the
// original design. The 64-bit width is this design's reading of the operand
// packing: two 64-bit numbers, each delivered as two 32-bit words.
// reset is synchronous and active high.
module adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] q,
  output logic             done
);

  logic [WIDTH-1:0] sum;
  assign sum = a + b;

  always_ff @(posedge clk) begin
    if (reset) begin
      q    <= '0;
      done <= 1'b0;
    end else begin
      done <= start;
      if (start) q <= sum;
    end
  end

endmodule
