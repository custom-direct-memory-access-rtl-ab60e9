// dpram: dual-port RAM, 64 words x 32 bits by default, one clock.
//
// Two identical ports, each with an address, write data, a WriteRead select
// (1 = write, 0 = read) and a registered read output. In the DMA system port 1
// belongs to the processor and port 2 to the DMA, so both can use the memory
// in the same cycle. Read data appears one clock after the address; a read in
// the cycle of a write to the same word returns the old word. If both ports
// write one word in the same cycle, port 2 wins. Addresses at or beyond DEPTH
// read as 0 and ignore writes. reset (synchronous, active high) clears the
// two output registers but not the array.
//
// Depth, width, address width and port names follow the original design; the
// read latency, the write polarity and the collision rule are this design's.
// The DMA system instantiates it with 2048 words and 11-bit addresses.
module dpram #(
  parameter int unsigned DEPTH  = 64,
  parameter int unsigned WIDTH  = 32,
  parameter int unsigned ADDR_W = 7
) (
  input  logic              clk,
  input  logic              reset,
  input  logic [ADDR_W-1:0] Address1,
  input  logic [WIDTH-1:0]  DataIn1,
  input  logic              WriteRead1,
  output logic [WIDTH-1:0]  DataOut1,
  input  logic [ADDR_W-1:0] Address2,
  input  logic [WIDTH-1:0]  DataIn2,
  input  logic              WriteRead2,
  output logic [WIDTH-1:0]  DataOut2
);

  localparam int unsigned IW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] MEM [DEPTH];

  logic in1, in2;
  assign in1 = ({1'b0, Address1} < (ADDR_W+1)'(DEPTH));
  assign in2 = ({1'b0, Address2} < (ADDR_W+1)'(DEPTH));

  logic [IW-1:0] idx1, idx2;
  assign idx1 = IW'(Address1);
  assign idx2 = IW'(Address2);

  always_ff @(posedge clk) begin
    if (WriteRead1 && in1 && !(WriteRead2 && in2 && idx2 == idx1)) MEM[idx1] <= DataIn1;
    if (WriteRead2 && in2) MEM[idx2] <= DataIn2;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      DataOut1 <= '0;
      DataOut2 <= '0;
    end else begin
      if (!WriteRead1) DataOut1 <= in1 ? MEM[idx1] : '0;
      if (!WriteRead2) DataOut2 <= in2 ? MEM[idx2] : '0;
    end
  end

endmodule
