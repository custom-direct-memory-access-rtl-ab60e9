// sync_ram: single-port synchronous RAM, 64 words x 51 bits by default.
//
// Built from registers. On a clock edge with we high, datain is stored at
// address; on every edge the word at address (its old value on a write
// cycle) is captured into dataout, so read data appears one clock after the
// address. reset (synchronous, active high) clears dataout, not the array.
// Size and port names follow the RAM inside the original DMA; in this design
// it holds the DMA's queue of transfer requests.
module sync_ram #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 51,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clock,
  input  logic             reset,
  input  logic             we,
  input  logic [AW-1:0]    address,
  input  logic [WIDTH-1:0] datain,
  output logic [WIDTH-1:0] dataout
);

  logic [WIDTH-1:0] ram [DEPTH];

  always_ff @(posedge clock) begin
    if (we) ram[address] <= datain;
  end

  always_ff @(posedge clock) begin
    if (reset) dataout <= '0;
    else       dataout <= ram[address];
  end

endmodule
