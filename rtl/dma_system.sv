// dma_system: the DMA test system - instruction memory, shared data memory,
// the mem_cpy DMA and an adder-core processing element.
//
// A processor (not part of this RTL) fetches from the instruction memory and
// uses port 1 of the data memory; both are brought out as ports. The DMA owns
// port 2 of the data memory and finds its requests in a control block there
// (layout in dma_pkg, at CTRL_ADDR). Processing element 0 is an adder core;
// element ports 1..N_PE-1 are brought out (ext_*) so more elements can be
// attached outside. A typical operation: the processor stores two 64-bit
// numbers as four words, posts a request {pe 0, src, send 4, receive 2, dst}
// and sets go; the DMA moves the words into the adder core, and the 64-bit sum
// comes back at dst as two words, with the completed count at CTRL_ADDR+4.
//
// Both memories are dpram instances of 2048 words of 32 bits with 11-bit word
// addresses and one-cycle read latency. reset_i is active low (held low, then
// raised) and synchronous. The memory size follows the original system; the
// placement of the adder core on element port 0, the element count and the
// control-block address are this design's.
module dma_system
  import dma_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 2048,
  parameter int unsigned ADDR_W    = 11,
  parameter int unsigned N_PE      = 8,
  parameter int unsigned CTRL_ADDR = 1024,
  parameter int unsigned QDEPTH    = 64
) (
  input  logic                clk_i,
  input  logic                reset_i,
  // instruction memory, both ports (processor side)
  input  logic [ADDR_W-1:0]   imem_addr0,
  input  logic [DATA_W-1:0]   imem_din0,
  input  logic                imem_we0,
  output logic [DATA_W-1:0]   imem_dout0,
  input  logic [ADDR_W-1:0]   imem_addr1,
  input  logic [DATA_W-1:0]   imem_din1,
  input  logic                imem_we1,
  output logic [DATA_W-1:0]   imem_dout1,
  // data memory, processor port
  input  logic [ADDR_W-1:0]   dmem_addr,
  input  logic [DATA_W-1:0]   dmem_din,
  input  logic                dmem_we,
  output logic [DATA_W-1:0]   dmem_dout,
  // processing-element ports 1..N_PE-1 of the DMA (index i is element i+1)
  input  logic [N_PE-2:0]             ext_fi_full,
  output logic [N_PE-2:0]             ext_fi_wr,
  output logic [DATA_W-1:0]           ext_fi_data,
  input  logic [N_PE-2:0]             ext_fo_empty,
  output logic [N_PE-2:0]             ext_fo_rd,
  input  logic [N_PE-2:0][DATA_W-1:0] ext_fo_data,
  // status
  output logic                dma_busy,
  output logic                dma_done,
  output logic [QDEPTH > 1 ? $clog2(QDEPTH) : 1:0] dma_queue_level,
  output logic                pe0_fo_enable,
  output ctrl_state_t         pe0_state
);

  logic rst;
  assign rst = !reset_i;

  // instruction memory
  dpram #(.DEPTH(MEM_DEPTH), .WIDTH(DATA_W), .ADDR_W(ADDR_W)) memory (
    .clk(clk_i), .reset(rst),
    .Address1(imem_addr0), .DataIn1(imem_din0), .WriteRead1(imem_we0), .DataOut1(imem_dout0),
    .Address2(imem_addr1), .DataIn2(imem_din1), .WriteRead2(imem_we1), .DataOut2(imem_dout1)
  );

  // data memory shared by the processor and the DMA
  logic [ADDR_W-1:0] dma_addr;
  logic [DATA_W-1:0] dma_wdata, dma_rdata;
  logic              dma_we;

  dpram #(.DEPTH(MEM_DEPTH), .WIDTH(DATA_W), .ADDR_W(ADDR_W)) memory2 (
    .clk(clk_i), .reset(rst),
    .Address1(dmem_addr), .DataIn1(dmem_din), .WriteRead1(dmem_we), .DataOut1(dmem_dout),
    .Address2(dma_addr),  .DataIn2(dma_wdata), .WriteRead2(dma_we),  .DataOut2(dma_rdata)
  );

  // DMA
  logic [N_PE-1:0]             pe_fi_full, pe_fi_wr, pe_fo_empty, pe_fo_rd;
  logic [DATA_W-1:0]           pe_fi_data;
  logic [N_PE-1:0][DATA_W-1:0] pe_fo_data;

  mem_cpy #(.N_PE(N_PE), .ADDR_W(ADDR_W), .CTRL_ADDR(CTRL_ADDR), .QDEPTH(QDEPTH)) odbem (
    .clk_i(clk_i), .rst_ni(reset_i),
    .bram_addr(dma_addr), .bram_wdata(dma_wdata), .bram_we(dma_we), .bram_rdata(dma_rdata),
    .PE_fi_full(pe_fi_full), .PE_fi_wr(pe_fi_wr), .PE_fi_data(pe_fi_data),
    .PE_fo_empty(pe_fo_empty), .PE_fo_rd(pe_fo_rd), .PE_fo_data(pe_fo_data),
    .busy(dma_busy), .done_pulse(dma_done), .queue_level(dma_queue_level)
  );

  // processing element 0: adder core
  adder_core adder1 (
    .clk(clk_i), .rstF(rst), .rstC(rst), .start(1'b1),
    .FIn1(pe_fi_wr[0]), .fi_datain(pe_fi_data), .fi_full(pe_fi_full[0]),
    .fo_read(pe_fo_rd[0]), .fo_out(pe_fo_data[0]), .fo_empty(pe_fo_empty[0]),
    .fo_enable(pe0_fo_enable), .ctrl_state(pe0_state)
  );

  // elements 1..N_PE-1 are outside
  assign pe_fi_full[N_PE-1:1]  = ext_fi_full;
  assign pe_fo_empty[N_PE-1:1] = ext_fo_empty;
  assign pe_fo_data[N_PE-1:1]  = ext_fo_data;
  assign ext_fi_wr             = pe_fi_wr[N_PE-1:1];
  assign ext_fo_rd             = pe_fo_rd[N_PE-1:1];
  assign ext_fi_data           = pe_fi_data;

endmodule
