// adder_core: the processing element used to exercise the DMA.
//
// Four 32-bit words written into the input FIFO form two 64-bit numbers,
// {w1,w0} and {w3,w2}; the core adds them and leaves the 64-bit sum in the
// output FIFO as two words, low word first. Inside: an input FIFO (fifo1),
// the five-state control unit (ca1), a clocked 64-bit adder (ad1) and an
// output FIFO (fifo2), wired as in the original schematic. Both FIFOs hold
// four 32-bit words.
//
// Interface: the DMA writes with FIn1/fi_datain and watches fi_full; it reads
// results by watching fo_empty, taking fo_out (show-ahead) and pulsing
// fo_read. fo_enable is high in the cycles a result word is written into the
// output FIFO. rstF resets the FIFOs, rstC the controller and the adder; both
// are active high. start enables the controller; the system ties it high.
// Timing: a computation starts the cycle after the fourth word is written and
// the first result word is visible 12 cycles after that. fo_read is this
// design's addition; the original figures show no pin for popping results.
module adder_core
  import dma_pkg::*;
(
  input  logic        clk,
  input  logic        rstF,
  input  logic        rstC,
  input  logic        start,
  input  logic        FIn1,
  input  logic [31:0] fi_datain,
  output logic        fi_full,
  input  logic        fo_read,
  output logic [31:0] fo_out,
  output logic        fo_empty,
  output logic        fo_enable,
  output ctrl_state_t ctrl_state
);

  logic [31:0] f1_data;
  logic        f1_full, f1_empty, f1_out;
  logic        f2_full, f2_in;
  logic [31:0] f2_din;
  logic [63:0] num1, num2, sum;
  logic        add_start, add_done;

  fifo #(.WIDTH(32), .DEPTH(4)) fifo1 (
    .Clk(clk), .Rst(!rstF), .Data_In(fi_datain), .FClr(1'b0),
    .FIn(FIn1), .FOut(f1_out), .F_Data(f1_data),
    .F_Full(f1_full), .F_Empty(f1_empty),
    .F_First(), .F_Last(), .F_SLast()
  );

  adder_ctrl #(.NWORDS(4)) ca1 (
    .clk(clk), .init(rstC), .start(start),
    .F_Full(f1_full), .F_Empty(f1_empty), .d(f1_data), .FOut1(f1_out),
    .num1(num1), .num2(num2), .startadder(add_start),
    .done(add_done), .result1(sum),
    .o_full(f2_full), .FIn2(f2_in), .result(f2_din),
    .state(ctrl_state)
  );

  adder #(.WIDTH(64)) ad1 (
    .clk(clk), .reset(rstC), .start(add_start),
    .a(num1), .b(num2), .q(sum), .done(add_done)
  );

  fifo #(.WIDTH(32), .DEPTH(4)) fifo2 (
    .Clk(clk), .Rst(!rstF), .Data_In(f2_din), .FClr(1'b0),
    .FIn(f2_in), .FOut(fo_read), .F_Data(fo_out),
    .F_Full(f2_full), .F_Empty(fo_empty),
    .F_First(), .F_Last(), .F_SLast()
  );

  assign fi_full   = f1_full;
  assign fo_enable = f2_in;

endmodule
