// fifo: register-based first-in first-out buffer, 32 bits x 4 entries by default.
//
// Words are kept in a small register array addressed by a read and a write
// pointer; a counter of stored words gives the status flags. F_Data shows the
// oldest word whenever the FIFO is not empty (show-ahead), and FOut removes it
// at the next clock edge. FIn stores Data_In at the clock edge. Both may be
// given in one cycle. A write into a full FIFO or a read from an empty one is
// ignored. FClr and Rst (active low) both empty the FIFO at the next clock edge.
//
// Flags: F_Full (DEPTH words), F_Empty (none), F_First (exactly one word),
// F_Last (one slot free), F_SLast (two slots free). The width, depth and port
// names are those of the original design; the flag meanings, the show-ahead
// output and the reset polarity are this design's reading of them.
module fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 4
) (
  input  logic             Clk,
  input  logic             Rst,
  input  logic [WIDTH-1:0] Data_In,
  input  logic             FClr,
  input  logic             FIn,
  input  logic             FOut,
  output logic [WIDTH-1:0] F_Data,
  output logic             F_Full,
  output logic             F_Empty,
  output logic             F_First,
  output logic             F_Last,
  output logic             F_SLast
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    rd_ptr, wr_ptr;
  logic [PW:0]      count;

  logic do_wr, do_rd;
  assign do_wr = FIn  && !F_Full;
  assign do_rd = FOut && !F_Empty;

  function automatic logic [PW-1:0] next_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge Clk) begin
    if (!Rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else if (FClr) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // The storage array itself needs no reset: nothing reads an empty slot.
  always_ff @(posedge Clk) begin
    if (do_wr && !FClr) mem[wr_ptr] <= Data_In;
  end

  assign F_Data  = mem[rd_ptr];
  assign F_Full  = (count == (PW+1)'(DEPTH));
  assign F_Empty = (count == '0);
  assign F_First = (count == (PW+1)'(1));
  assign F_Last  = (count == (PW+1)'(DEPTH - 1));
  assign F_SLast = (DEPTH >= 2) && (count == (PW+1)'(DEPTH - 2));

endmodule
