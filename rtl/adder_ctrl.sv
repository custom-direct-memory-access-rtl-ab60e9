// adder_ctrl: control unit of the adder core, a five-state machine.
//
//   s0  wait: leaves for s1 when start is high, the input FIFO is full and the
//       adder is not signalling done; clears the word counter.
//   s1  counter control: with four words counted, pulses startadder and goes
//       to s2; otherwise goes to s3.
//   s3  counting: pops the head word of the input FIFO (FOut1), stores it in
//       operand register Count and increments Count; back to s1.
//   s2  waits for the adder: done goes to s4, no done goes back to s1.
//   s4  writes the 64-bit sum into the output FIFO as two 32-bit words, low
//       word first (FIn2 with result), one per cycle, holding while the output
//       FIFO is full; then back to s0.
//
// The operands are num1 = {word1, word0} and num2 = {word3, word2}, in the
// order the words left the FIFO. The states and their transitions follow the
// original state diagram; storing the word in s3 (the FIFO is show-ahead), the
// two-cycle s4 and the operand packing are this design's. init is a
// synchronous, active-high reset. One operation takes 13 cycles from leaving
// s0 to the second output word.
module adder_ctrl
  import dma_pkg::*;
#(
  parameter int unsigned NWORDS = 4
) (
  input  logic        clk,
  input  logic        init,
  input  logic        start,
  input  logic        F_Full,
  input  logic        F_Empty,
  input  logic [31:0] d,
  output logic        FOut1,
  output logic [63:0] num1,
  output logic [63:0] num2,
  output logic        startadder,
  input  logic        done,
  input  logic [63:0] result1,
  input  logic        o_full,
  output logic        FIn2,
  output logic [31:0] result,
  output ctrl_state_t state
);

  localparam int unsigned CW = $clog2(NWORDS + 1);

  ctrl_state_t    next;
  logic [CW-1:0]  count;
  logic           half;        // s4: 0 = low word, 1 = high word
  logic [31:0]    words [NWORDS];
  localparam int unsigned WW = (NWORDS > 1) ? $clog2(NWORDS) : 1;
  logic [WW-1:0]  widx;
  assign widx = WW'(count);

  always_comb begin
    next       = state;
    FOut1      = 1'b0;
    startadder = 1'b0;
    FIn2       = 1'b0;
    result     = half ? result1[63:32] : result1[31:0];
    unique case (state)
      S0_WAIT:  if (start && F_Full && !done) next = S1_COUNT;
      S1_COUNT: begin
        if (count == CW'(NWORDS)) begin
          startadder = 1'b1;
          next       = S2_ADD;
        end else begin
          next = S3_READ;
        end
      end
      S3_READ: begin
        if (!F_Empty) begin
          FOut1 = 1'b1;
          next  = S1_COUNT;
        end
      end
      S2_ADD:   next = done ? S4_WRITE : S1_COUNT;
      S4_WRITE: begin
        if (!o_full) begin
          FIn2 = 1'b1;
          if (half) next = S0_WAIT;
        end
      end
      default:  next = S0_WAIT;
    endcase
  end

  always_ff @(posedge clk) begin
    if (init) begin
      state <= S0_WAIT;
      count <= '0;
      half  <= 1'b0;
      for (int i = 0; i < NWORDS; i++) words[i] <= '0;
    end else begin
      state <= next;
      case (state)
        S0_WAIT:  begin count <= '0; half <= 1'b0; end
        S3_READ:  if (FOut1) begin
                    words[widx] <= d;
                    count        <= count + 1'b1;
                  end
        S4_WRITE: if (FIn2) half <= ~half;
        default:  ;
      endcase
    end
  end

  // Operand packing for the four-word case; other word counts add word pairs
  // only as far as the first four words.
  assign num1 = {words[1 % NWORDS], words[0]};
  assign num2 = {words[3 % NWORDS], words[2 % NWORDS]};

endmodule
