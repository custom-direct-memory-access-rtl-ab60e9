// Shared types and constants of the DMA system.
//
// The DMA (mem_cpy) is programmed through a small control block in the shared
// data memory. The block starts at a word address fixed by a parameter of the
// DMA and has five words:
//   +0  command : bit 31 = go, bits 4:0 = processing-element index
//   +1  source word address of the words to send
//   +2  bits 6:0 = number of words to send, bits 22:16 = words to receive back
//   +3  destination word address of the received words
//   +4  written by the DMA: number of requests completed so far
// Software writes +1..+3 first and +0 last. The DMA clears go once it has
// queued the request, after which the block may be reused for the next one.
// Each queued request is packed into one 51-bit word of the DMA's internal
// RAM (the 51-bit width is the original RAM's; the field split is ours).
package dma_pkg;

  localparam int unsigned DATA_W   = 32;
  localparam int unsigned REQ_W    = 51;
  localparam int unsigned PE_IDX_W = 5;
  localparam int unsigned CNT_W    = 7;

  // Offsets inside the control block.
  localparam int unsigned CTRL_CMD  = 0;
  localparam int unsigned CTRL_SRC  = 1;
  localparam int unsigned CTRL_LEN  = 2;
  localparam int unsigned CTRL_DST  = 3;
  localparam int unsigned CTRL_STAT = 4;

  localparam int unsigned CMD_GO_BIT = 31;

  // One queued transfer request: 5 + 16 + 16 + 7 + 7 = 51 bits.
  typedef struct packed {
    logic [PE_IDX_W-1:0] pe;
    logic [15:0]         src;
    logic [15:0]         dst;
    logic [CNT_W-1:0]    n_send;
    logic [CNT_W-1:0]    n_recv;
  } dma_req_t;

  // States of the adder core's control unit (Figure "state diagram").
  typedef enum logic [2:0] {
    S0_WAIT  = 3'd0,   // wait for the start signal / a full input FIFO
    S1_COUNT = 3'd1,   // counter control
    S2_ADD   = 3'd2,   // wait for the adder
    S3_READ  = 3'd3,   // pop one word, count it
    S4_WRITE = 3'd4    // write the adder output to the output FIFO
  } ctrl_state_t;

endpackage
