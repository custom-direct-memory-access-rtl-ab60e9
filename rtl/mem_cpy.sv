// mem_cpy: direct memory access engine between a shared data memory and up to
// N_PE processing elements.
//
// The processor describes a transfer in a five-word control block at
// CTRL_ADDR of the data memory (layout in dma_pkg) and sets the go bit. Two
// machines share the DMA's memory port. The poller keeps reading the command
// word; when go is set and the request queue has room, it reads the rest of
// the block, packs the request into one 51-bit word of the internal RAM
// (sync_ram, used as a circular queue of QDEPTH entries) and writes the
// command word back with go cleared, so the processor can post the next
// request at once, even while earlier ones run. The executor takes the
// oldest queued request and runs it:
//   send    n_send words from src onward are read from memory and written,
//           one every two cycles, into the element's input FIFO, waiting
//           while that FIFO is full;
//   receive n_recv words are taken from the element's output FIFO, waiting
//           while it is empty, and written to dst onward, one per cycle;
//           while the input FIFO is full during the send phase, results
//           already available are taken too, so an element whose FIFOs are
//           both full cannot stall the transfer;
//   finish  the number of completed requests is written to CTRL_ADDR+4 and
//           done_pulse is high for one cycle.
// The executor has the port whenever it needs it; the poller uses the
// cycles in which the executor is idle or waiting for results.
// A request for an element index at or beyond N_PE sends into nothing and
// receives zeros.
//
// Memory port: bram_addr/bram_we/bram_wdata, with bram_rdata one cycle after
// the address (dpram port 2). Element ports: PE_fi_* for the input FIFOs,
// PE_fo_* for the output FIFOs; PE_fo_data is show-ahead and PE_fo_rd pops.
// rst_ni is active low and synchronous.
//
// The original DMA was taken over as finished code and its insides are not
// described; what it does (read a request from the data memory at a fixed
// control address and deliver it to a processing element) is kept, and the
// control-block layout, the queue discipline and the result write-back are
// this design's. The 64 x 51-bit internal RAM and the 11-bit memory address
// are the original sizes.
module mem_cpy
  import dma_pkg::*;
#(
  parameter int unsigned N_PE      = 8,
  parameter int unsigned ADDR_W    = 11,
  parameter int unsigned CTRL_ADDR = 1024,
  parameter int unsigned QDEPTH    = 64
) (
  input  logic                      clk_i,
  input  logic                      rst_ni,
  // shared memory port
  output logic [ADDR_W-1:0]         bram_addr,
  output logic [DATA_W-1:0]         bram_wdata,
  output logic                      bram_we,
  input  logic [DATA_W-1:0]         bram_rdata,
  // processing elements
  input  logic [N_PE-1:0]           PE_fi_full,
  output logic [N_PE-1:0]           PE_fi_wr,
  output logic [DATA_W-1:0]         PE_fi_data,
  input  logic [N_PE-1:0]           PE_fo_empty,
  output logic [N_PE-1:0]           PE_fo_rd,
  input  logic [N_PE-1:0][DATA_W-1:0] PE_fo_data,
  // status
  output logic                      busy,
  output logic                      done_pulse,
  output logic [QDEPTH > 1 ? $clog2(QDEPTH) : 1:0] queue_level
);

  localparam int unsigned QAW = (QDEPTH > 1) ? $clog2(QDEPTH) : 1;

  // poller: reads the control block and queues requests
  typedef enum logic [3:0] {
    P_ISSUE_CMD, P_CAPT_CMD, P_ISSUE_SRC, P_CAPT_SRC, P_ISSUE_LEN, P_CAPT_LEN,
    P_ISSUE_DST, P_CAPT_DST, P_CLEAR
  } poll_t;
  // executor: runs the oldest queued request
  typedef enum logic [2:0] {
    E_IDLE, E_QRD, E_QLATCH, E_SRD, E_SPUSH, E_RECV, E_STAT
  } exec_t;

  poll_t  pstate, pnext;
  exec_t  estate, enext;

  dma_req_t          new_req, cur;
  logic [DATA_W-1:0] cmd_word;
  logic [QAW-1:0]    q_wr, q_rd;
  logic [QAW:0]      q_cnt;
  logic [CNT_W-1:0]  sidx, ridx;
  logic              rx_fire;    // take one result word this cycle
  logic              port_free;  // the executor leaves the memory port to the poller
  logic              q_push, q_pop;
  logic [31:0]       completed;

  logic q_full, q_empty;
  assign q_full      = (q_cnt == (QAW+1)'(QDEPTH));
  assign q_empty     = (q_cnt == '0);
  assign queue_level = q_cnt;

  // request queue
  logic             q_we;
  logic [QAW-1:0]   q_addr;
  logic [REQ_W-1:0] q_dout;

  sync_ram #(.DEPTH(QDEPTH), .WIDTH(REQ_W), .AW(QAW)) sync_ram1 (
    .clock(clk_i), .reset(!rst_ni), .we(q_we), .address(q_addr),
    .datain(new_req), .dataout(q_dout)
  );

  // selected element
  logic sel_ok, sel_fi_full, sel_fo_empty;
  logic [DATA_W-1:0] sel_fo_data;
  logic [N_PE-1:0]   sel_mask;
  assign sel_ok = ({27'd0, cur.pe} < 32'(N_PE));
  always_comb begin
    sel_fi_full  = 1'b0;
    sel_fo_empty = 1'b0;
    sel_fo_data  = '0;
    sel_mask     = '0;
    for (int i = 0; i < N_PE; i++) begin
      if (sel_ok && cur.pe == PE_IDX_W'(i)) begin
        sel_fi_full  = PE_fi_full[i];
        sel_fo_empty = PE_fo_empty[i];
        sel_fo_data  = PE_fo_data[i];
        sel_mask[i]  = 1'b1;
      end
    end
  end

  function automatic logic [ADDR_W-1:0] ctrl(input int unsigned off);
    return ADDR_W'(CTRL_ADDR + off);
  endfunction

  // ---------------- executor, and the memory port ----------------
  // The executor owns the port in E_SRD, E_SPUSH, E_STAT and whenever it
  // moves a result word. In every other cycle the poller may use it. A poll
  // read never lands between the executor's read and its use of the data,
  // because the port is not free in E_SRD and E_SPUSH.
  always_comb begin
    enext      = estate;
    rx_fire    = 1'b0;
    PE_fi_wr   = '0;
    PE_fi_data = bram_rdata;
    PE_fo_rd   = '0;
    done_pulse = 1'b0;
    q_pop      = 1'b0;
    unique case (estate)
      E_IDLE:   if (!q_empty) enext = E_QRD;
      E_QRD:    enext = E_QLATCH;
      E_QLATCH: begin q_pop = 1'b1; enext = E_SRD; end
      E_SRD:    enext = (sidx == cur.n_send) ? E_RECV : E_SPUSH;
      E_SPUSH: begin
        if (!sel_fi_full) begin
          PE_fi_wr = sel_mask;
          enext    = E_SRD;
        end else if (ridx != cur.n_recv && !sel_fo_empty) begin
          // element stalled: take a result meanwhile (the memory keeps its
          // read data through a write cycle, so the word to send survives)
          rx_fire = 1'b1;
        end
      end
      E_RECV: begin
        if (ridx == cur.n_recv) enext = E_STAT;
        else if (!sel_fo_empty) rx_fire = 1'b1;
      end
      E_STAT: begin done_pulse = 1'b1; enext = E_IDLE; end
      default: enext = E_IDLE;
    endcase
    if (rx_fire) PE_fo_rd = sel_mask;
  end

  assign port_free = (estate inside {E_IDLE, E_QRD, E_QLATCH}) || (estate == E_RECV && !rx_fire);

  // ---------------- poller ----------------
  always_comb begin
    pnext  = pstate;
    q_push = 1'b0;
    unique case (pstate)
      P_ISSUE_CMD: if (port_free) pnext = P_CAPT_CMD;
      P_CAPT_CMD:  pnext = (bram_rdata[CMD_GO_BIT] && !q_full) ? P_ISSUE_SRC : P_ISSUE_CMD;
      P_ISSUE_SRC: if (port_free) pnext = P_CAPT_SRC;
      P_CAPT_SRC:  pnext = P_ISSUE_LEN;
      P_ISSUE_LEN: if (port_free) pnext = P_CAPT_LEN;
      P_CAPT_LEN:  pnext = P_ISSUE_DST;
      P_ISSUE_DST: if (port_free) pnext = P_CAPT_DST;
      P_CAPT_DST:  pnext = P_CLEAR;
      // clear go and queue the request; the queue RAM must not be in use by
      // the executor (E_QRD) in the same cycle
      P_CLEAR: if (port_free && estate != E_QRD) begin
        q_push = 1'b1;
        pnext  = P_ISSUE_CMD;
      end
      default: pnext = P_ISSUE_CMD;
    endcase
  end

  // memory port and queue RAM multiplexing
  always_comb begin
    bram_addr  = ctrl(CTRL_CMD);
    bram_we    = 1'b0;
    bram_wdata = '0;
    if (estate == E_SRD || estate == E_SPUSH) bram_addr = ADDR_W'(cur.src + 16'(sidx));
    if (rx_fire) begin
      bram_addr  = ADDR_W'(cur.dst + 16'(ridx));
      bram_we    = 1'b1;
      bram_wdata = sel_fo_data;
    end else if (estate == E_STAT) begin
      bram_addr  = ctrl(CTRL_STAT);
      bram_we    = 1'b1;
      bram_wdata = completed + 1;
    end else if (port_free) begin
      unique case (pstate)
        P_ISSUE_SRC: bram_addr = ctrl(CTRL_SRC);
        P_ISSUE_LEN: bram_addr = ctrl(CTRL_LEN);
        P_ISSUE_DST: bram_addr = ctrl(CTRL_DST);
        P_CLEAR: begin
          bram_addr  = ctrl(CTRL_CMD);
          bram_we    = 1'b1;
          bram_wdata = cmd_word & ~(32'd1 << CMD_GO_BIT);
        end
        default: bram_addr = ctrl(CTRL_CMD);
      endcase
    end
    q_we   = q_push;
    q_addr = q_push ? q_wr : q_rd;
  end

  always_ff @(posedge clk_i) begin
    if (!rst_ni) begin
      pstate    <= P_ISSUE_CMD;
      estate    <= E_IDLE;
      new_req   <= '0;
      cur       <= '0;
      cmd_word  <= '0;
      q_wr      <= '0;
      q_rd      <= '0;
      q_cnt     <= '0;
      sidx      <= '0;
      ridx      <= '0;
      completed <= '0;
    end else begin
      pstate <= pnext;
      estate <= enext;
      unique case (pstate)
        P_CAPT_CMD: begin
          cmd_word   <= bram_rdata;
          new_req.pe <= bram_rdata[PE_IDX_W-1:0];
        end
        P_CAPT_SRC: new_req.src <= bram_rdata[15:0];
        P_CAPT_LEN: begin
          new_req.n_send <= bram_rdata[CNT_W-1:0];
          new_req.n_recv <= bram_rdata[16 +: CNT_W];
        end
        P_CAPT_DST: new_req.dst <= bram_rdata[15:0];
        default: ;
      endcase
      if (q_push) q_wr <= (q_wr == QAW'(QDEPTH - 1)) ? '0 : q_wr + 1'b1;
      if (q_pop)  q_rd <= (q_rd == QAW'(QDEPTH - 1)) ? '0 : q_rd + 1'b1;
      q_cnt <= q_cnt + (QAW+1)'(q_push) - (QAW+1)'(q_pop);
      if (estate == E_QLATCH) begin
        cur  <= q_dout;
        sidx <= '0;
        ridx <= '0;
      end
      if (estate == E_SPUSH && enext == E_SRD) sidx <= sidx + 1'b1;
      if (rx_fire) ridx <= ridx + 1'b1;
      if (estate == E_STAT) completed <= completed + 1;
    end
  end

  assign busy = (estate != E_IDLE);

  // Handshake rules towards the elements.
  a_no_write_full: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (PE_fi_wr & PE_fi_full) == '0);
  a_no_read_empty: assert property (@(posedge clk_i) disable iff (!rst_ni)
    (PE_fo_rd & PE_fo_empty) == '0);
  a_onehot_wr: assert property (@(posedge clk_i) disable iff (!rst_ni)
    $onehot0(PE_fi_wr));

endmodule
