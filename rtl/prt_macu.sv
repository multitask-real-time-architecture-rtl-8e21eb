// prt_macu: Memory Access Control Unit.
//
// Performs all IO of the platform on behalf of the threads, so that the
// pipeline never waits for main memory. IO packets arrive from the thread
// controller's IO queue (IOQ) and wait in the Data Temporary Memory (DTM).
// Whenever the unit is idle it picks one waiting packet, runs the transfer on
// the global-memory port, and when the transfer ends
//   * for a read, pushes {thread, destination register, data} into the Main
//     Memory Data Queue (MMDQ) so the thread controller updates the thread's
//     saved state;
//   * returns the thread ID and key to the ready pool of the interleave
//     controller ("Th ready ID" in Fig. 1).
// The paper gives this flow. It leaves the arbitration to a trade-off between
// memory intensity, access time and DEADLINE without a formula; this design
// folds these into each thread's scheduling key and offers
//   policy 0 - oldest packet first;  policy 1 - smallest key first (oldest
//   among equal keys). Ties go to the lower thread ID.
// One transfer is outstanding at a time, which keeps the access order and the
// time of each transfer predictable.
//
// Global-memory port (this design's own): valid/ready request with we, addr,
// wdata; every request, read or write, is answered by one response beat
// (mem_rsp_valid, mem_rsp_rdata) that the unit accepts with mem_rsp_ready.
// A read response is held off while the MMDQ is full.
module prt_macu
  import prt_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   policy,
  // IO queue head
  input  logic   ioq_empty,
  input  iopkt_t ioq_head,
  output logic   ioq_pop,
  // global memory
  output logic   mem_req_valid,
  input  logic   mem_req_ready,
  output logic   mem_req_we,
  output word_t  mem_req_addr,
  output word_t  mem_req_wdata,
  input  logic   mem_rsp_valid,
  input  word_t  mem_rsp_rdata,
  output logic   mem_rsp_ready,
  // main memory data queue
  output logic   mmdq_push,
  output mmdq_t  mmdq_din,
  input  logic   mmdq_full,
  // ready thread to the interleave controller
  output logic   rdy_valid,
  output tid_t   rdy_id,
  output key_t   rdy_key,
  output logic   busy
);
  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;
  state_e state;
  iopkt_t cur;
  logic [STAMP_W-1:0] now;

  logic [NTHREADS-1:0] dvalid;
  key_t                dkey   [NTHREADS];
  logic [STAMP_W-1:0]  dstamp [NTHREADS];
  iopkt_t              sel_pkt;
  logic                sel_valid;
  tid_t                sel_id;

  assign ioq_pop = !ioq_empty;

  prt_dtm u_dtm (
    .clk, .rst_n,
    .we      (ioq_pop),
    .wpkt    (ioq_head),
    .wstamp  (now),
    .clr     (state == S_IDLE && sel_valid),
    .clr_id  (sel_id),
    .rd_id   (sel_id),
    .rd_pkt  (sel_pkt),
    .valid   (dvalid),
    .key_o   (dkey),
    .stamp_o (dstamp)
  );

  // Arbitration among waiting packets.
  logic [KEY_W+STAMP_W-1:0] best, cand;
  always_comb begin
    sel_valid = 1'b0;
    sel_id    = '0;
    best      = '1;
    for (int i = 0; i < NTHREADS; i++) begin
      cand = policy ? {dkey[i], dstamp[i]} : {KEY_W'(0), dstamp[i]};
      if (dvalid[i] && (!sel_valid || cand < best)) begin
        sel_valid = 1'b1;
        sel_id    = tid_t'(i);
        best      = cand;
      end
    end
  end

  assign mem_req_valid = (state == S_REQ);
  assign mem_req_we    = !cur.rd;
  assign mem_req_addr  = cur.addr;
  assign mem_req_wdata = cur.wdata;
  assign mem_rsp_ready = (state == S_WAIT) && !(cur.rd && mmdq_full);
  assign busy          = (state != S_IDLE);

  logic done;
  assign done      = mem_rsp_valid && mem_rsp_ready;
  assign mmdq_push = done && cur.rd;
  assign mmdq_din  = '{id: cur.id, dst: cur.dst, data: mem_rsp_rdata};
  assign rdy_valid = done;
  assign rdy_id    = cur.id;
  assign rdy_key   = cur.key;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      now   <= '0;
      cur   <= '0;
    end else begin
      now <= now + 1'b1;
      unique case (state)
        S_IDLE: if (sel_valid) begin
          cur   <= sel_pkt;
          state <= S_REQ;
        end
        S_REQ:  if (mem_req_ready) state <= S_WAIT;
        S_WAIT: if (done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_req_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (mem_req_valid && !mem_req_ready) |=> mem_req_valid && $stable(mem_req_addr));
endmodule
