// prt_tsc: Thread State Controller.
//
// Organises the threads of the platform around the pipeline (paper Sec. 4.A
// and 4.B, Figs. 2-4). It holds
//   * the Main ID Stream (MIDS): the system ID of the thread in each of the ten
//     pipeline slots, plus a valid bit per slot;
//   * the Processor ID Stream (PIDS): the register bank used by each slot
//     (fixed here: slot k always uses bank k, and the bank is reloaded when
//     the slot changes thread; the paper maps IDs from MIDS to PIDS without
//     saying the mapping ever changes);
//   * the Shadow ID Stream (SIDS) and Shadow State Queue (SSQ): the next ready
//     threads and their states, prepared ahead of time so a replacement is
//     available the moment a thread leaves;
//   * the ThId Temp Queue (IDQ) and Register Temp Queue (RTQ): leaving threads;
//   * the IO Queue (IOQ) towards the memory unit and the Main Memory Data
//     Queue (MMDQ) from it.
//
// Context change. When the instruction in the Memory stage is a load/store
// (IO), EndTask, or belongs to a slot marked for preemption, the controller
// kills it, pushes {ID, reason, IOR} into the IDQ and the bank content into the
// RTQ, and in the same cycle moves the SIDS/SSQ heads into the slot (MIDS
// entry and register bank). With no shadow thread prepared the slot becomes
// empty and is filled later, as soon as a shadow thread exists and the slot is
// no longer in flight. A preemption happens only if a replacement is ready.
//
// Full context change (mode 1 of the interleave controller): a cc pulse marks
// every active slot; each marked slot is replaced when its next instruction
// reaches Memory, so the whole pipeline content changes within one round.
//
// Shadow fill. While SIDS has room and no read data is waiting in the MMDQ,
// the controller raises fill_req; the interleave controller answers with a
// ready thread ID (same cycle), which enters SIDS while its state is read from
// the Thread State Memory (TSM) and enters the SSQ one cycle later. Waiting
// for an empty MMDQ guarantees that a thread's read data is in the TSM before
// its state is fetched.
//
// Draining (one TSM write per cycle, in this priority):
//   1. IDQ/RTQ head: IO -> state to TSM, IO packet {ID, key, R/W, address
//      register value, data register value, data register index} into IOQ;
//      preempt -> state to TSM, ID back to the ready pool; EndTask -> thend.
//   2. MMDQ head: the read data is written into the thread's register in TSM.
//   3. launch port: a new thread (PC, key, registers zero) is written to TSM
//      and handed to the ready pool.
// The queue roles and the Memory-stage exchange follow the paper; the exact
// priorities, the fill handshake and the empty-slot handling are this design's.
module prt_tsc
  import prt_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ID streams to the pipeline
  output logic [NBANKS-1:0] slot_active,
  output tid_t              mids [NBANKS],
  output bank_t             pids [NBANKS],
  input  logic [NBANKS-1:0] inflight,
  // Memory stage of the pipeline
  input  logic              m_valid,
  input  bank_t             m_slot,
  input  tid_t              m_id,
  input  logic              m_io,
  input  logic              m_end,
  input  ior_t              m_ior,
  input  pc_t               m_pc,
  input  tstate_t           m_state,
  output logic              m_kill,
  output logic              load_en,
  output bank_t             load_bank,
  output tstate_t           load_state,
  // interleave controller
  output logic              fill_req,
  input  logic              fill_valid,
  input  tid_t              fill_id,
  input  logic              cc,
  output logic              rdy_valid,
  output tid_t              rdy_id,
  output key_t              rdy_key,
  // thread state memory
  output logic              tsm_re,
  output tid_t              tsm_raddr,
  input  tstate_t           tsm_rdata,
  output logic              tsm_we,
  output tid_t              tsm_waddr,
  output tstate_t           tsm_wdata,
  output tsm_mask_t         tsm_wmask,
  // memory unit
  output logic              ioq_empty,
  output iopkt_t            ioq_head,
  input  logic              ioq_pop,
  input  logic              mmdq_push,
  input  mmdq_t             mmdq_din,
  output logic              mmdq_full,
  // thread launch and end
  input  logic              launch_valid,
  input  tid_t              launch_id,
  input  pc_t               launch_pc,
  input  key_t              launch_key,
  output logic              launch_ready,
  output logic              thend_valid,
  output tid_t              thend_id,
  // events
  output logic              ev_exit,
  output logic              ev_swap,
  output logic              ev_fill,
  output logic              ev_preempt
);
  localparam int unsigned CW = $clog2(QDEPTH+1);

  // ------------------------------------------------------------ queues
  logic    sids_push, sids_pop, sids_empty, sids_full;
  tid_t    sids_head;
  logic [CW-1:0] sids_count;
  logic    ssq_push, ssq_pop, ssq_empty, ssq_full;
  tstate_t ssq_head;
  logic [CW-1:0] ssq_count;
  logic    idq_push, idq_pop, idq_empty, idq_full;
  idq_t    idq_din, idq_head;
  logic [CW-1:0] idq_count;
  logic    rtq_empty, rtq_full;
  tstate_t rtq_din, rtq_head;
  logic [CW-1:0] rtq_count;
  logic    ioq_push, ioq_full;
  iopkt_t  ioq_din;
  logic [CW-1:0] ioq_count;
  logic    mmdq_pop, mmdq_empty;
  mmdq_t   mmdq_head;
  logic [CW-1:0] mmdq_count;

  prt_fifo #(.T(tid_t),    .DEPTH(QDEPTH)) u_sids (.clk, .rst_n, .push(sids_push), .din(fill_id),
    .pop(sids_pop), .head(sids_head), .empty(sids_empty), .full(sids_full), .count(sids_count));
  prt_fifo #(.T(tstate_t), .DEPTH(QDEPTH)) u_ssq  (.clk, .rst_n, .push(ssq_push), .din(tsm_rdata),
    .pop(ssq_pop), .head(ssq_head), .empty(ssq_empty), .full(ssq_full), .count(ssq_count));
  prt_fifo #(.T(idq_t),    .DEPTH(QDEPTH)) u_idq  (.clk, .rst_n, .push(idq_push), .din(idq_din),
    .pop(idq_pop), .head(idq_head), .empty(idq_empty), .full(idq_full), .count(idq_count));
  prt_fifo #(.T(tstate_t), .DEPTH(QDEPTH)) u_rtq  (.clk, .rst_n, .push(idq_push), .din(rtq_din),
    .pop(idq_pop), .head(rtq_head), .empty(rtq_empty), .full(rtq_full), .count(rtq_count));
  prt_fifo #(.T(iopkt_t),  .DEPTH(QDEPTH)) u_ioq  (.clk, .rst_n, .push(ioq_push), .din(ioq_din),
    .pop(ioq_pop), .head(ioq_head), .empty(ioq_empty), .full(ioq_full), .count(ioq_count));
  prt_fifo #(.T(mmdq_t),   .DEPTH(QDEPTH)) u_mmdq (.clk, .rst_n, .push(mmdq_push), .din(mmdq_din),
    .pop(mmdq_pop), .head(mmdq_head), .empty(mmdq_empty), .full(mmdq_full), .count(mmdq_count));

  // ------------------------------------------------------------ context change
  logic [NBANKS-1:0] preempt_pend;
  logic  exit_now, swap_now, fill_now;
  exit_e kind;
  bank_t fill_slot;

  always_comb begin
    exit_now = m_valid && (m_io || m_end || (preempt_pend[m_slot] && !ssq_empty));
    kind     = m_end ? EXIT_END : (m_io ? EXIT_IO : EXIT_PREEMPT);
    swap_now = exit_now && !ssq_empty;
    fill_now  = 1'b0;
    fill_slot = '0;
    if (!swap_now && !ssq_empty) begin
      for (int s = NBANKS - 1; s >= 0; s--)
        if (!slot_active[s] && !inflight[s]) begin
          fill_now  = 1'b1;
          fill_slot = bank_t'(s);
        end
    end
  end

  assign m_kill     = exit_now;
  assign idq_push   = exit_now;
  assign idq_din    = '{id: m_id, kind: kind, ior: m_ior};
  always_comb begin
    rtq_din    = m_state;
    rtq_din.pc = (kind == EXIT_IO) ? m_pc + 1'b1 : m_pc;
  end

  assign load_en    = swap_now || fill_now;
  assign load_bank  = swap_now ? pids[m_slot] : pids[fill_slot];
  assign load_state = ssq_head;
  // PIDS: fixed slot-to-bank mapping
  for (genvar s = 0; s < NBANKS; s++) begin : g_pids
    assign pids[s] = bank_t'(s);
  end

  assign sids_pop   = load_en;
  assign ssq_pop    = load_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot_active  <= '0;
      preempt_pend <= '0;
      for (int s = 0; s < NBANKS; s++) mids[s] <= '0;
    end else begin
      if (m_valid) preempt_pend[m_slot] <= 1'b0;
      if (cc) preempt_pend <= slot_active;
      if (exit_now) slot_active[m_slot] <= 1'b0;
      if (swap_now) begin
        slot_active[m_slot] <= 1'b1;
        mids[m_slot]        <= sids_head;
      end
      if (fill_now) begin
        slot_active[fill_slot] <= 1'b1;
        mids[fill_slot]        <= sids_head;
      end
    end
  end

  // ------------------------------------------------------------ shadow fill
  logic rd_pend;
  assign fill_req  = !sids_full && mmdq_empty;
  assign sids_push = fill_req && fill_valid;
  assign tsm_re    = sids_push;
  assign tsm_raddr = fill_id;
  assign ssq_push  = rd_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_pend <= 1'b0;
    else        rd_pend <= sids_push;
  end

  // ------------------------------------------------------------ drain
  logic  drain, drain_mm;
  word_t io_addr, io_data;
  ridx_t io_dst;

  always_comb begin
    io_addr = '0;
    io_data = '0;
    io_dst  = '0;
    for (int k = 1; k < NREGS; k++) begin
      if (idq_head.ior.addr_sel[k]) io_addr = rtq_head.r[k];
      if (idq_head.ior.data_sel[k]) begin
        io_data = rtq_head.r[k];
        io_dst  = ridx_t'(k);
      end
    end
  end

  assign drain        = !idq_empty && !ioq_full;
  assign drain_mm     = !drain && !mmdq_empty;
  assign launch_ready = !drain && mmdq_empty;
  assign idq_pop      = drain;
  assign mmdq_pop     = drain_mm;
  assign ioq_push     = drain && idq_head.kind == EXIT_IO;
  assign ioq_din      = '{id: idq_head.id, key: rtq_head.key, rd: idq_head.ior.rd,
                          addr: io_addr, wdata: io_data, dst: io_dst};
  assign thend_valid  = drain && idq_head.kind == EXIT_END;
  assign thend_id     = idq_head.id;

  always_comb begin
    tsm_we    = 1'b0;
    tsm_waddr = idq_head.id;
    tsm_wdata = rtq_head;
    tsm_wmask = '1;
    rdy_valid = 1'b0;
    rdy_id    = idq_head.id;
    rdy_key   = rtq_head.key;
    if (drain) begin
      tsm_we    = (idq_head.kind != EXIT_END);
      rdy_valid = (idq_head.kind == EXIT_PREEMPT);
    end else if (drain_mm) begin
      tsm_we    = (mmdq_head.dst != '0);
      tsm_waddr = mmdq_head.id;
      tsm_wdata = '0;
      tsm_wmask = '0;
      for (int k = 1; k < NREGS; k++)
        if (mmdq_head.dst == ridx_t'(k)) begin
          tsm_wdata.r[k] = mmdq_head.data;
          tsm_wmask[k]   = 1'b1;
        end
    end else if (launch_valid) begin
      tsm_we        = 1'b1;
      tsm_waddr     = launch_id;
      tsm_wdata     = '0;
      tsm_wdata.pc  = launch_pc;
      tsm_wdata.key = launch_key;
      rdy_valid     = 1'b1;
      rdy_id        = launch_id;
      rdy_key       = launch_key;
    end
  end

  assign ev_exit    = exit_now;
  assign ev_swap    = swap_now;
  assign ev_fill    = fill_now;
  assign ev_preempt = exit_now && kind == EXIT_PREEMPT;

  a_idq_room:  assert property (@(posedge clk) disable iff (!rst_n) exit_now |-> !idq_full);
  a_ssq_pairs: assert property (@(posedge clk) disable iff (!rst_n) ssq_count <= sids_count);
endmodule
