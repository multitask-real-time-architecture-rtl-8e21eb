// prt_top: multitask precision-timed (PRET) platform.
//
// Many hardware threads share a six-stage interleaved pipeline with ten
// register banks. A thread that needs IO (load/store) or ends leaves the
// pipeline and a prepared ready thread takes its slot without a stall; the
// Memory Access Control Unit performs the IO meanwhile and returns the thread
// to the ready pool. The blocks and their connections follow Fig. 1 of the
// paper:
//   Pipeline Processor  <-> Thread State Controller (IDs, IO/end, register
//                           state exchange)
//   Thread State Controller <-> Thread State Memory
//   Dynamic Interleave Controller -> TSC (ThID, CC), TSC -> DIC (FILL REQUEST)
//   TSC -> MACU (IO data), MACU -> global memory, global memory -> TSC (read
//   data, through the MACU into the MMDQ), MACU -> DIC (ready thread ID).
// The global memory is outside this design: its request/response port is
// brought out.
//
// Control inputs: io_share selects IO time sharing in the pipeline (Fig. 6a)
// or fixed windows (Fig. 6b); dic_mode 1 enables the periodic full context
// change; dic_policy / macu_policy select first-come or key order.
// Threads are started through the launch port (ID, start PC, scheduling key)
// after their code was written into the program memory through imem_*; each
// EndTask is reported on thend_*.
module prt_top
  import prt_pkg::*;
#(
  parameter int unsigned QUANTUM = 600
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        io_share,
  input  logic        dic_mode,
  input  logic        dic_policy,
  input  logic        macu_policy,
  input  logic        imem_we,
  input  pc_t         imem_waddr,
  input  logic [31:0] imem_wdata,
  input  logic        launch_valid,
  input  tid_t        launch_id,
  input  pc_t         launch_pc,
  input  key_t        launch_key,
  output logic        launch_ready,
  output logic        thend_valid,
  output tid_t        thend_id,
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output word_t       mem_req_addr,
  output word_t       mem_req_wdata,
  input  logic        mem_rsp_valid,
  input  word_t       mem_rsp_rdata,
  output logic        mem_rsp_ready,
  output logic        issue,
  output logic        retire,
  output logic        ev_exit,
  output logic        ev_swap,
  output logic        ev_fill,
  output logic        ev_preempt,
  output logic        ev_cc,
  output logic [NBANKS-1:0] slot_active,
  output logic [TID_W:0] ready_count,
  output logic        macu_busy
);
  tid_t              mids [NBANKS];
  bank_t             pids [NBANKS];
  logic [NBANKS-1:0] inflight;
  logic              m_valid, m_io, m_end, m_kill, load_en;
  bank_t             m_slot, load_bank;
  tid_t              m_id;
  ior_t              m_ior;
  pc_t               m_pc;
  tstate_t           m_state, load_state;
  logic              fill_req, fill_valid, cc;
  tid_t              fill_id;
  logic              rdy_t_valid, rdy_m_valid;
  tid_t              rdy_t_id, rdy_m_id;
  key_t              rdy_t_key, rdy_m_key;
  logic              tsm_re, tsm_we;
  tid_t              tsm_raddr, tsm_waddr;
  tstate_t           tsm_rdata, tsm_wdata;
  tsm_mask_t         tsm_wmask;
  logic              ioq_empty, ioq_pop, mmdq_push, mmdq_full;
  iopkt_t            ioq_head;
  mmdq_t             mmdq_din;

  prt_pipeline u_pipe (
    .clk, .rst_n, .io_share,
    .slot_active, .mids, .pids, .inflight,
    .imem_we, .imem_waddr, .imem_wdata,
    .m_valid, .m_slot, .m_id, .m_io, .m_end, .m_ior, .m_pc, .m_state, .m_kill,
    .load_en, .load_bank, .load_state,
    .issue, .retire
  );

  prt_tsc u_tsc (
    .clk, .rst_n,
    .slot_active, .mids, .pids, .inflight,
    .m_valid, .m_slot, .m_id, .m_io, .m_end, .m_ior, .m_pc, .m_state, .m_kill,
    .load_en, .load_bank, .load_state,
    .fill_req, .fill_valid, .fill_id, .cc,
    .rdy_valid (rdy_t_valid), .rdy_id (rdy_t_id), .rdy_key (rdy_t_key),
    .tsm_re, .tsm_raddr, .tsm_rdata, .tsm_we, .tsm_waddr, .tsm_wdata, .tsm_wmask,
    .ioq_empty, .ioq_head, .ioq_pop, .mmdq_push, .mmdq_din, .mmdq_full,
    .launch_valid, .launch_id, .launch_pc, .launch_key, .launch_ready,
    .thend_valid, .thend_id,
    .ev_exit, .ev_swap, .ev_fill, .ev_preempt
  );

  prt_tsm u_tsm (
    .clk,
    .re (tsm_re), .raddr (tsm_raddr), .rdata (tsm_rdata),
    .we (tsm_we), .waddr (tsm_waddr), .wdata (tsm_wdata), .wmask (tsm_wmask)
  );

  prt_dic #(.QUANTUM(QUANTUM)) u_dic (
    .clk, .rst_n, .mode (dic_mode), .policy (dic_policy),
    .rdy_m_valid, .rdy_m_id, .rdy_m_key,
    .rdy_t_valid, .rdy_t_id, .rdy_t_key,
    .fill_req, .fill_valid, .fill_id, .cc, .ready_count
  );

  prt_macu u_macu (
    .clk, .rst_n, .policy (macu_policy),
    .ioq_empty, .ioq_head, .ioq_pop,
    .mem_req_valid, .mem_req_ready, .mem_req_we, .mem_req_addr, .mem_req_wdata,
    .mem_rsp_valid, .mem_rsp_rdata, .mem_rsp_ready,
    .mmdq_push, .mmdq_din, .mmdq_full,
    .rdy_valid (rdy_m_valid), .rdy_id (rdy_m_id), .rdy_key (rdy_m_key),
    .busy (macu_busy)
  );

  assign ev_cc = cc;
endmodule
