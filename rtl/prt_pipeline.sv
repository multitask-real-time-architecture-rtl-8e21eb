// prt_pipeline: six-stage thread-interleaved pipeline processor.
//
// Stages (from the paper): ThId, Fetch, Decode, Execute, Memory, Writeback.
// Every cycle the ThId stage picks one of the NBANKS slots of the Main ID
// Stream and issues the next instruction of the thread in that slot, using the
// register bank named by the Processor ID Stream entry of the slot. A slot is
// issued again only after its previous instruction has left Writeback, so no
// data or control hazard can arise and no forwarding or branch prediction is
// needed.
//
// Two issue modes (the two cases of the paper's Fig. 6):
//   io_share = 0 - strict round robin over all ten slots; a slot without a
//                  thread (its thread is away on IO) issues a bubble, so every
//                  thread keeps a fixed time window;
//   io_share = 1 - the round robin skips empty slots and slots still in
//                  flight, so the remaining threads share the free windows.
//
// Loads, stores and EndTask are recognised in Decode and are not executed: in
// Execute the IO register (IOR, Fig. 5) is prepared, and in Memory the thread
// controller takes the thread out (m_kill) and may load a new state into the
// same bank through the load port. A killed instruction writes nothing back.
// The thread controller may also kill any other instruction in Memory to
// preempt its thread; that instruction is then executed again when the thread
// returns (its PC is the saved PC).
//
// The instruction set, the program memory (one shared, synchronous-read array
// written through the imem_* port) and the register/PC write in Writeback are
// this design's own; the paper only calls the core a classical load/store RISC.
module prt_pipeline
  import prt_pkg::*;
#(
  parameter int unsigned IMEM_WORDS = 1 << PC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                io_share,
  // thread streams from the thread controller
  input  logic [NBANKS-1:0]   slot_active,
  input  tid_t                mids [NBANKS],
  input  bank_t               pids [NBANKS],
  output logic [NBANKS-1:0]   inflight,
  // program memory load
  input  logic                imem_we,
  input  pc_t                 imem_waddr,
  input  logic [31:0]         imem_wdata,
  // Memory stage towards the thread controller
  output logic                m_valid,
  output bank_t               m_slot,
  output tid_t                m_id,
  output logic                m_io,
  output logic                m_end,
  output ior_t                m_ior,
  output pc_t                 m_pc,
  output tstate_t             m_state,
  input  logic                m_kill,
  // bank load from the Shadow State Queue
  input  logic                load_en,
  input  bank_t               load_bank,
  input  tstate_t             load_state,
  // activity
  output logic                issue,
  output logic                retire
);
  typedef struct packed {
    logic  valid;
    bank_t slot;
    tid_t  id;
    bank_t bank;
    pc_t   pc;
  } tag_t;

  typedef struct packed {
    tag_t        t;
    logic [31:0] instr;
  } dreg_t;

  typedef struct packed {
    tag_t  t;
    op_e   op;
    ridx_t rd;
    ridx_t rs1;
    ridx_t rs2;
    word_t a;
    word_t b;
    word_t imm;
  } ereg_t;

  typedef struct packed {
    tag_t  t;
    logic  io;
    logic  fin;
    ior_t  ior;
    logic  wr;
    ridx_t rd;
    word_t res;
    pc_t   npc;
  } mreg_t;

  tag_t  f_q;
  dreg_t d_q;
  ereg_t e_q;
  mreg_t m_q, w_q;

  // ---------------------------------------------------------------- ThId
  bank_t rr;
  logic  sel_ok;
  bank_t sel;
  pc_t   sel_pc;

  always_comb begin
    inflight = '0;
    if (f_q.valid)   inflight[f_q.slot]   = 1'b1;
    if (d_q.t.valid) inflight[d_q.t.slot] = 1'b1;
    if (e_q.t.valid) inflight[e_q.t.slot] = 1'b1;
    if (m_q.t.valid) inflight[m_q.t.slot] = 1'b1;
    if (w_q.t.valid) inflight[w_q.t.slot] = 1'b1;
  end

  always_comb begin
    sel_ok = 1'b0;
    sel    = rr;
    if (!io_share) begin
      sel_ok = slot_active[rr] && !inflight[rr];
    end else begin
      for (int k = NBANKS - 1; k >= 0; k--) begin
        automatic int j = (int'(rr) + k) % NBANKS;
        if (slot_active[j] && !inflight[j]) begin
          sel_ok = 1'b1;
          sel    = bank_t'(j);
        end
      end
    end
  end

  function automatic bank_t inc(bank_t b);
    return (b == bank_t'(NBANKS - 1)) ? '0 : b + 1'b1;
  endfunction

  // ---------------------------------------------------------------- banks
  word_t rs1_val, rs2_val;
  logic  wb_commit;

  prt_regbanks u_banks (
    .clk, .rst_n,
    .pc_bank    (pids[sel]),
    .pc_val     (sel_pc),
    .rd_bank    (d_q.t.bank),
    .rs1        (d_q.instr[23:20]),
    .rs2        (d_q.instr[19:16]),
    .rs1_val,
    .rs2_val,
    .wb_reg_en  (wb_commit && w_q.wr),
    .wb_pc_en   (wb_commit),
    .wb_bank    (w_q.t.bank),
    .wb_rd      (w_q.rd),
    .wb_data    (w_q.res),
    .wb_pc      (w_q.npc),
    .save_bank  (m_q.t.bank),
    .save_state (m_state),
    .load_en,
    .load_bank,
    .load_state
  );

  // ---------------------------------------------------------------- Fetch
  logic [31:0] imem [IMEM_WORDS];
  logic [31:0] imem_q;

  always_ff @(posedge clk) begin
    if (imem_we) imem[imem_waddr] <= imem_wdata;
    imem_q <= imem[sel_pc];
  end

  // ---------------------------------------------------------------- Execute
  word_t alu;
  logic  take;
  ior_t  ex_ior;
  logic  ex_ld, ex_st;

  assign ex_ld = (e_q.op == OP_LD);
  assign ex_st = (e_q.op == OP_ST);

  prt_ior_enc u_ior (
    .is_load  (ex_ld),
    .is_store (ex_st),
    .addr_reg (e_q.rs1),
    .data_reg (ex_ld ? e_q.rd : e_q.rs2),
    .ior      (ex_ior)
  );

  always_comb begin
    alu  = '0;
    take = 1'b0;
    unique case (e_q.op)
      OP_ADD:  alu = e_q.a + e_q.b;
      OP_SUB:  alu = e_q.a - e_q.b;
      OP_ADDI: alu = e_q.a + e_q.imm;
      OP_AND:  alu = e_q.a & e_q.b;
      OP_OR:   alu = e_q.a | e_q.b;
      OP_XOR:  alu = e_q.a ^ e_q.b;
      OP_BNE:  take = (e_q.a != e_q.b);
      OP_BEQ:  take = (e_q.a == e_q.b);
      default: ;
    endcase
  end

  // ---------------------------------------------------------------- registers
  assign issue     = sel_ok;
  assign wb_commit = w_q.t.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr  <= '0;
      f_q <= '0;
      d_q <= '0;
      e_q <= '0;
      m_q <= '0;
      w_q <= '0;
    end else begin
      // ThId -> Fetch
      if (!io_share)   rr <= inc(rr);
      else if (sel_ok) rr <= inc(sel);
      f_q <= '{valid: sel_ok, slot: sel, id: mids[sel], bank: pids[sel], pc: sel_pc};
      // Fetch -> Decode
      d_q <= '{t: f_q, instr: imem_q};
      // Decode -> Execute
      e_q.t   <= d_q.t;
      e_q.op  <= op_e'(d_q.instr[31:28]);
      e_q.rd  <= d_q.instr[27:24];
      e_q.rs1 <= d_q.instr[23:20];
      e_q.rs2 <= d_q.instr[19:16];
      e_q.a   <= rs1_val;
      e_q.b   <= rs2_val;
      e_q.imm <= word_t'($signed(d_q.instr[15:0]));
      // Execute -> Memory
      m_q.t   <= e_q.t;
      m_q.io  <= ex_ld || ex_st;
      m_q.fin <= (e_q.op == OP_END);
      m_q.ior <= ex_ior;
      m_q.wr  <= e_q.op inside {OP_ADD, OP_SUB, OP_ADDI, OP_AND, OP_OR, OP_XOR};
      m_q.rd  <= e_q.rd;
      m_q.res <= alu;
      m_q.npc <= take ? e_q.t.pc + pc_t'(e_q.imm) : e_q.t.pc + 1'b1;
      // Memory -> Writeback
      w_q       <= m_q;
      w_q.t.valid <= m_q.t.valid && !m_kill;
    end
  end

  assign retire  = wb_commit;
  assign m_valid = m_q.t.valid;
  assign m_slot  = m_q.t.slot;
  assign m_id    = m_q.t.id;
  assign m_io    = m_q.io;
  assign m_end   = m_q.fin;
  assign m_ior   = m_q.ior;
  assign m_pc    = m_q.t.pc;

  a_exit_killed: assert property (@(posedge clk) disable iff (!rst_n)
    (m_valid && (m_io || m_end)) |-> m_kill);
endmodule
