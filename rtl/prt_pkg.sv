// prt_pkg: shared constants and types of the predictable multithreaded (PRET)
// platform.
//
// The platform runs many hardware threads on a six-stage interleaved pipeline
// with ten register banks. A thread that issues an IO (load/store) instruction
// or ends leaves the pipeline; its registers go to the Thread State Memory and
// a ready thread takes its place. The Memory Access Control Unit performs the IO
// on the thread's behalf while other threads use the pipeline.
//
// Taken from the paper: six stages, ten register banks, register file R1..R15
// as indexed by the IO register (IOR), the IOR field order
// (unused | address-register select R1..R15 | data-register select R1..R15 | R/W).
// This design's own choices: the number of system threads (128, so IDs up to
// 111 as in the figures fit), data width 32, program-counter width, the
// scheduling-key width and the instruction set (the paper only says the core
// is a classical load/store RISC).
package prt_pkg;

  localparam int unsigned NSTAGES  = 6;    // ThId, Fetch, Decode, Execute, Memory, Writeback
  localparam int unsigned NBANKS   = 10;   // register banks = slots of the Main ID Stream
  localparam int unsigned NREGS    = 16;   // R0..R15, R0 reads as zero
  localparam int unsigned XLEN     = 32;
  localparam int unsigned NTHREADS = 128;  // system thread IDs
  localparam int unsigned TID_W    = $clog2(NTHREADS);
  localparam int unsigned BANK_W   = $clog2(NBANKS);
  localparam int unsigned PC_W     = 10;   // program memory of 1024 instruction words
  localparam int unsigned KEY_W    = 8;    // scheduling key (smaller = served earlier)
  localparam int unsigned STAMP_W  = 32;   // arrival stamp for first-come ordering
  localparam int unsigned QDEPTH   = 10;   // SSQ, IDQ, RTQ (and SIDS) hold ten entries

  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [BANK_W-1:0] bank_t;
  typedef logic [XLEN-1:0]   word_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [KEY_W-1:0]  key_t;
  typedef logic [3:0]        ridx_t;

  // Thread state: the content of one register bank plus program counter and
  // scheduling key. R0 is constant zero and not stored.
  typedef struct packed {
    pc_t                          pc;
    key_t                         key;
    logic [NREGS-1:1][XLEN-1:0]   r;    // r[k] is Rk
  } tstate_t;

  // Write mask of the Thread State Memory: bit 0 covers pc and key, bit k covers Rk.
  typedef logic [NREGS-1:0] tsm_mask_t;

  // IO register (Fig. 5), most significant bit on the left of the figure.
  typedef struct packed {
    logic        unused;
    logic [1:15] addr_sel;   // one-hot: register holding the memory address
    logic [1:15] data_sel;   // one-hot: register holding / receiving the data
    logic        rd;         // R/W: 1 = read (load), 0 = write (store)
  } ior_t;

  // Why a thread leaves the pipeline.
  typedef enum logic [1:0] {
    EXIT_IO      = 2'd0,
    EXIT_END     = 2'd1,
    EXIT_PREEMPT = 2'd2
  } exit_e;

  // ThId Temp Queue entry.
  typedef struct packed {
    tid_t  id;
    exit_e kind;
    ior_t  ior;
  } idq_t;

  // IO packet built by the TSC (IOQ entry, DTM entry).
  typedef struct packed {
    tid_t  id;
    key_t  key;
    logic  rd;
    word_t addr;
    word_t wdata;
    ridx_t dst;
  } iopkt_t;

  // Main Memory Data Queue entry: read data for a thread register in the TSM.
  typedef struct packed {
    tid_t  id;
    ridx_t dst;
    word_t data;
  } mmdq_t;

  // Instruction set of the core (this design's own; 32-bit words):
  //   [31:28] opcode  [27:24] rd  [23:20] rs1  [19:16] rs2  [15:0] imm
  typedef enum logic [3:0] {
    OP_NOP  = 4'h0,
    OP_ADD  = 4'h1,   // rd = rs1 + rs2
    OP_SUB  = 4'h2,   // rd = rs1 - rs2
    OP_ADDI = 4'h3,   // rd = rs1 + sext(imm)
    OP_AND  = 4'h4,
    OP_OR   = 4'h5,
    OP_XOR  = 4'h6,
    OP_BNE  = 4'h7,   // if rs1 != rs2: pc = pc + sext(imm)
    OP_BEQ  = 4'h8,   // if rs1 == rs2: pc = pc + sext(imm)
    OP_LD   = 4'h9,   // rd = mem[rs1]      (IO, leaves the pipeline)
    OP_ST   = 4'hA,   // mem[rs1] = rs2     (IO, leaves the pipeline)
    OP_END  = 4'hB    // EndTask: last instruction of the thread
  } op_e;

  function automatic logic [31:0] mk_instr(op_e op, ridx_t rd, ridx_t rs1, ridx_t rs2,
                                           logic [15:0] imm);
    return {op, rd, rs1, rs2, imm};
  endfunction

endpackage
