// prt_regbanks: the processor's multiplied register set.
//
// Each of the NBANKS banks holds the working state of one active thread: R1..R15
// (R0 reads as zero), its program counter and its scheduling key. The paper
// gives ten independent banks and the bulk exchange of a bank's content with
// the Shadow State Queue and Register Temp Queue at a context change (Fig. 4);
// the port set below is this design's own.
//
// Ports:
//   * pc port    - program counter of bank pc_bank (ThId stage), combinational;
//   * read port  - rs1/rs2 of bank rd_bank (Decode stage), combinational;
//   * writeback  - one register and/or the program counter of wb_bank per cycle;
//   * save port  - the whole state of save_bank, combinational (to the RTQ);
//   * load port  - the whole state of load_bank replaced at the clock edge.
// The pipeline never writes back to and loads the same bank in one cycle; if it
// did, the load wins. Everything is flip-flops, reset to zero.
module prt_regbanks
  import prt_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  bank_t   pc_bank,
  output pc_t     pc_val,
  input  bank_t   rd_bank,
  input  ridx_t   rs1,
  input  ridx_t   rs2,
  output word_t   rs1_val,
  output word_t   rs2_val,
  input  logic    wb_reg_en,
  input  logic    wb_pc_en,
  input  bank_t   wb_bank,
  input  ridx_t   wb_rd,
  input  word_t   wb_data,
  input  pc_t     wb_pc,
  input  bank_t   save_bank,
  output tstate_t save_state,
  input  logic    load_en,
  input  bank_t   load_bank,
  input  tstate_t load_state
);
  tstate_t bank [NBANKS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NBANKS; b++) bank[b] <= '0;
    end else begin
      if (wb_reg_en && wb_rd != '0) bank[wb_bank].r[wb_rd] <= wb_data;
      if (wb_pc_en) bank[wb_bank].pc <= wb_pc;
      if (load_en) bank[load_bank] <= load_state;
    end
  end

  assign pc_val     = bank[pc_bank].pc;
  assign rs1_val    = (rs1 == '0) ? '0 : bank[rd_bank].r[rs1];
  assign rs2_val    = (rs2 == '0) ? '0 : bank[rd_bank].r[rs2];
  assign save_state = bank[save_bank];
endmodule
