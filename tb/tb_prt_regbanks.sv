// tb_prt_regbanks: self-checking test of the ten register banks.
// Random register writes, PC writes, whole-bank loads and reads through every
// port are compared with a model of the ten banks. R0 must always read zero.
module tb_prt_regbanks;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  bank_t pc_bank = '0, rd_bank = '0, wb_bank = '0, save_bank = '0, load_bank = '0;
  pc_t   pc_val, wb_pc = '0;
  ridx_t rs1 = '0, rs2 = '0, wb_rd = '0;
  word_t rs1_val, rs2_val, wb_data = '0;
  logic  wb_reg_en = 0, wb_pc_en = 0, load_en = 0;
  tstate_t save_state, load_state = '0;
  tstate_t model [NBANKS];
  int checks = 0, failures = 0;

  prt_regbanks dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic word_t mreg(bank_t b, ridx_t r);
    return (r == 0) ? '0 : model[b].r[r];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < NBANKS; b++) model[b] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      wb_reg_en = $urandom_range(0, 1);
      wb_pc_en  = $urandom_range(0, 1);
      wb_bank   = bank_t'($urandom_range(0, NBANKS - 1));
      wb_rd     = ridx_t'($urandom);
      wb_data   = $urandom;
      wb_pc     = pc_t'($urandom);
      load_en   = ($urandom_range(0, 7) == 0);
      load_bank = bank_t'($urandom_range(0, NBANKS - 1));
      if (load_bank == wb_bank) load_bank = bank_t'((int'(wb_bank) + 1) % NBANKS);
      load_state.pc  = pc_t'($urandom);
      load_state.key = key_t'($urandom);
      for (int k = 1; k < NREGS; k++) load_state.r[k] = $urandom;
      pc_bank   = bank_t'($urandom_range(0, NBANKS - 1));
      rd_bank   = bank_t'($urandom_range(0, NBANKS - 1));
      save_bank = bank_t'($urandom_range(0, NBANKS - 1));
      rs1 = ridx_t'($urandom);
      rs2 = ridx_t'($urandom);
      #1;
      check(pc_val === model[pc_bank].pc, "pc port");
      check(rs1_val === mreg(rd_bank, rs1), "rs1 port");
      check(rs2_val === mreg(rd_bank, rs2), "rs2 port");
      check(save_state === model[save_bank], "save port");
      @(posedge clk);
      if (wb_reg_en && wb_rd != 0) model[wb_bank].r[wb_rd] = wb_data;
      if (wb_pc_en) model[wb_bank].pc = wb_pc;
      if (load_en) model[load_bank] = load_state;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
