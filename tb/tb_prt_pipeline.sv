// tb_prt_pipeline: self-checking test of the interleaved pipeline.
// The testbench plays the thread controller: it loads register banks through
// the load port, marks slots active, and kills every load/store/EndTask in
// the Memory stage, recording the bank state and IOR there.
// Each thread runs: acc = R1 * R2 by repeated addition, then XOR/SUB/AND/OR of
// acc and R1 into R4..R7, then a store of R1 to address acc. Checked:
//   * the register state saved at the store equals a model of the program;
//   * the IOR of the store (address register R3, data register R1, write);
//   * round-robin mode, ten active threads: one issue every cycle and each
//     thread's consecutive instructions exactly ten cycles apart;
//   * sharing mode, three active threads: instructions of a thread exactly six
//     cycles apart (one pipeline depth), i.e. the threads share the windows;
//   * a killed ADD writes nothing back;
//   * EndTask reaches Memory with m_end.
module tb_prt_pipeline;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0, io_share = 0;
  logic [NBANKS-1:0] slot_active = '0, inflight;
  tid_t  mids [NBANKS];
  bank_t pids [NBANKS];
  logic imem_we = 0;
  pc_t imem_waddr = '0;
  logic [31:0] imem_wdata = '0;
  logic m_valid, m_io, m_end, m_kill, load_en = 0, issue, retire;
  bank_t m_slot, load_bank = '0;
  tid_t m_id;
  ior_t m_ior;
  pc_t m_pc;
  tstate_t m_state, load_state = '0;
  int checks = 0, failures = 0, cyc = 0;
  int last_seen [NBANKS];
  int gap_expect = 10;
  logic [NBANKS-1:0] kill_slot = '0;
  int exits = 0, ends = 0, gaps = 0;
  int pc10_seen = 0;
  word_t pc10_r9_first, pc10_r9_second;
  tstate_t saved [NBANKS];
  ior_t saved_ior [NBANKS];
  pc_t saved_pc [NBANKS];

  prt_pipeline dut (.*);
  always #5 clk = ~clk;

  assign m_kill = m_valid && (m_io || m_end || kill_slot[m_slot]);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && m_valid) begin
      if (last_seen[m_slot] >= 0) begin
        gaps++;
        check(cyc - last_seen[m_slot] === gap_expect,
              $sformatf("slot %0d gap %0d exp %0d", m_slot, cyc - last_seen[m_slot], gap_expect));
      end
      last_seen[m_slot] = cyc;
      if (m_pc == 10 && m_slot == 0) begin
        pc10_seen++;
        if (pc10_seen == 1) pc10_r9_first = m_state.r[9];
        else pc10_r9_second = m_state.r[9];
      end
      if (m_io || m_end) begin
        slot_active[m_slot] <= 1'b0;
        last_seen[m_slot] = -1;
        saved[m_slot]     = m_state;
        saved_ior[m_slot] = m_ior;
        saved_pc[m_slot]  = m_pc;
        if (m_io) exits++;
        if (m_end) ends++;
      end
      if (kill_slot[m_slot]) begin
        kill_slot[m_slot] <= 1'b0;
        saved_pc[m_slot]  = m_pc;
      end
    end
  end

  always @(posedge clk) if (slot_active === '1 && !io_share) check(issue, "issue every cycle");

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] prog [$];
  task automatic load_prog();
    prog = '{
      mk_instr(OP_ADDI, 4'd3, 4'd0, 4'd0, 16'd0),          // 0 acc = 0
      mk_instr(OP_ADD,  4'd3, 4'd3, 4'd1, 16'd0),          // 1 acc += R1
      mk_instr(OP_ADDI, 4'd2, 4'd2, 4'd0, 16'hFFFF),       // 2 R2 -= 1
      mk_instr(OP_BNE,  4'd0, 4'd2, 4'd0, 16'hFFFE),       // 3 loop to 1
      mk_instr(OP_XOR,  4'd4, 4'd3, 4'd1, 16'd0),          // 4
      mk_instr(OP_SUB,  4'd5, 4'd3, 4'd1, 16'd0),          // 5
      mk_instr(OP_AND,  4'd6, 4'd3, 4'd1, 16'd0),          // 6
      mk_instr(OP_OR,   4'd7, 4'd3, 4'd1, 16'd0),          // 7
      mk_instr(OP_ST,   4'd0, 4'd3, 4'd1, 16'd0),          // 8 mem[acc] = R1
      mk_instr(OP_END,  4'd0, 4'd0, 4'd0, 16'd0),          // 9
      mk_instr(OP_ADDI, 4'd9, 4'd0, 4'd0, 16'd77),         // 10 used by the kill test
      mk_instr(OP_END,  4'd0, 4'd0, 4'd0, 16'd0)           // 11
    };
    foreach (prog[i]) begin
      imem_we = 1; imem_waddr = pc_t'(i); imem_wdata = prog[i];
      @(negedge clk);
    end
    imem_we = 0;
  endtask

  word_t r1v [NBANKS], r2v [NBANKS];

  task automatic start_threads(int n, int pc0);
    for (int s = 0; s < n; s++) begin
      load_en = 1; load_bank = bank_t'(s);
      load_state = '0;
      load_state.pc = pc_t'(pc0);
      r1v[s] = 32'($urandom_range(1, 1000));
      r2v[s] = 32'($urandom_range(1, 6));
      load_state.r[1] = r1v[s];
      load_state.r[2] = r2v[s];
      @(negedge clk);
    end
    load_en = 0;
    for (int s = 0; s < NBANKS; s++) last_seen[s] = -1;
    for (int s = 0; s < n; s++) slot_active[s] = 1'b1;
  endtask

  task automatic check_results(int n);
    for (int s = 0; s < n; s++) begin
      automatic word_t acc = r1v[s] * r2v[s];
      check(saved[s].r[3] === acc, $sformatf("slot %0d acc", s));
      check(saved[s].r[2] === 0, "loop counter");
      check(saved[s].r[4] === (acc ^ r1v[s]), "xor");
      check(saved[s].r[5] === acc - r1v[s], "sub");
      check(saved[s].r[6] === (acc & r1v[s]), "and");
      check(saved[s].r[7] === (acc | r1v[s]), "or");
      check(saved_pc[s] === 8, "store pc");
      check(32'(saved_ior[s]) === 32'h1000_8000, $sformatf("IOR %h", saved_ior[s]));
    end
  endtask

  initial begin
    for (int s = 0; s < NBANKS; s++) begin
      mids[s] = tid_t'(s + 40);
      pids[s] = bank_t'(s);
      last_seen[s] = -1;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    load_prog();
    // round robin, all ten slots
    io_share = 0; gap_expect = 10;
    start_threads(NBANKS, 0);
    wait (slot_active == '0);
    @(negedge clk);
    check(exits === NBANKS, "ten stores reached Memory");
    check_results(NBANKS);
    // sharing mode, three slots
    repeat (8) @(negedge clk);
    io_share = 1; gap_expect = 6; exits = 0;
    start_threads(3, 0);
    wait (slot_active == '0);
    @(negedge clk);
    check(exits === 3, "three stores");
    check_results(3);
    // EndTask and a killed instruction
    repeat (8) @(negedge clk);
    io_share = 0; gap_expect = 10;
    kill_slot = 10'b1;          // kill the first instruction of slot 0 (ADDI R9)
    start_threads(1, 10);
    wait (slot_active == '0);
    @(negedge clk);
    check(ends === 1, $sformatf("EndTask seen %0d times", ends));
    check(pc10_seen === 2, "killed ADDI executed again");
    check(pc10_r9_first === 0 && pc10_r9_second === 0, "killed ADDI wrote nothing");
    check(saved[0].r[9] === 77, "re-executed ADDI wrote R9");
    check(gaps > 100, "enough instruction pairs timed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
