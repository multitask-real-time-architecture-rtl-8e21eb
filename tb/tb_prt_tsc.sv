// tb_prt_tsc: self-checking test of the Thread State Controller, together with
// a Thread State Memory and an interleave controller (first-come order,
// QUANTUM reduced to 64). The testbench plays the pipeline's Memory stage and
// the memory unit. Checked:
//   * 14 launched threads: the first ten fill the ten slots in launch order
//     with their start PC, the rest wait in the shadow streams;
//   * an IO exit: kill, same-cycle exchange of the slot's ID and bank with the
//     shadow heads, IO packet with the address/data register values, the data
//     register index and R/W, state stored with PC+1;
//   * read data through the MMDQ lands in the stored state, which comes back
//     (PC+1, data in the destination register) when the thread is rescheduled;
//   * EndTask reports thend; an exit with no shadow thread leaves the slot
//     empty, and it is filled later;
//   * a full context change (cc) preempts a slot at its next Memory-stage
//     instruction, stores its PC unchanged and returns it to the ready pool.
module tb_prt_tsc;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [NBANKS-1:0] slot_active, inflight = '0;
  tid_t  mids [NBANKS];
  bank_t pids [NBANKS];
  logic m_valid = 0, m_io = 0, m_end = 0, m_kill;
  bank_t m_slot = '0;
  tid_t m_id = '0;
  ior_t m_ior = '0;
  pc_t m_pc = '0;
  tstate_t m_state = '0;
  logic load_en; bank_t load_bank; tstate_t load_state;
  logic fill_req, fill_valid, cc, rdy_valid;
  tid_t fill_id, rdy_id;
  key_t rdy_key;
  logic tsm_re, tsm_we; tid_t tsm_raddr, tsm_waddr; tstate_t tsm_rdata, tsm_wdata; tsm_mask_t tsm_wmask;
  logic ioq_empty, ioq_pop = 0, mmdq_push = 0, mmdq_full;
  iopkt_t ioq_head; mmdq_t mmdq_din = '0;
  logic launch_valid = 0, launch_ready, thend_valid;
  tid_t launch_id = '0, thend_id;
  pc_t launch_pc = '0; key_t launch_key = '0;
  logic ev_exit, ev_swap, ev_fill, ev_preempt;
  logic dic_mode = 0, rdy_m_valid = 0;
  tid_t rdy_m_id = '0;
  logic [TID_W:0] ready_count;
  int checks = 0, failures = 0;
  int n_fill = 0, n_swap = 0, n_end = 0, n_pre = 0, n_rdy = 0;
  tstate_t loaded [NBANKS];

  prt_tsc dut (.*);
  prt_tsm u_tsm (.clk, .re(tsm_re), .raddr(tsm_raddr), .rdata(tsm_rdata), .we(tsm_we),
                 .waddr(tsm_waddr), .wdata(tsm_wdata), .wmask(tsm_wmask));
  prt_dic #(.QUANTUM(64)) u_dic (.clk, .rst_n, .mode(dic_mode), .policy(1'b0),
    .rdy_m_valid, .rdy_m_id, .rdy_m_key('0), .rdy_t_valid(rdy_valid), .rdy_t_id(rdy_id),
    .rdy_t_key(rdy_key), .fill_req, .fill_valid, .fill_id, .cc, .ready_count);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (load_en) loaded[load_bank] = load_state;
    if (ev_fill) n_fill++;
    if (ev_swap) n_swap++;
    if (ev_preempt) n_pre++;
    if (thend_valid) n_end++;
    if (rdy_valid) n_rdy++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // present one instruction in the Memory stage of slot s for one cycle
  task automatic mem_stage(int s, bit io, bit fin, ior_t ior, pc_t pc, tstate_t st,
                           output bit killed, output bit swapped);
    m_valid = 1; m_slot = bank_t'(s); m_id = mids[s]; m_io = io; m_end = fin;
    m_ior = ior; m_pc = pc; m_state = st;
    #1;
    killed = m_kill; swapped = load_en && load_bank == pids[s];
    @(negedge clk);
    m_valid = 0; m_io = 0; m_end = 0;
  endtask

  initial begin
    bit k, sw;
    tstate_t st;
    ior_t ior;
    tid_t x;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // launch 14 threads, IDs 100..113, start PC = ID
    for (int i = 0; i < 14; i++) begin
      launch_valid = 1; launch_id = tid_t'(100 + i); launch_pc = pc_t'(100 + i); launch_key = key_t'(i);
      #1; check(launch_ready, "launch accepted");
      @(negedge clk);
    end
    launch_valid = 0;
    repeat (40) @(negedge clk);
    check(slot_active === '1, "ten slots filled");
    for (int s = 0; s < NBANKS; s++) begin
      check(mids[s] === tid_t'(100 + s), $sformatf("slot %0d holds thread %0d", s, mids[s]));
      check(loaded[pids[s]].pc === pc_t'(100 + s), "start PC loaded");
    end
    check(n_fill === 10, "ten fills");
    // IO exit of slot 3: load R5 <- mem[R2]
    st = '0;
    for (int r = 1; r < NREGS; r++) st.r[r] = 32'(1000 * r + 3);
    st.key = 8'd3; st.pc = 7'd0;
    ior = '0; ior.addr_sel[2] = 1; ior.data_sel[5] = 1; ior.rd = 1;
    x = mids[3];
    mem_stage(3, 1, 0, ior, pc_t'(50), st, k, sw);
    check(k && sw, "IO exit killed and swapped");
    check(mids[3] === tid_t'(110), "shadow thread 110 entered slot 3");
    check(loaded[3].pc === pc_t'(110), "bank 3 loaded with its state");
    @(negedge clk);
    check(!ioq_empty, "IO packet queued");
    check(ioq_head.id === x && ioq_head.rd && ioq_head.addr === 32'd2003 && ioq_head.dst === 5
          && ioq_head.key == 8'd3, "IO packet fields");
    ioq_pop = 1; @(negedge clk); ioq_pop = 0;
    // memory unit returns the data and the thread
    mmdq_push = 1; mmdq_din = '{id: x, dst: 4'd5, data: 32'hABCD}; @(negedge clk); mmdq_push = 0;
    rdy_m_valid = 1; rdy_m_id = x; @(negedge clk); rdy_m_valid = 0;
    repeat (5) @(negedge clk);
    // EndTask in slots 0,1,2: shadow threads 111,112,113 come in; then x
    for (int s = 0; s < 4; s++) begin
      mem_stage(s, 0, 1, '0, pc_t'(7), '0, k, sw);
      check(k && sw, "EndTask exit swapped");
      @(negedge clk);
    end
    check(n_end === 4, "four thend");
    check(mids[3] === x, "IO thread back in slot 3");
    check(loaded[3].pc === pc_t'(51), "PC after the load");
    check(loaded[3].r[5] === 32'hABCD, "read data in R5");
    check(loaded[3].r[7] === 32'd7003, "other registers kept");
    // exit with no shadow thread: slot becomes empty
    mem_stage(5, 0, 1, '0, pc_t'(7), '0, k, sw);
    check(k && !sw, "exit without replacement");
    @(negedge clk);
    check(!slot_active[5], "slot 5 empty");
    launch_valid = 1; launch_id = 7'd20; launch_pc = 7'd20; @(negedge clk); launch_valid = 0;
    repeat (6) @(negedge clk);
    check(slot_active[5] && mids[5] === 7'd20, "empty slot filled by new thread");
    // full context change: preempt slot 6
    // eleven more threads: ten fill the shadow streams, one waits in the pool
    for (int i = 21; i < 32; i++) begin
      launch_valid = 1; launch_id = tid_t'(i); launch_pc = pc_t'(i); @(negedge clk);
    end
    launch_valid = 0;
    repeat (30) @(negedge clk);
    check(ready_count === 1, "one thread left in the pool");
    dic_mode = 1;
    wait (cc); @(negedge clk); @(negedge clk);
    dic_mode = 0;
    x = mids[6];
    st = '0; st.pc = 7'd33; st.r[1] = 32'h55;
    mem_stage(6, 0, 0, '0, pc_t'(33), st, k, sw);
    check(k && sw && n_pre === 1, "preempted and replaced");
    repeat (3) @(negedge clk);
    check(n_rdy >= 1, "preempted thread returned to the pool");
    check(u_tsm.mem[x].pc === pc_t'(33) && u_tsm.mem[x].r[1] === 32'h55, "preempted state stored, same PC");
    // the change covers every slot: slot 7 goes too, but only once
    mem_stage(7, 0, 0, '0, pc_t'(9), '0, k, sw);
    check(k && n_pre === 2, "slot 7 preempted in the same change");
    repeat (12) @(negedge clk);
    mem_stage(7, 0, 0, '0, pc_t'(9), '0, k, sw);
    check(!k, "no second preemption without a new cc");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
