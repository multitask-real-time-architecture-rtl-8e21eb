// tb_prt_top: end-to-end test of the platform at its default parameters.
//
// 40 threads share the ten pipeline slots. Even threads are IO bound: they
// load four words of main memory (one IO exit each), add them and store the
// sum (a fifth exit). Odd threads are compute bound: 30 loop iterations, then
// one store. Every thread starts at its own two-instruction stub that sets its
// base address R1 = 16*t and jumps to the common code, and ends with EndTask.
// Main memory is a behavioural model with 100-cycle latency (mem[a] = 3a+1).
//
// Three runs, each from reset:
//   1. fixed time windows (io_share 0), context change only on IO/EndTask;
//   2. IO time sharing (io_share 1);
//   3. IO time sharing plus the periodic full context change (dic_mode 1),
//      key-ordered scheduling in the interleave controller and memory unit.
// After each run every result word in memory is checked against its
// closed-form value (IO-bound: 192t + 22 at 16t+4; compute-bound: 480t at
// 16t+8), and every thread must have reported EndTask exactly once.
// Run 2 must not take longer than run 1, and in sharing mode the pipeline
// must issue in every cycle in which six or more threads are present. Every mechanism must occur at least
// once over the three runs: slot exchange on exit, exit with no ready thread
// (slot left empty), later fill of an empty slot, bubble issue in fixed-window
// mode, issue past an empty slot in sharing mode, full context change (cc) and
// preemption, main-memory reads and writes.
module tb_prt_top;
  import prt_pkg::*;
  localparam int NT  = 40;
  localparam int LAT = 100;
  localparam int A_CODE = 512;   // IO-bound common code
  localparam int B_CODE = 540;   // compute-bound common code

  logic clk = 0, rst_n = 0;
  logic io_share = 0, dic_mode = 0, dic_policy = 0, macu_policy = 0;
  logic imem_we = 0; pc_t imem_waddr = '0; logic [31:0] imem_wdata = '0;
  logic launch_valid = 0, launch_ready; tid_t launch_id = '0; pc_t launch_pc = '0; key_t launch_key = '0;
  logic thend_valid; tid_t thend_id;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid, mem_rsp_ready;
  word_t mem_req_addr, mem_req_wdata, mem_rsp_rdata;
  logic issue, retire, ev_exit, ev_swap, ev_fill, ev_preempt, ev_cc, macu_busy;
  logic [NBANKS-1:0] slot_active;
  logic [TID_W:0] ready_count;
  int n_reads, n_writes;
  int checks = 0, failures = 0, cyc = 0;
  int c_swap = 0, c_idle = 0, c_fill = 0, c_bubble = 0, c_skip = 0, c_cc = 0, c_pre = 0;
  int c_retire = 0, c_share_miss = 0, c_share_busy = 0;
  int ended [NTHREADS];

  prt_top dut (.*);
  prt_gmem_model #(.LAT(LAT)) gmem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid),
    .rsp_rdata(mem_rsp_rdata), .rsp_ready(mem_rsp_ready), .n_reads, .n_writes);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic tid_t tid_of(int t);
    return tid_t'(1 + 3 * t);
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (ev_swap) c_swap++;
    if (ev_exit && !ev_swap) c_idle++;
    if (ev_fill) c_fill++;
    if (ev_cc) c_cc++;
    if (ev_preempt) c_pre++;
    if (retire) c_retire++;
    if (!io_share && !issue && slot_active != '0 && slot_active != '1) c_bubble++;
    if (io_share && issue && slot_active != '1 && slot_active != '0) c_skip++;
    // sharing mode: at most five slots are in flight, so with six or more
    // threads present some slot can always issue
    if (io_share && $countones(slot_active) >= NSTAGES && slot_active != '1) begin
      c_share_busy++;
      if (!issue) c_share_miss++;
    end
    if (thend_valid) ended[thend_id]++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, logic [31:0] w);
    imem_we = 1; imem_waddr = pc_t'(a); imem_wdata = w;
    @(negedge clk);
    imem_we = 0;
  endtask

  task automatic load_program();
    for (int t = 0; t < NT; t++) begin
      wr(2 * t,     mk_instr(OP_ADDI, 4'd1, 4'd0, 4'd0, 16'(16 * t)));
      wr(2 * t + 1, mk_instr(OP_BEQ, 4'd0, 4'd0, 4'd0,
                             16'(((t % 2 == 0) ? A_CODE : B_CODE) - (2 * t + 1))));
    end
    // IO bound: sum of four words, stored after them
    wr(A_CODE + 0, mk_instr(OP_ADDI, 4'd2, 4'd0, 4'd0, 16'd4));
    wr(A_CODE + 1, mk_instr(OP_ADDI, 4'd3, 4'd0, 4'd0, 16'd0));
    wr(A_CODE + 2, mk_instr(OP_LD,   4'd4, 4'd1, 4'd0, 16'd0));
    wr(A_CODE + 3, mk_instr(OP_ADD,  4'd3, 4'd3, 4'd4, 16'd0));
    wr(A_CODE + 4, mk_instr(OP_ADDI, 4'd1, 4'd1, 4'd0, 16'd1));
    wr(A_CODE + 5, mk_instr(OP_ADDI, 4'd2, 4'd2, 4'd0, 16'hFFFF));
    wr(A_CODE + 6, mk_instr(OP_BNE,  4'd0, 4'd2, 4'd0, 16'hFFFC));
    wr(A_CODE + 7, mk_instr(OP_ST,   4'd0, 4'd1, 4'd3, 16'd0));
    wr(A_CODE + 8, mk_instr(OP_END,  4'd0, 4'd0, 4'd0, 16'd0));
    // compute bound: 30 additions of R1, stored at R1 + 8
    wr(B_CODE + 0, mk_instr(OP_ADDI, 4'd2, 4'd0, 4'd0, 16'd30));
    wr(B_CODE + 1, mk_instr(OP_ADDI, 4'd3, 4'd0, 4'd0, 16'd0));
    wr(B_CODE + 2, mk_instr(OP_ADD,  4'd3, 4'd3, 4'd1, 16'd0));
    wr(B_CODE + 3, mk_instr(OP_ADDI, 4'd2, 4'd2, 4'd0, 16'hFFFF));
    wr(B_CODE + 4, mk_instr(OP_BNE,  4'd0, 4'd2, 4'd0, 16'hFFFE));
    wr(B_CODE + 5, mk_instr(OP_ADDI, 4'd5, 4'd1, 4'd0, 16'd8));
    wr(B_CODE + 6, mk_instr(OP_ST,   4'd0, 4'd5, 4'd3, 16'd0));
    wr(B_CODE + 7, mk_instr(OP_END,  4'd0, 4'd0, 4'd0, 16'd0));
  endtask

  task automatic run(string name, bit share, bit mode, bit pol, output int cycles);
    int t0, rd0, wr0;
    rst_n = 0;
    io_share = share; dic_mode = mode; dic_policy = pol; macu_policy = pol;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_program();
    for (int t = 0; t < NT; t++) begin
      gmem.poke(16 * t + 4, 32'hDEAD);
      gmem.poke(16 * t + 8, 32'hDEAD);
      ended[tid_of(t)] = 0;
    end
    rd0 = n_reads; wr0 = n_writes;
    t0 = cyc;
    for (int t = 0; t < NT; t++) begin
      launch_valid = 1; launch_id = tid_of(t); launch_pc = pc_t'(2 * t);
      launch_key = key_t'(t % 2 == 0 ? 10 : 200);   // IO-bound threads first in key order
      do @(posedge clk); while (!launch_ready);
      @(negedge clk);
    end
    launch_valid = 0;
    begin
      automatic int done = 0;
      while (done < NT) begin
        @(negedge clk);
        done = 0;
        for (int t = 0; t < NT; t++) done += (ended[tid_of(t)] > 0) ? 1 : 0;
      end
    end
    cycles = cyc - t0;
    repeat (5) @(negedge clk);
    for (int t = 0; t < NT; t++) begin
      check(ended[tid_of(t)] === 1, $sformatf("%s: thread %0d ended once", name, t));
      if (t % 2 == 0)
        check(gmem.peek(16 * t + 4) === 32'(192 * t + 22), $sformatf("%s: IO-bound result %0d", name, t));
      else
        check(gmem.peek(16 * t + 8) === 32'(480 * t), $sformatf("%s: compute result %0d", name, t));
    end
    check(n_reads - rd0 === 4 * NT / 2, $sformatf("%s: main-memory reads", name));
    check(n_writes - wr0 === NT, $sformatf("%s: main-memory writes", name));
    check(slot_active === '0 && !macu_busy && ready_count === 0, $sformatf("%s: platform idle", name));
    $display("%s: %0d cycles, swaps %0d, empty-slot exits %0d, fills %0d, cc %0d, preemptions %0d",
             name, cycles, c_swap, c_idle, c_fill, c_cc, c_pre);
  endtask

  initial begin
    int t_fixed, t_share, t_full;
    run("fixed windows", 0, 0, 0, t_fixed);
    run("IO time sharing", 1, 0, 0, t_share);
    run("full context change", 1, 1, 1, t_full);
    check(t_share <= t_fixed, $sformatf("sharing (%0d) not slower than fixed windows (%0d)", t_share, t_fixed));
    check(c_swap > 0, "slot exchange on exit happened");
    check(c_idle > 0, "exit with no ready thread happened");
    check(c_fill > 0, "empty slot filled");
    check(c_bubble > 0, "bubble issued for an empty slot");
    check(c_skip > 0, "sharing issue past an empty slot");
    check(c_cc > 0, "full context change requested");
    check(c_pre > 0, "preemption happened");
    check(c_share_busy > 0, "sharing mode ran with empty slots");
    check(c_share_miss === 0, $sformatf("sharing mode left %0d issue slots unused", c_share_miss));
    $display("bubbles %0d, shared issues %0d, retired %0d", c_bubble, c_skip, c_retire);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
