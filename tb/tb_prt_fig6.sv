// tb_prt_fig6: the five-thread scenario of the IO time-window comparison, run
// on the whole platform at its default parameters.
//
// Four compute-bound threads (labelled DCT, LMS, FFT and ADPCM after the
// benchmarks of the original experiment; here they are short accumulation
// loops, not the benchmarks themselves) run next to one IO thread that reads
// eight words of main memory one by one and stores their sum. Main memory is
// the behavioural model with a 100-cycle latency, so the IO thread spends most
// of its life outside the pipeline.
//
// The scenario is run twice from reset:
//   fixed windows (io_share 0): the slot of the absent IO thread issues
//     bubbles, so every compute thread must issue exactly once every ten
//     cycles, whether the IO thread is present or not;
//   IO time sharing (io_share 1): the free windows are shared, so the compute
//     threads issue more often (never waiting more than ten cycles, never less
//     than six since an instruction occupies its slot until Writeback).
// While the IO thread is away (four slots busy) the issue rate is measured:
// 4 per 10 cycles with fixed windows, 4 per 6 with sharing. Bubbles issued for
// the absent thread are counted like the IO_Bubble trace of the original
// waveforms. Results in memory are checked against closed forms (compute
// thread k: 100k at 128+k; IO thread: sum of 3a+1 over a = 64..71 = 1628 at
// 72), the compute threads must run while memory transfers are in progress,
// and with sharing they must finish sooner. Per-thread issue times are taken
// from the Fetch-stage register of the pipeline.
module tb_prt_fig6;
  import prt_pkg::*;
  localparam int LAT    = 100;
  localparam int NCOMP  = 4;
  localparam int ITER   = 100;
  localparam int IO_ID  = 1;
  localparam int C_CODE = 100;   // common compute code
  localparam int I_CODE = 140;   // IO thread code
  localparam string NAMES [NCOMP] = '{"DCT", "LMS", "FFT", "ADPCM"};

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

  // per-run measurements
  int last_issue [NCOMP];
  int min_gap, max_gap, n_gap;
  int win_cycles, win_issues, win_segs, io_bubbles, conc_issues;
  bit in_win;
  int end_cyc [NTHREADS];
  bit running;

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

  function automatic bit comp_done();
    for (int k = 0; k < NCOMP; k++) if (end_cyc[2 + k] < 0) return 0;
    return 1;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (thend_valid) end_cyc[thend_id] = cyc;
    if (running) begin
      // issue intervals of the compute threads (IDs 2..5)
      if (dut.u_pipe.f_q.valid && dut.u_pipe.f_q.id != tid_t'(IO_ID)) begin
        automatic int k = int'(dut.u_pipe.f_q.id) - 2;
        if (last_issue[k] >= 0) begin
          automatic int g = cyc - last_issue[k];
          if (g < min_gap) min_gap = g;
          if (g > max_gap) max_gap = g;
          n_gap++;
        end
        last_issue[k] = cyc;
        if (macu_busy) conc_issues++;
      end
      // a compute thread that decodes its store or EndTask leaves the
      // pipeline: its absence is not an issue gap
      if (dut.u_pipe.d_q.t.valid && dut.u_pipe.d_q.t.id != tid_t'(IO_ID) &&
          dut.u_pipe.d_q.instr[31:28] inside {OP_LD, OP_ST, OP_END})
        last_issue[int'(dut.u_pipe.d_q.t.id) - 2] = -1;
      // window in which the IO thread is away and all compute threads run
      if ($countones(slot_active) == NCOMP && end_cyc[IO_ID] < 0 && !comp_done()) begin
        if (!in_win) win_segs++;
        in_win = 1;
        win_cycles++;
        if (issue) win_issues++;
        if (!io_share && !issue) io_bubbles++;
      end else in_win = 0;
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
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
    // stubs: thread IO_ID at 0, compute thread k at 2 + 2k
    wr(0, mk_instr(OP_ADDI, 4'd1, 4'd0, 4'd0, 16'd64));
    wr(1, mk_instr(OP_BEQ,  4'd0, 4'd0, 4'd0, 16'(I_CODE - 1)));
    for (int k = 0; k < NCOMP; k++) begin
      wr(2 + 2 * k, mk_instr(OP_ADDI, 4'd1, 4'd0, 4'd0, 16'(k + 1)));
      wr(3 + 2 * k, mk_instr(OP_BEQ,  4'd0, 4'd0, 4'd0, 16'(C_CODE - (3 + 2 * k))));
    end
    // compute: R3 = ITER * R1, stored at 128 + R1
    wr(C_CODE + 0, mk_instr(OP_ADDI, 4'd2, 4'd0, 4'd0, 16'(ITER)));
    wr(C_CODE + 1, mk_instr(OP_ADDI, 4'd3, 4'd0, 4'd0, 16'd0));
    wr(C_CODE + 2, mk_instr(OP_ADD,  4'd3, 4'd3, 4'd1, 16'd0));
    wr(C_CODE + 3, mk_instr(OP_ADDI, 4'd2, 4'd2, 4'd0, 16'hFFFF));
    wr(C_CODE + 4, mk_instr(OP_BNE,  4'd0, 4'd2, 4'd0, 16'hFFFE));
    wr(C_CODE + 5, mk_instr(OP_ADDI, 4'd5, 4'd1, 4'd0, 16'd128));
    wr(C_CODE + 6, mk_instr(OP_ST,   4'd0, 4'd5, 4'd3, 16'd0));
    wr(C_CODE + 7, mk_instr(OP_END,  4'd0, 4'd0, 4'd0, 16'd0));
    // IO thread: sum of mem[64..71], stored at 72
    wr(I_CODE + 0, mk_instr(OP_ADDI, 4'd2, 4'd0, 4'd0, 16'd8));
    wr(I_CODE + 1, mk_instr(OP_ADDI, 4'd3, 4'd0, 4'd0, 16'd0));
    wr(I_CODE + 2, mk_instr(OP_LD,   4'd4, 4'd1, 4'd0, 16'd0));
    wr(I_CODE + 3, mk_instr(OP_ADD,  4'd3, 4'd3, 4'd4, 16'd0));
    wr(I_CODE + 4, mk_instr(OP_ADDI, 4'd1, 4'd1, 4'd0, 16'd1));
    wr(I_CODE + 5, mk_instr(OP_ADDI, 4'd2, 4'd2, 4'd0, 16'hFFFF));
    wr(I_CODE + 6, mk_instr(OP_BNE,  4'd0, 4'd2, 4'd0, 16'hFFFC));
    wr(I_CODE + 7, mk_instr(OP_ST,   4'd0, 4'd1, 4'd3, 16'd0));
    wr(I_CODE + 8, mk_instr(OP_END,  4'd0, 4'd0, 4'd0, 16'd0));
  endtask

  task automatic launch(int id, int pc);
    launch_valid = 1; launch_id = tid_t'(id); launch_pc = pc_t'(pc); launch_key = '0;
    do @(posedge clk); while (!launch_ready);
    @(negedge clk);
    launch_valid = 0;
  endtask

  task automatic run(string name, bit share, output int finish);
    int t0;
    rst_n = 0; running = 0;
    io_share = share;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_program();
    gmem.poke(72, 32'hDEAD);
    for (int k = 0; k < NCOMP; k++) gmem.poke(129 + k, 32'hDEAD);
    for (int i = 0; i < NTHREADS; i++) end_cyc[i] = -1;
    for (int k = 0; k < NCOMP; k++) last_issue[k] = -1;
    min_gap = 1 << 30; max_gap = 0; n_gap = 0;
    win_cycles = 0; win_issues = 0; win_segs = 0; in_win = 0; io_bubbles = 0; conc_issues = 0;
    running = 1;
    t0 = cyc;
    launch(IO_ID, 0);
    for (int k = 0; k < NCOMP; k++) launch(2 + k, 2 + 2 * k);
    while (!(comp_done() && end_cyc[IO_ID] >= 0)) @(negedge clk);
    finish = 0;
    for (int k = 0; k < NCOMP; k++) if (end_cyc[2 + k] - t0 > finish) finish = end_cyc[2 + k] - t0;
    running = 0;
    repeat (5) @(negedge clk);
    check(gmem.peek(72) === 32'd1628, $sformatf("%s: IO thread sum", name));
    for (int k = 0; k < NCOMP; k++)
      check(gmem.peek(129 + k) === 32'(ITER * (k + 1)), $sformatf("%s: %s result", name, NAMES[k]));
    check(win_cycles > 2 * LAT, $sformatf("%s: IO window observed (%0d cycles)", name, win_cycles));
    check(conc_issues > 0, $sformatf("%s: compute threads ran during memory transfers", name));
    if (!share) begin
      check(min_gap === NBANKS && max_gap === NBANKS,
            $sformatf("%s: fixed window of %0d cycles (seen %0d..%0d)", name, NBANKS, min_gap, max_gap));
      check(win_issues * NBANKS >= NCOMP * win_cycles - NBANKS * NCOMP * win_segs &&
            win_issues * NBANKS <= NCOMP * win_cycles + NBANKS * NCOMP * win_segs,
            $sformatf("%s: %0d issues in %0d cycles, 4 per 10 expected", name, win_issues, win_cycles));
      check(io_bubbles > 0, $sformatf("%s: bubbles for the absent thread", name));
    end else begin
      check(min_gap >= NSTAGES && max_gap <= NBANKS,
            $sformatf("%s: issue gaps %0d..%0d within %0d..%0d", name, min_gap, max_gap, NSTAGES, NBANKS));
      check(win_issues * NSTAGES >= NCOMP * win_cycles - NSTAGES * NCOMP * win_segs &&
            win_issues * NSTAGES <= NCOMP * win_cycles + NSTAGES * NCOMP * win_segs,
            $sformatf("%s: %0d issues in %0d cycles, 4 per 6 expected", name, win_issues, win_cycles));
    end
    $display("%s: compute threads done after %0d cycles; IO window %0d cycles in %0d spells, %0d issues, %0d bubbles; gaps %0d..%0d",
             name, finish, win_cycles, win_segs, win_issues, io_bubbles, min_gap, max_gap);
  endtask

  initial begin
    int f_fixed, f_share;
    run("fixed windows", 0, f_fixed);
    run("IO time sharing", 1, f_share);
    check(f_share < f_fixed, $sformatf("sharing finishes sooner (%0d vs %0d cycles)", f_share, f_fixed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
