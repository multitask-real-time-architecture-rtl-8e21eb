// tb_prt_macu: self-checking test of the Memory Access Control Unit.
// A queue model stands in for the IO queue and a behavioural memory with a
// 20-cycle latency for main memory. Checked: policy 0 serves packets in
// arrival order, policy 1 in ascending key order (after the packet already in
// service); each read returns the memory word with the right thread and
// destination register in the MMDQ; every transfer returns its thread ID and
// key as ready; a write reaches memory; the request-to-ready time is the same
// for every transfer; no MMDQ push happens while the MMDQ is full.
module tb_prt_macu;
  import prt_pkg::*;
  localparam int LAT = 20;
  logic clk = 0, rst_n = 0;
  logic policy = 0;
  logic ioq_empty, ioq_pop;
  iopkt_t ioq_head;
  logic mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid, mem_rsp_ready;
  word_t mem_req_addr, mem_req_wdata, mem_rsp_rdata;
  logic mmdq_push, mmdq_full = 0;
  mmdq_t mmdq_din;
  logic rdy_valid, busy;
  tid_t rdy_id;
  key_t rdy_key;
  int n_reads, n_writes;
  int checks = 0, failures = 0;
  iopkt_t q [$];
  iopkt_t sent [NTHREADS];
  int served [$];
  int t_req, lat_seen = -1, cyc = 0;
  bit measure = 1;

  prt_macu dut (.*);
  prt_gmem_model #(.LAT(LAT)) mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_addr(mem_req_addr), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid),
    .rsp_rdata(mem_rsp_rdata), .rsp_ready(mem_rsp_ready), .n_reads, .n_writes);

  always #5 clk = ~clk;
  // the queue model drives the IO-queue head explicitly after every change
  function automatic void upd();
    ioq_empty = (q.size() == 0);
    ioq_head  = ioq_empty ? '0 : q[0];
  endfunction
  initial upd();

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // the popped entry leaves the model just after the edge the block sampled it on
  always @(posedge clk) if (ioq_pop) begin
    #1;
    void'(q.pop_front());
    upd();
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (mem_req_valid && mem_req_ready) t_req <= cyc;
    if (mmdq_push) begin
      check(!mmdq_full, "no push while MMDQ full");
      check(sent[mmdq_din.id].rd, "MMDQ only for reads");
      check(mmdq_din.dst === sent[mmdq_din.id].dst, "MMDQ destination");
      check(mmdq_din.data === 32'(sent[mmdq_din.id].addr % 1024 * 3 + 1), "MMDQ data");
    end
    if (rdy_valid) begin
      served.push_back(int'(rdy_id));
      check(rdy_key === sent[rdy_id].key, "ready key");
      if (measure) begin
        if (lat_seen < 0) lat_seen = cyc - t_req;
        else check(cyc - t_req === lat_seen, "constant transfer time");
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int id, int key, bit rd);
    iopkt_t p;
    p.id = tid_t'(id); p.key = key_t'(key); p.rd = rd;
    p.addr = 32'($urandom_range(0, 1023)); p.wdata = $urandom; p.dst = ridx_t'($urandom_range(1, 15));
    sent[id] = p;
    q.push_back(p);
    upd();
  endtask

  initial begin
    int ids [$];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // policy 0: arrival order
    policy = 0;
    for (int i = 0; i < 12; i++) begin send(i * 9 % NTHREADS, 255 - i, 1'b1); @(negedge clk); end
    wait (served.size() == 12);
    for (int i = 0; i < 12; i++) check(served[i] === i * 9 % NTHREADS, "FCFS order");
    served.delete();
    // policy 1: key order; all arrive while the first is in service
    policy = 1;
    for (int i = 0; i < 10; i++) begin send(i + 20, (i * 37) % 11, 1'b1); end
    wait (served.size() == 10);
    begin
      automatic int prev = -1;
      for (int i = 1; i < 10; i++) begin
        check(int'(sent[served[i]].key) >= prev, "key order");
        prev = int'(sent[served[i]].key);
      end
    end
    served.delete();
    // a write
    send(50, 0, 1'b0);
    wait (served.size() == 1);
    @(negedge clk);
    check(n_writes === 1, "one write");
    check(mem.peek(int'(sent[50].addr)) === sent[50].wdata, "write reached memory");
    served.delete();
    // MMDQ backpressure
    measure = 0;
    check(lat_seen === LAT + 1, $sformatf("transfer time %0d", lat_seen));
    mmdq_full = 1;
    send(60, 0, 1'b1);
    repeat (LAT + 20) @(negedge clk);
    check(served.size() === 0, "held while MMDQ full");
    mmdq_full = 0;
    wait (served.size() == 1);
    repeat (3) @(negedge clk);
    check(!busy, "idle at end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
