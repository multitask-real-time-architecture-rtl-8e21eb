// tb_prt_dtm: self-checking test of the Data Temporary Memory.
// Random packets for threads without a pending packet are written, random
// pending packets cleared; the valid vector, the per-entry key and stamp and
// the packet read port are compared with a model.
module tb_prt_dtm;
  import prt_pkg::*;
  logic clk = 0, rst_n = 0;
  logic we = 0, clr = 0;
  iopkt_t wpkt = '0, rd_pkt;
  logic [STAMP_W-1:0] wstamp = '0;
  tid_t clr_id = '0, rd_id = '0;
  logic [NTHREADS-1:0] valid;
  key_t key_o [NTHREADS];
  logic [STAMP_W-1:0] stamp_o [NTHREADS];
  logic [NTHREADS-1:0] mvalid = '0;
  iopkt_t mpkt [NTHREADS];
  logic [STAMP_W-1:0] mstamp [NTHREADS];
  int checks = 0, failures = 0;

  prt_dtm dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(valid === '0, "empty after reset");
    for (int n = 0; n < 3000; n++) begin
      automatic int w = $urandom_range(0, NTHREADS - 1);
      automatic int c = $urandom_range(0, NTHREADS - 1);
      we  = !mvalid[w] && ($urandom_range(0, 1) == 1);
      clr = mvalid[c] && ($urandom_range(0, 2) == 0) && !(we && c == w);
      wpkt.id = tid_t'(w); wpkt.key = key_t'($urandom); wpkt.rd = 1'($urandom);
      wpkt.addr = $urandom; wpkt.wdata = $urandom; wpkt.dst = ridx_t'($urandom);
      wstamp = $urandom;
      clr_id = tid_t'(c);
      @(posedge clk);
      if (we) begin mvalid[w] = 1'b1; mpkt[w] = wpkt; mstamp[w] = wstamp; end
      if (clr) mvalid[c] = 1'b0;
      @(negedge clk);
      we = 0; clr = 0;
      check(valid === mvalid, "valid vector");
      rd_id = tid_t'($urandom_range(0, NTHREADS - 1));
      #1;
      if (mvalid[rd_id]) begin
        check(rd_pkt === mpkt[rd_id], "packet read");
        check(key_o[rd_id] === mpkt[rd_id].key, "key");
        check(stamp_o[rd_id] === mstamp[rd_id], "stamp");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
