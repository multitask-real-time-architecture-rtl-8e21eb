// tb_prt_tsm: self-checking test of the Thread State Memory.
// Writes whole states for all 128 threads, then single-register updates with
// one-hot masks, and reads every thread back one cycle after the read request,
// comparing with a model array.
module tb_prt_tsm;
  import prt_pkg::*;
  logic clk = 0;
  logic re = 0, we = 0;
  tid_t raddr = '0, waddr = '0;
  tstate_t rdata, wdata = '0;
  tsm_mask_t wmask = '0;
  tstate_t model [NTHREADS];
  int checks = 0, failures = 0;

  prt_tsm dut (.*);
  always #5 clk = ~clk;

  function automatic tstate_t rnd_state();
    tstate_t s;
    s.pc  = pc_t'($urandom);
    s.key = key_t'($urandom);
    for (int k = 1; k < NREGS; k++) s.r[k] = $urandom;
    return s;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int t = 0; t < NTHREADS; t++) begin
      we = 1; waddr = tid_t'(t); wdata = rnd_state(); wmask = '1;
      model[t] = wdata;
      @(negedge clk);
    end
    for (int n = 0; n < 500; n++) begin
      automatic int t = $urandom_range(0, NTHREADS - 1);
      automatic int k = $urandom_range(0, NREGS - 1);
      we = 1; waddr = tid_t'(t); wdata = rnd_state(); wmask = '0; wmask[k] = 1'b1;
      if (k == 0) begin model[t].pc = wdata.pc; model[t].key = wdata.key; end
      else model[t].r[k] = wdata.r[k];
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < NTHREADS; t++) begin
      re = 1; raddr = tid_t'(t);
      @(negedge clk);
      re = 0;
      checks++;
      if (rdata !== model[t]) begin failures++; $display("FAIL thread %0d", t); end
      @(negedge clk);
      checks++;
      if (rdata !== model[t]) begin failures++; $display("FAIL hold %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
