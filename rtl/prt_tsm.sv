// prt_tsm: Thread State Memory.
//
// Holds the state (R1..R15, program counter, scheduling key) of every system
// thread while it is offline, i.e. not in one of the processor's register
// banks. The paper names the memory and its role; organisation and ports are
// this design's own: one word per thread ID, one synchronous read port (used to
// fill the Shadow State Queue) and one write port with a per-field mask, so the
// thread controller can store a whole state (thread leaves the pipeline) or a
// single register (read data coming back from main memory).
//
// Timing: rdata shows the state of raddr from the cycle after one with re
// high, and holds it until the next read. A write in cycle t is seen by a read issued in t+1 or
// later. Mask bit 0 covers pc and key, bit k covers Rk.
module prt_tsm
  import prt_pkg::*;
#(
  parameter int unsigned N = NTHREADS
) (
  input  logic      clk,
  input  logic      re,
  input  tid_t      raddr,
  output tstate_t   rdata,
  input  logic      we,
  input  tid_t      waddr,
  input  tstate_t   wdata,
  input  tsm_mask_t wmask
);
  tstate_t mem [N];

  always_ff @(posedge clk) begin
    if (we) begin
      if (wmask[0]) begin
        mem[waddr].pc  <= wdata.pc;
        mem[waddr].key <= wdata.key;
      end
      for (int k = 1; k < NREGS; k++)
        if (wmask[k]) mem[waddr].r[k] <= wdata.r[k];
    end
    if (re) rdata <= mem[raddr];
  end
endmodule
