// prt_dic: Dynamic Interleave Controller.
//
// Keeps the pool of ready-to-go threads (the ready-to-go queue, RGQ) and hands
// the thread controller the next thread to place in the Shadow ID Stream each
// time it raises fill_req (FILL REQUEST in the paper). Threads enter the pool
// when the memory unit finishes their IO (port m), or when the thread
// controller launches or preempts them (port t).
//
// Scheduling: the paper says the pool is rearranged by "current thread
// parameters" (memory intensity, access time, DEADLINE) without giving a
// formula. This design stores for every ready thread its scheduling key and
// the cycle it became ready, and selects on demand, which is equivalent to
// keeping the queue sorted:
//   policy 0 - first come first served (oldest stamp first);
//   policy 1 - smallest key first, oldest first among equal keys.
// Equal stamps are broken by the lower thread ID.
//
// Modes (paper Sec. 5.B): mode 0 changes the pipeline context only when a
// thread leaves for IO or ends. Mode 1 also changes the complete context: every
// QUANTUM cycles, if some thread is waiting, it pulses cc (the CC signal of
// Fig. 1) and the thread controller then replaces every active thread. QUANTUM
// is this design's choice; the paper gives no value.
//
// Timing: fill_valid/fill_id are combinational from the pool; the chosen
// thread leaves the pool at the clock edge of a cycle with fill_req high.
// The 32-bit stamp counter wraps after 2^32 cycles, where FCFS order is lost
// once.
module prt_dic
  import prt_pkg::*;
#(
  parameter int unsigned QUANTUM = 600
) (
  input  logic clk,
  input  logic rst_n,
  input  logic mode,
  input  logic policy,
  input  logic rdy_m_valid,
  input  tid_t rdy_m_id,
  input  key_t rdy_m_key,
  input  logic rdy_t_valid,
  input  tid_t rdy_t_id,
  input  key_t rdy_t_key,
  input  logic fill_req,
  output logic fill_valid,
  output tid_t fill_id,
  output logic cc,
  output logic [TID_W:0] ready_count
);
  logic [NTHREADS-1:0]       ready;
  key_t                      key   [NTHREADS];
  logic [STAMP_W-1:0]        stamp [NTHREADS];
  logic [STAMP_W-1:0]        now;
  logic [$clog2(QUANTUM+1)-1:0] qcnt;

  // Selection: minimum of {key, stamp} (policy 1) or {stamp} (policy 0).
  logic [KEY_W+STAMP_W-1:0] best, cand;
  always_comb begin
    fill_valid = 1'b0;
    fill_id    = '0;
    best       = '1;
    for (int i = 0; i < NTHREADS; i++) begin
      cand = policy ? {key[i], stamp[i]} : {KEY_W'(0), stamp[i]};
      if (ready[i] && (!fill_valid || cand < best)) begin
        fill_valid = 1'b1;
        fill_id    = tid_t'(i);
        best       = cand;
      end
    end
  end

  always_comb begin
    ready_count = '0;
    for (int i = 0; i < NTHREADS; i++) ready_count += (TID_W+1)'(ready[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready <= '0;
      now   <= '0;
      qcnt  <= '0;
      cc    <= 1'b0;
    end else begin
      now <= now + 1'b1;
      if (fill_req && fill_valid) ready[fill_id] <= 1'b0;
      if (rdy_m_valid) begin
        ready[rdy_m_id] <= 1'b1;
        key[rdy_m_id]   <= rdy_m_key;
        stamp[rdy_m_id] <= now;
      end
      if (rdy_t_valid) begin
        ready[rdy_t_id] <= 1'b1;
        key[rdy_t_id]   <= rdy_t_key;
        stamp[rdy_t_id] <= now;
      end
      cc <= 1'b0;
      if (mode) begin
        if (qcnt == ($clog2(QUANTUM+1))'(QUANTUM - 1)) begin
          qcnt <= '0;
          cc   <= (ready != '0);
        end else begin
          qcnt <= qcnt + 1'b1;
        end
      end else begin
        qcnt <= '0;
      end
    end
  end

  a_no_double_ready: assert property (@(posedge clk) disable iff (!rst_n)
    !(rdy_m_valid && rdy_t_valid && rdy_m_id == rdy_t_id));
  a_m_not_ready: assert property (@(posedge clk) disable iff (!rst_n)
    rdy_m_valid |-> !ready[rdy_m_id]);
  a_t_not_ready: assert property (@(posedge clk) disable iff (!rst_n)
    rdy_t_valid |-> !ready[rdy_t_id]);
endmodule
