// prt_fifo: synchronous first-in first-out queue.
//
// The platform uses this queue for every buffer the thread controller keeps
// between the pipeline, the Thread State Memory and the memory unit: the
// Shadow ID Stream (SIDS), Shadow State Queue (SSQ), ThId Temp Queue (IDQ),
// Register Temp Queue (RTQ), IO Queue (IOQ) and Main Memory Data Queue (MMDQ).
// The paper gives their roles and, for SSQ/IDQ/RTQ, a depth of ten; the
// circular-buffer implementation is this design's own.
//
// Interface: push/din write an entry, pop removes the head; head is the oldest
// entry and is valid whenever empty is low. A push into a full queue or a pop
// from an empty one is a protocol error (checked by assertions); both may
// happen in the same cycle. Timing: an entry pushed in cycle t is visible at
// head in cycle t+1 (no fall-through).
module prt_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     din,
  input  logic pop,
  output T     head,
  output logic empty,
  output logic full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   wp, rp;

  function automatic logic [PW-1:0] nxt(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= nxt(wp);
      if (pop)  rp <= nxt(rp);
      count <= count + $bits(count)'(push) - $bits(count)'(pop);
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= din;
  end

  assign head  = mem[rp];
  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
