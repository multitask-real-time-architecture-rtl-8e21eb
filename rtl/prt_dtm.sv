// prt_dtm: Data Temporary Memory.
//
// Local memory in which IO packets wait until the memory unit grants them main
// memory. The paper names it and says the IO queue is copied into it; the
// organisation is this design's own: one entry per thread ID (a thread has at
// most one IO outstanding, so the memory can never overflow), each with a valid
// bit and the cycle the packet arrived. The key and stamp of every entry are
// brought out so the memory unit can choose among all waiting packets.
//
// Timing: a packet written in cycle t is valid from t+1. rd_pkt is the entry
// rd_id, combinational. clr removes entry clr_id at the clock edge; a write and
// a clear of the same entry in one cycle is not allowed (assertion).
module prt_dtm
  import prt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  iopkt_t             wpkt,
  input  logic [STAMP_W-1:0] wstamp,
  input  logic               clr,
  input  tid_t               clr_id,
  input  tid_t               rd_id,
  output iopkt_t             rd_pkt,
  output logic [NTHREADS-1:0] valid,
  output key_t               key_o   [NTHREADS],
  output logic [STAMP_W-1:0] stamp_o [NTHREADS]
);
  iopkt_t pkt [NTHREADS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (clr) valid[clr_id] <= 1'b0;
      if (we)  valid[wpkt.id] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (we) begin
      pkt[wpkt.id]     <= wpkt;
      stamp_o[wpkt.id] <= wstamp;
    end
  end

  always_comb
    for (int i = 0; i < NTHREADS; i++) key_o[i] = pkt[i].key;

  assign rd_pkt = pkt[rd_id];

  a_one_io_per_thread: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> !valid[wpkt.id]);
  a_no_clr_write_clash: assert property (@(posedge clk) disable iff (!rst_n)
    (we && clr) |-> (wpkt.id != clr_id));
endmodule
