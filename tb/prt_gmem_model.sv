// prt_gmem_model: behavioural model of the global (main) memory, for
// testbenches only. The platform treats main memory as an external device; this
// model answers every request after LAT cycles with one response beat (read
// data for a read, an acknowledge for a write). It accepts one request at a
// time. Word-addressed, WORDS words, initialised to addr*3+1 at time zero.
// While rst_n is low it drops any pending request, so a request seen before
// the platform has left reset cannot block it afterwards.
module prt_gmem_model #(
  parameter int unsigned LAT   = 20,
  parameter int unsigned WORDS = 1024
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [31:0] req_addr,
  input  logic [31:0] req_wdata,
  output logic        rsp_valid,
  output logic [31:0] rsp_rdata,
  input  logic        rsp_ready,
  output int          n_reads,
  output int          n_writes
);
  logic [31:0] mem [WORDS];
  int busy_cnt = 0;
  logic pending = 0;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = 32'(i * 3 + 1);
    n_reads = 0;
    n_writes = 0;
    rsp_valid = 0;
    rsp_rdata = 0;
  end

  assign req_ready = !pending;

  always @(posedge clk) begin
    if (!rst_n) begin
      pending   <= 0;
      rsp_valid <= 0;
    end else if (req_valid && req_ready) begin
      pending  <= 1;
      busy_cnt <= LAT;
      if (req_we) begin
        mem[req_addr % WORDS] <= req_wdata;
        n_writes <= n_writes + 1;
      end else begin
        rsp_rdata <= mem[req_addr % WORDS];
        n_reads <= n_reads + 1;
      end
    end else if (pending && !rsp_valid) begin
      if (busy_cnt <= 1) rsp_valid <= 1;
      else busy_cnt <= busy_cnt - 1;
    end else if (rsp_valid && rsp_ready) begin
      rsp_valid <= 0;
      pending   <= 0;
    end
  end

  function automatic logic [31:0] peek(int a);
    return mem[a % WORDS];
  endfunction

  function automatic void poke(int a, logic [31:0] v);
    mem[a % WORDS] = v;
  endfunction
endmodule
