// tb_prt_dic: self-checking test of the Dynamic Interleave Controller.
// Part 1 (policy 0): threads made ready in a known order must come out in the
// same order (first come first served), ties in one cycle by lower ID.
// Part 2 (policy 1): threads with random keys must come out in ascending key
// order. Part 3: ready_count. Part 4 (mode 1, QUANTUM reduced to 40): cc
// pulses exactly every 40 cycles while a thread waits, and never in mode 0.
module tb_prt_dic;
  import prt_pkg::*;
  localparam int Q = 40;
  logic clk = 0, rst_n = 0;
  logic mode = 0, policy = 0;
  logic rdy_m_valid = 0, rdy_t_valid = 0, fill_req = 0;
  tid_t rdy_m_id = '0, rdy_t_id = '0, fill_id;
  key_t rdy_m_key = '0, rdy_t_key = '0;
  logic fill_valid, cc;
  logic [TID_W:0] ready_count;
  int checks = 0, failures = 0;

  prt_dic #(.QUANTUM(Q)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put(int id, int key);
    rdy_m_valid = 1; rdy_m_id = tid_t'(id); rdy_m_key = key_t'(key);
    @(negedge clk);
    rdy_m_valid = 0;
  endtask

  task automatic take(output int id);
    fill_req = 1; #1;
    check(fill_valid, "fill_valid");
    id = int'(fill_id);
    @(negedge clk);
    fill_req = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [$];
    int got, keys [NTHREADS], prev;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!fill_valid && ready_count === 0, "empty pool");
    // Part 1: FCFS
    policy = 0;
    for (int n = 0; n < 20; n++) begin
      automatic int id;
      do id = $urandom_range(0, 99); while (id inside {order});
      order.push_back(id);
      put(id, $urandom_range(0, 255));
    end
    // two in the same cycle: the lower ID first
    rdy_m_valid = 1; rdy_m_id = 7'd101; rdy_t_valid = 1; rdy_t_id = 7'd100;
    @(negedge clk);
    rdy_m_valid = 0; rdy_t_valid = 0;
    check(ready_count === 22, "ready_count 22");
    foreach (order[i]) begin
      take(got);
      check(got === order[i], $sformatf("fcfs %0d: got %0d exp %0d", i, got, order[i]));
    end
    take(got); check(got === 100, "same-cycle tie, lower ID");
    take(got); check(got === 101, "same-cycle tie, second");
    check(!fill_valid, "empty again");
    // Part 2: key order
    policy = 1;
    for (int i = 0; i < NTHREADS; i += 3) begin
      keys[i] = $urandom_range(0, 255);
      put(i, keys[i]);
    end
    prev = -1;
    for (int i = 0; i < NTHREADS; i += 3) begin
      take(got);
      check(keys[got] >= prev, "ascending key order");
      prev = keys[got];
    end
    check(ready_count === 0, "drained");
    // Part 4: cc
    put(5, 1);
    mode = 1;
    begin
      automatic int first = -1, pulses = 0;
      for (int c = 0; c < 5 * Q; c++) begin
        @(posedge clk); #1;
        if (cc) begin
          if (first >= 0) check((c - first) % Q === 0, "cc period");
          else first = c;
          pulses++;
        end
      end
      check(pulses === 5, $sformatf("five cc pulses, got %0d", pulses));
      mode = 0;
      pulses = 0;
      for (int c = 0; c < 3 * Q; c++) begin @(posedge clk); #1; if (cc) pulses++; end
      check(pulses === 0, "no cc in mode 0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
