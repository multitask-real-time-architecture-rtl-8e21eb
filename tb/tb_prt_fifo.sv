// tb_prt_fifo: self-checking test of the thread-controller queue.
// Random pushes and pops (never into a full or out of an empty queue) are
// compared with a SystemVerilog queue model: head, count, empty and full are
// checked every cycle, and filling the queue must report full after exactly
// DEPTH (ten) pushes.
module tb_prt_fifo;
  localparam int DEPTH = 10;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [7:0] din = 0, head;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [7:0] model[$];

  prt_fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count === 0, "reset state");
    // fill completely
    for (int i = 0; i < DEPTH; i++) begin
      push = 1; din = 8'(i * 7 + 3);
      @(posedge clk); model.push_back(din); @(negedge clk);
    end
    push = 0;
    check(full && count === DEPTH, "full after ten pushes");
    check(head === 8'd3, "head after fill");
    // random traffic
    for (int n = 0; n < 3000; n++) begin
      push = ($urandom_range(0, 1) == 1) && (model.size() < DEPTH);
      pop  = ($urandom_range(0, 1) == 1) && (model.size() > 0);
      din  = 8'($urandom);
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(din);
      @(negedge clk);
      check(count === model.size(), "count");
      check(empty === (model.size() === 0), "empty");
      check(full === (model.size() === DEPTH), "full");
      if (model.size() > 0) check(head === model[0], "head");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
