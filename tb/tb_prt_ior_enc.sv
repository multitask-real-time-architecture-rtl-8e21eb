// tb_prt_ior_enc: self-checking test of the IO register encoder.
// For every address/data register pair and each of load, store and neither,
// the IOR is compared with the expected word built independently by setting
// bit (31 - a) for address register Ra, bit (16 - d) for data register Rd and
// bit 0 for a read; R0 sets no bit.
module tb_prt_ior_enc;
  import prt_pkg::*;
  logic  is_load, is_store;
  ridx_t addr_reg, data_reg;
  ior_t  ior;
  int checks = 0, failures = 0;

  prt_ior_enc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp;
    for (int mode = 0; mode < 3; mode++)
      for (int a = 0; a < 16; a++)
        for (int d = 0; d < 16; d++) begin
          is_load  = (mode == 0);
          is_store = (mode == 1);
          addr_reg = ridx_t'(a);
          data_reg = ridx_t'(d);
          #1;
          exp = '0;
          if (mode != 2) begin
            if (a != 0) exp[31 - a] = 1'b1;
            if (d != 0) exp[16 - d] = 1'b1;
            exp[0] = (mode == 0);
          end
          checks++;
          if (32'(ior) !== exp) begin
            failures++;
            $display("FAIL mode=%0d a=%0d d=%0d got %h exp %h", mode, a, d, ior, exp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
