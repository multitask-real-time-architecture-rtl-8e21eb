// prt_ior_enc: builds the IO register (IOR) of a load or store.
//
// When a data-transfer instruction reaches the Execute stage the pipeline does
// not perform it; it only records which registers take part and the direction,
// so that the thread controller can later assemble the IO packet from the
// saved register bank. Following Fig. 5 of the paper the IOR holds an unused
// bit, a one-hot field R1..R15 naming the address register, a one-hot field
// R1..R15 naming the data register and an R/W bit. Register R0 has no position
// in either field; this design makes R0 read as zero, so an all-zero field
// selects the value 0 (address 0 for a load/store based on R0, or data 0 for a
// store of R0; a load into R0 is discarded). The bit order and the 1 = read
// encoding are this design's choices.
//
// Purely combinational.
module prt_ior_enc
  import prt_pkg::*;
(
  input  logic  is_load,
  input  logic  is_store,
  input  ridx_t addr_reg,   // rs1 of the instruction
  input  ridx_t data_reg,   // rd of a load, rs2 of a store
  output ior_t  ior
);
  always_comb begin
    ior = '0;
    if (is_load || is_store) begin
      for (int k = 1; k < 16; k++) begin
        ior.addr_sel[k] = (addr_reg == ridx_t'(k));
        ior.data_sel[k] = (data_reg == ridx_t'(k));
      end
      ior.rd = is_load;
    end
  end
endmodule
