// smp8_dmem: 16 x 8 data memory, asynchronous read, synchronous write.
//
// rd = mem[a] combinationally (LDAC reads it in the same cycle); when we is 1
// mem[a] takes wd at the rising clock edge (STAC). Size, read and write timing
// follow the original design. The memory is not cleared by reset; it starts
// from the INIT parameter (index 0 first), whose default holds the data of
// demonstration program 1 (M[0] = 0x37).
module smp8_dmem
  import smp8_pkg::*;
#(
  parameter mem_image_t INIT = TEST1_DMEM
) (
  input  logic  clk,
  input  addr_t a,
  input  logic  we,
  input  word_t wd,
  output word_t rd
);

  word_t mem [DEPTH];

  initial begin
    for (int i = 0; i < DEPTH; i++) mem[i] = INIT[i];
  end

  always_ff @(posedge clk) begin
    if (we) mem[a] <= wd;
  end

  assign rd = mem[a];

endmodule
