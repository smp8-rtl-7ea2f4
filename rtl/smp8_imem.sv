// smp8_imem: 16 x 8 instruction memory, read-only, asynchronous read.
//
// rd = contents[a] combinationally, so the instruction for the current PC is
// available in the same cycle, as a single-cycle processor needs. The size is
// the original design's. The contents come from the INIT parameter (index 0
// first) rather than from a file; the default is demonstration program 1.
module smp8_imem
  import smp8_pkg::*;
#(
  parameter mem_image_t INIT = TEST1_IMEM
) (
  input  addr_t a,
  output word_t rd
);

  word_t rom [DEPTH];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) rom[i] = INIT[i];
  end

  assign rd = rom[a];

endmodule
