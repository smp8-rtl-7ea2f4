// smp8_top: an SMP8 system, the processor core with its instruction memory.
//
// The core fetches from a 16 x 8 instruction ROM (IMEM_INIT) and works on a
// 16 x 8 data RAM (DMEM_INIT) inside the core. By default the memories hold
// the first demonstration program and its data; after reset the program runs
// at one instruction per clock and reaches its closing NOP (address 8) with
// 0x72 in the accumulator after 7 cycles. pc, instr, ac and zero are brought
// out for observation. Pairing core and instruction memory this way follows
// the original system; the ports beyond clk and reset are this design's choice.
module smp8_top
  import smp8_pkg::*;
#(
  parameter mem_image_t IMEM_INIT = TEST1_IMEM,
  parameter mem_image_t DMEM_INIT = TEST1_DMEM
) (
  input  logic       clk,
  input  logic       reset,
  output logic [3:0] pc,
  output logic [7:0] instr,
  output logic [7:0] ac,
  output logic       zero
);

  smp8_imem #(.INIT(IMEM_INIT)) u_imem (
    .a(pc), .rd(instr)
  );

  smp8 #(.DMEM_INIT(DMEM_INIT)) u_smp8 (
    .clk, .reset, .pc, .instr, .ac, .zero
  );

endmodule
