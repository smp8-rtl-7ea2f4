// smp8: the SMP8 processor core, controller plus datapath.
//
// A single-cycle 8-bit accumulator processor in the style of the MIPS
// single-cycle machine: every instruction is fetched, decoded and executed in
// one clock cycle, with no pipeline and no stalls. The instruction memory is
// outside the core: the core drives pc and receives instr in the same cycle.
// The data memory sits inside the datapath. ac is the accumulator, brought
// out for observation, and so is the zero flag (a port this design adds).
// Reset is asynchronous, active high, and clears PC, AC, R and the zero flag.
// Structure and the other ports follow the original design.
module smp8
  import smp8_pkg::*;
#(
  parameter mem_image_t DMEM_INIT = TEST1_DMEM
) (
  input  logic  clk,
  input  logic  reset,
  output addr_t pc,
  input  word_t instr,
  output word_t ac,
  output logic  zero
);

  ctrl_t ctrl;

  smp8_controller u_ctrl (
    .op(opcode_e'(instr[7:4])), .zero, .ctrl
  );

  smp8_datapath #(.DMEM_INIT(DMEM_INIT)) u_dp (
    .clk, .reset, .ctrl, .zero, .pc, .operand(instr[3:0]), .ac
  );

endmodule
