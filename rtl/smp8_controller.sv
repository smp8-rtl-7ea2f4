// smp8_controller: combinational control unit of SMP8.
//
// Decodes the opcode (instr[7:4]) and the registered zero flag into the
// nine-bit control word {nop, load, store, mva, mvr, jump, alu}. The table is
// the original design's control-word table:
//   * nop is set for NOP, STAC and the three jumps: the accumulator keeps its
//     value on those instructions.
//   * jump is 1 for JUMP, Z for JMPZ and !Z for JPNZ.
//   * instructions that do not use the ALU result select AND (3'b100), except
//     the jumps, which select ADD (3'b000).
// The ALU still runs on every instruction and the zero flag is updated from
// its result every cycle, so the ALU field of non-arithmetic instructions is
// visible through the flag.
module smp8_controller
  import smp8_pkg::*;
(
  input  opcode_e op,
  input  logic    zero,
  output ctrl_t   ctrl
);

  always_comb begin
    // nop load store mva mvr jump alu
    ctrl = '{nop: 1'b0, load: 1'b0, store: 1'b0, mva: 1'b0, mvr: 1'b0,
             jump: 1'b0, alu: ALU_AND};
    unique case (op)
      OP_NOP:  ctrl.nop = 1'b1;
      OP_LDAC: ctrl.load = 1'b1;
      OP_STAC: begin ctrl.nop = 1'b1; ctrl.store = 1'b1; end
      OP_MVAC: ctrl.mva = 1'b1;
      OP_MOVR: ctrl.mvr = 1'b1;
      OP_JUMP: begin ctrl.nop = 1'b1; ctrl.jump = 1'b1;  ctrl.alu = ALU_ADD; end
      OP_JMPZ: begin ctrl.nop = 1'b1; ctrl.jump = zero;  ctrl.alu = ALU_ADD; end
      OP_JPNZ: begin ctrl.nop = 1'b1; ctrl.jump = ~zero; ctrl.alu = ALU_ADD; end
      OP_ADD:  ctrl.alu = ALU_ADD;
      OP_SUB:  ctrl.alu = ALU_SUB;
      OP_INAC: ctrl.alu = ALU_INC;
      OP_CLAC: ctrl.alu = ALU_CLR;
      OP_AND:  ctrl.alu = ALU_AND;
      OP_OR:   ctrl.alu = ALU_OR;
      OP_XOR:  ctrl.alu = ALU_XOR;
      OP_NOT:  ctrl.alu = ALU_NOT;
      default: ;
    endcase
  end

endmodule
