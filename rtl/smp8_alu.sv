// smp8_alu: the SMP8 arithmetic/logic unit.
//
// Combinational. Operand a is the accumulator, operand b is register R (or,
// during MVAC, the accumulator itself; the datapath makes that choice).
// The eight functions and their select codes are the original design's:
// ADD, SUB, INC (a + 1), CLR (result 0), AND, OR, XOR and NOT (~a).
// zero is 1 when the 8-bit result is 0; for CLR it is therefore always 1.
// Carry and overflow are not produced: the instruction set has no use for
// them. Interface: a, b, sel in; y, zero out. No clock.
module smp8_alu
  import smp8_pkg::*;
(
  input  word_t   a,
  input  word_t   b,
  input  alu_op_e sel,
  output word_t   y,
  output logic    zero
);

  always_comb begin
    unique case (sel)
      ALU_ADD: y = a + b;
      ALU_SUB: y = a - b;
      ALU_INC: y = a + word_t'(1);
      ALU_CLR: y = '0;
      ALU_AND: y = a & b;
      ALU_OR:  y = a | b;
      ALU_XOR: y = a ^ b;
      ALU_NOT: y = ~a;
      default: y = '0;
    endcase
  end

  assign zero = (y == '0);

endmodule
