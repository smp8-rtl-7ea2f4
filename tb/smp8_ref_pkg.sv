// smp8_ref_pkg: instruction-level reference model of SMP8 for the testbenches.
//
// step() executes one instruction on an architectural state record
// (PC, AC, R, zero flag, data memory) the way the instruction set defines
// it, without reference to the RTL's control word or datapath structure:
//   - every instruction runs the ALU: NOP, LDAC, STAC, MVAC and MOVR compute
//     AC & R, the jumps compute AC + R, the arithmetic/logic instructions
//     their own function; during MVAC the R operand is already the new R
//     (that is, AC). The zero flag always takes "result == 0".
//   - JMPZ / JPNZ test the flag left by the previous instruction.
package smp8_ref_pkg;

  typedef struct {
    logic [3:0] pc;
    logic [7:0] ac;
    logic [7:0] r;
    logic       z;
    logic [7:0] mem [16];
  } state_t;

  function automatic logic [7:0] alu_of(logic [3:0] op, logic [7:0] a, logic [7:0] b);
    case (op)
      4'h5, 4'h6, 4'h7, 4'h8: return a + b;
      4'h9: return a - b;
      4'hA: return a + 8'd1;
      4'hB: return 8'h00;
      4'hD: return a | b;
      4'hE: return a ^ b;
      4'hF: return ~a;
      default: return a & b;  // 0..4 and C
    endcase
  endfunction

  function automatic void step(ref state_t s, input logic [7:0] instr);
    logic [3:0] op, a;
    logic [7:0] b, res;
    op  = instr[7:4];
    a   = instr[3:0];
    b   = (op == 4'h3) ? s.ac : s.r;
    res = alu_of(op, s.ac, b);
    // program counter
    if (op == 4'h5 || (op == 4'h6 && s.z) || (op == 4'h7 && !s.z)) s.pc = a;
    else s.pc = s.pc + 4'd1;
    // memory and registers (all use the old AC)
    case (op)
      4'h0, 4'h5, 4'h6, 4'h7: ;
      4'h1: s.ac = s.mem[a];
      4'h2: s.mem[a] = s.ac;
      4'h3: s.r = s.ac;
      4'h4: s.ac = s.r;
      default: s.ac = res;
    endcase
    s.z = (res == 8'h00);
  endfunction

endpackage
