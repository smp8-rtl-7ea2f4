// tb_smp8_top: end-to-end runs of the SMP8 system.
//   * System A holds the second demonstration program (clear, increment,
//     copy to R, NOT, XOR, JMPZ not taken, store to M[4]): AC must end at
//     0xFF after 7 instructions and the instruction at 6 must have written M[4].
//   * System B holds a program written to reach what the two demonstration
//     programs do not: JUMP, a taken JMPZ, a JPNZ not taken, MOVR, SUB, AND,
//     OR, a load after a store, and the PC wrapping from 15 to 0.
// Both are compared every cycle with the instruction-level reference model;
// program 2 is also checked against its recorded trace of PC, AC and zero
// flag (the flag is set after CLAC and again after the JMPZ, which computes
// FF + 01 = 00).
// The testbench counts each mechanism as it happens (taken and not-taken
// conditional jumps, unconditional jump, load, store, MVAC bypass, MOVR,
// accumulator hold on NOP-class instructions, each ALU function, PC wrap)
// and counts a failure for any that never happens.
module tb_smp8_top;
  import smp8_pkg::*;
  import smp8_ref_pkg::*;

  // System B: data M[0] = 0x0F, M[1] = 0x3C.
  localparam mem_image_t PROG_B = '{
    8'h11,  // 0: LDAC 1   AC = 3C
    8'h30,  // 1: MVAC     R = 3C
    8'h10,  // 2: LDAC 0   AC = 0F
    8'hD0,  // 3: OR       AC = 3F
    8'hC0,  // 4: AND      AC = 3C
    8'h90,  // 5: SUB      AC = 00, Z = 1
    8'h69,  // 6: JMPZ 9   taken
    8'hA0,  // 7: INAC     skipped
    8'hA0,  // 8: INAC     skipped
    8'h40,  // 9: MOVR     AC = 3C, Z = (00 & 3C == 0) = 1
    8'h7F,  // A: JPNZ F   not taken
    8'h23,  // B: STAC 3   M[3] = 3C
    8'h5E,  // C: JUMP E
    8'hA0,  // D: INAC     skipped
    8'h13,  // E: LDAC 3   AC = 3C
    8'h80   // F: ADD      AC = 78, PC wraps to 0
  };
  localparam mem_image_t DATA_B = '{
    8'h0F, 8'h3C, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00,
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00
  };
  localparam mem_image_t DATA_A = '{default: 8'h00};

  logic       clk = 0, reset = 1;
  logic [3:0] pc_a, pc_b;
  logic [7:0] instr_a, instr_b, ac_a, ac_b;
  logic       zero_a, zero_b;
  int checks = 0, failures = 0;

  typedef enum int {
    M_JMP_TAKEN, M_JMP_NOT_TAKEN, M_JUMP, M_LOAD, M_STORE, M_MVAC, M_MOVR,
    M_HOLD, M_WRAP, M_ALU_ADD, M_ALU_SUB, M_ALU_INC, M_ALU_CLR, M_ALU_AND,
    M_ALU_OR, M_ALU_XOR, M_ALU_NOT, M_COUNT
  } mech_e;
  int seen [M_COUNT];

  smp8_top #(.IMEM_INIT(TEST2_IMEM), .DMEM_INIT(DATA_A)) sys_a (
    .clk, .reset, .pc(pc_a), .instr(instr_a), .ac(ac_a), .zero(zero_a));
  smp8_top #(.IMEM_INIT(PROG_B), .DMEM_INIT(DATA_B)) sys_b (
    .clk, .reset, .pc(pc_b), .instr(instr_b), .ac(ac_b), .zero(zero_b));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void count(state_t s, logic [7:0] in);
    logic [3:0] op;
    op = in[7:4];
    case (op)
      4'h0, 4'h2: seen[M_HOLD]++;
      4'h1: seen[M_LOAD]++;
      4'h3: seen[M_MVAC]++;
      4'h4: seen[M_MOVR]++;
      4'h5: seen[M_JUMP]++;
      4'h6, 4'h7: if ((op == 4'h6) == s.z) seen[M_JMP_TAKEN]++; else seen[M_JMP_NOT_TAKEN]++;
      4'h8: seen[M_ALU_ADD]++;
      4'h9: seen[M_ALU_SUB]++;
      4'hA: seen[M_ALU_INC]++;
      4'hB: seen[M_ALU_CLR]++;
      4'hC: seen[M_ALU_AND]++;
      4'hD: seen[M_ALU_OR]++;
      4'hE: seen[M_ALU_XOR]++;
      default: seen[M_ALU_NOT]++;
    endcase
    if (op == 4'h2) seen[M_STORE]++;
  endfunction

  task automatic compare(string name, state_t s, logic [3:0] pc, logic [7:0] instr, logic [7:0] ac, logic z);
    checks++;
    if (pc !== s.pc || ac !== s.ac || z !== s.z) begin
      failures++;
      $display("FAIL %s pc=%0d/%0d instr=%02h ac=%02h/%02h z=%0b/%0b",
               name, pc, s.pc, instr, ac, s.ac, z, s.z);
    end
  endtask

  initial begin
    state_t sa, sb;
    logic [3:0] prev_pc;
    // program 2 as recorded for the original design, cycles 0..7
    static logic [3:0] p2_pc [8] = '{0, 1, 2, 3, 4, 5, 6, 7};
    static logic [7:0] p2_ac [8] = '{8'h00, 8'h00, 8'h01, 8'h01, 8'hFE, 8'hFF, 8'hFF, 8'hFF};
    static logic       p2_z  [8] = '{0, 1, 0, 0, 0, 0, 1, 0};
    sa.pc = 0; sa.ac = 0; sa.r = 0; sa.z = 0; sa.mem = DATA_A;
    sb.pc = 0; sb.ac = 0; sb.r = 0; sb.z = 0; sb.mem = DATA_B;
    @(negedge clk); @(negedge clk);
    reset = 0;
    for (int c = 0; c < 40; c++) begin
      #1;
      compare("A", sa, pc_a, instr_a, ac_a, zero_a);
      compare("B", sb, pc_b, instr_b, ac_b, zero_b);
      if (c < 8) begin
        checks++;
        if (pc_a !== p2_pc[c] || ac_a !== p2_ac[c] || zero_a !== p2_z[c]) begin
          failures++;
          $display("FAIL program 2 cycle %0d pc=%0d ac=%02h z=%0b expected %0d %02h %0b",
                   c, pc_a, ac_a, zero_a, p2_pc[c], p2_ac[c], p2_z[c]);
        end
      end
      // program 2 ends at its NOP (address 7) with AC = FF after 7 instructions
      if (c == 7) begin
        checks++;
        if (pc_a !== 4'd7 || ac_a !== 8'hFF) begin
          failures++; $display("FAIL program 2 end: pc=%0d AC=%02h", pc_a, ac_a);
        end
        $display("program 2: AC=%02h at cycle %0d", ac_a, c);
      end
      if (c < 7) count(sa, TEST2_IMEM[sa.pc]);
      count(sb, PROG_B[sb.pc]);
      prev_pc = sb.pc;
      step(sa, TEST2_IMEM[sa.pc]);
      step(sb, PROG_B[sb.pc]);
      if (prev_pc == 4'hF && sb.pc == 4'h0) seen[M_WRAP]++;
      @(negedge clk);
    end
    // stores reached memory: the model agrees with the array in each system
    for (int i = 0; i < 16; i++) begin
      checks += 2;
      if (sys_a.u_smp8.u_dp.u_dmem.mem[i] !== sa.mem[i]) begin
        failures++; $display("FAIL A M[%0d]", i);
      end
      if (sys_b.u_smp8.u_dp.u_dmem.mem[i] !== sb.mem[i]) begin
        failures++; $display("FAIL B M[%0d]", i);
      end
    end
    checks += 2;
    if (sa.mem[4] !== 8'hFF) begin failures++; $display("FAIL program 2 M[4]"); end
    if (sb.mem[3] !== 8'h3C) begin failures++; $display("FAIL program B M[3]"); end
    for (int m = 0; m < M_COUNT; m++) begin
      checks++;
      $display("%-16s %0d", mech_e'(m), seen[m]);
      if (seen[m] == 0) begin
        failures++; $display("FAIL mechanism %s never happened", mech_e'(m));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
