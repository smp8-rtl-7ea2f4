// tb_smp8_controller: checks every opcode, with the zero flag at 0 and at 1,
// against the nine-bit control-word table {nop load store mva mvr jump alu}.
module tb_smp8_controller;
  import smp8_pkg::*;

  opcode_e op;
  logic zero;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  smp8_controller dut (.op, .zero, .ctrl);

  // Control-word table; bit 3 ("J") of the jump column is resolved below.
  localparam logic [8:0] TABLE [16] = '{
    9'b1_0_0_0_0_0_100,  // NOP
    9'b0_1_0_0_0_0_100,  // LDAC
    9'b1_0_1_0_0_0_100,  // STAC
    9'b0_0_0_1_0_0_100,  // MVAC
    9'b0_0_0_0_1_0_100,  // MOVR
    9'b1_0_0_0_0_1_000,  // JUMP
    9'b1_0_0_0_0_0_000,  // JMPZ (jump = Z)
    9'b1_0_0_0_0_0_000,  // JPNZ (jump = !Z)
    9'b0_0_0_0_0_0_000,  // ADD
    9'b0_0_0_0_0_0_001,  // SUB
    9'b0_0_0_0_0_0_010,  // INAC
    9'b0_0_0_0_0_0_011,  // CLAC
    9'b0_0_0_0_0_0_100,  // AND
    9'b0_0_0_0_0_0_101,  // OR
    9'b0_0_0_0_0_0_110,  // XOR
    9'b0_0_0_0_0_0_111   // NOT
  };

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < 16; o++) begin
      for (int z = 0; z < 2; z++) begin
        logic [8:0] exp;
        exp = TABLE[o];
        if (o == 6) exp[3] = (z == 1);
        if (o == 7) exp[3] = (z == 0);
        op = opcode_e'(o);
        zero = z[0];
        #1;
        checks++;
        if (9'(ctrl) !== exp) begin
          failures++;
          $display("FAIL op=%h zero=%0d ctrl=%b expected %b", o, z, 9'(ctrl), exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
