// tb_smp8_full: the SMP8 system exactly as built by default, which holds the
// first demonstration program and its data (M[0] = 0x37). After reset it
// checks, cycle by cycle, the PC sequence 0 1 2 4 5 6 7 8 (the JPNZ at 2 is
// taken over the JUMP at 3), the accumulator values 37 38 38 39 39 72 72 72,
// the final AC of 0x72 = 55 + 1 + 1 + 57 with the closing NOP at address 8
// reached after 7 clock cycles (one instruction per cycle, the skipped JUMP
// costing none), and the zero flag, including its value after the
// first instruction.
module tb_smp8_full;
  logic       clk = 0, reset = 1;
  logic [3:0] pc;
  logic [7:0] instr, ac;
  logic       zero;
  int checks = 0, failures = 0;

  smp8_top dut (.clk, .reset, .pc, .instr, .ac, .zero);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // state seen during cycle c (before its clock edge)
    static logic [3:0] exp_pc [10] = '{0, 1, 2, 4, 5, 6, 7, 8, 9, 10};
    static logic [7:0] exp_in [10] = '{8'h10, 8'hA0, 8'h74, 8'hA0, 8'h30, 8'h80, 8'h22, 8'h00, 8'h00, 8'h00};
    static logic [7:0] exp_ac [10] = '{8'h00, 8'h37, 8'h38, 8'h38, 8'h39, 8'h39, 8'h72, 8'h72, 8'h72, 8'h72};
    // flag: 1 after LDAC (AC & R = 0), 0 after INAC, JPNZ (38+0), INAC, MVAC (39&39),
    // ADD (72), STAC (72&39 = 30)
    static logic exp_z [10] = '{0, 1, 0, 0, 0, 0, 0, 0, 0, 0};
    static int cycles_to_result = -1;
    @(negedge clk); @(negedge clk);
    reset = 0;
    for (int c = 0; c < 10; c++) begin
      #1;
      checks++;
      if (pc !== exp_pc[c] || instr !== exp_in[c] || ac !== exp_ac[c] || zero !== exp_z[c]) begin
        failures++;
        $display("FAIL cycle %0d pc=%0d instr=%02h ac=%02h z=%0b expected %0d %02h %02h %0b",
                 c, pc, instr, ac, zero, exp_pc[c], exp_in[c], exp_ac[c], exp_z[c]);
      end
      if (cycles_to_result < 0 && pc == 4'd8) cycles_to_result = c;
      @(negedge clk);
    end
    // program end (the NOP at address 8) is reached after 7 single-cycle instructions
    checks++;
    if (cycles_to_result != 7 || ac !== 8'h72) begin
      failures++;
      $display("FAIL reached address 8 after %0d cycles, AC=%02h", cycles_to_result, ac);
    end
    $display("program 1: AC=%02h after %0d cycles", ac, cycles_to_result);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
