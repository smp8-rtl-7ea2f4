// tb_smp8_adder: checks the 4-bit adder exhaustively, including wrap-around
// (15 + 1 = 0, as the program counter needs).
module tb_smp8_adder;
  logic [3:0] a, b, y;
  int checks = 0, failures = 0;

  smp8_adder #(.WIDTH(4)) dut (.a, .b, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (int'(y) != (i + j) % 16) begin
          failures++;
          $display("FAIL %0d + %0d = %0d", i, j, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
