// tb_smp8_alu: checks the SMP8 ALU against directly computed results for all
// eight functions, on corner operands and on random operands, including the
// zero output.
module tb_smp8_alu;
  import smp8_pkg::*;

  word_t a, b, y;
  alu_op_e sel;
  logic zero;
  int checks = 0, failures = 0;

  smp8_alu dut (.a, .b, .sel, .y, .zero);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] ta, tb_, input logic [2:0] ts);
    logic [7:0] exp;
    a = ta; b = tb_; sel = alu_op_e'(ts);
    #1;
    case (ts)
      3'd0: exp = 8'((int'(ta) + int'(tb_)) % 256);
      3'd1: exp = 8'((int'(ta) - int'(tb_) + 256) % 256);
      3'd2: exp = 8'((int'(ta) + 1) % 256);
      3'd3: exp = 8'h00;
      3'd4: exp = ta & tb_;
      3'd5: exp = ta | tb_;
      3'd6: exp = ta ^ tb_;
      default: exp = 8'hFF - ta;
    endcase
    checks++;
    if (y !== exp || zero !== (exp == 0)) begin
      failures++;
      $display("FAIL sel=%0d a=%02h b=%02h y=%02h zero=%0b expected %02h", ts, ta, tb_, y, zero, exp);
    end
  endtask

  initial begin
    static logic [7:0] corners [6] = '{8'h00, 8'h01, 8'h7F, 8'h80, 8'hFE, 8'hFF};
    for (int s = 0; s < 8; s++) begin
      foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j], 3'(s));
      repeat (200) check(8'($urandom), 8'($urandom), 3'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
