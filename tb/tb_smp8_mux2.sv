// tb_smp8_mux2: checks y = s ? d1 : d0 on random inputs.
module tb_smp8_mux2;
  logic [7:0] d0, d1, y;
  logic s;
  int checks = 0, failures = 0;

  smp8_mux2 #(.WIDTH(8)) dut (.d0, .d1, .s, .y);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) begin
      d0 = 8'($urandom); d1 = 8'($urandom); s = 1'($urandom);
      #1;
      checks++;
      if (y !== (s ? d1 : d0)) begin
        failures++;
        $display("FAIL s=%0b d0=%02h d1=%02h y=%02h", s, d0, d1, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
