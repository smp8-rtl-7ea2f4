// tb_smp8_dmem: checks the data memory: initial contents, asynchronous read
// (a new address is read without a clock edge), writes only at the rising
// edge and only when we is 1, against an array model.
module tb_smp8_dmem;
  import smp8_pkg::*;

  logic clk = 0, we = 0;
  addr_t a = '0;
  word_t wd = '0, rd;
  logic [7:0] model [16];
  int checks = 0, failures = 0;

  smp8_dmem dut (.clk, .a, .we, .wd, .rd);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_rd(input logic [7:0] e, input string what);
    checks++;
    if (rd !== e) begin
      failures++;
      $display("FAIL %s a=%0d rd=%02h expected %02h", what, a, rd, e);
    end
  endtask

  initial begin
    // default image: M[0] = 0x37, the rest 0
    foreach (model[i]) model[i] = (i == 0) ? 8'h37 : 8'h00;
    for (int i = 0; i < 16; i++) begin
      a = addr_t'(i); #1; expect_rd(model[i], "init");
    end
    repeat (400) begin
      @(negedge clk);
      a  = addr_t'($urandom);
      wd = 8'($urandom);
      we = 1'($urandom);
      #1; expect_rd(model[a], "read before edge");
      @(posedge clk); #1;
      if (we) model[a] = wd;
      expect_rd(model[a], "read after edge");
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 16; i++) begin
      a = addr_t'(i); #1; expect_rd(model[i], "final");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
