// tb_smp8_flopr: checks the resettable enabled register: asynchronous reset
// (cleared between clock edges), load on en, hold without en, against a model.
module tb_smp8_flopr;
  localparam int W = 8;
  logic clk = 0, reset = 0, en = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  smp8_flopr #(.WIDTH(W)) dut (.clk, .reset, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(input logic [W-1:0] e);
    checks++;
    if (q !== e) begin
      failures++;
      $display("FAIL t=%0t q=%02h expected %02h", $time, q, e);
    end
  endtask

  initial begin
    // asynchronous reset: takes effect with no clock edge
    @(negedge clk); reset = 1; #1; expect_q('0);
    @(negedge clk); reset = 0;
    model = '0;
    repeat (300) begin
      @(negedge clk);
      en = 1'($urandom);
      d  = W'($urandom);
      @(posedge clk); #1;
      if (en) model = d;
      expect_q(model);
    end
    // reset in mid-cycle clears a non-zero value before the next edge
    @(negedge clk); en = 1; d = 8'hA5;
    @(posedge clk); #2; expect_q(8'hA5);
    reset = 1; #1; expect_q('0);
    reset = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
