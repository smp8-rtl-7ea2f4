// tb_smp8_imem: reads every address of the instruction ROM, once with the
// default contents (demonstration program 1) and once with an image given
// by the INIT parameter, and compares with the expected words.
module tb_smp8_imem;
  import smp8_pkg::*;

  localparam mem_image_t IMG = '{
    8'h3C, 8'hC3, 8'h01, 8'h80, 8'h7E, 8'hE7, 8'h55, 8'hAA,
    8'h12, 8'h34, 8'h56, 8'h78, 8'h9A, 8'hBC, 8'hDE, 8'hF0
  };
  localparam logic [7:0] PROG1 [16] = '{
    8'h10, 8'hA0, 8'h74, 8'h50, 8'hA0, 8'h30, 8'h80, 8'h22,
    8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00, 8'h00
  };

  addr_t a;
  word_t rd_def, rd_img;
  int checks = 0, failures = 0;

  smp8_imem u_def (.a, .rd(rd_def));
  smp8_imem #(.INIT(IMG)) u_img (.a, .rd(rd_img));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 15; i >= 0; i--) begin
      a = addr_t'(i);
      #1;
      checks += 2;
      if (rd_def !== PROG1[i]) begin
        failures++; $display("FAIL default [%0d] = %02h", i, rd_def);
      end
      if (rd_img !== IMG[i]) begin
        failures++; $display("FAIL image [%0d] = %02h", i, rd_img);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
