// smp8_mux2: WIDTH-bit two-input multiplexer, y = s ? d1 : d0.
// Combinational. SMP8 uses it to choose the next PC (PC + 1 or jump target),
// the ALU/memory result (load) and the accumulator input (mvr).
module smp8_mux2 #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             s,
  output logic [WIDTH-1:0] y
);

  assign y = s ? d1 : d0;

endmodule
