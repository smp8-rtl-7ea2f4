// smp8_adder: WIDTH-bit adder, y = a + b, carry discarded.
// Combinational. SMP8 uses it with b = 1 as the program-counter incrementer,
// so a 4-bit PC wraps from 15 to 0.
module smp8_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y
);

  assign y = a + b;

endmodule
