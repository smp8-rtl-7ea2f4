// smp8_flopr: WIDTH-bit register with asynchronous active-high reset to zero
// and a load enable.
//
// q takes d at the rising clock edge when en is 1 and holds otherwise; reset
// clears q at once. The reset behaviour follows the original register; the
// enable is this design's replacement for the original's gated clocks (the
// accumulator was clocked by ~nop & clk and R by the mva strobe), so that the
// whole processor runs from one clock. PC and zero registers tie en to 1.
module smp8_flopr #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             en,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)   q <= '0;
    else if (en) q <= d;
  end

endmodule
