// add_sub: the Tiny CPU's Add/Sub unit.
//
// Combinational W-bit adder/subtractor: y = a + b when sub is 0 and
// y = a - b (two's complement) when sub is 1, both modulo 2^W; no carry or
// overflow is produced. In the CPU a is the accumulator and b the internal
// bus (MDR). The instruction set has only ADD, so the CPU ties sub to 0;
// subtraction is kept because the unit is an add/subtract unit, with the
// two's complement form being this design's choice.
module add_sub #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         sub,
  output logic [W-1:0] y
);

  // a - b = a + ~b + 1
  always_comb y = a + (sub ? ~b : b) + {{(W-1){1'b0}}, sub};

endmodule
