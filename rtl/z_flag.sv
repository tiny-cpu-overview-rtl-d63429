// z_flag: zero flag of the Tiny CPU.
//
// Z is fed from the Add/Sub output. When zl is high (it is driven by the
// accumulator load accl) the flag takes 1 if the result is zero and 0
// otherwise, at the rising clock edge, so it always describes the last
// value the Add/Sub unit wrote into ACC. JNZ jumps when Z is 0. That Z loads
// together with ACC, that CLA leaves it unchanged and that reset clears it
// are this design's own reading; the source only shows Z fed by Add/Sub.
module z_flag #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         zl,
  input  logic [W-1:0] d,
  output logic         z
);

  always_ff @(posedge clk) begin
    if (rst)     z <= 1'b0;
    else if (zl) z <= (d == '0);
  end

endmodule
