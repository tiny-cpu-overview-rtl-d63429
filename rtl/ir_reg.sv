// ir_reg: instruction register of the Tiny CPU.
//
// IR takes the internal bus (MDR, holding the fetched opcode byte) at the
// rising clock edge when irl is high (fetch state S3, "IR <- MDR") and
// holds it for the rest of the instruction. Bits 7:5 are the opcode and are
// brought out separately for the instruction decoder. The synchronous
// active-high reset to 0 is this design's own choice.
module ir_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         irl,
  input  logic [W-1:0] d,
  output logic [W-1:0] q,
  output logic [2:0]   opcode
);

  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (irl) q <= d;
  end

  always_comb opcode = q[W-1 -: 3];

endmodule
