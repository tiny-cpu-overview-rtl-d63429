// acc_reg: accumulator of the Tiny CPU.
//
// ACC takes the Add/Sub result at the rising clock edge when accl is high
// (ADD state S8, "ACC <- ACC + MDR") and clears to 00 when cla is high (CLA
// state S4); the cleared value is visible from the clock edge that ends S4.
// Its output feeds the Add/Sub unit and MDR's mdo input. cla wins if both
// are raised (the controller never does); that priority and the synchronous
// active-high reset to 0 are this design's own choices.
module acc_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         accl,
  input  logic         cla,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || cla) q <= '0;
    else if (accl)  q <= d;
  end

endmodule
