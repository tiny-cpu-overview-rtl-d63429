// mdr_reg: memory data register of the Tiny CPU.
//
// MDR has two data inputs: mdi, the memory read data, loaded when mdil is
// high ("MDR <- MEM"), and mdo, the accumulator, loaded when mdol is high
// ("MDR <- ACC", STR state S6). Loads happen at the rising clock edge. The
// output drives the CPU's internal bus (to PC, IR, MAR's mux and the
// Add/Sub unit) and the memory write data. If both loads were raised, mdil
// would win; the controller never does that. The priority and the
// synchronous active-high reset to 0 are this design's own choices.
module mdr_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         mdil,
  input  logic         mdol,
  input  logic [W-1:0] mdi,
  input  logic [W-1:0] mdo,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst)       q <= '0;
    else if (mdil) q <= mdi;
    else if (mdol) q <= mdo;
  end

endmodule
