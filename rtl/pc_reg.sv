// pc_reg: program counter of the Tiny CPU.
//
// A W-bit register with three control inputs, named as on the datapath
// drawing: pcinc adds one (fetch state S2 and operand fetch S5), pcl loads
// the internal bus, i.e. MDR (JNZ, state S6, when Z is 0), and intrs clears
// it to 00 (RST, state S4). All changes take place at the rising clock edge.
// The controller never raises two of them in the same cycle; should it
// happen, intrs wins over pcl and pcl over pcinc. PC+1 wraps from all-ones
// to zero. The synchronous active-high rst input, which also clears PC, and
// the priority order are this design's own choices.
module pc_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         pcl,
  input  logic         pcinc,
  input  logic         intrs,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk) begin
    if (rst || intrs) q <= '0;
    else if (pcl)     q <= d;
    else if (pcinc)   q <= q + 1'b1;
  end

endmodule
