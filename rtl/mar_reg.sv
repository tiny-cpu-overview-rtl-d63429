// mar_reg: memory address register of the Tiny CPU, with its input mux.
//
// The mux in front of MAR is steered by mmx: input 1 is the program counter
// (instruction and operand fetch, "MAR <- PC") and input 0 is the internal
// bus, i.e. MDR (operand address of ADD and STR, "MAR <- MDR"). MAR takes
// the mux output at the rising clock edge when mal is high and otherwise
// holds. Its output is the memory address. The mux numbering follows the
// datapath drawing; the synchronous active-high reset to 0 is this design's
// own choice.
module mar_reg #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         mmx,
  input  logic         mal,
  input  logic [W-1:0] pc,
  input  logic [W-1:0] bus,
  output logic [W-1:0] q
);

  logic [W-1:0] mux_out;

  always_comb mux_out = mmx ? pc : bus;

  always_ff @(posedge clk) begin
    if (rst)      q <= '0;
    else if (mal) q <= mux_out;
  end

endmodule
