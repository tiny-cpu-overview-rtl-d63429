// tiny_mem: memory of the Tiny CPU.
//
// DEPTH words of W bits (256 x 8 by default, the full 8-bit address space).
// Writes are synchronous: with we high, mem[addr] takes wdata at the rising
// clock edge. Reads are asynchronous: rdata always shows mem[addr] for the
// current address, so the CPU can present an address (MAR) in one cycle and
// capture the data into MDR in the next without a read strobe; the CPU's
// MEM_RD output therefore needs no input here. Write-synchronous /
// read-asynchronous timing follows the memory access description; initial
// contents are undefined and loaded by the user (a testbench writes the
// array directly).
module tiny_mem #(
  parameter int unsigned W     = 8,
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [W-1:0]             wdata,
  output logic [W-1:0]             rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
  end

  always_comb rdata = mem[addr];

endmodule
