// tiny_top: the Tiny CPU with its memory, and the flip-flop example.
//
// The main design is tiny_cpu connected to a 256 x 8 tiny_mem: MAR drives
// the memory address, MDR the write data, the CPU's mem_wr the write
// enable, and the memory's asynchronous read data goes into MDR. The memory
// bus and the CPU's registers are brought out for observation. A program is
// placed in u_mem.mem before rst is released; after reset the CPU fetches
// from address 00.
//
// Beside it, unconnected to the CPU, stand two master-slave D flip-flops
// built from gated D latches, one triggered by the falling edge of ff_ck and
// one by the rising edge, sharing the input ff_d. The two designs share no
// signal. Bringing both into one top is this design's choice.
module tiny_top
  import tiny_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  output logic         mem_rd,
  output logic         mem_wr,
  output logic [W-1:0] mem_addr,
  output logic [W-1:0] mem_wdata,
  output logic [W-1:0] mem_rdata,
  output logic [W-1:0] dbg_pc,
  output logic [W-1:0] dbg_acc,
  output logic         dbg_z,
  output logic [W-1:0] dbg_ir,
  output state_e       dbg_state,
  input  logic         ff_d,
  input  logic         ff_ck,
  output logic         ff_q_fall,
  output logic         ff_q_rise
);

  tiny_cpu #(.W(W)) u_cpu (
    .clk, .rst, .mem_rdata, .mem_addr, .mem_wdata, .mem_rd, .mem_wr,
    .dbg_pc, .dbg_acc, .dbg_z, .dbg_ir, .dbg_state
  );

  tiny_mem #(.W(W), .DEPTH(2 ** W)) u_mem (
    .clk, .we(mem_wr), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata)
  );

  ms_dff #(.RISING(1'b0)) u_ff_fall (
    .d(ff_d), .ck(ff_ck), .q(ff_q_fall), .qn(), .y()
  );

  ms_dff #(.RISING(1'b1)) u_ff_rise (
    .d(ff_d), .ck(ff_ck), .q(ff_q_rise), .qn(), .y()
  );

endmodule
