// tiny_cpu: the Tiny CPU, an 8-bit accumulator processor.
//
// Datapath: PC, MAR (with its PC/bus input mux), MDR, IR, ACC, the Z flag
// and an Add/Sub unit, joined by one internal bus. MDR is the only source of
// that bus; it feeds PC (jump target), IR (opcode), MAR's mux input 0
// (operand address) and the Add/Sub unit, whose other operand is ACC. ACC
// in turn feeds MDR's second input for stores. The instruction decoder turns
// IR[7:5] into an instruction and the controller (control_fsm) steps through
// S1..S8, raising the load/increment/clear controls of each register.
//
// Memory interface: mem_addr is MAR, mem_wdata is MDR, mem_rdata is taken
// into MDR one cycle after MAR was loaded (asynchronous read), mem_wr
// (mem_w) writes at the rising edge that ends STR's state S7, and mem_rd
// marks the cycles in which an address for a read is being loaded into MAR.
// Instructions take 8 (ADD), 7 (STR), 6 (JNZ) or 4 (CLA, RST) clock cycles.
// The datapath follows the block diagram and the register transfers of each
// state; a single synchronous active-high reset, the sub input of Add/Sub
// tied to add and the debug outputs are this design's own choices.
module tiny_cpu
  import tiny_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] mem_rdata,
  output logic [W-1:0] mem_addr,
  output logic [W-1:0] mem_wdata,
  output logic         mem_rd,
  output logic         mem_wr,
  output logic [W-1:0] dbg_pc,
  output logic [W-1:0] dbg_acc,
  output logic         dbg_z,
  output logic [W-1:0] dbg_ir,
  output state_e       dbg_state
);

  ctrl_t        ctrl;
  op_e          op;
  logic [2:0]   opcode;
  logic [W-1:0] pc, mar, mdr, ir, acc, sum;
  logic         z;

  // The internal bus is MDR's output.
  logic [W-1:0] bus;
  always_comb bus = mdr;

  pc_reg #(.W(W)) u_pc (
    .clk, .rst, .pcl(ctrl.pcl), .pcinc(ctrl.pcinc), .intrs(ctrl.intrs),
    .d(bus), .q(pc)
  );

  mar_reg #(.W(W)) u_mar (
    .clk, .rst, .mmx(ctrl.mmx), .mal(ctrl.mal), .pc(pc), .bus(bus), .q(mar)
  );

  mdr_reg #(.W(W)) u_mdr (
    .clk, .rst, .mdil(ctrl.mdil), .mdol(ctrl.mdol),
    .mdi(mem_rdata), .mdo(acc), .q(mdr)
  );

  ir_reg #(.W(W)) u_ir (
    .clk, .rst, .irl(ctrl.irl), .d(bus), .q(ir), .opcode(opcode)
  );

  add_sub #(.W(W)) u_alu (
    .a(acc), .b(bus), .sub(1'b0), .y(sum)
  );

  acc_reg #(.W(W)) u_acc (
    .clk, .rst, .accl(ctrl.accl), .cla(ctrl.cla), .d(sum), .q(acc)
  );

  z_flag #(.W(W)) u_z (
    .clk, .rst, .zl(ctrl.accl), .d(sum), .z(z)
  );

  instr_decoder u_dec (
    .opcode(opcode), .op(op), .valid()
  );

  control_fsm u_ctl (
    .clk, .rst, .op(op), .z(z), .ctrl(ctrl), .state(dbg_state)
  );

  always_comb begin
    mem_addr  = mar;
    mem_wdata = mdr;
    mem_rd    = ctrl.mem_rd;
    mem_wr    = ctrl.mem_w;
    dbg_pc    = pc;
    dbg_acc   = acc;
    dbg_z     = z;
    dbg_ir    = ir;
  end

endmodule
