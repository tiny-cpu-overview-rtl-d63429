// control_fsm: controller of the Tiny CPU.
//
// A Moore-style state machine over the states S1..S8. Every instruction
// starts with the same three fetch states:
//   S1  MAR <- PC; MEM_RD          (mmx=1, mal, mem_rd)
//   S2  MDR <- MEM; PC <- PC+1     (mdil, pcinc)
//   S3  IR  <- MDR                 (irl)
// IR is loaded at the end of S3, so from S4 on the decoded instruction (op)
// selects the controls:
//   ADD  S4 MAR<-PC;MEM_RD  S5 MDR<-MEM;PC<-PC+1  S6 MAR<-MDR;MEM_RD
//        S7 MDR<-MEM        S8 ACC<-ACC+MDR                  (8 cycles)
//   STR  S4 MAR<-PC;MEM_RD  S5 MDR<-MEM;PC<-PC+1  S6 MAR<-MDR;MDR<-ACC
//        S7 MEM_WR                                           (7 cycles)
//   JNZ  S4 MAR<-PC;MEM_RD  S5 MDR<-MEM;PC<-PC+1
//        S6 if Z=0 PC<-MDR                                   (6 cycles)
//   CLA  S4 ACC<-0                                           (4 cycles)
//   RST  S4 PC<-0                                            (4 cycles)
// After the last state of an instruction the machine returns to S1. The
// state sequence and the control signals of each state follow the
// instruction-cycle description; the state encoding, the synchronous
// active-high reset into S1 and the no-op treatment of unused opcodes (S4
// idle, then S1) are this design's own choices. ctrl is a function of the
// state, op and z only; it changes right after each rising clock edge.
module control_fsm
  import tiny_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  op_e    op,
  input  logic   z,
  output ctrl_t  ctrl,
  output state_e state
);

  state_e next;

  // Last state of each instruction.
  function automatic state_e last_state(op_e o);
    case (o)
      OP_ADD:  return S8;
      OP_STR:  return S7;
      OP_JNZ:  return S6;
      default: return S4;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) state <= S1;
    else     state <= next;
  end

  always_comb begin
    if (state == S1 || state == S2 || state == S3) next = state_e'(state + 4'd1);
    else if (state == last_state(op))              next = S1;
    else                                           next = state_e'(state + 4'd1);
  end

  always_comb begin
    ctrl = CTRL_IDLE;
    unique case (state)
      S1: begin ctrl.mmx = 1'b1; ctrl.mal = 1'b1; ctrl.mem_rd = 1'b1; end
      S2: begin ctrl.mdil = 1'b1; ctrl.pcinc = 1'b1; end
      S3: begin ctrl.irl = 1'b1; end
      S4: begin
        case (op)
          OP_ADD, OP_STR, OP_JNZ: begin
            ctrl.mmx = 1'b1; ctrl.mal = 1'b1; ctrl.mem_rd = 1'b1;
          end
          OP_CLA:  ctrl.cla   = 1'b1;
          OP_RST:  ctrl.intrs = 1'b1;
          default: ;
        endcase
      end
      S5: begin ctrl.mdil = 1'b1; ctrl.pcinc = 1'b1; end
      S6: begin
        case (op)
          OP_ADD:  begin ctrl.mmx = 1'b0; ctrl.mal = 1'b1; ctrl.mem_rd = 1'b1; end
          OP_STR:  begin ctrl.mmx = 1'b0; ctrl.mal = 1'b1; ctrl.mdol = 1'b1; end
          OP_JNZ:  ctrl.pcl = !z;
          default: ;
        endcase
      end
      S7: begin
        if (op == OP_ADD) ctrl.mdil  = 1'b1;
        else              ctrl.mem_w = 1'b1;
      end
      S8: ctrl.accl = 1'b1;
      default: ;
    endcase
  end

  // At most one source may change PC, MDR or ACC in a cycle, and the memory
  // is never read and written in the same cycle.
  a_pc_onehot:  assert property (@(posedge clk) disable iff (rst)
                  $onehot0({ctrl.pcl, ctrl.pcinc, ctrl.intrs}));
  a_mdr_onehot: assert property (@(posedge clk) disable iff (rst)
                  !(ctrl.mdil && ctrl.mdol));
  a_acc_onehot: assert property (@(posedge clk) disable iff (rst)
                  !(ctrl.accl && ctrl.cla));
  a_rd_wr:      assert property (@(posedge clk) disable iff (rst)
                  !(ctrl.mem_rd && ctrl.mem_w));

endmodule
