// tiny_pkg: types and constants shared by the Tiny CPU.
//
// The Tiny CPU is an 8-bit accumulator machine with five instructions. An
// instruction is one opcode byte, whose bits 7:5 select the operation, and
// for ADD, STR and JNZ a second byte holding the operand address M:
//   ADD M : ACC <- ACC + [M]       opcode 001   8 clock cycles
//   STR M : [M] <- ACC             opcode 010   7 clock cycles
//   CLA   : ACC <- 0               opcode 011   4 clock cycles
//   JNZ M : PC  <- M if Z = 0      opcode 101   6 clock cycles
//   RST   : PC  <- 0               opcode 111   4 clock cycles
// The opcode values, the instruction lengths and the per-state control
// signals follow the instruction description; the numeric encoding of the
// controller states, the decoded-instruction enum and the handling of the
// three unused opcodes (000, 100, 110, treated as one-byte no-ops
// that spend S4 idle) are this
// design's own choices.
package tiny_pkg;

  // Opcode field IR[7:5].
  localparam logic [2:0] OPC_ADD = 3'b001;
  localparam logic [2:0] OPC_STR = 3'b010;
  localparam logic [2:0] OPC_CLA = 3'b011;
  localparam logic [2:0] OPC_JNZ = 3'b101;
  localparam logic [2:0] OPC_RST = 3'b111;

  // Decoded instruction.
  typedef enum logic [2:0] {
    OP_NOP = 3'd0,
    OP_ADD = 3'd1,
    OP_STR = 3'd2,
    OP_CLA = 3'd3,
    OP_JNZ = 3'd4,
    OP_RST = 3'd5
  } op_e;

  // Controller states S1..S8. S1-S3 fetch the opcode byte; S4 onwards
  // depend on the instruction held in IR.
  typedef enum logic [3:0] {
    S1 = 4'd1,
    S2 = 4'd2,
    S3 = 4'd3,
    S4 = 4'd4,
    S5 = 4'd5,
    S6 = 4'd6,
    S7 = 4'd7,
    S8 = 4'd8
  } state_e;

  // Datapath control signals, named as on the datapath drawing.
  typedef struct packed {
    logic mmx;     // MAR input select: 1 = PC, 0 = bus (MDR)
    logic mal;     // MAR load
    logic mem_rd;  // MEM_RD strobe to memory
    logic mdil;    // MDR load from memory (mdi)
    logic mdol;    // MDR load from ACC (mdo)
    logic pcl;     // PC load from bus
    logic pcinc;   // PC increment
    logic intrs;   // PC clear
    logic irl;     // IR load from bus
    logic accl;    // ACC (and Z) load from Add/Sub
    logic cla;     // ACC clear
    logic mem_w;   // MEM_WR strobe to memory
  } ctrl_t;

  localparam ctrl_t CTRL_IDLE = '0;

  // Number of clock cycles (states) each instruction takes, fetch included.
  function automatic int unsigned op_cycles(op_e op);
    case (op)
      OP_ADD:  return 8;
      OP_STR:  return 7;
      OP_JNZ:  return 6;
      OP_CLA:  return 4;
      OP_RST:  return 4;
      default: return 4;
    endcase
  endfunction

endpackage
