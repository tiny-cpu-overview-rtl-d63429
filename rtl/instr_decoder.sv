// instr_decoder: instruction decoder of the Tiny CPU.
//
// Combinational decode of the opcode field IR[7:5] into the five
// instructions: 001 ADD, 010 STR, 011 CLA, 101 JNZ, 111 RST. The other
// three codes (000, 100, 110) are not instructions; they decode to OP_NOP
// with valid low, and the controller then treats them as one-byte
// instructions that do nothing. The opcode values are the instruction
// set's; the no-op treatment is this design's own choice.
module instr_decoder
  import tiny_pkg::*;
(
  input  logic [2:0] opcode,
  output op_e        op,
  output logic       valid
);

  always_comb begin
    valid = 1'b1;
    case (opcode)
      OPC_ADD: op = OP_ADD;
      OPC_STR: op = OP_STR;
      OPC_CLA: op = OP_CLA;
      OPC_JNZ: op = OP_JNZ;
      OPC_RST: op = OP_RST;
      default: begin
        op    = OP_NOP;
        valid = 1'b0;
      end
    endcase
  end

endmodule
