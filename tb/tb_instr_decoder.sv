// tb_instr_decoder: self-checking test of the instruction decoder.
// All eight opcode values are applied and compared with the opcode table
// (001 ADD, 010 STR, 011 CLA, 101 JNZ, 111 RST, others invalid).
module tb_instr_decoder;
  import tiny_pkg::*;
  logic [2:0] opcode;
  op_e op;
  logic valid;
  int checks = 0, failures = 0;
  op_e  exp_op [8];
  logic exp_v  [8];

  instr_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_op = '{OP_NOP, OP_ADD, OP_STR, OP_CLA, OP_NOP, OP_JNZ, OP_NOP, OP_RST};
    exp_v  = '{0, 1, 1, 1, 0, 1, 0, 1};
    for (int i = 0; i < 8; i++) begin
      opcode = 3'(i); #1;
      checks++;
      if (op !== exp_op[i] || valid !== exp_v[i]) begin
        failures++;
        $display("opcode %b: op=%0d valid=%b expected %0d %b", opcode, op, valid, exp_op[i], exp_v[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
