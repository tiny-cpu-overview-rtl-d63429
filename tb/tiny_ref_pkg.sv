// tiny_ref_pkg: instruction-level reference model of the Tiny CPU, for
// testbenches. It executes one whole instruction per call on its own copy
// of the 256-byte memory and returns the number of clock cycles the
// hardware should take for it. It knows nothing of the RTL's states or
// control signals; it follows only the instruction definitions:
//   001 ADD M: ACC <- ACC + [M], Z <- (ACC == 0)   2 bytes, 8 cycles
//   010 STR M: [M] <- ACC                          2 bytes, 7 cycles
//   011 CLA  : ACC <- 0                            1 byte,  4 cycles
//   101 JNZ M: PC <- M if Z == 0                   2 bytes, 6 cycles
//   111 RST  : PC <- 0                             1 byte,  4 cycles
//   other    : no operation                        1 byte,  4 cycles
package tiny_ref_pkg;

  class tiny_ref;
    logic [7:0] mem [256];
    logic [7:0] pc, acc;
    logic       z;
    // last instruction's kind, for coverage counting
    logic [2:0] last_opc;
    logic       last_taken;
    logic       last_wrote;
    logic [7:0] last_waddr;

    function new();
      pc = 0; acc = 0; z = 0;
      foreach (mem[i]) mem[i] = 0;
    endfunction

    function automatic int step();
      logic [7:0] opbyte, m;
      opbyte = mem[pc]; pc++;
      last_opc = opbyte[7:5];
      last_taken = 0; last_wrote = 0;
      case (opbyte[7:5])
        3'b001: begin m = mem[pc]; pc++; acc = acc + mem[m]; z = (acc == 0); return 8; end
        3'b010: begin m = mem[pc]; pc++; mem[m] = acc; last_wrote = 1; last_waddr = m; return 7; end
        3'b011: begin acc = 0; return 4; end
        3'b101: begin m = mem[pc]; pc++; if (!z) begin pc = m; last_taken = 1; end return 6; end
        3'b111: begin pc = 0; return 4; end
        default: return 4;
      endcase
    endfunction
  endclass

endpackage
