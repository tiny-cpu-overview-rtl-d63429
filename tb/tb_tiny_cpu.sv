// tb_tiny_cpu: self-checking test of the Tiny CPU against the instruction-
// level reference model. The CPU runs on a testbench memory (synchronous
// write, asynchronous read). Several random programs are run, each filling
// all 256 bytes with a mix of the five instructions, unused opcodes and
// random operands, after a short fixed start that clears
// ACC, sets Z, runs a JNZ that is not taken, clears Z and stores; self-modifying stores and jumps anywhere are allowed.
// At every return to state S1 (an instruction boundary) PC, ACC and Z are
// compared with the model, the cycle count of the finished instruction is
// compared with the model's (ADD 8, STR 7, JNZ 6, CLA 4, RST 4), and each
// store is compared byte for byte. Every instruction, a taken and a not
// taken JNZ, and Z both set and clear must occur at least once.
module tb_tiny_cpu;
  import tiny_pkg::*;
  import tiny_ref_pkg::*;

  logic clk = 0, rst = 1;
  logic [7:0] mem_rdata, mem_addr, mem_wdata, dbg_pc, dbg_acc, dbg_ir;
  logic mem_rd, mem_wr, dbg_z;
  state_e dbg_state;
  logic [7:0] mem [256];
  int checks = 0, failures = 0;
  int n_op [8];
  int n_taken = 0, n_not_taken = 0, n_zset = 0, n_zclr = 0;

  tiny_cpu #(.W(8)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (mem_wr) mem[mem_addr] <= mem_wdata;
  always_comb mem_rdata = mem[mem_addr];

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("t=%0t %s: got %h expected %h", $time, what, got, exp);
    end
  endtask

  function automatic logic [7:0] rand_byte(int k);
    logic [2:0] opc;
    if (k % 2 != 0) return 8'($urandom);
    case ($urandom_range(0, 7))
      0, 1:    opc = 3'b001;   // ADD
      2:       opc = 3'b010;   // STR
      3:       opc = 3'b011;   // CLA
      4, 5:    opc = 3'b101;   // JNZ
      6:       opc = 3'b111;   // RST
      default: opc = 3'($urandom_range(0, 2)) << 2; // 000 or 100 (unused); 110 below
    endcase
    if (opc == 3'b000 && $urandom_range(0, 1) == 1) opc = 3'b110;
    return {opc, 5'($urandom)};
  endfunction

  initial begin
    tiny_ref ref_m;
    for (int prog = 0; prog < 6; prog++) begin
      ref_m = new();
      for (int a = 0; a < 256; a++) mem[a] = rand_byte(a);
      // directed start: CLA; ADD [FE] with [FE] = 0 (sets Z); JNZ (not
      // taken); ADD [FD] with [FD] = 1 (clears Z); STR to 10..F0
      mem[0] = 8'h60; mem[1] = 8'h20; mem[2] = 8'hFE; mem[3] = 8'hA0;
      mem[5] = 8'h20; mem[6] = 8'hFD; mem[7] = 8'h40; mem[8] = 8'($urandom_range(16, 240));
      mem[253] = 8'h01; mem[254] = 8'h00;
      for (int a = 0; a < 256; a++) ref_m.mem[a] = mem[a];
      rst = 1;
      @(posedge clk); @(posedge clk); #1 rst = 0;
      for (int n = 0; n < 1500; n++) begin
        automatic int cyc = 0;
        automatic int exp_cyc;
        // now at the start of S1 of an instruction
        expect_eq(int'(dbg_state), int'(S1), "state at boundary");
        expect_eq(dbg_pc, ref_m.pc, "PC");
        expect_eq(dbg_acc, ref_m.acc, "ACC");
        expect_eq(dbg_z, ref_m.z, "Z");
        exp_cyc = ref_m.step();
        do begin
          @(posedge clk); #1; cyc++;
        end while (dbg_state != S1 && cyc < 20);
        expect_eq(cyc, exp_cyc, "cycle count");
        n_op[ref_m.last_opc]++;
        if (ref_m.last_opc == 3'b101) begin
          if (ref_m.last_taken) n_taken++; else n_not_taken++;
        end
        if (ref_m.last_opc == 3'b001) begin
          if (ref_m.z) n_zset++; else n_zclr++;
        end
        if (ref_m.last_wrote)
          expect_eq(mem[ref_m.last_waddr], ref_m.mem[ref_m.last_waddr], "stored byte");
      end
      for (int a = 0; a < 256; a++) expect_eq(mem[a], ref_m.mem[a], "final memory");
    end
    $display("ADD %0d STR %0d CLA %0d JNZ %0d RST %0d NOP %0d taken %0d not-taken %0d Zset %0d Zclr %0d",
             n_op[1], n_op[2], n_op[3], n_op[5], n_op[7], n_op[0] + n_op[4] + n_op[6],
             n_taken, n_not_taken, n_zset, n_zclr);
    expect_eq(n_op[1] > 0, 1, "ADD seen");
    expect_eq(n_op[2] > 0, 1, "STR seen");
    expect_eq(n_op[3] > 0, 1, "CLA seen");
    expect_eq(n_op[5] > 0, 1, "JNZ seen");
    expect_eq(n_op[7] > 0, 1, "RST seen");
    expect_eq(n_taken > 0, 1, "JNZ taken seen");
    expect_eq(n_not_taken > 0, 1, "JNZ not taken seen");
    expect_eq(n_zset > 0, 1, "Z set seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
