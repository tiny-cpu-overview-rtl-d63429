// tb_tiny_top: end-to-end test of the whole design at its default size.
//
// The CPU part runs the counting program below from the 256-byte memory:
//   00  60      CLA         ; ACC <- 0
//   01  20 78   ADD $78     ; ACC <- ACC + [78], [78] = 01
//   03  40 FF   STR $FF     ; [FF] <- ACC
//   05  A0 01   JNZ $01     ; loop while ACC != 0
//   07  E0      RST         ; PC <- 0, start again
//   78  01      ONE: constant 1
// Each pass stores 01, 02, ..., FF, 00 to address FF: 255 taken jumps and
// one that falls through when ACC wraps to 0 and Z is set, then RST
// restarts the program. A pass takes 4 + 256 * (8 + 7 + 6) + 4 = 5384
// cycles. The test runs three passes and checks every stored value, the
// cycles per pass, and, in lock-step at every instruction boundary, PC,
// ACC and Z against the instruction-level reference model. Every mechanism
// (each instruction, taken and not-taken JNZ, memory write, Z set, ACC
// wrap, restart by RST) must occur at least once.
//
// The flip-flop part gets a random d and a slower clock ff_ck; the
// falling-edge output must take d at each falling edge of ff_ck and the
// rising-edge output at each rising edge, and both must hold in between.
module tb_tiny_top;
  import tiny_pkg::*;
  import tiny_ref_pkg::*;

  localparam int PASSES     = 3;
  localparam int PASS_CYCLES = 4 + 256 * (8 + 7 + 6) + 4;

  logic clk = 0, rst = 1;
  logic mem_rd, mem_wr, dbg_z;
  logic [7:0] mem_addr, mem_wdata, mem_rdata, dbg_pc, dbg_acc, dbg_ir;
  state_e dbg_state;
  logic ff_d = 0, ff_ck = 0, ff_q_fall, ff_q_rise;

  int checks = 0, failures = 0;
  int n_op [8];
  int n_taken = 0, n_not_taken = 0, n_writes = 0, n_zset = 0, n_wrap = 0, n_restart = 0;
  int n_ff_fall = 0, n_ff_rise = 0;
  logic [7:0] exp_store = 8'h01;

  tiny_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  // Every store must go to FF with the next count.
  always @(posedge clk) begin
    if (!rst && mem_wr) begin
      expect_eq(mem_addr, 8'hFF, "store address");
      expect_eq(mem_wdata, exp_store, "stored value");
      if (exp_store == 8'h00) n_wrap++;
      exp_store = exp_store + 1;
      n_writes++;
    end
  end

  // CPU: program, reset, lock-step comparison.
  initial begin
    tiny_ref ref_m;
    int cycles_in_pass, pass;
    logic [7:0] prog [256];
    ref_m = new();
    foreach (prog[i]) prog[i] = 8'h00;
    prog[8'h00] = 8'h60;
    prog[8'h01] = 8'h20; prog[8'h02] = 8'h78;
    prog[8'h03] = 8'h40; prog[8'h04] = 8'hFF;
    prog[8'h05] = 8'hA0; prog[8'h06] = 8'h01;
    prog[8'h07] = 8'hE0;
    prog[8'h78] = 8'h01;
    foreach (prog[i]) begin
      dut.u_mem.mem[i] = prog[i];
      ref_m.mem[i] = prog[i];
    end
    @(posedge clk); @(posedge clk); #1 rst = 0;
    pass = 0; cycles_in_pass = 0;
    while (pass < PASSES) begin
      automatic int cyc = 0;
      automatic int exp_cyc;
      expect_eq(int'(dbg_state), int'(S1), "state at boundary");
      expect_eq(dbg_pc, ref_m.pc, "PC");
      expect_eq(dbg_acc, ref_m.acc, "ACC");
      expect_eq(dbg_z, ref_m.z, "Z");
      exp_cyc = ref_m.step();
      do begin
        @(posedge clk); #1; cyc++;
      end while (dbg_state != S1 && cyc < 20);
      expect_eq(cyc, exp_cyc, "instruction cycles");
      cycles_in_pass += cyc;
      n_op[ref_m.last_opc]++;
      if (ref_m.last_opc == 3'b101) begin
        if (ref_m.last_taken) n_taken++; else n_not_taken++;
      end
      if (ref_m.last_opc == 3'b001 && ref_m.z) n_zset++;
      if (ref_m.last_opc == 3'b111) begin
        n_restart++;
        expect_eq(cycles_in_pass, PASS_CYCLES, "cycles per pass");
        expect_eq(dut.u_mem.mem[8'hFF], 8'h00, "last stored value");
        cycles_in_pass = 0;
        pass++;
      end
    end
    $display("ADD %0d STR %0d CLA %0d JNZ %0d RST %0d taken %0d not-taken %0d writes %0d Zset %0d wraps %0d restarts %0d ff falls %0d ff rises %0d",
             n_op[1], n_op[2], n_op[3], n_op[5], n_op[7], n_taken, n_not_taken, n_writes,
             n_zset, n_wrap, n_restart, n_ff_fall, n_ff_rise);
    expect_eq(n_op[1], PASSES * 256, "ADD count");
    expect_eq(n_op[2], PASSES * 256, "STR count");
    expect_eq(n_op[3], PASSES, "CLA count");
    expect_eq(n_op[5], PASSES * 256, "JNZ count");
    expect_eq(n_taken, PASSES * 255, "JNZ taken count");
    expect_eq(n_not_taken, PASSES, "JNZ not taken count");
    expect_eq(n_writes, PASSES * 256, "memory write count");
    expect_eq(n_zset, PASSES, "Z set count");
    expect_eq(n_wrap, PASSES, "ACC wrap count");
    expect_eq(n_restart, PASSES, "RST restart count");
    expect_eq(n_ff_fall > 0, 1, "falling-edge captures seen");
    expect_eq(n_ff_rise > 0, 1, "rising-edge captures seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Flip-flop example: d changes several times per ff_ck phase.
  initial begin
    logic exp_fall, exp_rise;
    repeat (2) begin #37 ff_ck = 1; #37 ff_ck = 0; end
    exp_fall = ff_d; exp_rise = ff_d;
    forever begin
      repeat (3) begin
        #9 ff_d = 1'($urandom);
        #1;
        expect_eq(ff_q_fall, exp_fall, "falling-edge flip-flop holds");
        expect_eq(ff_q_rise, exp_rise, "rising-edge flip-flop holds");
      end
      #7;
      if (ff_ck) begin exp_fall = ff_d; n_ff_fall++; end
      else       begin exp_rise = ff_d; n_ff_rise++; end
      ff_ck = ~ff_ck;
      #1;
      expect_eq(ff_q_fall, exp_fall, "falling-edge flip-flop");
      expect_eq(ff_q_rise, exp_rise, "rising-edge flip-flop");
    end
  end
endmodule
