// tb_control_fsm: self-checking test of the controller.
// For every decoded instruction (and both values of Z for JNZ) the test
// runs one instruction from S1 and compares, state by state, the state
// number and all twelve control signals with the register-transfer list
// of that instruction, then checks the cycle count (ADD 8, STR 7, JNZ 6,
// CLA 4, RST 4, unused opcode 4) and the return to S1.
module tb_control_fsm;
  import tiny_pkg::*;
  logic clk = 0, rst = 1, z = 0;
  op_e op = OP_NOP;
  ctrl_t ctrl;
  state_e state;
  int checks = 0, failures = 0;

  control_fsm dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected controls, built from signal names.
  function automatic ctrl_t c(string s);
    ctrl_t r = '0;
    string w = "";
    s = {s, " "};
    for (int i = 0; i < s.len(); i++) begin
      if (s[i] == " ") begin
        case (w)
          "mmx":   r.mmx = 1;   "mal":   r.mal = 1;   "rd":    r.mem_rd = 1;
          "mdil":  r.mdil = 1;  "mdol":  r.mdol = 1;  "pcl":   r.pcl = 1;
          "pcinc": r.pcinc = 1; "intrs": r.intrs = 1; "irl":   r.irl = 1;
          "accl":  r.accl = 1;  "cla":   r.cla = 1;   "wr":    r.mem_w = 1;
          "":      ;
          default: $fatal(1, "bad name %s", w);
        endcase
        w = "";
      end else w = {w, s[i]};
    end
    return r;
  endfunction

  task automatic run(op_e o, logic zz, ctrl_t exp [$]);
    int n = 0;
    op = o; z = zz;
    // S1..S3 run before IR is loaded; op is held constant here.
    while (1) begin
      #1;
      checks++;
      if (n >= exp.size()) begin
        failures++;
        $display("op %0d: more than %0d cycles", o, exp.size());
        break;
      end
      if (int'(state) != n + 1 || ctrl !== exp[n]) begin
        failures++;
        $display("op %0d z=%b cycle %0d: state=%0d ctrl=%b expected state %0d ctrl=%b",
                 o, zz, n + 1, state, ctrl, n + 1, exp[n]);
      end
      @(posedge clk);
      n++;
      if (n == exp.size()) break;
    end
    #1;
    checks++;
    if (state !== S1 || n != int'(op_cycles(o))) begin
      failures++;
      $display("op %0d: after %0d cycles state=%0d, expected S1 after %0d", o, n, state, op_cycles(o));
    end
  endtask

  ctrl_t fetch [$];

  initial begin
    fetch = '{c("mmx mal rd"), c("mdil pcinc"), c("irl")};
    @(posedge clk); #1 rst = 0;
    @(negedge clk);
    run(OP_ADD, 0, {fetch, c("mmx mal rd"), c("mdil pcinc"), c("mal rd"), c("mdil"), c("accl")});
    run(OP_STR, 0, {fetch, c("mmx mal rd"), c("mdil pcinc"), c("mal mdol"), c("wr")});
    run(OP_JNZ, 0, {fetch, c("mmx mal rd"), c("mdil pcinc"), c("pcl")});
    run(OP_JNZ, 1, {fetch, c("mmx mal rd"), c("mdil pcinc"), c("")});
    run(OP_CLA, 0, {fetch, c("cla")});
    run(OP_RST, 1, {fetch, c("intrs")});
    run(OP_NOP, 0, {fetch, c("")});
    run(OP_ADD, 1, {fetch, c("mmx mal rd"), c("mdil pcinc"), c("mal rd"), c("mdil"), c("accl")});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
