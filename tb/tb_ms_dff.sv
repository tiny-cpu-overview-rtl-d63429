// tb_ms_dff: self-checking test of both master-slave D flip-flop variants.
// A falling-edge (RISING=0) and a rising-edge (RISING=1) instance share d
// and ck. d changes at random times, also while ck is high or low, as in
// the flip-flop waveforms; each q must change only at its own clock edge
// and then equal the value d had just before that edge. The master output
// y of the falling-edge flip-flop must follow d while ck is 1.
module tb_ms_dff;
  logic d = 0, ck = 0;
  logic q_f, qn_f, y_f, q_r, qn_r, y_r;
  logic exp_f, exp_r;
  int checks = 0, failures = 0;

  ms_dff #(.RISING(1'b0)) dut_f (.d(d), .ck(ck), .q(q_f), .qn(qn_f), .y(y_f));
  ms_dff #(.RISING(1'b1)) dut_r (.d(d), .ck(ck), .q(q_r), .qn(qn_r), .y(y_r));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (q_f !== exp_f || qn_f !== ~exp_f || q_r !== exp_r || qn_r !== ~exp_r) begin
      failures++;
      if (failures < 10)
        $display("t=%0t ck=%b d=%b q_f=%b (exp %b) q_r=%b (exp %b)", $time, ck, d, q_f, exp_f, q_r, exp_r);
    end
  endtask

  initial begin
    // settle both flip-flops with two full clock cycles
    repeat (2) begin #5 ck = 1; #5 ck = 0; end
    exp_f = d; exp_r = d;
    #1 check();
    for (int i = 0; i < 1000; i++) begin
      // a few changes of d inside the phase
      repeat (int'($urandom_range(0, 3))) begin
        #1 d = 1'($urandom);
        #1 check();
        if (ck) begin
          checks++;
          if (y_f !== d) begin failures++; $display("master not transparent at t=%0t", $time); end
        end
      end
      #1;
      if (ck) exp_f = d; else exp_r = d;
      ck = ~ck;
      #1 check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
