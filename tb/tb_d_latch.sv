// tb_d_latch: self-checking test of the gated D latch.
// Toggles d at random times with the gate open and closed: while c=1, q
// must follow d; while c=0, q must keep the value d had when c fell.
// qn must always be the complement of q.
module tb_d_latch;
  logic d = 0, c = 1, q, qn, model;
  int checks = 0, failures = 0, holds = 0;

  d_latch dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    #1;
    for (int i = 0; i < 4000; i++) begin
      if ($urandom_range(0, 3) == 0) c = ~c;
      else d = 1'($urandom);
      #1;
      if (c) model = d;
      else if (d != model) holds++;
      checks++;
      if (q !== model || qn !== ~model) begin
        failures++;
        if (failures < 10) $display("t=%0t c=%b d=%b q=%b qn=%b expected %b", $time, c, d, q, qn, model);
      end
    end
    checks++;
    if (holds == 0) begin failures++; $display("opaque phase never tested"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
