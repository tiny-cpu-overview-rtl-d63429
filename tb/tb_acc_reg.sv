// tb_acc_reg: self-checking test of the accumulator.
// Random accl/cla (never both) and random data for 2000 cycles; ACC must
// load on accl, clear to 00 on cla and hold otherwise.
module tb_acc_reg;
  localparam int W = 8;
  logic clk = 0, rst = 1, accl = 0, cla = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0, clears = 0;

  acc_reg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      automatic int r = int'($urandom_range(0, 3));
      accl = (r == 1 || r == 2); cla = (r == 3);
      d = W'($urandom) | 8'h01;
      @(posedge clk);
      if (cla)       begin if (model != 0) clears++; model = '0; end
      else if (accl) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch at %0t: q=%h expected %h", $time, q, model);
      end
    end
    checks++;
    if (clears == 0) begin failures++; $display("no clear of a non-zero ACC exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
