// tb_z_flag: self-checking test of the zero flag.
// Loads zero and non-zero values with and without zl and checks that Z
// reports "last loaded value was zero" and holds while zl is low.
module tb_z_flag;
  localparam int W = 8;
  logic clk = 0, rst = 1, zl = 0;
  logic [W-1:0] d = '0;
  logic z, model;
  int checks = 0, failures = 0;

  z_flag #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      zl = 1'($urandom);
      d  = ($urandom_range(0, 3) == 0) ? '0 : W'($urandom_range(1, 255));
      @(posedge clk);
      if (zl) model = (d == 0);
      #1;
      checks++;
      if (z !== model) begin
        failures++;
        $display("mismatch at %0t: z=%b expected %b", $time, z, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
