// tb_mdr_reg: self-checking test of MDR.
// Random mdil/mdol (never both, as in the CPU) and random data for 2000
// cycles; MDR must take mdi on mdil, mdo on mdol and hold otherwise.
module tb_mdr_reg;
  localparam int W = 8;
  logic clk = 0, rst = 1, mdil = 0, mdol = 0;
  logic [W-1:0] mdi = '0, mdo = '0, q, model;
  int checks = 0, failures = 0;

  mdr_reg #(.W(W)) dut (.*);

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
      automatic int r = int'($urandom_range(0, 2));
      mdil = (r == 1); mdol = (r == 2);
      mdi = W'($urandom); mdo = W'($urandom);
      @(posedge clk);
      if (mdil)      model = mdi;
      else if (mdol) model = mdo;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("mismatch at %0t: q=%h expected %h", $time, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
