// tb_mar_reg: self-checking test of MAR and its input mux.
// Random mmx, mal, PC and bus values for 2000 cycles; MAR must load PC when
// mmx=1, the bus when mmx=0, and hold when mal=0.
module tb_mar_reg;
  localparam int W = 8;
  logic clk = 0, rst = 1, mmx = 0, mal = 0;
  logic [W-1:0] pc = '0, bus = '0, q, model;
  int checks = 0, failures = 0;

  mar_reg #(.W(W)) dut (.*);

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
      mmx = 1'($urandom); mal = 1'($urandom);
      pc = W'($urandom); bus = W'($urandom);
      @(posedge clk);
      if (mal) model = mmx ? pc : bus;
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
