// tb_ir_reg: self-checking test of the instruction register.
// Random irl and bus data for 1000 cycles; IR must load on irl and hold
// otherwise, and opcode must equal IR bits 7:5.
module tb_ir_reg;
  localparam int W = 8;
  logic clk = 0, rst = 1, irl = 0;
  logic [W-1:0] d = '0, q, model;
  logic [2:0] opcode;
  int checks = 0, failures = 0;

  ir_reg #(.W(W)) dut (.*);

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
    for (int i = 0; i < 1000; i++) begin
      irl = 1'($urandom); d = W'($urandom);
      @(posedge clk);
      if (irl) model = d;
      #1;
      checks++;
      if (q !== model || opcode !== {model[7], model[6], model[5]}) begin
        failures++;
        $display("mismatch at %0t: q=%h opcode=%b expected %h", $time, q, opcode, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
