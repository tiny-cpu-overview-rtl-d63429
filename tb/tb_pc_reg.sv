// tb_pc_reg: self-checking test of the program counter.
// Drives random combinations of pcl, pcinc and intrs with random bus data
// for 2000 cycles and compares PC after every clock edge with a reference
// model (clear first, then load, then increment, modulo 256).
module tb_pc_reg;
  localparam int W = 8;
  logic clk = 0, rst = 1, pcl = 0, pcinc = 0, intrs = 0;
  logic [W-1:0] d = '0, q, model;
  int checks = 0, failures = 0;

  pc_reg #(.W(W)) dut (.*);

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
    check();
    for (int i = 0; i < 2000; i++) begin
      automatic int r = int'($urandom_range(0, 9));
      pcl = (r == 0 || r == 1); pcinc = (r >= 2 && r <= 7); intrs = (r == 8);
      if (r == 9) begin pcl = 1; pcinc = 1; intrs = $urandom_range(0, 1) == 1; end
      d = W'($urandom);
      @(posedge clk);
      if (intrs)      model = '0;
      else if (pcl)   model = d;
      else if (pcinc) model = model + 1;
      #1 check();
    end
    // wrap-around from FF to 00
    pcl = 1; pcinc = 0; intrs = 0; d = 8'hFF; @(posedge clk); #1;
    pcl = 0; pcinc = 1; @(posedge clk); #1;
    checks++; if (q !== 8'h00) begin failures++; $display("wrap failed q=%h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (q !== model) begin
      failures++;
      $display("mismatch at %0t: q=%h expected %h", $time, q, model);
    end
  endtask
endmodule
