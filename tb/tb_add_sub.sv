// tb_add_sub: self-checking test of the Add/Sub unit.
// Exhaustive over all 8-bit a and b for add, and random for subtract;
// results are compared with integer arithmetic modulo 256.
module tb_add_sub;
  localparam int W = 8;
  logic [W-1:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  add_sub #(.W(W)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i); b = W'(j); sub = 0; #1;
        check((i + j) % 256);
      end
    end
    for (int k = 0; k < 5000; k++) begin
      automatic int i = int'($urandom_range(0, 255));
      automatic int j = int'($urandom_range(0, 255));
      a = W'(i); b = W'(j); sub = 1; #1;
      check((i - j + 256) % 256);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int expected);
    checks++;
    if (int'(y) != expected) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h sub=%b y=%h expected %h", a, b, sub, y, expected);
    end
  endtask
endmodule
