// tb_tiny_mem: self-checking test of the 256 x 8 memory.
// Writes random data to random addresses and compares reads with a
// shadow array. Checks that a write appears only after the clock edge,
// that reads follow the address without a clock (asynchronous read) and
// that we=0 leaves the contents unchanged.
module tb_tiny_mem;
  localparam int W = 8, DEPTH = 256;
  logic clk = 0, we = 0;
  logic [7:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] shadow [DEPTH];
  int checks = 0, failures = 0;

  tiny_mem #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: addr=%h got %h expected %h", what, addr, got, exp);
    end
  endtask

  initial begin
    // fill every word
    @(negedge clk);
    for (int i = 0; i < DEPTH; i++) begin
      addr = 8'(i); wdata = W'($urandom); we = 1; shadow[i] = wdata;
      @(negedge clk);
    end
    we = 0;
    // asynchronous read of every word, no clock edge in between
    for (int i = 0; i < DEPTH; i++) begin
      addr = 8'(i); #1;
      expect_eq(rdata, shadow[i], "read");
    end
    // random mix of writes and reads
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      addr = 8'($urandom); we = 1'($urandom); wdata = W'($urandom);
      #1 expect_eq(rdata, shadow[addr], "before edge");
      @(posedge clk);
      if (we) shadow[addr] = wdata;
      #1 expect_eq(rdata, shadow[addr], "after edge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
