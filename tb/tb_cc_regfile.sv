// tb_cc_regfile - self-checking test of the C&C register file.
//
// Checks reset to zero, random writes with both read ports checked against a
// reference array (a read in the write cycle returns the old value), and that
// addresses beyond the last register read zero and are not written.
module tb_cc_regfile;
  localparam int N = 12, W = 16;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] raddr_a = 0, raddr_b = 0, waddr = 0;
  logic [W-1:0] rdata_a, rdata_b, wdata = 0;
  cc_regfile dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit [W-1:0] r [16];

  task automatic chk();
    bit [W-1:0] ea, eb;
    ea = (raddr_a < N) ? r[raddr_a] : 0;
    eb = (raddr_b < N) ? r[raddr_b] : 0;
    checks++;
    if (rdata_a !== ea || rdata_b !== eb) begin
      failures++;
      $display("FAIL a[%0d]=%0h exp %0h b[%0d]=%0h exp %0h", raddr_a, rdata_a, ea, raddr_b, rdata_b, eb);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) r[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 16; i++) begin raddr_a = 4'(i); raddr_b = 4'(15 - i); #1 chk(); end
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom % 2) == 0; waddr = 4'($urandom); wdata = W'($urandom);
      raddr_a = (i % 3 == 0) ? waddr : 4'($urandom); raddr_b = 4'($urandom);
      #1 chk();
      @(posedge clk);
      if (we && waddr < N) r[waddr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
