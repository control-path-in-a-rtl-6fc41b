// tb_sync_prog_mem - self-checking test of the synchronized program memory.
//
// Checks that every word reads zero after reset, then writes random words to
// random addresses and checks that a read returns the newest value in the
// same cycle the address is applied (no read latency).
module tb_sync_prog_mem;
  localparam int D = 256, W = 28;
  logic clk = 0, rst_n = 0;
  logic [7:0] raddr = 0, waddr = 0;
  logic [W-1:0] rdata, wdata = 0;
  logic we = 0;
  sync_prog_mem dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit [W-1:0] ref_mem [D];

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < D; i++) begin
      ref_mem[i] = 0;
      raddr = 8'(i); #1; checks++;
      if (rdata !== '0) begin failures++; $display("FAIL reset word %0d = %0h", i, rdata); end
    end
    for (int i = 0; i < 3000; i++) begin
      we = ($urandom % 2) == 0; waddr = 8'($urandom); wdata = W'($urandom);
      raddr = (i % 4 == 0) ? waddr : 8'($urandom);
      #1; checks++;
      if (rdata !== ref_mem[raddr]) begin
        failures++; $display("FAIL read %0h got %0h exp %0h", raddr, rdata, ref_mem[raddr]);
      end
      @(posedge clk);
      if (we) ref_mem[waddr] = wdata;
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
