// tb_pipe_prog_mem - self-checking test of the two-stage pipelined program
// memory.
//
// Fills the memory, then issues a random address every cycle with random
// freezes (en low). A word must appear on rdata exactly two enabled cycles
// after its address was taken, and must hold while en is low.
module tb_pipe_prog_mem;
  localparam int D = 1024, W = 32;
  logic clk = 0, rst_n = 0, en = 0, we = 0;
  logic [9:0] raddr = 0, waddr = 0;
  logic [W-1:0] rdata, wdata = 0;
  pipe_prog_mem dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bit [W-1:0] ref_mem [D];
  bit [9:0] q1, q2;   // addresses in flight

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (rdata !== '0) begin failures++; $display("FAIL reset output %0h", rdata); end
    for (int i = 0; i < D; i++) begin
      we = 1; waddr = 10'(i); wdata = $urandom; ref_mem[i] = wdata;
      @(posedge clk); #1;
    end
    we = 0; en = 1;
    raddr = 0; @(posedge clk); #1; q1 = 0;
    raddr = 1; @(posedge clk); #1; q2 = q1; q1 = 1;
    for (int i = 0; i < 5000; i++) begin
      checks++;
      if (rdata !== ref_mem[q2]) begin
        failures++; $display("FAIL addr %0h got %0h exp %0h", q2, rdata, ref_mem[q2]);
      end
      en = ($urandom % 4) != 0;
      raddr = 10'($urandom);
      @(posedge clk); #1;
      if (en) begin q2 = q1; q1 = raddr; end
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
