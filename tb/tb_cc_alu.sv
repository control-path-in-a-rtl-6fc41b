// tb_cc_alu - self-checking test of the two-stage ALU.
//
// Applies a new random operation every cycle and checks the result one cycle
// later (operands registered at the end of the first stage), including corner
// operands that exercise the carry between the two halves.
module tb_cc_alu;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  alu_op_e op = ALU_PASS;
  logic [15:0] a = 0, b = 0, result;
  cc_alu dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  function automatic bit [15:0] model(alu_op_e o, bit [15:0] x, bit [15:0] y);
    case (o)
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_NOT: return ~x;
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      default: return y;
    endcase
  endfunction

  bit [15:0] expv;
  bit [15:0] corners [6] = '{16'h0000, 16'h00ff, 16'hffff, 16'h0001, 16'h8000, 16'h7fff};
  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'($urandom % 6);
      a = (i % 5 == 0) ? corners[$urandom % 6] : 16'($urandom);
      b = (i % 7 == 0) ? corners[$urandom % 6] : 16'($urandom);
      @(posedge clk); #1;
      expv = model(op, a, b);
      // the result of the operation just registered is present now
      checks++;
      if (result !== expv) begin failures++; $display("FAIL op %0d %0h,%0h got %0h exp %0h", op, a, b, result, expv); end
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
