// cc_alu - two-stage pipelined ALU of the pipelined C&C.
//
// Operations: and, or, not, 16-bit add, 16-bit subtract and pass-through of
// operand b (used by load-immediate and move). Operands presented in cycle t
// (the first ALU stage) are registered at the end of that cycle; the second
// stage finishes the result combinationally in cycle t+1, where the C&C
// writes it back and may bypass it.
// Stage 1 computes the logic result and the low half of the add/subtract with
// its carry; stage 2 adds the high half with that carry. Splitting the carry
// chain this way halves the adder delay per stage; the two-stage ALU follows
// the design description, the split point is this design's choice.
module cc_alu
  import cc_pkg::*;
#(
  parameter int unsigned W = 16,
  localparam int unsigned LO = W / 2,
  localparam int unsigned HI = W - LO
) (
  input  logic         clk,
  input  logic         rst_n,
  input  alu_op_e      op,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] result
);

  // stage 1 registers
  logic          arith_q;
  logic [LO-1:0] lo_q;
  logic          carry_q;
  logic [HI-1:0] a_hi_q, b_hi_q;
  logic [W-1:0]  other_q;

  logic          is_sub, is_arith;
  logic [W-1:0]  b_eff;
  logic [LO:0]   lo_sum;
  logic [W-1:0]  other;

  always_comb begin
    is_sub   = (op == ALU_SUB);
    is_arith = (op == ALU_ADD) || is_sub;
    b_eff    = is_sub ? ~b : b;
    lo_sum   = {1'b0, a[LO-1:0]} + {1'b0, b_eff[LO-1:0]} + (LO+1)'(is_sub);
    unique case (op)
      ALU_AND:  other = a & b;
      ALU_OR:   other = a | b;
      ALU_NOT:  other = ~a;
      default:  other = b;   // ALU_PASS (and don't-care for arithmetic)
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      arith_q <= 1'b0;
      lo_q    <= '0;
      carry_q <= 1'b0;
      a_hi_q  <= '0;
      b_hi_q  <= '0;
      other_q <= '0;
    end else begin
      arith_q <= is_arith;
      lo_q    <= lo_sum[LO-1:0];
      carry_q <= lo_sum[LO];
      a_hi_q  <= a[W-1:LO];
      b_hi_q  <= b_eff[W-1:LO];
      other_q <= other;
    end
  end

  // stage 2
  logic [HI-1:0] hi_sum;
  assign hi_sum = a_hi_q + b_hi_q + HI'(carry_q);
  assign result = arith_q ? {hi_sum, lo_q} : other_q;

endmodule
