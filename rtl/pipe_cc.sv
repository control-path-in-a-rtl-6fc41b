// pipe_cc - five-stage pipelined C&C.
//
// A small processor whose only job is to control the functional pages (FPs):
// it runs at a multiple of the network clock so that it can spend several
// instructions per network word. The instruction set has eleven
// instructions: and, or, not, 16-bit add and sub, load immediate, move, jump,
// branch-if-not-zero, branch-if-zero and nop (see cc_pkg).
//
// Pipeline (one instruction per cycle when nothing stalls):
//   IF1  program counter drives the pipelined program memory (address reg)
//   IF2  program memory array read (data reg)
//   ID   decode, register read with bypass, hazard check, jump/branch resolve
//   EX1  ALU stage 1
//   EX2  ALU stage 2, write back at the end of the cycle
// Hazards:
//   * a source written by the instruction one ahead (now in EX1) stalls
//     IF1..ID for one cycle (a bubble goes to EX1);
//   * a source written by the instruction two ahead (now in EX2) is bypassed
//     from the ALU output;
//   * a taken jump or branch is resolved in ID and flushes IF1/IF2: two
//     penalty cycles.
// Register map: r0..r11 general purpose (cc_regfile); reading r12 gives the
// FP flags, r13 the header field extracted by the FPs; writing r12 pulses
// fp_start, r13 pulses fp_stop, r14 gives a packet decision (bit 0 accept,
// bit 1 discard). These outputs are registered and high for one cycle.
//
// With USE_BU = 1 a CAM branch unit (branch_unit) accelerates case-statements
// in the pipeline: in ID it is searched with the instruction's pc and the key
// {fp_flags, hdr}; on a hit the instruction is replaced by the one from the
// branch unit and fetching continues at its fetch address, so a whole
// case-statement costs one instruction and the two-cycle redirect.
// With BU_REG = 1 (default) the branch unit is pipelined: it is searched one
// stage earlier, in IF2, with that stage's pc and the key of that cycle, and
// its result is registered into ID. The CAM search then no longer adds to the
// decode-stage path; the price is that the key must be valid one cycle before
// the case instruction reaches ID. With BU_REG = 0 the search sits in ID.
//
// The ISA, the five stages, the pipelined program memory and two-stage ALU
// follow the design description; the encodings, the register map, the stall
// and bypass rules and the place where branches resolve are this design's
// choices. FP handshakes run in this clock domain; crossing to the network
// clock is left to the surrounding system.
module pipe_cc
  import cc_pkg::*;
#(
  parameter bit          USE_BU   = 1'b0,
  parameter bit          BU_REG   = 1'b1,
  parameter int unsigned NUM_BR   = 16,
  parameter int unsigned NUM_CASE = 4,
  localparam int unsigned KEY_W   = FLAG_W + PDATA_W,
  localparam int unsigned BR_IW   = (NUM_BR   > 1) ? $clog2(NUM_BR)   : 1,
  localparam int unsigned CS_IW   = (NUM_CASE > 1) ? $clog2(NUM_CASE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // FP side
  input  logic [FLAG_W-1:0]  fp_flags,
  input  logic [PDATA_W-1:0] hdr,
  output logic [NUM_FP-1:0]  fp_start,
  output logic [NUM_FP-1:0]  fp_stop,
  output decision_e          decision,
  // program load
  input  logic               pm_we,
  input  logic [PPC_W-1:0]   pm_addr,
  input  pinstr_t            pm_wdata,
  // branch unit configuration (used when USE_BU)
  input  logic               cfg_br_we,
  input  logic [BR_IW-1:0]   cfg_br,
  input  logic               cfg_br_valid,
  input  logic [PPC_W-1:0]   cfg_br_pc,
  input  logic               cfg_case_we,
  input  logic [CS_IW-1:0]   cfg_case,
  input  logic               cfg_case_valid,
  input  logic [KEY_W-1:0]   cfg_case_value,
  input  logic [KEY_W-1:0]   cfg_case_mask,
  input  pinstr_t            cfg_case_instr,
  input  logic [PPC_W-1:0]   cfg_case_addr,
  // status
  output logic [PPC_W-1:0]   pc_id,      // pc of the instruction in ID
  output logic               retire,     // an instruction left EX2
  output logic               stall,      // ID held this cycle
  output logic               redirect,   // taken jump/branch in ID
  output logic               bypass,     // an operand came from EX2
  output logic               bu_taken    // case-statement hit in branch unit
);

  localparam int unsigned GA_W = (NUM_GPR > 1) ? $clog2(NUM_GPR) : 1;

  // ------------------------------------------------------------- fetch
  logic             adv;        // IF1..ID advance (no stall)
  logic [PPC_W-1:0] pc_f, pc_f2;
  logic             v_f2, v_d;
  logic [PINSTR_W-1:0] mem_word;
  logic [PPC_W-1:0] redir_pc;

  pipe_prog_mem #(.DEPTH(2**PPC_W), .W(PINSTR_W)) u_pmem (
    .clk, .rst_n, .en(adv),
    .raddr(pc_f), .rdata(mem_word),
    .we(pm_we), .waddr(pm_addr), .wdata(pm_wdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_f  <= '0;
      pc_f2 <= '0;
      pc_id <= '0;
      v_f2  <= 1'b0;
      v_d   <= 1'b0;
    end else if (adv) begin
      pc_f  <= redirect ? redir_pc : pc_f + 1'b1;
      pc_f2 <= pc_f;
      pc_id <= pc_f2;
      v_f2  <= !redirect;
      v_d   <= v_f2 && !redirect;
    end
  end

  // ------------------------------------------------------------ decode
  pinstr_t ir_mem, ir;
  logic    bu_hit;
  logic [PPC_W-1:0] bu_addr;
  logic [PINSTR_W-1:0] bu_word;

  assign ir_mem = v_d ? pinstr_t'(mem_word) : '0;

  if (USE_BU) begin : g_bu
    logic [BR_IW-1:0] hb;
    logic [CS_IW-1:0] hc;
    logic             s_hit;
    logic [PPC_W-1:0] s_addr;
    logic [PINSTR_W-1:0] s_word;
    branch_unit #(
      .NUM_BR(NUM_BR), .NUM_CASE(NUM_CASE), .PC_W(PPC_W),
      .KEY_W(KEY_W), .INSTR_W(PINSTR_W)
    ) u_bu (
      .clk, .rst_n,
      .pc(BU_REG ? pc_f2 : pc_id), .key({fp_flags, hdr}),
      .hit(s_hit), .instr(s_word), .fetch_addr(s_addr),
      .hit_br(hb), .hit_case(hc),
      .cfg_br_we, .cfg_br, .cfg_br_valid, .cfg_br_pc,
      .cfg_case_we, .cfg_case, .cfg_case_valid, .cfg_case_value,
      .cfg_case_mask, .cfg_case_instr, .cfg_case_addr
    );
    if (BU_REG) begin : g_reg
      // search result travels with the instruction from IF2 into ID
      logic             hit_q;
      logic [PPC_W-1:0] addr_q;
      logic [PINSTR_W-1:0] word_q;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          hit_q  <= 1'b0;
          addr_q <= '0;
          word_q <= '0;
        end else if (adv) begin
          hit_q  <= s_hit;
          addr_q <= s_addr;
          word_q <= s_word;
        end
      end
      assign bu_hit  = hit_q;
      assign bu_addr = addr_q;
      assign bu_word = word_q;
    end else begin : g_comb
      assign bu_hit  = s_hit;
      assign bu_addr = s_addr;
      assign bu_word = s_word;
    end
  end else begin : g_no_bu
    assign bu_hit  = 1'b0;
    assign bu_addr = '0;
    assign bu_word = '0;
  end

  assign bu_taken = v_d && bu_hit;
  assign ir       = bu_taken ? pinstr_t'(bu_word) : ir_mem;

  logic use1, use2, wr_reg;
  always_comb begin
    use1   = 1'b0;
    use2   = 1'b0;
    wr_reg = 1'b0;
    unique case (ir.op)
      OP_AND, OP_OR, OP_ADD, OP_SUB: begin use1 = 1'b1; use2 = 1'b1; wr_reg = 1'b1; end
      OP_NOT, OP_MOV:                begin use1 = 1'b1; wr_reg = 1'b1; end
      OP_LDI:                        wr_reg = 1'b1;
      OP_BRNEQZ, OP_BREQZ:           use1 = 1'b1;
      default: ;
    endcase
  end

  // EX pipeline registers
  logic             v_e1, v_e2, we_e1, we_e2;
  logic [PRA_W-1:0] rd_e1, rd_e2;
  alu_op_e          aop_e1;
  logic [PDATA_W-1:0] a_e1, b_e1, alu_res;

  // register read with bypass from EX2
  logic [PDATA_W-1:0] rf_a, rf_b, opa, opb;
  logic byp_a, byp_b;

  cc_regfile #(.NREG(NUM_GPR), .W(PDATA_W)) u_rf (
    .clk, .rst_n,
    .raddr_a(GA_W'(ir.rs1)), .rdata_a(rf_a),
    .raddr_b(GA_W'(ir.rs2)), .rdata_b(rf_b),
    .we(v_e2 && we_e2 && (32'(rd_e2) < NUM_GPR)),
    .waddr(GA_W'(rd_e2)), .wdata(alu_res)
  );

  function automatic logic is_gpr(input logic [PRA_W-1:0] r);
    return 32'(r) < NUM_GPR;
  endfunction

  always_comb begin
    byp_a = use1 && is_gpr(ir.rs1) && v_e2 && we_e2 && (rd_e2 == ir.rs1);
    byp_b = use2 && is_gpr(ir.rs2) && v_e2 && we_e2 && (rd_e2 == ir.rs2);
    if (ir.rs1 == R_FLAGS)   opa = PDATA_W'(fp_flags);
    else if (ir.rs1 == R_HDR) opa = hdr;
    else if (byp_a)          opa = alu_res;
    else                     opa = rf_a;
    if (ir.rs2 == R_FLAGS)   opb = PDATA_W'(fp_flags);
    else if (ir.rs2 == R_HDR) opb = hdr;
    else if (byp_b)          opb = alu_res;
    else                     opb = rf_b;
  end

  // load-use style hazard on the instruction one ahead (in EX1)
  always_comb begin
    stall = v_d && v_e1 && we_e1 && is_gpr(rd_e1) &&
            ((use1 && rd_e1 == ir.rs1) || (use2 && rd_e1 == ir.rs2));
    adv   = !stall;
    bypass = v_d && !stall && (byp_a || byp_b);
  end

  // jump / branch / case-statement resolution in ID
  always_comb begin
    redirect = 1'b0;
    redir_pc = PPC_W'(ir.imm);
    if (v_d && !stall) begin
      if (bu_taken) begin
        redirect = 1'b1;
        redir_pc = bu_addr;
      end
      unique case (ir.op)
        OP_JMP:    redirect = 1'b1;
        OP_BRNEQZ: redirect = redirect || (opa != '0);
        OP_BREQZ:  redirect = redirect || (opa == '0);
        default: ;
      endcase
      if ((ir.op == OP_JMP) || (ir.op == OP_BRNEQZ && opa != '0) ||
          (ir.op == OP_BREQZ && opa == '0))
        redir_pc = PPC_W'(ir.imm);
    end
  end

  // ---------------------------------------------------------- execute
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_e1 <= 1'b0; we_e1 <= 1'b0; rd_e1 <= '0;
      aop_e1 <= ALU_PASS; a_e1 <= '0; b_e1 <= '0;
      v_e2 <= 1'b0; we_e2 <= 1'b0; rd_e2 <= '0;
    end else begin
      v_e1  <= v_d && !stall;
      we_e1 <= wr_reg;
      rd_e1 <= ir.rd;
      a_e1  <= opa;
      unique case (ir.op)
        OP_AND:  begin aop_e1 <= ALU_AND;  b_e1 <= opb; end
        OP_OR:   begin aop_e1 <= ALU_OR;   b_e1 <= opb; end
        OP_NOT:  begin aop_e1 <= ALU_NOT;  b_e1 <= opb; end
        OP_ADD:  begin aop_e1 <= ALU_ADD;  b_e1 <= opb; end
        OP_SUB:  begin aop_e1 <= ALU_SUB;  b_e1 <= opb; end
        OP_MOV:  begin aop_e1 <= ALU_PASS; b_e1 <= opa; end
        default: begin aop_e1 <= ALU_PASS; b_e1 <= ir.imm; end
      endcase
      v_e2  <= v_e1;
      we_e2 <= we_e1;
      rd_e2 <= rd_e1;
    end
  end

  cc_alu #(.W(PDATA_W)) u_alu (
    .clk, .rst_n, .op(aop_e1), .a(a_e1), .b(b_e1), .result(alu_res)
  );

  // write back to the FP control registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_start <= '0;
      fp_stop  <= '0;
      decision <= DEC_NONE;
      retire   <= 1'b0;
    end else begin
      fp_start <= (v_e2 && we_e2 && rd_e2 == R_START) ? alu_res[NUM_FP-1:0] : '0;
      fp_stop  <= (v_e2 && we_e2 && rd_e2 == R_STOP)  ? alu_res[NUM_FP-1:0] : '0;
      if (v_e2 && we_e2 && rd_e2 == R_DEC)
        decision <= alu_res[1] ? DEC_DISCARD : (alu_res[0] ? DEC_ACCEPT : DEC_NONE);
      else
        decision <= DEC_NONE;
      retire   <= v_e2;
    end
  end

endmodule
