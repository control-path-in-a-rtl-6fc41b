// tb_pipe_cc - self-checking test of the five-stage pipelined C&C.
//
// Two instances:
//   dut_a (plain, USE_BU = 0) runs a directed program using every instruction:
//   arithmetic and logic with back-to-back dependences (one-cycle stall plus
//   bypass), a taken branch-if-zero that must squash two instructions that
//   would discard the packet, a three-pass countdown loop with
//   branch-if-not-zero, moves to the FP start/stop and decision registers,
//   and a closing jump. The values and cycle numbers below were worked out by
//   hand from the pipeline rules (a result is visible on the FP outputs three
//   cycles after its instruction leaves ID; a stall costs one cycle, a taken
//   jump or branch two).
//   dut_c (USE_BU = 1, branch unit searched in ID) waits in a countdown loop while its branch unit is
//   configured, then runs a loop around one case-statement on {flags, header}
//   forever. The header and flags change every phase; in each phase every
//   event must be the one the case entries select, and events must come every
//   4 cycles on the default path (case instruction + jump back, two redirect
//   cycles) or every 6 cycles on a hit (the case instruction itself redirects).
module tb_pipe_cc;
  import cc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ------------------------------------------------------------- dut_a
  logic [FLAG_W-1:0] a_flags = 0;
  logic [PDATA_W-1:0] a_hdr = 0;
  logic [NUM_FP-1:0] a_start, a_stop;
  decision_e a_dec;
  logic a_pm_we = 0;
  logic [PPC_W-1:0] a_pm_addr = 0;
  pinstr_t a_pm_wdata = '0;
  logic [PPC_W-1:0] a_pc_id;
  logic a_retire, a_stall, a_redirect, a_bypass, a_bu_taken;

  pipe_cc dut_a (
    .clk, .rst_n, .fp_flags(a_flags), .hdr(a_hdr),
    .fp_start(a_start), .fp_stop(a_stop), .decision(a_dec),
    .pm_we(a_pm_we), .pm_addr(a_pm_addr), .pm_wdata(a_pm_wdata),
    .cfg_br_we(1'b0), .cfg_br('0), .cfg_br_valid(1'b0), .cfg_br_pc('0),
    .cfg_case_we(1'b0), .cfg_case('0), .cfg_case_valid(1'b0), .cfg_case_value('0),
    .cfg_case_mask('0), .cfg_case_instr('0), .cfg_case_addr('0),
    .pc_id(a_pc_id), .retire(a_retire), .stall(a_stall), .redirect(a_redirect),
    .bypass(a_bypass), .bu_taken(a_bu_taken)
  );

  // ------------------------------------------------------------- dut_c
  logic [FLAG_W-1:0] c_flags = 0;
  logic [PDATA_W-1:0] c_hdr = 0;
  logic [NUM_FP-1:0] c_start, c_stop;
  decision_e c_dec;
  logic c_pm_we = 0;
  logic [PPC_W-1:0] c_pm_addr = 0;
  pinstr_t c_pm_wdata = '0;
  logic c_br_we = 0, c_case_we = 0;
  logic [3:0] c_br = 0;
  logic [1:0] c_case = 0;
  logic [PPC_W-1:0] c_br_pc = 0, c_case_addr = 0;
  logic [23:0] c_case_value = 0, c_case_mask = 0;
  pinstr_t c_case_instr = '0;
  logic [PPC_W-1:0] c_pc_id;
  logic c_retire, c_stall, c_redirect, c_bypass, c_bu_taken;

  logic c_rst_n = 0;
  pipe_cc #(.USE_BU(1'b1), .BU_REG(1'b0)) dut_c (
    .clk, .rst_n(c_rst_n), .fp_flags(c_flags), .hdr(c_hdr),
    .fp_start(c_start), .fp_stop(c_stop), .decision(c_dec),
    .pm_we(c_pm_we), .pm_addr(c_pm_addr), .pm_wdata(c_pm_wdata),
    .cfg_br_we(c_br_we), .cfg_br(c_br), .cfg_br_valid(1'b1), .cfg_br_pc(c_br_pc),
    .cfg_case_we(c_case_we), .cfg_case(c_case), .cfg_case_valid(1'b1),
    .cfg_case_value(c_case_value), .cfg_case_mask(c_case_mask),
    .cfg_case_instr(c_case_instr), .cfg_case_addr(c_case_addr),
    .pc_id(c_pc_id), .retire(c_retire), .stall(c_stall), .redirect(c_redirect),
    .bypass(c_bypass), .bu_taken(c_bu_taken)
  );

  function automatic pinstr_t I(opcode_e op, int rd, int rs1, int rs2, int imm);
    pinstr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    return i;
  endfunction

  task automatic load_a(int addr, pinstr_t i);
    a_pm_we = 1; a_pm_addr = PPC_W'(addr); a_pm_wdata = i;
    @(posedge clk); #1 a_pm_we = 0;
  endtask
  task automatic load_c(int addr, pinstr_t i);
    c_pm_we = 1; c_pm_addr = PPC_W'(addr); c_pm_wdata = i;
    @(posedge clk); #1 c_pm_we = 0;
  endtask
  task automatic case_c(int b, int c, int pc, logic [23:0] v, logic [23:0] m, pinstr_t i, int a);
    c_br_we = 1; c_case_we = 1; c_br = 4'(b); c_case = 2'(c); c_br_pc = PPC_W'(pc);
    c_case_value = v; c_case_mask = m; c_case_instr = i; c_case_addr = PPC_W'(a);
    @(posedge clk); #1 c_br_we = 0; c_case_we = 0;
  endtask

  // cycle counter: cycle 0 is the first cycle after reset is released
  int cyc = -1;
  bit counting = 0;
  always @(posedge clk) if (counting) cyc <= cyc + 1;

  int a_t_start = -1, a_t_stop = -1, a_t_acc = -1, a_n_dec = 0;
  int a_n_stall = 0, a_n_redir = 0, a_n_byp = 0;
  logic [7:0] a_v_start = 0, a_v_stop = 0;
  // dut_c event log of the current phase
  int c_n = 0, c_bad = 0, c_last = -1, c_gap = -1, c_gap_bad = 0;
  logic [7:0] c_e_start = 0;
  decision_e c_e_dec = DEC_NONE;
  bit c_watch = 0;
  int c_cyc = 0;
  always @(posedge clk) c_cyc <= c_cyc + 1;
  always @(negedge clk) if (c_watch && (c_start != 0 || c_dec != DEC_NONE || c_stop != 0)) begin
    c_n++;
    if (c_start != c_e_start || c_dec != c_e_dec || c_stop != 0) c_bad++;
    if (c_last >= 0 && (c_cyc - c_last) != c_gap) c_gap_bad++;
    c_last = c_cyc;
  end

  task automatic c_phase(string name, logic [15:0] h, logic [7:0] f, logic [7:0] es,
                         decision_e ed, int gap);
    c_hdr = h; c_flags = f;
    repeat (12) @(posedge clk);
    #1;
    c_e_start = es; c_e_dec = ed; c_gap = gap;
    c_n = 0; c_bad = 0; c_last = -1; c_gap_bad = 0; c_watch = 1;
    repeat (60) @(posedge clk);
    #1 c_watch = 0;
    chk({name, " events"}, c_n, 60 / gap);
    chk({name, " wrong events"}, c_bad, 0);
    chk({name, " spacing"}, c_gap_bad, 0);
  endtask

  always @(negedge clk) if (counting && rst_n) begin
    if (a_start != 0) begin a_t_start = cyc; a_v_start = a_start; end
    if (a_stop  != 0) begin a_t_stop  = cyc; a_v_stop  = a_stop;  end
    if (a_dec != DEC_NONE) begin a_n_dec++; if (a_dec == DEC_ACCEPT) a_t_acc = cyc; end
    if (a_t_acc < 0) begin
      a_n_stall += int'(a_stall); a_n_redir += int'(a_redirect); a_n_byp += int'(a_bypass);
    end
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic restart();
    rst_n = 0; counting = 0;
    @(posedge clk); #1;
    // keep the loaded programs: only the pipeline is reset, memory has no reset
    rst_n = 1; cyc = 0; counting = 1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // ---- program for dut_a
    load_a(0,  I(OP_LDI, 1, 0, 0, 5));
    load_a(1,  I(OP_LDI, 2, 0, 0, 3));
    load_a(2,  I(OP_ADD, 3, 1, 2, 0));          // r3 = 8
    load_a(3,  I(OP_MOV, R_START, 3, 0, 0));    // start FP3
    load_a(4,  I(OP_SUB, 4, 1, 2, 0));          // r4 = 2
    load_a(5,  I(OP_NOT, 5, 4, 0, 0));          // r5 = fffd
    load_a(6,  I(OP_AND, 6, 5, 1, 0));          // r6 = 5
    load_a(7,  I(OP_OR,  7, 6, 2, 0));          // r7 = 7
    load_a(8,  I(OP_LDI, 8, 0, 0, 0));
    load_a(9,  I(OP_BREQZ, 0, 8, 0, 12));       // taken
    load_a(10, I(OP_LDI, R_DEC, 0, 0, 2));      // squashed
    load_a(11, I(OP_LDI, R_DEC, 0, 0, 2));      // never fetched past
    load_a(12, I(OP_MOV, R_STOP, 7, 0, 0));     // stop FPs 0..2
    load_a(13, I(OP_NOP, 0, 0, 0, 0));
    load_a(14, I(OP_LDI, 10, 0, 0, 3));
    load_a(15, I(OP_LDI, 11, 0, 0, 1));
    load_a(16, I(OP_SUB, 10, 10, 11, 0));
    load_a(17, I(OP_BRNEQZ, 0, 10, 0, 16));     // loop three times
    load_a(18, I(OP_MOV, R_DEC, 11, 0, 0));     // accept
    load_a(19, I(OP_JMP, 0, 0, 0, 19));
    for (int k = 20; k < 24; k++) load_a(k, I(OP_LDI, R_DEC, 0, 0, 2));
    // ---- run dut_a
    restart();
    repeat (60) @(posedge clk);
    #1;
    chk("start value", a_v_start, 8);
    chk("start cycle", a_t_start, 10);
    chk("stop value", a_v_stop, 7);
    chk("stop cycle", a_t_stop, 23);
    chk("accept cycle", a_t_acc, 41);
    chk("decisions (squash)", a_n_dec, 1);
    chk("stalls", a_n_stall, 10);
    chk("redirects", a_n_redir, 4);
    chk("bypasses", a_n_byp, 10);
    // ---- program for dut_c, loaded while it is held in reset
    load_c(0, I(OP_LDI, 1, 0, 0, 30));
    load_c(1, I(OP_LDI, 2, 0, 0, 1));
    load_c(2, I(OP_SUB, 1, 1, 2, 0));
    load_c(3, I(OP_BRNEQZ, 0, 1, 0, 2));        // wait ~180 cycles
    load_c(4, I(OP_NOP, 0, 0, 0, 0));
    load_c(5, I(OP_LDI, R_DEC, 0, 0, 2));       // case-statement; default: discard
    load_c(6, I(OP_JMP, 0, 0, 0, 5));
    load_c(10, I(OP_JMP, 0, 0, 0, 5));
    load_c(20, I(OP_JMP, 0, 0, 0, 5));
    c_rst_n = 1;
    case_c(0, 0, 5, {8'h00, 16'h0800}, {8'h00, 16'hffff}, I(OP_LDI, R_START, 0, 0, 2), 10);
    case_c(0, 1, 5, {8'h00, 16'h0806}, {8'h00, 16'hffff}, I(OP_LDI, R_DEC, 0, 0, 1), 20);
    case_c(0, 2, 5, {8'h80, 16'h0000}, {8'h80, 16'h0000}, I(OP_LDI, R_START, 0, 0, 8'h40), 10);
    repeat (200) @(posedge clk);
    #1;
    c_phase("IPv4", 16'h0800, 8'h00, 8'h02, DEC_NONE, 6);
    c_phase("ARP", 16'h0806, 8'h00, 8'h00, DEC_ACCEPT, 6);
    c_phase("default", 16'h1234, 8'h00, 8'h00, DEC_DISCARD, 4);
    c_phase("flag", 16'h1234, 8'h80, 8'h40, DEC_NONE, 6);
    c_phase("IPv4 before flag", 16'h0800, 8'h80, 8'h02, DEC_NONE, 6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
