// tb_ppp_cc_top - end-to-end test of the protocol processor control path.
//
// Runs the top at its default parameters. A packet source and simple models
// of the functional pages (FPs) sit in the testbench:
//   * synchronized C&C: random Ethernet frames (IPv4/UDP, IPv4/TCP,
//     IPv4/ICMP, ARP, IPv6) stream one 32-bit word per cycle; the program
//     classifies ethertype, protocol and destination address with three
//     case-statements in the branch unit and a jump. For every frame the
//     decision must match the frame and must come exactly in the cycle of the
//     word it depends on (word 3, 6 or 8 after the start).
//   * pipelined C&C (clocked at 4x the network rate, crossing through the
//     synchronization registers): an FP model raises a "header ready" flag and presents an
//     ethertype; the program polls the flag, starts an FP, tests for IPv4 with
//     sub / branch-if-zero, handles ARP in a branch-unit case-statement and
//     then waits for the FP to drop the flag (the crossing delays it).
//     Each header must get its decision (IPv4 and ARP accepted, others
//     discarded, IPv4 also stops the FP).
// Every mechanism of both variants (branch unit hit and default case, jump,
// FP start and stop, accept and discard, pipeline stall, bypass, branch
// redirect, pipelined case-statement hit) is counted and must occur.
module tb_ppp_cc_top;
  import cc_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- ports
  logic s_pkt_start = 0;
  logic [FLAG_W-1:0] s_fp_flags = 0;
  logic [DATA_W-1:0] s_hdr_data = 0;
  logic [NUM_FP-1:0] s_fp_start, s_fp_stop;
  decision_e s_decision;
  logic s_busy, s_br_taken;
  logic [SPC_W-1:0] s_pc;
  logic s_pm_we = 0;
  logic [SPC_W-1:0] s_pm_addr = 0;
  sync_instr_t s_pm_wdata = '0;
  logic s_cfg_br_we = 0, s_cfg_br_valid = 1, s_cfg_case_we = 0, s_cfg_case_valid = 1;
  logic [3:0] s_cfg_br = 0;
  logic [1:0] s_cfg_case = 0;
  logic [SPC_W-1:0] s_cfg_br_pc = 0, s_cfg_case_addr = 0;
  logic [39:0] s_cfg_case_value = 0, s_cfg_case_mask = 0;
  sync_instr_t s_cfg_case_instr = '0;

  logic p_net_tick = 0;
  logic [FLAG_W-1:0] p_fp_flags = 0;
  logic [PDATA_W-1:0] p_hdr = 0;
  logic [NUM_FP-1:0] p_fp_start, p_fp_stop;
  decision_e p_decision;
  logic p_pm_we = 0;
  logic [PPC_W-1:0] p_pm_addr = 0;
  pinstr_t p_pm_wdata = '0;
  logic p_cfg_br_we = 0, p_cfg_br_valid = 1, p_cfg_case_we = 0, p_cfg_case_valid = 1;
  logic [3:0] p_cfg_br = 0;
  logic [1:0] p_cfg_case = 0;
  logic [PPC_W-1:0] p_cfg_br_pc = 0, p_cfg_case_addr = 0;
  logic [23:0] p_cfg_case_value = 0, p_cfg_case_mask = 0;
  pinstr_t p_cfg_case_instr = '0;
  logic [PPC_W-1:0] p_pc_id;
  logic p_retire, p_stall, p_redirect, p_bypass, p_bu_taken;

  ppp_cc_top dut (.*);

  // the pipelined C&C runs at four times the network rate
  localparam int RATIO = 4;
  int tick_cnt = 0;
  always @(posedge clk) begin
    tick_cnt <= (tick_cnt + 1) % RATIO;
    p_net_tick <= ((tick_cnt + 1) % RATIO) == RATIO - 1;
  end

  // ------------------------------------------------------------ helpers
  function automatic sync_instr_t mk(logic [7:0] st, logic [7:0] sp, decision_e d,
                                     logic e, logic j, logic [7:0] t);
    sync_instr_t i;
    i.fp_start = st; i.fp_stop = sp; i.decision = d; i.end_prog = e; i.jump = j; i.target = t;
    return i;
  endfunction
  function automatic pinstr_t I(opcode_e op, int rd, int rs1, int rs2, int imm);
    pinstr_t i;
    i.op = op; i.rd = 4'(rd); i.rs1 = 4'(rs1); i.rs2 = 4'(rs2); i.imm = 16'(imm);
    return i;
  endfunction
  task automatic s_pm(int a, sync_instr_t i);
    s_pm_we = 1; s_pm_addr = 8'(a); s_pm_wdata = i; @(posedge clk); #1 s_pm_we = 0;
  endtask
  task automatic s_cs(int b, int c, int p, logic [39:0] v, logic [39:0] m, sync_instr_t i, int a);
    s_cfg_br_we = 1; s_cfg_case_we = 1; s_cfg_br = 4'(b); s_cfg_case = 2'(c); s_cfg_br_pc = 8'(p);
    s_cfg_case_value = v; s_cfg_case_mask = m; s_cfg_case_instr = i; s_cfg_case_addr = 8'(a);
    @(posedge clk); #1 s_cfg_br_we = 0; s_cfg_case_we = 0;
  endtask
  task automatic p_pm(int a, pinstr_t i);
    p_pm_we = 1; p_pm_addr = PPC_W'(a); p_pm_wdata = i; @(posedge clk); #1 p_pm_we = 0;
  endtask
  task automatic p_cs(int b, int c, int p, logic [23:0] v, logic [23:0] m, pinstr_t i, int a);
    p_cfg_br_we = 1; p_cfg_case_we = 1; p_cfg_br = 4'(b); p_cfg_case = 2'(c); p_cfg_br_pc = PPC_W'(p);
    p_cfg_case_value = v; p_cfg_case_mask = m; p_cfg_case_instr = i; p_cfg_case_addr = PPC_W'(a);
    @(posedge clk); #1 p_cfg_br_we = 0; p_cfg_case_we = 0;
  endtask

  // ------------------------------------------------------ mechanism counts
  int n_s_hit = 0, n_s_default = 0, n_s_jump = 0, n_s_start = 0, n_s_stop = 0;
  int n_s_acc = 0, n_s_dis = 0;
  int n_p_stall = 0, n_p_byp = 0, n_p_redir = 0, n_p_bu = 0, n_p_start = 0, n_p_stop = 0;
  int n_p_acc = 0, n_p_dis = 0;
  always @(negedge clk) if (rst_n) begin
    n_s_hit   += int'(s_br_taken);
    n_s_default += int'(s_busy && !s_br_taken && s_decision == DEC_DISCARD && s_pc != 8'd20);
    n_s_jump  += int'(s_busy && s_pc == 8'd20);
    n_s_start += int'(s_fp_start != 0);
    n_s_stop  += int'(s_fp_stop != 0);
    n_s_acc   += int'(s_decision == DEC_ACCEPT);
    n_s_dis   += int'(s_decision == DEC_DISCARD);
    n_p_stall += int'(p_stall);
    n_p_byp   += int'(p_bypass);
    n_p_redir += int'(p_redirect);
    n_p_bu    += int'(p_bu_taken);
    n_p_start += int'(p_fp_start != 0);
    n_p_stop  += int'(p_fp_stop != 0);
    n_p_acc   += int'(p_decision == DEC_ACCEPT);   // held for RATIO cycles
    n_p_dis   += int'(p_decision == DEC_DISCARD);
  end

  localparam logic [31:0] IP_A = 32'hc0a80001, IP_B = 32'hc0a80002,
                          IP_C = 32'h0a000005, IP_D = 32'he0000001;

  // -------------------------------------------- synchronized C&C traffic
  localparam int S_PACKETS = 300;
  task automatic s_traffic();
    for (int p = 0; p < S_PACKETS; p++) begin
      int et = $urandom % 5, pr = $urandom % 3, dst = $urandom % 6;
      logic [31:0] w [12];
      int e_at; decision_e e_dec;
      int got_at = -1; decision_e got_dec = DEC_NONE; int n_dec = 0;
      s_fp_flags = 8'($urandom);
      for (int i = 0; i < 12; i++) w[i] = $urandom;
      w[3][31:16] = (et <= 2) ? 16'h0800 : (et == 3) ? 16'h0806 : 16'h86dd;
      w[6][23:16] = (pr == 0) ? 8'd17 : (pr == 1) ? 8'd6 : 8'd1;
      w[8] = (dst == 0) ? IP_A : (dst == 1) ? IP_B : (dst == 2) ? IP_C : (dst == 3) ? IP_D
             : 32'h0b000000 | 32'($urandom % 100);
      if (et == 3) begin e_at = 3; e_dec = DEC_ACCEPT; end
      else if (et == 4) begin e_at = 3; e_dec = DEC_DISCARD; end
      else if (pr == 2) begin e_at = 6; e_dec = DEC_DISCARD; end
      else begin
        e_at = 8;
        e_dec = (dst <= 2 || (dst == 3 && s_fp_flags[0])) ? DEC_ACCEPT : DEC_DISCARD;
      end
      s_pkt_start = 1; @(posedge clk); #1 s_pkt_start = 0;
      for (int i = 0; i < 12; i++) begin
        s_hdr_data = w[i]; #1;
        if (s_decision != DEC_NONE) begin got_at = i; got_dec = s_decision; n_dec++; end
        @(posedge clk); #1;
      end
      checks++;
      if (n_dec != 1 || got_at != e_at || got_dec != e_dec) begin
        failures++;
        $display("FAIL sync packet %0d: decision %0d at word %0d (%0d decisions), expected %0d at %0d",
                 p, got_dec, got_at, n_dec, e_dec, e_at);
      end
    end
  endtask

  // ----------------------------------------------- pipelined C&C traffic
  localparam int P_PACKETS = 200;
  task automatic p_traffic();
    for (int p = 0; p < P_PACKETS; p++) begin
      int k = $urandom % 4;
      logic [15:0] et;
      decision_e e_dec, got = DEC_NONE;
      int wait_cyc = 0; bit started = 0, stopped = 0;
      et = (k == 0) ? 16'h0800 : (k == 1) ? 16'h0806 : (k == 2) ? 16'h86dd : 16'($urandom);
      if (et == 16'h0800 || et == 16'h0806) e_dec = DEC_ACCEPT; else e_dec = DEC_DISCARD;
      while (p_decision != DEC_NONE) @(posedge clk);   // previous decision gone
      repeat (1 + $urandom % 5) @(posedge clk);
      #1 p_hdr = et; p_fp_flags = 8'h01;           // header ready
      while (got == DEC_NONE && wait_cyc < 200) begin
        @(negedge clk);
        if (p_fp_start != 0) begin started = 1; p_fp_flags = 8'h00; end   // FP takes it
        if (p_fp_stop != 0) stopped = 1;
        got = p_decision;
        wait_cyc++;
      end
      checks++;
      if (got != e_dec || !started || (stopped != (et == 16'h0800))) begin
        failures++;
        $display("FAIL pipe packet %0d type %h: decision %0d expected %0d started %0b stopped %0b",
                 p, et, got, e_dec, started, stopped);
      end
    end
  endtask

  initial begin
    // the pipelined program memory is loaded while the C&C is held in reset
    p_pm(0, I(OP_MOV, 1, R_FLAGS, 0, 0));       // poll header-ready flag
    p_pm(1, I(OP_LDI, 2, 0, 0, 1));
    p_pm(2, I(OP_AND, 3, 1, 2, 0));             // stall on r2, bypass r1/r2
    p_pm(3, I(OP_BREQZ, 0, 3, 0, 0));           // wait
    p_pm(4, I(OP_LDI, R_START, 0, 0, 1));       // start FP0
    p_pm(5, I(OP_MOV, 4, R_HDR, 0, 0));
    p_pm(6, I(OP_LDI, 5, 0, 0, 16'h0800));
    p_pm(7, I(OP_SUB, 6, 4, 5, 0));
    p_pm(8, I(OP_BREQZ, 0, 6, 0, 20));          // IPv4
    p_pm(9, I(OP_LDI, R_DEC, 0, 0, 2));         // case-statement; default: discard
    p_pm(10, I(OP_JMP, 0, 0, 0, 22));
    p_pm(20, I(OP_LDI, R_STOP, 0, 0, 1));
    p_pm(21, I(OP_LDI, R_DEC, 0, 0, 1));        // accept IPv4
    p_pm(22, I(OP_MOV, 1, R_FLAGS, 0, 0));      // wait until the FP has
    p_pm(23, I(OP_AND, 3, 1, 2, 0));            // taken the header (flag low)
    p_pm(24, I(OP_BRNEQZ, 0, 3, 0, 22));
    p_pm(25, I(OP_JMP, 0, 0, 0, 0));
    #1 rst_n = 1;
    // synchronized program (pc = received word index)
    s_pm(0, mk(8'h01, 0, DEC_NONE, 0, 0, 0));
    s_pm(3, mk(0, 0, DEC_DISCARD, 1, 0, 0));
    s_pm(6, mk(0, 0, DEC_DISCARD, 1, 0, 0));
    s_pm(7, mk(0, 0, DEC_NONE, 0, 1, 8'd20));
    s_pm(20, mk(0, 8'h0f, DEC_DISCARD, 1, 0, 0));
    s_cs(0, 0, 3, {8'h00, 32'h0800_0000}, {8'h00, 32'hffff_0000}, mk(8'h02, 0, DEC_NONE, 0, 0, 0), 4);
    s_cs(0, 1, 3, {8'h00, 32'h0806_0000}, {8'h00, 32'hffff_0000}, mk(0, 0, DEC_ACCEPT, 1, 0, 0), 0);
    s_cs(1, 0, 6, {8'h00, 32'h0011_0000}, {8'h00, 32'h00ff_0000}, mk(8'h04, 0, DEC_NONE, 0, 0, 0), 7);
    s_cs(1, 1, 6, {8'h00, 32'h0006_0000}, {8'h00, 32'h00ff_0000}, mk(8'h08, 0, DEC_NONE, 0, 0, 0), 7);
    s_cs(2, 0, 20, {8'h00, IP_A}, {8'h00, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    s_cs(2, 1, 20, {8'h00, IP_B}, {8'h00, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    s_cs(2, 2, 20, {8'h00, IP_C}, {8'h00, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    s_cs(2, 3, 20, {8'h01, IP_D}, {8'h01, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    p_cs(0, 0, 9, {8'h00, 16'h0806}, {8'h00, 16'hffff}, I(OP_LDI, R_DEC, 0, 0, 1), 22);
    fork
      s_traffic();
      p_traffic();
    join
    repeat (5) @(posedge clk);
    begin
      string names [15] = '{"sync branch hit", "sync default case", "sync jump", "sync FP start",
        "sync FP stop", "sync accept", "sync discard", "pipe stall", "pipe bypass",
        "pipe redirect", "pipe case hit", "pipe FP start", "pipe FP stop", "pipe accept",
        "pipe discard"};
      int counts [15];
      counts = '{n_s_hit, n_s_default, n_s_jump, n_s_start, n_s_stop, n_s_acc, n_s_dis,
                 n_p_stall, n_p_byp, n_p_redir, n_p_bu, n_p_start, n_p_stop, n_p_acc, n_p_dis};
      for (int i = 0; i < 15; i++) begin
        $display("%-18s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end
    checks++;
    if (n_s_acc + n_s_dis != S_PACKETS || n_p_acc + n_p_dis != RATIO * P_PACKETS) begin
      failures++; $display("FAIL decision totals");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
