// tb_sync_cc - self-checking test of the synchronized C&C.
//
// Loads a receive program for Ethernet / IPv4 / UDP or TCP that checks the
// destination address against four entries, then streams random packets one
// 32-bit word per cycle. For each packet the expected FP start/stop pattern
// and accept/discard decision are written out cycle by cycle from the packet
// type (not from the program), so every output is checked in the exact cycle
// it must appear: one instruction per network word, no branch penalty.
//
// Program (pc = index of the word being received):
//   0      start FP0 (MAC layer)
//   3      case ethertype: IPv4 -> start FP1, go on at 4;
//                          ARP  -> accept, end; default: discard, end
//   6      case protocol:  UDP -> start FP2; TCP -> start FP3; default discard
//   7      jump to 20 (the destination check lives elsewhere in memory)
//   20     case destination IP: A, B, C, or D when flag 0 is set
//          -> stop FPs, accept, end; default: stop FPs, discard, end
module tb_sync_cc;
  import cc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic pkt_start = 0;
  logic [FLAG_W-1:0] fp_flags = 0;
  logic [DATA_W-1:0] hdr_data = 0;
  logic [NUM_FP-1:0] fp_start, fp_stop;
  decision_e decision;
  logic busy, br_taken;
  logic [SPC_W-1:0] pc;
  logic pm_we = 0;
  logic [SPC_W-1:0] pm_addr = 0;
  sync_instr_t pm_wdata = '0;
  logic cfg_br_we = 0, cfg_br_valid = 0, cfg_case_we = 0, cfg_case_valid = 0;
  logic [3:0] cfg_br = 0;
  logic [1:0] cfg_case = 0;
  logic [SPC_W-1:0] cfg_br_pc = 0, cfg_case_addr = 0;
  logic [39:0] cfg_case_value = 0, cfg_case_mask = 0;
  sync_instr_t cfg_case_instr = '0;

  sync_cc dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam logic [31:0] IP_A = 32'hc0a80001, IP_B = 32'hc0a80002,
                          IP_C = 32'h0a000005, IP_D = 32'he0000001;

  function automatic sync_instr_t mk(logic [7:0] st, logic [7:0] sp, decision_e d,
                                     logic e, logic j, logic [7:0] t);
    sync_instr_t i;
    i.fp_start = st; i.fp_stop = sp; i.decision = d; i.end_prog = e; i.jump = j; i.target = t;
    return i;
  endfunction

  task automatic pm(int a, sync_instr_t i);
    pm_we = 1; pm_addr = 8'(a); pm_wdata = i;
    @(posedge clk); #1 pm_we = 0;
  endtask

  task automatic br(int b, int p);
    cfg_br_we = 1; cfg_br = 4'(b); cfg_br_valid = 1; cfg_br_pc = 8'(p);
    @(posedge clk); #1 cfg_br_we = 0;
  endtask

  task automatic cs(int b, int c, logic [39:0] v, logic [39:0] m, sync_instr_t i, int a);
    cfg_case_we = 1; cfg_br = 4'(b); cfg_case = 2'(c); cfg_case_valid = 1;
    cfg_case_value = v; cfg_case_mask = m; cfg_case_instr = i; cfg_case_addr = 8'(a);
    @(posedge clk); #1 cfg_case_we = 0;
  endtask

  // expected outputs of one packet, per word
  logic [7:0] e_start [32], e_stop [32];
  decision_e  e_dec [32];
  logic [31:0] words [32];
  int n_exec;   // words for which the program runs
  int n_words;

  int cnt_accept = 0, cnt_discard = 0, cnt_taken = 0;

  task automatic build_packet();
    int et = $urandom % 5;   // 0..2 IPv4, 3 ARP, 4 other
    int pr = $urandom % 3;   // 0 UDP, 1 TCP, 2 ICMP
    int dst = $urandom % 6;  // 0..3 listed, 4..5 other
    logic [31:0] dip;
    fp_flags = 8'($urandom);
    for (int i = 0; i < 32; i++) begin
      words[i] = $urandom; e_start[i] = 0; e_stop[i] = 0; e_dec[i] = DEC_NONE;
    end
    n_words = 12;
    words[3][31:16] = (et <= 2) ? 16'h0800 : (et == 3) ? 16'h0806 : 16'h86dd;
    words[6][23:16] = (pr == 0) ? 8'd17 : (pr == 1) ? 8'd6 : 8'd1;
    case (dst)
      0: dip = IP_A; 1: dip = IP_B; 2: dip = IP_C; 3: dip = IP_D;
      default: dip = 32'h0b000000 | 32'($urandom % 1000);
    endcase
    words[8] = dip;
    e_start[0] = 8'h01;
    if (et == 3) begin e_dec[3] = DEC_ACCEPT; n_exec = 4; end
    else if (et == 4) begin e_dec[3] = DEC_DISCARD; n_exec = 4; end
    else begin
      e_start[3] = 8'h02;
      if (pr == 2) begin e_dec[6] = DEC_DISCARD; n_exec = 7; end
      else begin
        e_start[6] = (pr == 0) ? 8'h04 : 8'h08;
        n_exec = 9;
        e_stop[8] = 8'h0f;
        e_dec[8] = (dst <= 2 || (dst == 3 && fp_flags[0])) ? DEC_ACCEPT : DEC_DISCARD;
      end
    end
  endtask

  task automatic run_packet();
    build_packet();
    pkt_start = 1;
    @(posedge clk); #1 pkt_start = 0;
    for (int w = 0; w < n_words; w++) begin
      hdr_data = words[w];
      #1;
      checks++;
      if (w < n_exec) begin
        if (!busy || fp_start !== e_start[w] || fp_stop !== e_stop[w] || decision !== e_dec[w]) begin
          failures++;
          $display("FAIL word %0d pc=%0d busy=%0b start=%0h/%0h stop=%0h/%0h dec=%0d/%0d", w, pc,
                   busy, fp_start, e_start[w], fp_stop, e_stop[w], decision, e_dec[w]);
        end
        if (decision == DEC_ACCEPT) cnt_accept++;
        if (decision == DEC_DISCARD) cnt_discard++;
        if (br_taken) cnt_taken++;
      end else if (busy || fp_start != 0 || fp_stop != 0 || decision != DEC_NONE) begin
        failures++;
        $display("FAIL word %0d: C&C still active after the program end", w);
      end
      @(posedge clk); #1;
    end
    repeat ($urandom % 3) @(posedge clk);
    #1;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    pm(0, mk(8'h01, 0, DEC_NONE, 0, 0, 0));
    pm(3, mk(0, 0, DEC_DISCARD, 1, 0, 0));
    pm(6, mk(0, 0, DEC_DISCARD, 1, 0, 0));
    pm(7, mk(0, 0, DEC_NONE, 0, 1, 8'd20));
    pm(20, mk(0, 8'h0f, DEC_DISCARD, 1, 0, 0));
    br(0, 3);
    cs(0, 0, {8'h00, 32'h0800_0000}, {8'h00, 32'hffff_0000}, mk(8'h02, 0, DEC_NONE, 0, 0, 0), 4);
    cs(0, 1, {8'h00, 32'h0806_0000}, {8'h00, 32'hffff_0000}, mk(0, 0, DEC_ACCEPT, 1, 0, 0), 0);
    br(1, 6);
    cs(1, 0, {8'h00, 32'h0011_0000}, {8'h00, 32'h00ff_0000}, mk(8'h04, 0, DEC_NONE, 0, 0, 0), 7);
    cs(1, 1, {8'h00, 32'h0006_0000}, {8'h00, 32'h00ff_0000}, mk(8'h08, 0, DEC_NONE, 0, 0, 0), 7);
    br(2, 20);
    cs(2, 0, {8'h00, IP_A}, {8'h00, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    cs(2, 1, {8'h00, IP_B}, {8'h00, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    cs(2, 2, {8'h00, IP_C}, {8'h00, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    cs(2, 3, {8'h01, IP_D}, {8'h01, 32'hffff_ffff}, mk(0, 8'h0f, DEC_ACCEPT, 1, 0, 0), 0);
    // idle C&C drives nothing
    checks++;
    if (busy || fp_start != 0 || decision != DEC_NONE) begin failures++; $display("FAIL idle outputs"); end
    for (int p = 0; p < 400; p++) run_packet();
    checks++;
    if (cnt_accept < 20 || cnt_discard < 20 || cnt_taken < 100) begin
      failures++; $display("FAIL coverage accept=%0d discard=%0d taken=%0d", cnt_accept, cnt_discard, cnt_taken);
    end
    $display("accepted %0d discarded %0d branches taken %0d", cnt_accept, cnt_discard, cnt_taken);
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
