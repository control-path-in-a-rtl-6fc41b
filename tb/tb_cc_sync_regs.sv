// tb_cc_sync_regs - self-checking test of the C&C synchronization registers.
//
// The C&C clock runs at four times the network rate (net_tick every fourth
// cycle). Random start/stop pulses and decisions are issued in random C&C
// cycles; the testbench collects what was issued in each network cycle and
// checks that exactly that appears on the network-side outputs for the whole
// following network cycle, and that flags/header are sampled at each tick and
// held in between.
module tb_cc_sync_regs;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0, net_tick = 0;
  logic [7:0] cc_fp_start = 0, cc_fp_stop = 0, net_fp_start, net_fp_stop;
  decision_e cc_decision = DEC_NONE, net_decision;
  logic [7:0] cc_flags, net_flags = 0;
  logic [15:0] cc_hdr, net_hdr = 0;
  cc_sync_regs dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  bit [7:0] e_start = 0, e_stop = 0, a_start, a_stop;
  decision_e e_dec = DEC_NONE, a_dec;
  bit [7:0] e_flags = 0; bit [15:0] e_hdr = 0;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      a_start = 0; a_stop = 0; a_dec = DEC_NONE;
      for (int k = 0; k < 4; k++) begin
        net_tick = (k == 3);
        cc_fp_start = ($urandom % 3 == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
        cc_fp_stop  = ($urandom % 4 == 0) ? 8'(1 << ($urandom % 8)) : 8'h00;
        cc_decision = ($urandom % 5 == 0) ? decision_e'(1 + $urandom % 2) : DEC_NONE;
        if (k == 0) begin net_flags = 8'($urandom); net_hdr = 16'($urandom); end
        a_start |= cc_fp_start; a_stop |= cc_fp_stop;
        if (cc_decision != DEC_NONE) a_dec = cc_decision;
        #1;
        checks++;
        if (net_fp_start !== e_start || net_fp_stop !== e_stop || net_decision !== e_dec ||
            cc_flags !== e_flags || cc_hdr !== e_hdr) begin
          failures++;
          $display("FAIL net cycle %0d sub %0d: %h/%h %h/%h %0d/%0d flags %h/%h", n, k,
                   net_fp_start, e_start, net_fp_stop, e_stop, net_decision, e_dec, cc_flags, e_flags);
        end
        @(posedge clk); #1;
      end
      e_start = a_start; e_stop = a_stop; e_dec = a_dec; e_flags = net_flags; e_hdr = net_hdr;
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
