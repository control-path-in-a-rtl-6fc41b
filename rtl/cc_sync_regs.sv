// cc_sync_regs - synchronization registers between a pipelined C&C and the
// network-rate functional pages.
//
// The pipelined C&C runs at an integer multiple of the network clock, both
// derived from one source, so the boundary is crossed with a network-rate
// strobe instead of a second clock: net_tick is high in the last C&C cycle of
// every network cycle.
//   C&C -> FPs : fp_start / fp_stop pulses and decisions issued during a
//                network cycle are collected (start/stop OR-ed, the latest
//                decision kept) and presented on the net_* outputs from the
//                next network cycle on, held for exactly one network cycle.
//   FPs -> C&C : flags and header field are sampled at net_tick, so the C&C
//                sees values that are stable for a whole network cycle.
// A pulse issued in the tick cycle itself goes out with that tick. Latency:
// at most one network cycle each way. The need for these registers follows
// the design description; the strobe scheme and the merge rules are this
// design's choices.
module cc_sync_regs
  import cc_pkg::*;
#(
  parameter int unsigned NFP   = NUM_FP,
  parameter int unsigned FW    = FLAG_W,
  parameter int unsigned HW    = PDATA_W
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           net_tick,
  // C&C side (C&C clock rate)
  input  logic [NFP-1:0] cc_fp_start,
  input  logic [NFP-1:0] cc_fp_stop,
  input  decision_e      cc_decision,
  output logic [FW-1:0]  cc_flags,
  output logic [HW-1:0]  cc_hdr,
  // FP side (changes once per network cycle)
  output logic [NFP-1:0] net_fp_start,
  output logic [NFP-1:0] net_fp_stop,
  output decision_e      net_decision,
  input  logic [FW-1:0]  net_flags,
  input  logic [HW-1:0]  net_hdr
);

  logic [NFP-1:0] start_acc, stop_acc;
  decision_e      dec_acc;
  logic [NFP-1:0] start_all, stop_all;
  decision_e      dec_all;

  always_comb begin
    start_all = start_acc | cc_fp_start;
    stop_all  = stop_acc  | cc_fp_stop;
    dec_all   = (cc_decision != DEC_NONE) ? cc_decision : dec_acc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_acc    <= '0;
      stop_acc     <= '0;
      dec_acc      <= DEC_NONE;
      net_fp_start <= '0;
      net_fp_stop  <= '0;
      net_decision <= DEC_NONE;
      cc_flags     <= '0;
      cc_hdr       <= '0;
    end else if (net_tick) begin
      net_fp_start <= start_all;
      net_fp_stop  <= stop_all;
      net_decision <= dec_all;
      start_acc    <= '0;
      stop_acc     <= '0;
      dec_acc      <= DEC_NONE;
      cc_flags     <= net_flags;
      cc_hdr       <= net_hdr;
    end else begin
      start_acc    <= start_all;
      stop_acc     <= stop_all;
      dec_acc      <= dec_all;
    end
  end

endmodule
