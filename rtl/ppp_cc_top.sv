// ppp_cc_top - control path of the programmable protocol processor.
//
// The programmable protocol processor (PPP) decodes received packets at wire
// speed in a chain of functional pages (FPs); its control path, the C&C,
// starts and stops the FPs, selects the program flow from their flags and
// decides to accept or discard each packet. The control path can be built in
// the way that suits the terminal:
//   * s_*  synchronized C&C (sync_cc): runs at the network clock, one
//          instruction per 32-bit word, case-statements in a 16 x 4 CAM
//          branch unit with no branch penalty;
//   * p_*  pipelined C&C (pipe_cc): five-stage 16-bit processor for a clock
//          several times the network clock; with PIPE_USE_BU (default on) it
//          also has a pipelined branch unit for case-statements, without it
//          it is the plain pipelined processor. Its FP-side signals pass
//          through synchronization registers (cc_sync_regs), so p_fp_* and
//          p_decision change once per network cycle, marked by p_net_tick,
//          and p_fp_flags / p_hdr are sampled at p_net_tick. The status
//          outputs p_pc_id .. p_bu_taken are in the C&C clock rate.
// Both variants stand side by side here with their own ports, sharing only
// clock and reset (one clock serves both here; in a product only one variant
// is built and the pipelined one is clocked at a multiple of the network
// rate); the FPs and the microcontroller that loads programs and
// branch tables are outside. Port timing is that of the two sub-blocks.
module ppp_cc_top
  import cc_pkg::*;
#(
  parameter int unsigned NUM_BR      = 16,
  parameter int unsigned NUM_CASE    = 4,
  parameter bit          PIPE_USE_BU = 1'b1,
  localparam int unsigned SKEY_W     = FLAG_W + DATA_W,
  localparam int unsigned PKEY_W     = FLAG_W + PDATA_W,
  localparam int unsigned BR_IW      = (NUM_BR   > 1) ? $clog2(NUM_BR)   : 1,
  localparam int unsigned CS_IW      = (NUM_CASE > 1) ? $clog2(NUM_CASE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // ---------------- synchronized C&C
  input  logic               s_pkt_start,
  input  logic [FLAG_W-1:0]  s_fp_flags,
  input  logic [DATA_W-1:0]  s_hdr_data,
  output logic [NUM_FP-1:0]  s_fp_start,
  output logic [NUM_FP-1:0]  s_fp_stop,
  output decision_e          s_decision,
  output logic               s_busy,
  output logic [SPC_W-1:0]   s_pc,
  output logic               s_br_taken,
  input  logic               s_pm_we,
  input  logic [SPC_W-1:0]   s_pm_addr,
  input  sync_instr_t        s_pm_wdata,
  input  logic               s_cfg_br_we,
  input  logic [BR_IW-1:0]   s_cfg_br,
  input  logic               s_cfg_br_valid,
  input  logic [SPC_W-1:0]   s_cfg_br_pc,
  input  logic               s_cfg_case_we,
  input  logic [CS_IW-1:0]   s_cfg_case,
  input  logic               s_cfg_case_valid,
  input  logic [SKEY_W-1:0]  s_cfg_case_value,
  input  logic [SKEY_W-1:0]  s_cfg_case_mask,
  input  sync_instr_t        s_cfg_case_instr,
  input  logic [SPC_W-1:0]   s_cfg_case_addr,
  // ---------------- pipelined C&C
  input  logic               p_net_tick,   // last C&C cycle of a network cycle
  input  logic [FLAG_W-1:0]  p_fp_flags,
  input  logic [PDATA_W-1:0] p_hdr,
  output logic [NUM_FP-1:0]  p_fp_start,
  output logic [NUM_FP-1:0]  p_fp_stop,
  output decision_e          p_decision,
  input  logic               p_pm_we,
  input  logic [PPC_W-1:0]   p_pm_addr,
  input  pinstr_t            p_pm_wdata,
  input  logic               p_cfg_br_we,
  input  logic [BR_IW-1:0]   p_cfg_br,
  input  logic               p_cfg_br_valid,
  input  logic [PPC_W-1:0]   p_cfg_br_pc,
  input  logic               p_cfg_case_we,
  input  logic [CS_IW-1:0]   p_cfg_case,
  input  logic               p_cfg_case_valid,
  input  logic [PKEY_W-1:0]  p_cfg_case_value,
  input  logic [PKEY_W-1:0]  p_cfg_case_mask,
  input  pinstr_t            p_cfg_case_instr,
  input  logic [PPC_W-1:0]   p_cfg_case_addr,
  output logic [PPC_W-1:0]   p_pc_id,
  output logic               p_retire,
  output logic               p_stall,
  output logic               p_redirect,
  output logic               p_bypass,
  output logic               p_bu_taken
);

  sync_cc #(.NUM_BR(NUM_BR), .NUM_CASE(NUM_CASE)) u_sync (
    .clk, .rst_n,
    .pkt_start(s_pkt_start), .fp_flags(s_fp_flags), .hdr_data(s_hdr_data),
    .fp_start(s_fp_start), .fp_stop(s_fp_stop), .decision(s_decision),
    .busy(s_busy), .pc(s_pc), .br_taken(s_br_taken),
    .pm_we(s_pm_we), .pm_addr(s_pm_addr), .pm_wdata(s_pm_wdata),
    .cfg_br_we(s_cfg_br_we), .cfg_br(s_cfg_br), .cfg_br_valid(s_cfg_br_valid),
    .cfg_br_pc(s_cfg_br_pc), .cfg_case_we(s_cfg_case_we), .cfg_case(s_cfg_case),
    .cfg_case_valid(s_cfg_case_valid), .cfg_case_value(s_cfg_case_value),
    .cfg_case_mask(s_cfg_case_mask), .cfg_case_instr(s_cfg_case_instr),
    .cfg_case_addr(s_cfg_case_addr)
  );

  // pipelined C&C, its FP side crossing to the network rate
  logic [NUM_FP-1:0]  pc_fp_start, pc_fp_stop;
  decision_e          pc_decision;
  logic [FLAG_W-1:0]  pc_flags;
  logic [PDATA_W-1:0] pc_hdr;

  cc_sync_regs u_psync (
    .clk, .rst_n, .net_tick(p_net_tick),
    .cc_fp_start(pc_fp_start), .cc_fp_stop(pc_fp_stop), .cc_decision(pc_decision),
    .cc_flags(pc_flags), .cc_hdr(pc_hdr),
    .net_fp_start(p_fp_start), .net_fp_stop(p_fp_stop), .net_decision(p_decision),
    .net_flags(p_fp_flags), .net_hdr(p_hdr)
  );

  pipe_cc #(.USE_BU(PIPE_USE_BU), .NUM_BR(NUM_BR), .NUM_CASE(NUM_CASE)) u_pipe (
    .clk, .rst_n,
    .fp_flags(pc_flags), .hdr(pc_hdr),
    .fp_start(pc_fp_start), .fp_stop(pc_fp_stop), .decision(pc_decision),
    .pm_we(p_pm_we), .pm_addr(p_pm_addr), .pm_wdata(p_pm_wdata),
    .cfg_br_we(p_cfg_br_we), .cfg_br(p_cfg_br), .cfg_br_valid(p_cfg_br_valid),
    .cfg_br_pc(p_cfg_br_pc), .cfg_case_we(p_cfg_case_we), .cfg_case(p_cfg_case),
    .cfg_case_valid(p_cfg_case_valid), .cfg_case_value(p_cfg_case_value),
    .cfg_case_mask(p_cfg_case_mask), .cfg_case_instr(p_cfg_case_instr),
    .cfg_case_addr(p_cfg_case_addr),
    .pc_id(p_pc_id), .retire(p_retire), .stall(p_stall),
    .redirect(p_redirect), .bypass(p_bypass), .bu_taken(p_bu_taken)
  );

endmodule
