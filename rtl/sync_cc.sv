// sync_cc - synchronized C&C with branch unit.
//
// The control path runs on the network clock and executes exactly one
// instruction per received network word, so the instruction stream stays
// aligned with the packet data streaming through the functional pages (FPs).
// No instruction may take a penalty cycle: conditional branches are resolved
// in the same cycle by the CAM branch unit, which sees the program counter and
// the search key {fp_flags, hdr_data} (FP result flags and the header word
// currently extracted).
//
// Each cycle while a packet program runs:
//   instr   = branch hit ? branch-unit instruction : program_memory[pc]
//   outputs = instr.fp_start / fp_stop / decision, valid this same cycle
//   next pc = branch hit ? branch fetch address
//           : instr.jump ? instr.target : pc + 1
// An instruction with end_prog set is the last one; the C&C then idles (all
// control outputs low) until the next pkt_start. pkt_start (asserted in the
// cycle before the first word the program should see) restarts the program
// at address 0, also when a program is still running. So the case-statement
// instruction at a branch pc is the default case: it runs when no entry
// matches.
//
// The critical path is pc register -> program memory / CAM search -> output
// and next-pc mux, as expected for this variant. Execution at the network
// clock, FP start/stop, the accept/discard decision and the 16 x 4 branch unit
// follow the design description; the instruction word, pkt_start and the
// program load ports are this design's choices.
module sync_cc
  import cc_pkg::*;
#(
  parameter int unsigned NUM_BR   = 16,
  parameter int unsigned NUM_CASE = 4,
  localparam int unsigned KEY_W   = FLAG_W + DATA_W,
  localparam int unsigned BR_IW   = (NUM_BR   > 1) ? $clog2(NUM_BR)   : 1,
  localparam int unsigned CS_IW   = (NUM_CASE > 1) ? $clog2(NUM_CASE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // packet stream side
  input  logic               pkt_start,
  input  logic [FLAG_W-1:0]  fp_flags,
  input  logic [DATA_W-1:0]  hdr_data,
  // FP control
  output logic [NUM_FP-1:0]  fp_start,
  output logic [NUM_FP-1:0]  fp_stop,
  output decision_e          decision,
  output logic               busy,
  output logic [SPC_W-1:0]   pc,
  output logic               br_taken,
  // program load
  input  logic               pm_we,
  input  logic [SPC_W-1:0]   pm_addr,
  input  sync_instr_t        pm_wdata,
  // branch unit configuration
  input  logic               cfg_br_we,
  input  logic [BR_IW-1:0]   cfg_br,
  input  logic               cfg_br_valid,
  input  logic [SPC_W-1:0]   cfg_br_pc,
  input  logic               cfg_case_we,
  input  logic [CS_IW-1:0]   cfg_case,
  input  logic               cfg_case_valid,
  input  logic [KEY_W-1:0]   cfg_case_value,
  input  logic [KEY_W-1:0]   cfg_case_mask,
  input  sync_instr_t        cfg_case_instr,
  input  logic [SPC_W-1:0]   cfg_case_addr
);

  logic [SINSTR_W-1:0] mem_word;
  sync_instr_t         mem_instr, bu_instr, instr;
  logic [SINSTR_W-1:0] bu_word;
  logic                bu_hit;
  logic [SPC_W-1:0]    bu_addr;
  logic [BR_IW-1:0]    bu_br;
  logic [CS_IW-1:0]    bu_case;
  logic                running;

  sync_prog_mem #(.DEPTH(2**SPC_W), .W(SINSTR_W)) u_pmem (
    .clk, .rst_n,
    .raddr(pc), .rdata(mem_word),
    .we(pm_we), .waddr(pm_addr), .wdata(pm_wdata)
  );

  branch_unit #(
    .NUM_BR(NUM_BR), .NUM_CASE(NUM_CASE), .PC_W(SPC_W),
    .KEY_W(KEY_W), .INSTR_W(SINSTR_W)
  ) u_bu (
    .clk, .rst_n,
    .pc, .key({fp_flags, hdr_data}),
    .hit(bu_hit), .instr(bu_word), .fetch_addr(bu_addr),
    .hit_br(bu_br), .hit_case(bu_case),
    .cfg_br_we, .cfg_br, .cfg_br_valid, .cfg_br_pc,
    .cfg_case_we, .cfg_case, .cfg_case_valid, .cfg_case_value,
    .cfg_case_mask, .cfg_case_instr, .cfg_case_addr
  );

  assign mem_instr = sync_instr_t'(mem_word);
  assign bu_instr  = sync_instr_t'(bu_word);
  assign instr     = bu_hit ? bu_instr : mem_instr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      pc      <= '0;
    end else if (pkt_start) begin
      running <= 1'b1;
      pc      <= '0;
    end else if (running) begin
      if (instr.end_prog) running <= 1'b0;
      if (bu_hit)          pc <= bu_addr;
      else if (instr.jump) pc <= instr.target;
      else                 pc <= pc + 1'b1;
    end
  end

  always_comb begin
    fp_start = running ? instr.fp_start : '0;
    fp_stop  = running ? instr.fp_stop  : '0;
    decision = running ? instr.decision : DEC_NONE;
    br_taken = running && bu_hit;
    busy     = running;
  end

endmodule
