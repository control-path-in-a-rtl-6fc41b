// branch_unit - CAM-based program flow selection for the C&C.
//
// A hardwired case-statement. The unit holds NUM_BR conditional branches,
// each tagged with the program counter value of the instruction where the
// case-statement sits, and each with NUM_CASE case entries. A case entry is a
// ternary CAM word (value and care mask) over the search key, together with
// the instruction that starts the selected program flow and the address from
// which fetching continues after it.
//
// Search (combinational): every cycle the current pc and the key (FP flags and
// extracted header data) are compared against all entries in parallel. An
// entry matches when its branch is valid with tag == pc, the case is valid and
// ((key ^ value) & mask) == 0. If several cases of the matching branch hit, the
// lowest case index wins; if several branches carry the same tag, the lowest
// branch index wins. On a hit, `hit` is high and `instr` / `fetch_addr` give
// the new instruction and instruction fetch address in the same cycle, so a
// taken conditional branch costs no cycle.
//
// Configuration (synchronous, one write per cycle, e.g. from the
// microcontroller): cfg_br_we writes a branch tag and valid bit, cfg_case_we
// writes one case entry. All entries are invalid after reset.
//
// The organisation (pc plus FP flags in, new instruction and fetch address
// out) and the default size of 16 branches with four case entries follow the
// design description; the ternary mask, the priority rule and the write port
// are this design's choices.
module branch_unit #(
  parameter int unsigned NUM_BR   = 16,
  parameter int unsigned NUM_CASE = 4,
  parameter int unsigned PC_W     = 8,
  parameter int unsigned KEY_W    = 40,
  parameter int unsigned INSTR_W  = 28,
  localparam int unsigned BR_IW   = (NUM_BR   > 1) ? $clog2(NUM_BR)   : 1,
  localparam int unsigned CS_IW   = (NUM_CASE > 1) ? $clog2(NUM_CASE) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  // search
  input  logic [PC_W-1:0]    pc,
  input  logic [KEY_W-1:0]   key,
  output logic               hit,
  output logic [INSTR_W-1:0] instr,
  output logic [PC_W-1:0]    fetch_addr,
  output logic [BR_IW-1:0]   hit_br,
  output logic [CS_IW-1:0]   hit_case,
  // configuration: branch tag
  input  logic               cfg_br_we,
  input  logic [BR_IW-1:0]   cfg_br,
  input  logic               cfg_br_valid,
  input  logic [PC_W-1:0]    cfg_br_pc,
  // configuration: case entry
  input  logic               cfg_case_we,
  input  logic [CS_IW-1:0]   cfg_case,
  input  logic               cfg_case_valid,
  input  logic [KEY_W-1:0]   cfg_case_value,
  input  logic [KEY_W-1:0]   cfg_case_mask,
  input  logic [INSTR_W-1:0] cfg_case_instr,
  input  logic [PC_W-1:0]    cfg_case_addr
);

  logic               br_valid [NUM_BR];
  logic [PC_W-1:0]    br_pc    [NUM_BR];
  logic               cs_valid [NUM_BR][NUM_CASE];
  logic [KEY_W-1:0]   cs_value [NUM_BR][NUM_CASE];
  logic [KEY_W-1:0]   cs_mask  [NUM_BR][NUM_CASE];
  logic [INSTR_W-1:0] cs_instr [NUM_BR][NUM_CASE];
  logic [PC_W-1:0]    cs_addr  [NUM_BR][NUM_CASE];

  // valid bits are reset; the payload is only read when valid
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < NUM_BR; b++) begin
        br_valid[b] <= 1'b0;
        for (int c = 0; c < NUM_CASE; c++) cs_valid[b][c] <= 1'b0;
      end
    end else begin
      if (cfg_br_we) br_valid[cfg_br] <= cfg_br_valid;
      if (cfg_case_we) cs_valid[cfg_br][cfg_case] <= cfg_case_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_br_we) br_pc[cfg_br] <= cfg_br_pc;
    if (cfg_case_we) begin
      cs_value[cfg_br][cfg_case] <= cfg_case_value;
      cs_mask [cfg_br][cfg_case] <= cfg_case_mask;
      cs_instr[cfg_br][cfg_case] <= cfg_case_instr;
      cs_addr [cfg_br][cfg_case] <= cfg_case_addr;
    end
  end

  // parallel match lines
  logic [NUM_CASE-1:0] match [NUM_BR];
  always_comb begin
    for (int b = 0; b < NUM_BR; b++)
      for (int c = 0; c < NUM_CASE; c++)
        match[b][c] = br_valid[b] && (br_pc[b] == pc) && cs_valid[b][c] &&
                      (((key ^ cs_value[b][c]) & cs_mask[b][c]) == '0);
  end

  // priority encode (lowest branch, then lowest case) and read out
  always_comb begin
    hit        = 1'b0;
    hit_br     = '0;
    hit_case   = '0;
    instr      = '0;
    fetch_addr = '0;
    for (int b = NUM_BR - 1; b >= 0; b--)
      for (int c = NUM_CASE - 1; c >= 0; c--)
        if (match[b][c]) begin
          hit        = 1'b1;
          hit_br     = BR_IW'(b);
          hit_case   = CS_IW'(c);
          instr      = cs_instr[b][c];
          fetch_addr = cs_addr[b][c];
        end
  end

endmodule
