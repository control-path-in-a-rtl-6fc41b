// cc_pkg - shared types and constants of the protocol processor control path.
//
// The control path ("counter and controller", C&C) of a dataflow protocol
// processor starts and stops the functional pages (FPs, the datapath
// accelerators), decides whether a packet is accepted or discarded, and
// selects the program flow from flags and header data produced by the FPs.
// Two variants are provided:
//   * a synchronized C&C that runs at the network clock, one instruction per
//     received 32-bit word, and performs each case-statement in one cycle in a
//     CAM-based branch unit;
//   * a five-stage pipelined C&C, running a small 16-bit ISA (logic,
//     add/sub, load immediate, move, jump, branch on (non)zero) at a multiple
//     of the network clock.
// The 32-bit network word, the 16-bit arithmetic and the instruction list come
// from the design description; the instruction encodings, the number of FPs,
// the flag width and the register map are this design's own choices.
package cc_pkg;

  // ---------------------------------------------------------------- common
  localparam int unsigned DATA_W = 32;  // network word width per clock
  localparam int unsigned NUM_FP = 8;   // functional pages under control
  localparam int unsigned FLAG_W = 8;   // result flags driven by the FPs

  typedef enum logic [1:0] {
    DEC_NONE    = 2'd0,
    DEC_ACCEPT  = 2'd1,
    DEC_DISCARD = 2'd2
  } decision_e;

  // ------------------------------------------------------ synchronized C&C
  localparam int unsigned SPC_W = 8;    // program counter width (256 words)

  // One synchronized instruction is a horizontal control word: everything it
  // does happens in the cycle it is executed.
  typedef struct packed {
    logic [NUM_FP-1:0] fp_start;  // start these FPs this cycle
    logic [NUM_FP-1:0] fp_stop;   // stop these FPs this cycle
    decision_e         decision;  // accept / discard the current packet
    logic              end_prog;  // last instruction of the packet program
    logic              jump;      // unconditional jump to target
    logic [SPC_W-1:0]  target;
  } sync_instr_t;

  localparam int unsigned SINSTR_W = $bits(sync_instr_t);

  // --------------------------------------------------------- pipelined C&C
  localparam int unsigned PDATA_W = 16;  // "Add (16 bits)", "Sub (16 bits)"
  localparam int unsigned PPC_W   = 10;  // program counter width (1024 words)
  localparam int unsigned PREG_N  = 16;  // register address space
  localparam int unsigned PRA_W   = 4;

  typedef enum logic [3:0] {
    OP_NOP    = 4'd0,
    OP_AND    = 4'd1,   // rd = rs1 & rs2
    OP_OR     = 4'd2,   // rd = rs1 | rs2
    OP_NOT    = 4'd3,   // rd = ~rs1
    OP_ADD    = 4'd4,   // rd = rs1 + rs2 (16 bit)
    OP_SUB    = 4'd5,   // rd = rs1 - rs2 (16 bit)
    OP_LDI    = 4'd6,   // rd = imm
    OP_MOV    = 4'd7,   // rd = rs1
    OP_JMP    = 4'd8,   // pc = imm
    OP_BRNEQZ = 4'd9,   // if (rs1 != 0) pc = imm
    OP_BREQZ  = 4'd10   // if (rs1 == 0) pc = imm
  } opcode_e;

  typedef struct packed {
    opcode_e            op;
    logic [PRA_W-1:0]   rd;
    logic [PRA_W-1:0]   rs1;
    logic [PRA_W-1:0]   rs2;
    logic [PDATA_W-1:0] imm;
  } pinstr_t;

  localparam int unsigned PINSTR_W = $bits(pinstr_t);  // 32

  // Register map: r0..r11 are general purpose (the register file); the top
  // four addresses reach the FPs.
  localparam int unsigned   NUM_GPR   = 12;
  localparam logic [3:0]    R_FLAGS   = 4'd12;  // read : FP result flags
  localparam logic [3:0]    R_HDR     = 4'd13;  // read : header field from FPs
  localparam logic [3:0]    R_START   = 4'd12;  // write: start FPs (pulse)
  localparam logic [3:0]    R_STOP    = 4'd13;  // write: stop FPs (pulse)
  localparam logic [3:0]    R_DEC     = 4'd14;  // write: packet decision

  // ALU operations as seen by the two-stage ALU
  typedef enum logic [2:0] {
    ALU_AND  = 3'd0,
    ALU_OR   = 3'd1,
    ALU_NOT  = 3'd2,
    ALU_ADD  = 3'd3,
    ALU_SUB  = 3'd4,
    ALU_PASS = 3'd5   // result = b (load immediate, move)
  } alu_op_e;

endpackage
