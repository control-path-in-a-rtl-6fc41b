// sync_prog_mem - program memory of the synchronized C&C.
//
// DEPTH words of W bits with an asynchronous (same-cycle) read port, because
// the synchronized C&C must issue the instruction for the current network
// word in the cycle its program counter points at it. One synchronous write
// port loads the program. The content is cleared by reset so that every word
// read is defined. The design description names the program memory but gives
// no organisation; the read/write ports and the reset are this design's
// choices.
module sync_prog_mem #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned W     = 28,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (we) begin
      mem[waddr] <= wdata;
    end
  end

  assign rdata = mem[raddr];

endmodule
