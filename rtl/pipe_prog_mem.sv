// pipe_prog_mem - two-stage pipelined program memory of the pipelined C&C.
//
// The pipelined C&C clocks far above the network rate, so its program memory
// is split into two register stages: the fetch address is registered in the
// first cycle, the array is read and the word registered in the second. The
// word for the address presented in cycle t is on rdata in cycle t+2. en low
// freezes both stages (pipeline stall). The output register resets to zero,
// which decodes as a no-operation. One synchronous write port loads the
// program. That the memory must be pipelined follows the design description;
// its organisation is this design's choice.
module pipe_prog_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned W     = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr_q <= '0;
      rdata  <= '0;
    end else if (en) begin
      addr_q <= raddr;
      rdata  <= mem[addr_q];
    end
  end

endmodule
