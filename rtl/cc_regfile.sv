// cc_regfile - general purpose register file of the pipelined C&C.
//
// NREG registers of W bits with two asynchronous read ports and one
// synchronous write port. The C&C keeps inter-packet values here, such as the
// running length and checksum result of a fragmented packet; a design that
// does not accept fragmented packets can leave it out. All registers reset to
// zero. A write and a read of the same register in one cycle return the old
// value; the C&C pipeline bypasses around this itself. Sizes and ports are
// this design's choices.
module cc_regfile #(
  parameter int unsigned NREG = 12,
  parameter int unsigned W    = 16,
  localparam int unsigned AW  = (NREG > 1) ? $clog2(NREG) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr_a,
  output logic [W-1:0]  rdata_a,
  input  logic [AW-1:0] raddr_b,
  output logic [W-1:0]  rdata_b,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata
);

  logic [W-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && (32'(waddr) < NREG)) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = (32'(raddr_a) < NREG) ? regs[raddr_a] : '0;
  assign rdata_b = (32'(raddr_b) < NREG) ? regs[raddr_b] : '0;

endmodule
