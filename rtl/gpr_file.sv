// gpr_file: general purpose register file of the DLX subset processor.
//
// NREGS registers of WIDTH bits. Register 0 always reads 0 and ignores
// writes. Two combinational read ports serve the execution unit (the two
// source operands of an instruction) and a third serves a debug/observation
// port. One synchronous write port stores wdata into register waddr at the
// rising clock edge when we is high; a write followed by a read of the same
// register returns the written value, and a later write to a register
// replaces the earlier one, which is the behaviour the specification's memory
// axioms demand. Reset clears every register to 0 (the specification's freshly
// created store holds one constant everywhere; taking that constant as 0 and
// clearing it at reset is this design's choice). Reset is synchronous and
// active low.
module gpr_file #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b,
  input  logic [AW-1:0]    raddr_dbg,
  output logic [WIDTH-1:0] rdata_dbg,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a   = (raddr_a   == '0) ? '0 : regs[raddr_a];
  assign rdata_b   = (raddr_b   == '0) ? '0 : regs[raddr_b];
  assign rdata_dbg = (raddr_dbg == '0) ? '0 : regs[raddr_dbg];

endmodule
