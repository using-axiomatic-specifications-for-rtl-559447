// ext_memory: external word memory of the DLX subset processor.
//
// MEM_SIZE words of WIDTH bits, indexed by word (index i is word i), holding
// both the program and its data. Every port takes a full WIDTH-bit index and
// raises its OutOfMemory flag when the index is MEM_SIZE or more; an index
// computed from a negative offset wraps to a large value and is caught the
// same way. An out-of-range read returns 0 and an out-of-range write changes
// nothing.
//
// Ports: a combinational instruction-fetch read port (f_*), a combinational
// data read port and a synchronous data write port for LW/SW (d_*), and a host
// port (h_*) through which a program is loaded and results are read back. Both
// writes happen at the rising clock edge; when the host and the processor
// write in the same cycle the host write is the one kept. There is no reset:
// the memory starts with whatever is loaded into it.
//
// The specification gives the memory's behaviour (last write wins, reads
// return the last value written, OutOfMemory outside the index range) but not
// its size; MEM_SIZE = 1024 words is this design's choice.
module ext_memory #(
  parameter int unsigned MEM_SIZE = 1024,
  parameter int unsigned WIDTH    = 32,
  localparam int unsigned AW      = $clog2(MEM_SIZE)
) (
  input  logic             clk,
  // instruction fetch
  input  logic [WIDTH-1:0] f_addr,
  output logic [WIDTH-1:0] f_rdata,
  output logic             f_oom,
  // data access
  input  logic [WIDTH-1:0] d_addr,
  output logic [WIDTH-1:0] d_rdata,
  input  logic             d_we,
  input  logic [WIDTH-1:0] d_wdata,
  output logic             d_oom,
  // host access
  input  logic [WIDTH-1:0] h_addr,
  output logic [WIDTH-1:0] h_rdata,
  input  logic             h_we,
  input  logic [WIDTH-1:0] h_wdata,
  output logic             h_oom
);

  logic [WIDTH-1:0] mem [MEM_SIZE];

  assign f_oom = (f_addr >= WIDTH'(MEM_SIZE));
  assign d_oom = (d_addr >= WIDTH'(MEM_SIZE));
  assign h_oom = (h_addr >= WIDTH'(MEM_SIZE));

  assign f_rdata = f_oom ? '0 : mem[f_addr[AW-1:0]];
  assign d_rdata = d_oom ? '0 : mem[d_addr[AW-1:0]];
  assign h_rdata = h_oom ? '0 : mem[h_addr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (h_we && !h_oom)      mem[h_addr[AW-1:0]] <= h_wdata;
    else if (d_we && !d_oom) mem[d_addr[AW-1:0]] <= d_wdata;
  end

endmodule
