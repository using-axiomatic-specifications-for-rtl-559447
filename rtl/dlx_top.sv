// dlx_top: DLX integer-subset processor with its external memory.
//
// Three parts, wired as in the processor's specification: the execution unit
// (program counter, decoder, adders, shifter and the exe step), the general
// purpose register file and the external memory that holds program and data.
// The processor runs NOP, ADD, SLL, LW, SW, BNEZ, J and JR, one instruction
// per clock cycle while run is high, and stops in an error state on an
// undefined or unimplemented op-code or an out-of-range memory index.
//
// Use: hold rst_n low for a cycle with run low, load the program through the
// host port (h_we/h_addr/h_wdata, one word per cycle, word 0 is the first
// instruction), then raise run. halted goes high when the unit stops and err
// gives the reason; results are read through h_addr/h_rdata and
// dbg_reg_addr/dbg_reg_data. retire, ovf and taken pulse for one cycle when an
// instruction completes, an ADD overflows (and is recovered on Maxint) and a
// branch or jump changes the PC.
module dlx_top
  import dlx_pkg::*;
#(
  parameter int unsigned MEM_SIZE = 1024
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  // host access to the external memory
  input  word_t h_addr,
  input  logic  h_we,
  input  word_t h_wdata,
  output word_t h_rdata,
  output logic  h_oom,
  // register observation
  input  ridx_t dbg_reg_addr,
  output word_t dbg_reg_data,
  // status
  output word_t pc,
  output err_e  err,
  output logic  halted,
  output logic  retire,
  output logic  ovf,
  output logic  taken
);

  word_t f_addr, f_rdata, d_addr, d_rdata, d_wdata;
  logic  f_oom, d_oom, d_we;
  ridx_t rf_raddr_a, rf_raddr_b, rf_waddr;
  word_t rf_rdata_a, rf_rdata_b, rf_wdata;
  logic  rf_we;

  execution_unit u_exe (
    .clk, .rst_n, .run,
    .f_addr, .f_rdata, .f_oom,
    .d_addr, .d_rdata, .d_we, .d_wdata, .d_oom,
    .rf_raddr_a, .rf_rdata_a, .rf_raddr_b, .rf_rdata_b,
    .rf_we, .rf_waddr, .rf_wdata,
    .pc, .err, .halted, .retire, .ovf, .taken
  );

  gpr_file #(.NREGS(NREG), .WIDTH(XLEN)) u_gpr (
    .clk, .rst_n,
    .raddr_a(rf_raddr_a), .rdata_a(rf_rdata_a),
    .raddr_b(rf_raddr_b), .rdata_b(rf_rdata_b),
    .raddr_dbg(dbg_reg_addr), .rdata_dbg(dbg_reg_data),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  ext_memory #(.MEM_SIZE(MEM_SIZE), .WIDTH(XLEN)) u_mem (
    .clk,
    .f_addr, .f_rdata, .f_oom,
    .d_addr, .d_rdata, .d_we, .d_wdata, .d_oom,
    .h_addr, .h_rdata, .h_we, .h_wdata, .h_oom
  );

endmodule
