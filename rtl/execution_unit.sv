// execution_unit: the DLX subset processor's sequencer and datapath.
//
// The unit holds the program counter and, in every clock cycle in which run is
// high, carries out one step of the specification's exe operation: it fetches
// mem[pc], decodes it, reads its registers, executes it and commits the new
// state (pc, register file, memory) at the rising edge. There is no pipeline,
// so one instruction completes per cycle. The PC counts words: the next
// instruction is at pc + 1.
//
//   NOP   pc <- pc + 1
//   ADD   rd <- rs1 + rs2            (bounded natural sum, Overflow -> Maxint)
//   SLL   rd <- rs1 << rs2           (low bits filled with 0)
//   LW    rd <- mem[rs1 + imm16]
//   SW    mem[rs1 + imm16] <- rd
//   BNEZ  pc <- pc + imm16 if rs1 != 0, else pc + 1
//   J     pc <- pc + off26
//   JR    pc <- rs1
//
// These effects follow the specification. ADD and pc + 1 use the saturating
// bounded-natural adder; address and branch-target sums add a sign-extended
// immediate modulo 2**32, since signed integers are left unspecified there.
//
// Exceptions. A word labelled UNDEFINSTR or TBSL by the decoder, a PC outside
// the memory, or an LW/SW address outside the memory puts the unit in the
// ERRORINFETCH state: nothing of the failing instruction is committed, pc
// keeps pointing at it, err gives the cause and the unit stops until reset.
// Stopping there is this design's choice; the specification names the state
// but gives no handler. An ADD overflow is not an error: the sum is recovered
// on Maxint and ovf pulses.
//
// Timing: the register file and the memory read ports are combinational, so
// the whole instruction is one cycle from pc to the next edge. retire pulses
// for one cycle with every executed instruction. Reset is synchronous, active
// low, and sets pc to 0 (this design's choice).
module execution_unit
  import dlx_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  run,
  // instruction fetch port of the memory
  output word_t f_addr,
  input  word_t f_rdata,
  input  logic  f_oom,
  // data port of the memory
  output word_t d_addr,
  input  word_t d_rdata,
  output logic  d_we,
  output word_t d_wdata,
  input  logic  d_oom,
  // register file
  output ridx_t rf_raddr_a,
  input  word_t rf_rdata_a,
  output ridx_t rf_raddr_b,
  input  word_t rf_rdata_b,
  output logic  rf_we,
  output ridx_t rf_waddr,
  output word_t rf_wdata,
  // status
  output word_t pc,
  output err_e  err,
  output logic  halted,
  output logic  retire,
  output logic  ovf,
  output logic  taken
);

  fields_t f;
  instr_e  kind;
  label_e  label;

  instr_decoder u_dec (.instr(f_rdata), .fields(f), .kind(kind), .label(label));

  word_t pc_next_seq, add_res, addr_res, br_res, sll_res, br_off;
  logic  add_ovf, pc_ovf, addr_ovf, br_ovf;

  // pc + 1, bounded natural successor
  natb_adder #(.WIDTH(XLEN), .SATURATE(1'b1)) u_pc_inc (
    .a(pc), .b(word_t'(1)), .cin(1'b0), .sum(pc_next_seq), .overflow(pc_ovf));

  // ADD: bounded natural sum of the two source registers
  natb_adder #(.WIDTH(XLEN), .SATURATE(1'b1)) u_alu_add (
    .a(rf_rdata_a), .b(rf_rdata_b), .cin(1'b0), .sum(add_res), .overflow(add_ovf));

  // LW/SW address: base register + sign-extended 16-bit offset
  natb_adder #(.WIDTH(XLEN), .SATURATE(1'b0)) u_addr_add (
    .a(rf_rdata_a), .b(word_t'(signed'(f.imm16))), .cin(1'b0), .sum(addr_res),
    .overflow(addr_ovf));

  // BNEZ/J target: pc + sign-extended offset
  assign br_off = (kind == I_J) ? word_t'(signed'(f.off26)) : word_t'(signed'(f.imm16));
  natb_adder #(.WIDTH(XLEN), .SATURATE(1'b0)) u_br_add (
    .a(pc), .b(br_off), .cin(1'b0), .sum(br_res), .overflow(br_ovf));

  // SLL
  sll_shifter #(.WIDTH(XLEN)) u_sll (.din(rf_rdata_a), .count(rf_rdata_b), .dout(sll_res));

  // Register and memory addressing
  assign f_addr     = pc;
  assign rf_raddr_a = f.rs1;
  assign rf_raddr_b = f.rs2;   // rs2 (R-type) and the SW data register share bits 20:16
  assign d_addr     = addr_res;
  assign d_wdata    = rf_rdata_b;

  logic  active, mem_op, fault;
  err_e  fault_cause;
  word_t pc_next;

  assign active = run && (err == ERR_NONE);
  assign mem_op = (kind == I_LW) || (kind == I_SW);

  always_comb begin
    fault       = 1'b1;
    fault_cause = ERR_NONE;
    if (f_oom)                       fault_cause = ERR_FETCH_OOM;
    else if (label == LBL_UNDEFINSTR) fault_cause = ERR_UNDEFINSTR;
    else if (label == LBL_TBSL)       fault_cause = ERR_TBSL;
    else if (mem_op && d_oom)        fault_cause = ERR_DATA_OOM;
    else                             fault       = 1'b0;
  end

  always_comb begin
    pc_next  = pc_next_seq;
    taken    = 1'b0;
    rf_we    = 1'b0;
    rf_waddr = f.rd_r;
    rf_wdata = add_res;
    unique case (kind)
      I_ADD:  begin rf_we = 1'b1; rf_waddr = f.rd_r; rf_wdata = add_res; end
      I_SLL:  begin rf_we = 1'b1; rf_waddr = f.rd_r; rf_wdata = sll_res; end
      I_LW:   begin rf_we = 1'b1; rf_waddr = f.rd_i; rf_wdata = d_rdata; end
      I_BNEZ: if (rf_rdata_a != '0) begin pc_next = br_res; taken = 1'b1; end
      I_J:    begin pc_next = br_res;     taken = 1'b1; end
      I_JR:   begin pc_next = rf_rdata_a; taken = 1'b1; end
      default: ;
    endcase
    rf_we = rf_we && active && !fault;
    taken = taken && active && !fault;
  end

  assign d_we   = (kind == I_SW) && active && !fault;
  assign retire = active && !fault;
  assign ovf    = retire && (kind == I_ADD) && add_ovf;
  assign halted = (err != ERR_NONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc  <= '0;
      err <= ERR_NONE;
    end else if (active) begin
      if (fault) err <= fault_cause;
      else       pc  <= pc_next;
    end
  end

  // A store never reaches the memory with an out-of-range address, and the
  // unit never leaves the error state without a reset.
  a_no_oom_store: assert property (@(posedge clk) disable iff (!rst_n) d_we |-> !d_oom);
  a_err_sticky:   assert property (@(posedge clk) disable iff (!rst_n)
                                   (err != ERR_NONE) |=> (err == $past(err)));

endmodule
