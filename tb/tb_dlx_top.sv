// tb_dlx_top: end-to-end test of the DLX subset processor at its default size.
//
// Programs are loaded through the host port and run to completion:
//   - a prefix-sum loop (LW, ADD, SW, SLL as loop counter, BNEZ back, JR, J,
//     a write to R0 that must be ignored, an undefined op-code to stop), run
//     once with small numbers and once with large ones so that ADD saturates;
//     its results are compared with sums computed here, and its cycle count
//     with the one-instruction-per-cycle rate;
//   - one program per error cause (undefined op-code, MULTF, PC running off
//     the end of memory through a NOP sled, LW/SW outside memory);
//   - random programs checked cycle by cycle against the dlx_ref interpreter.
// Each mechanism (every instruction, branch taken and not taken, ADD
// overflow, R0 write, each error cause, run held low) is counted, and one
// that never happened counts as a failure.
module tb_dlx_top;
  import dlx_pkg::*;
  import dlx_ref_pkg::*;

  localparam int unsigned SIZE = 1024;   // dlx_top's default memory size
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst_n, run, h_we, h_oom, halted, retire, ovf, taken;
  word_t h_addr, h_wdata, h_rdata, dbg_reg_data, pc;
  ridx_t dbg_reg_addr;
  err_e  err;

  dlx_top dut (.*);

  int checks = 0, failures = 0;
  typedef enum int {
    M_NOP, M_ADD, M_SLL, M_LW, M_SW, M_BNEZ_T, M_BNEZ_N, M_J, M_JR, M_OVF, M_R0,
    M_E_UNDEF, M_E_TBSL, M_E_FOOM, M_E_DOOM, M_FREEZE, M_COUNT
  } mech_e;
  int mech [M_COUNT];
  string mech_name [M_COUNT] = '{"NOP", "ADD", "SLL", "LW", "SW", "BNEZ taken", "BNEZ not taken",
    "J", "JR", "ADD overflow", "write to R0", "UNDEFINSTR stop", "TBSL stop",
    "fetch OutOfMemory", "data OutOfMemory", "run held low"};

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  function automatic void count_instr(logic [31:0] w, logic [31:0] a);
    logic [5:0] op, fn;
    op = w[31:26]; fn = w[5:0];
    if (op == 0 && fn == 0)  mech[M_NOP]++;
    if (op == 0 && fn == 32) mech[M_ADD]++;
    if (op == 0 && fn == 4)  mech[M_SLL]++;
    if (op == 0 && (fn == 32 || fn == 4) && w[15:11] == 0) mech[M_R0]++;
    if (op == 35) mech[M_LW]++;
    if (op == 43) mech[M_SW]++;
    if (op == 5)  mech[(a != 0) ? M_BNEZ_T : M_BNEZ_N]++;
    if (op == 2)  mech[M_J]++;
    if (op == 3)  mech[M_JR]++;
  endfunction

  task automatic load(dlx_ref m);
    run = 1'b0; rst_n = 1'b0;
    for (int i = 0; i < SIZE; i++) begin
      @(negedge clk);
      h_we = 1'b1; h_addr = i; h_wdata = m.mem[i];
    end
    @(negedge clk);
    h_we = 1'b0; rst_n = 1'b1;
    // run held low: the processor must not move
    repeat (2) @(negedge clk);
    checks++;
    if (pc !== 0 || retire !== 1'b0 || halted !== 1'b0) fail("moved while run was low");
    else mech[M_FREEZE]++;
  endtask

  // Runs the loaded program against the interpreter; returns the cycles run.
  task automatic execute(dlx_ref m, int max_cycles, output int cycles, output int retired);
    bit exec;
    logic [31:0] w, a;
    cycles = 0; retired = 0;
    @(negedge clk);
    run = 1'b1;
    while (cycles < max_cycles && m.err == E_NONE) begin
      #1;
      w = (m.pc < SIZE) ? m.mem[m.pc] : 32'h0;
      a = m.regs[w[25:21]];
      exec = m.step();
      if (exec) count_instr(w, a);
      checks++;
      if (retire !== exec) fail($sformatf("retire %0d exp %0d at pc %0d", retire, exec, pc));
      if (ovf) mech[M_OVF]++;
      retired += int'(retire);
      cycles++;
      @(negedge clk);
      checks++;
      if (pc !== m.pc || int'(err) != m.err)
        fail($sformatf("pc %0d err %0d, exp pc %0d err %0d", pc, err, m.pc, m.err));
    end
    run = 1'b0;
    checks++;
    if (halted !== (m.err != E_NONE)) fail("halted flag wrong");
    case (m.err)
      E_UNDEF: mech[M_E_UNDEF]++;
      E_TBSL:  mech[M_E_TBSL]++;
      E_FOOM:  mech[M_E_FOOM]++;
      E_DOOM:  mech[M_E_DOOM]++;
      default: ;
    endcase
    // registers and memory against the interpreter
    for (int r = 0; r < 32; r++) begin
      dbg_reg_addr = 5'(r); #1;
      checks++;
      if (dbg_reg_data !== m.regs[r]) fail($sformatf("r%0d %h exp %h", r, dbg_reg_data, m.regs[r]));
    end
    for (int i = 0; i < SIZE; i++) begin
      h_addr = i; #1;
      checks++;
      if (h_rdata !== m.mem[i]) fail($sformatf("mem[%0d] %h exp %h", i, h_rdata, m.mem[i]));
    end
  endtask

  // Prefix sums of N words at SRC into DST, counted down by shifting a one
  // out of r5.
  localparam int N = 16, SRC = 512, DST = 600, K = 700;
  task automatic prefix_sum(bit big);
    dlx_ref m;
    logic [31:0] src [N];
    logic [32:0] s;
    int cycles, retired;
    m = new(SIZE);
    for (int i = 0; i < N; i++) begin
      src[i] = big ? $urandom : ($urandom & 32'h00FF_FFFF);
      m.mem[SRC + i] = src[i];
    end
    m.mem[K] = SRC; m.mem[K+1] = DST; m.mem[K+2] = 1; m.mem[K+3] = 32'h1 << (32 - N); m.mem[K+4] = 20;
    m.mem[0]  = i_lw(1, 0, K);
    m.mem[1]  = i_lw(2, 0, K + 1);
    m.mem[2]  = i_lw(9, 0, K + 2);
    m.mem[3]  = i_lw(5, 0, K + 3);
    m.mem[4]  = i_add(8, 0, 0);
    m.mem[5]  = i_lw(7, 1, 0);        // loop:
    m.mem[6]  = i_add(8, 8, 7);
    m.mem[7]  = i_sw(8, 2, 0);
    m.mem[8]  = i_add(1, 1, 9);
    m.mem[9]  = i_add(2, 2, 9);
    m.mem[10] = i_sll(5, 5, 9);
    m.mem[11] = i_bnez(5, -6);
    m.mem[12] = i_lw(10, 0, K + 4);
    m.mem[13] = i_jr(10);
    for (int i = 14; i < 20; i++) m.mem[i] = i_multf(1, 2, 3);   // skipped by JR
    m.mem[20] = i_add(0, 8, 8);       // R0 stays 0
    m.mem[21] = i_j(2);
    m.mem[22] = i_multf(1, 2, 3);     // skipped by J
    m.mem[23] = i_undef();
    load(m);
    execute(m, 1000, cycles, retired);
    // results worked out directly
    s = 0;
    for (int i = 0; i < N; i++) begin
      s = s + {1'b0, src[i]};
      if (s[32]) s = {1'b0, 32'hFFFF_FFFF};
      h_addr = DST + i; #1;
      checks++;
      if (h_rdata !== s[31:0]) fail($sformatf("prefix[%0d] %h exp %h", i, h_rdata, s[31:0]));
    end
    dbg_reg_addr = 0; #1;
    checks++;
    if (dbg_reg_data !== 0) fail("R0 not zero");
    // 5 + 7 per iteration + LW, JR, ADD, J = N*7 + 9 instructions, one per
    // cycle, and the stop in the following cycle
    checks++;
    if (retired != N * 7 + 9 || cycles != N * 7 + 10)
      fail($sformatf("prefix sum took %0d cycles for %0d instructions", cycles, retired));
    checks++;
    if (err !== ERR_UNDEFINSTR || pc !== 23) fail("prefix sum did not stop at the undefined op-code");
  endtask

  task automatic error_program(int kind);
    dlx_ref m;
    int cycles, retired;
    m = new(SIZE);
    m.mem[0] = i_lw(1, 0, 900);
    m.mem[900] = 32'hFFFF_FFF0;
    m.mem[1] = i_add(2, 1, 1);         // overflow, recovered on Maxint
    case (kind)
      0: m.mem[2] = i_undef();
      1: m.mem[2] = i_multf(3, 1, 1);
      2: ;                             // NOPs up to the end of memory
      3: m.mem[2] = i_lw(3, 1, 0);     // address FFFFFFF0
      4: m.mem[2] = i_sw(3, 0, SIZE);  // first index past the end
      default: ;
    endcase
    load(m);
    execute(m, 2 * SIZE, cycles, retired);
    checks++;
    if (retired != cycles - 1) fail("error program: not one instruction per cycle");
  endtask

  initial begin
    dlx_ref m;
    int cycles, retired;
    run = 0; rst_n = 0; h_we = 0; h_addr = 0; h_wdata = 0; dbg_reg_addr = 0;
    foreach (mech[i]) mech[i] = 0;
    prefix_sum(1'b0);
    prefix_sum(1'b1);
    for (int k = 0; k < 5; k++) error_program(k);
    for (int t = 0; t < 12; t++) begin
      m = new(SIZE);
      m.gen_random(100 + int'($urandom % 200));
      load(m);
      execute(m, 3000, cycles, retired);
    end
    for (int i = 0; i < M_COUNT; i++) begin
      $display("%-18s %0d", mech_name[i], mech[i]);
      checks++;
      if (mech[i] == 0) fail($sformatf("%s never happened", mech_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
