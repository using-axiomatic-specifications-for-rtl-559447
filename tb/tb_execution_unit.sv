// tb_execution_unit: runs random programs on the execution unit alone.
//
// The testbench provides the unit's memory and register file as plain arrays
// and runs each program instruction by instruction against the dlx_ref
// interpreter: every cycle it compares whether an instruction completed, the
// new PC and the error state; at the end of each program it compares all
// registers and all memory words. It also checks that one instruction
// completes per cycle while the unit runs, that run = 0 freezes it, and that
// every error cause was reached at least once. A program that loops back
// through JR runs until a cycle limit.
module tb_execution_unit;
  import dlx_pkg::*;
  import dlx_ref_pkg::*;

  localparam int unsigned SIZE = 256;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic  rst_n, run;
  word_t f_addr, f_rdata, d_addr, d_rdata, d_wdata, rf_rdata_a, rf_rdata_b, rf_wdata, pc;
  logic  f_oom, d_oom, d_we, rf_we, halted, retire, ovf, taken;
  ridx_t rf_raddr_a, rf_raddr_b, rf_waddr;
  err_e  err;

  word_t mem [SIZE];
  word_t rf  [32];

  execution_unit dut (.*);

  assign f_oom   = (f_addr >= SIZE);
  assign f_rdata = f_oom ? '0 : mem[f_addr[7:0]];
  assign d_oom   = (d_addr >= SIZE);
  assign d_rdata = d_oom ? '0 : mem[d_addr[7:0]];
  assign rf_rdata_a = (rf_raddr_a == 0) ? '0 : rf[rf_raddr_a];
  assign rf_rdata_b = (rf_raddr_b == 0) ? '0 : rf[rf_raddr_b];

  always @(posedge clk) begin
    if (d_we && !d_oom) mem[d_addr[7:0]] <= d_wdata;
    if (rf_we && rf_waddr != 0) rf[rf_waddr] <= rf_wdata;
  end

  int checks = 0, failures = 0;
  int seen_err [5];
  int n_ovf = 0, n_taken = 0, n_instr = 0, n_cycles = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  task automatic run_program(dlx_ref m);
    bit exec;
    foreach (mem[i]) mem[i] = m.mem[i];
    foreach (rf[i]) rf[i] = '0;
    run = 1'b0; rst_n = 1'b0;
    @(posedge clk); #1;
    rst_n = 1'b1;
    // run held low: nothing may change
    @(posedge clk); #1;
    checks++;
    if (pc !== 0 || err !== ERR_NONE || retire !== 1'b0) fail("frozen while run=0");
    run = 1'b1;
    #1;
    for (int cyc = 0; cyc < 2000 && m.err == E_NONE; cyc++) begin
      exec = m.step();
      checks++;
      if (retire !== exec) fail($sformatf("retire %0d exp %0d at pc %0d", retire, exec, pc));
      if (exec) n_instr++;
      n_cycles++;
      if (ovf)   n_ovf++;
      if (taken) n_taken++;
      @(posedge clk); #1;
      checks++;
      if (pc !== m.pc || int'(err) != m.err)
        fail($sformatf("pc %0d err %0d, exp pc %0d err %0d", pc, err, m.pc, m.err));
    end
    checks++;
    if (halted !== (m.err != E_NONE)) fail("halted flag wrong");
    seen_err[m.err]++;
    for (int r = 0; r < 32; r++) begin
      checks++;
      if (((r == 0) ? 32'h0 : rf[r]) !== m.regs[r]) fail($sformatf("r%0d %h exp %h", r, rf[r], m.regs[r]));
    end
    for (int i = 0; i < SIZE; i++) begin
      checks++;
      if (mem[i] !== m.mem[i]) fail($sformatf("mem[%0d] %h exp %h", i, mem[i], m.mem[i]));
    end
    // the error state holds (a program that loops is stopped by the
    // cycle limit instead; it simply keeps running)
    if (m.err == E_NONE) return;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (pc !== m.pc || int'(err) != m.err || retire) fail("error state did not hold");
  endtask

  initial begin
    dlx_ref m;
    int ref_ovf = 0, ref_taken = 0;
    run = 0; rst_n = 0;
    foreach (seen_err[i]) seen_err[i] = 0;
    for (int t = 0; t < 60; t++) begin
      m = new(SIZE);
      m.gen_random(40 + int'($urandom % 80));
      if (t == 1) m.mem[25] = i_multf(4, 5, 6);              // TBSL
      if (t == 2) m.mem[25] = i_j(400);                      // fetch outside memory
      if (t == 3) m.mem[25] = i_lw(4, 0, 300);               // data outside memory
      if (t == 4) begin m.mem[19] = i_lw(2, 0, 200); m.mem[200] = 32'hFFFF_FF00;
                        m.mem[20] = i_add(5, 2, 2); end      // ADD overflow
      run_program(m);
      ref_ovf += m.n_ovf; ref_taken += m.n_taken;
    end
    checks++;
    if (n_ovf != ref_ovf || n_taken != ref_taken)
      fail($sformatf("ovf %0d/%0d taken %0d/%0d", n_ovf, ref_ovf, n_taken, ref_taken));
    for (int e = 1; e <= 4; e++) begin
      checks++;
      if (seen_err[e] == 0) fail($sformatf("error cause %0d never reached", e));
    end
    $display("instructions %0d in %0d running cycles, ovf %0d, taken %0d, errors %0d/%0d/%0d/%0d",
             n_instr, n_cycles, n_ovf, n_taken, seen_err[1], seen_err[2], seen_err[3], seen_err[4]);
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
