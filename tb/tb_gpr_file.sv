// tb_gpr_file: checks the register file against an array model.
//
// After reset every register must read 0. Random writes (including writes to
// register 0, which must be ignored) are mirrored in a model, and all three
// read ports are compared with it after every write.
module tb_gpr_file;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst_n, we;
  logic [4:0]  ra, rb, rdbg, wa;
  logic [31:0] da, db, ddbg, wd;
  logic [31:0] model [32];
  int checks = 0, failures = 0;

  gpr_file #(.NREGS(32), .WIDTH(32)) dut (
    .clk, .rst_n, .raddr_a(ra), .rdata_a(da), .raddr_b(rb), .rdata_b(db),
    .raddr_dbg(rdbg), .rdata_dbg(ddbg), .we, .waddr(wa), .wdata(wd));

  task automatic compare_all();
    for (int r = 0; r < 32; r++) begin
      ra = 5'(r); rb = 5'(31 - r); rdbg = 5'(r);
      #1;
      checks++;
      if (da !== model[r] || db !== model[31 - r] || ddbg !== model[r]) begin
        failures++; $display("FAIL reg %0d: %h %h %h", r, da, db, ddbg);
      end
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra = 0; rb = 0; rdbg = 0;
    foreach (model[i]) model[i] = '0;
    rst_n = 0;
    @(posedge clk); @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_all();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = 1'b1; wa = 5'($urandom); wd = $urandom;
      if (i % 17 == 0) wa = 5'd0;
      @(posedge clk); #1;
      if (wa != 0) model[wa] = wd;
      we = 1'b0;
      // a disabled write must not change anything
      wa = 5'($urandom); wd = $urandom;
      @(posedge clk); #1;
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
