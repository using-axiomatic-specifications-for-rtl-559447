// tb_ext_memory: checks the external memory against an array model.
//
// Words are written through the host and the data ports and read back through
// all three read ports. Indices at and beyond the last word check the
// OutOfMemory flags (index MEM_SIZE is the first one out of range) and that
// out-of-range writes change nothing; simultaneous host and data writes to one
// word check that the host write is kept.
module tb_ext_memory;
  localparam int unsigned SIZE = 1024;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] f_addr, f_rdata, d_addr, d_rdata, d_wdata, h_addr, h_rdata, h_wdata;
  logic        f_oom, d_oom, h_oom, d_we, h_we;
  logic [31:0] model [SIZE];
  int checks = 0, failures = 0;

  ext_memory #(.MEM_SIZE(SIZE), .WIDTH(32)) dut (.clk, .f_addr, .f_rdata, .f_oom,
    .d_addr, .d_rdata, .d_we, .d_wdata, .d_oom, .h_addr, .h_rdata, .h_we, .h_wdata, .h_oom);

  task automatic expect_read(logic [31:0] idx);
    logic oob;
    logic [31:0] exp;
    oob = (idx >= SIZE);
    exp = oob ? 32'h0 : model[idx];
    f_addr = idx; d_addr = idx; h_addr = idx;
    #1;
    checks++;
    if (f_oom !== oob || d_oom !== oob || h_oom !== oob) begin
      failures++; $display("FAIL oom @%0d: %b%b%b", idx, f_oom, d_oom, h_oom);
    end
    checks++;
    if (f_rdata !== exp || d_rdata !== exp || h_rdata !== exp) begin
      failures++; $display("FAIL read @%0d: %h %h %h exp %h", idx, f_rdata, d_rdata, h_rdata, exp);
    end
  endtask

  task automatic wr(bit host, logic [31:0] idx, logic [31:0] val);
    @(negedge clk);
    h_we = host; d_we = !host;
    h_addr = idx; d_addr = idx; h_wdata = val; d_wdata = val;
    @(posedge clk); #1;
    h_we = 0; d_we = 0;
    if (idx < SIZE) model[idx] = val;
  endtask

  initial begin
    h_we = 0; d_we = 0; f_addr = 0; d_addr = 0; h_addr = 0; h_wdata = 0; d_wdata = 0;
    // fill everything through the host port
    for (int i = 0; i < SIZE; i++) wr(1'b1, i, $urandom);
    for (int i = 0; i < SIZE; i++) expect_read(i);
    // data-port writes, including out-of-range ones that must be dropped
    for (int i = 0; i < 400; i++) begin
      logic [31:0] idx;
      idx = (i % 5 == 0) ? (SIZE + 32'($urandom % 8)) : 32'($urandom % SIZE);
      if (i % 7 == 0) idx = 32'hFFFF_FFF0 + 32'($urandom % 16);
      wr(1'b0, idx, $urandom);
      expect_read(idx);
      expect_read($urandom % SIZE);
    end
    // boundary
    expect_read(SIZE - 1); expect_read(SIZE); expect_read(SIZE + 1);
    // host wins over data port
    @(negedge clk);
    h_we = 1; d_we = 1; h_addr = 7; d_addr = 7; h_wdata = 32'hAAAA_5555; d_wdata = 32'h1234_5678;
    @(posedge clk); #1; h_we = 0; d_we = 0; model[7] = 32'hAAAA_5555;
    expect_read(7);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
