// tb_sll_shifter: checks the logical left shifter.
//
// Every count from 0 to 40 and random counts are applied with random data;
// the expected value is the data multiplied by 2**count, truncated to 32 bits
// (0 once count reaches 32).
module tb_sll_shifter;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] din, count, dout;
  int checks = 0, failures = 0;

  sll_shifter #(.WIDTH(32)) dut (.din, .count, .dout);

  task automatic check(logic [31:0] d, logic [31:0] c);
    logic [63:0] prod;
    din = d; count = c;
    @(posedge clk);
    prod = (c >= 32) ? 64'd0 : (64'(d) * (64'd1 << c));
    checks++;
    if (dout !== prod[31:0]) begin
      failures++; $display("FAIL %h << %0d = %h", d, c, dout);
    end
  endtask

  initial begin
    for (int c = 0; c <= 40; c++) begin
      check(32'hFFFF_FFFF, c);
      check(32'h8000_0001, c);
      for (int k = 0; k < 20; k++) check($urandom, c);
    end
    check($urandom, 32'h8000_0000);
    check($urandom, 32'h0000_0100);
    for (int k = 0; k < 500; k++) check($urandom, $urandom);
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
