// tb_natb_adder: checks the bounded natural adder, saturating and wrapping.
//
// Random and corner-case operand pairs are applied to both variants; the
// expected sum and Overflow flag come from a 33-bit integer addition: the
// flag is bit 32, the saturating sum is all ones when it is set, the wrapping
// sum is the low 32 bits.
module tb_natb_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b, s_sat, s_wrap;
  logic        cin, o_sat, o_wrap;
  int checks = 0, failures = 0;

  natb_adder #(.WIDTH(32), .SATURATE(1'b1)) dut_sat  (.a, .b, .cin, .sum(s_sat),  .overflow(o_sat));
  natb_adder #(.WIDTH(32), .SATURATE(1'b0)) dut_wrap (.a, .b, .cin, .sum(s_wrap), .overflow(o_wrap));

  task automatic check(logic [31:0] x, logic [31:0] y, logic ci);
    logic [32:0] ref_s;
    a = x; b = y; cin = ci;
    @(posedge clk);
    ref_s = {1'b0, x} + {1'b0, y} + 33'(ci);
    checks++;
    if (o_sat !== ref_s[32] || o_wrap !== ref_s[32]) begin
      failures++; $display("FAIL ovf %h+%h+%0d: %0d %0d", x, y, ci, o_sat, o_wrap);
    end
    checks++;
    if (s_wrap !== ref_s[31:0]) begin
      failures++; $display("FAIL wrap %h+%h: %h", x, y, s_wrap);
    end
    checks++;
    if (s_sat !== (ref_s[32] ? 32'hFFFF_FFFF : ref_s[31:0])) begin
      failures++; $display("FAIL sat %h+%h: %h", x, y, s_sat);
    end
  endtask

  initial begin
    check(32'd0, 32'd0, 1'b0);
    check(32'd5, 32'd0, 1'b0);               // n + 0 = n
    check(32'hFFFF_FFFF, 32'd1, 1'b0);        // succ(Maxint) -> Overflow, Maxint
    check(32'hFFFF_FFFE, 32'd1, 1'b0);        // reaches Maxint without Overflow
    check(32'h8000_0000, 32'h8000_0000, 1'b0);
    check(32'h7FFF_FFFF, 32'h7FFF_FFFF, 1'b1);
    check(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check(32'h0F0F_0F0F, 32'hF0F0_F0F0, 1'b1); // carry ripples through every bit
    for (int i = 0; i < 2000; i++) check($urandom, $urandom, 1'($urandom));
    for (int i = 0; i < 500; i++) check($urandom, $urandom & 32'hFF, 1'b0);
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
