// natb_adder: bounded natural number adder with overflow recovery.
//
// Adds two WIDTH-bit unsigned words with a chain of WIDTH full adders, bit 0
// first: sum bit n is a[n] xor b[n] xor carry, and the carry into bit n+1 is
// (a[n] and b[n]) or (carry and (a[n] xor b[n])), as the bit-array addition of
// the specification defines it. The addition is labelled Overflow when the top
// bit produces a carry, (a[W-1] and b[W-1]) or (carry and (a[W-1] or b[W-1])).
// With SATURATE set, an overflowing sum is recovered on Maxint (all ones), the
// exception handler of the bounded naturals; with SATURATE clear the sum wraps
// modulo 2**WIDTH, which is how this design adds signed offsets (the
// specification leaves signed integers unspecified).
//
// Purely combinational; no clock. cin is the carry into bit 0.
module natb_adder #(
  parameter int unsigned WIDTH    = 32,
  parameter bit          SATURATE = 1'b1
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             overflow
);

  logic [WIDTH-1:0] raw;
  logic [WIDTH:0]   carry;

  assign carry[0] = cin;

  for (genvar n = 0; n < WIDTH; n++) begin : g_full_adder
    assign raw[n]     = a[n] ^ b[n] ^ carry[n];
    assign carry[n+1] = (a[n] & b[n]) | (carry[n] & (a[n] ^ b[n]));
  end

  assign overflow = (a[WIDTH-1] & b[WIDTH-1]) |
                    (carry[WIDTH-1] & (a[WIDTH-1] | b[WIDTH-1]));
  assign sum      = (SATURATE && overflow) ? {WIDTH{1'b1}} : raw;

endmodule
