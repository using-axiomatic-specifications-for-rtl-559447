// sll_shifter: logical left shift of a bit array.
//
// Result bit n takes operand bit n-count when n >= count and 0 otherwise, so
// the count least significant bits are filled with 0 and every other bit moves
// count places up. This is the bit-by-bit definition of the specification's
// SLL, written here as one multiplexer per result bit. The whole count is
// used: a count of WIDTH or more gives 0. Using the full register value as the
// count, rather than its low five bits, is this design's reading of that
// definition.
//
// Purely combinational; no clock.
module sll_shifter #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] din,
  input  logic [WIDTH-1:0] count,
  output logic [WIDTH-1:0] dout
);

  always_comb begin
    for (int n = 0; n < WIDTH; n++) begin
      if (count <= WIDTH'(n)) dout[n] = din[n - int'(count)];
      else                    dout[n] = 1'b0;
    end
  end

endmodule
