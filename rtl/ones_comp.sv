// ones_comp: conditional 1's complementer ("1'S COMP" block).
//
// When `en` is high the word is bit-inverted, otherwise it passes unchanged.
// Together with a +1 injected at an adder's least significant carry input
// this forms a two's complement negation without a carry-propagate adder:
// the core uses it on the Y operand to turn x+y into x-y, and on the ADD
// result to turn a negative difference into its magnitude.
// Purely combinational.
module ones_comp #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] d,
  input  logic             en,
  output logic [WIDTH-1:0] q
);
  always_comb q = d ^ {WIDTH{en}};
endmodule
