// csacc2: carry-save accumulator slice for operands that are themselves in
// carry-save form (CSACC2).
//
// In multiply-accumulate mode each finished product leaves CSACC1 as a
// sum/carry pair; CSACC2 adds both vectors to its own running pair with two
// rows of full adders (a 4-to-2 compressor), without carry propagation.
// In motion-estimation mode it is used with `clr` set, which simply re-codes
// and holds the incoming pair: it is then the latch between the accumulator
// and the converter.
//
// Slices cascade: each row's carry out of the top bit (cout[0] for the first
// row, cout[1] for the second) enters the slice above as cin, in the free
// LSB of that row's shifted carry vector. A single slice, with cin tied to 0,
// works modulo 2**WIDTH. `clr` starts a new sum with the current operand
// pair as its first term. Results are registered; rst clears the state.
module csacc2 #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             clr,
  input  logic [WIDTH-1:0] in_sum,
  input  logic [WIDTH-1:0] in_carry,
  input  logic [1:0]       cin,
  output logic [1:0]       cout,
  output logic [WIDTH-1:0] sum_q,
  output logic [WIDTH-1:0] carry_q
);
  logic [WIDTH-1:0] s_in, c_in, s1, m1, c1, s2, m2;

  always_comb begin
    s_in = clr ? '0 : sum_q;
    c_in = clr ? '0 : carry_q;
    // first row: stored pair plus in_sum
    s1 = s_in ^ c_in ^ in_sum;
    m1 = (s_in & c_in) | (s_in & in_sum) | (c_in & in_sum);
    c1 = {m1[WIDTH-2:0], cin[0]};
    // second row: plus in_carry
    s2 = s1 ^ c1 ^ in_carry;
    m2 = (s1 & c1) | (s1 & in_carry) | (c1 & in_carry);
  end

  assign cout = {m2[WIDTH-1], m1[WIDTH-1]};

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (en) begin
      sum_q   <= s2;
      carry_q <= {m2[WIDTH-2:0], cin[1]};
    end
  end
endmodule
