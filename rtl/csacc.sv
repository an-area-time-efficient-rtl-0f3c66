// csacc: carry-save accumulator slice (CS ACC / CSACC1).
//
// The running total is kept as two vectors, sum_q and carry_q, whose
// arithmetic sum is the accumulated value. Each enabled clock one row of
// full adders merges sum_q, carry_q and the new addend; no carry propagates,
// so the clock only has to cover one full adder. The new carry vector is
// shifted left by one place, which leaves its least significant bit free:
// that bit takes `cin`. A core uses it to add the +1 that completes a two's
// complement negation whose bit inversion was done by a 1's complementer, so
// |x-y| is accumulated without ever being formed.
//
// `clr` starts a new sum: the stored vectors are taken as zero and the addend
// of this clock becomes the first term. `shift2` (multiply mode) multiplies
// the stored value by four before the addend is added: both vectors pass a
// 2-bit shifter first.
//
// Slices cascade into a wider accumulator: the top two bits of each
// (pre-shift) vector leave on sh_out_s/sh_out_c and enter the slice above on
// sh_in_s/sh_in_c, and the carry out of the top full adder (cout) is the
// slice above's cin. None of these paths goes through more than one full
// adder, so a cascade keeps the one-full-adder clock. A single slice works
// modulo 2**WIDTH. Results are registered one clock after the addend; rst
// clears both vectors.
module csacc #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  input  logic             clr,
  input  logic             shift2,
  input  logic [WIDTH-1:0] addend,
  input  logic             cin,
  input  logic [1:0]       sh_in_s,
  input  logic [1:0]       sh_in_c,
  output logic [1:0]       sh_out_s,
  output logic [1:0]       sh_out_c,
  output logic             cout,
  output logic [WIDTH-1:0] sum_q,
  output logic [WIDTH-1:0] carry_q
);
  logic [WIDTH-1:0] s_in, c_in, s_nx, maj;

  always_comb begin
    s_in     = clr ? '0 : sum_q;
    c_in     = clr ? '0 : carry_q;
    sh_out_s = s_in[WIDTH-1 -: 2];
    sh_out_c = c_in[WIDTH-1 -: 2];
    if (shift2) begin
      s_in = {s_in[WIDTH-3:0], sh_in_s};
      c_in = {c_in[WIDTH-3:0], sh_in_c};
    end
    s_nx = s_in ^ c_in ^ addend;
    maj  = (s_in & c_in) | (s_in & addend) | (c_in & addend);
  end

  assign cout = maj[WIDTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      sum_q   <= '0;
      carry_q <= '0;
    end else if (en) begin
      sum_q   <= s_nx;
      carry_q <= {maj[WIDTH-2:0], cin};
    end
  end
endmodule
