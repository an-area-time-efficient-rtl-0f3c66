// booth_ctrl: Booth recoder, multiple generator and sequencer for the
// multiply-accumulate mode of the four-core unit.
//
// In multiply mode the four cores' 16-bit CSACC1, CSACC2 and converter
// slices are cascaded into a 64-bit datapath (see me_vsp). This block drives
// that datapath. A product a*b of two's complement operands is formed one
// radix-4 Booth digit of b per clock: the digit (-2..+2) selects 0, a or 2a
// (2a through a shifter), a negative digit inverts that multiple in a 1's
// complementer and raises `neg`, which the datapath puts into the free carry
// LSB of CSACC1 to complete the negation. CSACC1 adds the multiple to four
// times its previous contents (c1_shift2); digits are taken most significant
// first, so with modulo-2**64 carry-save arithmetic no sign correction is
// needed. In the clock after the last digit CSACC1's pair is added into
// CSACC2 (c2_en), which holds the running sum of products, while CSACC1
// already starts the next product. One clock after the last product of a sum
// has entered CSACC2, cv_go loads all converter slices and starts the lowest;
// the others start in turn as the slice below finishes and hands over its
// carry.
//
// Interface and timing: a_i, b_i, op24, first and last are sampled when
// start and ready are both high. op24 = 0 multiplies the low 16 bits of the
// operands (8 digits, 8 clocks), op24 = 1 all 24 bits (12 digits). `first`
// makes the product the first term of a new sum, `last` closes the sum and
// triggers the conversion. prod_done (= c2_en) pulses when a product enters
// CSACC2. cv_done_last is the top converter slice's done; a sum must not
// close while the previous conversion runs (asserted). Handshake and
// sequencing are this implementation's own.
module booth_ctrl
  import me_pkg::*;
#(
  parameter int unsigned OPW = 24,      // widest operand
  parameter int unsigned MW  = MAC_W    // datapath width
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  start,
  input  logic                  op24,
  input  logic                  first,
  input  logic                  last,
  input  logic signed [OPW-1:0] a_i,
  input  logic signed [OPW-1:0] b_i,
  output logic                  ready,
  output logic                  prod_done,
  // to the cascaded CSACC1
  output logic                  c1_en,
  output logic                  c1_clr,
  output logic                  c1_shift2,
  output logic [MW-1:0]         pp,
  output logic                  neg,
  // to the cascaded CSACC2
  output logic                  c2_en,
  output logic                  c2_clr,
  // to the converter slices
  output logic                  cv_go,
  input  logic                  cv_done_last
);
  localparam int unsigned DW = $clog2(OPW / 2 + 1);

  logic signed [MW-1:0] a_q;
  logic [OPW:0]         b_q;       // b with the implicit 0 below bit 0
  logic [DW-1:0]        dig_q;     // index of the digit being added
  logic                 busy_q, first_q, last_q, lead_q;
  logic                 final_dig, take;

  assign final_dig = busy_q && (dig_q == '0);
  assign ready     = !busy_q || final_dig;
  assign take      = start && ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q  <= 1'b0;
      lead_q  <= 1'b0;
      dig_q   <= '0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
      a_q     <= '0;
      b_q     <= '0;
    end else if (take) begin
      busy_q  <= 1'b1;
      lead_q  <= 1'b1;
      first_q <= first;
      last_q  <= last;
      if (op24) begin
        a_q   <= MW'(a_i);
        b_q   <= {b_i, 1'b0};
        dig_q <= DW'(OPW / 2 - 1);
      end else begin
        a_q   <= MW'(signed'(a_i[15:0]));
        b_q   <= {{(OPW-16){b_i[15]}}, b_i[15:0], 1'b0};
        dig_q <= DW'(7);
      end
    end else if (busy_q) begin
      lead_q <= 1'b0;
      if (final_dig) busy_q <= 1'b0;
      else           dig_q  <= dig_q - 1'b1;
    end
  end

  // ---------------- Booth recoding and multiple selection ---------------
  logic [2:0]    trip;
  logic          one, two;
  logic [MW-1:0] mult;

  always_comb begin
    trip = b_q[2*dig_q +: 3];           // b[2j+1], b[2j], b[2j-1]
    neg  = busy_q && trip[2] && !(trip[1] && trip[0]);
    one  = trip[1] ^ trip[0];
    two  = (trip == 3'b100) || (trip == 3'b011);
    mult = two ? (a_q << 1) : (one ? a_q : '0);   // shifter: 2a
  end

  ones_comp #(.WIDTH(MW)) u_neg (.d(mult), .en(neg), .q(pp));

  assign c1_en     = busy_q;
  assign c1_clr    = lead_q;
  assign c1_shift2 = !lead_q;

  // ---------------- CSACC2 and conversion sequencing ----------------------
  logic p_first_q, p_last_q;
  always_ff @(posedge clk) begin
    if (rst) begin
      c2_en     <= 1'b0;
      p_first_q <= 1'b0;
      p_last_q  <= 1'b0;
      cv_go     <= 1'b0;
    end else begin
      c2_en     <= final_dig;
      p_first_q <= first_q;
      p_last_q  <= last_q;
      cv_go     <= c2_en && p_last_q;
    end
  end
  assign c2_clr    = p_first_q;
  assign prod_done = c2_en;

  // a sum must not close while the previous one is still being converted
  logic conv_busy_q;
  always_ff @(posedge clk) begin
    if (rst)               conv_busy_q <= 1'b0;
    else if (cv_go)        conv_busy_q <= 1'b1;
    else if (cv_done_last) conv_busy_q <= 1'b0;
  end
  always_ff @(posedge clk)
    if (!rst && cv_go) assert (!conv_busy_q) else $error("booth_ctrl: conversion overrun");

  initial assert (OPW >= 16 && OPW % 2 == 0) else $error("booth_ctrl: unsupported operand size");
endmodule
