// me_core: one motion-estimation micro core.
//
// The core computes x+y (motion compensation), x-y (displaced frame
// difference) and, for block matching, the sum of |x-y| over a block,
// followed by a running minimum over candidate blocks. It uses one real
// carry-propagate adder only:
//
//   X-Register --------------------\
//   Y -> 1's comp (sub) -> Y-Reg ---> ADD (pipelined, cin) --> sum, OVR
//   sum -> 1's comp (when OVR=0) -> CSACC1 (LSB carry-in = not OVR)
//   CSACC1 -> CSACC2 (used as latch) -> CS/binary converter (bit-serial)
//          -> MMD (bit-serial)
//
// For x-y the Y operand is inverted and 1 is fed to the adder's carry input.
// The carry out OVR is 1 when x-y >= 0. When it is 0 the difference is
// negative, and its magnitude is ~(x-y)+1: the inversion is done by the second
// 1's complementer and the +1 is slipped into the free least significant bit
// of the accumulator's carry vector, so |x-y| is never formed on its own and
// the accumulator needs no carry propagation. Every BLOCK accumulated pixels
// the carry-save total passes unchanged through CSACC2 to the converter, whose
// serial output feeds the minimum detector; the detector records the
// candidate number as the tag of the best match.
//
// Interface and timing: x_i, y_i, op_i and vld_i are registered on entry
// (one clock), the ADD has LATENCY = 8 clocks (one full adder per stage),
// and the accumulator takes one more. add_sum/add_ovr/add_vld show the ADD
// result of every valid pixel (the DFD memory port). In OP_SAD, pixel number
// 0 of each block clears the accumulator and pixel BLOCK-1 closes the block;
// ACC_W+3 clocks after that pixel's ADD result sad_vld pulses with the
// block's error on sad, and in the same clock mmd_done pulses with
// min_sad/best_tag updated (the detector reads the converter's serial bits).
// A new pixel may enter every clock, so a block result leaves every BLOCK
// clocks. search_init starts a new search: it resets the minimum, the
// candidate number and the pixel count; it must not come while a block error
// is being converted. cin_ext_en/cin_ext replace the adder's carry input
// (used when two cores' adders are chained into a wider adder).
//
// With mac_mode set, the core's CSACC1, CSACC2 and converter become one
// 16-bit slice of a wider multiply-accumulate datapath: they take their
// controls, addend and cascade inputs from slice_i and report cascade
// outputs and the converted word on slice_o (see me_vsp and booth_ctrl).
// The adder path keeps working in this mode; the block counter, sad_vld and
// the minimum detector are idle.
//
// The structure follows the published block diagram, including CSACC1
// results passing through CSACC2 unchanged in motion-estimation mode. The
// register placement around the adder, the control signals and the tag
// counter are this implementation's choices.
module me_core
  import me_pkg::*;
#(
  parameter int unsigned PW    = PIX_W,
  parameter int unsigned BLOCK = BLOCK_PIXELS,
  parameter int unsigned DIGIT = 1,
  parameter int unsigned TAG_W = 10
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             search_init,
  input  core_op_e         op_i,
  input  logic [PW-1:0]    x_i,
  input  logic [PW-1:0]    y_i,
  input  logic             vld_i,
  input  logic             cin_ext_en,
  input  logic             cin_ext,
  output logic [PW-1:0]    add_sum,
  output logic             add_ovr,
  output logic             add_vld,
  output core_op_e         add_op,
  output logic [ACC_W-1:0] sad,
  output logic             sad_vld,
  output logic [TAG_W-1:0] sad_tag,
  output logic [ACC_W-1:0] min_sad,
  output logic [TAG_W-1:0] best_tag,
  output logic             mmd_done,
  output logic             new_min,
  // slice of the ganged multiply-accumulate datapath
  input  logic             mac_mode,
  input  slice_in_t        slice_i,
  output slice_out_t       slice_o
);
  localparam int unsigned AW      = ACC_W;
  localparam int unsigned LATENCY = PW / DIGIT;
  localparam int unsigned BW      = $clog2(BLOCK);

  // ---------------- input registers -----------------------------------
  logic [PW-1:0] x_q, y_q, y_c;
  logic          vld_q;
  core_op_e      op_q;

  ones_comp #(.WIDTH(PW)) u_ycomp (.d(y_i), .en(op_i != OP_ADD), .q(y_c));

  always_ff @(posedge clk) begin
    x_q <= x_i;
    y_q <= y_c;
    if (rst) begin
      vld_q <= 1'b0;
      op_q  <= OP_ADD;
    end else begin
      vld_q <= vld_i;
      op_q  <= op_i;
    end
  end

  // ---------------- ADD (pipelined) -----------------------------------
  logic add_cin;
  assign add_cin = cin_ext_en ? cin_ext : (op_q != OP_ADD);

  pipe_adder #(.WIDTH(PW), .DIGIT(DIGIT)) u_add (
    .clk, .rst,
    .a(x_q), .b(y_q), .cin(add_cin), .vld_i(vld_q),
    .sum(add_sum), .cout(add_ovr), .vld_o(add_vld)
  );

  // the operation code travels beside the adder pipeline
  core_op_e op_sr [LATENCY];
  always_ff @(posedge clk) begin
    op_sr[0] <= op_q;
    for (int i = 1; i < int'(LATENCY); i++) op_sr[i] <= op_sr[i-1];
  end
  assign add_op = op_sr[LATENCY-1];

  // ---------------- |x-y| into the carry-save accumulator (CSACC1) ------
  logic          acc_en, neg;
  logic [PW-1:0] mag;
  logic [BW-1:0] pix_q;
  logic          blk_end_q, blk_end2_q;

  assign acc_en = add_vld && (add_op == OP_SAD);
  assign neg    = acc_en && !add_ovr;

  ones_comp #(.WIDTH(PW)) u_abscomp (.d(add_sum), .en(neg), .q(mag));

  logic [AW-1:0] acc_s, acc_c;
  csacc #(.WIDTH(AW)) u_acc (
    .clk, .rst,
    .en     (mac_mode ? slice_i.c1_en     : acc_en),
    .clr    (mac_mode ? slice_i.c1_clr    : (pix_q == '0)),
    .shift2 (mac_mode ? slice_i.c1_shift2 : 1'b0),
    .addend (mac_mode ? slice_i.c1_addend : AW'(mag)),
    .cin    (mac_mode ? slice_i.c1_cin    : neg),
    .sh_in_s(mac_mode ? slice_i.c1_sh_s   : 2'b00),
    .sh_in_c(mac_mode ? slice_i.c1_sh_c   : 2'b00),
    .sh_out_s(slice_o.c1_sh_s), .sh_out_c(slice_o.c1_sh_c), .cout(slice_o.c1_cout),
    .sum_q(acc_s), .carry_q(acc_c)
  );

  always_ff @(posedge clk) begin
    if (rst || search_init) begin
      pix_q      <= '0;
      blk_end_q  <= 1'b0;
      blk_end2_q <= 1'b0;
    end else begin
      blk_end_q  <= acc_en && (pix_q == BW'(BLOCK - 1));
      blk_end2_q <= blk_end_q;
      if (acc_en) pix_q <= (pix_q == BW'(BLOCK - 1)) ? '0 : pix_q + 1'b1;
    end
  end

  // ---------------- CSACC2: latch (ME) or sum of products (MAC) ----------
  logic [AW-1:0] c2_s, c2_c;
  csacc2 #(.WIDTH(AW)) u_acc2 (
    .clk, .rst,
    .en      (mac_mode ? slice_i.c2_en  : blk_end_q),
    .clr     (mac_mode ? slice_i.c2_clr : 1'b1),
    .in_sum  (acc_s),
    .in_carry(acc_c),
    .cin     (mac_mode ? slice_i.c2_cin : 2'b00),
    .cout    (slice_o.c2_cout),
    .sum_q   (c2_s),
    .carry_q (c2_c)
  );

  // ---------------- CS/binary conversion -------------------------------
  logic [TAG_W-1:0] cand_q, conv_tag_q;
  logic             cbit, cbit_vld, cv_done;
  logic [AW-1:0]    cv_result;

  always_ff @(posedge clk) begin
    if (rst || search_init) begin
      cand_q     <= '0;
      conv_tag_q <= '0;
    end else if (blk_end_q) begin
      cand_q     <= cand_q + 1'b1;
      conv_tag_q <= cand_q;
    end
  end

  cs_binary_conv #(.WIDTH(AW)) u_conv (
    .clk, .rst,
    .load    (mac_mode ? slice_i.cv_load  : blk_end2_q),
    .start   (mac_mode ? slice_i.cv_start : blk_end2_q),
    .sum_in  (c2_s), .carry_in(c2_c),
    .cin     (mac_mode ? slice_i.cv_cin   : 1'b0),     // M10/M22/M23
    .bit_o(cbit), .bit_vld(cbit_vld), .done(cv_done), .result(cv_result),
    .cout(slice_o.cv_cout)
  );
  assign slice_o.cv_done   = cv_done;
  assign slice_o.cv_result = cv_result;
  assign sad     = cv_result;
  assign sad_vld = cv_done && !mac_mode;
  assign sad_tag = conv_tag_q;

  // ---------------- minimum detection ----------------------------------
  logic have_min;
  mmd #(.WIDTH(AW), .TAG_W(TAG_W)) u_mmd (
    .clk, .rst,
    .init(search_init), .bit_i(cbit), .bit_vld(cbit_vld && !mac_mode), .tag_i(conv_tag_q),
    .min_q(min_sad), .tag_q(best_tag), .have_min(have_min),
    .cmp_done(mmd_done), .new_min(new_min)
  );

  // A block needs BLOCK clocks and its conversion AW clocks.
  initial assert (AW <= BLOCK) else $error("me_core: conversion slower than a block");
endmodule
