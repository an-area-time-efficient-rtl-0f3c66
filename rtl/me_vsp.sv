// me_vsp: extended micro architecture for video encoding, built from four
// motion-estimation cores.
//
// Four 16-bit words arrive per clock. Words 0 and 2 carry the current-block
// pixels (X), words 1 and 3 the reference pixels (Y); each word holds two
// 8-bit pixels, and the four cores take the four byte lanes:
//   core 0: word0[7:0]  vs word1[7:0]    core 1: word0[15:8] vs word1[15:8]
//   core 2: word2[7:0]  vs word3[7:0]    core 3: word2[15:8] vs word3[15:8]
//
// MODE_ME: the four cores run independently and simultaneously, each doing
// x+y, x-y or block matching (sum of |x-y| over a block, running minimum and
// its candidate number) on its byte lane, with its own converter and
// minimum detector.
//
// MODE_MAC: the unit performs one multiply-accumulate at a time, for
// DCT, quantisation or filtering. Cores 0 and 1 are chained through their
// carry (core 0's carry out becomes core 1's carry in) into a 16-bit
// pipelined adder computing A = word0 + word1 (or word0 - word1 when mac_sub
// is set); cores 2 and 3 likewise compute B = word2 +/- word3. These are the
// u+c, u+u' or u-u' sums of the matrix DCT algorithm. Because each core's
// adder is bit-skewed, the high-byte core sees its operands LAT clocks later
// than the low-byte core, so that it receives the low byte's carry in step,
// and the low byte's sum is held LAT clocks to meet it (LAT = 8 / DIGIT, the
// adder latency; 8 at the default of one bit per stage). A*B then goes to the
// radix-4 Booth multiply-accumulate datapath (64-bit CSACC1, CSACC2 and
// four cascaded converters); sums wrap modulo 2**64. With mac_wide set the
// operand set is a 24x24 product instead: a = {word1[7:0], word0} and
// b = {word3[7:0], word2} (two's complement) go to the multiplier directly,
// past the 16-bit pre-adders, delayed to the same 1 + 2*LAT clocks.
//
// Interface and timing: vld_i marks a valid input clock. In MODE_ME op_i
// selects the core operation and each core's outputs behave as described
// in me_core. In MODE_MAC an operand set may enter at most once every 8
// clocks, or 12 for a 24x24 product (one Booth digit per clock);
// mac_first / mac_last mark the first and last product of a sum. A and B
// reach the multiplier 1 + 2*LAT clocks (17 by default) after entry, the
// product enters CSACC2 8 (or 12) clocks later, and mac_result_vld
// follows the last mac_prod_done by 69 clocks (one clock into CSACC2, four
// 17-clock converter slices in turn). mode must only change while the unit
// is idle.
//
// The lane split, the complementers on words 1 and 3, the carry chaining
// of neighbouring adders, the Booth-recoded shift-and-add multiply and the
// 64-bit accumulation in the four cores' cascaded CSACC1, CSACC2 and
// converters follow the design description. Departures that are this
// implementation's own: the partial products are shifted left (Booth digits
// most significant first) where the description shifts right; the
// multiplexers are folded into a mode input of each core and one central
// Booth recoder; the entry of 24-bit operands past the pre-adders and the
// operand assignment to words are assumed.
module me_vsp
  import me_pkg::*;
#(
  parameter int unsigned BLOCK = BLOCK_PIXELS,
  parameter int unsigned DIGIT = 1,          // bits per stage of the core adders
  parameter int unsigned TAG_W = 10
) (
  input  logic                    clk,
  input  logic                    rst,
  input  vsp_mode_e               mode,
  input  logic [WORD_W-1:0]       word_i [NUM_CORES],
  input  logic                    vld_i,
  // ME mode
  input  core_op_e                op_i,
  input  logic                    search_init,
  output logic [PIX_W-1:0]        dfd_sum   [NUM_CORES],
  output logic [NUM_CORES-1:0]    dfd_ovr,
  output logic [NUM_CORES-1:0]    dfd_vld,
  output logic [ACC_W-1:0]        sad       [NUM_CORES],
  output logic [NUM_CORES-1:0]    sad_vld,
  output logic [TAG_W-1:0]        sad_tag   [NUM_CORES],
  output logic [ACC_W-1:0]        min_sad   [NUM_CORES],
  output logic [TAG_W-1:0]        best_tag  [NUM_CORES],
  output logic [NUM_CORES-1:0]    mmd_done,
  output logic [NUM_CORES-1:0]    new_min,
  // MAC mode
  input  logic                    mac_sub,
  input  logic                    mac_first,
  input  logic                    mac_last,
  input  logic                    mac_wide,
  output logic                    mac_ready,
  output logic                    mac_prod_done,
  output logic [MAC_W-1:0]        mac_result,
  output logic                    mac_result_vld
);
  localparam int unsigned LAT = PIX_W / DIGIT;   // core adder latency

  logic is_mac;
  assign is_mac = (mode == MODE_MAC);

  // ---------------- byte lanes -------------------------------------------
  logic [PIX_W-1:0] lx [NUM_CORES];
  logic [PIX_W-1:0] ly [NUM_CORES];
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_lane
    assign lx[c] = word_i[(c / 2) * 2    ][(c % 2) * PIX_W +: PIX_W];
    assign ly[c] = word_i[(c / 2) * 2 + 1][(c % 2) * PIX_W +: PIX_W];
  end

  core_op_e mac_op;
  assign mac_op = mac_sub ? OP_SUB : OP_ADD;

  // In MAC mode the high-byte cores (1, 3) get their operands LAT clocks late.
  logic [PIX_W-1:0] hx_sr [LAT][2];
  logic [PIX_W-1:0] hy_sr [LAT][2];
  logic             hv_sr [LAT];
  core_op_e         hop_sr [LAT];
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(LAT); i++) hv_sr[i] <= 1'b0;
    end else begin
      hv_sr[0] <= vld_i && is_mac;
      for (int i = 1; i < int'(LAT); i++) hv_sr[i] <= hv_sr[i-1];
    end
    hop_sr[0] <= mac_op;
    for (int p = 0; p < 2; p++) begin
      hx_sr[0][p] <= lx[2*p+1];
      hy_sr[0][p] <= ly[2*p+1];
    end
    for (int i = 1; i < int'(LAT); i++) begin
      hop_sr[i] <= hop_sr[i-1];
      for (int p = 0; p < 2; p++) begin
        hx_sr[i][p] <= hx_sr[i-1][p];
        hy_sr[i][p] <= hy_sr[i-1][p];
      end
    end
  end

  // ---------------- the four cores ----------------------------------------
  logic [PIX_W-1:0] c_sum [NUM_CORES];
  logic             c_ovr [NUM_CORES];
  logic             c_vld [NUM_CORES];
  core_op_e         c_op  [NUM_CORES];

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    localparam bit HIGH = (c % 2) == 1;
    core_op_e         op_c;
    logic [PIX_W-1:0] x_c, y_c;
    logic             v_c;
    slice_in_t        si;   // this core's slice of the 64-bit MAC datapath
    slice_out_t       so;

    if (HIGH) begin : g_hi
      assign x_c  = is_mac ? hx_sr[LAT-1][c/2] : lx[c];
      assign y_c  = is_mac ? hy_sr[LAT-1][c/2] : ly[c];
      assign v_c  = is_mac ? hv_sr[LAT-1]      : vld_i;
      assign op_c = is_mac ? hop_sr[LAT-1]     : op_i;
    end else begin : g_lo
      assign x_c  = lx[c];
      assign y_c  = ly[c];
      assign v_c  = vld_i;
      assign op_c = is_mac ? mac_op : op_i;
    end

    me_core #(.BLOCK(BLOCK), .DIGIT(DIGIT), .TAG_W(TAG_W)) u_core (
      .clk, .rst,
      .search_init(search_init && !is_mac),
      .op_i(op_c), .x_i(x_c), .y_i(y_c), .vld_i(v_c),
      // M1/M13: a high-byte core takes its neighbour's carry in MAC mode
      .cin_ext_en(HIGH && is_mac), .cin_ext(HIGH ? c_ovr[c-(HIGH ? 1 : 0)] : 1'b0),
      .add_sum(c_sum[c]), .add_ovr(c_ovr[c]), .add_vld(c_vld[c]), .add_op(c_op[c]),
      .sad(sad[c]), .sad_vld(sad_vld[c]), .sad_tag(sad_tag[c]),
      .min_sad(min_sad[c]), .best_tag(best_tag[c]),
      .mmd_done(mmd_done[c]), .new_min(new_min[c]),
      .mac_mode(is_mac), .slice_i(si), .slice_o(so)
    );

    assign dfd_sum[c] = c_sum[c];
    assign dfd_ovr[c] = c_ovr[c];
    assign dfd_vld[c] = c_vld[c] && !is_mac && (c_op[c] != OP_SAD);
  end

  // ---------------- MAC operands: low byte waits for the high byte ----------
  logic [PIX_W-1:0] lo_sr [LAT][2];
  always_ff @(posedge clk) begin
    for (int p = 0; p < 2; p++) lo_sr[0][p] <= c_sum[2*p];
    for (int i = 1; i < int'(LAT); i++)
      for (int p = 0; p < 2; p++) lo_sr[i][p] <= lo_sr[i-1][p];
  end

  logic [WORD_W-1:0] op_a, op_b;
  assign op_a = {c_sum[1], lo_sr[LAT-1][0]};
  assign op_b = {c_sum[3], lo_sr[LAT-1][1]};

  // mac_first / mac_last travel with the operands: 1 + 2*LAT clocks
  localparam int unsigned FD = 1 + 2 * LAT;
  localparam int unsigned OW = 24;        // widest Booth operand
  logic [2:0] fl_sr [FD];
  always_ff @(posedge clk) begin
    fl_sr[0] <= {mac_wide, mac_first, mac_last};
    for (int i = 1; i < int'(FD); i++) fl_sr[i] <= fl_sr[i-1];
  end

  // 24-bit operands bypass the 16-bit pre-adders and take the same time
  logic [OW-1:0] wa_sr [FD];
  logic [OW-1:0] wb_sr [FD];
  always_ff @(posedge clk) begin
    wa_sr[0] <= {word_i[1][PIX_W-1:0], word_i[0]};
    wb_sr[0] <= {word_i[3][PIX_W-1:0], word_i[2]};
    for (int i = 1; i < int'(FD); i++) begin
      wa_sr[i] <= wa_sr[i-1];
      wb_sr[i] <= wb_sr[i-1];
    end
  end

  logic          wide;
  logic [OW-1:0] bo_a, bo_b;
  assign wide = fl_sr[FD-1][2];
  assign bo_a = wide ? wa_sr[FD-1] : OW'(signed'(op_a));
  assign bo_b = wide ? wb_sr[FD-1] : OW'(signed'(op_b));

  logic mac_go;
  assign mac_go = is_mac && c_vld[1];

  logic          c1_en, c1_clr, c1_shift2, pp_neg, c2_en, c2_clr, cv_go;
  logic [MAC_W-1:0] pp;

  booth_ctrl #(.OPW(OW), .MW(MAC_W)) u_booth (
    .clk, .rst,
    .start(mac_go), .op24(wide),
    .first(fl_sr[FD-1][1]), .last(fl_sr[FD-1][0]),
    .a_i(bo_a), .b_i(bo_b),
    .ready(mac_ready), .prod_done(mac_prod_done),
    .c1_en, .c1_clr, .c1_shift2, .pp, .neg(pp_neg),
    .c2_en, .c2_clr, .cv_go, .cv_done_last(g_core[NUM_CORES-1].so.cv_done)
  );

  // ---------------- cascade of the cores' accumulator slices ----------------
  // Slice 0 (core 0) holds bits 15:0 of the 64-bit CSACC1/CSACC2/converter.
  for (genvar c = 0; c < NUM_CORES; c++) begin : g_slice
    assign g_core[c].si.c1_en     = c1_en;
    assign g_core[c].si.c1_clr    = c1_clr;
    assign g_core[c].si.c1_shift2 = c1_shift2;
    assign g_core[c].si.c1_addend = pp[c*ACC_W +: ACC_W];
    assign g_core[c].si.c2_en     = c2_en;
    assign g_core[c].si.c2_clr    = c2_clr;
    assign g_core[c].si.cv_load   = cv_go;
    if (c == 0) begin : g_lsb
      assign g_core[c].si.c1_cin   = pp_neg;
      assign g_core[c].si.c1_sh_s  = 2'b00;
      assign g_core[c].si.c1_sh_c  = 2'b00;
      assign g_core[c].si.c2_cin   = 2'b00;
      assign g_core[c].si.cv_start = cv_go;
      assign g_core[c].si.cv_cin   = 1'b0;
    end else begin : g_up
      assign g_core[c].si.c1_cin   = g_core[c-1].so.c1_cout;
      assign g_core[c].si.c1_sh_s  = g_core[c-1].so.c1_sh_s;
      assign g_core[c].si.c1_sh_c  = g_core[c-1].so.c1_sh_c;
      assign g_core[c].si.c2_cin   = g_core[c-1].so.c2_cout;
      assign g_core[c].si.cv_start = g_core[c-1].so.cv_done;   // M10/M22/M23
      assign g_core[c].si.cv_cin   = g_core[c-1].so.cv_cout;
    end
    assign mac_result[c*ACC_W +: ACC_W] = g_core[c].so.cv_result;
  end
  assign mac_result_vld = is_mac && g_core[NUM_CORES-1].so.cv_done;

  // operand sets must be spaced for the multiplier
  always_ff @(posedge clk)
    if (!rst && mac_go) assert (mac_ready) else $error("me_vsp: MAC operands too close together");
endmodule
