// tb_me_vsp: end-to-end testbench of the four-core unit at its default
// parameters (256-pixel blocks), so it also serves as the full-size test.
//
// Phase 1, MODE_ME: a block-matching search of 6 candidate blocks runs on
//   all four cores at once (four byte lanes of two X words and two Y words),
//   followed by a few x-y and x+y operations. Every block error, the final
//   minimum and best candidate of each core, and every DFD result are
//   compared with integer models.
// Phase 2, MODE_MAC: sums of 16x16 products of pre-added operands
//   A = w0 +/- w1, B = w2 +/- w3 are computed and the 64-bit results compared
//   with a model (mod 2**64); the product rate of one per 8 clocks is checked.
//   Then sums of 24x24 products (mac_wide, operands taken straight from the
//   words, including -2**23 factors) at one per 12 clocks. Every result must
//   come 69 clocks after the sum's last product entered CSACC2.
// Phase 3, back to MODE_ME: a short search checks that the cores are intact.
//
// Mechanisms counted, each must occur: negative x-y inside a block sum
// (complement plus LSB carry), minimum replaced, DFD output, carry passed
// from the low-byte adder to the high-byte adder, subtracting pre-add,
// negative Booth digit, multi-product accumulation, mode switch, 24x24
// product.
module tb_me_vsp;
  import me_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  vsp_mode_e   mode;
  logic [15:0] word_i [4];
  logic        vld_i, search_init, mac_sub, mac_first, mac_last, mac_wide;
  core_op_e    op_i;
  logic [7:0]  dfd_sum [4];
  logic [3:0]  dfd_ovr, dfd_vld, sad_vld, mmd_done, new_min;
  logic [15:0] sad [4];
  logic [15:0] min_sad [4];
  logic [9:0]  best_tag [4], sad_tag [4];
  logic        mac_ready, mac_prod_done, mac_result_vld;
  logic [63:0] mac_result;

  me_vsp dut (.clk, .rst, .mode, .word_i, .vld_i, .op_i, .search_init,
              .dfd_sum, .dfd_ovr, .dfd_vld, .sad, .sad_vld, .sad_tag, .min_sad, .best_tag,
              .mmd_done, .new_min, .mac_sub, .mac_first, .mac_last, .mac_wide,
              .mac_ready, .mac_prod_done, .mac_result, .mac_result_vld);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0h expected %0h at cycle %0d", what, got, exp, cyc);
    end
  endtask

  // mechanism counters
  int n_neg = 0, n_newmin = 0, n_dfd = 0, n_chain = 0, n_presub = 0;
  int n_negdigit = 0, n_multi = 0, n_switch = 0, n_sad = 0, n_mac = 0, n_wide = 0;

  // ---------------- ME mode models -------------------------------------------
  int e_sad [4][$];
  int e_dfd [4][$];
  int e_tag [4][$];
  int m_min [4], m_tag [4];

  always @(posedge clk) begin
    if (!rst) begin
      for (int c = 0; c < 4; c++) begin
        if (sad_vld[c]) begin
          n_sad++;
          if (e_sad[c].size() == 0) check("unexpected sad", longint'(c), longint'(-1));
          else check($sformatf("sad core %0d", c), longint'(sad[c]), longint'(e_sad[c].pop_front()));
          if (e_tag[c].size() != 0)
            check($sformatf("sad tag core %0d", c), longint'(sad_tag[c]), longint'(e_tag[c].pop_front()));
        end
        if (mmd_done[c] && new_min[c]) n_newmin++;
        if (dfd_vld[c]) begin
          n_dfd++;
          if (e_dfd[c].size() == 0) check("unexpected dfd", longint'(c), longint'(-1));
          else check($sformatf("dfd core %0d", c), longint'({dfd_ovr[c], dfd_sum[c]}), longint'(e_dfd[c].pop_front()));
        end
      end
    end
  end

  function automatic logic [7:0] lane_x(int c); return word_i[(c/2)*2][(c%2)*8 +: 8]; endfunction
  function automatic logic [7:0] lane_y(int c); return word_i[(c/2)*2+1][(c%2)*8 +: 8]; endfunction

  logic [7:0] cur [4][256];

  task automatic me_search(int ncand);
    search_init = 1'b1; @(posedge clk); #1; search_init = 1'b0;
    for (int c = 0; c < 4; c++) begin m_min[c] = -1; m_tag[c] = 0; end
    for (int cnd = 0; cnd < ncand; cnd++) begin
      automatic int s [4] = '{0, 0, 0, 0};
      for (int p = 0; p < 256; p++) begin
        for (int c = 0; c < 4; c++) begin
          automatic logic [7:0] y;
          automatic int spread = 8 * (ncand - cnd) + ($urandom % 5);
          y = 8'(int'(cur[c][p]) + int'($urandom % (2 * spread + 1)) - spread);
          word_i[(c/2)*2][(c%2)*8 +: 8]   = cur[c][p];
          word_i[(c/2)*2+1][(c%2)*8 +: 8] = y;
          if (cur[c][p] < y) n_neg++;
          s[c] += (cur[c][p] > y) ? int'(cur[c][p]) - int'(y) : int'(y) - int'(cur[c][p]);
        end
        op_i = OP_SAD; vld_i = 1'b1;
        @(posedge clk); #1;
      end
      vld_i = 1'b0;
      for (int c = 0; c < 4; c++) begin
        e_sad[c].push_back(s[c]);
        e_tag[c].push_back(cnd);
        if (m_min[c] < 0 || s[c] < m_min[c]) begin m_min[c] = s[c]; m_tag[c] = cnd; end
      end
    end
    repeat (40) @(posedge clk); #1;
    for (int c = 0; c < 4; c++) begin
      check($sformatf("min core %0d", c), longint'(min_sad[c]), longint'(m_min[c]));
      check($sformatf("tag core %0d", c), longint'(best_tag[c]), longint'(m_tag[c]));
      check("sad queue drained", longint'(e_sad[c].size()), longint'(0));
    end
  endtask

  task automatic me_dfd(int n);
    for (int i = 0; i < n; i++) begin
      op_i = (i % 2 == 0) ? OP_SUB : OP_ADD;
      for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
      for (int c = 0; c < 4; c++)
        e_dfd[c].push_back(op_i == OP_ADD ? int'(lane_x(c)) + int'(lane_y(c))
                                          : int'(lane_x(c)) + int'(8'(~lane_y(c))) + 1);
      vld_i = 1'b1;
      @(posedge clk); #1;
    end
    vld_i = 1'b0;
    repeat (20) @(posedge clk); #1;
    for (int c = 0; c < 4; c++) check("dfd queue drained", longint'(e_dfd[c].size()), longint'(0));
  endtask

  // ---------------- MAC mode model -----------------------------------------
  longint e_mac [$];
  longint last_pd = -1;
  bit     pd_first [$];
  int     pd_gap [$];        // expected clocks since the previous product
  bit     pd_last [$];
  longint last_pd_cyc [$];   // clock of each sum's last product

  always @(posedge clk) begin
    if (!rst && mac_prod_done) begin
      automatic bit f = pd_first.pop_front();
      automatic int g = pd_gap.pop_front();
      if (pd_last.pop_front()) last_pd_cyc.push_back(cyc);
      if (!f && last_pd >= 0) check("MAC product rate", longint'(cyc - last_pd), longint'(g));
      last_pd = cyc;
    end
    if (!rst && mac_result_vld) begin
      n_mac++;
      if (e_mac.size() == 0) check("unexpected MAC result", longint'(1), longint'(0));
      else check("MAC result", longint'(mac_result), longint'(e_mac.pop_front()));
      if (last_pd_cyc.size() != 0) check("MAC conversion time", longint'(cyc - last_pd_cyc.pop_front()), longint'(69));
    end
  end

  function automatic int booth_has_neg(logic [15:0] b);
    logic [16:0] bb = {b, 1'b0};
    for (int j = 0; j < 8; j++)
      if (bb[2*j+2] && !(bb[2*j+1] && bb[2*j])) return 1;
    return 0;
  endfunction

  task automatic mac_sum(int len, bit sub);
    automatic longint acc = 0;
    if (len > 1) n_multi++;
    for (int p = 0; p < len; p++) begin
      automatic logic [15:0] a, b;
      for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
      if (p == 0) word_i[1] = 16'(16'h0100 - 16'(word_i[0][7:0]) + 16'd5);  // forces a byte carry
      a = sub ? 16'(word_i[0] - word_i[1]) : 16'(word_i[0] + word_i[1]);
      b = sub ? 16'(word_i[2] - word_i[3]) : 16'(word_i[2] + word_i[3]);
      if (sub ? (9'(word_i[0][7:0]) + 9'(8'(~word_i[1][7:0])) + 9'd1) > 9'd255
              : (9'(word_i[0][7:0]) + 9'(word_i[1][7:0])) > 9'd255) n_chain++;
      if (sub) n_presub++;
      n_negdigit += booth_has_neg(b);
      acc += longint'(signed'(a)) * longint'(signed'(b));
      mac_sub = sub; mac_first = (p == 0); mac_last = (p == len - 1);
      pd_first.push_back(p == 0);
      pd_gap.push_back(8);
      pd_last.push_back(p == len - 1);
      vld_i = 1'b1;
      @(posedge clk); #1;
      vld_i = 1'b0;
      repeat (7) @(posedge clk); #1;
    end
    e_mac.push_back(acc);
  endtask

  // sum of 24x24 products: operands {word1[7:0], word0} and {word3[7:0], word2}
  task automatic mac_sum_wide(int len);
    automatic longint acc = 0;
    for (int p = 0; p < len; p++) begin
      automatic logic [23:0] a, b;
      for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
      if (p == 0) begin word_i[1][7:0] = 8'h80; word_i[0] = '0; end    // a = -2**23
      if (p == 1) begin word_i[3][7:0] = 8'h80; word_i[2] = '0; end    // b = -2**23
      a = {word_i[1][7:0], word_i[0]};
      b = {word_i[3][7:0], word_i[2]};
      acc += longint'(signed'(a)) * longint'(signed'(b));
      mac_wide = 1'b1; mac_sub = 1'b0; mac_first = (p == 0); mac_last = (p == len - 1);
      pd_first.push_back(p == 0);
      pd_gap.push_back(12);
      pd_last.push_back(p == len - 1);
      n_wide++;
      vld_i = 1'b1;
      @(posedge clk); #1;
      vld_i = 1'b0; mac_wide = 1'b0;
      repeat (11) @(posedge clk); #1;
    end
    e_mac.push_back(acc);
  endtask

  initial begin
    rst = 1'b1; mode = MODE_ME; vld_i = 0; search_init = 0; op_i = OP_SAD;
    mac_sub = 0; mac_first = 0; mac_last = 0; mac_wide = 0;
    for (int w = 0; w < 4; w++) word_i[w] = '0;
    for (int c = 0; c < 4; c++) for (int p = 0; p < 256; p++) cur[c][p] = 8'($urandom);
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;

    // phase 1
    me_search(6);
    me_dfd(10);

    // phase 2
    mode = MODE_MAC; n_switch++;
    @(posedge clk); #1;
    for (int s = 0; s < 8; s++) mac_sum(9 + (s % 4), s % 2 == 1);
    repeat (70) @(posedge clk); #1;    // a short sum must not close during a conversion
    for (int s = 0; s < 3; s++) mac_sum_wide(6 + s);
    repeat (120) @(posedge clk); #1;
    check("MAC results drained", longint'(e_mac.size()), longint'(0));

    // phase 3
    mode = MODE_ME; n_switch++;
    @(posedge clk); #1;
    me_search(3);

    $display("mechanisms: neg=%0d newmin=%0d dfd=%0d chain=%0d presub=%0d negdigit=%0d multi=%0d switch=%0d sads=%0d macs=%0d wide=%0d",
             n_neg, n_newmin, n_dfd, n_chain, n_presub, n_negdigit, n_multi, n_switch, n_sad, n_mac, n_wide);
    check("negative differences", longint'(n_neg > 0), longint'(1));
    check("minimum replaced", longint'(n_newmin > 4), longint'(1));
    check("DFD outputs", longint'(n_dfd), longint'(40));
    check("byte carry chained", longint'(n_chain > 0), longint'(1));
    check("pre-subtract", longint'(n_presub > 0), longint'(1));
    check("negative Booth digit", longint'(n_negdigit > 0), longint'(1));
    check("multi-product sums", longint'(n_multi > 0), longint'(1));
    check("mode switches", longint'(n_switch), longint'(2));
    check("block errors", longint'(n_sad), longint'(36));
    check("MAC results", longint'(n_mac), longint'(11));
    check("24x24 products", longint'(n_wide), longint'(21));
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
