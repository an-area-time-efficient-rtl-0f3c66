// tb_me_vsp_cpa: the four-core unit built with 4-bit carry-ripple stages in
// its adders (DIGIT = 4, adder latency 2 instead of 8) and 16-pixel blocks.
//
// It checks that the delay lines which align the two chained byte adders in
// multiply mode follow the adder latency: sums of 16x16 products of
// pre-added operands A = w0 +/- w1, B = w2 +/- w3, with byte carries forced
// between the chained adders, are compared with a model (mod 2**64), and a
// 24x24 sum is run as well. In motion-estimation mode it compares every
// x+y / x-y result and the block errors of a short search with integer
// models. Each result must arrive; the number of byte carries passed
// between chained adders is counted and must be non-zero.
module tb_me_vsp_cpa;
  import me_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_chain = 0;

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

  me_vsp #(.BLOCK(16), .DIGIT(4)) dut (
    .clk, .rst, .mode, .word_i, .vld_i, .op_i, .search_init,
    .dfd_sum, .dfd_ovr, .dfd_vld, .sad, .sad_vld, .sad_tag, .min_sad, .best_tag,
    .mmd_done, .new_min, .mac_sub, .mac_first, .mac_last, .mac_wide,
    .mac_ready, .mac_prod_done, .mac_result, .mac_result_vld);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  longint e_mac [$];
  int     e_dfd [4][$];
  int     e_sad [4][$];

  always @(posedge clk) begin
    if (!rst) begin
      if (mac_result_vld) begin
        if (e_mac.size() == 0) check("unexpected MAC result", longint'(1), longint'(0));
        else check("MAC result", longint'(mac_result), longint'(e_mac.pop_front()));
      end
      for (int c = 0; c < 4; c++) begin
        if (dfd_vld[c]) begin
          if (e_dfd[c].size() == 0) check("unexpected dfd", longint'(c), longint'(-1));
          else check("dfd", longint'({dfd_ovr[c], dfd_sum[c]}), longint'(e_dfd[c].pop_front()));
        end
        if (sad_vld[c]) begin
          if (e_sad[c].size() == 0) check("unexpected sad", longint'(c), longint'(-1));
          else check("sad", longint'(sad[c]), longint'(e_sad[c].pop_front()));
        end
      end
    end
  end

  task automatic mac_sum(int len, bit sub);
    automatic longint acc = 0;
    for (int p = 0; p < len; p++) begin
      automatic logic [15:0] a, b;
      for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
      if (p % 2 == 0) word_i[1] = 16'(16'h0100 - 16'(word_i[0][7:0]) + 16'd3);
      a = sub ? 16'(word_i[0] - word_i[1]) : 16'(word_i[0] + word_i[1]);
      b = sub ? 16'(word_i[2] - word_i[3]) : 16'(word_i[2] + word_i[3]);
      if (sub ? (9'(word_i[0][7:0]) + 9'(8'(~word_i[1][7:0])) + 9'd1) > 9'd255
              : (9'(word_i[0][7:0]) + 9'(word_i[1][7:0])) > 9'd255) n_chain++;
      acc += longint'(signed'(a)) * longint'(signed'(b));
      mac_sub = sub; mac_first = (p == 0); mac_last = (p == len - 1); mac_wide = 1'b0;
      vld_i = 1'b1;
      @(posedge clk); #1;
      vld_i = 1'b0;
      repeat (7) @(posedge clk); #1;
    end
    e_mac.push_back(acc);
  endtask

  task automatic mac_sum_wide(int len);
    automatic longint acc = 0;
    for (int p = 0; p < len; p++) begin
      for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
      acc += longint'(signed'({word_i[1][7:0], word_i[0]})) * longint'(signed'({word_i[3][7:0], word_i[2]}));
      mac_first = (p == 0); mac_last = (p == len - 1); mac_wide = 1'b1;
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
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;

    // motion-estimation mode: x-y / x+y, then three 16-pixel blocks
    for (int i = 0; i < 12; i++) begin
      op_i = (i % 2 == 0) ? OP_SUB : OP_ADD;
      for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
      for (int c = 0; c < 4; c++) begin
        automatic int x = int'(word_i[(c/2)*2][(c%2)*8 +: 8]);
        automatic int y = int'(word_i[(c/2)*2+1][(c%2)*8 +: 8]);
        e_dfd[c].push_back(op_i == OP_ADD ? x + y : x + (255 - y) + 1);
      end
      vld_i = 1'b1; @(posedge clk); #1;
    end
    vld_i = 1'b0;
    search_init = 1'b1; @(posedge clk); #1; search_init = 1'b0;
    for (int b = 0; b < 3; b++) begin
      automatic int s [4] = '{0, 0, 0, 0};
      for (int p = 0; p < 16; p++) begin
        for (int w = 0; w < 4; w++) word_i[w] = 16'($urandom);
        for (int c = 0; c < 4; c++) begin
          automatic int x = int'(word_i[(c/2)*2][(c%2)*8 +: 8]);
          automatic int y = int'(word_i[(c/2)*2+1][(c%2)*8 +: 8]);
          s[c] += (x > y) ? x - y : y - x;
        end
        op_i = OP_SAD; vld_i = 1'b1; @(posedge clk); #1;
      end
      vld_i = 1'b0;
      for (int c = 0; c < 4; c++) e_sad[c].push_back(s[c]);
      repeat (24) @(posedge clk); #1;
    end
    repeat (30) @(posedge clk); #1;
    for (int c = 0; c < 4; c++) begin
      check("dfd results all seen", longint'(e_dfd[c].size()), longint'(0));
      check("block errors all seen", longint'(e_sad[c].size()), longint'(0));
    end

    // multiply mode
    mode = MODE_MAC;
    @(posedge clk); #1;
    for (int s = 0; s < 4; s++) mac_sum(9 + s, s % 2 == 1);
    repeat (70) @(posedge clk); #1;
    mac_sum_wide(6);
    repeat (120) @(posedge clk); #1;
    check("MAC results all seen", longint'(e_mac.size()), longint'(0));
    check("byte carries chained", longint'(n_chain > 0), longint'(1));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
