// tb_me_core: self-checking testbench for one motion-estimation core at its
// default sizes (8-bit pixels, 16-bit accumulator, 256-pixel blocks).
//
// A search of 12 candidate blocks is run. Most blocks stream in back to
// back, one pixel per clock; some have idle clocks and x+y / x-y operations
// mixed in, which must not disturb the block sums. Candidate pixels are
// random, with some blocks made close to the current block so that the
// minimum moves. Checked against integer models:
//  - every ADD result (sum and carry out) and its latency of 9 clocks;
//  - every block error sad, with its candidate tag, in order;
//  - a block result every 256 clocks when blocks stream back to back;
//  - min_sad and best_tag after each comparison, and the new_min flags;
//  - that both signs of x-y occurred inside the sums.
// A second search after search_init checks that the minimum restarts.
module tb_me_core;
  import me_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic       search_init, vld_i;
  core_op_e   op_i;
  logic [7:0] x_i, y_i;
  logic [7:0] add_sum;
  logic       add_ovr, add_vld, sad_vld, mmd_done, new_min;
  core_op_e   add_op;
  logic [15:0] sad, min_sad;
  logic [9:0]  sad_tag, best_tag;

  me_core dut (.clk, .rst, .search_init, .op_i, .x_i, .y_i, .vld_i,
               .cin_ext_en(1'b0), .cin_ext(1'b0),
               .add_sum, .add_ovr, .add_vld, .add_op,
               .sad, .sad_vld, .sad_tag, .min_sad, .best_tag, .mmd_done, .new_min,
               .mac_mode(1'b0), .slice_i('0), .slice_o());

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d at cycle %0d", what, got, exp, cyc);
    end
  endtask

  // expected ADD results, in order, with the cycle they were applied
  longint    q_cyc [$];
  int        q_val [$];   // 9-bit result: {carry, sum}
  // expected block errors, in order
  int        e_sad [$];
  int        e_tag [$];
  int        neg_seen = 0, pos_seen = 0;

  // ADD output monitor
  always @(posedge clk) begin
    if (!rst && add_vld) begin
      if (q_val.size() == 0) check("unexpected add_vld", longint'(1), longint'(0));
      else begin
        automatic longint c0 = q_cyc.pop_front();
        automatic int v = q_val.pop_front();
        check("add result", longint'({add_ovr, add_sum}), longint'(v));
        check("add latency", longint'(cyc - c0), longint'(9));
      end
    end
  end

  // block error / minimum monitor
  int     m_min, m_tag, m_have, n_sad = 0, n_upd = 0;
  longint last_sad_cyc = -1;
  bit     stream_mode;
  always @(posedge clk) begin
    if (!rst && sad_vld) begin
      if (e_sad.size() == 0) check("unexpected sad_vld", longint'(1), longint'(0));
      else begin
        automatic int es = e_sad.pop_front();
        automatic int et = e_tag.pop_front();
        check("sad", longint'(sad), longint'(es));
        check("sad tag", longint'(sad_tag), longint'(et));
        if (stream_mode && last_sad_cyc >= 0) check("block period", longint'(cyc - last_sad_cyc), longint'(256));
        last_sad_cyc = cyc;
        n_sad++;
        if (m_have == 0 || es < m_min) begin m_min = es; m_tag = et; m_have = 1; end
      end
    end
    if (!rst && mmd_done) begin
      check("min_sad", longint'(min_sad), longint'(m_min));
      check("best_tag", longint'(best_tag), longint'(m_tag));
      if (new_min) n_upd++;
    end
  end

  logic [7:0] cur [256];

  task automatic apply(core_op_e op, logic [7:0] x, logic [7:0] y);
    op_i = op; x_i = x; y_i = y; vld_i = 1'b1;
    q_cyc.push_back(cyc);
    case (op)
      OP_ADD:  q_val.push_back(int'(x) + int'(y));
      default: q_val.push_back(int'(x) + int'(8'(~y)) + 1);
    endcase
    @(posedge clk); #1;
    vld_i = 1'b0;
  endtask

  task automatic run_search(int ncand, bit stream);
    stream_mode = stream;
    search_init = 1'b1; @(posedge clk); #1; search_init = 1'b0;
    m_have = 0; last_sad_cyc = -1;
    for (int cnd = 0; cnd < ncand; cnd++) begin
      automatic int s = 0;
      automatic int closeness = $urandom % 3;
      for (int p = 0; p < 256; p++) begin
        automatic logic [7:0] y;
        if (closeness == 0) y = 8'($urandom);
        else y = 8'(int'(cur[p]) + int'($urandom % (2 * (ncand - cnd) + 1)) - (ncand - cnd));
        s += (int'(cur[p]) > int'(y)) ? int'(cur[p]) - int'(y) : int'(y) - int'(cur[p]);
        if (cur[p] < y) neg_seen++; else pos_seen++;
        if (!stream && ($urandom % 16) == 0) apply(OP_SUB, 8'($urandom), 8'($urandom));
        if (!stream && ($urandom % 16) == 0) apply(OP_ADD, 8'($urandom), 8'($urandom));
        if (!stream && ($urandom % 16) == 0) begin @(posedge clk); #1; end
        apply(OP_SAD, cur[p], y);
      end
      e_sad.push_back(s);
      e_tag.push_back(cnd);
    end
    repeat (40) @(posedge clk); #1;
  endtask

  initial begin
    rst = 1'b1; search_init = 0; vld_i = 0; op_i = OP_SAD; x_i = '0; y_i = '0;
    for (int p = 0; p < 256; p++) cur[p] = 8'($urandom);
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    run_search(12, 1'b1);
    check("all blocks out", longint'(n_sad), longint'(12));
    run_search(5, 1'b0);
    check("all blocks out 2", longint'(n_sad), longint'(17));
    check("queues drained", longint'(q_val.size()) + longint'(e_sad.size()), longint'(0));
    check("minimum moved", longint'(n_upd >= 3), longint'(1));
    check("negative differences seen", longint'(neg_seen > 0 && pos_seen > 0), longint'(1));
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
