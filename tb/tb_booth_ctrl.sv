// tb_booth_ctrl: self-checking testbench for the Booth recoder and
// multiply-accumulate sequencer at its default sizes (24-bit operands,
// 64-bit datapath).
//
// The 64-bit carry-save datapath it drives is modelled here by plain
// integers: CSACC1 = (clr ? 0 : shift2 ? 4*CSACC1 : CSACC1) + pp + neg,
// CSACC2 += CSACC1 when c2_en, and cv_go captures CSACC2 as the result. The
// converter's done is returned 68 clocks after cv_go, as four 17-clock
// slices would. Sums of random 16x16 and 24x24 products, including the most
// negative value, -1 and 0 (every Booth digit value), are issued with start
// held high. Checked: each sum against an integer model (mod 2**64), one
// product per 8 clocks (16-bit) or 12 clocks (24-bit) when streaming, and
// that c1_clr and c1_shift2 are never both high.
module tb_booth_ctrl;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               start, op24, first, last, ready, prod_done;
  logic signed [23:0] a_i, b_i;
  logic               c1_en, c1_clr, c1_shift2, neg, c2_en, c2_clr, cv_go, cv_done_last;
  logic [63:0]        pp;

  booth_ctrl dut (.clk, .rst, .start, .op24, .first, .last, .a_i, .b_i,
                  .ready, .prod_done, .c1_en, .c1_clr, .c1_shift2, .pp, .neg,
                  .c2_en, .c2_clr, .cv_go, .cv_done_last);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at cycle %0d", what, got, exp, cyc);
    end
  endtask

  // behavioural datapath
  logic [63:0] acc1 = '0, acc2 = '0;
  longint      done_at = -1;
  always @(posedge clk) begin
    if (!rst) begin
      if (c1_en && c1_clr && c1_shift2) check("clr with shift", 1, 0);
      if (c2_en) acc2 <= (c2_clr ? 64'd0 : acc2) + acc1;
      if (c1_en) acc1 <= (c1_clr ? 64'd0 : (c1_shift2 ? acc1 << 2 : acc1)) + pp + 64'(neg);
    end
  end
  assign cv_done_last = (cyc == done_at);

  longint exp_q [$];
  logic [2:0] info_q [$];   // {24-bit, first, last}
  longint last_pd = -1, n_results = 0;

  always @(posedge clk) begin
    if (!rst && prod_done) begin
      automatic logic [2:0] inf = info_q.pop_front();
      if (!inf[1] && last_pd >= 0) check("product rate", cyc - last_pd, inf[2] ? 12 : 8);
      last_pd = cyc;
    end
    if (!rst && cv_go) begin
      n_results++;
      done_at <= cyc + 68;
      if (exp_q.size() == 0) check("unexpected cv_go", 1, 0);
      else check("result", longint'(acc2), exp_q.pop_front());
    end
  end

  function automatic logic signed [23:0] pick(bit w24);
    case ($urandom % 8)
      0: return w24 ? 24'sh800000 : 24'(signed'(16'sh8000));
      1: return -24'sd1;
      2: return 24'sd0;
      default: return w24 ? 24'($urandom) : 24'(signed'(16'($urandom)));
    endcase
  endfunction

  task automatic issue(logic signed [23:0] a, logic signed [23:0] b, bit w24, bit f, bit l);
    start = 1'b1; a_i = a; b_i = b; op24 = w24; first = f; last = l;
    info_q.push_back({w24, f, l});
    #0;
    while (!ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    start = 1'b0;
  endtask

  initial begin
    rst = 1'b1; start = 0; op24 = 0; first = 0; last = 0; a_i = '0; b_i = '0;
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;
    for (int sidx = 0; sidx < 40; sidx++) begin
      automatic int     len = (sidx % 5 == 0) ? 1 : 9 + ($urandom % 8);
      automatic bit     w24 = (sidx % 2) == 1;
      automatic longint acc = 0;
      // a sum may only close once the previous conversion is over
      if (len == 1) begin
        repeat (90) @(posedge clk); #1;
      end
      for (int p = 0; p < len; p++) begin
        automatic logic signed [23:0] a = pick(w24);
        automatic logic signed [23:0] b = pick(w24);
        if (w24) acc += longint'(a) * longint'(b);
        else     acc += longint'(signed'(a[15:0])) * longint'(signed'(b[15:0]));
        if (!w24) begin a[23:16] = 8'($urandom); b[23:16] = 8'($urandom); end  // ignored bits
        if (p == len - 1) exp_q.push_back(acc);
        issue(a, b, w24, p == 0, p == len - 1);
      end
      if (len == 1) begin
        repeat (90) @(posedge clk); #1;
      end
    end
    repeat (120) @(posedge clk); #1;
    check("all results", n_results, 40);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
