// tb_mmd: self-checking testbench for the bit-serial minimum detector.
//
// Random 16-bit errors, some repeated (ties) and some equal to the current
// minimum plus or minus one, are sent LSB first with their tags, with idle
// clocks between some of them and a fresh init every 40 errors. After each
// error cmp_done must pulse the clock after its last bit, new_min must say
// whether it replaced the minimum (first after init, or strictly smaller),
// and min_q / tag_q must match an integer model.
module tb_mmd;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, updates = 0;
  logic        init, bit_i, bit_vld, have_min, cmp_done, new_min;
  logic [9:0]  tag_i, tag_q;
  logic [15:0] min_q;

  mmd #(.WIDTH(16), .TAG_W(10)) dut (.clk, .rst, .init, .bit_i, .bit_vld, .tag_i,
        .min_q, .tag_q, .have_min, .cmp_done, .new_min);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    automatic logic [15:0] mmin = '0;
    automatic logic [9:0]  mtag = '0;
    automatic bit          have = 0;
    rst = 1'b1; init = 0; bit_i = 0; bit_vld = 0; tag_i = '0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 400; n++) begin
      automatic logic [15:0] v;
      automatic bit upd;
      if (n % 40 == 0) begin
        init = 1'b1; @(posedge clk); #1; init = 1'b0; have = 0;
      end
      case ($urandom % 4)
        0: v = have ? mmin : 16'($urandom);
        1: v = have ? 16'(mmin - 1) : 16'($urandom);
        2: v = have ? 16'(mmin + 1) : 16'($urandom);
        default: v = 16'($urandom);
      endcase
      for (int i = 0; i < 16; i++) begin
        bit_vld = 1'b1; bit_i = v[i]; tag_i = (i == 0) ? 10'(n) : 10'($urandom);
        @(posedge clk); #1;
        if (i < 15) check("cmp_done early", longint'(cmp_done), 0);
      end
      bit_vld = 1'b0;
      upd = !have || (v < mmin);
      if (upd) begin mmin = v; mtag = 10'(n); have = 1; updates++; end
      check("cmp_done", longint'(cmp_done), 1);
      check("new_min", longint'(new_min), longint'(upd));
      check("min", longint'(min_q), longint'(mmin));
      check("tag", longint'(tag_q), longint'(mtag));
      check("have", longint'(have_min), 1);
      if (($urandom % 3) == 0) begin @(posedge clk); #1; end
    end
    check("some updates", longint'(updates > 20), 1);
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
