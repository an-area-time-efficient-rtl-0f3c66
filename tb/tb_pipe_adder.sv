// tb_pipe_adder: self-checking testbench for the bit-skewed pipelined adder.
//
// Three instances are driven with a new random operand pair every clock:
// the default 8-bit fully pipelined adder, the 5-bit example (6-bit result)
// and an 8-bit adder built from 4-bit ripple digits. Each output is compared
// with a+b+cin of the operands applied exactly LATENCY clocks earlier
// (8, 5 and 2 clocks), and the valid bit must arrive at the same clock.
module tb_pipe_adder;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam int N = 400;

  logic [7:0] a8 [N];
  logic [7:0] b8 [N];
  logic       c8 [N];
  logic       v8 [N];
  logic [7:0] a, b;
  logic [4:0] a5, b5;
  logic       cin, vin;

  logic [7:0] s_d1, s_d4;
  logic [4:0] s_5;
  logic       co_d1, co_d4, co_5, vo_d1, vo_d4, vo_5;

  pipe_adder dut (.clk, .rst, .a, .b, .cin, .vld_i(vin),
                  .sum(s_d1), .cout(co_d1), .vld_o(vo_d1));
  pipe_adder #(.WIDTH(5), .DIGIT(1)) dut5 (.clk, .rst, .a(a5), .b(b5), .cin, .vld_i(vin),
                  .sum(s_5), .cout(co_5), .vld_o(vo_5));
  pipe_adder #(.WIDTH(8), .DIGIT(4)) dut_cpa (.clk, .rst, .a, .b, .cin, .vld_i(vin),
                  .sum(s_d4), .cout(co_d4), .vld_o(vo_d4));

  assign a5 = a[4:0];
  assign b5 = b[4:0];

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) begin
      a8[i] = 8'($urandom); b8[i] = 8'($urandom);
      c8[i] = 1'($urandom); v8[i] = ($urandom % 4) != 0;
    end
    a8[5] = 8'hFF; b8[5] = 8'h00; c8[5] = 1'b1;   // full carry ripple
    a8[6] = 8'hFF; b8[6] = 8'hFF; c8[6] = 1'b1;
    rst = 1'b1; a = '0; b = '0; cin = 1'b0; vin = 1'b0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < N + 10; t++) begin
      if (t < N) begin a = a8[t]; b = b8[t]; cin = c8[t]; vin = v8[t]; end
      else begin vin = 1'b0; end
      @(posedge clk); #1;
      // outputs now reflect inputs applied LAT clocks before (counted from t)
      if (t >= 7 && t - 7 < N) begin
        automatic int k = t - 7;
        check("sum8", {7'd0, co_d1, s_d1}, 16'(a8[k]) + 16'(b8[k]) + 16'(c8[k]));
        check("vld8", 16'(vo_d1), 16'(v8[k]));
      end
      if (t >= 4 && t - 4 < N) begin
        automatic int k = t - 4;
        check("sum5", {10'd0, co_5, s_5}, 16'(a8[k][4:0]) + 16'(b8[k][4:0]) + 16'(c8[k]));
        check("vld5", 16'(vo_5), 16'(v8[k]));
      end
      if (t >= 1 && t - 1 < N) begin
        automatic int k = t - 1;
        check("sum8cpa", {7'd0, co_d4, s_d4}, 16'(a8[k]) + 16'(b8[k]) + 16'(c8[k]));
        check("vld8cpa", 16'(vo_d4), 16'(v8[k]));
      end
    end
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
