// tb_cs_binary_conv: self-checking testbench for the bit-serial carry-save to
// binary converter. Random sum/carry pairs and carry-ins are converted by a
// 16-bit instance; the serial bits must come out LSB first, one per clock,
// starting the clock after start, exactly 16 of them; done must pulse one
// clock after the last bit with result = (s + c + cin) mod 2**16 and cout the
// carry out of bit 15. Conversions are started back to back and with gaps.
// Every other conversion is loaded some clocks before it is started, with
// the vector inputs changed in between: the loaded values must be used.
module tb_cs_binary_conv;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        load, start, cin, bit_o, bit_vld, done, cout;
  logic [15:0] s, c, result;

  cs_binary_conv dut (.clk, .rst, .load, .start, .sum_in(s), .carry_in(c), .cin,
                      .bit_o, .bit_vld, .done, .result, .cout);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0h expected %0h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst = 1'b1; load = 0; start = 0; s = '0; c = '0; cin = 0;
    repeat (2) @(posedge clk); #1;
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      automatic logic [16:0] tot;
      automatic logic [15:0] ser = '0;
      s = 16'($urandom); c = 16'($urandom); cin = 1'($urandom);
      if (n == 0) begin s = 16'hFFFF; c = 16'h0001; cin = 1'b1; end
      tot = 17'(s) + 17'(c) + 17'(cin);
      load = 1'b1;
      if (n % 2 == 1) begin
        @(posedge clk); #1;
        load = 1'b0;
        s = 16'($urandom); c = 16'($urandom);
        repeat ($urandom % 4) @(posedge clk); #1;
      end
      start = 1'b1;
      @(posedge clk); #1;
      start = 1'b0; load = 1'b0;
      for (int i = 0; i < 16; i++) begin
        check("bit_vld", longint'(bit_vld), 1);
        ser[i] = bit_o;
        check("done early", longint'(done), 0);
        @(posedge clk); #1;
      end
      check("bit_vld end", longint'(bit_vld), 0);
      check("done", longint'(done), 1);
      check("serial", longint'(ser), longint'(tot[15:0]));
      check("result", longint'(result), longint'(tot[15:0]));
      check("cout", longint'(cout), longint'(tot[16]));
      if (($urandom % 2) == 0) begin
        @(posedge clk); #1;
        check("done one clock", longint'(done), 0);
      end
    end
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
