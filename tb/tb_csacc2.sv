// tb_csacc2: self-checking testbench for the carry-save accumulator of
// carry-save operands. Random operand pairs are accumulated by one 16-bit
// slice and by four 16-bit slices cascaded into 64 bits (row carries passed
// upwards), with random clears and idle clocks; after every clock
// sum_q + carry_q must equal the running sum of the operand pairs, mod 2**16
// and mod 2**64 respectively.
module tb_csacc2;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        en, clr;
  logic [63:0] xs, xc, s, c, model;
  logic [15:0] s16, c16, model16;
  logic [1:0]  cy [5];

  csacc2 dut (.clk, .rst, .en, .clr, .in_sum(xs[15:0]), .in_carry(xc[15:0]), .cin(2'b00),
              .cout(), .sum_q(s16), .carry_q(c16));

  assign cy[0] = 2'b00;
  for (genvar k = 0; k < 4; k++) begin : g_sl
    csacc2 u_sl (.clk, .rst, .en, .clr, .in_sum(xs[16*k +: 16]), .in_carry(xc[16*k +: 16]),
                 .cin(cy[k]), .cout(cy[k+1]), .sum_q(s[16*k +: 16]), .carry_q(c[16*k +: 16]));
  end

  initial begin
    rst = 1'b1; en = 0; clr = 0; xs = '0; xc = '0; model = '0; model16 = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      en  = ($urandom % 6) != 0;
      clr = ($urandom % 40) == 0;
      xs  = {$urandom, $urandom};
      xc  = {$urandom, $urandom};
      if (en) model = (clr ? 64'd0 : model) + xs + xc;
      if (en) model16 = (clr ? 16'd0 : model16) + xs[15:0] + xc[15:0];
      @(posedge clk); #1;
      checks++;
      if (16'(s16 + c16) !== model16) begin
        failures++;
        if (failures < 10) $display("FAIL 16 t=%0d got %h expected %h", t, 16'(s16 + c16), model16);
      end
      checks++;
      if (s + c !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h expected %h", t, s + c, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
