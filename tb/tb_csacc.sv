// tb_csacc: self-checking testbench for the carry-save accumulator.
//
// A 16-bit instance accumulates random addends with random LSB carry-ins,
// is cleared at random points (the cleared clock's addend starting the new
// sum), sometimes disabled, and sometimes told to multiply its contents by
// four first. After every clock sum_q + carry_q (mod 2**16) must equal an
// integer model. The accumulated |x-y| case is also covered: the addend is
// the bit inverse of a negative difference with carry-in 1. A second set of
// four 16-bit slices is cascaded into a 64-bit accumulator (shifted bits and
// top carries passed upwards) and checked the same way against a 64-bit
// model, with x4 shifts.
module tb_csacc;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic        en, clr, shift2, cin;
  logic [15:0] addend, s, c;
  logic [15:0] model;

  csacc dut (.clk, .rst, .en, .clr, .shift2, .addend, .cin,
             .sh_in_s(2'b00), .sh_in_c(2'b00), .sh_out_s(), .sh_out_c(), .cout(),
             .sum_q(s), .carry_q(c));

  // 64-bit cascade of four slices
  logic [63:0] add64, s64, c64, model64;
  logic [1:0]  shs [5];
  logic [1:0]  shc [5];
  logic        cy  [5];
  assign shs[0] = 2'b00;
  assign shc[0] = 2'b00;
  assign cy[0]  = cin;
  for (genvar k = 0; k < 4; k++) begin : g_sl
    csacc u_sl (.clk, .rst, .en, .clr, .shift2, .addend(add64[16*k +: 16]), .cin(cy[k]),
                .sh_in_s(shs[k]), .sh_in_c(shc[k]), .sh_out_s(shs[k+1]), .sh_out_c(shc[k+1]),
                .cout(cy[k+1]), .sum_q(s64[16*k +: 16]), .carry_q(c64[16*k +: 16]));
  end

  initial begin
    rst = 1'b1; en = 0; clr = 0; shift2 = 0; cin = 0; addend = '0; model = '0;
    add64 = '0; model64 = '0;
    @(posedge clk); #1;
    rst = 1'b0;
    checks++;
    if (16'(s + c) !== 16'd0) failures++;
    for (int t = 0; t < 2000; t++) begin
      en     = ($urandom % 8) != 0;
      clr    = ($urandom % 50) == 0;
      shift2 = (t > 1000) && (($urandom % 3) == 0);
      if (t < 500) begin
        // |x-y| mode: x, y pixels
        automatic int x = $urandom % 256;
        automatic int y = $urandom % 256;
        automatic logic [8:0] dd = 9'(x) - 9'(y);
        cin    = (x < y);
        addend = cin ? 16'(~dd[7:0]) : 16'(dd[7:0]);
      end else begin
        addend = 16'($urandom);
        cin    = 1'($urandom);
      end
      add64 = {$urandom, $urandom};
      if (en) model = (clr ? 16'd0 : (shift2 ? 16'(model << 2) : model)) + addend + 16'(cin);
      if (en) model64 = (clr ? 64'd0 : (shift2 ? (model64 << 2) : model64)) + add64 + 64'(cin);
      @(posedge clk); #1;
      checks++;
      if (s64 + c64 !== model64) begin
        failures++;
        if (failures < 10) $display("FAIL 64 t=%0d got %h expected %h", t, s64 + c64, model64);
      end
      checks++;
      if (16'(s + c) !== model) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d got %h expected %h", t, 16'(s + c), model);
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
