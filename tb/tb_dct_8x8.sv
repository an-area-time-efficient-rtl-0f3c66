// tb_dct_8x8: runs a complete 8x8 two-dimensional DCT, Z = C^T X C, on the
// four-core unit in MAC mode, as a row pass Y = X C followed by a column
// pass Z = C^T Y, each with the multiplication-saving decomposition
//
//   y(k,l) = sum_{m=1..2} (w(2m-1) + c(2m,l)) * (w(2m) + c(2m-1,l))
//          - sum_{m=1..2} w(2m) * w(2m-1)
//          - sum_{m=1..2} c(2m-1,l) * c(2m,l)
//
// where w = u(k,m) = x(k,m) + x(k,9-m) for odd l and w = v(k,m) = x(k,m) -
// x(k,9-m) for even l (m = 1..4). The pre-adders form the two factors of
// each product (the correction products use the subtracting pre-adders
// with a zero operand), and each output is one six-product sum.
//
// Fixed point: the constants c(k,l) = sqrt(2/8) cos((2k-1)(l-1)pi/16)
// (1/sqrt(8) for l = 1) are scaled by 2**12 and rounded. Row pass: the data
// are made fractional with the same scale (u and v scaled by 2**3, i.e.
// divided by 2**9 and multiplied by 2**12), so each result is y * 2**15.
// Between the passes each y is rounded to y * 2**2 (a quarter step); the
// column pass then gives z * 2**14. Checked: every result of both passes
// equals the exact integer model of the scaled arithmetic; each row result
// lies within 0.5 of the real row transform and each final coefficient
// within 1.0 of the real 2-D DCT. Two patterned rows (flat white, and
// alternating 0/255) push the row-pass dynamic range to its limit.
module tb_dct_8x8;
  import me_pkg::*;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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

  localparam int    F  = 12;                 // constant scale 2**F
  localparam int    DS = 3;                  // data scale 2**(F-9)
  localparam real   PI = 3.14159265358979323846;

  int  x [8][8];       // pixels x[k][m], m = 0..7
  int  din [8][8];     // input of the current 1-D pass, one row per k
  longint dout [8][8]; // its results, scaled
  int  yq [8][8];      // row-pass results rounded to y * 2**2
  real yr [8][8];      // real row transform
  int  cq [8][8];      // scaled constants cq[m][l], m, l = 0..7
  real cr [8][8];      // real constants

  task automatic product(int w0, int w1, int w2, int w3, bit sub, bit f, bit l);
    word_i[0] = 16'(w0); word_i[1] = 16'(w1); word_i[2] = 16'(w2); word_i[3] = 16'(w3);
    mac_sub = sub; mac_first = f; mac_last = l; vld_i = 1'b1;
    @(posedge clk); #1;
    vld_i = 1'b0;
    repeat (7) @(posedge clk); #1;
  endtask

  // one 1-D pass over the rows of din; dout[k][l] = sum_m (din[k][m] scaled) c(m,l)
  task automatic pass(int shift);
    for (int k = 0; k < 8; k++) begin
      for (int l = 0; l < 8; l++) begin
        automatic int     w [4];
        automatic longint exp_int = 0;
        automatic longint got;
        for (int m = 0; m < 4; m++) begin
          w[m] = (l % 2 == 0) ? (din[k][m] + din[k][7-m]) : (din[k][m] - din[k][7-m]);
          w[m] = w[m] <<< shift;
          exp_int += longint'(w[m]) * longint'(cq[m][l]);
        end
        // six products: two main terms and four corrections
        for (int p = 0; p < 2; p++)
          product(w[2*p], cq[2*p+1][l], w[2*p+1], cq[2*p][l], 1'b0, p == 0, 1'b0);
        for (int p = 0; p < 2; p++)
          product(0, w[2*p+1], w[2*p], 0, 1'b1, 1'b0, 1'b0);
        for (int p = 0; p < 2; p++)
          product(0, cq[2*p][l], cq[2*p+1][l], 0, 1'b1, 1'b0, p == 1);
        while (!mac_result_vld) begin @(posedge clk); #1; end
        got = longint'(mac_result);
        checks++;
        if (got != exp_int) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): got %0d expected %0d", k, l, got, exp_int);
        end
        dout[k][l] = got;
      end
    end
  endtask

  task automatic accuracy(string what, real got, real exp, real tol, inout int max_milli);
    automatic real err = got - exp;
    if (err < 0.0) err = -err;
    if ($rtoi(err * 1000.0) > max_milli) max_milli = $rtoi(err * 1000.0);
    checks++;
    if (err > tol) begin
      failures++;
      $display("FAIL accuracy %s: %f vs %f", what, got, exp);
    end
  endtask

  initial begin
    automatic int row_err_milli = 0, dct_err_milli = 0;
    rst = 1'b1; mode = MODE_MAC; vld_i = 0; search_init = 0; op_i = OP_ADD;
    mac_sub = 0; mac_first = 0; mac_last = 0; mac_wide = 0;
    for (int w = 0; w < 4; w++) word_i[w] = '0;
    for (int m = 0; m < 8; m++)
      for (int l = 0; l < 8; l++) begin
        cr[m][l] = (l == 0) ? 1.0 / $sqrt(8.0)
                            : $sqrt(2.0 / 8.0) * $cos(real'((2 * m + 1) * l) * PI / 16.0);
        cq[m][l] = $rtoi(cr[m][l] * 4096.0 + (cr[m][l] >= 0.0 ? 0.5 : -0.5));
      end
    for (int k = 0; k < 8; k++) for (int m = 0; m < 8; m++) x[k][m] = $urandom % 256;
    x[0] = '{255, 255, 255, 255, 255, 255, 255, 255};
    x[1] = '{0, 255, 0, 255, 0, 255, 0, 255};
    repeat (3) @(posedge clk); #1;
    rst = 1'b0;

    // row pass: Y = X C, results y * 2**15
    din = x;
    pass(DS);
    for (int k = 0; k < 8; k++)
      for (int l = 0; l < 8; l++) begin
        yr[k][l] = 0.0;
        for (int m = 0; m < 8; m++) yr[k][l] += real'(x[k][m]) * cr[m][l];
        accuracy($sformatf("y(%0d,%0d)", k, l), real'(dout[k][l]) / 32768.0, yr[k][l], 0.5, row_err_milli);
        yq[k][l] = int'((dout[k][l] + 64'sd4096) >>> 13);
      end

    // column pass: Z = C^T Y, computed as rows of Y^T; results z * 2**14
    for (int l = 0; l < 8; l++) for (int k = 0; k < 8; k++) din[l][k] = yq[k][l];
    pass(0);
    for (int l = 0; l < 8; l++)
      for (int j = 0; j < 8; j++) begin
        automatic real zr = 0.0;
        for (int k = 0; k < 8; k++) zr += cr[k][j] * yr[k][l];
        accuracy($sformatf("z(%0d,%0d)", j, l), real'(dout[l][j]) / 16384.0, zr, 1.0, dct_err_milli);
      end

    $display("largest error: row transform %0d/1000, 2-D DCT %0d/1000", row_err_milli, dct_err_milli);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
