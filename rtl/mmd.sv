// mmd: bit-serial minimum detector (MMD).
//
// Keeps the smallest error seen since `init` and the tag (candidate number,
// i.e. the motion vector) it belongs to. Each new error arrives bit-serially,
// least significant bit first, straight from the converter. A single full
// adder with a borrow flip-flop subtracts the stored minimum from it as the
// bits go by, the stored minimum rotating past the adder in step; the new
// bits are collected in a shift register. After the last bit the borrow says
// whether the new error is smaller, and if so it replaces the minimum.
//
// Interface: bit_i is sampled in clocks where bit_vld is high, WIDTH clocks
// per error; tag_i is sampled with the first bit. The first error after
// `init` is always taken. `cmp_done` pulses one clock after the last bit,
// together with `new_min` when the minimum was replaced. On a tie the earlier
// candidate is kept (this implementation's choice). rst clears everything.
module mmd #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             init,
  input  logic             bit_i,
  input  logic             bit_vld,
  input  logic [TAG_W-1:0] tag_i,
  output logic [WIDTH-1:0] min_q,
  output logic [TAG_W-1:0] tag_q,
  output logic             have_min,
  output logic             cmp_done,
  output logic             new_min
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] new_sr;
  logic [TAG_W-1:0] tag_cur;
  logic [CW-1:0]    cnt_q;
  logic             borrow_q;
  logic             m_bit, borrow_d, last;

  always_comb begin
    m_bit    = min_q[0];
    // borrow of (new - min), one bit at a time
    borrow_d = (~bit_i & m_bit) | (~(bit_i ^ m_bit) & borrow_q);
    last     = (cnt_q == CW'(WIDTH - 1));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      min_q    <= '1;
      tag_q    <= '0;
      tag_cur  <= '0;
      have_min <= 1'b0;
      new_sr   <= '0;
      cnt_q    <= '0;
      borrow_q <= 1'b0;
      cmp_done <= 1'b0;
      new_min  <= 1'b0;
    end else begin
      cmp_done <= 1'b0;
      new_min  <= 1'b0;
      if (init) begin
        have_min <= 1'b0;
        cnt_q    <= '0;
        borrow_q <= 1'b0;
      end else if (bit_vld) begin
        if (cnt_q == '0) tag_cur <= tag_i;
        new_sr <= {bit_i, new_sr[WIDTH-1:1]};
        if (last) begin
          cnt_q    <= '0;
          borrow_q <= 1'b0;
          cmp_done <= 1'b1;
          if (!have_min || borrow_d) begin
            min_q    <= {bit_i, new_sr[WIDTH-1:1]};
            tag_q    <= (cnt_q == '0) ? tag_i : tag_cur;
            have_min <= 1'b1;
            new_min  <= 1'b1;
          end else begin
            min_q <= {min_q[0], min_q[WIDTH-1:1]};
          end
        end else begin
          cnt_q    <= cnt_q + 1'b1;
          borrow_q <= borrow_d;
          min_q    <= {min_q[0], min_q[WIDTH-1:1]};
        end
      end
    end
  end
endmodule
