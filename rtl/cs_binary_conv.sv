// cs_binary_conv: bit-serial carry-save to binary converter (CS/BINARY CONV.).
//
// A carry-save accumulator delivers its total as two vectors. This block
// resolves them with a single full adder and a carry flip-flop: `load`
// latches the two vectors; `start` takes the incoming carry `cin` and then
// one result bit is emitted per clock, least significant first, while both
// vectors shift right. load and start may come in the same clock; a cascaded
// slice is loaded together with the others and started later, when its
// carry is known. An N-bit result takes N
// clocks, which is short against the 256 clocks an accumulator needs for a
// 16x16 block, so one converter keeps up with back-to-back blocks.
//
// Interface: bit_o / bit_vld carry the serial result (bit_o is valid in the
// clocks where bit_vld is high, the first one right after start); `done`
// pulses for one clock after the last bit, with the full word on `result`
// and the final carry on `cout`. Slices are cascaded into a wider converter
// by feeding one slice's done/cout to the next slice's start/cin. Loading or
// starting while busy is not allowed (asserted). rst clears the state.
module cs_binary_conv #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             load,
  input  logic             start,
  input  logic [WIDTH-1:0] sum_in,
  input  logic [WIDTH-1:0] carry_in,
  input  logic             cin,
  output logic             bit_o,
  output logic             bit_vld,
  output logic             done,
  output logic [WIDTH-1:0] result,
  output logic             cout
);
  localparam int unsigned CW = $clog2(WIDTH + 1);

  logic [WIDTH-1:0] s_q, c_q;
  logic             cy_q;
  logic             busy_q;
  logic [CW-1:0]    cnt_q;
  logic             fa_s, fa_c;

  always_comb begin
    fa_s = s_q[0] ^ c_q[0] ^ cy_q;
    fa_c = (s_q[0] & c_q[0]) | (s_q[0] & cy_q) | (c_q[0] & cy_q);
  end

  assign bit_o   = fa_s;
  assign bit_vld = busy_q;
  assign cout    = cy_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
      cnt_q  <= '0;
      cy_q   <= 1'b0;
      s_q    <= '0;
      c_q    <= '0;
      result <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        s_q <= sum_in;
        c_q <= carry_in;
      end
      if (start) begin
        cy_q   <= cin;
        busy_q <= 1'b1;
        cnt_q  <= '0;
      end else if (busy_q) begin
        s_q    <= s_q >> 1;
        c_q    <= c_q >> 1;
        cy_q   <= fa_c;
        result <= {fa_s, result[WIDTH-1:1]};
        cnt_q  <= cnt_q + 1'b1;
        if (cnt_q == CW'(WIDTH - 1)) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end
  always_ff @(posedge clk)
    if (!rst) assert (!(busy_q && (load || start))) else $error("cs_binary_conv: load/start while busy");
endmodule
