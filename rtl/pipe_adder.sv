// pipe_adder: fully pipelined, bit-skewed carry-ripple adder (the ADD module).
//
// The operands are cut into NDIG = WIDTH/DIGIT digits of DIGIT bits. Digit k
// is added by its own small ripple adder one clock after digit k-1, using the
// carry that digit k-1 left in a pipeline register. The operand bits of digit
// k are therefore delayed by k registers on the way in, and its sum bits by
// NDIG-1-k registers plus the output latch on the way out, so every result
// bit leaves LATENCY = NDIG clocks after its operands entered. The clock
// period only has to cover one DIGIT-bit ripple adder: with DIGIT = 1 this is
// one full-adder (carry-save) delay, as in the fully pipelined structure;
// with DIGIT = m it is an m-bit carry-ripple adder, the variant that trades
// clock rate for fewer pipeline latches. A new operand pair can be applied
// every clock.
//
// Interface: a, b, cin and vld_i are sampled together; sum, cout (the carry
// out of the top bit, called OVR in the core) and vld_o appear LATENCY clocks
// later. The pipeline has no stall input. The valid bit travelling along is
// this implementation's addition; rst clears only the valid pipeline.
module pipe_adder #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DIGIT = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic             vld_i,
  output logic [WIDTH-1:0] sum,
  output logic             cout,
  output logic             vld_o
);
  localparam int unsigned NDIG    = WIDTH / DIGIT;
  localparam int unsigned LATENCY = NDIG;

  // carry leaving digit k, registered (index NDIG-1 is the latched cout)
  logic [NDIG-1:0] carry_q;
  logic [NDIG-1:0] carry_d;

  for (genvar k = 0; k < NDIG; k++) begin : g_dig
    logic [DIGIT-1:0] a_sk, b_sk;   // operand digit after k skew registers
    logic [DIGIT-1:0] s_d;          // sum digit, combinational
    logic             c_in;

    if (k == 0) begin : g_noskew
      assign a_sk = a[DIGIT-1:0];
      assign b_sk = b[DIGIT-1:0];
      assign c_in = cin;
    end else begin : g_skew
      logic [DIGIT-1:0] a_sr [k];
      logic [DIGIT-1:0] b_sr [k];
      always_ff @(posedge clk) begin
        a_sr[0] <= a[k*DIGIT +: DIGIT];
        b_sr[0] <= b[k*DIGIT +: DIGIT];
        for (int i = 1; i < int'(k); i++) begin
          a_sr[i] <= a_sr[i-1];
          b_sr[i] <= b_sr[i-1];
        end
      end
      assign a_sk = a_sr[k-1];
      assign b_sk = b_sr[k-1];
      assign c_in = carry_q[k-1];
    end

    assign {carry_d[k], s_d} = {1'b0, a_sk} + {1'b0, b_sk} + {{DIGIT{1'b0}}, c_in};

    // de-skew: NDIG-k registers, the last one being the output latch
    logic [DIGIT-1:0] s_sr [NDIG-k];
    always_ff @(posedge clk) begin
      s_sr[0] <= s_d;
      for (int i = 1; i < int'(NDIG - k); i++) s_sr[i] <= s_sr[i-1];
    end
    assign sum[k*DIGIT +: DIGIT] = s_sr[NDIG-k-1];
  end

  always_ff @(posedge clk) carry_q <= carry_d;
  assign cout = carry_q[NDIG-1];

  logic [LATENCY-1:0] vld_sr;
  always_ff @(posedge clk) begin
    if (rst) vld_sr <= '0;
    else     vld_sr <= {vld_sr[LATENCY-2:0], vld_i};
  end
  assign vld_o = vld_sr[LATENCY-1];

  initial begin
    assert (WIDTH % DIGIT == 0) else $error("pipe_adder: WIDTH must be a multiple of DIGIT");
    assert (NDIG >= 2) else $error("pipe_adder: needs at least two digits");
  end
endmodule
