// const_mult -- multiply a fixed-point input by a constant weight.
//
// The weight is a parameter.  At elaboration the weight is decomposed
// greedily into signed powers of two: each step subtracts sign(r)*2^c, 2^c
// being the power of two that brings the remainder r closest to zero.  If
// at most DEPTH steps bring the weight to zero, the product is built from
// that many shifted copies of the input and an adder (no multiplier);
// otherwise a dsp_mult is used.  DEPTH = 0 disables shift-add altogether,
// DEPTH = 1 accepts only powers of two, DEPTH = 2 accepts
// +-(x<<c1)+-(x<<c2), and so on.  A zero weight produces a constant zero.
//
// Number format: x and WEIGHT both have W bits with F fractional bits.  The
// 2W-bit product is exact in both forms; the result is its bit slice
// [W+F-1:F], i.e. truncated toward minus infinity and wrapped to W bits.
//
// Timing: both forms have LAT = 3 register stages (input, product, output),
// so every multiplier of a layer lines up.  Fully pipelined, one product
// per clock.
module const_mult #(
  parameter int unsigned        W      = 16,
  parameter int unsigned        F      = 8,
  parameter longint             WEIGHT = 64'sd100,
  parameter int unsigned        DEPTH  = 4
) (
  input  logic                  clk,
  input  logic signed [W-1:0]   x,
  output logic signed [W-1:0]   y
);
  import nn_pkg::*;

  localparam int NTERMS    = sa_terms(WEIGHT, int'(DEPTH));
  localparam bit USE_SHIFT = (NTERMS >= 0);

  logic signed [2*W-1:0] prod;

  if (USE_SHIFT) begin : g_shift_add
    logic signed [W-1:0]   x_q;
    logic signed [2*W-1:0] sum_q, prod_q;
    logic signed [2*W-1:0] term [NTERMS+1];

    // term[k+1] = term[k] +- (x << c_k), all shifts and signs constant.
    assign term[0] = '0;
    for (genvar k = 0; k < NTERMS; k++) begin : g_term
      localparam int SH  = sa_shift(WEIGHT, k);
      localparam bit NEG = sa_neg(WEIGHT, k);
      if (NEG) begin : g_sub
        assign term[k+1] = term[k] - ((2*W)'(x_q) <<< SH);
      end else begin : g_add
        assign term[k+1] = term[k] + ((2*W)'(x_q) <<< SH);
      end
    end
    wire signed [2*W-1:0] sum_c = term[NTERMS];

    always_ff @(posedge clk) begin
      x_q    <= x;
      sum_q  <= sum_c;
      prod_q <= sum_q;
    end
    assign prod = prod_q;
  end else begin : g_dsp
    dsp_mult #(.A_W(W), .B_W(W)) u_mult (
      .clk (clk),
      .ce  (1'b1),
      .a   (x),
      .b   (W'(WEIGHT)),
      .p   (prod)
    );
  end

  assign y = prod[W+F-1:F];
endmodule
