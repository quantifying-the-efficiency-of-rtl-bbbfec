// dense_layer -- fully unrolled fixed-weight dense (matrix-vector) layer.
//
// y[j] = wrap_W( sum_i trunc(x[i] * w[i][j]) + b[j] )
// Every one of the N_IN*N_OUT products has its own const_mult, so the layer
// accepts a new input vector on every clock (initiation interval 1).  The
// weights w[i][j] and biases b[j] are constants taken from
// nn_pkg::nn_weight/nn_bias for layer LAYER; each const_mult chooses
// shift-add or a DSP multiplier for its weight (search depth DEPTH).  Each
// output sums its N_IN products and its bias in a four-input-per-stage
// adder_tree at full precision; the sum is then wrapped to W bits.
//
// Timing: out_valid/y follow in_valid/x by LAT = 3 + ceil(log4(N_IN+1))
// clocks.  rst_n (active low, synchronous) clears only the valid pipeline.
module dense_layer #(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_OUT = 16,
  parameter int unsigned W     = nn_pkg::DATA_W,
  parameter int unsigned F     = nn_pkg::frac_bits(W),
  parameter int unsigned DEPTH = nn_pkg::SA_DEPTH,
  parameter int unsigned LAYER = nn_pkg::L_ONE_DENSE1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [N_IN],
  output logic                out_valid,
  output logic signed [W-1:0] y [N_OUT]
);
  import nn_pkg::*;

  localparam int unsigned NT     = N_IN + 1;
  localparam int unsigned SW     = W + $clog2(NT);
  localparam int unsigned LEVELS = (NT <= 1) ? 1 : ($clog2(NT) + 1) / 2;
  localparam int unsigned LAT    = MULT_LAT + LEVELS;

  for (genvar j = 0; j < N_OUT; j++) begin : g_out
    logic signed [W-1:0]  terms [NT];
    logic signed [SW-1:0] sum;

    for (genvar i = 0; i < N_IN; i++) begin : g_in
      const_mult #(
        .W(W), .F(F), .DEPTH(DEPTH),
        .WEIGHT(nn_weight(LAYER, i, j, F))
      ) u_mul (
        .clk (clk),
        .x   (x[i]),
        .y   (terms[i])
      );
    end
    assign terms[N_IN] = W'(nn_bias(LAYER, j, F));

    adder_tree #(.N(NT), .IW(W), .FANIN(TREE_FANIN)) u_tree (
      .clk (clk),
      .x   (terms),
      .sum (sum)
    );

    assign y[j] = sum[W-1:0];
  end

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];
endmodule
