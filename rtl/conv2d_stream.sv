// conv2d_stream -- streamed 3x3 convolution, NF filters, "same" padding.
//
// Input pixels arrive one per clock in row-major order; a line_buffer
// turns the stream into zero-padded 3x3 windows, one per clock, and every
// window is multiplied by the NF fixed 3x3 kernels in parallel (9*NF
// const_mults) and each filter's nine products plus its bias are summed in
// an adder_tree.  Output position p = row*IMG_W + col carries NF values:
//   y[f] = wrap_W( sum_{dr,dc} trunc(in(row+dr, col+dc) * k_f(dr,dc)) + b_f )
// Kernel tap t = (dr+1)*3 + (dc+1) of filter f is nn_pkg::nn_weight(LAYER,
// t, f); bias b_f is nn_pkg::nn_bias(LAYER, f).
//
// Timing: the window for position p is ready one clock after the pixel
// IMG_W+1 positions later has entered (or after the same number of flush
// clocks at the end of an image); its outputs follow 3 + 2 = 5 clocks after
// that.  An 8x8 image therefore streams in over 64 clocks and consecutive
// images may follow back to back.  rst_n is active low and synchronous.
module conv2d_stream #(
  parameter int unsigned IMG_H = 8,
  parameter int unsigned IMG_W = 8,
  parameter int unsigned NF    = 2,
  parameter int unsigned W     = nn_pkg::DATA_W,
  parameter int unsigned F     = nn_pkg::frac_bits(W),
  parameter int unsigned DEPTH = nn_pkg::SA_DEPTH,
  parameter int unsigned LAYER = nn_pkg::L_CNN_CONV,
  localparam int unsigned PW   = $clog2(IMG_H * IMG_W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] pix,
  output logic                out_valid,
  output logic [PW-1:0]       out_pos,
  output logic signed [W-1:0] y [NF]
);
  import nn_pkg::*;

  localparam int unsigned RW  = $clog2(IMG_H);
  localparam int unsigned CW  = $clog2(IMG_W);
  localparam int unsigned NT  = 10;                  // 9 taps + bias
  localparam int unsigned SW  = W + $clog2(NT);
  localparam int unsigned LAT = MULT_LAT + 2;        // ceil(log4(10)) = 2

  logic                win_valid;
  logic [RW-1:0]       win_row;
  logic [CW-1:0]       win_col;
  logic signed [W-1:0] win [9];

  line_buffer #(.IMG_H(IMG_H), .IMG_W(IMG_W), .W(W)) u_lb (
    .clk, .rst_n, .in_valid, .pix,
    .win_valid, .win_row, .win_col, .win
  );

  for (genvar f = 0; f < NF; f++) begin : g_filt
    logic signed [W-1:0]  terms [NT];
    logic signed [SW-1:0] sum;
    for (genvar t = 0; t < 9; t++) begin : g_tap
      const_mult #(
        .W(W), .F(F), .DEPTH(DEPTH),
        .WEIGHT(nn_weight(LAYER, t, f, F))
      ) u_mul (
        .clk (clk),
        .x   (win[t]),
        .y   (terms[t])
      );
    end
    assign terms[9] = W'(nn_bias(LAYER, f, F));
    adder_tree #(.N(NT), .IW(W), .FANIN(TREE_FANIN)) u_tree (
      .clk (clk),
      .x   (terms),
      .sum (sum)
    );
    assign y[f] = sum[W-1:0];
  end

  // Position and validity travel alongside the arithmetic.
  logic [LAT-1:0] vld_q;
  logic [PW-1:0]  pos_q [LAT];
  always_ff @(posedge clk) begin
    pos_q[0] <= PW'(win_row) * PW'(IMG_W) + PW'(win_col);
    for (int k = 1; k < int'(LAT); k++) pos_q[k] <= pos_q[k-1];
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], win_valid};
  end
  assign out_valid = vld_q[LAT-1];
  assign out_pos   = pos_q[LAT-1];
endmodule
