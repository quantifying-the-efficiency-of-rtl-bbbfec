// cnn_net -- the convolutional model: conv2d -> ReLU -> dense -> softmax.
//
// An IMG_H x IMG_W single-channel image streams in one pixel per clock.
// conv2d_stream applies NF 3x3 filters with same padding (8*8*2 = 128
// values), relu_layer clips them, feature_buffer collects the map into
// flip-flops, a fully unrolled dense_layer reduces it to N_CLASS scores
// and softmax_layer turns the scores into class probabilities.  Images may
// follow each other back to back: the dense layer and softmax take one
// image per clock, so the 64-clock input stream sets the throughput.
//
// Timing: counting from the clock in which an image's last pixel is
// presented, the line buffer needs IMG_W+1 = 9 more shifts (idle flush
// clocks or the next image's first pixels) to centre its last window, then
// 1 (window) + 5 (convolution) + 1 (ReLU) + 1 (feature buffer)
// + 7 (dense 128 -> 10) + 6 (softmax) clocks: out_valid comes 30 clocks
// after the last pixel when nothing stalls.  rst_n is active low and
// synchronous.
module cnn_net #(
  parameter int unsigned IMG_H   = 8,
  parameter int unsigned IMG_W   = 8,
  parameter int unsigned NF      = 2,
  parameter int unsigned N_CLASS = 10,
  parameter int unsigned W       = nn_pkg::DATA_W,
  parameter int unsigned F       = nn_pkg::frac_bits(W),
  parameter int unsigned DEPTH   = nn_pkg::SA_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] pix,
  output logic                out_valid,
  output logic signed [W-1:0] y [N_CLASS]
);
  import nn_pkg::*;

  localparam int unsigned NPOS = IMG_H * IMG_W;
  localparam int unsigned PW   = $clog2(NPOS);
  localparam int unsigned NFEA = NPOS * NF;

  logic                c_valid, r_valid, f_valid, d_valid;
  logic [PW-1:0]       c_pos, r_pos;
  logic signed [W-1:0] c_y [NF];
  logic signed [W-1:0] r_y [NF];
  logic signed [W-1:0] feat [NFEA];
  logic signed [W-1:0] score [N_CLASS];

  conv2d_stream #(
    .IMG_H(IMG_H), .IMG_W(IMG_W), .NF(NF), .W(W), .F(F), .DEPTH(DEPTH),
    .LAYER(L_CNN_CONV)
  ) u_conv (
    .clk, .rst_n, .in_valid, .pix,
    .out_valid(c_valid), .out_pos(c_pos), .y(c_y)
  );

  relu_layer #(.N(NF), .W(W)) u_relu (
    .clk, .rst_n, .in_valid(c_valid), .x(c_y), .out_valid(r_valid), .y(r_y)
  );
  always_ff @(posedge clk) r_pos <= c_pos;

  feature_buffer #(.NPOS(NPOS), .NF(NF), .W(W)) u_buf (
    .clk, .rst_n, .in_valid(r_valid), .in_pos(r_pos), .x(r_y),
    .out_valid(f_valid), .y(feat)
  );

  dense_layer #(
    .N_IN(NFEA), .N_OUT(N_CLASS), .W(W), .F(F), .DEPTH(DEPTH),
    .LAYER(L_CNN_DENSE)
  ) u_dense (
    .clk, .rst_n, .in_valid(f_valid), .x(feat), .out_valid(d_valid), .y(score)
  );

  softmax_layer #(.N(N_CLASS), .W(W), .F(F)) u_softmax (
    .clk, .rst_n, .in_valid(d_valid), .x(score), .out_valid, .y
  );
endmodule
