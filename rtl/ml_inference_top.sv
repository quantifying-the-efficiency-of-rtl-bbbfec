// ml_inference_top -- the two fixed-point inference networks side by side.
//
// one_layer_net (dense 16 -> 16, ReLU, dense 16 -> 6, sigmoid; a feature
// vector per clock) and cnn_net (8x8 image streamed a pixel per clock,
// 3x3 convolution with 2 filters, ReLU, dense 128 -> 10, softmax) share
// the clock and reset and nothing else; each brings out its own valid and
// data ports.  Both run in 16-bit fixed point with 8 fraction bits and a
// shift-add search depth of 4.
//
// Timing: one_* outputs follow one_* inputs by 14 clocks; see cnn_net for
// the CNN latency.  rst_n is active low and synchronous.
module ml_inference_top #(
  parameter int unsigned W       = nn_pkg::DATA_W,
  parameter int unsigned F       = nn_pkg::frac_bits(W),
  parameter int unsigned DEPTH   = nn_pkg::SA_DEPTH,
  parameter int unsigned N_IN    = 16,
  parameter int unsigned N_HID   = 16,
  parameter int unsigned N_OUT   = 6,
  parameter int unsigned IMG_H   = 8,
  parameter int unsigned IMG_W   = 8,
  parameter int unsigned NF      = 2,
  parameter int unsigned N_CLASS = 10
) (
  input  logic                clk,
  input  logic                rst_n,
  // one-layer model
  input  logic                one_in_valid,
  input  logic signed [W-1:0] one_x [N_IN],
  output logic                one_out_valid,
  output logic signed [W-1:0] one_y [N_OUT],
  // CNN model
  input  logic                cnn_in_valid,
  input  logic signed [W-1:0] cnn_pix,
  output logic                cnn_out_valid,
  output logic signed [W-1:0] cnn_y [N_CLASS]
);
  one_layer_net #(
    .N_IN(N_IN), .N_HID(N_HID), .N_OUT(N_OUT), .W(W), .F(F), .DEPTH(DEPTH)
  ) u_one (
    .clk, .rst_n,
    .in_valid(one_in_valid), .x(one_x),
    .out_valid(one_out_valid), .y(one_y)
  );

  cnn_net #(
    .IMG_H(IMG_H), .IMG_W(IMG_W), .NF(NF), .N_CLASS(N_CLASS),
    .W(W), .F(F), .DEPTH(DEPTH)
  ) u_cnn (
    .clk, .rst_n,
    .in_valid(cnn_in_valid), .pix(cnn_pix),
    .out_valid(cnn_out_valid), .y(cnn_y)
  );
endmodule
