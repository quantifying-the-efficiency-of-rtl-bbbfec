// one_layer_net -- the one-layer dense model: dense -> ReLU -> dense ->
// sigmoid.
//
// A fully unrolled, fully pipelined network: an input vector of N_IN
// fixed-point features may be presented on every clock (initiation
// interval 1) and the N_OUT sigmoid outputs appear LAT clocks later,
// in order.  Hidden layer width N_HID.  All arithmetic is W-bit fixed point
// with F fractional bits; the weights of the two dense layers are the
// nn_pkg constant sets L_ONE_DENSE1 and L_ONE_DENSE2.
//
// Timing: LAT = (3 + ceil(log4(N_IN+1))) + 1 + (3 + ceil(log4(N_HID+1))) + 1
// (14 clocks at the defaults).  rst_n is active low and synchronous and
// clears only the valid pipeline.
module one_layer_net #(
  parameter int unsigned N_IN  = 16,
  parameter int unsigned N_HID = 16,
  parameter int unsigned N_OUT = 6,
  parameter int unsigned W     = nn_pkg::DATA_W,
  parameter int unsigned F     = nn_pkg::frac_bits(W),
  parameter int unsigned DEPTH = nn_pkg::SA_DEPTH
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [N_IN],
  output logic                out_valid,
  output logic signed [W-1:0] y [N_OUT]
);
  import nn_pkg::*;

  logic                h_valid, r_valid, o_valid;
  logic signed [W-1:0] h [N_HID];
  logic signed [W-1:0] r [N_HID];
  logic signed [W-1:0] o [N_OUT];

  dense_layer #(
    .N_IN(N_IN), .N_OUT(N_HID), .W(W), .F(F), .DEPTH(DEPTH), .LAYER(L_ONE_DENSE1)
  ) u_dense1 (
    .clk, .rst_n, .in_valid, .x, .out_valid(h_valid), .y(h)
  );

  relu_layer #(.N(N_HID), .W(W)) u_relu (
    .clk, .rst_n, .in_valid(h_valid), .x(h), .out_valid(r_valid), .y(r)
  );

  dense_layer #(
    .N_IN(N_HID), .N_OUT(N_OUT), .W(W), .F(F), .DEPTH(DEPTH), .LAYER(L_ONE_DENSE2)
  ) u_dense2 (
    .clk, .rst_n, .in_valid(r_valid), .x(r), .out_valid(o_valid), .y(o)
  );

  sigmoid_layer #(.N(N_OUT), .W(W), .F(F)) u_sigmoid (
    .clk, .rst_n, .in_valid(o_valid), .x(o), .out_valid, .y
  );
endmodule
