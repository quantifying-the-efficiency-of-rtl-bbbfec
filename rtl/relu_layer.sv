// relu_layer -- element-wise rectified linear unit, one register stage.
//
// y[i] = max(x[i], 0): a negative value (sign bit set) becomes zero.
// Timing: y/out_valid follow x/in_valid by one clock; a new vector every
// clock.  rst_n (active low, synchronous) clears out_valid only.
module relu_layer #(
  parameter int unsigned N = 16,
  parameter int unsigned W = nn_pkg::DATA_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [N],
  output logic                out_valid,
  output logic signed [W-1:0] y [N]
);
  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) y[i] <= x[i][W-1] ? '0 : x[i];
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
