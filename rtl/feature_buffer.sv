// feature_buffer -- gathers a streamed feature map into one flat vector.
//
// The convolution delivers NF channel values per position, one position
// per clock.  They are written into a register array at
// index pos*NF + f (channels last, the order in which a flattened map
// feeds the following dense layer).  When position NPOS-1 has been
// written, out_valid is raised for one clock and y holds the complete map
// of that image; the fully parallel dense layer samples it in that clock,
// so the next image may start overwriting on the following one.  The
// buffer is plain flip-flops.
//
// Timing: out_valid one clock after the last position's in_valid.  rst_n
// is active low and synchronous and clears out_valid; the data registers
// are not reset.
module feature_buffer #(
  parameter int unsigned NPOS = 64,
  parameter int unsigned NF   = 2,
  parameter int unsigned W    = nn_pkg::DATA_W,
  localparam int unsigned PW  = $clog2(NPOS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [PW-1:0]       in_pos,
  input  logic signed [W-1:0] x [NF],
  output logic                out_valid,
  output logic signed [W-1:0] y [NPOS*NF]
);
  always_ff @(posedge clk) begin
    if (in_valid)
      for (int f = 0; f < int'(NF); f++) y[int'(in_pos)*NF + f] <= x[f];
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid && (in_pos == PW'(NPOS - 1));
  end
endmodule
