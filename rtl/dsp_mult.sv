// dsp_mult -- three-stage pipelined signed multiplier.
//
// This is the multiplier used whenever a constant weight cannot be reduced
// to a few shifts and adds.  It is written in the shape FPGA synthesis maps
// onto a DSP slice with its internal registers in use, also for operands
// wider than one DSP (the tool then cascades two slices):
//   stage 1  operand registers      a_q, b_q
//   stage 2  product register       m_q = a_q * b_q
//   stage 3  output register        p
// The three-stage configuration is the one the networks use throughout;
// a one-stage variant limited the clock rate.
//
// Interface: ce is a clock enable for all three stages (held high in the
// networks).  p is the full A_W+B_W-bit product of the a, b presented three
// enabled clock edges earlier.  No reset: the pipeline carries data only,
// validity travels separately in the instantiating layer.
module dsp_mult #(
  parameter int unsigned A_W = 16,
  parameter int unsigned B_W = 16
) (
  input  logic                        clk,
  input  logic                        ce,
  input  logic signed [A_W-1:0]       a,
  input  logic signed [B_W-1:0]       b,
  output logic signed [A_W+B_W-1:0]   p
);
  logic signed [A_W-1:0]     a_q;
  logic signed [B_W-1:0]     b_q;
  logic signed [A_W+B_W-1:0] m_q;

  always_ff @(posedge clk) begin
    if (ce) begin
      a_q <= a;
      b_q <= b;
      m_q <= a_q * b_q;
      p   <= m_q;
    end
  end
endmodule
