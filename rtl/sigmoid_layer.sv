// sigmoid_layer -- element-wise sigmoid 1/(1+e^-x) by table lookup.
//
// Each input addresses a TAB_N-entry table covering x in [-RANGE, RANGE):
//   idx = clamp(floor(x * TAB_N / (2*RANGE)) + TAB_N/2, 0, TAB_N-1)
// and entry idx holds sigmoid((idx - TAB_N/2) * 2*RANGE/TAB_N) rounded to
// F fractional bits (nn_pkg::sigmoid_entry).  The table is computed at
// elaboration and becomes a ROM in LUTs or block RAM.
//
// Timing: one register stage (the ROM output), a new vector every clock.
// rst_n (active low, synchronous) clears out_valid only.
module sigmoid_layer #(
  parameter int unsigned N     = 6,
  parameter int unsigned W     = nn_pkg::DATA_W,
  parameter int unsigned F     = nn_pkg::frac_bits(W),
  parameter int unsigned TAB_N = nn_pkg::SIG_N,
  parameter int unsigned RANGE = nn_pkg::SIG_RANGE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [N],
  output logic                out_valid,
  output logic signed [W-1:0] y [N]
);
  import nn_pkg::*;

  localparam int unsigned IW    = $clog2(TAB_N);
  localparam int unsigned SCALE = TAB_N / (2 * RANGE);  // table steps per unit

  typedef logic signed [W-1:0] tab_t [TAB_N];
  function automatic tab_t make_table();
    tab_t t;
    for (int i = 0; i < int'(TAB_N); i++) t[i] = W'(sigmoid_entry(i, TAB_N, RANGE, F));
    return t;
  endfunction
  localparam tab_t TABLE = make_table();

  for (genvar i = 0; i < N; i++) begin : g_el
    logic signed [W+IW+1:0] pos;
    logic [IW-1:0]          idx;
    always_comb begin
      pos = ((W+IW+2)'(x[i]) * signed'((W+IW+2)'(SCALE))) >>> F;
      pos = pos + (W+IW+2)'(TAB_N / 2);
      if (pos < 0)                         idx = '0;
      else if (pos > (W+IW+2)'(TAB_N - 1)) idx = IW'(TAB_N - 1);
      else                                 idx = pos[IW-1:0];
    end
    always_ff @(posedge clk) y[i] <= TABLE[idx];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
