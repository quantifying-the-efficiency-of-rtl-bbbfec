// softmax_layer -- y[i] = e^x[i] / sum_j e^x[j] by table lookups.
//
// Six register stages, a new vector every clock:
//   1  register the inputs
//   2  subtract the largest input from each: d[i] = x[i] - max <= 0, so
//      every exponent lies in (0, 1] and the largest is exactly 1
//   3  e[i] = EXP table at idx = min(floor(-d[i] * EXP_N / EXP_RANGE), EXP_N-1)
//      (entry k = e^(-k*EXP_RANGE/EXP_N), W-bit unsigned, W-1 fraction bits)
//   4  s = sum of e[i]  (1 <= s <= N)
//   5  r = INV table at idx = min(floor(s * INV_N / INV_RANGE), INV_N-1)
//      (entry k = 1/max(1, k*INV_RANGE/INV_N), W-1 fraction bits)
//   6  y[i] = floor(e[i] * r) with F fraction bits
// Tables are computed at elaboration (nn_pkg::exp_entry, inv_entry).
//
// Timing: y/out_valid follow x/in_valid by 6 clocks.  rst_n is active low
// and synchronous and clears the valid pipeline only.
module softmax_layer #(
  parameter int unsigned N         = 10,
  parameter int unsigned W         = nn_pkg::DATA_W,
  parameter int unsigned F         = nn_pkg::frac_bits(W),
  parameter int unsigned EXP_N     = nn_pkg::EXP_N,
  parameter int unsigned EXP_RANGE = nn_pkg::EXP_RANGE,
  parameter int unsigned INV_N     = nn_pkg::INV_N,
  parameter int unsigned INV_RANGE = nn_pkg::INV_RANGE
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x [N],
  output logic                out_valid,
  output logic signed [W-1:0] y [N]
);
  import nn_pkg::*;

  localparam int unsigned EF  = W - 1;               // exponent fraction bits
  localparam int unsigned RF  = W - 1;               // reciprocal fraction bits
  localparam int unsigned EIW = $clog2(EXP_N);
  localparam int unsigned RIW = $clog2(INV_N);
  localparam int unsigned SW  = W + $clog2(N);        // sum width
  localparam int unsigned LAT = 6;

  typedef logic [W-1:0] exp_tab_t [EXP_N];
  typedef logic [W-1:0] inv_tab_t [INV_N];
  function automatic exp_tab_t make_exp();
    exp_tab_t t;
    for (int i = 0; i < int'(EXP_N); i++) t[i] = W'(exp_entry(i, EXP_N, EXP_RANGE, EF));
    return t;
  endfunction
  function automatic inv_tab_t make_inv();
    inv_tab_t t;
    for (int i = 0; i < int'(INV_N); i++) t[i] = W'(inv_entry(i, INV_N, INV_RANGE, RF));
    return t;
  endfunction
  localparam exp_tab_t EXP_TAB = make_exp();
  localparam inv_tab_t INV_TAB = make_inv();

  logic signed [W-1:0] x_q [N];
  logic signed [W:0]   d_q [N];
  logic [W-1:0]        e_q [N];
  logic [W-1:0]        e2_q [N];
  logic [W-1:0]        e3_q [N];
  logic [SW-1:0]       s_q;
  logic [W-1:0]        r_q;
  logic signed [W-1:0] mx;

  always_comb begin
    mx = x_q[0];
    for (int i = 1; i < int'(N); i++) if (x_q[i] > mx) mx = x_q[i];
  end

  // Exponent table address of each difference (-d scaled to table steps).
  logic [EIW-1:0] eidx [N];
  for (genvar i = 0; i < N; i++) begin : g_eidx
    logic [W+EIW:0] m;
    always_comb begin
      m = (((W+EIW+1)'(-d_q[i])) * (W+EIW+1)'(EXP_N / EXP_RANGE)) >> F;
      eidx[i] = (m > (W+EIW+1)'(EXP_N - 1)) ? EIW'(EXP_N - 1) : m[EIW-1:0];
    end
  end

  logic [RIW-1:0]   ridx;
  logic [SW+RIW:0]  sm;
  always_comb begin
    sm   = (((SW+RIW+1)'(s_q)) * (SW+RIW+1)'(INV_N / INV_RANGE)) >> EF;
    ridx = (sm > (SW+RIW+1)'(INV_N - 1)) ? RIW'(INV_N - 1) : sm[RIW-1:0];
  end

  always_ff @(posedge clk) begin
    logic [SW-1:0] acc;
    x_q <= x;
    for (int i = 0; i < int'(N); i++) d_q[i] <= (W+1)'(x_q[i]) - (W+1)'(mx);
    for (int i = 0; i < int'(N); i++) e_q[i] <= EXP_TAB[eidx[i]];
    acc = '0;
    for (int i = 0; i < int'(N); i++) acc = acc + SW'(e_q[i]);
    s_q  <= acc;
    e2_q <= e_q;
    r_q  <= INV_TAB[ridx];
    e3_q <= e2_q;
    for (int i = 0; i < int'(N); i++)
      y[i] <= W'(((2*W)'(e3_q[i]) * (2*W)'(r_q)) >> (EF + RF - F));
  end

  logic [LAT-1:0] vld_q;
  always_ff @(posedge clk) begin
    if (!rst_n) vld_q <= '0;
    else        vld_q <= {vld_q[LAT-2:0], in_valid};
  end
  assign out_valid = vld_q[LAT-1];
endmodule
