// adder_tree -- pipelined signed adder tree, FANIN terms per stage.
//
// N inputs of IW bits are summed in LEVELS = ceil(log_FANIN(N)) register
// stages: each stage adds groups of up to FANIN terms of the previous one
// and registers the partial sums.  The module builds one stage and
// instantiates itself on the stage's partial sums until one sum is left.
// Four terms per stage (the default) gave the same clock rate as
// two-input stages with fewer stages, flip-flops and LUTs.  The sum is
// exact in the default OW = IW + ceil(log2 N) bits;
// the later stages are built with OW-bit inputs and outputs.
//
// Lint note: when this module is linted on its own as the top, Verilator
// does not elaborate the recursive instance inside the top copy and reports
// sum as undriven and part as unused.  Instantiated in a design (and in
// simulation) every level is built and sum is driven; the testbench checks
// 3- and 4-level trees.
//
// Timing: sum is valid LEVELS clocks after x (at least one stage: a single
// input is simply registered).  Fully pipelined, no reset, no handshake.
module adder_tree #(
  parameter int unsigned N     = 16,
  parameter int unsigned IW    = 16,
  parameter int unsigned FANIN = 4,
  parameter int unsigned OW    = IW + ((N > 1) ? $clog2(N) : 0)
) (
  input  logic                 clk,
  input  logic signed [IW-1:0] x [N],
  output logic signed [OW-1:0] sum
);
  localparam int unsigned NCUR = (N + FANIN - 1) / FANIN;

  // One stage: group g adds inputs g*FANIN .. g*FANIN+FANIN-1.
  logic signed [OW-1:0] part [NCUR];
  always_ff @(posedge clk) begin
    for (int g = 0; g < int'(NCUR); g++) begin
      logic signed [OW-1:0] acc;
      acc = '0;
      for (int k = 0; k < int'(FANIN); k++)
        if (g * int'(FANIN) + k < int'(N)) acc = acc + OW'(x[g*FANIN+k]);
      part[g] <= acc;
    end
  end

  // The remaining stages are an adder tree over the NCUR partial sums.
  if (NCUR == 1) begin : g_last
    assign sum = part[0];
  end else begin : g_next
    adder_tree #(.N(NCUR), .IW(OW), .OW(OW), .FANIN(FANIN)) u_rest (
      .clk (clk),
      .x   (part),
      .sum (sum)
    );
  end
endmodule
