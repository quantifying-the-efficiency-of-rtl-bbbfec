// tb_const_mult -- self-checking test of const_mult.
//
// Eight constant multipliers with hand-picked weights: zero, a power of
// two, two- and three-term weights, a weight that needs five terms (so a
// DSP multiplier at DEPTH 4) and the same weights at DEPTH 0 (always the
// multiplier).  Random inputs every clock; each output is compared with
// floor(x*w / 2^8) wrapped to 16 bits exactly three clocks later.
module tb_const_mult;
  import tb_ref_pkg::*;
  localparam int NW = 8;
  localparam longint WS [NW] = '{0, 64, -96, 200, -171, 255, 171, -128};
  localparam int     DS [NW] = '{4, 4,   4,   4,    4,   4,   0,    0};

  logic clk = 0;
  always #5 clk = ~clk;
  logic signed [W-1:0] x;
  logic signed [W-1:0] y [NW];
  int checks = 0, failures = 0;

  for (genvar i = 0; i < NW; i++) begin : g_m
    const_mult #(.W(W), .F(F), .WEIGHT(WS[i]), .DEPTH(DS[i])) dut (.clk, .x, .y(y[i]));
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint hist [$];
    for (int cyc = 0; cyc < 300; cyc++) begin
      x = (cyc % 37 == 0) ? -16'sd32768 : W'($urandom);
      hist.push_back(x);
      @(posedge clk);
      #1;
      if (hist.size() > 3) void'(hist.pop_front());
      if (hist.size() == 3)
        for (int i = 0; i < NW; i++) begin
          checks++;
          if (longint'(y[i]) != mulq(hist[0], WS[i])) begin
            failures++;
            $display("w=%0d x=%0d got %0d want %0d", WS[i], hist[0], y[i], mulq(hist[0], WS[i]));
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
