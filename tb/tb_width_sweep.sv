// tb_width_sweep -- dense_layer at other word widths of the sweep.
//
// The networks default to 16-bit words; every layer is parameterised by
// the width W, with F = ceil(W/2) fraction bits, and the shift-add depth
// for that width (3 for 11..14 bits, 4 for 15..24, 6 for 30..32; DEPTH 0,
// all multipliers, at 8 bits).  This test builds an 8-input, 4-output
// dense layer at 8, 12, 24 and 32 bits and compares random vectors with a
// reference computed here for each width, including the 3 + 2 = 5 clock
// latency.
module tb_width_sweep;
  localparam int NI = 8, NO = 4, LAT = 5, NCFG = 4;
  localparam int WS [NCFG] = '{8, 12, 24, 32};
  localparam int DS [NCFG] = '{0, 3, 4, 6};

  logic clk = 0, rst_n = 0, in_valid = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint wrapw(longint v, int w);
    longint m;
    if (w >= 64) return v;
    m = v & ((longint'(1) << w) - 1);
    return (m >= (longint'(1) << (w - 1))) ? m - (longint'(1) << w) : m;
  endfunction

  // Reference dense layer for width w.
  function automatic longint ref_out(longint x [NI], int j, int w);
    longint acc;
    int f;
    f = (w + 1) / 2;
    acc = nn_pkg::nn_bias(1, j, f);
    for (int i = 0; i < NI; i++)
      acc += wrapw((x[i] * nn_pkg::nn_weight(1, i, j, f)) >>> f, w);
    return wrapw(acc, w);
  endfunction

  longint xin [NCFG][NI];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int W = WS[c];
    logic signed [W-1:0] x [NI];
    logic signed [W-1:0] y [NO];
    logic                out_valid;
    longint              expq [$];   // NO entries per vector
    int                  at [$];

    for (genvar i = 0; i < NI; i++) begin : g_x
      assign x[i] = W'(xin[c][i]);
    end

    dense_layer #(.N_IN(NI), .N_OUT(NO), .W(W), .F((W + 1) / 2), .DEPTH(DS[c]), .LAYER(1)) dut (
      .clk, .rst_n, .in_valid, .x, .out_valid, .y);

    always @(negedge clk) if (rst_n && out_valid) begin
      longint e;
      checks++;
      if (expq.size() < NO) failures++;
      else begin
        if (cyc - at.pop_front() != LAT) begin failures++; $display("W=%0d latency", W); end
        for (int j = 0; j < NO; j++) begin
          checks++;
          e = expq.pop_front();
          if (longint'(y[j]) != e) begin
            failures++; $display("W=%0d y[%0d] got %0d want %0d", W, j, y[j], e);
          end
        end
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 100; n++) begin
      @(negedge clk);
      in_valid = (n % 6 != 2);
      for (int c = 0; c < NCFG; c++) begin
        longint e [NO];
        for (int i = 0; i < NI; i++)
          xin[c][i] = wrapw(longint'({$urandom, $urandom}), WS[c]);
        for (int j = 0; j < NO; j++) e[j] = ref_out(xin[c], j, WS[c]);
        if (in_valid) begin
          case (c)
            0: begin foreach (e[j]) g_cfg[0].expq.push_back(e[j]); g_cfg[0].at.push_back(cyc); end
            1: begin foreach (e[j]) g_cfg[1].expq.push_back(e[j]); g_cfg[1].at.push_back(cyc); end
            2: begin foreach (e[j]) g_cfg[2].expq.push_back(e[j]); g_cfg[2].at.push_back(cyc); end
            default: begin foreach (e[j]) g_cfg[3].expq.push_back(e[j]); g_cfg[3].at.push_back(cyc); end
          endcase
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (g_cfg[0].expq.size() + g_cfg[1].expq.size() + g_cfg[2].expq.size() + g_cfg[3].expq.size() != 0)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
