// tb_feature_buffer -- self-checking test of feature_buffer (64 positions,
// 2 channels).  Writes two maps position by position, with gaps, and
// checks that out_valid pulses once, one clock after position 63, with
// every element at index pos*2 + channel.
module tb_feature_buffer;
  import tb_ref_pkg::*;
  localparam int NP = 64, NF = 2;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic [5:0] in_pos;
  logic signed [W-1:0] x [NF];
  logic signed [W-1:0] y [NP*NF];
  int checks = 0, failures = 0, pulses = 0;
  longint m [NP*NF];

  feature_buffer #(.NPOS(NP), .NF(NF), .W(W)) dut (
    .clk, .rst_n, .in_valid, .in_pos, .x, .out_valid, .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    pulses++;
    for (int i = 0; i < NP*NF; i++) begin
      checks++;
      if (longint'(y[i]) != m[i]) begin failures++; $display("y[%0d]", i); end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 2; k++) begin
      for (int p = 0; p < NP; p++) begin
        if (p % 9 == 4) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1;
        in_pos = 6'(p);
        for (int f = 0; f < NF; f++) begin
          x[f] = W'($urandom);
          m[p*NF + f] = x[f];
        end
        if (p == NP - 1) begin
          @(negedge clk);
          in_valid = 0;
          checks++;
          if (!out_valid) failures++;
        end else begin
          @(posedge clk); #1;
          checks++;
          if (out_valid) failures++;
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (pulses != 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
