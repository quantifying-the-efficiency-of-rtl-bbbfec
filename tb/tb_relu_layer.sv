// tb_relu_layer -- self-checking test of relu_layer: random vectors with
// forced negative, zero and extreme values, checked one clock later
// together with out_valid.
module tb_relu_layer;
  import tb_ref_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y [N];
  int checks = 0, failures = 0;

  relu_layer #(.N(N), .W(W)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint prev [N];
    bit pv;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    pv = 0;
    for (int cyc = 0; cyc < 100; cyc++) begin
      in_valid = (cyc % 5 != 2);
      for (int i = 0; i < N; i++)
        x[i] = (i == 0) ? -16'sd32768 : (i == 1) ? 16'sd0 : (i == 2) ? 16'sd32767 : W'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != in_valid) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (longint'(y[i]) != relu_ref(x[i])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
