// tb_sigmoid_layer -- self-checking test of sigmoid_layer: sweeps inputs
// across and beyond the table range (-8..8) and compares with a
// real-number sigmoid of the same table index, rounded to 8 fraction bits,
// one clock later.
module tb_sigmoid_layer;
  import tb_ref_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] x [N];
  logic signed [W-1:0] y [N];
  int checks = 0, failures = 0;

  sigmoid_layer #(.N(N), .W(W), .F(F)) dut (.clk, .rst_n, .in_valid, .x, .out_valid, .y);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 600; cyc++) begin
      in_valid = 1;
      x[0] = W'(cyc * 8 - 2600);          // -10.2 .. 8.6 in steps of 1/32
      x[1] = W'($urandom);
      x[2] = W'($urandom_range(0, 4095) - 2048);
      x[3] = (cyc % 2) ? 16'sd32767 : -16'sd32768;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid) failures++;
      for (int i = 0; i < N; i++) begin
        checks++;
        if (longint'(y[i]) != sigmoid_ref(x[i])) begin
          failures++;
          $display("x=%0d got %0d want %0d", x[i], y[i], sigmoid_ref(x[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
