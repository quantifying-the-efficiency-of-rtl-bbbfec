// tb_cnn_net -- self-checking test of cnn_net at its default size
// (8x8 image, two 3x3 filters, dense 128 -> 10, softmax).
//
// Four random images: two back to back, one with pixel gaps, one after an
// idle stretch.  Each probability vector is compared with
// softmax(dense(relu(conv(image)))) from the reference model; the result
// must come 30 clocks after the image's last pixel, and back-to-back
// images must give results 64 clocks apart.
module tb_cnn_net;
  import tb_ref_pkg::*;
  localparam int H = 8, WI = 8, NF = 2, NC = 10, NIMG = 4, LAT = 30;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] pix;
  logic signed [W-1:0] y [NC];
  int checks = 0, failures = 0, nres = 0, cyc = 0;
  int last_pix_at [NIMG];
  int res_at [NIMG];
  typedef longint vec_t [];
  vec_t ref_y [NIMG];

  cnn_net dut (.clk, .rst_n, .in_valid, .pix, .out_valid, .y);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (nres >= NIMG) failures++;
    else begin
      res_at[nres] = cyc;
      checks++;
      if (cyc - last_pix_at[nres] != LAT) begin
        failures++; $display("image %0d latency %0d", nres, cyc - last_pix_at[nres]);
      end
      for (int j = 0; j < NC; j++) begin
        checks++;
        if (longint'(y[j]) != ref_y[nres][j]) begin
          failures++; $display("image %0d y[%0d] got %0d want %0d", nres, j, y[j], ref_y[nres][j]);
        end
      end
    end
    nres++;
  end

  initial begin
    vec_t img, t;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NIMG; k++) begin
      img = new[H*WI];
      for (int i = 0; i < H*WI; i++) img[i] = longint'($urandom_range(0, 256)); // 0 .. 1.0
      t = conv_ref(img, H, WI, NF, 3);
      foreach (t[i]) t[i] = relu_ref(t[i]);
      t = dense_ref(t, 4, NC);
      ref_y[k] = softmax_ref(t);
      if (k == 3) repeat (50) begin @(negedge clk); in_valid = 0; end
      for (int i = 0; i < H*WI; i++) begin
        if (k == 2 && i > 16 && i % 7 == 3) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1;
        pix = W'(img[i]);
        if (i == H*WI - 1) last_pix_at[k] = cyc;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (60) @(posedge clk);
    checks++;
    if (nres != NIMG) begin failures++; $display("%0d results", nres); end
    checks++;
    if (res_at[1] - res_at[0] != H * WI) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
