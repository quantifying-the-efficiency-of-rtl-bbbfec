// tb_ml_inference_top -- end-to-end test of ml_inference_top at its
// default parameters (16-bit words, 8 fraction bits, shift-add depth 4,
// one-layer model 16-16-6, CNN 8x8 / 2 filters / 10 classes).
//
// Both networks run at the same time.  The one-layer model gets 120
// feature vectors, mostly on consecutive clocks and some with gaps; the
// CNN gets five images: back to back, with pixel gaps, and after idle
// stretches, so that the line buffer both flushes on its own and is
// pushed through by the next image.  Every result is compared with the
// reference model and its latency checked (14 and 30 clocks).  Each of
// these situations is counted, and one that never happened is a failure.
module tb_ml_inference_top;
  import tb_ref_pkg::*;
  localparam int NI = 16, NH = 16, NO = 6, LAT1 = 14;
  localparam int H = 8, WI = 8, NF = 2, NC = 10, NIMG = 5, LAT2 = 30;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic one_in_valid = 0, one_out_valid, cnn_in_valid = 0, cnn_out_valid;
  logic signed [W-1:0] one_x [NI];
  logic signed [W-1:0] one_y [NO];
  logic signed [W-1:0] cnn_pix;
  logic signed [W-1:0] cnn_y [NC];

  ml_inference_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_one_ii1 = 0, n_one_gap = 0, n_img_pushed = 0, n_img_flushed = 0;
  int n_pix_gap = 0, n_pad_win = 0, n_one_res = 0, n_cnn_res = 0;
  typedef longint vec_t [];
  vec_t one_exp [$];
  int   one_at [$];
  vec_t cnn_exp [NIMG];
  int   last_pix_at [NIMG];

  always @(posedge clk) cyc <= cyc + 1;

  // Zero-padded windows seen inside the convolution's line buffer.
  always @(negedge clk)
    if (dut.u_cnn.u_conv.u_lb.win_valid &&
        (dut.u_cnn.u_conv.u_lb.win_row == 0 || dut.u_cnn.u_conv.u_lb.win_row == 7 ||
         dut.u_cnn.u_conv.u_lb.win_col == 0 || dut.u_cnn.u_conv.u_lb.win_col == 7))
      n_pad_win++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && one_out_valid) begin
    vec_t e;
    checks++;
    if (one_exp.size() == 0) failures++;
    else begin
      e = one_exp.pop_front();
      if (cyc - one_at.pop_front() != LAT1) begin failures++; $display("one-layer latency"); end
      for (int j = 0; j < NO; j++) begin
        checks++;
        if (longint'(one_y[j]) != e[j]) begin
          failures++; $display("one y[%0d] got %0d want %0d", j, one_y[j], e[j]);
        end
      end
    end
    n_one_res++;
  end

  always @(negedge clk) if (rst_n && cnn_out_valid) begin
    checks++;
    if (n_cnn_res >= NIMG) failures++;
    else begin
      checks++;
      if (cyc - last_pix_at[n_cnn_res] != LAT2) begin
        failures++; $display("cnn latency %0d", cyc - last_pix_at[n_cnn_res]);
      end
      for (int j = 0; j < NC; j++) begin
        checks++;
        if (longint'(cnn_y[j]) != cnn_exp[n_cnn_res][j]) begin
          failures++; $display("cnn image %0d y[%0d] got %0d want %0d", n_cnn_res, j, cnn_y[j], cnn_exp[n_cnn_res][j]);
        end
      end
    end
    n_cnn_res++;
  end

  // One-layer stimulus.
  initial begin
    vec_t v, h;
    bit prev;
    prev = 0;
    wait (rst_n);
    for (int n = 0; n < 120; n++) begin
      @(negedge clk);
      one_in_valid = (n % 13 != 6);
      if (one_in_valid && prev) n_one_ii1++;
      if (!one_in_valid) n_one_gap++;
      prev = one_in_valid;
      v = new[NI];
      for (int i = 0; i < NI; i++) begin
        one_x[i] = W'($urandom_range(0, 1023) - 512);
        v[i] = one_x[i];
      end
      if (one_in_valid) begin
        h = dense_ref(v, 1, NH);
        foreach (h[j]) h[j] = relu_ref(h[j]);
        h = dense_ref(h, 2, NO);
        foreach (h[j]) h[j] = sigmoid_ref(h[j]);
        one_exp.push_back(h);
        one_at.push_back(cyc);
      end
    end
    @(negedge clk) one_in_valid = 0;
  end

  // CNN stimulus: image 0 -> 1 back to back, 2 with gaps after 20 idle
  // clocks, 3 back to back after 2, 4 after 40 idle clocks.
  initial begin
    vec_t img, t;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NIMG; k++) begin
      img = new[H*WI];
      for (int i = 0; i < H*WI; i++) img[i] = longint'($urandom_range(0, 256));
      t = conv_ref(img, H, WI, NF, 3);
      foreach (t[i]) t[i] = relu_ref(t[i]);
      t = dense_ref(t, 4, NC);
      cnn_exp[k] = softmax_ref(t);
      if (k == 2) repeat (20) begin @(negedge clk); cnn_in_valid = 0; end
      if (k == 4) repeat (40) begin @(negedge clk); cnn_in_valid = 0; end
      if (k == 1 || k == 3) n_img_pushed++;
      if (k == 1 || k == 3) ; else if (k > 0) n_img_flushed++;
      for (int i = 0; i < H*WI; i++) begin
        if (k == 2 && i > 16 && i % 5 == 0) begin
          @(negedge clk); cnn_in_valid = 0; n_pix_gap++;
        end
        @(negedge clk);
        cnn_in_valid = 1;
        cnn_pix = W'(img[i]);
        if (i == H*WI - 1) last_pix_at[k] = cyc;
      end
    end
    @(negedge clk) cnn_in_valid = 0;
    repeat (60) @(posedge clk);

    checks++;
    if (n_cnn_res != NIMG) begin failures++; $display("%0d CNN results", n_cnn_res); end
    checks++;
    if (one_exp.size() != 0) begin failures++; $display("one-layer results missing"); end
    $display("events: one_ii1=%0d one_gap=%0d img_pushed=%0d img_flushed=%0d pix_gap=%0d pad_windows=%0d",
             n_one_ii1, n_one_gap, n_img_pushed, n_img_flushed, n_pix_gap, n_pad_win);
    checks += 6;
    if (n_one_ii1 == 0)     failures++;
    if (n_one_gap == 0)     failures++;
    if (n_img_pushed == 0)  failures++;
    if (n_img_flushed == 0) failures++;
    if (n_pix_gap == 0)     failures++;
    if (n_pad_win != NIMG * 28) begin failures++; $display("padded windows %0d", n_pad_win); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
