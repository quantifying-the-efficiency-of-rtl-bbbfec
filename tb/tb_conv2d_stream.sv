// tb_conv2d_stream -- self-checking test of conv2d_stream (8x8 image, two
// 3x3 filters, same padding).  Three random images, the first two back to
// back, the third after a gap and with pixel gaps; every output position
// is compared with the reference convolution, positions must come in
// raster order, and each image must take 64 input clocks when streamed
// without gaps (its last output 64 clocks after the previous image's).
module tb_conv2d_stream;
  import tb_ref_pkg::*;
  localparam int H = 8, WI = 8, NF = 2, NIMG = 3;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] pix;
  logic [5:0] out_pos;
  logic signed [W-1:0] y [NF];
  int checks = 0, failures = 0, nout = 0, cyc = 0;
  int last_out [NIMG];
  typedef longint vec_t [];
  vec_t img [NIMG];
  vec_t ref_y [NIMG];

  conv2d_stream #(.IMG_H(H), .IMG_W(WI), .NF(NF), .W(W), .F(F)) dut (
    .clk, .rst_n, .in_valid, .pix, .out_valid, .out_pos, .y);

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    int k, p;
    k = nout / (H * WI);
    p = nout % (H * WI);
    checks++;
    if (int'(out_pos) != p) failures++;
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (longint'(y[f]) != ref_y[k][p*NF + f]) begin
        failures++; $display("img %0d pos %0d f %0d got %0d want %0d", k, p, f, y[f], ref_y[k][p*NF+f]);
      end
    end
    if (p == H * WI - 1) last_out[k] = cyc;
    nout++;
  end

  initial begin
    for (int k = 0; k < NIMG; k++) begin
      img[k] = new[H*WI];
      for (int i = 0; i < H*WI; i++) img[k][i] = longint'($urandom_range(0, 511)) - 128;
      ref_y[k] = conv_ref(img[k], H, WI, NF, 3);
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NIMG; k++) begin
      if (k == 2) repeat (30) begin @(negedge clk); in_valid = 0; end
      for (int i = 0; i < H*WI; i++) begin
        if (k == 2 && i % 5 == 0) begin @(negedge clk); in_valid = 0; end
        @(negedge clk);
        in_valid = 1;
        pix = W'(img[k][i]);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (nout != NIMG * H * WI) begin failures++; $display("%0d outputs", nout); end
    checks++;
    if (last_out[1] - last_out[0] != H * WI) begin
      failures++; $display("image interval %0d", last_out[1] - last_out[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
