// tb_line_buffer -- self-checking test of line_buffer (8x8, 3x3 window).
//
// Streams five random images: two back to back, one with random gaps
// between pixels, then one followed by idle clocks so that the buffer
// must flush on its own, then a last one.  Every window is compared with
// the zero-padded 3x3 neighbourhood of its centre, windows must come in
// raster order, and every image must yield exactly 64 windows.
module tb_line_buffer;
  import tb_ref_pkg::*;
  localparam int H = 8, WI = 8, NIMG = 5;
  logic clk = 0, rst_n = 0, in_valid = 0, win_valid;
  always #5 clk = ~clk;
  logic signed [W-1:0] pix;
  logic [2:0] win_row, win_col;
  logic signed [W-1:0] win [9];
  int checks = 0, failures = 0, nwin = 0, flush_windows = 0;
  longint img [NIMG][H*WI];

  line_buffer #(.IMG_H(H), .IMG_W(WI), .W(W)) dut (
    .clk, .rst_n, .in_valid, .pix, .win_valid, .win_row, .win_col, .win);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && win_valid) begin
    int k, p, r, c;
    k = nwin / (H * WI);
    p = nwin % (H * WI);
    r = p / WI;
    c = p % WI;
    if (!in_valid) flush_windows++;
    checks++;
    if (int'(win_row) != r || int'(win_col) != c) begin
      failures++; $display("window %0d at (%0d,%0d)", nwin, win_row, win_col);
    end
    for (int dr = -1; dr <= 1; dr++)
      for (int dc = -1; dc <= 1; dc++) begin
        longint e;
        e = (r + dr >= 0 && r + dr < H && c + dc >= 0 && c + dc < WI) ? img[k][(r+dr)*WI + c+dc] : 0;
        checks++;
        if (longint'(win[(dr+1)*3 + dc+1]) != e) begin
          failures++; $display("img %0d (%0d,%0d) tap %0d,%0d got %0d want %0d", k, r, c, dr, dc, win[(dr+1)*3+dc+1], e);
        end
      end
    nwin++;
  end

  initial begin
    for (int k = 0; k < NIMG; k++)
      for (int i = 0; i < H*WI; i++) img[k][i] = longint'($signed(W'($urandom)));
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < NIMG; k++) begin
      for (int i = 0; i < H*WI; i++) begin
        if (k == 2) while ($urandom_range(0, 2) == 0) begin
          @(negedge clk); in_valid = 0;
        end
        @(negedge clk);
        in_valid = 1;
        pix = W'(img[k][i]);
      end
      if (k == 3) begin
        @(negedge clk) in_valid = 0;
        repeat (20) @(negedge clk);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nwin != NIMG * H * WI) begin failures++; $display("%0d windows", nwin); end
    checks++;
    if (flush_windows == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
