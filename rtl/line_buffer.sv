// line_buffer -- 3x3 sliding window over a streamed image, zero padded.
//
// Pixels arrive one per clock (when in_valid) in row-major order, IMG_H
// rows of IMG_W pixels.  They enter a shift register of 2*IMG_W+3 entries,
// which holds two full image rows plus three pixels: the last three taps of
// each of the three window rows sit at fixed offsets 0..2, IMG_W..IMG_W+2
// and 2*IMG_W..2*IMG_W+2 from the newest pixel.  After each shift the
// window centred on the pixel that entered IMG_W+1 shifts earlier is
// presented.  Taps that fall outside the image (above the first row,
// below the last, left of the first column or right of the last, where the
// register holds pixels of the neighbouring row) are forced to zero, which
// gives "same" padding: IMG_H*IMG_W windows per image.
//
// A small tag register next to the data records whether each entry is a
// real pixel and its row and column.  After the last pixel of an image the
// buffer keeps shifting zeros on idle clocks until the last pixel has
// reached the centre (IMG_W+1 shifts), so the last windows come out
// without waiting for the next image.  Pixels of a next image that arrive
// meanwhile take the place of those zeros, and once one has arrived no
// more zeros are inserted, since they would split that image's rows.  Gaps between pixels are allowed
// anywhere: the buffer shifts only on in_valid, or while flushing after a
// complete image.
//
// Interface: win[(dr+1)*3 + (dc+1)] is the pixel at offset (dr, dc) from
// the centre (win_row, win_col); win_valid marks a window.  Window outputs
// are driven straight from registers, one clock after the shift.  rst_n is
// active low and synchronous.
module line_buffer #(
  parameter int unsigned IMG_H = 8,
  parameter int unsigned IMG_W = 8,
  parameter int unsigned W     = nn_pkg::DATA_W,
  localparam int unsigned RW   = $clog2(IMG_H),
  localparam int unsigned CW   = $clog2(IMG_W)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] pix,
  output logic                win_valid,
  output logic [RW-1:0]       win_row,
  output logic [CW-1:0]       win_col,
  output logic signed [W-1:0] win [9]
);
  localparam int unsigned LEN = 2 * IMG_W + 3;
  localparam int unsigned C   = IMG_W + 1;          // centre tap

  typedef struct packed {
    logic          vld;
    logic [RW-1:0] row;
    logic [CW-1:0] col;
  } tag_t;

  logic signed [W-1:0] sr  [LEN];
  tag_t                tag [C+1];
  logic [RW-1:0]       in_row;
  logic [CW-1:0]       in_col;
  logic [$clog2(C+1)-1:0] drain;
  logic                shifted_q;
  logic                shift, last_pix;

  // Flush clocks shift a zero in only while no pixel of the next image has
  // arrived; once one has, the next image's pixels push the data through.
  assign shift    = in_valid || (drain != 0 && in_row == '0 && in_col == '0);
  assign last_pix = in_valid && (in_row == RW'(IMG_H - 1)) && (in_col == CW'(IMG_W - 1));

  always_ff @(posedge clk) begin
    if (shift) begin
      sr[0]  <= in_valid ? pix : '0;
      tag[0] <= '{vld: in_valid, row: in_row, col: in_col};
      for (int k = 1; k < int'(LEN); k++) sr[k]  <= sr[k-1];
      for (int k = 1; k <= int'(C); k++)  tag[k] <= tag[k-1];
    end
    if (!rst_n) begin
      for (int k = 0; k <= int'(C); k++) tag[k].vld <= 1'b0;
      in_row    <= '0;
      in_col    <= '0;
      drain     <= '0;
      shifted_q <= 1'b0;
    end else begin
      shifted_q <= shift;
      if (in_valid) begin
        if (in_col == CW'(IMG_W - 1)) begin
          in_col <= '0;
          in_row <= (in_row == RW'(IMG_H - 1)) ? '0 : in_row + 1'b1;
        end else begin
          in_col <= in_col + 1'b1;
        end
      end
      if (last_pix)        drain <= ($bits(drain))'(C);
      else if (drain != 0) drain <= drain - 1'b1;
    end
  end

  assign win_valid = shifted_q && tag[C].vld;
  assign win_row   = tag[C].row;
  assign win_col   = tag[C].col;

  for (genvar r = 0; r < 3; r++) begin : g_r
    for (genvar c = 0; c < 3; c++) begin : g_c
      localparam int DR  = int'(r) - 1;
      localparam int DC  = int'(c) - 1;
      localparam int TAP = int'(C) - (DR * int'(IMG_W) + DC);
      logic in_img;
      always_comb begin
        in_img = 1'b1;
        if (DR < 0 && tag[C].row == '0)             in_img = 1'b0;
        if (DR > 0 && tag[C].row == RW'(IMG_H - 1)) in_img = 1'b0;
        if (DC < 0 && tag[C].col == '0)             in_img = 1'b0;
        if (DC > 0 && tag[C].col == CW'(IMG_W - 1)) in_img = 1'b0;
      end
      assign win[r*3 + c] = in_img ? sr[TAP] : '0;
    end
  end
endmodule
