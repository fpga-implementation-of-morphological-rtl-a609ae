// window_bank: the sliding-window register bank of the level extraction
// module.
//
// It holds the new image column covered by the largest SE: S = 2**N_LEVELS+1
// pixels, col[0] the pixel just loaded (scan row r) and col[k] the pixel k
// rows above it (row r-k), all from the same scan column. The rows above
// come from the image storage FIFO, used as a line store: each FIFO word
// packs S-1 pixels of one scan column, and the FIFO is LINE_LEN words long,
// so the word leaving it is the column of the previous scan row. On `load`
// the bank takes the new pixel and the word leaving the FIFO into its
// registers and pushes the shifted column (newest S-1 pixels) back.
// One load per pixel step; col is stable between loads. Rows whose data does
// not exist yet (top of the first frame) hold stale values: the user masks
// them by position. A register bank fed by an image FIFO is the published
// structure; packing a whole column into one FIFO word is this design's.
module window_bank
  import morph_pkg::*;
#(
  parameter int N_LEVELS = 5,
  parameter int LINE_LEN = 272   // scan positions per line (image width + margin)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  pix_t pix_in,
  output pix_t col [2**N_LEVELS+1]
);

  localparam int S  = 2**N_LEVELS + 1;
  localparam int FW = (S - 1) * PIX_W;

  logic [FW-1:0] head, word_in;
  logic          full;

  // word layout: pixel of row r-1-k at bits [k*PIX_W +: PIX_W]
  always_comb begin
    word_in[0 +: PIX_W] = pix_in;
    for (int k = 1; k < S - 1; k++)
      word_in[k*PIX_W +: PIX_W] = head[(k-1)*PIX_W +: PIX_W];
  end

  image_fifo #(.FW(FW), .FL(LINE_LEN)) u_line_store (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (load),
    .d_in  (word_in),
    .oe    (load && full),
    .d_out (head),
    .eff   (),
    .fff   (full),
    .count ()
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < S; k++) col[k] <= '0;
    end else if (load) begin
      col[0] <= pix_in;
      for (int k = 1; k < S; k++) col[k] <= head[(k-1)*PIX_W +: PIX_W];
    end
  end

endmodule
