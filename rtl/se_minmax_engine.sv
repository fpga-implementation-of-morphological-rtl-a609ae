// se_minmax_engine: level extraction module - gray-level erosion and
// dilation of one image with the five flat square SEs 3x3, 5x5, 9x9, 17x17
// and 33x33 at once.
//
// The SE is split into a vertical and a horizontal pass (orthogonal
// decomposition), so no pixel is compared twice for two windows one step
// apart. For every scan position the window bank loads the new 33-pixel
// column, the column pyramid reduces it to the vertical min/max of every
// level (one level per cycle), the line stage combines each level's result
// with those of the previous columns kept in a horizontal queue, and the
// queues are shifted. One step takes 3*N_LEVELS = 15 cycles. Window places
// outside the image take the neutral value of the operation, so the margin
// needs no special data path.
//
// Streams: pixels enter in raster order (in_valid/in_ready, IMG_W x IMG_H
// per frame, frames back to back); results leave in raster order
// (out_valid/out_ready), one per image pixel, with out_res[l].mn the
// erosion and out_res[l].mx the dilation at SE level l, and out_center the
// input pixel at the same place. A result leaves about HALF = 16 rows and
// 16 columns of scan after its pixel entered; the scan over the margin
// (16 extra columns per line, 16 extra lines per frame) needs no input.
// The output is a one-entry buffer: out_valid is a register and in_ready
// does not depend on out_ready or in_valid, so engines can be chained and
// forked without combinational loops. The SE sizes, the separable split,
// the pyramid, the three phases, the 15-cycle step and the neutral margins
// follow the published design; the margin scan, the common centre of all
// levels and the stream handshakes are this design's choices.
module se_minmax_engine
  import morph_pkg::*;
#(
  parameter int N_LEVELS = 5,
  parameter int IMG_W    = 256,
  parameter int IMG_H    = 256
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  pix_t    in_pix,
  output logic    out_valid,
  input  logic    out_ready,
  output minmax_t out_res [N_LEVELS],
  output pix_t    out_center
);

  localparam int S     = 2**N_LEVELS + 1;
  localparam int HALF  = 2**(N_LEVELS-1);
  localparam int W_EXT = IMG_W + HALF;
  localparam int H_EXT = IMG_H + HALF;
  localparam int RW    = $clog2(H_EXT);
  localparam int CW    = $clog2(W_EXT);
  localparam int LW    = $clog2(N_LEVELS);

  phase_t        phase;
  logic [LW-1:0] lvl;
  logic          advance, commit, load_pix, emit;
  logic [RW-1:0] row;
  logic [CW-1:0] col;
  pix_t          wcol [S];
  logic          vmask [S];
  logic          hmask [S];
  minmax_t       colres [N_LEVELS];
  minmax_t       lineres [N_LEVELS];
  pix_t          line_center;

  step_ctrl #(.N_LEVELS(N_LEVELS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .obuf_full (out_valid),
    .phase     (phase),
    .lvl       (lvl),
    .advance   (advance),
    .commit    (commit),
    .load_pix  (load_pix),
    .emit      (emit),
    .row       (row),
    .col       (col)
  );

  window_bank #(.N_LEVELS(N_LEVELS), .LINE_LEN(W_EXT)) u_window (
    .clk    (clk),
    .rst_n  (rst_n),
    .load   (commit),
    .pix_in (load_pix ? in_pix : PIX_MIN),
    .col    (wcol)
  );

  // which window places hold image pixels: row r-k and column c-j
  always_comb begin
    for (int k = 0; k < S; k++) begin
      vmask[k] = (int'(row) >= k) && (int'(row) - k < IMG_H) && (int'(col) < IMG_W);
      hmask[k] = (int'(col) >= k) && (int'(col) - k < IMG_W);
    end
  end

  column_pyramid #(.N_LEVELS(N_LEVELS)) u_column (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (phase == PH_COL),
    .lvl   (lvl),
    .col   (wcol),
    .vmask (vmask),
    .res   (colres)
  );

  line_minmax #(.N_LEVELS(N_LEVELS)) u_line (
    .clk        (clk),
    .rst_n      (rst_n),
    .line_en    (phase == PH_LINE),
    .shift_en   (phase == PH_SHIFT && advance),
    .lvl        (lvl),
    .res_in     (colres),
    .center_in  (wcol[HALF]),
    .hmask      (hmask),
    .out        (lineres),
    .out_center (line_center)
  );

  // one-entry output buffer
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_center <= '0;
      for (int l = 0; l < N_LEVELS; l++) out_res[l] <= '{mn: PIX_MAX, mx: PIX_MIN};
    end else if (emit) begin
      out_valid  <= 1'b1;
      out_res    <= lineres;
      out_center <= line_center;
    end else if (out_ready) begin
      out_valid  <= 1'b0;
    end
  end

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_center))
    else $error("se_minmax_engine: result withdrawn before it was taken");

endmodule
