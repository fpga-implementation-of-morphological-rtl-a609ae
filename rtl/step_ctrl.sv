// step_ctrl: step sequencer and image scan of the level extraction module.
//
// The filter walks an extended raster of (IMG_H+HALF) x (IMG_W+HALF) scan
// positions per frame, HALF = 2**(N_LEVELS-1): the extra HALF columns and
// rows flush the window past the right and bottom image edges. A pixel is
// taken only at positions inside the image (need_in) and a result is given
// only at positions whose window centre, HALF rows and columns behind, lies
// in the image (has_out). Each position is one step of 3*N_LEVELS cycles
// (15 for five levels, the step duration the document reports):
//   PH_COL   N_LEVELS cycles  column min/max, lvl = 0..N_LEVELS-1
//   PH_LINE  N_LEVELS cycles  line min/max,   lvl = 0..N_LEVELS-1
//   PH_SHIFT N_LEVELS cycles  queue shift,    lvl = 0..N_LEVELS-1
// In the first shift cycle the finished result is handed to the output
// buffer (emit); the controller waits there while a result is due and the
// buffer is still full (obuf_full). The last shift cycle is the commit
// point: the next column is loaded into the window and the scan advances;
// the controller waits there while the next pixel is needed and in_valid is
// low. After reset it starts in PH_LOAD, a commit point with no result.
// Handshakes: in_ready is asserted only at a commit point; a pixel moves
// when in_valid && in_ready. in_ready does not look at in_valid, and nothing
// here looks at the downstream ready, so a result never waits for the next
// frame's first pixel.
module step_ctrl
  import morph_pkg::*;
#(
  parameter int N_LEVELS = 5,
  parameter int IMG_W    = 256,
  parameter int IMG_H    = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  logic   obuf_full,     // output buffer holds an unread result
  output phase_t phase,
  output logic [$clog2(N_LEVELS)-1:0] lvl,
  output logic   advance,       // the phase moves on this cycle (no stall)
  output logic   commit,        // step ends: load window, advance scan
  output logic   load_pix,      // the loaded column carries a new pixel
  output logic   emit,          // the finished step produced a result
  output logic [$clog2(IMG_H+2**(N_LEVELS-1))-1:0] row,  // scan position in the window
  output logic [$clog2(IMG_W+2**(N_LEVELS-1))-1:0] col
);

  localparam int HALF  = 2**(N_LEVELS-1);
  localparam int W_EXT = IMG_W + HALF;
  localparam int H_EXT = IMG_H + HALF;
  localparam int RW    = $clog2(H_EXT);
  localparam int CW    = $clog2(W_EXT);
  localparam int LW    = $clog2(N_LEVELS);

  logic          loaded;          // a step is in progress
  logic [RW-1:0] nxt_row;
  logic [CW-1:0] nxt_col;
  logic          at_commit, emit_point, need_in, has_out, out_block;

  assign at_commit  = (phase == PH_LOAD) || (phase == PH_SHIFT && lvl == LW'(N_LEVELS-1));
  assign emit_point = (phase == PH_SHIFT) && (lvl == '0);
  assign need_in    = (nxt_row < RW'(IMG_H)) && (nxt_col < CW'(IMG_W));
  assign has_out    = loaded && (row >= RW'(HALF)) && (col >= CW'(HALF));
  assign out_block  = emit_point && has_out && obuf_full;
  assign commit     = at_commit && !out_block && (!need_in || in_valid);
  assign in_ready   = at_commit && !out_block && need_in;
  assign load_pix   = commit && need_in;
  assign emit       = emit_point && has_out && !obuf_full;
  assign advance    = (phase != PH_LOAD) && !out_block && (!at_commit || commit);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase   <= PH_LOAD;
      lvl     <= '0;
      loaded  <= 1'b0;
      row     <= '0;
      col     <= '0;
      nxt_row <= '0;
      nxt_col <= '0;
    end else if (commit) begin
      phase  <= PH_COL;
      lvl    <= '0;
      loaded <= 1'b1;
      row    <= nxt_row;
      col    <= nxt_col;
      if (nxt_col == CW'(W_EXT-1)) begin
        nxt_col <= '0;
        nxt_row <= (nxt_row == RW'(H_EXT-1)) ? '0 : nxt_row + 1'b1;
      end else begin
        nxt_col <= nxt_col + 1'b1;
      end
    end else if (advance) begin
      if (lvl == LW'(N_LEVELS-1)) begin
        lvl   <= '0;
        phase <= (phase == PH_COL) ? PH_LINE : PH_SHIFT;
      end else begin
        lvl <= lvl + 1'b1;
      end
    end
  end

endmodule
