// line_minmax: line min/max and shift phases of the level extraction module.
//
// For every level l it keeps a horizontal queue of the column results of the
// previous S-1 scan columns (q[l][j] holds the result of column c-j, j >= 1;
// the current column c is res_in[l]). The output window of every level is
// centred HALF columns behind the current one, so that all five levels refer
// to the same image pixel. Line phase (line_en, one level per cycle): the
// minimum and maximum over the 2**(l+1)+1 entries j = HALF-2**l .. HALF+2**l
// of level l are registered into out[l]; entries whose column lies outside
// the image (hmask low) take the neutral value. The centre pixel of the
// window is carried in a queue of its own and registered into out_center in
// the line cycle of level 0. Shift phase (shift_en, one level per cycle):
// queue l takes res_in[l] and moves one place; the centre queue moves with
// level 0. Following the document, the line phase combines the newest column
// result with the stored previous ones and the shift phase comes after it.
module line_minmax
  import morph_pkg::*;
#(
  parameter int N_LEVELS = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    line_en,
  input  logic    shift_en,
  input  logic [$clog2(N_LEVELS)-1:0] lvl,
  input  minmax_t res_in [N_LEVELS],
  input  pix_t    center_in,                  // centre pixel of the new column
  input  logic    hmask  [2**N_LEVELS+1],     // column c-j lies in the image
  output minmax_t out    [N_LEVELS],
  output pix_t    out_center
);

  localparam int S    = 2**N_LEVELS + 1;
  localparam int HALF = 2**(N_LEVELS-1);

  minmax_t q  [N_LEVELS][1:S-1];
  pix_t    qc [1:S-1];
  minmax_t win;

  always_comb begin
    win = '{mn: PIX_MAX, mx: PIX_MIN};
    for (int l = 0; l < N_LEVELS; l++) begin
      if (int'(lvl) == l) begin
        for (int j = HALF - (1 << l); j <= HALF + (1 << l); j++) begin
          if (hmask[j]) begin
            if (j == 0) begin
              win.mn = pmin(win.mn, res_in[l].mn);
              win.mx = pmax(win.mx, res_in[l].mx);
            end else begin
              win.mn = pmin(win.mn, q[l][j].mn);
              win.mx = pmax(win.mx, q[l][j].mx);
            end
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < N_LEVELS; l++) out[l] <= '{mn: PIX_MAX, mx: PIX_MIN};
      out_center <= '0;
    end else if (line_en) begin
      for (int l = 0; l < N_LEVELS; l++)
        if (int'(lvl) == l) out[l] <= win;
      if (lvl == '0) out_center <= qc[HALF];
    end
  end

  always_ff @(posedge clk) begin
    if (shift_en) begin
      for (int l = 0; l < N_LEVELS; l++) begin
        if (int'(lvl) == l) begin
          q[l][1] <= res_in[l];
          for (int j = 2; j < S; j++) q[l][j] <= q[l][j-1];
        end
      end
      if (lvl == '0) begin
        qc[1] <= center_in;
        for (int j = 2; j < S; j++) qc[j] <= qc[j-1];
      end
    end
  end

endmodule
