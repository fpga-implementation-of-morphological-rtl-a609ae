// column_pyramid: column min/max phase of the level extraction module.
//
// The new image column (S = 2**N_LEVELS+1 pixels, centre at index HALF) is
// reduced level by level, one level per enabled cycle (lvl = 0..N_LEVELS-1):
// level 0 compares the three centre pixels, and level l > 0 compares only
// the 2**l pixels that the span 2**(l+1)+1 adds to the span of level l-1
// (2**(l-1) above and 2**(l-1) below) with the running result kept in an
// accumulator. This is the comparator pyramid with a final accumulator:
// every level's vertical min and max reuse the previous level's. Both the
// minimum (for erosion) and the maximum (for dilation) are built at once.
// Pixels with vmask low lie outside the image and are replaced by the
// neutral value (top of range for the minimum, bottom for the maximum).
// Result of level l is registered in res[l] at the end of its cycle.
// The ring-of-new-pixels structure follows the document; the one-level-per-
// cycle timing is this design's reading of its 15-cycle step.
module column_pyramid
  import morph_pkg::*;
#(
  parameter int N_LEVELS = 5
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    en,
  input  logic [$clog2(N_LEVELS)-1:0] lvl,
  input  pix_t    col   [2**N_LEVELS+1],
  input  logic    vmask [2**N_LEVELS+1],
  output minmax_t res   [N_LEVELS]
);

  localparam int HALF = 2**(N_LEVELS-1);
  localparam int RING = (HALF > 3) ? HALF : 3;   // widest set of new pixels

  pix_t    ring_mn [RING];
  pix_t    ring_mx [RING];
  minmax_t acc, nxt;

  // select the pixels the current level adds to the span
  always_comb begin
    for (int i = 0; i < RING; i++) begin
      ring_mn[i] = PIX_MAX;
      ring_mx[i] = PIX_MIN;
    end
    for (int l = 0; l < N_LEVELS; l++) begin
      if (int'(lvl) == l) begin
        if (l == 0) begin
          for (int i = 0; i < 3; i++) begin
            if (vmask[HALF-1+i]) begin
              ring_mn[i] = col[HALF-1+i];
              ring_mx[i] = col[HALF-1+i];
            end
          end
        end else begin
          for (int i = 0; i < (1 << (l-1)); i++) begin
            // upper part of the ring
            if (vmask[HALF-(1<<l)+i]) begin
              ring_mn[i] = col[HALF-(1<<l)+i];
              ring_mx[i] = col[HALF-(1<<l)+i];
            end
            // lower part of the ring
            if (vmask[HALF+(1<<(l-1))+1+i]) begin
              ring_mn[(1<<(l-1))+i] = col[HALF+(1<<(l-1))+1+i];
              ring_mx[(1<<(l-1))+i] = col[HALF+(1<<(l-1))+1+i];
            end
          end
        end
      end
    end
  end

  // comparator tree over the ring, merged with the accumulator
  always_comb begin
    nxt.mn = (lvl == '0) ? PIX_MAX : acc.mn;
    nxt.mx = (lvl == '0) ? PIX_MIN : acc.mx;
    for (int i = 0; i < RING; i++) begin
      nxt.mn = pmin(nxt.mn, ring_mn[i]);
      nxt.mx = pmax(nxt.mx, ring_mx[i]);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '{mn: PIX_MAX, mx: PIX_MIN};
      for (int l = 0; l < N_LEVELS; l++) res[l] <= '{mn: PIX_MAX, mx: PIX_MIN};
    end else if (en) begin
      acc <= nxt;
      for (int l = 0; l < N_LEVELS; l++)
        if (int'(lvl) == l) res[l] <= nxt;
    end
  end

endmodule
