// tb_se_minmax_engine: self-checking test of the multi-SE erosion/dilation
// engine on a small image (the engine keeps its five levels, SE 3..33).
// Frame 0: input always valid, output always ready - every result is
// compared with a direct window minimum/maximum, and the spacing of results
// along a row must be the 15-cycle step. Frame 1: random input gaps and
// output back-pressure - values are checked again, and the number of stall
// cycles of each kind is counted. A watchdog ends a hung run.
`timescale 1ns/1ps
module tb_se_minmax_engine;
  import morph_pkg::*;

  localparam int NL = 5;
  localparam int W  = 21;
  localparam int H  = 26;
  localparam int FRAMES = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  pix_t in_pix, out_center;
  minmax_t out_res [NL];

  int checks = 0, failures = 0;
  pix_t img [FRAMES][H][W];

  always #5 clk = ~clk;

  se_minmax_engine #(.N_LEVELS(NL), .IMG_W(W), .IMG_H(H)) dut (.*);

  function automatic minmax_t ref_win(int f, int r, int c, int h);
    minmax_t m = '{mn: PIX_MAX, mx: PIX_MIN};
    for (int y = r - h; y <= r + h; y++)
      for (int x = c - h; x <= c + h; x++)
        if (y >= 0 && y < H && x >= 0 && x < W) begin
          m.mn = pmin(m.mn, img[f][y][x]);
          m.mx = pmax(m.mx, img[f][y][x]);
        end
    return m;
  endfunction

  // pattern: random, with a flat block and extreme values to exercise ties
  initial begin
    for (int f = 0; f < FRAMES; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[f][r][c] = (f == 1) ? pix_t'(7 * r + 9 * c + $urandom_range(0, 3))   // ramp: extremes at window corners
                                   : (r == 3 && c == 17) ? 8'hff : (r == 9 && c == 2) ? 8'h00 : pix_t'($urandom_range(20, 235));
  end

  // input driver
  int in_f = 0, in_r = 0, in_c = 0;
  int starve = 0, backpress = 0;
  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (in_c == W - 1) begin
        in_c <= 0;
        if (in_r == H - 1) begin in_r <= 0; in_f <= in_f + 1; end
        else in_r <= in_r + 1;
      end else in_c <= in_c + 1;
    end
  end
  always_comb begin
    in_pix = (in_f < FRAMES) ? img[in_f][in_r][in_c] : '0;
  end

  // stall generators for frame 1
  logic gap_in, gap_out;
  always_ff @(posedge clk) begin
    gap_in  <= ($urandom_range(0, 99) < 30);
    gap_out <= ($urandom_range(0, 99) < 70);
  end
  assign in_valid  = (in_f < FRAMES) && !(in_f == 1 && gap_in);
  assign out_ready = !(out_f == 1 && gap_out);

  // output checker
  int out_f = 0, out_r = 0, out_c = 0;
  longint cyc = 0, last_cyc = 0;
  int step_checks = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  always_ff @(posedge clk) begin
    if (rst_n && in_ready && !in_valid && in_f == 1) starve <= starve + 1;
    if (rst_n && out_valid && !out_ready) backpress <= backpress + 1;
    if (rst_n && out_valid && out_ready) begin
      for (int l = 0; l < NL; l++) begin
        minmax_t e;
        e = ref_win(out_f, out_r, out_c, se_half(l));
        checks++;
        if (out_res[l] !== e) begin
          failures++;
          if (failures < 10)
            $display("MISMATCH f%0d r%0d c%0d level %0d: got mn=%0d mx=%0d expected mn=%0d mx=%0d",
                     out_f, out_r, out_c, l, out_res[l].mn, out_res[l].mx, e.mn, e.mx);
        end
      end
      checks++;
      if (out_center !== img[out_f][out_r][out_c]) begin
        failures++;
        $display("MISMATCH centre f%0d r%0d c%0d", out_f, out_r, out_c);
      end
      // 15-cycle step along a row in the free-running frame
      if (out_f == 0 && out_c > 0) begin
        checks++; step_checks++;
        if (cyc - last_cyc != 3 * NL) begin
          failures++;
          $display("STEP f0 r%0d c%0d: %0d cycles between results", out_r, out_c, cyc - last_cyc);
        end
      end
      last_cyc <= cyc;
      if (out_c == W - 1) begin
        out_c <= 0;
        if (out_r == H - 1) begin out_r <= 0; out_f <= out_f + 1; end
        else out_r <= out_r + 1;
      end else out_c <= out_c + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (out_f == FRAMES);
    repeat (5) @(posedge clk);
    checks++;
    if (starve == 0 || backpress == 0) begin
      failures++;
      $display("stall not exercised: starve=%0d backpress=%0d", starve, backpress);
    end
    $display("results checked, %0d step spacings, %0d input stalls, %0d output stalls",
             step_checks, starve, backpress);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: out_f=%0d out_r=%0d out_c=%0d", out_f, out_r, out_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
