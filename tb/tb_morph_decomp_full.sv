// tb_morph_decomp_full: one complete 256 x 256 frame through the
// decomposition with every parameter at its default value. The expected
// details come from the same independent whole-image model as in the small
// end-to-end test (separable flat min/max, closing then opening per level);
// every pixel's five details, no-detail value and aligned original are
// compared and the reconstruction f = sum(d_k) + CO_5(f) is checked. The
// stream runs without gaps, so the frame time is also checked against the
// 15-cycle step: (256+16) x (256+16) scan steps for the first engine.
`timescale 1ns/1ps
module tb_morph_decomp_full;
  import morph_pkg::*;

  localparam int NL = DECOMP_LEVELS;
  localparam int W  = 256;
  localparam int H  = 256;
  localparam int FRAMES = 1;
  typedef pix_t img_t [H][W];

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  pix_t in_pix, out_nodetail, out_orig;
  logic signed [PIX_W:0] out_detail [NL];
  logic enh_valid;
  pix_t enh_pix;
  logic [7:0] pb_in_port;
  logic pb_interrupt;

  int checks = 0, failures = 0;
  img_t img [FRAMES];
  img_t co  [FRAMES][NL];

  always #5 clk = ~clk;

  // processor port bypassed
  morph_decomp_top dut (.*, .dma_en(1'b0), .enh_ready(1'b1), .pb_port_id(8'h00),
                        .pb_read_strobe(1'b0), .pb_write_strobe(1'b0),
                        .pb_out_port(8'h00), .pb_interrupt_ack(1'b0));

  // flat square min (ero=1) or max filter of half-width h, separable
  function automatic img_t filt(input img_t a, input int h, input bit ero);
    img_t t, o;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        pix_t m = ero ? PIX_MAX : PIX_MIN;
        for (int x = c - h; x <= c + h; x++)
          if (x >= 0 && x < W) m = ero ? pmin(m, a[r][x]) : pmax(m, a[r][x]);
        t[r][c] = m;
      end
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        pix_t m = ero ? PIX_MAX : PIX_MIN;
        for (int y = r - h; y <= r + h; y++)
          if (y >= 0 && y < H) m = ero ? pmin(m, t[y][c]) : pmax(m, t[y][c]);
        o[r][c] = m;
      end
    return o;
  endfunction

  // test image: smooth ramp plus bright and dark objects of several sizes
  initial begin
    for (int f = 0; f < FRAMES; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++)
          img[f][r][c] = pix_t'(40 + (r + c) / 4 + $urandom_range(0, 40));
      for (int n = 0; n < 400; n++) begin
        int sz, r0, c0;
        pix_t v;
        sz = 1 << $urandom_range(0, 5);
        r0 = $urandom_range(0, H - 1);
        c0 = $urandom_range(0, W - 1);
        v = $urandom_range(0, 1) ? pix_t'($urandom_range(220, 255)) : pix_t'($urandom_range(0, 30));
        for (int r = r0; r < r0 + sz && r < H; r++)
          for (int c = c0; c < c0 + sz && c < W; c++) img[f][r][c] = v;
      end
      for (int k = 0; k < NL; k++)
        co[f][k] = filt(filt(filt(filt(img[f], se_half(k), 0), se_half(k), 1), se_half(k), 1), se_half(k), 0);
    end
  end

  // input side
  int in_f = 0, in_r = 0, in_c = 0;
  assign in_valid  = (in_f < FRAMES);
  assign in_pix    = (in_f < FRAMES) ? img[in_f][in_r][in_c] : '0;
  assign out_ready = 1'b1;

  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (in_c == W - 1) begin
        in_c <= 0;
        if (in_r == H - 1) begin in_r <= 0; in_f <= in_f + 1; end
        else in_r <= in_r + 1;
      end else in_c <= in_c + 1;
    end
  end

  int n_detail [NL] = '{default: 0};

  int out_f = 0, out_r = 0, out_c = 0;
  always_ff @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int sum;
      logic signed [PIX_W:0] e;
      sum = int'(out_nodetail);
      for (int k = 0; k < NL; k++) begin
        e = (k == 0) ? $signed({1'b0, img[out_f][out_r][out_c]}) - $signed({1'b0, co[out_f][0][out_r][out_c]})
                     : $signed({1'b0, co[out_f][k-1][out_r][out_c]}) - $signed({1'b0, co[out_f][k][out_r][out_c]});
        checks++;
        if (out_detail[k] !== e) begin
          failures++;
          if (failures < 10) $display("MISMATCH f%0d r%0d c%0d d%0d: got %0d expected %0d",
                                      out_f, out_r, out_c, k + 1, out_detail[k], e);
        end
        if (out_detail[k] != 0) n_detail[k]++;
        sum += int'(out_detail[k]);
      end
      checks += 3;
      if (out_nodetail !== co[out_f][NL-1][out_r][out_c]) begin
        failures++;
        $display("MISMATCH no-detail f%0d r%0d c%0d", out_f, out_r, out_c);
      end
      if (out_orig !== img[out_f][out_r][out_c]) begin
        failures++;
        $display("MISMATCH original f%0d r%0d c%0d", out_f, out_r, out_c);
      end
      if (sum != int'(img[out_f][out_r][out_c])) begin
        failures++;
        $display("RECONSTRUCTION f%0d r%0d c%0d: %0d", out_f, out_r, out_c, sum);
      end
      if (out_c == W - 1) begin
        out_c <= 0;
        if (out_r == H - 1) begin out_r <= 0; out_f <= out_f + 1; end
        else out_r <= out_r + 1;
      end else out_c <= out_c + 1;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("  ... never happened"); end
  endtask

  longint t_now = 0, t_done = 0;
  always_ff @(posedge clk) t_now <= t_now + 1;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (out_f == FRAMES);
    t_done = t_now;
    repeat (5) @(posedge clk);
    checks++;
    $display("  frame done after %0d cycles, %0d pixel checks", t_done, checks);
    if (t_done < longint'(15 * (W + 16) * (H + 16))) begin
      failures++;
      $display("  faster than the 15-cycle step allows");
    end
    for (int k = 0; k < NL; k++) need($sformatf("pixels with detail d%0d", k + 1), n_detail[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog: out_f=%0d out_r=%0d out_c=%0d", out_f, out_r, out_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
