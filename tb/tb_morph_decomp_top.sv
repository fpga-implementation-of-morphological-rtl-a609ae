// tb_morph_decomp_top: end-to-end test of the five-level decomposition on a
// small image (24 x 20, two frames back to back).
// The expected detail images come from an independent model: each level's
// closing-opening is computed here as dilation, erosion, erosion, dilation
// of whole image arrays with separable (row, then column) min/max, the
// margin ignored. Every output pixel is compared (five details, the
// no-detail image and the aligned original) and the reconstruction
// f = sum(d_k) + CO_5(f) is checked. Frame 1 runs with random input gaps
// and output back-pressure and is also routed through the direct-access
// processor port to a behavioural processor model, whose processed pixels
// are checked. Each mechanism (input starvation, output back-pressure,
// alignment FIFO use, margin-clipped windows, frame wrap-around, detail
// found at every level, processor port on and bypassed, back-pressure from
// the processed-pixel output) is counted and must occur.
`timescale 1ns/1ps
module tb_morph_decomp_top;
  import morph_pkg::*;

  localparam int NL = DECOMP_LEVELS;
  localparam int W  = 24;
  localparam int H  = 20;
  localparam int FRAMES = 2;
  typedef pix_t img_t [H][W];

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, out_valid, out_ready;
  pix_t in_pix, out_nodetail, out_orig;
  logic signed [PIX_W:0] out_detail [NL];
  logic dma_en, enh_valid, enh_ready;
  pix_t enh_pix;
  logic [7:0] pb_port_id, pb_out_port, pb_in_port;
  logic pb_read_strobe, pb_write_strobe, pb_interrupt, pb_interrupt_ack;
  int pb_handled;

  int checks = 0, failures = 0;
  img_t img [FRAMES];
  img_t co  [FRAMES][NL];

  always #5 clk = ~clk;

  morph_decomp_top #(.IMG_W(W), .IMG_H(H)) dut (.*);

  // soft processor on the direct-access port (behavioural)
  pb_model u_pb (.clk, .rst_n, .port_id(pb_port_id), .read_strobe(pb_read_strobe),
                 .write_strobe(pb_write_strobe), .out_port(pb_out_port),
                 .in_port(pb_in_port), .interrupt(pb_interrupt),
                 .interrupt_ack(pb_interrupt_ack), .handled(pb_handled));

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
          img[f][r][c] = pix_t'(60 + 3 * r + 2 * c + $urandom_range(0, 30));
      for (int n = 0; n < 12; n++) begin
        int sz, r0, c0;
        pix_t v;
        sz = 1 << $urandom_range(0, 3);
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
  logic gap_in, gap_out;
  always_ff @(posedge clk) begin
    gap_in  <= ($urandom_range(0, 99) < 40);
    gap_out <= ($urandom_range(0, 99) < 40);
  end
  assign in_valid  = (in_f < FRAMES) && !(in_f == 1 && gap_in);
  assign in_pix    = (in_f < FRAMES) ? img[in_f][in_r][in_c] : '0;
  assign out_ready = !(out_f == 1 && gap_out);
  // frame 1 also goes through the processor port; frame 0 bypasses it
  assign dma_en    = (out_f == 1);
  assign enh_ready = !gap_in;

  // processed pixels: the processor program returns 2*f - CO_1(f), saturated
  int enh_n = 0, n_enh_bp = 0;
  always_ff @(posedge clk) begin
    if (rst_n && enh_valid && !enh_ready) n_enh_bp <= n_enh_bp + 1;
    if (rst_n && enh_valid && enh_ready) begin
      int e;
      e = 2 * int'(img[1][enh_n / W][enh_n % W]) - int'(co[1][0][enh_n / W][enh_n % W]);
      if (e < 0) e = 0;
      if (e > 255) e = 255;
      checks++;
      if (int'(enh_pix) != e) begin
        failures++;
        if (failures < 10) $display("MISMATCH processed pixel %0d: %0d expected %0d", enh_n, enh_pix, e);
      end
      enh_n <= enh_n + 1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst_n && in_valid && in_ready) begin
      if (in_c == W - 1) begin
        in_c <= 0;
        if (in_r == H - 1) begin in_r <= 0; in_f <= in_f + 1; end
        else in_r <= in_r + 1;
      end else in_c <= in_c + 1;
    end
  end

  // mechanism counters
  int n_starve = 0, n_backpress = 0, n_align = 0, n_margin = 0, n_wrap = 0;
  int n_detail [NL] = '{default: 0};

  int out_f = 0, out_r = 0, out_c = 0;
  always_ff @(posedge clk) begin
    if (rst_n && in_ready && !in_valid && in_f < FRAMES) n_starve <= n_starve + 1;
    if (rst_n && out_valid && !out_ready) n_backpress <= n_backpress + 1;
    if (rst_n && dut.al_count > 1) n_align <= n_align + 1;
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
      if (out_r < 16 || out_c < 16 || out_r + 16 >= H || out_c + 16 >= W) n_margin++;
      if (out_c == W - 1) begin
        out_c <= 0;
        if (out_r == H - 1) begin out_r <= 0; out_f <= out_f + 1; n_wrap++; end
        else out_r <= out_r + 1;
      end else out_c <= out_c + 1;
    end
  end

  task automatic need(input string what, input int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin failures++; $display("  ... never happened"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (out_f == FRAMES && enh_n == W * H);
    repeat (5) @(posedge clk);
    need("input starvation cycles", n_starve);
    need("output back-pressure cycles", n_backpress);
    need("alignment FIFO in use", n_align);
    need("margin-clipped windows", n_margin);
    need("frames completed", n_wrap);
    need("pixels through the processor", pb_handled);
    need("processed-pixel back-pressure", n_enh_bp);
    checks++;
    if (pb_handled != W * H) begin failures++; $display("  processor handled %0d", pb_handled); end
    for (int k = 0; k < NL; k++) need($sformatf("pixels with detail d%0d", k + 1), n_detail[k]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog: out_f=%0d out_r=%0d out_c=%0d", out_f, out_r, out_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
