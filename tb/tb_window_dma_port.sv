// tb_window_dma_port: self-checking test of the direct-access processor
// port. Random pixel records (an original pixel and five details that keep
// every level image in 0..255) are offered on the stream side; a
// behavioural processor model reads each record through the data port and
// writes back 2*L_0 - L_1. The test checks the bytes the processor read
// (L_0..L_5 rebuilt from the details), the processed pixels and their
// order, back-pressure on the processed-pixel output, and that with dma_en
// low records pass by without being captured.
`timescale 1ns/1ps
module tb_window_dma_port;
  import morph_pkg::*;
  localparam int NL = DECOMP_LEVELS;
  localparam int N  = 300;

  logic clk = 1'b0, rst_n = 1'b0;
  logic dma_en, in_valid, in_ready, out_valid, out_ready;
  logic signed [PIX_W:0] in_detail [NL];
  pix_t in_orig, out_pix;
  logic [7:0] port_id, pb_out_port, pb_in_port;
  logic read_strobe, write_strobe, interrupt, interrupt_ack;
  int handled;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  window_dma_port dut (.*);
  pb_model u_pb (.clk, .rst_n, .port_id, .read_strobe, .write_strobe,
                 .out_port(pb_out_port), .in_port(pb_in_port),
                 .interrupt, .interrupt_ack, .handled);

  pix_t lv [N][NL+1];
  int exp_q [$];
  int n_sent = 0, n_got = 0, n_bp = 0, n_bypass = 0;

  // records: random level images, details are their differences
  initial
    for (int i = 0; i < N; i++)
      for (int k = 0; k <= NL; k++) lv[i][k] = pix_t'($urandom);

  always_comb begin
    in_orig = lv[n_sent % N][0];
    for (int k = 0; k < NL; k++)
      in_detail[k] = $signed({1'b0, lv[n_sent % N][k]}) - $signed({1'b0, lv[n_sent % N][k+1]});
  end

  // bytes the processor reads must be the level images of the record
  int rd_idx = 0;
  always_ff @(posedge clk) begin
    if (read_strobe && port_id == 8'h00) begin
      checks++;
      if (pb_in_port !== lv[(n_got) % N][rd_idx]) begin
        failures++;
        if (failures < 10) $display("FAIL record %0d byte %0d: %0d expected %0d",
                                    n_got, rd_idx, pb_in_port, lv[n_got % N][rd_idx]);
      end
      rd_idx <= (rd_idx == NL) ? 0 : rd_idx + 1;
    end
    if (out_valid && !out_ready) n_bp++;
    if (out_valid && out_ready) begin
      int e;
      e = 2 * int'(lv[n_got % N][0]) - int'(lv[n_got % N][1]);
      if (e < 0) e = 0;
      if (e > 255) e = 255;
      checks++;
      if (int'(out_pix) != e) begin
        failures++;
        if (failures < 10) $display("FAIL result %0d: %0d expected %0d", n_got, out_pix, e);
      end
      n_got++;
    end
  end

  always_ff @(posedge clk) if (rst_n && in_valid && in_ready && dma_en) n_sent <= n_sent + 1;

  always_ff @(posedge clk) out_ready <= ($urandom_range(0, 3) != 0);

  initial begin
    dma_en = 1'b0; in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // bypass: records flow by, nothing captured, no interrupt
    in_valid = 1'b1;
    repeat (20) begin
      @(posedge clk);
      checks++;
      if (!in_ready || interrupt) failures++;
      n_bypass++;
    end
    in_valid = 1'b0;
    // processed records
    @(negedge clk);
    dma_en = 1'b1;
    while (n_sent < N) begin
      in_valid = ($urandom_range(0, 3) != 0);
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    wait (n_got == N);
    checks++;
    if (handled != N || n_bp == 0) begin
      failures++;
      $display("handled %0d, back-pressure %0d", handled, n_bp);
    end
    $display("records %0d, back-pressure cycles %0d, bypass cycles %0d", n_got, n_bp, n_bypass);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: sent %0d got %0d", n_sent, n_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
