// tb_line_minmax: self-checking test of the line min/max and shift phases.
// Each step drives new column results for all five levels, a centre pixel
// and a column mask, runs the line phase (one level per cycle) and compares
// out[l] with the min/max over the centred span of a queue model, then runs
// the shift phase and updates the model.
`timescale 1ns/1ps
module tb_line_minmax;
  import morph_pkg::*;
  localparam int NL = 5, S = 2**NL + 1, HALF = 2**(NL-1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic line_en, shift_en;
  logic [$clog2(NL)-1:0] lvl;
  minmax_t res_in [NL];
  pix_t center_in, out_center;
  logic hmask [S];
  minmax_t out [NL];
  int checks = 0, failures = 0;
  minmax_t mq [NL][S];   // mq[l][j]: column c-j, j = 0 current
  pix_t    mc [S];

  always #5 clk = ~clk;

  line_minmax #(.N_LEVELS(NL)) dut (.*);

  initial begin
    line_en = 0; shift_en = 0; lvl = '0; center_in = '0;
    for (int l = 0; l < NL; l++) begin
      res_in[l] = '{mn: PIX_MAX, mx: PIX_MIN};
      for (int j = 0; j < S; j++) mq[l][j] = '{mn: PIX_MAX, mx: PIX_MIN};
    end
    for (int j = 0; j < S; j++) begin hmask[j] = 1'b0; mc[j] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int l = 0; l < NL; l++) begin
        res_in[l].mn = pix_t'($urandom);
        res_in[l].mx = pix_t'($urandom);
        mq[l][0] = res_in[l];
      end
      center_in = pix_t'($urandom);
      mc[0] = center_in;
      // all-valid once the queues are full, random masks otherwise
      for (int j = 0; j < S; j++) hmask[j] = (t > S && t % 3 != 0) ? 1'b1 : ($urandom_range(0, 1) == 1) && t > S;
      for (int l = 0; l < NL; l++) begin
        line_en = 1'b1; lvl = l[$clog2(NL)-1:0];
        @(negedge clk);
      end
      line_en = 1'b0;
      if (t > S) begin
        for (int l = 0; l < NL; l++) begin
          minmax_t e;
          e = '{mn: PIX_MAX, mx: PIX_MIN};
          for (int j = HALF - se_half(l); j <= HALF + se_half(l); j++)
            if (hmask[j]) begin e.mn = pmin(e.mn, mq[l][j].mn); e.mx = pmax(e.mx, mq[l][j].mx); end
          checks++;
          if (out[l] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL t%0d level %0d: got %0d/%0d expected %0d/%0d",
                                        t, l, out[l].mn, out[l].mx, e.mn, e.mx);
          end
        end
        checks++;
        if (out_center !== mc[HALF]) begin
          failures++;
          $display("FAIL t%0d centre", t);
        end
      end
      for (int l = 0; l < NL; l++) begin
        shift_en = 1'b1; lvl = l[$clog2(NL)-1:0];
        @(negedge clk);
      end
      shift_en = 1'b0;
      for (int l = 0; l < NL; l++)
        for (int j = S - 1; j > 0; j--) mq[l][j] = mq[l][j-1];
      for (int j = S - 1; j > 0; j--) mc[j] = mc[j-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
