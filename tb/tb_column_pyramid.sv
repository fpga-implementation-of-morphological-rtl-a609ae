// tb_column_pyramid: self-checking test of the column min/max pyramid.
// For random 33-pixel columns and random image masks, the five levels are
// run one per cycle and each res[l] is compared with the minimum and
// maximum of the centred 2**(l+1)+1 masked pixels computed directly here.
// Fully masked spans must give the neutral values (255 for min, 0 for max).
`timescale 1ns/1ps
module tb_column_pyramid;
  import morph_pkg::*;
  localparam int NL = 5, S = 2**NL + 1, HALF = 2**(NL-1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic en;
  logic [$clog2(NL)-1:0] lvl;
  pix_t col [S];
  logic vmask [S];
  minmax_t res [NL];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  column_pyramid #(.N_LEVELS(NL)) dut (.*);

  initial begin
    en = 0; lvl = '0;
    for (int k = 0; k < S; k++) begin col[k] = '0; vmask[k] = 1'b0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 500; t++) begin
      int mode;
      mode = t % 4;
      @(negedge clk);
      for (int k = 0; k < S; k++) begin
        col[k] = pix_t'($urandom);
        // masks as they occur at image edges: top rows, bottom rows or none
        case (mode)
          0: vmask[k] = 1'b1;
          1: vmask[k] = (k <= t % S);
          2: vmask[k] = (k >= t % S);
          default: vmask[k] = ($urandom_range(0, 3) != 0);
        endcase
      end
      for (int l = 0; l < NL; l++) begin
        en = 1'b1; lvl = l[$clog2(NL)-1:0];
        @(negedge clk);
      end
      en = 1'b0;
      for (int l = 0; l < NL; l++) begin
        minmax_t e;
        e = '{mn: PIX_MAX, mx: PIX_MIN};
        for (int k = HALF - se_half(l); k <= HALF + se_half(l); k++)
          if (vmask[k]) begin e.mn = pmin(e.mn, col[k]); e.mx = pmax(e.mx, col[k]); end
        checks++;
        if (res[l] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL t%0d level %0d: got %0d/%0d expected %0d/%0d",
                                      t, l, res[l].mn, res[l].mx, e.mn, e.mx);
        end
      end
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
