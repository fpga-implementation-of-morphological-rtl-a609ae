// tb_window_bank: self-checking test of the sliding-window register bank
// (33-pixel column) with a short line of 7 scan positions. After every load,
// col[k] must be the pixel loaded k lines (k*7 loads) earlier; loads come
// with random gaps, which must not disturb the column.
`timescale 1ns/1ps
module tb_window_bank;
  import morph_pkg::*;
  localparam int NL = 5, L = 7, S = 2**NL + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  logic load;
  pix_t pix_in;
  pix_t col [S];
  int checks = 0, failures = 0;
  pix_t hist [$];

  always #5 clk = ~clk;

  window_bank #(.N_LEVELS(NL), .LINE_LEN(L)) dut (.*);

  initial begin
    load = 0; pix_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      load   = ($urandom_range(0, 99) < 60);
      pix_in = pix_t'($urandom);
      @(posedge clk);
      if (load) hist.push_front(pix_in);
      #1;
      if (load) begin
        for (int k = 0; k < S; k++) begin
          if (k * L < hist.size()) begin
            checks++;
            if (col[k] !== hist[k * L]) begin
              failures++;
              if (failures < 10) $display("FAIL load %0d row %0d: got %0h expected %0h",
                                          hist.size(), k, col[k], hist[k * L]);
            end
          end
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
