// tb_image_fifo: self-checking test of the image storage FIFO at its
// default size (8-bit words, 16 deep). Random pushes and pops, including
// pushes and pops in the same cycle with the FIFO full, are compared with a
// queue model: data order, empty and full flags and the fill count.
`timescale 1ns/1ps
module tb_image_fifo;
  localparam int FW = 8, FL = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic we, oe, eff, fff;
  logic [FW-1:0] d_in, d_out;
  logic [$clog2(FL+1)-1:0] count;
  int checks = 0, failures = 0;
  logic [FW-1:0] model [$];
  int n_full_rw = 0, n_full = 0, n_empty = 0;

  always #5 clk = ~clk;

  image_fifo dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    we = 0; oe = 0; d_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 4000; t++) begin
      // drive: bias toward filling in the first half of each 200-cycle block
      int bias;
      bias = ((t / 200) % 2 == 0) ? 70 : 30;
      @(negedge clk);
      check(eff == (model.size() == 0), "empty flag");
      check(fff == (model.size() == FL), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(d_out == model[0], $sformatf("data out %0h expected %0h", d_out, model[0]));
      we   = ($urandom_range(0, 99) < bias);
      oe   = ($urandom_range(0, 99) < 100 - bias) && (model.size() > 0);
      d_in = FW'($urandom);
      if (fff && !oe) we = 0;           // never push a full FIFO without a pop
      if (fff && we && oe) n_full_rw++;
      if (fff) n_full++;
      if (eff) n_empty++;
      @(posedge clk);
      if (oe) void'(model.pop_front());
      if (we) model.push_back(d_in);
    end
    check(n_full_rw > 0 && n_full > 0 && n_empty > 0, "full, empty and full push+pop all seen");
    $display("full %0d, empty %0d, push+pop while full %0d", n_full, n_empty, n_full_rw);
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
