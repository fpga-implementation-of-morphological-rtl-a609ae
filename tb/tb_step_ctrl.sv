// tb_step_ctrl: self-checking test of the step sequencer on a 5 x 3 image
// (five levels, so 21 x 19 scan positions per frame). It checks: the phase
// and level sequence of a step (5 column, 5 line, 5 shift cycles), the
// 15-cycle step when nothing stalls, the scan order including wrap-around
// to the next frame, that pixels are taken exactly at image positions and
// results given exactly where the window centre is in the image, and that a
// full output buffer or a missing pixel holds the controller at the right
// cycle.
`timescale 1ns/1ps
module tb_step_ctrl;
  import morph_pkg::*;
  localparam int NL = 5, W = 5, H = 3, HALF = 2**(NL-1);
  localparam int WE = W + HALF, HE = H + HALF;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_ready, obuf_full;
  phase_t phase;
  logic [$clog2(NL)-1:0] lvl;
  logic advance, commit, load_pix, emit;
  logic [$clog2(HE)-1:0] row;
  logic [$clog2(WE)-1:0] col;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  step_ctrl #(.N_LEVELS(NL), .IMG_W(W), .IMG_H(H)) dut (.*);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // model of the scan
  int exp_r = 0, exp_c = 0, n_in = 0, n_out = 0, steps = 0, frames = 0;
  int last_commit = 0, cyc = 0, n_in_hold = 0, n_out_hold = 0;
  int seq_idx = 0;   // expected position within the step: 0..14
  bit stall_phase;

  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    in_valid = 1'b0; obuf_full = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // frame 0 free-running, frame 1 with stalls
    while (frames < 2) begin
      @(negedge clk);
      stall_phase = (frames == 1);
      in_valid  = !(stall_phase && $urandom_range(0, 2) == 0);
      obuf_full = stall_phase && $urandom_range(0, 2) == 0;
      #1;
      if (phase != PH_LOAD) begin
        check(int'(phase) == 1 + seq_idx / NL, $sformatf("phase %0d at step cycle %0d", phase, seq_idx));
        check(int'(lvl) == seq_idx % NL, "level order");
        check(int'(row) == exp_r && int'(col) == exp_c, $sformatf("scan at r%0d c%0d expected r%0d c%0d", row, col, exp_r, exp_c));
      end
      // emit only in the first shift cycle, only at output positions, never when full
      if (emit) begin
        check(phase == PH_SHIFT && lvl == '0 && !obuf_full, "emit cycle");
        check(exp_r >= HALF && exp_c >= HALF, "emit position");
        n_out++;
      end
      if (phase == PH_SHIFT && lvl == '0 && exp_r >= HALF && exp_c >= HALF && obuf_full) begin
        check(!advance, "held while output buffer full");
        n_out_hold++;
      end
      if (in_ready) check(phase == PH_LOAD || (phase == PH_SHIFT && int'(lvl) == NL - 1), "in_ready at commit only");
      if (commit && load_pix) n_in++;
      if (commit) check(load_pix == in_ready, "pixel taken exactly when needed");
      if (in_ready && !in_valid) n_in_hold++;
      @(posedge clk);
      if (commit) begin
        if (phase != PH_LOAD) begin
          steps++;
          if (frames == 0 && steps > 1) check(cyc - last_commit == 3 * NL, $sformatf("step of %0d cycles", cyc - last_commit));
          // advance the model scan
          if (exp_c == WE - 1) begin
            exp_c = 0;
            if (exp_r == HE - 1) begin exp_r = 0; frames++; end
            else exp_r++;
          end else exp_c++;
        end
        last_commit = cyc;
        seq_idx = 0;
      end else if (advance) seq_idx++;
    end
    // the last commit of frame 1 already loads the first pixel of frame 2
    check(n_in == 2 * W * H + 1, $sformatf("pixels taken %0d", n_in));
    check(n_out == 2 * W * H, $sformatf("results given %0d", n_out));
    check(n_in_hold > 0 && n_out_hold > 0, "both stalls seen");
    $display("steps %0d, input holds %0d, output holds %0d", steps, n_in_hold, n_out_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
