// pb_model: behavioural model of an 8-bit PicoBlaze-style soft processor
// as seen from its I/O ports, running one fixed per-pixel program, for the
// testbenches of the direct-access port. Not synthesizable logic: each
// instruction takes two clock cycles as on the real processor; INPUT holds
// port_id for both cycles and pulses read_strobe in the second, sampling
// in_port at its end; OUTPUT does the same with write_strobe and out_port.
// Program, per interrupt: acknowledge; read the six level bytes L_0..L_5
// from the data port; compute L_0 + (L_0 - L_1) saturated to 0..255 (the
// finest detail doubled); poll the status port until no result is pending;
// write the result to the data port. Counts the records it handled.
module pb_model #(
  parameter logic [7:0] DATA_PORT   = 8'h00,
  parameter logic [7:0] STATUS_PORT = 8'h01
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [7:0] port_id,
  output logic       read_strobe,
  output logic       write_strobe,
  output logic [7:0] out_port,
  input  logic [7:0] in_port,
  input  logic       interrupt,
  output logic       interrupt_ack,
  output int         handled
);

  logic [7:0] lv [6];

  task automatic instr_in(input logic [7:0] pid, output logic [7:0] v);
    port_id = pid;
    @(posedge clk); #1;
    read_strobe = 1'b1;
    @(posedge clk);
    v = in_port;
    #1 read_strobe = 1'b0;
  endtask

  task automatic instr_out(input logic [7:0] pid, input logic [7:0] v);
    port_id = pid; out_port = v;
    @(posedge clk); #1;
    write_strobe = 1'b1;
    @(posedge clk); #1;
    write_strobe = 1'b0;
  endtask

  initial begin
    logic [7:0] st;
    int res;
    port_id = '0; read_strobe = 1'b0; write_strobe = 1'b0; out_port = '0;
    interrupt_ack = 1'b0; handled = 0;
    forever begin
      @(posedge clk);
      if (rst_n && interrupt) begin
        #1 interrupt_ack = 1'b1;
        @(posedge clk); #1 interrupt_ack = 1'b0;
        for (int k = 0; k < 6; k++) instr_in(DATA_PORT, lv[k]);
        res = 2 * int'(lv[0]) - int'(lv[1]);
        if (res < 0) res = 0;
        if (res > 255) res = 255;
        do instr_in(STATUS_PORT, st); while (st[6]);
        instr_out(DATA_PORT, 8'(res));
        handled++;
      end
    end
  end
endmodule
