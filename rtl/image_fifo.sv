// image_fifo: the image storage FIFO of the filter.
//
// A synchronous FIFO of FL words of FW bits with an empty flag (eff) and a
// full flag (fff), as in the document's FIFO (same parameter names and
// defaults FW=8, FL=16). This version keeps the words in a circular buffer
// addressed by a write and a read pointer instead of shifting every word on a
// write, so that it maps onto block or distributed RAM; that, the single
// clock and the active-low synchronous reset are this design's choices.
//
// Interface: `we` pushes d_in, `oe` pops the word shown on d_out. d_out is
// the oldest word (first-word fall-through) and is valid while eff is low.
// A push and a pop in the same cycle are allowed also when the FIFO is full,
// which lets the FIFO serve as a fixed delay line of FL words once filled.
// A push to a full FIFO without a pop, or a pop from an empty one, is
// ignored (and flagged by an assertion).
module image_fifo #(
  parameter int FW = 8,   // word width
  parameter int FL = 16   // FIFO length in words
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [FW-1:0] d_in,
  input  logic          oe,
  output logic [FW-1:0] d_out,
  output logic          eff,    // empty flag
  output logic          fff,    // full flag
  output logic [$clog2(FL+1)-1:0] count
);

  localparam int AW = (FL > 1) ? $clog2(FL) : 1;

  logic [FW-1:0] mem [FL];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic          do_wr, do_rd;

  assign eff   = (count == 0);
  assign fff   = (count == ($clog2(FL+1))'(FL));
  assign do_rd = oe && !eff;
  assign do_wr = we && (!fff || do_rd);
  assign d_out = mem[rd_ptr];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] p);
    return (p == AW'(FL - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= d_in;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= inc(wr_ptr);
      if (do_rd) rd_ptr <= inc(rd_ptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(we && fff && !oe))
    else $error("image_fifo: push to a full FIFO");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(oe && eff))
    else $error("image_fifo: pop from an empty FIFO");

endmodule
