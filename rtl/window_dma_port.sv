// window_dma_port: direct-access port extension linking the decomposition
// results of one pixel to an 8-bit PicoBlaze-style soft processor.
//
// The processor's standard I/O is address based: every value would need an
// address set-up and an INPUT instruction. This port instead presents the
// results of the current pixel as a record read through one port address
// with an automatic pointer, and hands the processor's answer back to the
// pixel stream, so a per-pixel program is only reads, arithmetic and one
// write. The record holds the six level images of the pixel as 8-bit gray
// levels, L_0 = f and L_k = L_{k-1} - d_k = CO_k(f) (k = 1..5), so that
// every detail is one subtraction of two consecutive bytes.
//
// Stream side: in_valid/in_ready carry the details d_1..d_5 (signed 9-bit)
// and the original pixel; out_valid/out_ready carry the processed pixel.
// With dma_en low the port takes nothing (in_ready high, nothing captured).
// Processor side (PicoBlaze port protocol, one-cycle strobes):
//   read  at DATA_PORT   -> next record byte L_0..L_5 (pointer advances)
//   read  at STATUS_PORT -> {record loaded, result pending, 3'b0, pointer}
//   write at DATA_PORT   -> processed pixel; releases the record
// interrupt rises when a record is loaded and falls on interrupt_ack.
// The port protocol follows the processor; the record layout, the port
// numbers and the interrupt use are this design's choices.
module window_dma_port
  import morph_pkg::*;
#(
  parameter logic [7:0] DATA_PORT   = 8'h00,
  parameter logic [7:0] STATUS_PORT = 8'h01
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              dma_en,
  // decomposition results of one pixel
  input  logic              in_valid,
  output logic              in_ready,
  input  logic signed [PIX_W:0] in_detail [DECOMP_LEVELS],
  input  pix_t              in_orig,
  // processed pixel
  output logic              out_valid,
  input  logic              out_ready,
  output pix_t              out_pix,
  // processor port
  input  logic [7:0]        port_id,
  input  logic              read_strobe,
  input  logic              write_strobe,
  input  logic [7:0]        pb_out_port,
  output logic [7:0]        pb_in_port,
  output logic              interrupt,
  input  logic              interrupt_ack
);

  localparam int NB = DECOMP_LEVELS + 1;

  pix_t       rec [NB];
  logic       loaded;
  logic [2:0] ptr;
  pix_t       lvl_img [NB];

  // level images from the details: L_k = L_{k-1} - d_k
  always_comb begin
    logic signed [PIX_W+1:0] acc;
    acc = $signed({2'b00, in_orig});
    lvl_img[0] = in_orig;
    for (int k = 1; k < NB; k++) begin
      acc = acc - (PIX_W+2)'(in_detail[k-1]);
      lvl_img[k] = acc[PIX_W-1:0];
    end
  end

  assign in_ready = !dma_en || !loaded;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      loaded    <= 1'b0;
      ptr       <= '0;
      interrupt <= 1'b0;
      out_valid <= 1'b0;
      out_pix   <= '0;
      for (int k = 0; k < NB; k++) rec[k] <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (dma_en && in_valid && !loaded) begin
        rec       <= lvl_img;
        loaded    <= 1'b1;
        ptr       <= '0;
        interrupt <= 1'b1;
      end else if (interrupt_ack) begin
        interrupt <= 1'b0;
      end
      if (read_strobe && port_id == DATA_PORT && loaded && ptr < 3'(NB - 1))
        ptr <= ptr + 1'b1;
      if (write_strobe && port_id == DATA_PORT && loaded && !out_valid) begin
        out_pix   <= pb_out_port;
        out_valid <= 1'b1;
        loaded    <= 1'b0;
      end
    end
  end

  // input port multiplexer; the processor samples it on the clock edge
  // that ends its read-strobe cycle, the same edge that moves the pointer
  always_comb begin
    pb_in_port = 8'h00;
    if (port_id == DATA_PORT)   pb_in_port = rec[ptr];
    if (port_id == STATUS_PORT) pb_in_port = {loaded, out_valid, 3'b000, ptr};
  end

  a_write_when_free: assert property (@(posedge clk) disable iff (!rst_n)
    write_strobe && port_id == DATA_PORT |-> loaded && !out_valid)
    else $error("window_dma_port: result written with no record or a full output");

endmodule
