// morph_decomp_top: five-level morphological decomposition of a gray-level
// image into detail images, for local contrast enhancement.
//
// Level k (k = 1..5) filters the image f with a closing followed by an
// opening (CO) using the flat square SE of side 3, 5, 9, 17 or 33; this
// removes the bright and dark objects smaller than the SE. The detail image
// of level k is what the filter of level k removes beyond the filter of the
// level below:  d_k = CO_{k-1}(f) - CO_k(f), with CO_0(f) = f. What remains
// after level 5, CO_5(f), is the no-detail image, and
//   f = d_1 + d_2 + d_3 + d_4 + d_5 + CO_5(f)
// holds exactly for every pixel.
//
// Structure: one multi-SE engine computes the dilation of f with all five
// SEs at once (the comparator pyramid shares the work of the levels). Each
// level's dilation goes to its own co_filter, which completes the CO with
// three more engines. The original pixel, as it leaves the first engine, waits
// in an alignment FIFO until the five CO results of the same pixel arrive.
// All engines run the same 15-cycle step, so the chains stay in step and
// the alignment FIFO only has to cover three engine latencies. The five SE
// sizes and the closing-opening per level follow the published method; the
// detail definition, the chains of full engines, the alignment FIFO and the
// processor port's place on the result stream are this design's choices.
//
// Streams: pixels in raster order on in_* (valid/ready), IMG_W x IMG_H per
// frame, frames back to back; results in the same order on out_*
// (valid/ready). Throughput is one pixel per 15 clock cycles plus the margin
// scan (16 extra columns per line and 16 extra lines per frame). Latency is
// about four times 16 lines. Signed details are 9 bits wide.
//
// The same results also go, one pixel record at a time, to a direct-access
// port for an external 8-bit soft processor (window_dma_port), which returns
// one processed pixel per record on enh_*. With dma_en high every pixel
// waits for the processor; with dma_en low the port is bypassed.
module morph_decomp_top
  import morph_pkg::*;
#(
  parameter int IMG_W = 256,
  parameter int IMG_H = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  pix_t              in_pix,
  output logic              out_valid,
  input  logic              out_ready,
  output logic signed [PIX_W:0] out_detail [DECOMP_LEVELS],  // d_1..d_5
  output pix_t              out_nodetail,                    // CO_5(f)
  output pix_t              out_orig,                        // f, aligned
  // direct-access port for a soft processor (PicoBlaze port protocol)
  input  logic              dma_en,        // route every pixel through the processor
  output logic              enh_valid,     // processed pixel from the processor
  input  logic              enh_ready,
  output pix_t              enh_pix,
  input  logic [7:0]        pb_port_id,
  input  logic              pb_read_strobe,
  input  logic              pb_write_strobe,
  input  logic [7:0]        pb_out_port,
  output logic [7:0]        pb_in_port,
  output logic              pb_interrupt,
  input  logic              pb_interrupt_ack
);

  localparam int NL    = DECOMP_LEVELS;
  localparam int HALF  = 2**(NL-1);
  // results an engine can hold in flight: HALF lines and HALF columns of scan
  localparam int ENGINE_LAG = HALF * (IMG_W + HALF) + HALF;
  localparam int ALIGN_FL   = 3 * ENGINE_LAG + 16;

  // ---- shared multi-SE dilation -------------------------------------
  logic    s1_valid, s1_ready, s1_fire;
  minmax_t s1_res [NL];
  pix_t    s1_center;

  se_minmax_engine #(.N_LEVELS(NL), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_dilate (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix),
    .out_valid(s1_valid), .out_ready(s1_ready),
    .out_res(s1_res), .out_center(s1_center)
  );

  // ---- fork to the five CO chains and the alignment FIFO -------------
  logic co_in_ready [NL];
  logic co_valid    [NL];
  pix_t co_pix      [NL];
  logic al_full, al_empty, join_fire;
  pix_t al_pix;
  logic [$clog2(ALIGN_FL+1)-1:0] al_count;

  always_comb begin
    s1_ready = !al_full;
    for (int k = 0; k < NL; k++) s1_ready = s1_ready && co_in_ready[k];
  end
  assign s1_fire = s1_valid && s1_ready;

  for (genvar k = 0; k < NL; k++) begin : g_level
    co_filter #(.LEVEL(k), .N_LEVELS(NL), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_co (
      .clk(clk), .rst_n(rst_n),
      .in_valid(s1_fire), .in_ready(co_in_ready[k]), .in_dil(s1_res[k].mx),
      .out_valid(co_valid[k]), .out_ready(join_fire), .out_co(co_pix[k])
    );
  end

  image_fifo #(.FW(PIX_W), .FL(ALIGN_FL)) u_align (
    .clk(clk), .rst_n(rst_n),
    .we(s1_fire), .d_in(s1_center),
    .oe(join_fire), .d_out(al_pix),
    .eff(al_empty), .fff(al_full), .count(al_count)
  );

  // ---- join and detail extraction ----------------------------------
  logic join_valid, dma_ready;

  always_comb begin
    join_valid = !al_empty;
    for (int k = 0; k < NL; k++) join_valid = join_valid && co_valid[k];
  end
  assign out_valid = join_valid && dma_ready;
  assign join_fire = join_valid && dma_ready && out_ready;

  always_comb begin
    out_detail[0] = $signed({1'b0, al_pix}) - $signed({1'b0, co_pix[0]});
    for (int k = 1; k < NL; k++)
      out_detail[k] = $signed({1'b0, co_pix[k-1]}) - $signed({1'b0, co_pix[k]});
  end
  assign out_nodetail = co_pix[NL-1];
  assign out_orig     = al_pix;

  // ---- processor port: the same results, one pixel record at a time --
  window_dma_port u_dma (
    .clk(clk), .rst_n(rst_n), .dma_en(dma_en),
    .in_valid(join_valid && out_ready), .in_ready(dma_ready),
    .in_detail(out_detail), .in_orig(al_pix),
    .out_valid(enh_valid), .out_ready(enh_ready), .out_pix(enh_pix),
    .port_id(pb_port_id), .read_strobe(pb_read_strobe), .write_strobe(pb_write_strobe),
    .pb_out_port(pb_out_port), .pb_in_port(pb_in_port),
    .interrupt(pb_interrupt), .interrupt_ack(pb_interrupt_ack)
  );

  // the FIFO is sized for three engine latencies; it must never fill
  a_align_room: assert property (@(posedge clk) disable iff (!rst_n) !al_full)
    else $error("morph_decomp_top: alignment FIFO full");

endmodule
