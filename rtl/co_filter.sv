// co_filter: the rest of the closing-opening (CO) of one level of detail.
//
// Input: the dilation D_k(f) of the image with the level-k SE, as produced
// by the shared multi-SE engine. Three more min/max engines finish
// CO_k(f) = D_k(E_k(E_k(D_k(f)))): an erosion (closing complete), an
// erosion and a dilation (opening of the closed image). Each engine is the
// full five-level engine, of which only level LEVEL is used; this keeps all
// chains of the decomposition in lockstep (same latency and step) at the
// price of idle comparator levels. Streams are valid/ready, raster order.
module co_filter
  import morph_pkg::*;
#(
  parameter int LEVEL    = 0,
  parameter int N_LEVELS = 5,
  parameter int IMG_W    = 256,
  parameter int IMG_H    = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_dil,      // D_k(f)
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_co       // CO_k(f)
);

  logic    v1, r1, v2, r2;
  minmax_t res1 [N_LEVELS];
  minmax_t res2 [N_LEVELS];
  minmax_t res3 [N_LEVELS];

  // closing: erosion of the dilated image
  se_minmax_engine #(.N_LEVELS(N_LEVELS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_close_e (
    .clk(clk), .rst_n(rst_n),
    .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_dil),
    .out_valid(v1), .out_ready(r1), .out_res(res1), .out_center()
  );

  // opening, first half: erosion of the closed image
  se_minmax_engine #(.N_LEVELS(N_LEVELS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_open_e (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v1), .in_ready(r1), .in_pix(res1[LEVEL].mn),
    .out_valid(v2), .out_ready(r2), .out_res(res2), .out_center()
  );

  // opening, second half: dilation
  se_minmax_engine #(.N_LEVELS(N_LEVELS), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_open_d (
    .clk(clk), .rst_n(rst_n),
    .in_valid(v2), .in_ready(r2), .in_pix(res2[LEVEL].mn),
    .out_valid(out_valid), .out_ready(out_ready), .out_res(res3), .out_center()
  );

  assign out_co = res3[LEVEL].mx;

endmodule
