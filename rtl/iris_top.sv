// iris_top: iris recognition accelerator.
//
// Three datapaths share one clock:
//   * canny_edge   - edge map of the camera image, streamed out to the
//                    circle detector that locates the pupil and iris
//                    boundaries (outside this design, see edge_* ports);
//   * iris_normalize - given the two circles (pupil_*, iris_*), reads the
//                    eye image from the frame store through the img_* port
//                    and unwraps the iris ring into a 200x40 image;
//   * cnn_top      - classifies that image (two convolution/pooling stages,
//                    four dense layers, softmax) into one of 40 identities.
// The normaliser streams straight into the CNN. The order of the steps
// (edge detection, circle fit, normalisation, CNN) follows the system
// structure of the design; the frame store, the circle detector and the
// weight storage are outside this RTL, so their signals are ports.
//
// Interface:
//   cam_valid/cam_pix : eye image, IMG_W x IMG_H raster, one pixel a cycle
//   edge_valid/edge_o : (IMG_W-6) x (IMG_H-6) edge map
//   norm_start + circles: start one recognition; norm_busy while unwrapping
//   img_rd/img_x/img_y/img_data: frame-store read, data one cycle after rd
//   prob_*            : 40 class probabilities, Q0.16
//   res_valid/res_class/res_prob: recognised identity
// Reset: synchronous, active low.
module iris_top #(
  parameter int IMG_W = 320,
  parameter int IMG_H = 280
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cam_valid,
  input  logic [7:0]  cam_pix,
  output logic        edge_valid,
  output logic        edge_o,
  input  logic        norm_start,
  input  logic [15:0] pupil_x,
  input  logic [15:0] pupil_y,
  input  logic [15:0] pupil_r,
  input  logic [15:0] iris_x,
  input  logic [15:0] iris_y,
  input  logic [15:0] iris_r,
  output logic        norm_busy,
  output logic        img_rd,
  output logic [15:0] img_x,
  output logic [15:0] img_y,
  input  logic [7:0]  img_data,
  output logic        prob_valid,
  output logic [7:0]  prob_idx,
  output logic [15:0] prob,
  output logic        res_valid,
  output logic [7:0]  res_class,
  output logic [15:0] res_prob
);

  logic       n_valid, n_ready;
  logic [7:0] n_data;

  canny_edge #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_canny (
    .clk, .rst_n, .pix_valid(cam_valid), .pix(cam_pix),
    .edge_valid, .edge_o);

  iris_normalize #(.OUT_W(200), .OUT_H(40), .IMG_W(IMG_W), .IMG_H(IMG_H)) u_norm (
    .clk, .rst_n, .start(norm_start),
    .pupil_x, .pupil_y, .pupil_r, .iris_x, .iris_y, .iris_r,
    .busy(norm_busy), .img_rd, .img_x, .img_y, .img_data,
    .out_valid(n_valid), .out_ready(n_ready), .out_data(n_data));

  cnn_top u_cnn (
    .clk, .rst_n, .pix_valid(n_valid), .pix_ready(n_ready), .pix(n_data),
    .prob_valid, .prob_idx, .prob, .res_valid, .res_class, .res_prob);

endmodule
