// cnn_top: the iris feature extraction and classification network.
//
//   200x40x1 -> Conv1 3x3, 6 kernels, ReLU     -> 198x38x6
//            -> max pool 3x3 stride 3          -> 66x12x6
//            -> Conv2 3x3, 16 kernels, ReLU    -> 64x10x16
//            -> max pool 5x5 stride 5          -> 12x2x16 = 384 (flatten)
//            -> Dense 120 (ReLU) -> Dense 120 (ReLU) -> Dense 84 (ReLU)
//            -> Dense 40 -> softmax -> class and probability
// The layers form a pipeline of valid/ready streams, so a layer starts on a
// new image while the following ones still process the previous one. The
// flatten order is row, column, channel (the order pool 2 emits). Every
// multiplication uses the power-of-two approximate multiplier. The layer
// sizes follow the network table of the design; the stream protocol, the
// Q8.8 number format, ReLU on the hidden dense layers and the input scaling
// (an 8-bit pixel p enters as p/16, i.e. p << 4 in Q8.8) are this design's
// choices.
//
// Interface: pix_valid/pix_ready/pix take the 200x40 normalised iris image
// in raster order. prob_valid/prob_idx/prob give the 40 class
// probabilities (Q0.16); res_valid/res_class/res_prob the winner.
// Reset: synchronous, active low.
module cnn_top
  import iris_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        pix_valid,
  output logic        pix_ready,
  input  logic [7:0]  pix,
  output logic        prob_valid,
  output logic [7:0]  prob_idx,
  output logic [15:0] prob,
  output logic        res_valid,
  output logic [7:0]  res_class,
  output logic [15:0] res_prob
);

  localparam int IMG_W = 200;
  localparam int IMG_H = 40;
  localparam int C1    = 6;
  localparam int C2    = 16;
  localparam int P1W   = (IMG_W - 2) / 3;
  localparam int P1H   = (IMG_H - 2) / 3;
  localparam int P2W   = (P1W - 2) / 5;
  localparam int P2H   = (P1H - 2) / 5;
  localparam int FLAT  = P2W * P2H * C2;

  // stream between stage s and s+1
  logic v [9];
  logic r [9];
  act_t d [9];

  assign v[0]      = pix_valid;
  assign pix_ready = r[0];
  assign d[0]      = act_t'({4'd0, pix, 4'd0});

  conv_layer #(.CIN(1), .COUT(C1), .W(IMG_W), .H(IMG_H), .LAYER(1)) u_conv1 (
    .clk, .rst_n, .in_valid(v[0]), .in_ready(r[0]), .in_data(d[0]),
    .out_valid(v[1]), .out_ready(r[1]), .out_data(d[1]));

  max_pool #(.C(C1), .W(IMG_W-2), .H(IMG_H-2), .K(3)) u_pool1 (
    .clk, .rst_n, .in_valid(v[1]), .in_ready(r[1]), .in_data(d[1]),
    .out_valid(v[2]), .out_ready(r[2]), .out_data(d[2]));

  conv_layer #(.CIN(C1), .COUT(C2), .W(P1W), .H(P1H), .LAYER(2)) u_conv2 (
    .clk, .rst_n, .in_valid(v[2]), .in_ready(r[2]), .in_data(d[2]),
    .out_valid(v[3]), .out_ready(r[3]), .out_data(d[3]));

  max_pool #(.C(C2), .W(P1W-2), .H(P1H-2), .K(5)) u_pool2 (
    .clk, .rst_n, .in_valid(v[3]), .in_ready(r[3]), .in_data(d[3]),
    .out_valid(v[4]), .out_ready(r[4]), .out_data(d[4]));

  fc_layer #(.N_IN(FLAT), .N_OUT(120), .RELU(1), .LAYER(3)) u_fc1 (
    .clk, .rst_n, .in_valid(v[4]), .in_ready(r[4]), .in_data(d[4]),
    .out_valid(v[5]), .out_ready(r[5]), .out_data(d[5]));

  fc_layer #(.N_IN(120), .N_OUT(120), .RELU(1), .LAYER(4)) u_fc2 (
    .clk, .rst_n, .in_valid(v[5]), .in_ready(r[5]), .in_data(d[5]),
    .out_valid(v[6]), .out_ready(r[6]), .out_data(d[6]));

  fc_layer #(.N_IN(120), .N_OUT(84), .RELU(1), .LAYER(5)) u_fc3 (
    .clk, .rst_n, .in_valid(v[6]), .in_ready(r[6]), .in_data(d[6]),
    .out_valid(v[7]), .out_ready(r[7]), .out_data(d[7]));

  fc_layer #(.N_IN(84), .N_OUT(40), .RELU(0), .LAYER(6)) u_fc4 (
    .clk, .rst_n, .in_valid(v[7]), .in_ready(r[7]), .in_data(d[7]),
    .out_valid(v[8]), .out_ready(r[8]), .out_data(d[8]));

  softmax #(.N(40)) u_softmax (
    .clk, .rst_n, .in_valid(v[8]), .in_ready(r[8]), .in_data(d[8]),
    .prob_valid, .prob_idx, .prob, .res_valid, .res_class, .res_prob);

endmodule
