// canny_edge: streaming Canny edge detector for the iris localisation step.
//
// Three 3x3 stages, each behind its own line_window:
//   1. Sobel derivatives (MAC units with power-of-two approximate
//      multipliers), gradient magnitude max(0.875a + 0.5b, a) and direction
//      quantised to four sectors; registered as {dir, mag}.
//   2. Non-maximum suppression along the direction, and in parallel the
//      adaptive thresholds TH = P1*mean and TL = TH/2 of the same window of
//      magnitudes; the suppressed magnitude is classified as none (<= TL),
//      weak (TL < g <= TH) or strong (> TH); registered.
//   3. Hysteresis: weak pixels survive only next to a strong pixel.
// The stage order and the formulas follow the edge detector description.
// The threshold unit also yields the window median and Te = 0.75*mean;
// neither enters the edge decision, so those outputs are left open here.
// The one-pass local hysteresis and the frame shrinking by one pixel per
// side per stage (no border padding) are this design's choices.
//
// Interface: pix_valid/pix take one 8-bit grey pixel per cycle in raster
// order, IMG_W x IMG_H per frame, without back-pressure. edge_valid/edge
// deliver the (IMG_W-6) x (IMG_H-6) edge map in raster order.
// Latency: 3 cycles from the pixel that completes a stage-3 window to its
// edge bit; the pipeline holds about two image rows per stage.
// Reset: synchronous, active low.
module canny_edge
  import iris_pkg::*;
#(
  parameter int IMG_W = 320,
  parameter int IMG_H = 280,
  parameter int P1_Q8 = 205
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       pix_valid,
  input  logic [7:0] pix,
  output logic       edge_valid,
  output logic       edge_o
);

  // ---------------- stage 1: gradient ----------------
  logic [7:0]         w0 [3][3];
  logic               w0_valid;
  logic signed [11:0] fx, fy;
  logic [11:0]        mag;
  grad_dir_e          dir;
  logic               s1_valid;
  logic [13:0]        s1_data;   // {dir, mag}

  line_window #(.DW(8), .W(IMG_W), .H(IMG_H)) u_lw0 (
    .clk, .rst_n, .in_valid(pix_valid), .in_data(pix),
    .win(w0), .win_valid(w0_valid), .win_col(), .win_row());

  sobel_gradient u_sobel (.win(w0), .fx(fx), .fy(fy));
  grad_mag_dir   u_magdir (.fx(fx), .fy(fy), .mag(mag), .dir(dir));

  always_ff @(posedge clk) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= w0_valid;
    if (w0_valid) s1_data <= {dir, mag};
  end

  // ---------------- stage 2: NMS + thresholds ----------------
  logic [13:0] w1 [3][3];
  logic        w1_valid;
  logic [11:0] g [9];
  grad_dir_e   cdir;
  logic [11:0] g_nms, th, tl;
  edge_cls_e   cls;
  logic        s2_valid;
  edge_cls_e   s2_cls;

  line_window #(.DW(14), .W(IMG_W-2), .H(IMG_H-2)) u_lw1 (
    .clk, .rst_n, .in_valid(s1_valid), .in_data(s1_data),
    .win(w1), .win_valid(w1_valid), .win_col(), .win_row());

  always_comb begin
    for (int i = 0; i < 9; i++) g[i] = w1[i/3][i%3][11:0];
    cdir = grad_dir_e'(w1[1][1][13:12]);
  end

  nms u_nms (.mag(g), .dir(cdir), .g_nms(g_nms));
  adaptive_threshold #(.P1_Q8(P1_Q8)) u_thr (
    .g(g), .mean(), .median(), .te(), .th(th), .tl(tl));

  always_comb begin
    if (g_nms > th)      cls = CLS_STRONG;
    else if (g_nms > tl) cls = CLS_WEAK;
    else                 cls = CLS_NONE;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) s2_valid <= 1'b0;
    else        s2_valid <= w1_valid;
    if (w1_valid) s2_cls <= cls;
  end

  // ---------------- stage 3: hysteresis ----------------
  logic [1:0]  w2 [3][3];
  logic        w2_valid;
  edge_cls_e   c9 [9];
  logic        e_bit;

  line_window #(.DW(2), .W(IMG_W-4), .H(IMG_H-4)) u_lw2 (
    .clk, .rst_n, .in_valid(s2_valid), .in_data(s2_cls),
    .win(w2), .win_valid(w2_valid), .win_col(), .win_row());

  always_comb begin
    for (int i = 0; i < 9; i++) c9[i] = edge_cls_e'(w2[i/3][i%3]);
  end

  hysteresis u_hyst (.cls(c9), .edge_o(e_bit));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      edge_valid <= 1'b0;
      edge_o     <= 1'b0;
    end else begin
      edge_valid <= w2_valid;
      if (w2_valid) edge_o <= e_bit;
    end
  end

endmodule
