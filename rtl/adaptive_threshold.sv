// adaptive_threshold: local thresholds of the Canny edge detector.
//
// From the nine gradient magnitudes g1..g9 of a 3x3 window the mean (mean9)
// and the median (median9) are formed, and then
//   Te = 0.75 * mean,  TH = P1 * mean,  TL = 0.5 * TH
// where P1, the share of strong edge pixels, is the parameter P1_Q8 / 256.
// The three formulas follow the edge detector description; P1's default
// (0.8) is this design's choice. Te and the median are provided as outputs;
// the edge classifier uses TH and TL.
//
// Interface: g[0..8]; mean, median, te, th, tl unsigned 12-bit.
// Combinational.
module adaptive_threshold #(
  parameter int P1_Q8 = 205
) (
  input  logic [11:0] g [9],
  output logic [11:0] mean,
  output logic [11:0] median,
  output logic [11:0] te,
  output logic [11:0] th,
  output logic [11:0] tl
);

  logic [23:0] th_full;

  mean9   u_mean   (.g(g), .mean(mean));
  median9 u_median (.g(g), .median(median));

  always_comb begin
    te      = 12'((14'(mean) * 14'd3) >> 2);
    th_full = (24'(mean) * 24'(P1_Q8)) >> 8;
    th      = (th_full > 24'd4095) ? 12'd4095 : th_full[11:0];
    tl      = th >> 1;
  end

endmodule
