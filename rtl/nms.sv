// nms: non-maximum suppression of the Canny edge detector.
//
// From the 3x3 window of gradient magnitudes g1..g9 (g5 the centre) the two
// neighbours along the centre's quantised gradient direction are selected:
//   0 deg: left/right   45 deg: top-left/bottom-right
//   90 deg: top/bottom  135 deg: top-right/bottom-left
// (y grows downwards). g5 is kept when it is not smaller than both,
// otherwise the output is 0. Keeping ties is this design's choice.
//
// Interface: mag[0..8] (index 3*row + col), dir; g_nms. Combinational.
module nms
  import iris_pkg::*;
(
  input  logic [11:0] mag [9],
  input  grad_dir_e   dir,
  output logic [11:0] g_nms
);

  logic [11:0] n0, n1;

  always_comb begin
    unique case (dir)
      DIR_0:   begin n0 = mag[3]; n1 = mag[5]; end
      DIR_45:  begin n0 = mag[0]; n1 = mag[8]; end
      DIR_90:  begin n0 = mag[1]; n1 = mag[7]; end
      default: begin n0 = mag[2]; n1 = mag[6]; end
    endcase
    g_nms = (mag[4] >= n0 && mag[4] >= n1) ? mag[4] : 12'd0;
  end

endmodule
