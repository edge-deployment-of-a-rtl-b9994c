// grad_mag_dir: gradient magnitude and quantised direction.
//
// With a = max(|fx|,|fy|) and b = min(|fx|,|fy|) the magnitude is the
// multiplier-free estimate mag = max(0.875a + 0.5b, a), computed as
// max((7a + 4b) >> 3, a). The direction in [0, 180) degrees is quartered
// into the sectors 0, 45, 90 and 135 degrees by a small look-up table
// addressed by two slope comparisons and the sign agreement of fx and fy:
//   |fy| <= tan(22.5)|fx|  -> 0     (tested as 128|fy| <= 53|fx|)
//   |fy| >= tan(67.5)|fx|  -> 90    (tested as 128|fy| >= 309|fx|)
//   otherwise 45 when fx, fy have the same sign, else 135.
// The magnitude formula and the four-sector quantisation follow the edge
// detector description; the sector boundaries and the 128-scaled constants
// are this design's choice. y grows downwards (see sobel_gradient).
//
// Interface: fx, fy signed 12-bit; mag unsigned 12-bit; dir grad_dir_e.
// Purely combinational.
module grad_mag_dir
  import iris_pkg::*;
(
  input  logic signed [11:0] fx,
  input  logic signed [11:0] fy,
  output logic [11:0]        mag,
  output grad_dir_e          dir
);

  logic [11:0] ax, ay, a, b;
  logic [15:0] est;
  logic [20:0] ay128, ax53, ax309;
  logic        flat, steep, same;

  always_comb begin
    ax    = fx[11] ? 12'(-fx) : 12'(fx);
    ay    = fy[11] ? 12'(-fy) : 12'(fy);
    a     = (ax >= ay) ? ax : ay;
    b     = (ax >= ay) ? ay : ax;
    est   = (16'(a) * 16'd7 + 16'(b) * 16'd4) >> 3;
    mag   = (est > 16'(a)) ? est[11:0] : a;
    ay128 = 21'(ay) << 7;
    ax53  = 21'(ax) * 21'd53;
    ax309 = 21'(ax) * 21'd309;
    flat  = (ay128 <= ax53);
    steep = (ay128 >= ax309);
    same  = (fx[11] == fy[11]);
    // direction look-up table
    unique casez ({flat, steep, same})
      3'b1??:  dir = DIR_0;
      3'b01?:  dir = DIR_90;
      3'b001:  dir = DIR_45;
      default: dir = DIR_135;
    endcase
  end

endmodule
