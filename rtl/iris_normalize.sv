// iris_normalize: rubber-sheet unwrapping of the iris ring into a
// OUT_W x OUT_H (200 x 40) rectangle in polar coordinates.
//
// Output column t is the angle theta = 2*pi*t/OUT_W, output row j the
// radial position rho = j/OUT_H between the inner (pupil) boundary and the
// outer (iris) boundary. The source pixel is
//   P = (1 - rho) * (pupil centre + r_pupil * (cos, sin))
//     +      rho  * (iris centre  + r_iris  * (cos, sin)),
// rounded to the nearest pixel and clamped to the IMG_W x IMG_H frame. The
// cos/sin table (Q1.14, OUT_W entries) is generated at elaboration by
// repeated rotation by 2*pi/OUT_W. For each output pixel the unit issues one
// read on the image port and passes the returned pixel to the output stream
// in raster order (row j, then column t). The Cartesian-to-polar unwrapping
// from the inner to the outer boundary and the 200 x 40 size follow the
// normalisation description; the interpolation formula (Daugman's rubber
// sheet), nearest-pixel sampling and the image port are this design's
// choices. Removing the eyelid-covered rows is left to the choice of the
// two circles (the 40 rows always span the whole ring).
//
// Interface: start (one cycle) latches the two circles and begins a frame;
// busy is high until the last pixel has been accepted. img_rd/img_x/img_y
// request a pixel, img_data must hold it in the cycle after img_rd (one
// cycle read latency). out_valid/out_ready/out_data is the output stream.
// Timing: 4 cycles per output pixel when the output is not stalled.
// Reset: synchronous, active low.
module iris_normalize #(
  parameter int OUT_W = 200,
  parameter int OUT_H = 40,
  parameter int IMG_W = 320,
  parameter int IMG_H = 280
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] pupil_x,
  input  logic [15:0] pupil_y,
  input  logic [15:0] pupil_r,
  input  logic [15:0] iris_x,
  input  logic [15:0] iris_y,
  input  logic [15:0] iris_r,
  output logic        busy,
  output logic        img_rd,
  output logic [15:0] img_x,
  output logic [15:0] img_y,
  input  logic [7:0]  img_data,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_data
);

  typedef logic signed [15:0] trig_t [OUT_W];
  typedef logic [16:0] rho_t [OUT_H];

  // cos (sel = 0) or sin (sel = 1) of 2*pi*t/OUT_W in Q1.14
  function automatic trig_t gen_trig(input int sel);
    trig_t r;
    longint c, s, c1, s1, cn;
    real   a;
    a  = 6.283185307179586 / OUT_W;
    c1 = longint'($cos(a) * 1073741824.0);
    s1 = longint'($sin(a) * 1073741824.0);
    c  = 64'sd1073741824;
    s  = 0;
    for (int t = 0; t < OUT_W; t++) begin
      r[t] = 16'((sel == 0 ? c : s) >>> 16);
      cn   = (c * c1 - s * s1) >>> 30;
      s    = (s * c1 + c * s1) >>> 30;
      c    = cn;
    end
    return r;
  endfunction

  function automatic rho_t gen_rho();
    rho_t r;
    for (int j = 0; j < OUT_H; j++) r[j] = 17'((j * 65536) / OUT_H);
    return r;
  endfunction

  localparam trig_t COS = gen_trig(0);
  localparam trig_t SIN = gen_trig(1);
  localparam rho_t  RHO = gen_rho();

  typedef enum logic [2:0] {S_IDLE, S_CALC, S_ISSUE, S_CAP, S_OUT} state_e;

  state_e      state;
  logic [15:0] t, j;
  logic [$clog2(OUT_W)-1:0] ti;   // table indices
  logic [$clog2(OUT_H)-1:0] ji;
  logic [15:0] px, py, pr, ix, iy, ir;
  logic signed [47:0] xin, yin, xout, yout, xs, ys;
  logic signed [31:0] xr, yr;

  assign busy = (state != S_IDLE);
  assign ti   = t[$clog2(OUT_W)-1:0];
  assign ji   = j[$clog2(OUT_H)-1:0];

  always_comb begin
    xin  = 48'(signed'({1'b0, px})) * 48'sd16384 + 48'(signed'({1'b0, pr})) * 48'(COS[ti]);
    yin  = 48'(signed'({1'b0, py})) * 48'sd16384 + 48'(signed'({1'b0, pr})) * 48'(SIN[ti]);
    xout = 48'(signed'({1'b0, ix})) * 48'sd16384 + 48'(signed'({1'b0, ir})) * 48'(COS[ti]);
    yout = 48'(signed'({1'b0, iy})) * 48'sd16384 + 48'(signed'({1'b0, ir})) * 48'(SIN[ti]);
    xs   = xin + (((xout - xin) * 48'(signed'({1'b0, RHO[ji]}))) >>> 16);
    ys   = yin + (((yout - yin) * 48'(signed'({1'b0, RHO[ji]}))) >>> 16);
    xr   = 32'((xs + 48'sd8192) >>> 14);
    yr   = 32'((ys + 48'sd8192) >>> 14);
    if (xr < 0) xr = 0;
    if (xr > IMG_W - 1) xr = IMG_W - 1;
    if (yr < 0) yr = 0;
    if (yr > IMG_H - 1) yr = IMG_H - 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      t         <= '0;
      j         <= '0;
      img_rd    <= 1'b0;
      img_x     <= '0;
      img_y     <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      {px, py, pr, ix, iy, ir} <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          {px, py, pr} <= {pupil_x, pupil_y, pupil_r};
          {ix, iy, ir} <= {iris_x, iris_y, iris_r};
          t     <= '0;
          j     <= '0;
          state <= S_CALC;
        end
        S_CALC: begin
          img_rd <= 1'b1;
          img_x  <= 16'(xr);
          img_y  <= 16'(yr);
          state  <= S_ISSUE;
        end
        S_ISSUE: begin
          img_rd <= 1'b0;
          state  <= S_CAP;
        end
        S_CAP: begin
          out_data  <= img_data;
          out_valid <= 1'b1;
          state     <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          out_valid <= 1'b0;
          if (t == 16'(OUT_W - 1)) begin
            t <= '0;
            if (j == 16'(OUT_H - 1)) begin
              j     <= '0;
              state <= S_IDLE;
            end else begin
              j     <= j + 16'd1;
              state <= S_CALC;
            end
          end else begin
            t     <= t + 16'd1;
            state <= S_CALC;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
