// iris_pkg: types, fixed-point constants and ROM contents shared by the
// iris recognition accelerator.
//
// Number format: every CNN activation, weight and bias is a 16-bit signed
// fixed-point value with FRAC = 8 fraction bits (Q8.8). Products of two
// Q8.8 values are Q16.16 and are summed in ACC_W-bit accumulators; a layer
// output is the accumulator shifted right by FRAC and saturated to 16 bits.
// The multiplier width (16x16) follows the accelerator description; the
// split into integer and fraction bits is this design's choice.
//
// Weights and biases: the trained network is not published, so the ROMs are
// filled at elaboration by weight_code()/bias_val(), a fixed hash that yields
// signed powers of two (or zero). A weight is stored as a 4-bit code
// (nonzero, sign, exponent offset from the layer's weight_emin) and expanded
// by wdecode() in front of the multiplier; weight_val() is the decoded value.
// The power-of-two multiplier is exact for such weights, which lets a
// testbench check the network bit-exactly with ordinary multiplication. To
// deploy trained weights, replace these two functions (or the ROM
// initialisation that calls them).
//
// exp_q16(k) gives e^(-k/16) in Q0.16, saturated to 65535, for the softmax
// look-up table.
package iris_pkg;

  localparam int DW    = 16;   // activation / weight width
  localparam int FRAC  = 8;    // fraction bits of activations and weights
  localparam int ACC_W = 40;   // accumulator width

  typedef logic signed [DW-1:0]    act_t;
  typedef logic signed [ACC_W-1:0] acc_t;

  // Canny pixel classes after thresholding
  typedef enum logic [1:0] {
    CLS_NONE   = 2'd0,
    CLS_WEAK   = 2'd1,
    CLS_STRONG = 2'd2
  } edge_cls_e;

  // Quantised gradient direction sectors
  typedef enum logic [1:0] {
    DIR_0   = 2'd0,
    DIR_45  = 2'd1,
    DIR_90  = 2'd2,
    DIR_135 = 2'd3
  } grad_dir_e;

  function automatic logic [31:0] mix32(input int unsigned layer, input int unsigned idx);
    logic [31:0] h;
    h = idx * 32'h9E37_79B1;
    h = h ^ (layer * 32'h85EB_CA6B);
    h = h ^ (h >> 15);
    h = h * 32'h2C1B_3C6D;
    h = h ^ (h >> 12);
    h = h * 32'h297A_2D39;
    h = h ^ (h >> 15);
    return h;
  endfunction

  // Smallest weight exponent per layer: weights are +-2^-(emin..emin+3).
  // Layers: 1 = Conv1, 2 = Conv2, 3..6 = Dense1..Dense4.
  function automatic int weight_emin(input int unsigned layer);
    case (layer)
      1:       return 1;
      2:       return 2;
      3:       return 4;
      default: return 3;
    endcase
  endfunction

  // Stored weight code: {nonzero, negative, exponent offset[1:0]}. The ROMs
  // keep these 4-bit codes; wdecode() expands one to its Q8.8 value
  // +-2^-(emin + offset), or 0.
  typedef logic [3:0] wcode_t;

  function automatic wcode_t weight_code(input int unsigned layer, input int unsigned idx);
    logic [5:0] h;
    h = 6'(mix32(layer, idx));
    if (h[2:0] == 3'd0) return '0;
    return {1'b1, h[3], h[5:4]};
  endfunction

  function automatic act_t wdecode(input wcode_t c, input int emin);
    act_t mag;
    if (!c[3]) return '0;
    mag = act_t'(1 << (FRAC - emin - int'(c[1:0])));
    return c[2] ? -mag : mag;
  endfunction

  // Weight number idx of a layer, Q8.8, a signed power of two or zero.
  function automatic act_t weight_val(input int unsigned layer, input int unsigned idx);
    return wdecode(weight_code(layer, idx), weight_emin(layer));
  endfunction

  // Bias number idx of a layer, Q8.8, in [-0.5, 0.5).
  function automatic act_t bias_val(input int unsigned layer, input int unsigned idx);
    logic [7:0] h;
    h = 8'(mix32(layer + 100, idx));
    return act_t'(int'(h[7:0]) - 128);
  endfunction

  // e^(-k/16) in Q0.16, computed by repeated multiplication with
  // e^(-1/16) = 4034748382 / 2^32.
  function automatic logic [15:0] exp_q16(input int unsigned k);
    logic [63:0] v;
    v = 64'hFFFF_FFFF;
    for (int unsigned i = 0; i < k; i++) v = (v * 64'd4034748382) >> 32;
    return 16'(v >> 16);
  endfunction

  // Saturate an accumulator holding a Q16.16 sum to a Q8.8 activation.
  function automatic act_t sat_act(input acc_t acc);
    acc_t s;
    s = acc >>> FRAC;
    if (s > acc_t'(32767))  return act_t'(16'sh7FFF);
    if (s < acc_t'(-32768)) return act_t'(16'sh8000);
    return act_t'(s);
  endfunction

endpackage
