// conv_layer: 3x3 convolution layer with bias, saturation and ReLU.
//
// The input feature map arrives as a stream in raster order with the CIN
// channels of a pixel interleaved (pixel-major, channel-minor). A packer
// gathers the CIN values of a pixel into one word, and a line_window (two
// line buffers) turns the stream into 3x3 windows of such words. For every
// complete window a small FSM reuses one mac3x3 (nine power-of-two
// approximate multipliers) serially: for kernel k = 0..COUT-1 it accumulates
// the 3x3 products of input channel ci = 0..CIN-1, one channel per cycle,
// then adds the bias, saturates to Q8.8 and applies ReLU (a selector). The
// output is the (W-2) x (H-2) x COUT map as a stream, kernels interleaved.
// Sharing the multipliers across kernels is the serial-parallel structure of
// the accelerator; the stream format and the one-channel-per-cycle schedule
// are this design's choices. Weights come from a ROM of 4-bit codes
// (iris_pkg::weight_code, decoded by wdecode in front of the multipliers)
// and biases from a 16-bit ROM (bias_val), both filled at elaboration with
// this layer's LAYER number; weight index ((k*CIN + ci)*9 + 3*row + col).
//
// Interface: in_valid/in_ready/in_data and out_valid/out_ready/out_data are
// valid/ready streams of Q8.8 values. Timing: a window costs COUT*(CIN+1)
// cycles when the output is never stalled, plus two cycles to start; pixels
// that complete no window are taken at one per cycle.
// Reset: synchronous, active low.
module conv_layer
  import iris_pkg::*;
#(
  parameter int CIN   = 1,
  parameter int COUT  = 6,
  parameter int W     = 200,
  parameter int H     = 40,
  parameter int LAYER = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  act_t in_data,
  output logic out_valid,
  input  logic out_ready,
  output act_t out_data
);

  typedef wcode_t wrom_t [COUT*CIN*9];
  typedef act_t brom_t [COUT];

  function automatic wrom_t gen_w();
    wrom_t r;
    for (int n = 0; n < COUT*CIN*9; n++) r[n] = weight_code(LAYER, n);
    return r;
  endfunction

  function automatic brom_t gen_b();
    brom_t r;
    for (int k = 0; k < COUT; k++) r[k] = bias_val(LAYER, k);
    return r;
  endfunction

  localparam wrom_t WROM = gen_w();
  localparam int    EMIN = weight_emin(LAYER);
  localparam brom_t BROM = gen_b();
  localparam int KW = (COUT > 1) ? $clog2(COUT) : 1;
  localparam int CW = (CIN > 1) ? $clog2(CIN) : 1;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} state_e;

  // ---------------- channel packer ----------------
  logic [CIN*DW-1:0] vec;
  logic [CW-1:0]     pcnt;
  logic              vec_full;
  logic              lw_ready, push;

  assign in_ready = !vec_full;
  assign push     = vec_full && lw_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pcnt     <= '0;
      vec_full <= 1'b0;
    end else begin
      if (push) vec_full <= 1'b0;
      if (in_valid && in_ready) begin
        vec[pcnt*DW +: DW] <= in_data;
        if (pcnt == CW'(CIN - 1)) begin
          pcnt     <= '0;
          vec_full <= 1'b1;
        end else begin
          pcnt <= pcnt + 1'b1;
        end
      end
    end
  end

  // ---------------- window ----------------
  logic [CIN*DW-1:0] win [3][3];
  logic              win_valid;

  line_window #(.DW(CIN*DW), .W(W), .H(H)) u_lw (
    .clk, .rst_n, .in_valid(push), .in_data(vec),
    .win, .win_valid, .win_col(), .win_row());

  // ---------------- kernel sequencer ----------------
  state_e        state;
  logic [KW-1:0] k;
  logic [CW-1:0] ci;
  acc_t          acc, acc_next, biased;
  act_t          mwin [9];
  act_t          mwt  [9];
  logic signed [ACC_W-1:0] msum;
  act_t          res;

  assign lw_ready = (state == S_IDLE) && !win_valid;

  always_comb begin
    for (int i = 0; i < 9; i++) begin
      mwin[i] = act_t'(win[i/3][i%3][ci*DW +: DW]);
      mwt[i]  = wdecode(WROM[(int'(k)*CIN + int'(ci))*9 + i], EMIN);
    end
  end

  mac3x3 #(.DW(DW), .SUM_W(ACC_W)) u_mac (.win(mwin), .wt(mwt), .sum(msum));

  always_comb begin
    acc_next = acc + msum;
    biased   = acc_next + (acc_t'(BROM[k]) <<< FRAC);
    res      = sat_act(biased);
    if (res < 0) res = '0;              // ReLU
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      ci        <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (win_valid) begin
          state <= S_RUN;
          k     <= '0;
          ci    <= '0;
          acc   <= '0;
        end
        S_RUN: begin
          if (ci == CW'(CIN - 1)) begin
            out_data  <= res;
            out_valid <= 1'b1;
            state     <= S_OUT;
          end else begin
            acc <= acc_next;
            ci  <= ci + 1'b1;
          end
        end
        S_OUT: if (out_ready) begin
          out_valid <= 1'b0;
          acc       <= '0;
          ci        <= '0;
          if (k == KW'(COUT - 1)) begin
            state <= S_IDLE;
          end else begin
            k     <= k + 1'b1;
            state <= S_RUN;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
