// softmax: p_i = e^(x_i) / sum_j e^(x_j) over N class scores, and the winner.
//
// The N Q8.8 scores are stored while their maximum and its index (lowest
// index on ties) are tracked. Each exponential is read from a 256-entry
// look-up table of e^(-k/16) in Q0.16 at k = min((max - x_i) / (1/16), 255),
// i.e. e^(x_i - max), which equals the softmax after normalisation and never
// overflows. The exponentials are summed, and a restoring divider (32
// cycles per class) forms p_i = e_i * 2^16 / sum in Q0.16 (saturated to
// 0xFFFF). The look-up-table exponential follows the classifier
// description; subtracting the maximum, the table resolution and the
// divider are this design's choices.
//
// Interface: in_valid/in_ready/in_data take N scores. prob_valid pulses
// once per class with prob_idx and prob. res_valid pulses after the last
// class with res_class (argmax) and res_prob (its probability).
// Timing: N load cycles, N exponent cycles, 33 cycles per class for the
// division. Reset: synchronous, active low.
module softmax
  import iris_pkg::*;
#(
  parameter int N = 40
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  act_t        in_data,
  output logic        prob_valid,
  output logic [7:0]  prob_idx,
  output logic [15:0] prob,
  output logic        res_valid,
  output logic [7:0]  res_class,
  output logic [15:0] res_prob
);

  typedef logic [15:0] lut_t [256];

  function automatic lut_t gen_lut();
    lut_t r;
    for (int k = 0; k < 256; k++) r[k] = exp_q16(k);
    return r;
  endfunction

  localparam lut_t EXP_LUT = gen_lut();

  typedef enum logic [1:0] {S_LOAD, S_EXP, S_DIV} state_e;

  localparam int IW = (N > 1) ? $clog2(N) : 1;

  state_e      state;
  logic [IW-1:0] ci;
  act_t        x   [N];
  logic [15:0] e   [N];
  act_t        xmax;
  logic [7:0]  cnt, amax;
  logic [23:0] sum;
  logic [31:0] num;
  logic [23:0] rem;
  logic [31:0] quo;
  logic [5:0]  step;
  logic [16:0] diff;   // max - x_i, Q8.8; its low 4 bits fall below the table step
  logic [7:0]  kidx;
  logic [24:0] rem_sh;
  logic [15:0] qsat;

  assign in_ready = (state == S_LOAD);
  assign ci       = cnt[IW-1:0];

  always_comb begin
    diff   = 17'(int'(xmax) - int'(x[ci]));
    kidx   = (diff[16:4] > 13'd255) ? 8'd255 : diff[11:4];
    rem_sh = {rem, num[31]};
    qsat   = (quo > 32'd65535) ? 16'hFFFF : quo[15:0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_LOAD;
      cnt        <= '0;
      amax       <= '0;
      xmax       <= '0;
      sum        <= '0;
      num        <= '0;
      rem        <= '0;
      quo        <= '0;
      step       <= '0;
      prob_valid <= 1'b0;
      prob_idx   <= '0;
      prob       <= '0;
      res_valid  <= 1'b0;
      res_class  <= '0;
      res_prob   <= '0;
    end else begin
      prob_valid <= 1'b0;
      res_valid  <= 1'b0;
      unique case (state)
        S_LOAD: if (in_valid) begin
          x[ci] <= in_data;
          if (cnt == 0 || in_data > xmax) begin
            xmax <= in_data;
            amax <= cnt;
          end
          if (cnt == 8'(N - 1)) begin
            cnt   <= '0;
            sum   <= '0;
            state <= S_EXP;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_EXP: begin
          e[ci] <= EXP_LUT[kidx];
          sum    <= sum + 24'(EXP_LUT[kidx]);
          if (cnt == 8'(N - 1)) begin
            cnt   <= '0;
            step  <= '0;
            state <= S_DIV;
          end else begin
            cnt <= cnt + 8'd1;
          end
        end
        S_DIV: begin
          if (step == 6'd0) begin
            num  <= {e[ci], 16'd0};
            rem  <= '0;
            quo  <= '0;
            step <= 6'd1;
          end else if (step <= 6'd32) begin
            // one restoring division step
            if (rem_sh >= 25'(sum)) begin
              rem <= 24'(rem_sh - 25'(sum));
              quo <= {quo[30:0], 1'b1};
            end else begin
              rem <= rem_sh[23:0];
              quo <= {quo[30:0], 1'b0};
            end
            num  <= num << 1;
            step <= step + 6'd1;
          end else begin
            prob_valid <= 1'b1;
            prob_idx   <= cnt;
            prob       <= qsat;
            if (cnt == amax) res_prob <= qsat;
            step <= '0;
            if (cnt == 8'(N - 1)) begin
              cnt       <= '0;
              res_valid <= 1'b1;
              res_class <= amax;
              state     <= S_LOAD;
            end else begin
              cnt <= cnt + 8'd1;
            end
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
