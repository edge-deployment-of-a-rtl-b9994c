// fc_layer: fully connected layer y_n = b_n + sum_j W_nj * x_j, serial-parallel.
//
// The N_IN inputs are first collected in a buffer and split into three
// equal segments (channels) of SEG = N_IN/3 values. Neurons are processed
// three at a time: in each cycle the three channels each present one input
// (x[i], x[SEG+i], x[2*SEG+i]) and every input is multiplied with the
// weights of the three current neurons, so 3 x 3 = 9 power-of-two
// approximate multipliers run in parallel and feed nine accumulators. After
// SEG cycles the three channel sums of each neuron are added together with
// the bias, saturated to Q8.8 and, when RELU is set, passed through ReLU;
// then the next three neurons start. The results are streamed out in order.
// Three channels, three neurons at a time and nine multipliers follow the
// fully connected layer description; buffering the whole input vector and
// the ReLU on hidden layers are this design's choices. When N_OUT is not a
// multiple of three the unused lanes of the last group are ignored.
// Weight W_nj is stored as the 4-bit code iris_pkg::weight_code(LAYER,
// n*N_IN + j) and expanded by wdecode; bias is bias_val(LAYER, n), 16 bits.
//
// Interface: valid/ready streams of Q8.8 values, N_IN in, N_OUT out.
// Timing per vector: N_IN load cycles, ceil(N_OUT/3) * (SEG + 1) compute
// cycles and N_OUT output cycles. Reset: synchronous, active low.
module fc_layer
  import iris_pkg::*;
#(
  parameter int N_IN  = 384,
  parameter int N_OUT = 120,
  parameter int RELU  = 1,
  parameter int LAYER = 3
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

  localparam int SEG = N_IN / 3;
  localparam int NG  = (N_OUT + 2) / 3;
  localparam int XIW = $clog2(N_IN);     // index widths of the vector buffers
  localparam int YIW = $clog2(NG * 3);

  // Weight ROM of 4-bit codes: word (g*SEG + i)*9 + 3*jn + c holds the code
  // of W[3g+jn][c*SEG+i] (zero for lanes beyond N_OUT). Contents are fixed
  // at elaboration.
  localparam int EMIN = weight_emin(LAYER);
  wcode_t WROM [NG*SEG*9];
  act_t BROM [NG*3];

  initial begin
    for (int gg = 0; gg < NG; gg++)
      for (int ii = 0; ii < SEG; ii++)
        for (int jn = 0; jn < 3; jn++)
          for (int c = 0; c < 3; c++)
            WROM[(gg*SEG + ii)*9 + 3*jn + c] = (3*gg + jn < N_OUT) ?
              weight_code(LAYER, (3*gg + jn)*N_IN + c*SEG + ii) : '0;
    for (int n = 0; n < NG*3; n++) BROM[n] = (n < N_OUT) ? bias_val(LAYER, n) : '0;
  end

  typedef enum logic [1:0] {S_LOAD, S_CALC, S_WRITE, S_OUT} state_e;

  state_e      state;
  act_t        xbuf [N_IN];
  act_t        ybuf [NG*3];
  logic [15:0] cnt;        // load / output counter
  logic [15:0] g, i;
  acc_t        acc  [3][3]; // [neuron lane][channel]
  act_t        xa   [3];
  act_t        wa   [3][3];
  logic signed [2*DW-1:0] prod [3][3];
  act_t        yv   [3];

  assign in_ready  = (state == S_LOAD);
  assign out_valid = (state == S_OUT);
  assign out_data  = ybuf[cnt[YIW-1:0]];

  always_comb begin
    for (int c = 0; c < 3; c++) xa[c] = xbuf[c*SEG + int'(i)];
    for (int jn = 0; jn < 3; jn++)
      for (int c = 0; c < 3; c++) wa[jn][c] = wdecode(WROM[(int'(g)*SEG + int'(i))*9 + 3*jn + c], EMIN);
  end

  for (genvar jn = 0; jn < 3; jn++) begin : g_lane
    for (genvar c = 0; c < 3; c++) begin : g_ch
      approx_mult #(.N(DW)) u_mul (.a(xa[c]), .b(wa[jn][c]), .p(prod[jn][c]));
    end
  end

  // channel sums + bias + activation of the three lanes
  always_comb begin
    acc_t s;
    for (int jn = 0; jn < 3; jn++) begin
      s = acc[jn][0] + acc[jn][1] + acc[jn][2] + (acc_t'(BROM[3*int'(g) + jn]) <<< FRAC);
      yv[jn] = sat_act(s);
      if (RELU != 0 && yv[jn] < 0) yv[jn] = '0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      g     <= '0;
      i     <= '0;
      for (int jn = 0; jn < 3; jn++)
        for (int c = 0; c < 3; c++) acc[jn][c] <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          xbuf[cnt[XIW-1:0]] <= in_data;
          if (cnt == 16'(N_IN - 1)) begin
            cnt   <= '0;
            g     <= '0;
            i     <= '0;
            state <= S_CALC;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        S_CALC: begin
          for (int jn = 0; jn < 3; jn++)
            for (int c = 0; c < 3; c++) acc[jn][c] <= acc[jn][c] + acc_t'(prod[jn][c]);
          if (i == 16'(SEG - 1)) state <= S_WRITE;
          else                   i <= i + 16'd1;
        end
        S_WRITE: begin
          for (int jn = 0; jn < 3; jn++) ybuf[3*int'(g) + jn] <= yv[jn];
          for (int jn = 0; jn < 3; jn++)
            for (int c = 0; c < 3; c++) acc[jn][c] <= '0;
          i <= '0;
          if (g == 16'(NG - 1)) begin
            state <= S_OUT;
            cnt   <= '0;
          end else begin
            g     <= g + 16'd1;
            state <= S_CALC;
          end
        end
        S_OUT: if (out_ready) begin
          if (cnt == 16'(N_OUT - 1)) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 16'd1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

endmodule
