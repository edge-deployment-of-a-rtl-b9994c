// tb_softmax: random score vectors of 40 classes (including a tie for the
// maximum and very negative scores that hit the end of the table); every
// probability against a real-valued model with the same 1/16 exponent
// step (+-2 LSB), the winner exactly. Checks the cycle count
// 2N + 34N cycles from the first accepted score to the result.
module tb_softmax;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  localparam int N = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  act_t in_data = 0;
  logic prob_valid, res_valid;
  logic [7:0] prob_idx, res_class;
  logic [15:0] prob, res_prob;
  int xv[];
  real pr[];
  int am, np;
  real e, dlt;

  softmax #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_data,
    .prob_valid, .prob_idx, .prob, .res_valid, .res_class, .res_prob);

  always #5 clk = ~clk;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && prob_valid) begin : chk_p
    checks++;
    np++;
    e = (pr[prob_idx] > 65535.0) ? 65535.0 : pr[prob_idx];
    dlt = real'(prob) - e;
    if (dlt > 2.0 || dlt < -2.0) begin
      failures++;
      if (failures < 10) $display("p[%0d] got %0d exp %f", prob_idx, prob, pr[prob_idx]);
    end
  end

  initial begin
    int t0, t1;
    xv = new[N];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int v = 0; v < 6; v++) begin
      foreach (xv[i]) xv[i] = (v < 3) ? $urandom_range(2000, 0) - 1000 : $urandom_range(16000, 0) - 8000;
      if (v == 1) xv[7] = xv[21] + 0;    // tie candidate
      if (v == 1) begin xv[7] = 3000; xv[21] = 3000; end
      if (v == 4) begin foreach (xv[i]) xv[i] = -200; xv[13] = 400; end   // one dominant class
      ref_softmax(xv, pr, am);
      np = 0;
      for (int i = 0; i < N; i++) begin
        in_valid <= 1;
        in_data  <= act_t'(xv[i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if (i == 0) t0 = $time;
      end
      in_valid <= 0;
      while (!res_valid) @(posedge clk);
      t1 = $time;
      @(negedge clk);
      checks += 3;
      if (int'(res_class) != am) begin failures++; $display("class %0d exp %0d", res_class, am); end
      if (np != N) begin failures++; $display("prob count %0d", np); end
      if ((t1 - t0) / 10 != N + N + 34*N) begin failures++; $display("cycles %0d", (t1 - t0) / 10); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
