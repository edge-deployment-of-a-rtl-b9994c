// tb_max_pool: two 2-channel 11x8 maps through 3x3/stride-3 pooling (the
// leftover 2 columns and 2 rows must be dropped) with random gaps and
// output stalls; every result against the behavioural pooling.
module tb_max_pool;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  localparam int C = 2, W = 11, H = 8, K = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  act_t in_data = 0, out_data;
  int fm [2][], ref_o [2][];
  int nout = 0, stalls = 0;

  max_pool #(.C(C), .W(W), .H(H), .K(K)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      int f, i;
      f = nout / ((W/K)*(H/K)*C);
      i = nout % ((W/K)*(H/K)*C);
      checks++;
      if (int'(out_data) != ref_o[f][i]) begin
        failures++;
        if (failures < 10) $display("pool out %0d: got %0d exp %0d", i, out_data, ref_o[f][i]);
      end
      nout++;
    end
    out_ready <= ($urandom_range(2, 0) != 0);
  end

  initial begin
    for (int f = 0; f < 2; f++) begin
      fm[f] = new[W*H*C];
      foreach (fm[f][i]) fm[f][i] = $urandom_range(60000, 0) - 30000;
      ref_pool(fm[f], W, H, C, K, ref_o[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H*C; i++) begin
        in_valid <= 1;
        in_data  <= act_t'(fm[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if ($urandom_range(4, 0) == 0) begin in_valid <= 0; @(posedge clk); end
      end
    in_valid <= 0;
    repeat (20) @(posedge clk);
    checks++;
    if (nout != 2*(W/K)*(H/K)*C || stalls == 0) begin
      failures++;
      $display("output count %0d stalls %0d", nout, stalls);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
