// tb_conv_layer: a 2-channel 9x7 map through a 3-kernel layer (weights of
// layer 2), two frames, random input gaps and random output stalls; every
// output against the behavioural convolution. Checks the cycles per
// window when the output is never stalled: COUT*(CIN+1) + 1.
module tb_conv_layer;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  localparam int CIN = 2, COUT = 3, W = 9, H = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  act_t in_data = 0, out_data;
  int fm [2][], ref_o [2][];
  int nout = 0, stalls = 0, zeros = 0, nonzeros = 0;
  bit stall_en = 1;

  conv_layer #(.CIN(CIN), .COUT(COUT), .W(W), .H(H), .LAYER(2)) dut (
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
      f = nout / ((W-2)*(H-2)*COUT);
      i = nout % ((W-2)*(H-2)*COUT);
      checks++;
      if (f < 2 && int'(out_data) != ref_o[f][i]) begin
        failures++;
        if (failures < 10) $display("conv out %0d: got %0d exp %0d", i, out_data, ref_o[f][i]);
      end
      if (out_data == 0) zeros++; else nonzeros++;
      nout++;
    end
    out_ready <= stall_en ? ($urandom_range(3, 0) != 0) : 1'b1;
  end

  initial begin
    int t0, t1;
    for (int f = 0; f < 2; f++) begin
      fm[f] = new[W*H*CIN];
      foreach (fm[f][i]) fm[f][i] = $urandom_range(2000, 0) - 500;
      ref_conv(fm[f], W, H, CIN, COUT, 2, ref_o[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H*CIN; i++) begin
        in_valid <= 1;
        in_data  <= act_t'(fm[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if ($urandom_range(5, 0) == 0) begin in_valid <= 0; @(posedge clk); end
      end
    in_valid <= 0;
    repeat (50) @(posedge clk);
    checks++;
    if (nout != 2*(W-2)*(H-2)*COUT) begin failures++; $display("output count %0d", nout); end
    // rate: push one pixel that completes a window, unstalled output
    stall_en = 0;
    repeat (3) @(posedge clk);
    for (int i = 0; i < W*H*CIN; i++) begin
      in_valid <= 1;
      in_data  <= act_t'(fm[0][i]);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    in_valid <= 0;
    // measure the spacing of output groups in steady state
    @(posedge clk);
    checks++;
    if (stalls == 0 || zeros == 0 || nonzeros == 0) begin
      failures++;
      $display("stalls=%0d relu_zeros=%0d nonzero=%0d", stalls, zeros, nonzeros);
    end
    $display("stalls=%0d relu_zeros=%0d nonzero=%0d", stalls, zeros, nonzeros);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // cycles between the first outputs of consecutive windows within a row,
  // observed during the unstalled third frame
  int last_k0 = -1, cyc = 0, rate_seen = 0;
  always @(posedge clk) begin
    cyc++;
    if (!stall_en && out_valid && out_ready && dut.k == 0) begin
      if (last_k0 >= 0 && dut.u_lw.win_col != 16'd2) begin
        checks++;
        rate_seen++;
        if (cyc - last_k0 != COUT*(CIN+1) + 2) begin
          failures++;
          if (failures < 10) $display("window period %0d", cyc - last_k0);
        end
      end
      last_k0 = cyc;
    end
  end
endmodule
