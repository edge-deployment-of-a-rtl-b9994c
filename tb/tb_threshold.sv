// tb_threshold: mean (EX unit), median (sort unit) and the thresholds
// Te = 0.75 mean, TH = P1 mean, TL = TH/2 for random magnitude windows.
module tb_threshold;
  int checks = 0, failures = 0;
  logic [11:0] g [9];
  logic [11:0] mean, median, te, th, tl;

  adaptive_threshold #(.P1_Q8(205)) dut (.g, .mean, .median, .te, .th, .tl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) begin
      failures++;
      if (failures < 10) $display("%s got %0d expected %0d..%0d", what, got, lo, hi);
    end
  endtask

  initial begin
    int v[9], s, m;
    for (int t = 0; t < 20000; t++) begin
      s = 0;
      for (int i = 0; i < 9; i++) begin
        v[i] = (t % 3 == 0) ? $urandom_range(4095, 0) : $urandom_range(40, 0);
        g[i] = 12'(v[i]);
        s += v[i];
      end
      #1;
      v.sort();
      // the exact mean, allowing the reciprocal multiply to be one low
      chk("mean", int'(mean), s / 9 - 1, s / 9);
      chk("median", int'(median), v[4], v[4]);
      m = int'(mean);
      chk("te", int'(te), (3 * m) / 4, (3 * m) / 4);
      chk("th", int'(th), (m * 205) / 256, (m * 205) / 256);
      chk("tl", int'(tl), ((m * 205) / 256) / 2, ((m * 205) / 256) / 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
