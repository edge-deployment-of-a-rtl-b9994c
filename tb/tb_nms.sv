// tb_nms: random magnitude windows and directions against the definition
// of non-maximum suppression; also forces ties and clear maxima.
module tb_nms;
  import iris_pkg::*;
  int checks = 0, failures = 0, kept = 0, dropped = 0;
  logic [11:0] mag [9];
  grad_dir_e dir;
  logic [11:0] g_nms;

  nms dut (.mag, .dir, .g_nms);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa [4][2] = '{'{3, 5}, '{0, 8}, '{1, 7}, '{2, 6}};
    int e;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < 9; i++) mag[i] = 12'($urandom_range(15, 0));
      dir = grad_dir_e'($urandom_range(3, 0));
      #1;
      e = (mag[4] >= mag[pa[dir][0]] && mag[4] >= mag[pa[dir][1]]) ? int'(mag[4]) : 0;
      if (e != 0) kept++; else dropped++;
      checks++;
      if (int'(g_nms) != e) begin failures++; if (failures < 10) $display("nms got %0d exp %0d", g_nms, e); end
    end
    checks++;
    if (kept == 0 || dropped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
