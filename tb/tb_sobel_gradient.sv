// tb_sobel_gradient: random 8-bit windows against the Sobel formulas.
module tb_sobel_gradient;
  int checks = 0, failures = 0;
  logic [7:0] win [3][3];
  logic signed [11:0] fx, fy;

  sobel_gradient dut (.win, .fx, .fy);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey;
    for (int t = 0; t < 5000; t++) begin
      for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++)
        win[r][c] = (t < 4) ? ((t[0] ^ (c == 2)) ? 8'd255 : 8'd0) : 8'($urandom);
      #1;
      ex = int'(win[0][2]) + 2*int'(win[1][2]) + int'(win[2][2])
         - int'(win[0][0]) - 2*int'(win[1][0]) - int'(win[2][0]);
      ey = int'(win[2][0]) + 2*int'(win[2][1]) + int'(win[2][2])
         - int'(win[0][0]) - 2*int'(win[0][1]) - int'(win[0][2]);
      checks += 2;
      if (int'(fx) != ex) begin failures++; if (failures < 10) $display("fx %0d exp %0d", fx, ex); end
      if (int'(fy) != ey) begin failures++; if (failures < 10) $display("fy %0d exp %0d", fy, ey); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
