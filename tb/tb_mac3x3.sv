// tb_mac3x3: random windows times random power-of-two weights against the
// exact dot product.
module tb_mac3x3;
  int checks = 0, failures = 0;
  logic signed [15:0] win [9];
  logic signed [15:0] wt  [9];
  logic signed [39:0] sum;

  mac3x3 #(.DW(16), .SUM_W(40)) dut (.win, .wt, .sum);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint ref_s;
    int e;
    for (int t = 0; t < 5000; t++) begin
      ref_s = 0;
      for (int i = 0; i < 9; i++) begin
        win[i] = 16'($urandom);
        e = $urandom_range(14, 0);
        case ($urandom_range(2, 0))
          0: wt[i] = 16'sd0;
          1: wt[i] = 16'sd1 <<< e;
          default: wt[i] = -(16'sd1 <<< e);
        endcase
        ref_s += longint'(win[i]) * longint'(wt[i]);
      end
      #1;
      checks++;
      if (sum !== 40'(ref_s)) begin
        failures++;
        if (failures < 10) $display("got %0d exp %0d", sum, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
