// tb_hysteresis: random class windows against the strong / weak-with-strong-
// neighbour rule; counts promoted and rejected weak pixels.
module tb_hysteresis;
  import iris_pkg::*;
  int checks = 0, failures = 0, promoted = 0, rejected = 0;
  edge_cls_e cls [9];
  logic edge_o;

  hysteresis dut (.cls, .edge_o);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, e;
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < 9; i++) begin
        // strong pixels rare so that isolated weak pixels occur
        int r;
        r = $urandom_range(9, 0);
        cls[i] = (r < 5) ? CLS_NONE : (r < 9) ? CLS_WEAK : CLS_STRONG;
      end
      #1;
      nb = 0;
      for (int i = 0; i < 9; i++) if (i != 4 && cls[i] == CLS_STRONG) nb = 1;
      e = (cls[4] == CLS_STRONG) ? 1 : (cls[4] == CLS_WEAK) ? nb : 0;
      if (cls[4] == CLS_WEAK) begin if (nb != 0) promoted++; else rejected++; end
      checks++;
      if (int'(edge_o) != e) begin failures++; if (failures < 10) $display("hyst mismatch"); end
    end
    checks++;
    if (promoted == 0 || rejected == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
