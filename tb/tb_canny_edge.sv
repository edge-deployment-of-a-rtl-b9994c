// tb_canny_edge: a synthetic eye (dark pupil disc inside a mid-grey iris
// disc on a light background, with noise), 40x32, streamed twice with
// random gaps; the edge map is compared bit by bit with a behavioural
// Canny model. Counts strong, weak-promoted and weak-rejected pixels and
// NMS suppressions, and requires each to occur.
module tb_canny_edge;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  localparam int W = 40, H = 32;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0;
  logic [7:0] pix = 0;
  logic edge_valid, edge_o;
  int img[], ref_e[];
  int nout = 0, nedge = 0;
  int n_strong = 0, n_promo = 0, n_rej = 0, n_supp = 0;

  canny_edge #(.IMG_W(W), .IMG_H(H)) dut (.clk, .rst_n, .pix_valid, .pix, .edge_valid, .edge_o);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.w1_valid && dut.g[4] != 0 && dut.g_nms == 0) n_supp++;
    if (dut.w2_valid && dut.c9[4] == CLS_STRONG) n_strong++;
    if (dut.w2_valid && dut.c9[4] == CLS_WEAK && dut.e_bit) n_promo++;
    if (dut.w2_valid && dut.c9[4] == CLS_WEAK && !dut.e_bit) n_rej++;
    if (edge_valid) begin
      int i;
      i = nout % ((W-6)*(H-6));
      checks++;
      if (int'(edge_o) != ref_e[i]) begin
        failures++;
        if (failures < 10) $display("edge %0d: got %0d exp %0d", i, edge_o, ref_e[i]);
      end
      nedge += edge_o;
      nout++;
    end
  end

  initial begin
    int d1, d2, v;
    img = new[W*H];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        d1 = (x-19)*(x-19) + (y-15)*(y-15);
        v = (d1 < 25) ? 30 : (d1 < 144) ? 120 : 200;
        v += $urandom_range(12, 0);
        img[y*W+x] = v;
      end
    ref_canny(img, W, H, 205, ref_e);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        if ($urandom_range(7, 0) == 0) begin pix_valid <= 0; @(posedge clk); end
        pix_valid <= 1;
        pix <= 8'(img[i]);
        @(posedge clk);
      end
    pix_valid <= 0;
    repeat (10) @(posedge clk);
    checks++;
    if (nout != 2*(W-6)*(H-6)) begin failures++; $display("output count %0d", nout); end
    $display("edges=%0d strong=%0d weak_promoted=%0d weak_rejected=%0d nms_suppressed=%0d",
             nedge, n_strong, n_promo, n_rej, n_supp);
    checks++;
    if (n_strong == 0 || n_promo == 0 || n_rej == 0 || n_supp == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
