// tb_iris_top: one complete recognition with every parameter at its
// default. A synthetic 320x280 eye image (dark pupil, textured iris,
// light sclera, noise) is streamed through the edge detector while, in
// parallel, the normaliser unwraps the iris ring from a frame-store model
// holding the same image and the CNN classifies it.
// Checks: the whole edge map against the behavioural Canny model; every
// frame-store read within one pixel of the real-valued rubber-sheet
// position; the 40 probabilities and the class against the behavioural
// network fed with the pixels that were read. Counts strong edges,
// promoted and rejected weak pixels, NMS suppressions, CNN back-pressure
// on the normaliser, and ReLU clipping, and fails if any never happened.
module tb_iris_top;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  localparam int IW = 320, IH = 280;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cam_valid = 0;
  logic [7:0] cam_pix = 0;
  logic edge_valid, edge_o;
  logic norm_start = 0, norm_busy, img_rd;
  logic [15:0] pupil_x, pupil_y, pupil_r, iris_x, iris_y, iris_r, img_x, img_y;
  logic [7:0] img_data;
  logic prob_valid, res_valid;
  logic [7:0] prob_idx, res_class;
  logic [15:0] prob, res_prob;

  logic [7:0] fs [IW*IH];
  int img[], ref_e[], norm_img[], logits[];
  real pr[];
  int am;
  int nedge_out = 0, nedges = 0, nreq = 0, nprob = 0, nres = 0;
  int n_strong = 0, n_promo = 0, n_rej = 0, n_supp = 0, n_bp = 0, n_relu = 0;
  longint cyc = 0, t_norm;
  real e, dlt;

  iris_top dut (.clk, .rst_n, .cam_valid, .cam_pix, .edge_valid, .edge_o,
    .norm_start, .pupil_x, .pupil_y, .pupil_r, .iris_x, .iris_y, .iris_r,
    .norm_busy, .img_rd, .img_x, .img_y, .img_data,
    .prob_valid, .prob_idx, .prob, .res_valid, .res_class, .res_prob);

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // frame store: one cycle read latency
  always @(posedge clk) if (img_rd) img_data <= fs[int'(img_y)*IW + int'(img_x)];

  always @(posedge clk) begin
    cyc++;
    if (dut.u_canny.w1_valid && dut.u_canny.g[4] != 0 && dut.u_canny.g_nms == 0) n_supp++;
    if (dut.u_canny.w2_valid && dut.u_canny.c9[4] == CLS_STRONG) n_strong++;
    if (dut.u_canny.w2_valid && dut.u_canny.c9[4] == CLS_WEAK && dut.u_canny.e_bit) n_promo++;
    if (dut.u_canny.w2_valid && dut.u_canny.c9[4] == CLS_WEAK && !dut.u_canny.e_bit) n_rej++;
    if (dut.n_valid && !dut.n_ready) n_bp++;
    if (dut.u_cnn.u_conv1.out_valid && dut.u_cnn.u_conv1.out_ready && dut.u_cnn.u_conv1.out_data == 0) n_relu++;
    if (rst_n && edge_valid) begin
      checks++;
      if (int'(edge_o) != ref_e[nedge_out]) begin
        failures++;
        if (failures < 10) $display("edge %0d: got %0d", nedge_out, edge_o);
      end
      nedges += edge_o;
      nedge_out++;
    end
    if (rst_n && img_rd) begin
      real th, rho, xr, yr;
      int t, j, xi, yi, xe, ye, pv;
      t = nreq % 200; j = nreq / 200;
      xi = int'(img_x); yi = int'(img_y);
      th  = 2.0 * 3.141592653589793 * t / 200;
      rho = real'(j) / 40;
      xr = (1.0 - rho) * (pupil_x + pupil_r * $cos(th)) + rho * (iris_x + iris_r * $cos(th));
      yr = (1.0 - rho) * (pupil_y + pupil_r * $sin(th)) + rho * (iris_y + iris_r * $sin(th));
      xe = int'($floor(xr + 0.5)); ye = int'($floor(yr + 0.5));
      checks++;
      if (xi < xe - 1 || xi > xe + 1 || yi < ye - 1 || yi > ye + 1) begin
        failures++;
        if (failures < 10) $display("read %0d at (%0d,%0d), expected (%f,%f)", nreq, img_x, img_y, xr, yr);
      end
      pv = int'(fs[yi*IW + xi]);
      norm_img[nreq] = pv;
      nreq++;
    end
    if (rst_n && prob_valid) begin
      nprob++;
      e = (pr[prob_idx] > 65535.0) ? 65535.0 : pr[prob_idx];
      dlt = real'(prob) - e;
      checks++;
      if (dlt > 2.0 || dlt < -2.0) begin
        failures++;
        if (failures < 10) $display("p[%0d] got %0d exp %f", prob_idx, prob, e);
      end
    end
    if (rst_n && res_valid) begin
      checks++;
      nres++;
      if (int'(res_class) != am) begin failures++; $display("class %0d exp %0d", res_class, am); end
      $display("identity %0d, probability %0d/65536, %0d cycles after start",
               res_class, res_prob, cyc - t_norm);
    end
  end

  initial begin
    int d2, v;
    real a;
    img = new[IW*IH];
    norm_img = new[200*40];
    for (int y = 0; y < IH; y++)
      for (int x = 0; x < IW; x++) begin
        d2 = (x-160)*(x-160) + (y-140)*(y-140);
        a  = $atan2(real'(y-140), real'(x-160));
        if (d2 < 30*30)      v = 25;
        else if (d2 < 90*90) v = 90 + int'(30.0 * $sin(a * 24.0)) + (d2 / 400);
        else                 v = 200;
        v += $urandom_range(10, 0);
        img[y*IW + x] = v;
        fs[y*IW + x]  = 8'(v);
      end
    ref_canny(img, IW, IH, 205, ref_e);
    {pupil_x, pupil_y, pupil_r} = {16'd160, 16'd140, 16'd30};
    {iris_x, iris_y, iris_r}    = {16'd161, 16'd141, 16'd88};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    fork
      begin
        for (int i = 0; i < IW*IH; i++) begin
          cam_valid <= 1;
          cam_pix   <= 8'(img[i]);
          @(posedge clk);
        end
        cam_valid <= 0;
      end
      begin
        norm_start <= 1;
        t_norm = cyc;
        @(posedge clk);
        norm_start <= 0;
        while (nres == 0) @(posedge clk);
      end
      begin
        // reference network, once the normalised image is complete
        while (nreq < 200*40) @(posedge clk);
        ref_cnn(norm_img, logits);
        ref_softmax(logits, pr, am);
      end
    join
    repeat (10) @(posedge clk);
    $display("edges=%0d strong=%0d weak_promoted=%0d weak_rejected=%0d nms_suppressed=%0d",
             nedges, n_strong, n_promo, n_rej, n_supp);
    $display("cnn_backpressure=%0d relu=%0d", n_bp, n_relu);
    checks += 3;
    if (nedge_out != (IW-6)*(IH-6)) begin failures++; $display("edge count %0d", nedge_out); end
    if (nprob != 40 || nreq != 8000) begin failures++; $display("prob %0d reads %0d", nprob, nreq); end
    if (n_strong == 0 || n_promo == 0 || n_rej == 0 || n_supp == 0 || n_bp == 0 || n_relu == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
