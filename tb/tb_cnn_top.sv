// tb_cnn_top: two 200x40 iris images through the whole network, the second
// streamed while the first is still in the dense layers. All 40 class
// probabilities (+-2 LSB of Q0.16) and the winning class are compared with
// the behavioural network. Counts back-pressure on the input, ReLU
// clipping in both convolution layers, pooled outputs, the partly used last
// neuron group of the 40-way layer, and overlap of the two images.
module tb_cnn_top;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic pix_valid = 0, pix_ready;
  logic [7:0] pix = 0;
  logic prob_valid, res_valid;
  logic [7:0] prob_idx, res_class;
  logic [15:0] prob, res_prob;
  int img [2][];
  real pr [2][];
  int am [2];
  int logits[];
  int nres = 0, nprob = 0;
  longint cyc = 0, t_start, t_first_res;
  int n_backpressure = 0, n_relu1 = 0, n_relu2 = 0, n_pool1 = 0, n_pool2 = 0, n_overlap = 0;
  real e, dlt;

  cnn_top dut (.clk, .rst_n, .pix_valid, .pix_ready, .pix,
               .prob_valid, .prob_idx, .prob, .res_valid, .res_class, .res_prob);

  always #5 clk = ~clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (pix_valid && !pix_ready) n_backpressure++;
    if (dut.u_conv1.out_valid && dut.u_conv1.out_ready && dut.u_conv1.out_data == 0) n_relu1++;
    if (dut.u_conv2.out_valid && dut.u_conv2.out_ready && dut.u_conv2.out_data == 0) n_relu2++;
    if (dut.u_pool1.out_valid && dut.u_pool1.out_ready) n_pool1++;
    if (dut.u_pool2.out_valid && dut.u_pool2.out_ready) n_pool2++;
    if (pix_valid && pix_ready && int'(dut.u_fc1.state) != 0) n_overlap++;
    if (rst_n && prob_valid) begin
      int f;
      f = nprob / 40;
      nprob++;
      e = (pr[f][prob_idx] > 65535.0) ? 65535.0 : pr[f][prob_idx];
      dlt = real'(prob) - e;
      checks++;
      if (dlt > 2.0 || dlt < -2.0) begin
        failures++;
        if (failures < 10) $display("img %0d p[%0d] got %0d exp %f", f, prob_idx, prob, e);
      end
    end
    if (rst_n && res_valid) begin
      checks++;
      if (nres == 0) t_first_res = cyc;
      if (int'(res_class) != am[nres]) begin
        failures++;
        $display("img %0d class %0d exp %0d", nres, res_class, am[nres]);
      end
      $display("image %0d: class %0d probability %0d/65536", nres, res_class, res_prob);
      nres++;
    end
  end

  initial begin
    int d;
    for (int f = 0; f < 2; f++) begin
      img[f] = new[200*40];
      for (int y = 0; y < 40; y++)
        for (int x = 0; x < 200; x++) begin
          // radial texture: stripes whose phase differs per image, plus noise
          d = (x * (3 + f) + y * (5 - f) + ((x / 17) * (y / 7)) * 11) % 64;
          img[f][y*200 + x] = 60 + 2 * d + $urandom_range(40, 0);
        end
      ref_cnn(img[f], logits);
      ref_softmax(logits, pr[f], am[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t_start = cyc;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 200*40; i++) begin
        pix_valid <= 1;
        pix <= 8'(img[f][i]);
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
        if ($urandom_range(15, 0) == 0) begin pix_valid <= 0; @(posedge clk); end
      end
    pix_valid <= 0;
    while (nres < 2) @(posedge clk);
    repeat (5) @(posedge clk);
    $display("first result after %0d cycles", t_first_res - t_start);
    $display("backpressure=%0d relu1=%0d relu2=%0d pool1=%0d pool2=%0d overlap=%0d",
             n_backpressure, n_relu1, n_relu2, n_pool1, n_pool2, n_overlap);
    checks += 3;
    if (nprob != 80) begin failures++; $display("prob count %0d", nprob); end
    if (n_pool1 != 2*66*12*6 || n_pool2 != 2*384) begin failures++; $display("pool counts"); end
    if (n_backpressure == 0 || n_relu1 == 0 || n_relu2 == 0 || n_overlap == 0) begin
      failures++;
      $display("a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
