// tb_iris_normalize: unwraps two rings (one concentric, one with offset
// centres reaching over the image edge) of a 64x48 image into 50x10. Every
// requested pixel position must lie within one pixel of the real-valued
// rubber-sheet position (clamped to the image), every output must be the
// image pixel at the requested position, and the output count and the
// 4-cycle-per-pixel rate (unstalled) are checked.
module tb_iris_normalize;
  localparam int OW = 50, OH = 10, IW = 64, IH = 48;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, img_rd, out_valid, out_ready = 1;
  logic [15:0] pupil_x, pupil_y, pupil_r, iris_x, iris_y, iris_r, img_x, img_y;
  logic [7:0] img_data, out_data;
  logic [7:0] mem [IH][IW];
  int nout, nreq, exact, stalls = 0, clamped = 0;
  int qx [$], qy [$];
  bit stall_en;

  iris_normalize #(.OUT_W(OW), .OUT_H(OH), .IMG_W(IW), .IMG_H(IH)) dut (
    .clk, .rst_n, .start, .pupil_x, .pupil_y, .pupil_r, .iris_x, .iris_y, .iris_r,
    .busy, .img_rd, .img_x, .img_y, .img_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  always @(posedge clk) if (img_rd) img_data <= mem[img_y][img_x];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // position check at each request
  always @(posedge clk) if (rst_n && img_rd) begin
    real th, rho, xr, yr;
    int t, j, xe, ye;
    t = nreq % OW; j = nreq / OW;
    th  = 2.0 * 3.141592653589793 * t / OW;
    rho = real'(j) / OH;
    xr = (1.0 - rho) * (pupil_x + pupil_r * $cos(th)) + rho * (iris_x + iris_r * $cos(th));
    yr = (1.0 - rho) * (pupil_y + pupil_r * $sin(th)) + rho * (iris_y + iris_r * $sin(th));
    if (xr < 0 || yr < 0 || xr > IW - 1 || yr > IH - 1) clamped++;
    if (xr < 0) xr = 0; if (xr > IW - 1) xr = IW - 1;
    if (yr < 0) yr = 0; if (yr > IH - 1) yr = IH - 1;
    xe = int'($floor(xr + 0.5)); ye = int'($floor(yr + 0.5));
    checks++;
    if (int'(img_x) < xe - 1 || int'(img_x) > xe + 1 || int'(img_y) < ye - 1 || int'(img_y) > ye + 1) begin
      failures++;
      if (failures < 10) $display("req %0d: (%0d,%0d) expected near (%f,%f)", nreq, img_x, img_y, xr, yr);
    end
    if (int'(img_x) == xe && int'(img_y) == ye) exact++;
    qx.push_back(int'(img_x)); qy.push_back(int'(img_y));
    nreq++;
  end

  always @(posedge clk) begin
    if (out_valid && !out_ready) stalls++;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out_data !== mem[qy[0]][qx[0]]) begin
        failures++;
        if (failures < 10) $display("out %0d: %0d", nout, out_data);
      end
      void'(qx.pop_front()); void'(qy.pop_front());
      nout++;
    end
    out_ready <= stall_en ? ($urandom_range(2, 0) != 0) : 1'b1;
  end

  task automatic run(int px, int py, int pr, int ix, int iy, int ir, bit st);
    int t0;
    stall_en = st;
    nout = 0; nreq = 0; exact = 0;
    {pupil_x, pupil_y, pupil_r} = {16'(px), 16'(py), 16'(pr)};
    {iris_x, iris_y, iris_r}    = {16'(ix), 16'(iy), 16'(ir)};
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    t0 = $time;
    @(posedge clk);
    while (busy) @(posedge clk);
    checks++;
    if (nout != OW*OH) begin failures++; $display("count %0d", nout); end
    if (!st) begin
      checks++;
      if (($time - t0) / 10 != 4*OW*OH + 1) begin failures++; $display("cycles %0d", ($time - t0) / 10); end
    end
    $display("ring: %0d of %0d positions exactly rounded", exact, OW*OH);
  endtask

  initial begin
    for (int y = 0; y < IH; y++) for (int x = 0; x < IW; x++) mem[y][x] = 8'($urandom);
    repeat (3) @(posedge clk);
    rst_n <= 1;
    run(32, 24, 6, 32, 24, 20, 0);
    run(30, 22, 5, 34, 25, 28, 1);
    checks++;
    if (stalls == 0 || clamped == 0) begin failures++; $display("stalls %0d clamped %0d", stalls, clamped); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
