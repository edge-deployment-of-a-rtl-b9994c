// tb_line_window: streams two 9x6 frames with random gaps and checks every
// flagged window, its position, and the number of windows per frame.
module tb_line_window;
  localparam int W = 9, H = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0;
  logic [15:0] in_data = 0;
  logic [15:0] win [3][3];
  logic win_valid;
  logic [15:0] win_col, win_row;
  int img [2][W*H];
  int nwin = 0, frame = 0;

  line_window #(.DW(16), .W(W), .H(H)) dut (.clk, .rst_n, .in_valid, .in_data,
    .win, .win_valid, .win_col, .win_row);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && win_valid) begin
    int f;
    f = nwin / ((W-2)*(H-2));
    nwin++;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (win[r][c] !== 16'(img[f][(int'(win_row) - 2 + r)*W + int'(win_col) - 2 + c])) begin
          failures++;
          if (failures < 10) $display("win mismatch at %0d,%0d", win_row, win_col);
        end
      end
  end

  initial begin
    for (int f = 0; f < 2; f++) foreach (img[f][i]) img[f][i] = $urandom & 16'hFFFF;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < W*H; i++) begin
        while ($urandom_range(3, 0) == 0) begin
          in_valid <= 0;
          @(posedge clk);
        end
        in_valid <= 1;
        in_data  <= 16'(img[f][i]);
        @(posedge clk);
      end
    in_valid <= 0;
    repeat (5) @(posedge clk);
    checks++;
    if (nwin != 2*(W-2)*(H-2)) begin
      failures++;
      $display("window count %0d", nwin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
