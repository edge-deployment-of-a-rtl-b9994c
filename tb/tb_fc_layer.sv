// tb_fc_layer: a 12-input, 7-output layer (layer-4 weights, ReLU; the last
// group of three neurons is only one third used), three vectors with random
// gaps and stalls; outputs against the behavioural layer. Checks the
// compute time of ceil(N_OUT/3) * (N_IN/3 + 1) cycles per vector.
module tb_fc_layer;
  import iris_pkg::*;
  import iris_ref_pkg::*;
  localparam int NI = 12, NO = 7;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  act_t in_data = 0, out_data;
  int xv [3][], ref_o [3][];
  int nout = 0, calc_cycles = 0;

  fc_layer #(.N_IN(NI), .N_OUT(NO), .RELU(1), .LAYER(4)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_ready, .out_data);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && (int'(dut.state) == 1 || int'(dut.state) == 2)) calc_cycles++;
    if (rst_n && out_valid && out_ready) begin
      int f, i;
      f = nout / NO; i = nout % NO;
      checks++;
      if (int'(out_data) != ref_o[f][i]) begin
        failures++;
        if (failures < 10) $display("fc out %0d: got %0d exp %0d", i, out_data, ref_o[f][i]);
      end
      nout++;
    end
    out_ready <= ($urandom_range(2, 0) != 0);
  end

  initial begin
    for (int f = 0; f < 3; f++) begin
      xv[f] = new[NI];
      foreach (xv[f][i]) xv[f][i] = $urandom_range(4000, 0) - 1000;
      ref_fc(xv[f], NI, NO, 4, 1, ref_o[f]);
    end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++)
      for (int i = 0; i < NI; i++) begin
        in_valid <= 1;
        in_data  <= act_t'(xv[f][i]);
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        if ($urandom_range(3, 0) == 0) begin in_valid <= 0; @(posedge clk); end
      end
    in_valid <= 0;
    repeat (100) @(posedge clk);
    checks += 2;
    if (nout != 3*NO) begin failures++; $display("output count %0d", nout); end
    if (calc_cycles != 3 * ((NO+2)/3) * (NI/3 + 1)) begin
      failures++;
      $display("compute cycles %0d", calc_cycles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
