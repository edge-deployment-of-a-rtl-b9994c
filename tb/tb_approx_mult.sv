// tb_approx_mult: checks the power-of-two approximate multiplier.
// 8x8: every operand pair against the run-of-ones definition of the
// approximate product, and exactness for every signed power of two.
// 16x16: random pairs against the definition and random power-of-two
// multipliers against exact multiplication.
module tb_approx_mult;
  import iris_ref_pkg::*;

  int checks = 0, failures = 0;

  logic signed [7:0]  a8, b8;
  logic signed [15:0] p8;
  logic signed [15:0] a16, b16;
  logic signed [31:0] p16;

  approx_mult #(.N(8))  u8  (.a(a8),  .b(b8),  .p(p8));
  approx_mult #(.N(16)) u16 (.a(a16), .b(b16), .p(p16));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_p;
    int e;
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        #1;
        exp_p = ref_approx(a, b, 8);
        checks++;
        if (p8 !== 16'(exp_p)) begin
          failures++;
          if (failures < 10) $display("8x8 a=%0d b=%0d got %0d exp %0d", a, b, p8, 16'(exp_p));
        end
      end
    // powers of two are exact
    for (int a = -128; a < 128; a++)
      for (int m = 0; m < 8; m++) begin
        for (int s = 0; s < 2; s++) begin
          a8 = 8'(a);
          b8 = s ? -(8'sd1 <<< m) : (8'sd1 <<< m);
          if (s == 0 && m == 7) continue;
          #1;
          checks++;
          if (p8 !== 16'(a * int'(b8))) begin
            failures++;
            if (failures < 10) $display("pow2 8x8 a=%0d b=%0d got %0d", a, b8, p8);
          end
        end
      end
    for (int i = 0; i < 20000; i++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      checks++;
      if (p16 !== 32'(ref_approx(a16, b16, 16))) begin
        failures++;
        if (failures < 10) $display("16x16 a=%0d b=%0d got %0d", a16, b16, p16);
      end
      e = $urandom_range(14, 0);
      a16 = 16'($urandom);
      b16 = ($urandom & 1) ? -(16'sd1 <<< e) : (16'sd1 <<< e);
      #1;
      checks++;
      if (p16 !== 32'(int'(a16) * int'(b16))) begin
        failures++;
        if (failures < 10) $display("pow2 16x16 a=%0d b=%0d got %0d", a16, b16, p16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
