// tb_grad_mag_dir: magnitude against max(0.875a + 0.5b, a) and direction
// against the true angle, for random derivatives away from the sector
// boundaries (where 8-bit slope constants may round either way).
module tb_grad_mag_dir;
  import iris_pkg::*;
  int checks = 0, failures = 0, skipped = 0;
  logic signed [11:0] fx, fy;
  logic [11:0] mag;
  grad_dir_e dir;

  grad_mag_dir dut (.fx, .fy, .mag, .dir);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ax, ay, a, b, m, ed;
    real ang;
    for (int t = 0; t < 20000; t++) begin
      fx = 12'($urandom_range(2040, 0)) - 12'sd1020;
      fy = 12'($urandom_range(2040, 0)) - 12'sd1020;
      #1;
      ax = fx < 0 ? -int'(fx) : int'(fx);
      ay = fy < 0 ? -int'(fy) : int'(fy);
      a = ax > ay ? ax : ay; b = ax > ay ? ay : ax;
      m = (7*a + 4*b) / 8; if (m < a) m = a;
      checks++;
      if (int'(mag) != m) begin failures++; if (failures < 10) $display("mag %0d exp %0d", mag, m); end
      if (ax == 0 && ay == 0) continue;
      ang = $atan2(real'(fy), real'(fx)) * 180.0 / 3.141592653589793;
      if (ang < 0) ang += 180.0;
      if (ang >= 180.0) ang -= 180.0;
      if ((ang > 22.3 && ang < 22.7) || (ang > 67.3 && ang < 67.7) ||
          (ang > 112.3 && ang < 112.7) || (ang > 157.3 && ang < 157.7)) begin
        skipped++;
        continue;
      end
      if (ang < 22.5 || ang > 157.5) ed = 0;
      else if (ang < 67.5) ed = 1;
      else if (ang < 112.5) ed = 2;
      else ed = 3;
      checks++;
      if (int'(dir) != ed) begin
        failures++;
        if (failures < 10) $display("dir fx=%0d fy=%0d got %0d exp %0d", fx, fy, dir, ed);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
