// mean9: mean of nine 12-bit magnitudes (the "EX" unit of the adaptive
// threshold). The sum is multiplied by 7282 = round(2^16 / 9) and shifted
// right by 16; the constant-multiplier division is this design's choice.
// The result may be one below the exact floor(sum/9).
//
// Interface: g[0..8] unsigned; mean unsigned 12-bit. Combinational.
module mean9 (
  input  logic [11:0] g [9],
  output logic [11:0] mean
);

  logic [15:0] sum;
  logic [31:0] scaled;

  always_comb begin
    sum = '0;
    for (int i = 0; i < 9; i++) sum = sum + 16'(g[i]);
    scaled = 32'(sum) * 32'd7282;
    mean   = 12'(scaled >> 16);
  end

endmodule
