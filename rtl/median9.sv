// median9: median of nine 12-bit magnitudes (the "sort" unit of the
// adaptive threshold). An odd-even transposition sorting network of nine
// stages orders the values; the middle one is the median. The choice of
// sorting network is this design's.
//
// Interface: g[0..8] unsigned; median unsigned 12-bit. Combinational.
module median9 (
  input  logic [11:0] g [9],
  output logic [11:0] median
);

  logic [11:0] v [9];
  logic [11:0] t;

  always_comb begin
    v = g;
    t = '0;
    for (int s = 0; s < 9; s++) begin
      for (int i = 0; i < 8; i++) begin
        if ((i % 2) == (s % 2) && v[i] > v[i+1]) begin
          t      = v[i];
          v[i]   = v[i+1];
          v[i+1] = t;
        end
      end
    end
    median = v[4];
  end

endmodule
