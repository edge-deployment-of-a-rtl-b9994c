// hysteresis: final Canny decision on a 3x3 window of pixel classes.
//
// A strong centre pixel (above TH) is an edge. A weak centre pixel (between
// TL and TH) is an edge only when at least one of its eight neighbours is
// strong. This is a single local pass over the 8-connected neighbourhood;
// chains of weak pixels reaching a strong pixel further away are not
// followed, which is this design's simplification.
//
// Interface: cls[0..8] (index 3*row + col, centre 4); edge. Combinational.
module hysteresis
  import iris_pkg::*;
(
  input  edge_cls_e cls [9],
  output logic      edge_o
);

  logic strong_nb;

  always_comb begin
    strong_nb = 1'b0;
    for (int i = 0; i < 9; i++)
      if (i != 4 && cls[i] == CLS_STRONG) strong_nb = 1'b1;
    edge_o = (cls[4] == CLS_STRONG) || (cls[4] == CLS_WEAK && strong_nb);
  end

endmodule
