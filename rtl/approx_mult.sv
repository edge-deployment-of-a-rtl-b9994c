// approx_mult: power-of-two ("second power") approximate multiplier.
//
// P = A * B, exact whenever B is a signed power of two (+-2^m), approximate
// otherwise. The multiplier B is recoded into marking signals
// D_n = b_n & !b_(n-1) (b_-1 = 0), which mark the lowest bit of every run of
// ones in B. As in radix-4 Booth recoding the marks are taken in pairs
// (D_2k+1, D_2k), halving the number of partial products:
//   00 -> PP_k = 0
//   01 -> PP_k = A        (or ~A when B is negative)
//   10 -> PP_k = A << 1   (or ~A << 1 when B is negative)
// each weighted by 4^k. When B is negative the one's complement is completed
// by the conditioning bits aju_n = D_n & B_MSB, added at bit n. The result is
// P = sum(aju_n << n) + sum(PP_k << 2k). For B = 2^m a single mark D_m is set
// and P = A << m; for B = -2^m the single mark gives (~A << m) + (1 << m)
// = -A << m. The partial products are summed with an adder (the first of the
// two accumulation schemes, the one the accelerator uses), not a selector.
//
// Interface: a, b signed N-bit; p signed 2N-bit. Purely combinational.
// Operands being two's complement and the sign extension of the partial
// products are this design's reading of the encoding table.
module approx_mult #(
  parameter int N = 16
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);

  localparam int NPP = (N + 1) / 2;

  logic [N-1:0]   d;     // marking signals
  logic [N-1:0]   aju;   // conditioning signals
  logic           bneg;
  logic signed [2*N-1:0] a_ext, a_sel;

  always_comb begin
    bneg = b[N-1];
    for (int n = 0; n < N; n++) begin
      d[n]   = b[n] & ((n == 0) ? 1'b1 : ~b[(n == 0) ? 0 : n-1]);
      aju[n] = d[n] & bneg;
    end
    a_ext = (2*N)'(a);                  // sign extended multiplicand
    a_sel = bneg ? ~a_ext : a_ext;      // A or !A
  end

  always_comb begin
    logic signed [2*N-1:0] acc;
    logic d_lo, d_hi;
    acc = (2*N)'(aju);
    for (int k = 0; k < NPP; k++) begin
      d_lo = d[2*k];
      d_hi = (2*k+1 < N) ? d[(2*k+1 < N) ? 2*k+1 : 0] : 1'b0;
      unique case ({d_hi, d_lo})
        2'b01:   acc = acc + (a_sel <<< (2*k));
        2'b10:   acc = acc + (a_sel <<< (2*k+1));
        default: acc = acc;
      endcase
    end
    p = acc;
  end

endmodule
