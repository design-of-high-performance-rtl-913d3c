// ccu4: 4-input common computation unit, F(W,X,Y,Z,alpha) = (W+X+Y+Z+2) >> alpha.
//
// Three adders build W+X+Y+Z as a balanced tree, a fourth adds the rounding
// constant 2 and a right shifter divides by 2**alpha, as in the document's
// structure of this unit. The unit serves every filter of the intra
// prediction modes: a 3-tap filter is fed (p, q, q, r) with alpha = 2, a 2-tap
// average (p, p, q, q) with alpha = 2, partial sums of the DC modes use
// alpha = 0, and the plane mode feeds its coefficient terms with alpha = 5.
// Operands are signed (the plane mode and the DC offset constants need
// negative values); this is a choice of this design, as is the operand width.
// The sum is computed two bits wider than the operands, so it never
// overflows, and the shift is arithmetic. Purely combinational.
module ccu4 #(
  parameter int IN_W = 16
) (
  input  logic signed [IN_W-1:0] w,
  input  logic signed [IN_W-1:0] x,
  input  logic signed [IN_W-1:0] y,
  input  logic signed [IN_W-1:0] z,
  input  logic        [2:0]      alpha,
  output logic signed [IN_W+1:0] f
);
  typedef logic signed [IN_W+1:0] sum_t;
  sum_t s_wx, s_yz, s_all, s_rnd;

  always_comb begin
    s_wx  = sum_t'(w) + sum_t'(x);
    s_yz  = sum_t'(y) + sum_t'(z);
    s_all = s_wx + s_yz;
    s_rnd = s_all + sum_t'(2);
    f     = s_rnd >>> alpha;
  end
endmodule
