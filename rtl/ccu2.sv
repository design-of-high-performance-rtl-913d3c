// ccu2: 2-input common computation unit, F(a,b,beta) = (a+b+1) >> beta.
//
// One adder sums the operands, a second adds the rounding constant 1 and a
// right shifter divides by 2**beta, as in the document's structure of this
// unit. It computes the 2-tap averages of the luma 4x4 modes (beta = 1) and
// one plane-mode pixel per cycle (beta = 5). Operands are signed and the sum
// is one bit wider than them (this design's choice). Purely combinational.
module ccu2 #(
  parameter int IN_W = 16
) (
  input  logic signed [IN_W-1:0] a,
  input  logic signed [IN_W-1:0] b,
  input  logic        [2:0]      beta,
  output logic signed [IN_W+1:0] f
);
  typedef logic signed [IN_W+1:0] sum_t;
  sum_t s_ab, s_rnd;

  always_comb begin
    s_ab  = sum_t'(a) + sum_t'(b);
    s_rnd = s_ab + sum_t'(1);
    f     = s_rnd >>> beta;
  end
endmodule
