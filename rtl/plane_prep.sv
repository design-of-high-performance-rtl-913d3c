// plane_prep: parameters of the plane prediction mode.
//
// From the neighbouring samples of a luma 16x16 block (chroma = 0) or of a
// chroma 8x8 block (chroma = 1) it forms the gradients H and V and the three
// terms of the plane equation
//   pred[x,y] = Clip1((t1 + t2*(x-c) + t3*(y-c) + 16) >> 5),  c = 7 (luma), 3 (chroma)
//   luma:   t1 = 16*(p[-1,15] + p[15,-1]), t2 = (5*H + 32) >> 6, t3 = (5*V + 32) >> 6
//           H = sum_{i=0..7} (i+1)*(p[8+i,-1] - p[6-i,-1]), V likewise on the left column
//   chroma: t1 = 16*(p[-1,7] + p[7,-1]),  t2 = (34*H + 32) >> 6, t3 = (34*V + 32) >> 6
//           H = sum_{i=0..3} (i+1)*(p[4+i,-1] - p[2-i,-1])
// where p[-1,-1] is the corner sample. The luma formulas are the document's;
// the chroma ones are those of H.264. The weights (i+1) and the factors 5 and
// 34 are constants, so the products reduce to shifts and adds.
// All three results fit the 14-bit common registers (|t1| <= 8160,
// |t2|,|t3| <= 1355). Purely combinational.
module plane_prep
  import intra_pkg::*;
(
  input  nbr_t  nbr,
  input  logic  chroma,
  output creg_t t1,
  output creg_t t2,
  output creg_t t3
);
  typedef logic signed [20:0] acc_t;
  acc_t h, v, hs, vs;

  // p[i,-1] and p[-1,i] for i = -1..15
  function automatic acc_t topv(input nbr_t n, input int i);
    return (i < 0) ? acc_t'({1'b0, n.corner}) : acc_t'({1'b0, n.top[i]});
  endfunction
  function automatic acc_t leftv(input nbr_t n, input int i);
    return (i < 0) ? acc_t'({1'b0, n.corner}) : acc_t'({1'b0, n.left[i]});
  endfunction

  always_comb begin
    h = '0;
    v = '0;
    if (!chroma) begin
      for (int i = 0; i < 8; i++) begin
        h += acc_t'(i + 1) * (topv(nbr, 8 + i) - topv(nbr, 6 - i));
        v += acc_t'(i + 1) * (leftv(nbr, 8 + i) - leftv(nbr, 6 - i));
      end
      hs = (acc_t'(5) * h + acc_t'(32)) >>> 6;
      vs = (acc_t'(5) * v + acc_t'(32)) >>> 6;
      t1 = creg_t'(acc_t'(16) * (leftv(nbr, 15) + topv(nbr, 15)));
    end else begin
      for (int i = 0; i < 4; i++) begin
        h += acc_t'(i + 1) * (topv(nbr, 4 + i) - topv(nbr, 2 - i));
        v += acc_t'(i + 1) * (leftv(nbr, 4 + i) - leftv(nbr, 2 - i));
      end
      hs = (acc_t'(34) * h + acc_t'(32)) >>> 6;
      vs = (acc_t'(34) * v + acc_t'(32)) >>> 6;
      t1 = creg_t'(acc_t'(16) * (leftv(nbr, 7) + topv(nbr, 7)));
    end
    t2 = creg_t'(hs);
    t3 = creg_t'(vs);
  end
endmodule
