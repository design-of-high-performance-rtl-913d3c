// psp: predict samples processor.
//
// Computes the prediction of one block (a luma 4x4 block, the luma 16x16
// block or one chroma 8x8 block) and hands it out eight pixels per cycle.
// All filtering is done by eight common computation units, five 4-input
// units (ccu4) and three 2-input units (ccu2), whose results can be kept in
// seven 14-bit common registers for reuse; the plane mode adds plane_prep
// (gradients and the constant products) and one multiplier t2*(x-c).
// This structure is the document's; the cycle schedule below is this
// design's own.
//
// Job schedule (P preparation cycles, then G output cycles):
//   luma 4x4  V, H          P=0 G=2   copies of neighbours
//   luma 4x4  modes 3..8    P=0 G=2   units per l4_plan_pkg, reuse in cycle 1
//   luma 4x4  DC            P=1 G=2   partial sums -> registers, DC -> register
//   luma 16x16 V, H         P=0 G=32
//   luma 16x16 DC           P=4 G=32  8 partial sums of 4, two of 16, final
//   luma 16x16 plane        P=2 G=32  t1,t2,t3 then 3,5,6,7 x t3 into registers
//   chroma V, H             P=0 G=8
//   chroma DC               P=2 G=8   4 partial sums, then the 4 sub-block DCs
//   chroma plane            P=2 G=8
// For 4x4 DC the first output group comes out in the cycle that computes the
// DC value, so that job takes 3 cycles.
// Output groups: luma 4x4 = two columns of four rows (pixel k at column
// x+k/4, row y+k%4); 16x16 and chroma = one column of eight rows (pixel k at
// column x, row y+k). 16x16 order: column 0 top half, column 0 bottom half,
// column 1 top half, ...
//
// Interface: start latches class, mode, neighbour availability and the
// neighbouring samples, so the caller may overwrite its neighbour storage with
// reconstructed pixels while the job runs. start is taken while busy is low
// or in the cycle of grp_last, so jobs can follow back to back: two luma 4x4
// jobs of the V, H or directional modes take two cycles each. grp_valid
// marks an output group, grp_last the last group of the job. Without a new
// start busy falls in the cycle after grp_last. The DC offsets (+2 per partial sum) are removed
// by feeding a negative constant to the unit that combines partial sums.
module psp
  import intra_pkg::*;
  import l4_plan_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cls_e       cls,
  input  logic [3:0] mode,
  input  logic       avail_top,
  input  logic       avail_left,
  input  nbr_t       nbr,
  output logic       busy,
  output logic       grp_valid,
  output logic       grp_last,
  output gpos_t      grp_pos,
  output pix_t [7:0] pix,
  output logic       reuse        // a pixel of this group was read from a common register
);
  typedef logic signed [OP_W+1:0] uo_t;

  cls_e       cls_q;
  logic [3:0] mode_q;
  logic       at_q, al_q;
  nbr_t       n_q;
  logic [5:0] cyc;

  // unit operands and results
  op_t  [4:0][3:0] u4_op;
  logic [4:0][2:0] u4_sh;
  op_t  [2:0][1:0] u2_op;
  logic [2:0][2:0] u2_sh;
  uo_t  [7:0]      uo;

  logic [6:0]             reg_we;
  logic [6:0][REG_W-1:0]  reg_wd;
  logic [6:0][REG_W-1:0]  creg;

  creg_t pt1, pt2, pt3;

  for (genvar k = 0; k < 5; k++) begin : g_u4
    ccu4 #(.IN_W(OP_W)) u_ccu4 (
      .w(u4_op[k][0]), .x(u4_op[k][1]), .y(u4_op[k][2]), .z(u4_op[k][3]),
      .alpha(u4_sh[k]), .f(uo[k]));
  end
  for (genvar k = 0; k < 3; k++) begin : g_u2
    ccu2 #(.IN_W(OP_W)) u_ccu2 (
      .a(u2_op[k][0]), .b(u2_op[k][1]), .beta(u2_sh[k]), .f(uo[5+k]));
  end

  common_regs #(.N(NUM_REGS), .W(REG_W)) u_regs (
    .clk, .rst_n, .we(reg_we), .wdata(reg_wd), .rdata(creg));

  plane_prep u_plane (.nbr(n_q), .chroma(cls_q == CLS_CH), .t1(pt1), .t2(pt2), .t3(pt3));

  // ---------------------------------------------------------------- schedule
  logic [5:0] n_prep, n_out, g;
  always_comb begin
    n_prep = 6'd0;
    n_out  = 6'd2;
    unique case (cls_q)
      CLS_L4:  begin n_out = 6'd2;  n_prep = (mode_q == M4_DC)  ? 6'd1 : 6'd0; end
      CLS_L16: begin n_out = 6'd32; n_prep = (mode_q == M16_DC) ? 6'd4 :
                                             (mode_q == M16_PLANE) ? 6'd2 : 6'd0; end
      default: begin n_out = 6'd8;  n_prep = (mode_q == MC_DC)  ? 6'd2 :
                                             (mode_q == MC_PLANE) ? 6'd2 : 6'd0; end
    endcase
    g = cyc - n_prep;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cyc  <= '0;
      cls_q <= CLS_L4;
      mode_q <= '0;
      at_q <= 1'b0;
      al_q <= 1'b0;
      n_q <= '0;
    end else if (start && (!busy || grp_last)) begin
      busy   <= 1'b1;
      cyc    <= '0;
      cls_q  <= cls;
      mode_q <= mode;
      at_q   <= avail_top;
      al_q   <= avail_left;
      n_q    <= nbr;
    end else if (busy) begin
      cyc <= cyc + 6'd1;
      if (grp_last) busy <= 1'b0;
    end
  end

  // ---------------------------------------------------------------- helpers
  function automatic op_t smp(input pix_t p);
    return op_t'({8'd0, p});
  endfunction
  function automatic op_t rd(input logic [REG_W-1:0] r);
    return op_t'(creg_t'(r));
  endfunction
  // sample of the luma 4x4 index space: 0 = S, 1..8 = A..H, 9..12 = 0..3
  function automatic op_t s13(input nbr_t n, input logic [3:0] i);
    if (i == 4'd0)     return smp(n.corner);
    else if (i <= 4'd8) return smp(n.top[i - 4'd1]);
    else               return smp(n.left[i - 4'd9]);
  endfunction
  function automatic logic [REG_W-1:0] wr(input uo_t v);
    return REG_W'(v);
  endfunction

  // plane-mode quantities
  localparam op_t C14 = op_t'(14);
  localparam op_t CM2 = op_t'(-2);
  localparam op_t CM4 = op_t'(-4);
  localparam op_t CM6 = op_t'(-6);
  localparam uo_t DC_NONE = uo_t'(128);

  logic signed [4:0]  xm;          // x - c
  op_t                t2x;         // t2 * (x - c): the plane multiplier
  op_t                pbase;       // t1 + t2*(x-c) + 15, operand of the 2-input units
  op_t  [7:0]         t3m;         // t3 * (y - c) for the eight rows of the group
  l4_plan_t           plan;
  uo_t                dcv;
  logic [3:0]         gx, gy;

  // mode decode shared by both halves of the datapath
  logic is_copy_v, is_copy_h, is_l16dc, is_chdc, is_plane;
  always_comb begin
    is_copy_v = (cls_q == CLS_L4 && mode_q == M4_V) || (cls_q == CLS_L16 && mode_q == M16_V) ||
                (cls_q == CLS_CH && mode_q == MC_V);
    is_copy_h = (cls_q == CLS_L4 && mode_q == M4_H) || (cls_q == CLS_L16 && mode_q == M16_H) ||
                (cls_q == CLS_CH && mode_q == MC_H);
    is_l16dc  = (cls_q == CLS_L16 && mode_q == M16_DC);
    is_chdc   = (cls_q == CLS_CH && mode_q == MC_DC);
    is_plane  = (cls_q == CLS_L16 && mode_q == M16_PLANE) || (cls_q == CLS_CH && mode_q == MC_PLANE);
    plan      = l4_plan(mode_q, cyc[0]);
    grp_valid = busy && (cyc >= n_prep);
    grp_last  = busy && (cyc == n_prep + n_out - 6'd1);
    unique case (cls_q)
      CLS_L4:  begin gx = {g[2:0], 1'b0};  gy = 4'd0; end
      CLS_L16: begin gx = g[4:1];          gy = {g[0], 3'b000}; end
      default: begin gx = g[3:0];          gy = 4'd0; end
    endcase
  end

  // plane mode: t2*(x-c) by the multiplier, t3*(y-c) from registers and shifts
  always_comb begin
    xm    = (cls_q == CLS_CH) ? 5'(gx) - 5'sd3 : 5'(gx) - 5'sd7;
    t2x   = op_t'(rd(creg[1]) * op_t'(xm));
    pbase = rd(creg[0]) + t2x + op_t'(15);
    for (int k = 0; k < 8; k++) begin
      logic signed [4:0] m;
      logic [3:0]        am;
      op_t               mag;
      m  = (cls_q == CLS_CH) ? 5'(gy) + 5'(k) - 5'sd3 : 5'(gy) + 5'(k) - 5'sd7;
      am = (m < 0) ? 4'(-m) : 4'(m);
      unique case (am)
        4'd0:    mag = '0;
        4'd1:    mag = rd(creg[2]);
        4'd2:    mag = rd(creg[2]) <<< 1;
        4'd3:    mag = rd(creg[3]);
        4'd4:    mag = rd(creg[2]) <<< 2;
        4'd5:    mag = rd(creg[4]);
        4'd6:    mag = rd(creg[5]);
        4'd7:    mag = rd(creg[6]);
        default: mag = rd(creg[2]) <<< 3;
      endcase
      t3m[k] = (m < 0) ? -mag : mag;
    end
  end

  // ---------------------------------------------------------------- unit operands
  always_comb begin
    u4_op = '0;
    u4_sh = '0;
    u2_op = '0;
    u2_sh = '0;
    if (busy && !is_copy_v && !is_copy_h) begin
      if (cls_q == CLS_L4 && mode_q == M4_DC) begin
        if (cyc == 6'd0) begin
          for (int j = 0; j < 4; j++) begin
            u4_op[0][j] = smp(n_q.top[j]);
            u4_op[1][j] = smp(n_q.left[j]);
          end
        end else if (cyc == 6'd1) begin
          if (at_q && al_q) begin
            u4_op[0] = {op_t'(0), CM2, rd(creg[1]), rd(creg[0])};
            u4_sh[0] = 3'd3;
          end else if (at_q) begin
            u4_op[0] = {op_t'(0), op_t'(0), CM2, rd(creg[0])};
            u4_sh[0] = 3'd2;
          end else if (al_q) begin
            u4_op[0] = {op_t'(0), op_t'(0), CM2, rd(creg[1])};
            u4_sh[0] = 3'd2;
          end
        end
      end else if (cls_q == CLS_L4) begin
        for (int k = 0; k < 5; k++) begin
          for (int j = 0; j < 4; j++) u4_op[k][j] = s13(n_q, plan.u4_op[k][j]);
          u4_sh[k] = 3'd2;
        end
        for (int k = 0; k < 3; k++) begin
          for (int j = 0; j < 2; j++) u2_op[k][j] = s13(n_q, plan.u2_op[k][j]);
          u2_sh[k] = 3'd1;
        end
      end else if (is_l16dc) begin
        unique case (cyc)
          6'd0: begin  // partial sums of four top rows' groups and of left 0..3
            for (int i = 0; i < 4; i++)
              for (int j = 0; j < 4; j++) u4_op[i][j] = smp(n_q.top[4*i + j]);
            for (int j = 0; j < 4; j++) u4_op[4][j] = smp(n_q.left[j]);
          end
          6'd1: begin  // sum of the top row + 10; partial sums of left 4..15
            for (int j = 0; j < 4; j++) u4_op[0][j] = rd(creg[j]);
            for (int i = 1; i < 4; i++)
              for (int j = 0; j < 4; j++) u4_op[i][j] = smp(n_q.left[4*i + j]);
          end
          6'd2: begin  // sum of the left column + 10
            u4_op[0] = {rd(creg[3]), rd(creg[2]), rd(creg[1]), rd(creg[4])};
          end
          6'd3: begin
            if (at_q && al_q) begin
              u4_op[0] = {op_t'(0), CM6, rd(creg[1]), rd(creg[0])};
              u4_sh[0] = 3'd5;
            end else if (at_q) begin
              u4_op[0] = {op_t'(0), op_t'(0), CM4, rd(creg[0])};
              u4_sh[0] = 3'd4;
            end else if (al_q) begin
              u4_op[0] = {op_t'(0), op_t'(0), CM4, rd(creg[1])};
              u4_sh[0] = 3'd4;
            end
          end
          default: ;
        endcase
      end else if (is_chdc) begin
        if (cyc == 6'd0) begin
          for (int j = 0; j < 4; j++) begin
            u4_op[0][j] = smp(n_q.top[j]);
            u4_op[1][j] = smp(n_q.top[4 + j]);
            u4_op[2][j] = smp(n_q.left[j]);
            u4_op[3][j] = smp(n_q.left[4 + j]);
          end
        end else if (cyc == 6'd1) begin
          // unit i makes the DC of chroma 4x4 sub-block i (0: top-left,
          // 1: top-right, 2: bottom-left, 3: bottom-right)
          if (at_q && al_q) begin
            u4_op[0] = {op_t'(0), CM2, rd(creg[2]), rd(creg[0])}; u4_sh[0] = 3'd3;
            u4_op[3] = {op_t'(0), CM2, rd(creg[3]), rd(creg[1])}; u4_sh[3] = 3'd3;
          end else if (at_q) begin
            u4_op[0] = {op_t'(0), op_t'(0), CM2, rd(creg[0])}; u4_sh[0] = 3'd2;
            u4_op[3] = {op_t'(0), op_t'(0), CM2, rd(creg[1])}; u4_sh[3] = 3'd2;
          end else begin
            u4_op[0] = {op_t'(0), op_t'(0), CM2, rd(creg[2])}; u4_sh[0] = 3'd2;
            u4_op[3] = {op_t'(0), op_t'(0), CM2, rd(creg[3])}; u4_sh[3] = 3'd2;
          end
          u4_op[1] = {op_t'(0), op_t'(0), CM2, at_q ? rd(creg[1]) : rd(creg[2])}; u4_sh[1] = 3'd2;
          u4_op[2] = {op_t'(0), op_t'(0), CM2, al_q ? rd(creg[3]) : rd(creg[0])}; u4_sh[2] = 3'd2;
        end
      end else if (is_plane) begin
        if (cyc == 6'd1) begin  // 3, 5, 6 and 7 times t3
          u4_op[0] = {op_t'(0), CM2, rd(creg[2]), rd(creg[2]) <<< 1};
          u4_op[1] = {op_t'(0), CM2, rd(creg[2]), rd(creg[2]) <<< 2};
          u4_op[2] = {op_t'(0), CM2, rd(creg[2]) <<< 1, rd(creg[2]) <<< 2};
          u4_op[3] = {CM2, rd(creg[2]), rd(creg[2]) <<< 1, rd(creg[2]) <<< 2};
        end else if (cyc >= 6'd2) begin
          for (int k = 0; k < 5; k++) begin
            u4_op[k] = {C14, t3m[k], t2x, rd(creg[0])};
            u4_sh[k] = 3'd5;
          end
          for (int k = 0; k < 3; k++) begin
            u2_op[k] = {t3m[5 + k], pbase};
            u2_sh[k] = 3'd5;
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------- results
  always_comb begin
    reg_we = '0;
    reg_wd = '0;
    pix    = '0;
    reuse  = 1'b0;
    dcv    = DC_NONE;
    if (busy) begin
      if (is_copy_v) begin
        for (int k = 0; k < 8; k++)
          pix[k] = n_q.top[(cls_q == CLS_L4) ? gx + 4'(k / 4) : gx];
      end else if (is_copy_h) begin
        for (int k = 0; k < 8; k++)
          pix[k] = n_q.left[(cls_q == CLS_L4) ? 4'(k % 4) : gy + 4'(k)];
      end else if (cls_q == CLS_L4 && mode_q == M4_DC) begin
        if (cyc == 6'd0) begin
          reg_we[1:0] = 2'b11;
          reg_wd[0]   = wr(uo[0]);
          reg_wd[1]   = wr(uo[1]);
        end else if (cyc == 6'd1) begin
          dcv = (at_q || al_q) ? uo[0] : DC_NONE;
          reg_we[2] = 1'b1;
          reg_wd[2] = wr(dcv);
          for (int k = 0; k < 8; k++) pix[k] = clip1(dcv);
        end else begin
          for (int k = 0; k < 8; k++) pix[k] = creg[2][7:0];
          reuse = 1'b1;
        end
      end else if (cls_q == CLS_L4) begin
        for (int r = 0; r < 7; r++) begin
          reg_we[r] = plan.reg_we[r];
          reg_wd[r] = wr(uo[plan.reg_src[r]]);
        end
        for (int k = 0; k < 8; k++) begin
          unique case (plan.out_kind[k])
            OUT_UNIT: pix[k] = clip1(uo[plan.out_sel[k][2:0]]);
            OUT_REG:  begin pix[k] = creg[plan.out_sel[k][2:0]][7:0]; reuse = 1'b1; end
            default:  pix[k] = s13(n_q, plan.out_sel[k])[7:0];
          endcase
        end
      end else if (is_l16dc) begin
        unique case (cyc)
          6'd0: begin
            reg_we[4:0] = '1;
            for (int i = 0; i < 5; i++) reg_wd[i] = wr(uo[i]);
          end
          6'd1: begin
            reg_we[3:0] = '1;
            for (int i = 0; i < 4; i++) reg_wd[i] = wr(uo[i]);
          end
          6'd2: begin
            reg_we[1] = 1'b1;
            reg_wd[1] = wr(uo[0]);
          end
          6'd3: begin
            dcv = (at_q || al_q) ? uo[0] : DC_NONE;
            reg_we[2] = 1'b1;
            reg_wd[2] = wr(dcv);
          end
          default: begin
            for (int k = 0; k < 8; k++) pix[k] = creg[2][7:0];
            reuse = 1'b1;
          end
        endcase
      end else if (is_chdc) begin
        if (cyc == 6'd0) begin
          reg_we[3:0] = '1;
          for (int i = 0; i < 4; i++) reg_wd[i] = wr(uo[i]);
        end else if (cyc == 6'd1) begin
          reg_we[3:0] = '1;
          for (int i = 0; i < 4; i++) reg_wd[i] = wr((at_q || al_q) ? uo[i] : DC_NONE);
        end else begin
          for (int k = 0; k < 8; k++) pix[k] = creg[{k >= 4, gx >= 4'd4}][7:0];
          reuse = 1'b1;
        end
      end else begin  // plane
        if (cyc == 6'd0) begin
          reg_we[2:0] = '1;
          reg_wd[0] = pt1;
          reg_wd[1] = pt2;
          reg_wd[2] = pt3;
        end else if (cyc == 6'd1) begin
          reg_we[6:3] = '1;
          for (int i = 0; i < 4; i++) reg_wd[3 + i] = wr(uo[i]);
        end else begin
          for (int k = 0; k < 8; k++) pix[k] = clip1(uo[k]);
          reuse = 1'b1;
        end
      end
    end
  end

  assign grp_pos = '{x: gx, y: gy};

endmodule
