// l4_plan_pkg: unit allocation of the six directional luma 4x4 prediction modes
// (modes 3..8) onto the eight common computation units of the predict samples
// processor.
//
// A 4x4 block is predicted in two cycles: the left half (columns 0 and 1) in
// cycle 0 and the right half (columns 2 and 3) in cycle 1, eight pixels per
// cycle. Every pixel of these modes is either a 3-tap filter
// (p + 2q + r + 2) >> 2, a 2-tap average (p + q + 1) >> 1, or a plain copy of a
// neighbouring sample (horizontal-up). The distinct filter values of a half
// are given to the units: 2-tap values to the three 2-input units first and
// to a 4-input unit fed (p, p, q, q) when those are used up, 3-tap values to the
// 4-input units fed (p, q, q, r). Values computed in cycle 0 that the right
// half needs again are written to the common registers and are not computed a
// second time. For the horizontal-down mode this gives eight values in cycle 0,
// six of them kept in registers, and only two new values in cycle 1.
//
// Sample index encoding (4 bits): 0 = corner S, 1..8 = top samples A..H,
// 9..12 = left samples 0..3.
// The plan is a fixed table derived from the H.264 filter formulas of each
// mode; index 2*mode + half selects an entry.
package l4_plan_pkg;

  typedef enum logic [1:0] {OUT_UNIT = 2'd0, OUT_REG = 2'd1, OUT_SMP = 2'd2} out_kind_e;

  typedef struct packed {
    logic [4:0][3:0][3:0] u4_op;    // sample index of each 4-input unit operand
    logic [2:0][1:0][3:0] u2_op;    // sample index of each 2-input unit operand
    logic [6:0]           reg_we;   // common register write enables
    logic [6:0][2:0]      reg_src;  // unit (0..4 = 4-input, 5..7 = 2-input) written
    out_kind_e [7:0]      out_kind; // where output pixel k comes from
    logic [7:0][3:0]      out_sel;  // unit, register or sample index
    logic [3:0]           n_units;  // number of units doing work this cycle
  } l4_plan_t;

  function automatic l4_plan_t l4_plan(input logic [3:0] mode, input logic half);
    l4_plan_t p;
    p = '0;
    case ({mode, half})
      5'd6: begin // mode 3, left half
        p.u4_op[0][0] = 4'd1;
        p.u4_op[0][1] = 4'd2;
        p.u4_op[0][2] = 4'd2;
        p.u4_op[0][3] = 4'd3;
        p.u4_op[1][0] = 4'd2;
        p.u4_op[1][1] = 4'd3;
        p.u4_op[1][2] = 4'd3;
        p.u4_op[1][3] = 4'd4;
        p.u4_op[2][0] = 4'd3;
        p.u4_op[2][1] = 4'd4;
        p.u4_op[2][2] = 4'd4;
        p.u4_op[2][3] = 4'd5;
        p.u4_op[3][0] = 4'd4;
        p.u4_op[3][1] = 4'd5;
        p.u4_op[3][2] = 4'd5;
        p.u4_op[3][3] = 4'd6;
        p.u4_op[4][0] = 4'd5;
        p.u4_op[4][1] = 4'd6;
        p.u4_op[4][2] = 4'd6;
        p.u4_op[4][3] = 4'd7;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd0;
        p.u2_op[1][0] = 4'd0;
        p.u2_op[1][1] = 4'd0;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.reg_we[0] = 1'b1; p.reg_src[0] = 3'd2;
        p.reg_we[1] = 1'b1; p.reg_src[1] = 3'd3;
        p.reg_we[2] = 1'b1; p.reg_src[2] = 3'd4;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd1;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd2;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd3;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd1;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd2;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd3;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd4;
        p.n_units = 4'd5;
      end
      5'd7: begin // mode 3, right half
        p.u4_op[0][0] = 4'd6;
        p.u4_op[0][1] = 4'd7;
        p.u4_op[0][2] = 4'd7;
        p.u4_op[0][3] = 4'd8;
        p.u4_op[1][0] = 4'd7;
        p.u4_op[1][1] = 4'd8;
        p.u4_op[1][2] = 4'd8;
        p.u4_op[1][3] = 4'd8;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd0;
        p.u4_op[2][2] = 4'd0;
        p.u4_op[2][3] = 4'd0;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd0;
        p.u2_op[1][0] = 4'd0;
        p.u2_op[1][1] = 4'd0;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.out_kind[0] = OUT_REG; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_REG; p.out_sel[1] = 4'd1;
        p.out_kind[2] = OUT_REG; p.out_sel[2] = 4'd2;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd0;
        p.out_kind[4] = OUT_REG; p.out_sel[4] = 4'd1;
        p.out_kind[5] = OUT_REG; p.out_sel[5] = 4'd2;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd0;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd1;
        p.n_units = 4'd2;
      end
      5'd8: begin // mode 4, left half
        p.u4_op[0][0] = 4'd1;
        p.u4_op[0][1] = 4'd0;
        p.u4_op[0][2] = 4'd0;
        p.u4_op[0][3] = 4'd9;
        p.u4_op[1][0] = 4'd0;
        p.u4_op[1][1] = 4'd9;
        p.u4_op[1][2] = 4'd9;
        p.u4_op[1][3] = 4'd10;
        p.u4_op[2][0] = 4'd9;
        p.u4_op[2][1] = 4'd10;
        p.u4_op[2][2] = 4'd10;
        p.u4_op[2][3] = 4'd11;
        p.u4_op[3][0] = 4'd10;
        p.u4_op[3][1] = 4'd11;
        p.u4_op[3][2] = 4'd11;
        p.u4_op[3][3] = 4'd12;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd1;
        p.u4_op[4][2] = 4'd1;
        p.u4_op[4][3] = 4'd2;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd0;
        p.u2_op[1][0] = 4'd0;
        p.u2_op[1][1] = 4'd0;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.reg_we[0] = 1'b1; p.reg_src[0] = 3'd4;
        p.reg_we[1] = 1'b1; p.reg_src[1] = 3'd0;
        p.reg_we[2] = 1'b1; p.reg_src[2] = 3'd1;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd1;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd2;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd3;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd4;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd0;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd1;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd2;
        p.n_units = 4'd5;
      end
      5'd9: begin // mode 4, right half
        p.u4_op[0][0] = 4'd1;
        p.u4_op[0][1] = 4'd2;
        p.u4_op[0][2] = 4'd2;
        p.u4_op[0][3] = 4'd3;
        p.u4_op[1][0] = 4'd2;
        p.u4_op[1][1] = 4'd3;
        p.u4_op[1][2] = 4'd3;
        p.u4_op[1][3] = 4'd4;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd0;
        p.u4_op[2][2] = 4'd0;
        p.u4_op[2][3] = 4'd0;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd0;
        p.u2_op[1][0] = 4'd0;
        p.u2_op[1][1] = 4'd0;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_REG; p.out_sel[1] = 4'd0;
        p.out_kind[2] = OUT_REG; p.out_sel[2] = 4'd1;
        p.out_kind[3] = OUT_REG; p.out_sel[3] = 4'd2;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd1;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd0;
        p.out_kind[6] = OUT_REG; p.out_sel[6] = 4'd0;
        p.out_kind[7] = OUT_REG; p.out_sel[7] = 4'd1;
        p.n_units = 4'd2;
      end
      5'd10: begin // mode 5, left half
        p.u4_op[0][0] = 4'd9;
        p.u4_op[0][1] = 4'd0;
        p.u4_op[0][2] = 4'd0;
        p.u4_op[0][3] = 4'd1;
        p.u4_op[1][0] = 4'd10;
        p.u4_op[1][1] = 4'd9;
        p.u4_op[1][2] = 4'd9;
        p.u4_op[1][3] = 4'd0;
        p.u4_op[2][0] = 4'd11;
        p.u4_op[2][1] = 4'd10;
        p.u4_op[2][2] = 4'd10;
        p.u4_op[2][3] = 4'd9;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd1;
        p.u4_op[3][2] = 4'd1;
        p.u4_op[3][3] = 4'd2;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd1;
        p.u2_op[1][0] = 4'd1;
        p.u2_op[1][1] = 4'd2;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.reg_we[0] = 1'b1; p.reg_src[0] = 3'd6;
        p.reg_we[1] = 1'b1; p.reg_src[1] = 3'd3;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd5;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd0;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd1;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd2;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd6;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd3;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd5;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd0;
        p.n_units = 4'd6;
      end
      5'd11: begin // mode 5, right half
        p.u4_op[0][0] = 4'd1;
        p.u4_op[0][1] = 4'd2;
        p.u4_op[0][2] = 4'd2;
        p.u4_op[0][3] = 4'd3;
        p.u4_op[1][0] = 4'd2;
        p.u4_op[1][1] = 4'd3;
        p.u4_op[1][2] = 4'd3;
        p.u4_op[1][3] = 4'd4;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd0;
        p.u4_op[2][2] = 4'd0;
        p.u4_op[2][3] = 4'd0;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd2;
        p.u2_op[0][1] = 4'd3;
        p.u2_op[1][0] = 4'd3;
        p.u2_op[1][1] = 4'd4;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd5;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd0;
        p.out_kind[2] = OUT_REG; p.out_sel[2] = 4'd0;
        p.out_kind[3] = OUT_REG; p.out_sel[3] = 4'd1;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd6;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd1;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd5;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd0;
        p.n_units = 4'd4;
      end
      5'd12: begin // mode 6, left half
        p.u4_op[0][0] = 4'd11;
        p.u4_op[0][1] = 4'd11;
        p.u4_op[0][2] = 4'd12;
        p.u4_op[0][3] = 4'd12;
        p.u4_op[1][0] = 4'd9;
        p.u4_op[1][1] = 4'd0;
        p.u4_op[1][2] = 4'd0;
        p.u4_op[1][3] = 4'd1;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd9;
        p.u4_op[2][2] = 4'd9;
        p.u4_op[2][3] = 4'd10;
        p.u4_op[3][0] = 4'd9;
        p.u4_op[3][1] = 4'd10;
        p.u4_op[3][2] = 4'd10;
        p.u4_op[3][3] = 4'd11;
        p.u4_op[4][0] = 4'd10;
        p.u4_op[4][1] = 4'd11;
        p.u4_op[4][2] = 4'd11;
        p.u4_op[4][3] = 4'd12;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd9;
        p.u2_op[1][0] = 4'd9;
        p.u2_op[1][1] = 4'd10;
        p.u2_op[2][0] = 4'd10;
        p.u2_op[2][1] = 4'd11;
        p.reg_we[0] = 1'b1; p.reg_src[0] = 3'd5;
        p.reg_we[1] = 1'b1; p.reg_src[1] = 3'd6;
        p.reg_we[2] = 1'b1; p.reg_src[2] = 3'd7;
        p.reg_we[3] = 1'b1; p.reg_src[3] = 3'd1;
        p.reg_we[4] = 1'b1; p.reg_src[4] = 3'd2;
        p.reg_we[5] = 1'b1; p.reg_src[5] = 3'd3;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd5;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd6;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd7;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd0;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd1;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd2;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd3;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd4;
        p.n_units = 4'd8;
      end
      5'd13: begin // mode 6, right half
        p.u4_op[0][0] = 4'd2;
        p.u4_op[0][1] = 4'd1;
        p.u4_op[0][2] = 4'd1;
        p.u4_op[0][3] = 4'd0;
        p.u4_op[1][0] = 4'd3;
        p.u4_op[1][1] = 4'd2;
        p.u4_op[1][2] = 4'd2;
        p.u4_op[1][3] = 4'd1;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd0;
        p.u4_op[2][2] = 4'd0;
        p.u4_op[2][3] = 4'd0;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd0;
        p.u2_op[1][0] = 4'd0;
        p.u2_op[1][1] = 4'd0;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_REG; p.out_sel[1] = 4'd0;
        p.out_kind[2] = OUT_REG; p.out_sel[2] = 4'd1;
        p.out_kind[3] = OUT_REG; p.out_sel[3] = 4'd2;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd1;
        p.out_kind[5] = OUT_REG; p.out_sel[5] = 4'd3;
        p.out_kind[6] = OUT_REG; p.out_sel[6] = 4'd4;
        p.out_kind[7] = OUT_REG; p.out_sel[7] = 4'd5;
        p.n_units = 4'd2;
      end
      5'd14: begin // mode 7, left half
        p.u4_op[0][0] = 4'd1;
        p.u4_op[0][1] = 4'd2;
        p.u4_op[0][2] = 4'd2;
        p.u4_op[0][3] = 4'd3;
        p.u4_op[1][0] = 4'd2;
        p.u4_op[1][1] = 4'd3;
        p.u4_op[1][2] = 4'd3;
        p.u4_op[1][3] = 4'd4;
        p.u4_op[2][0] = 4'd3;
        p.u4_op[2][1] = 4'd4;
        p.u4_op[2][2] = 4'd4;
        p.u4_op[2][3] = 4'd5;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd1;
        p.u2_op[0][1] = 4'd2;
        p.u2_op[1][0] = 4'd2;
        p.u2_op[1][1] = 4'd3;
        p.u2_op[2][0] = 4'd3;
        p.u2_op[2][1] = 4'd4;
        p.reg_we[0] = 1'b1; p.reg_src[0] = 3'd7;
        p.reg_we[1] = 1'b1; p.reg_src[1] = 3'd2;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd5;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd0;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd6;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd1;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd6;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd1;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd7;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd2;
        p.n_units = 4'd6;
      end
      5'd15: begin // mode 7, right half
        p.u4_op[0][0] = 4'd4;
        p.u4_op[0][1] = 4'd5;
        p.u4_op[0][2] = 4'd5;
        p.u4_op[0][3] = 4'd6;
        p.u4_op[1][0] = 4'd5;
        p.u4_op[1][1] = 4'd6;
        p.u4_op[1][2] = 4'd6;
        p.u4_op[1][3] = 4'd7;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd0;
        p.u4_op[2][2] = 4'd0;
        p.u4_op[2][3] = 4'd0;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd4;
        p.u2_op[0][1] = 4'd5;
        p.u2_op[1][0] = 4'd5;
        p.u2_op[1][1] = 4'd6;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.out_kind[0] = OUT_REG; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_REG; p.out_sel[1] = 4'd1;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd5;
        p.out_kind[3] = OUT_UNIT; p.out_sel[3] = 4'd0;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd5;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd0;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd6;
        p.out_kind[7] = OUT_UNIT; p.out_sel[7] = 4'd1;
        p.n_units = 4'd4;
      end
      5'd16: begin // mode 8, left half
        p.u4_op[0][0] = 4'd9;
        p.u4_op[0][1] = 4'd10;
        p.u4_op[0][2] = 4'd10;
        p.u4_op[0][3] = 4'd11;
        p.u4_op[1][0] = 4'd10;
        p.u4_op[1][1] = 4'd11;
        p.u4_op[1][2] = 4'd11;
        p.u4_op[1][3] = 4'd12;
        p.u4_op[2][0] = 4'd11;
        p.u4_op[2][1] = 4'd12;
        p.u4_op[2][2] = 4'd12;
        p.u4_op[2][3] = 4'd12;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd9;
        p.u2_op[0][1] = 4'd10;
        p.u2_op[1][0] = 4'd10;
        p.u2_op[1][1] = 4'd11;
        p.u2_op[2][0] = 4'd11;
        p.u2_op[2][1] = 4'd12;
        p.reg_we[0] = 1'b1; p.reg_src[0] = 3'd6;
        p.reg_we[1] = 1'b1; p.reg_src[1] = 3'd7;
        p.reg_we[2] = 1'b1; p.reg_src[2] = 3'd1;
        p.reg_we[3] = 1'b1; p.reg_src[3] = 3'd2;
        p.out_kind[0] = OUT_UNIT; p.out_sel[0] = 4'd5;
        p.out_kind[1] = OUT_UNIT; p.out_sel[1] = 4'd6;
        p.out_kind[2] = OUT_UNIT; p.out_sel[2] = 4'd7;
        p.out_kind[3] = OUT_SMP; p.out_sel[3] = 4'd12;
        p.out_kind[4] = OUT_UNIT; p.out_sel[4] = 4'd0;
        p.out_kind[5] = OUT_UNIT; p.out_sel[5] = 4'd1;
        p.out_kind[6] = OUT_UNIT; p.out_sel[6] = 4'd2;
        p.out_kind[7] = OUT_SMP; p.out_sel[7] = 4'd12;
        p.n_units = 4'd6;
      end
      5'd17: begin // mode 8, right half
        p.u4_op[0][0] = 4'd0;
        p.u4_op[0][1] = 4'd0;
        p.u4_op[0][2] = 4'd0;
        p.u4_op[0][3] = 4'd0;
        p.u4_op[1][0] = 4'd0;
        p.u4_op[1][1] = 4'd0;
        p.u4_op[1][2] = 4'd0;
        p.u4_op[1][3] = 4'd0;
        p.u4_op[2][0] = 4'd0;
        p.u4_op[2][1] = 4'd0;
        p.u4_op[2][2] = 4'd0;
        p.u4_op[2][3] = 4'd0;
        p.u4_op[3][0] = 4'd0;
        p.u4_op[3][1] = 4'd0;
        p.u4_op[3][2] = 4'd0;
        p.u4_op[3][3] = 4'd0;
        p.u4_op[4][0] = 4'd0;
        p.u4_op[4][1] = 4'd0;
        p.u4_op[4][2] = 4'd0;
        p.u4_op[4][3] = 4'd0;
        p.u2_op[0][0] = 4'd0;
        p.u2_op[0][1] = 4'd0;
        p.u2_op[1][0] = 4'd0;
        p.u2_op[1][1] = 4'd0;
        p.u2_op[2][0] = 4'd0;
        p.u2_op[2][1] = 4'd0;
        p.out_kind[0] = OUT_REG; p.out_sel[0] = 4'd0;
        p.out_kind[1] = OUT_REG; p.out_sel[1] = 4'd1;
        p.out_kind[2] = OUT_SMP; p.out_sel[2] = 4'd12;
        p.out_kind[3] = OUT_SMP; p.out_sel[3] = 4'd12;
        p.out_kind[4] = OUT_REG; p.out_sel[4] = 4'd2;
        p.out_kind[5] = OUT_REG; p.out_sel[5] = 4'd3;
        p.out_kind[6] = OUT_SMP; p.out_sel[6] = 4'd12;
        p.out_kind[7] = OUT_SMP; p.out_sel[7] = 4'd12;
        p.n_units = 4'd0;
      end
      default: ;
    endcase
    return p;
  endfunction

endpackage
