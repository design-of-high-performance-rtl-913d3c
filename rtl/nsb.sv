// nsb: neighbouring samples buffer (internal memory of reference pixels).
//
// Holds every reconstructed pixel the predictions of the current macroblock
// still need, so that the line SRAM is read only once per macroblock:
//   T[0..15]   upper reference pixels (A..P). Loaded from the line SRAM at the
//              start of a macroblock; each reconstructed 4x4 block (or 16x16
//              column) overwrites its column's entries with its bottom row,
//              so T always holds the upper neighbours of the next block.
//   TR[0..3]   pixels above-right of the macroblock (for 4x4 block 5).
//   L[0..15]   left reference pixels (0..15). Hold the right column of the
//              previous macroblock and are overwritten with the right column
//              of each reconstructed block.
//   S          upper-left corner of the macroblock.
//   CT[0..2]   upper-left corners of 4x4 blocks 1, 4, 5 (copies of T[3], T[7],
//              T[11] taken at load time, before reconstruction overwrites them).
//   CL[0..2]   upper-left corners of 4x4 blocks 2, 8, 10 (copies of L[3],
//              L[7], L[11] taken at macroblock start).
//   CX[0..8]   bottom-right pixel of each 4x4 block (bx, by < 3): the
//              upper-left corner of block (bx+1, by+1).
//   Cb and Cr: T[0..7], L[0..7] and S each.
// The document's organisation (upper and left running buffers plus a few
// saved corner pixels, and separate memories for Cb and Cr) is followed; it
// uses 42 luma words, this design 53: the above-right pixels, the
// corner copies and the next corner get words of their own instead of
// sharing them.
//
// Interface:
//   mb_begin        start of a macroblock: S <= saved next corner, CL <= L.
//   ld_*            writes of line SRAM words (eight pixels) into T, TR or a
//                   chroma T; loading T[8..15] also saves T[15] as the corner
//                   of the next macroblock.
//   q_*             neighbour query for the block the PSP starts next:
//                   combinational nbr, avail_top, avail_left. The
//                   reconstructed group of the same cycle is already
//                   included (bypass), so the next 4x4 block can start in
//                   the cycle the previous block's last group comes back.
//   rec_*           one group of reconstructed pixels, same shape and
//                   position as the prediction group it answers.
//   wb_y0/wb_y1/wb_cb/wb_cr   bottom rows, written back to the line SRAM.
module nsb
  import intra_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mb_begin,
  input  logic       mb_i4,           // current macroblock is Intra_4x4
  input  logic       mb_top_avail,
  input  logic       mb_left_avail,
  input  logic       mb_tr_avail,     // macroblock above-right available
  // line SRAM load
  input  logic       ld_y_we,
  input  logic [1:0] ld_y_idx,        // 0: T[0..7], 1: T[8..15], 2: TR
  input  logic       ld_c_we,
  input  logic       ld_c_cr,         // 0: Cb, 1: Cr
  input  logic [63:0] ld_y_data,
  input  logic [63:0] ld_c_data,
  // neighbour query
  input  cls_e       q_cls,
  input  logic       q_cr,            // chroma query: 0 Cb, 1 Cr
  input  logic [1:0] q_bx,            // 4x4 block position
  input  logic [1:0] q_by,
  output nbr_t       nbr,
  output logic       avail_top,
  output logic       avail_left,
  // reconstructed pixels
  input  logic       rec_valid,
  input  comp_e      rec_comp,
  input  logic [3:0] rec_x,
  input  logic [3:0] rec_y,
  input  pix_t [7:0] rec_pix,
  // write-back
  output logic [63:0] wb_y0,
  output logic [63:0] wb_y1,
  output logic [63:0] wb_cb,
  output logic [63:0] wb_cr
);
  pix_t [15:0] t, l;
  pix_t [3:0]  tr;
  pix_t        s, s_next;
  pix_t [2:0]  ct, cl;
  pix_t [8:0]  cx;
  pix_t [1:0][7:0] ctop, cleft;
  pix_t [1:0]  cs, cs_next;

  function automatic logic [3:0] zidx(input logic [1:0] x, input logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

  // ---------------------------------------------------------------- updates
  // The buffers with the reconstructed group of this cycle applied. They are
  // the next register values and also feed the query, so a block may start
  // in the cycle its neighbour's last group comes back.
  pix_t [15:0] t_r, l_r;
  pix_t [8:0]  cx_r;
  pix_t [1:0][7:0] ctop_r, cleft_r;
  always_comb begin
    t_r = t; l_r = l; cx_r = cx; ctop_r = ctop; cleft_r = cleft;
    if (rec_valid) begin
      if (rec_comp == COMP_Y && mb_i4) begin
        // two columns x, x+1 of rows y..y+3
        t_r[rec_x]        = rec_pix[3];
        t_r[rec_x + 4'd1] = rec_pix[7];
        if (rec_x[1]) begin
          for (int k = 0; k < 4; k++) l_r[rec_y + 4'(k)] = rec_pix[4 + k];
          if (rec_x[3:2] != 2'd3 && rec_y[3:2] != 2'd3)
            cx_r[rec_y[3:2] * 3 + rec_x[3:2]] = rec_pix[7];
        end
      end else if (rec_comp == COMP_Y) begin
        // one column x of rows y..y+7
        if (rec_y[3]) t_r[rec_x] = rec_pix[7];
        if (rec_x == 4'd15)
          for (int k = 0; k < 8; k++) l_r[rec_y + 4'(k)] = rec_pix[k];
      end else begin
        ctop_r[rec_comp == COMP_CR][rec_x[2:0]] = rec_pix[7];
        if (rec_x[2:0] == 3'd7) cleft_r[rec_comp == COMP_CR] = rec_pix;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      t <= '0; l <= '0; tr <= '0; s <= '0; s_next <= '0;
      ct <= '0; cl <= '0; cx <= '0;
      ctop <= '0; cleft <= '0; cs <= '0; cs_next <= '0;
    end else begin
      t <= t_r; l <= l_r; cx <= cx_r; ctop <= ctop_r; cleft <= cleft_r;
      if (mb_begin) begin
        s  <= s_next;
        cs <= cs_next;
        cl <= {l[11], l[7], l[3]};
      end
      if (ld_y_we) begin
        unique case (ld_y_idx)
          2'd0: begin
            t[7:0] <= ld_y_data;
            ct[0]  <= ld_y_data[31:24];
            ct[1]  <= ld_y_data[63:56];
          end
          2'd1: begin
            t[15:8] <= ld_y_data;
            ct[2]   <= ld_y_data[31:24];
            s_next  <= ld_y_data[63:56];
          end
          default: tr <= ld_y_data[31:0];
        endcase
      end
      if (ld_c_we) begin
        ctop[ld_c_cr]    <= ld_c_data;
        cs_next[ld_c_cr] <= ld_c_data[63:56];
      end
    end
  end

  // ---------------------------------------------------------------- query
  logic tr4;
  always_comb begin
    nbr        = '0;
    avail_top  = mb_top_avail;
    avail_left = mb_left_avail;
    tr4        = 1'b0;
    unique case (q_cls)
      CLS_L4: begin
        avail_top  = (q_by != 2'd0) || mb_top_avail;
        avail_left = (q_bx != 2'd0) || mb_left_avail;
        if (q_by == 2'd0) tr4 = (q_bx != 2'd3) ? mb_top_avail : mb_tr_avail;
        else              tr4 = (q_bx != 2'd3) && (zidx(q_bx + 2'd1, q_by - 2'd1) < zidx(q_bx, q_by));
        for (int i = 0; i < 4; i++) begin
          nbr.top[i]  = t_r[{q_bx, 2'(i)}];
          nbr.left[i] = l_r[{q_by, 2'(i)}];
          if (!tr4)                                nbr.top[4 + i] = t_r[{q_bx, 2'd3}];
          else if (q_bx == 2'd3)                   nbr.top[4 + i] = tr[i];
          else                                     nbr.top[4 + i] = t_r[{q_bx + 2'd1, 2'(i)}];
        end
        if (q_bx == 2'd0 && q_by == 2'd0) nbr.corner = s;
        else if (q_by == 2'd0)            nbr.corner = ct[q_bx - 2'd1];
        else if (q_bx == 2'd0)            nbr.corner = cl[q_by - 2'd1];
        else                              nbr.corner = cx_r[(q_by - 2'd1) * 3 + (q_bx - 2'd1)];
      end
      CLS_L16: begin
        nbr.top    = t_r;
        nbr.left   = l_r;
        nbr.corner = s;
      end
      default: begin
        nbr.top[7:0]  = ctop_r[q_cr];
        nbr.left[7:0] = cleft_r[q_cr];
        nbr.corner    = cs[q_cr];
      end
    endcase
  end

  assign wb_y0 = t[7:0];
  assign wb_y1 = t[15:8];
  assign wb_cb = ctop[0];
  assign wb_cr = ctop[1];
endmodule
