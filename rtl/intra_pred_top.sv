// intra_pred_top: H.264 intra prediction circuit for the decoder.
//
// Four blocks, as in the document's architecture: the SED turns the
// macroblock's intra syntax into prediction modes, the NSB keeps the
// reconstructed neighbouring pixels, the PSP computes the predictions with
// five 4-input and three 2-input common computation units and seven common
// registers, and the controller sequences them. Two dual-port line SRAMs
// (Y, and Cb/Cr) keep the bottom pixel row of the macroblock row above:
// 3.75 Kbytes for a 1920-pixel-wide picture.
//
// Interface (all synchronous to clk, active-low synchronous reset):
//   mb_*    one macroblock's syntax per mb_valid && mb_ready: Intra_4x4 flag,
//           per 4x4 block (z-scan order) prev_intra4x4_pred_mode_flag and
//           rem_intra4x4_pred_mode, Intra_16x16 mode, chroma mode.
//           Macroblocks follow in raster order from the picture's top-left;
//           every macroblock of the picture is intra coded.
//   pred_*  eight predicted pixels per pred_valid. pred_comp gives the
//           component; pred_x/pred_y the position of pixel 0 inside the
//           16x16 (luma) or 8x8 (chroma) block. In Intra_4x4 macroblocks a luma
//           group is two columns of four rows (pixel k at x + k/4, y + k%4);
//           otherwise a group is one column of eight rows (pixel k at x, y + k).
//   rec_*   the reconstructed pixels (prediction plus residual) of each
//           predicted group, same position and shape, in the same order, at
//           any time from the prediction's own cycle on. A 4x4 block is not
//           predicted before all groups of the previous block came back.
//   mb_done one pulse per macroblock, after its bottom row was written back.
module intra_pred_top
  import intra_pkg::*;
#(
  parameter int MB_COLS = 120,
  parameter int MB_ROWS = 68
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             mb_valid,
  output logic             mb_ready,
  input  logic             mb_i4,
  input  logic [15:0]      mb_prev_flag,
  input  logic [15:0][2:0] mb_rem,
  input  logic [1:0]       mb_i16_mode,
  input  logic [1:0]       mb_chroma_mode,
  output logic             pred_valid,
  output comp_e            pred_comp,
  output logic [3:0]       pred_x,
  output logic [3:0]       pred_y,
  output pix_t [7:0]       pred_pix,
  input  logic             rec_valid,
  input  comp_e            rec_comp,
  input  logic [3:0]       rec_x,
  input  logic [3:0]       rec_y,
  input  pix_t [7:0]       rec_pix,
  output logic             mb_done
);
  localparam int XW  = $clog2(MB_COLS);
  localparam int YW  = $clog2(MB_ROWS);
  localparam int YAW = $clog2(2 * MB_COLS);

  logic [XW-1:0]  mbx;
  logic [YW-1:0]  mby;
  logic           mb_begin, mb_left_avail, mb_top_avail, mb_tr_avail;
  logic           i4;
  logic [3:0]     mode4, i16_mode, chroma_mode, blk, pblk, psp_mode;
  logic           sed_commit, sed_mb_end;
  logic           y_re, c_re, y_we, c_we, y_wsel, c_wsel;
  logic [YAW-1:0] y_raddr, c_raddr, y_waddr, c_waddr;
  logic [63:0]    y_rdata, c_rdata, wb_y0, wb_y1, wb_cb, wb_cr;
  logic           ld_y_we, ld_c_we, ld_c_cr;
  logic [1:0]     ld_y_idx;
  cls_e           q_cls;
  logic           q_cr;
  nbr_t           nbr;
  logic           avail_top, avail_left;
  logic           psp_busy, psp_gv, psp_gl, psp_start, psp_reuse, stall;
  gpos_t          gpos;
  comp_e          comp;

  sed #(.MB_COLS(MB_COLS)) u_sed (
    .clk, .rst_n, .mb_load(mb_begin), .i4_in(mb_i4), .prev_flag_in(mb_prev_flag),
    .rem_in(mb_rem), .i16_mode_in(mb_i16_mode), .chroma_mode_in(mb_chroma_mode),
    .mbx, .mb_left_avail, .mb_top_avail, .blk, .commit(sed_commit), .mb_end(sed_mb_end),
    .i4, .mode4, .i16_mode, .chroma_mode);

  controller #(.MB_COLS(MB_COLS), .MB_ROWS(MB_ROWS)) u_ctrl (
    .clk, .rst_n, .mb_valid, .mb_ready, .mb_begin, .mb_done, .mbx, .mby,
    .mb_left_avail, .mb_top_avail, .mb_tr_avail,
    .i4, .mode4, .i16_mode, .chroma_mode, .blk, .pblk, .sed_commit, .sed_mb_end,
    .y_re, .y_raddr, .c_re, .c_raddr, .y_we, .y_waddr, .y_wsel, .c_we, .c_waddr, .c_wsel,
    .ld_y_we, .ld_y_idx, .ld_c_we, .ld_c_cr, .q_cls, .q_cr,
    .psp_busy, .psp_grp_valid(psp_gv), .psp_grp_last(psp_gl), .psp_start, .psp_mode, .comp,
    .rec_valid, .stall);

  line_sram #(.DEPTH(2 * MB_COLS), .WIDTH(64)) u_sram_y (
    .clk, .we(y_we), .waddr(y_waddr), .wdata(y_wsel ? wb_y1 : wb_y0),
    .re(y_re), .raddr(y_raddr), .rdata(y_rdata));

  line_sram #(.DEPTH(2 * MB_COLS), .WIDTH(64)) u_sram_c (
    .clk, .we(c_we), .waddr(c_waddr), .wdata(c_wsel ? wb_cr : wb_cb),
    .re(c_re), .raddr(c_raddr), .rdata(c_rdata));

  nsb u_nsb (
    .clk, .rst_n, .mb_begin, .mb_i4(i4), .mb_top_avail, .mb_left_avail, .mb_tr_avail,
    .ld_y_we, .ld_y_idx, .ld_c_we, .ld_c_cr, .ld_y_data(y_rdata), .ld_c_data(c_rdata),
    .q_cls, .q_cr, .q_bx({blk[2], blk[0]}), .q_by({blk[3], blk[1]}),
    .nbr, .avail_top, .avail_left,
    .rec_valid, .rec_comp, .rec_x, .rec_y, .rec_pix,
    .wb_y0, .wb_y1, .wb_cb, .wb_cr);

  psp u_psp (
    .clk, .rst_n, .start(psp_start), .cls(q_cls), .mode(psp_mode),
    .avail_top, .avail_left, .nbr,
    .busy(psp_busy), .grp_valid(psp_gv), .grp_last(psp_gl), .grp_pos(gpos),
    .pix(pred_pix), .reuse(psp_reuse));

  assign pred_valid = psp_gv;
  assign pred_comp  = comp;
  assign pred_x     = (comp == COMP_Y && i4) ? {pblk[2], pblk[0], 2'b00} + gpos.x : gpos.x;
  assign pred_y     = (comp == COMP_Y && i4) ? {pblk[3], pblk[1], 2'b00} + gpos.y : gpos.y;
endmodule
