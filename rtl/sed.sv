// sed: syntactic elements decoder.
//
// Turns the intra prediction syntax of a macroblock, as delivered by the
// variable length decoder, into prediction modes. For an Intra_4x4
// macroblock each 4x4 block carries prev_intra4x4_pred_mode_flag and
// rem_intra4x4_pred_mode; the mode is derived as in H.264: the predicted mode
// is the smaller of the modes of the left (A) and upper (B) 4x4 neighbours,
// or DC (2) if either neighbour is outside the picture; a neighbour in an
// Intra_16x16 macroblock counts as DC. With the flag set the predicted mode
// is used, otherwise rem if rem is below it, else rem + 1.
// The document only names this block and says it decodes the modes; the
// derivation is the standard's and the storage is this design's choice:
// the 16 modes of the current macroblock, the four modes of the right column
// of the macroblock to the left, and a line buffer with the four bottom-row
// modes of every macroblock of the row above (MB_COLS entries).
//
// Timing: mb_load captures the syntax (one cycle). The mode of block blk (z
// scan order) is on mode4 combinationally; commit stores it as decoded, which
// must happen before a later block asks for it. mb_end moves the macroblock's
// right-column and bottom-row modes into the neighbour stores.
module sed
  import intra_pkg::*;
#(
  parameter int MB_COLS = 120
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       mb_load,
  input  logic                       i4_in,
  input  logic [15:0]                prev_flag_in,
  input  logic [15:0][2:0]           rem_in,
  input  logic [1:0]                 i16_mode_in,
  input  logic [1:0]                 chroma_mode_in,
  input  logic [$clog2(MB_COLS)-1:0] mbx,
  input  logic                       mb_left_avail,
  input  logic                       mb_top_avail,
  input  logic [3:0]                 blk,
  input  logic                       commit,
  input  logic                       mb_end,
  output logic                       i4,
  output logic [3:0]                 mode4,
  output logic [3:0]                 i16_mode,
  output logic [3:0]                 chroma_mode
);
  logic [15:0]      prev_q;
  logic [15:0][2:0] rem_q;
  logic [1:0]       i16_q, chroma_q;
  logic [15:0][3:0] cur;
  logic [3:0][3:0]  leftcol;
  logic [3:0][3:0]  topbuf [MB_COLS];
  logic [3:0][3:0]  top_row;

  // z-scan index of 4x4 block (x, y)
  function automatic logic [3:0] zidx(input logic [1:0] x, input logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

  logic [1:0] bx, by;
  logic       av_a, av_b;
  logic [3:0] ma, mb, pred;

  always_comb begin
    bx = {blk[2], blk[0]};
    by = {blk[3], blk[1]};
    top_row = topbuf[mbx];
    if (bx != 2'd0) begin av_a = 1'b1; ma = cur[zidx(bx - 2'd1, by)]; end
    else            begin av_a = mb_left_avail; ma = leftcol[by]; end
    if (by != 2'd0) begin av_b = 1'b1; mb = cur[zidx(bx, by - 2'd1)]; end
    else            begin av_b = mb_top_avail; mb = top_row[bx]; end
    if (!av_a || !av_b) pred = M4_DC;
    else                pred = (ma < mb) ? ma : mb;
    if (prev_q[blk])                     mode4 = pred;
    else if ({1'b0, rem_q[blk]} < pred)  mode4 = {1'b0, rem_q[blk]};
    else                                 mode4 = {1'b0, rem_q[blk]} + 4'd1;
    i16_mode    = {2'b00, i16_q};
    chroma_mode = {2'b00, chroma_q};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      i4 <= 1'b0;
      prev_q <= '0;
      rem_q <= '0;
      i16_q <= '0;
      chroma_q <= '0;
      cur <= '0;
      leftcol <= '0;
    end else begin
      if (mb_load) begin
        i4       <= i4_in;
        prev_q   <= prev_flag_in;
        rem_q    <= rem_in;
        i16_q    <= i16_mode_in;
        chroma_q <= chroma_mode_in;
      end
      if (commit) cur[blk] <= mode4;
      if (mb_end)
        for (int j = 0; j < 4; j++) leftcol[j] <= i4 ? cur[zidx(2'd3, 2'(j))] : M4_DC;
    end
  end

  // line buffer of bottom-row modes (no reset: only read where the macroblock
  // above has been decoded)
  always_ff @(posedge clk) begin
    if (mb_end)
      for (int i = 0; i < 4; i++) topbuf[mbx][i] <= i4 ? cur[zidx(2'(i), 2'd3)] : M4_DC;
  end
endmodule
