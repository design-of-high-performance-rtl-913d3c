// controller: macroblock sequencer of the intra prediction circuit.
//
// Steps through the macroblocks of a picture in raster order and, for each,
// drives the other three blocks:
//   IDLE   accept the macroblock's syntax (mb_valid/mb_ready handshake); the
//          SED captures it and the NSB takes its new corner pixels.
//   LOAD   four cycles: read the upper reference pixels from the two line
//          SRAMs (Y words 2*mbx, 2*mbx+1 and the above-right word 2*mbx+2,
//          Cb word mbx, Cr word MB_COLS+mbx) into the NSB.
//   LUMA   Intra_4x4: sixteen PSP jobs in z-scan order. A block needs the
//          reconstructed pixels of the blocks before it, so it starts only
//          when no predicted group is outstanding after this cycle; the NSB
//          passes a group that comes back in this cycle straight on, so with
//          immediate reconstruction the jobs follow back to back, two cycles
//          per block (three for DC). Otherwise the controller stalls.
//          Intra_16x16: one PSP job.
//   CB, CR one chroma PSP job each.
//   DRAIN  wait for the last reconstructed groups.
//   WB     two cycles: write the macroblock's bottom rows from the NSB back
//          to the line SRAMs; the SED stores the macroblock's edge modes.
// The document names this block and its role only; the sequence and the
// timing are this design's. With reconstructed pixels returned in the cycle
// of their prediction a macroblock takes 1 + 4 + 33 cycles up to its last
// luma group (Intra_4x4: plus one per DC block; Intra_16x16: plus up to four
// preparation cycles), 9 to 11 for each chroma block and 3 to finish, in all
// 59 to 79 cycles, within the document's budget of 112 cycles per
// macroblock. Availability of the left, upper and upper-right macroblocks
// follows from the position (all macroblocks are intra coded).
module controller
  import intra_pkg::*;
#(
  parameter int MB_COLS = 120,   // 1920 / 16
  parameter int MB_ROWS = 68,    // 1088 / 16
  localparam int XW = $clog2(MB_COLS),
  localparam int YW = $clog2(MB_ROWS),
  localparam int YAW = $clog2(2 * MB_COLS)
) (
  input  logic           clk,
  input  logic           rst_n,
  // macroblock syntax handshake
  input  logic           mb_valid,
  output logic           mb_ready,
  output logic           mb_begin,
  output logic           mb_done,
  output logic [XW-1:0]  mbx,
  output logic [YW-1:0]  mby,
  output logic           mb_left_avail,
  output logic           mb_top_avail,
  output logic           mb_tr_avail,
  // SED
  input  logic           i4,
  input  logic [3:0]     mode4,
  input  logic [3:0]     i16_mode,
  input  logic [3:0]     chroma_mode,
  output logic [3:0]     blk,           // 4x4 block to query / start next
  output logic [3:0]     pblk,          // 4x4 block whose groups the PSP outputs
  output logic           sed_commit,
  output logic           sed_mb_end,
  // line SRAMs
  output logic           y_re,
  output logic [YAW-1:0] y_raddr,
  output logic           c_re,
  output logic [YAW-1:0] c_raddr,
  output logic           y_we,
  output logic [YAW-1:0] y_waddr,
  output logic           y_wsel,        // 0: T[0..7], 1: T[8..15]
  output logic           c_we,
  output logic [YAW-1:0] c_waddr,
  output logic           c_wsel,        // 0: Cb, 1: Cr
  // NSB
  output logic           ld_y_we,
  output logic [1:0]     ld_y_idx,
  output logic           ld_c_we,
  output logic           ld_c_cr,
  output cls_e           q_cls,
  output logic           q_cr,
  // PSP
  input  logic           psp_busy,
  input  logic           psp_grp_valid,
  input  logic           psp_grp_last,
  output logic           psp_start,
  output logic [3:0]     psp_mode,
  output comp_e          comp,
  // reconstructed groups coming back
  input  logic           rec_valid,
  output logic           stall          // a 4x4 block waits for reconstruction
);
  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_LUMA, S_CB, S_CR, S_DRAIN, S_WB} state_e;
  state_e     state;
  logic [1:0] cnt;
  logic       issued;
  logic [6:0] pend;        // predicted groups not yet reconstructed
  logic       pend_zero;
  logic [6:0] pend_next;   // pend after this cycle's groups and returns
  logic       psp_ready;   // the PSP takes a start in this cycle
  logic       all_issued;  // all sixteen 4x4 jobs started

  assign pend_zero     = (pend == '0);
  assign pend_next     = pend + 7'(psp_grp_valid) - 7'(rec_valid);
  assign psp_ready     = !psp_busy || psp_grp_last;
  assign mb_left_avail = (mbx != '0);
  assign mb_top_avail  = (mby != '0);
  assign mb_tr_avail   = (mby != '0) && (mbx != XW'(MB_COLS - 1));
  assign mb_ready      = (state == S_IDLE);
  assign mb_begin      = (state == S_IDLE) && mb_valid;

  always_comb begin
    y_re = 1'b0; y_raddr = '0; c_re = 1'b0; c_raddr = '0;
    ld_y_we = 1'b0; ld_y_idx = '0; ld_c_we = 1'b0; ld_c_cr = 1'b0;
    y_we = 1'b0; y_waddr = '0; y_wsel = 1'b0; c_we = 1'b0; c_waddr = '0; c_wsel = 1'b0;
    psp_start = 1'b0; psp_mode = '0; sed_commit = 1'b0; sed_mb_end = 1'b0; mb_done = 1'b0;
    stall = 1'b0;
    q_cls = CLS_L4; q_cr = 1'b0; comp = COMP_Y;
    unique case (state)
      S_LOAD: begin
        y_re    = (cnt != 2'd3);
        y_raddr = YAW'(2 * int'(mbx)) + YAW'(cnt);
        if (cnt == 2'd2 && mbx == XW'(MB_COLS - 1)) y_re = 1'b0;   // nothing to the right
        c_re    = (cnt < 2'd2);
        c_raddr = cnt[0] ? YAW'(MB_COLS + int'(mbx)) : YAW'(mbx);
        ld_y_we  = (cnt != 2'd0);
        ld_y_idx = cnt - 2'd1;
        ld_c_we  = (cnt == 2'd1) || (cnt == 2'd2);
        ld_c_cr  = (cnt == 2'd2);
      end
      S_LUMA: begin
        q_cls    = i4 ? CLS_L4 : CLS_L16;
        psp_mode = i4 ? mode4 : i16_mode;
        if (i4) begin
          if (psp_ready && !all_issued) begin
            if (pend_next == '0) begin
              psp_start  = 1'b1;
              sed_commit = 1'b1;
            end else begin
              stall = 1'b1;
            end
          end
        end else begin
          psp_start = !psp_busy && !issued;
        end
      end
      S_CB, S_CR: begin
        q_cls     = CLS_CH;
        q_cr      = (state == S_CR);
        comp      = (state == S_CR) ? COMP_CR : COMP_CB;
        psp_mode  = chroma_mode;
        psp_start = !psp_busy && !issued;
      end
      S_WB: begin
        y_we    = 1'b1;
        y_waddr = YAW'(2 * int'(mbx)) + YAW'(cnt[0]);
        y_wsel  = cnt[0];
        c_we    = 1'b1;
        c_waddr = cnt[0] ? YAW'(MB_COLS + int'(mbx)) : YAW'(mbx);
        c_wsel  = cnt[0];
        sed_mb_end = cnt[0];
        mb_done    = cnt[0];
      end
      default: ;
    endcase
    if (state == S_LUMA && i4) comp = COMP_Y;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      cnt    <= '0;
      issued <= 1'b0;
      blk    <= '0;
      pblk   <= '0;
      all_issued <= 1'b0;
      mbx    <= '0;
      mby    <= '0;
      pend   <= '0;
    end else begin
      pend <= pend + 7'(psp_grp_valid) - 7'(rec_valid);
      if (psp_start) issued <= 1'b1;
      unique case (state)
        S_IDLE: if (mb_valid) begin state <= S_LOAD; cnt <= '0; end
        S_LOAD: begin
          cnt <= cnt + 2'd1;
          if (cnt == 2'd3) begin
            state <= S_LUMA; blk <= '0; issued <= 1'b0; all_issued <= 1'b0;
          end
        end
        S_LUMA: begin
          if (psp_start && i4) begin
            pblk <= blk;
            blk  <= blk + 4'd1;
            if (blk == 4'd15) all_issued <= 1'b1;
          end
          if (psp_grp_last && (!i4 || all_issued)) begin
            state  <= S_CB;
            issued <= 1'b0;
          end
        end
        S_CB: if (psp_grp_last) begin state <= S_CR; issued <= 1'b0; end
        S_CR: if (psp_grp_last) begin state <= S_DRAIN; issued <= 1'b0; end
        S_DRAIN: if (pend_zero) begin state <= S_WB; cnt <= '0; end
        S_WB: begin
          cnt <= cnt + 2'd1;
          if (cnt[0]) begin
            state <= S_IDLE;
            if (mbx == XW'(MB_COLS - 1)) begin
              mbx <= '0;
              mby <= (mby == YW'(MB_ROWS - 1)) ? '0 : mby + 1'b1;
            end else begin
              mbx <= mbx + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a reconstructed group never arrives without a prediction waiting for it
  always_ff @(posedge clk)
    if (rst_n) assert (!(rec_valid && pend_zero && !psp_grp_valid))
      else $error("reconstructed group without an outstanding prediction");
endmodule
