// tb_controller: the controller alone, with a simple model of the PSP
// (a job of G output groups: 2 for a luma 4x4 block, 32 for 16x16, 8 for
// chroma) and of the reconstruction path. Over two pictures of 3x2
// macroblocks it checks the line SRAM read and write addresses, the job
// sequence (16 4x4 jobs in z order with a mode commit each, or one 16x16 job,
// then Cb and Cr), that no 4x4 block starts before all earlier groups came
// back reconstructed, that stalls happen when they are held back, the
// macroblock position and availability flags, and the cycles per
// macroblock against the budget of 112.
module tb_controller;
  import intra_pkg::*;
  localparam int COLS = 3, ROWS = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mb_valid, mb_ready, mb_begin, mb_done;
  logic [1:0] mbx;
  logic [0:0] mby;
  logic mb_left_avail, mb_top_avail, mb_tr_avail;
  logic i4;
  logic [3:0] mode4, i16_mode, chroma_mode, blk, pblk, psp_mode;
  logic sed_commit, sed_mb_end;
  logic y_re, c_re, y_we, c_we, y_wsel, c_wsel;
  logic [2:0] y_raddr, c_raddr, y_waddr, c_waddr;
  logic ld_y_we, ld_c_we, ld_c_cr;
  logic [1:0] ld_y_idx;
  cls_e q_cls;
  logic q_cr;
  logic psp_busy, psp_grp_valid, psp_grp_last, psp_start;
  comp_e comp;
  logic rec_valid, stall;

  controller #(.MB_COLS(COLS), .MB_ROWS(ROWS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int left_groups = 0, pending = 0, n_stall = 0, n_start = 0;
  bit hold;
  int starts [$];     // {cls, cr, blk}
  int yreads [$], creads [$], ywrites [$], cwrites [$];

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // what the controller did at each rising edge
  logic e_gv, e_rec, e_gl, e_yre, e_cre, e_ywe, e_cwe, e_ywsel, e_cwsel, e_stall, e_start, e_commit, e_cr;
  logic [2:0] e_yra, e_cra, e_ywa, e_cwa;
  cls_e e_cls;
  logic [3:0] e_blk, e_pblk, e_mode;
  int cur_blk = -1;   // 4x4 block of the running job, -1 for other jobs
  always @(posedge clk) begin
    e_gv <= psp_grp_valid; e_rec <= rec_valid; e_gl <= psp_grp_last;
    e_yre <= y_re; e_cre <= c_re; e_ywe <= y_we; e_cwe <= c_we; e_ywsel <= y_wsel; e_cwsel <= c_wsel;
    e_yra <= y_raddr; e_cra <= c_raddr; e_ywa <= y_waddr; e_cwa <= c_waddr;
    e_stall <= stall; e_start <= psp_start; e_commit <= sed_commit; e_cr <= q_cr;
    e_cls <= q_cls; e_blk <= blk; e_pblk <= pblk; e_mode <= psp_mode;
  end

  // PSP and reconstruction model, updated at the negative edge
  always @(negedge clk) begin
    if (!rst_n) begin
      psp_busy = 0; psp_grp_valid = 0; psp_grp_last = 0; rec_valid = 0;
    end else begin
      // effects of the rising edge just passed
      if (e_gv) pending++;
      if (e_rec) pending--;
      if (e_gl) psp_busy = 0;
      if (e_yre) yreads.push_back(int'(e_yra));
      if (e_cre) creads.push_back(int'(e_cra));
      if (e_ywe) ywrites.push_back(e_ywa * 2 + e_ywsel);
      if (e_cwe) cwrites.push_back(e_cwa * 2 + e_cwsel);
      if (e_stall) n_stall++;
      // groups leave with the block index of their own job
      if (e_gv && cur_blk >= 0) expect_eq(int'(e_pblk), int'(cur_blk), "output block index");
      if (e_start) begin
        n_start++;
        starts.push_back(int'(e_cls) * 100 + int'(e_cr) * 20 + (e_cls == CLS_L4 ? int'(e_blk) : 0));
        if (e_cls == CLS_L4) begin
          checks++;
          if (pending != 0) begin failures++; $display("4x4 block started with groups outstanding"); end
          if (!e_commit) begin failures++; $display("no mode commit"); end
        end
        expect_eq(int'(e_mode), (e_cls == CLS_CH) ? 3 : (e_cls == CLS_L16) ? 1 : 7, "psp mode");
        psp_busy = 1;
        cur_blk = (e_cls == CLS_L4) ? int'(e_blk) : -1;
        left_groups = (e_cls == CLS_L4) ? 2 : (e_cls == CLS_L16) ? 32 : 8;
      end
      psp_grp_valid = 0; psp_grp_last = 0;
      if (psp_busy) begin
        psp_grp_valid = 1;
        left_groups--;
        psp_grp_last = (left_groups == 0);
      end
      rec_valid = (pending + psp_grp_valid > 0) && !(hold && $urandom_range(2) != 0);
    end
  end

  initial begin
    mb_valid = 0; i4 = 0; mode4 = 4'd7; i16_mode = 4'd1; chroma_mode = 4'd3; hold = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int my = 0; my < ROWS; my++)
        for (int mx = 0; mx < COLS; mx++) begin
          int cyc;
          hold = (f == 1);
          i4 = (mx + my + f) % 2 == 0;
          starts.delete(); yreads.delete(); creads.delete(); ywrites.delete(); cwrites.delete();
          expect_eq(int'(mbx), int'(mx), "mbx"); expect_eq(int'(mby), int'(my), "mby");
          expect_eq(int'(mb_left_avail), int'(mx > 0), "left avail");
          expect_eq(int'(mb_top_avail), int'(my > 0), "top avail");
          expect_eq(int'(mb_tr_avail), int'(my > 0 && mx < COLS - 1), "top-right avail");
          expect_eq(int'(mb_ready), int'(1), "ready when idle");
          mb_valid = 1;
          @(negedge clk);
          mb_valid = 0;
          cyc = 1;
          while (!mb_done) begin @(negedge clk); cyc++; end
          @(negedge clk);
          #1;
          if (f == 0) begin
            checks++;
            if (cyc > 112) begin failures++; $display("MB took %0d cycles", cyc); end
          end
          // read / write addresses
          expect_eq(int'(yreads.size()), int'(mx < COLS - 1 ? 3 : 2), "Y reads");
          for (int i = 0; i < yreads.size(); i++) expect_eq(int'(yreads[i]), int'(2 * mx + i), "Y read address");
          expect_eq(int'(creads.size()), int'(2), "C reads");
          expect_eq(int'(creads[0]), int'(mx), "Cb read address"); expect_eq(int'(creads[1]), int'(COLS + mx), "Cr read address");
          expect_eq(int'(ywrites.size()), int'(2), "Y writes");
          expect_eq(int'(ywrites[0]), int'(2 * (2 * mx)), "Y write 0"); expect_eq(int'(ywrites[1]), int'(2 * (2 * mx + 1) + 1), "Y write 1");
          expect_eq(int'(cwrites.size()), int'(2), "C writes");
          expect_eq(int'(cwrites[0]), int'(2 * mx), "Cb write"); expect_eq(int'(cwrites[1]), int'(2 * (COLS + mx) + 1), "Cr write");
          // job sequence
          expect_eq(int'(starts.size()), int'(i4 ? 18 : 3), "number of jobs");
          if (i4) for (int z = 0; z < 16; z++) expect_eq(int'(starts[z]), int'(z), "4x4 job order");
          else expect_eq(int'(starts[0]), int'(100), "16x16 job");
          expect_eq(int'(starts[starts.size() - 2]), int'(200), "Cb job");
          expect_eq(int'(starts[starts.size() - 1]), int'(220), "Cr job");
        end
    checks++;
    if (n_stall == 0) begin failures++; $display("no stall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
