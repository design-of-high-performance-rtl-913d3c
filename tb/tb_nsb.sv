// tb_nsb: runs the neighbouring samples buffer through a row of three
// macroblocks (Intra_4x4 and Intra_16x16 at random) the way the controller
// does: corner hand-over, line SRAM loads, a neighbour query before each
// block, random reconstructed pixels after it. A strip of picture kept here
// gives the expected neighbours of every query (including the above-right
// rules of 4x4 blocks) and the expected write-back rows.
// While the last group of a 4x4 block comes back, the block to its right is
// queried as well: it must see the new pixels in the same cycle.
module tb_nsb;
  import intra_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mb_begin, mb_i4, mb_top_avail, mb_left_avail, mb_tr_avail;
  logic ld_y_we, ld_c_we, ld_c_cr;
  logic [1:0] ld_y_idx;
  logic [63:0] ld_y_data, ld_c_data;
  cls_e q_cls;
  logic q_cr;
  logic [1:0] q_bx, q_by;
  nbr_t nbr;
  logic avail_top, avail_left;
  logic rec_valid;
  comp_e rec_comp;
  logic [3:0] rec_x, rec_y;
  pix_t [7:0] rec_pix;
  logic [63:0] wb_y0, wb_y1, wb_cb, wb_cr;

  nsb dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sy [17][68];          // luma rows -1..15 (index +1), columns 0..67
  int sc [2][9][32];        // chroma rows -1..7
  bit dec [4][4];

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mb_begin = 0; mb_i4 = 0; ld_y_we = 0; ld_c_we = 0; ld_c_cr = 0; ld_y_idx = 0;
    ld_y_data = 0; ld_c_data = 0; q_cls = CLS_L4; q_cr = 0; q_bx = 0; q_by = 0;
    rec_valid = 0; rec_comp = COMP_Y; rec_x = 0; rec_y = 0; rec_pix = 0;
    mb_top_avail = 1; mb_left_avail = 0; mb_tr_avail = 1;
    for (int x = 0; x < 68; x++) sy[0][x] = $urandom_range(255);
    for (int c = 0; c < 2; c++) for (int x = 0; x < 32; x++) sc[c][0][x] = $urandom_range(255);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 4; k++) begin
      int bx0;
      bx0 = 16 * k;
      mb_i4 = (k % 2 == 0) ? 1'b1 : 1'($urandom_range(1));
      mb_left_avail = k > 0; mb_tr_avail = k < 3;
      mb_begin = 1;
      @(negedge clk);
      mb_begin = 0;
      // loads
      for (int w = 0; w < 3; w++) begin
        ld_y_we = 1; ld_y_idx = 2'(w);
        for (int i = 0; i < 8; i++) ld_y_data[8*i +: 8] = 8'(sy[0][bx0 + 8*w + i]);
        ld_c_we = (w < 2); ld_c_cr = (w == 1);
        for (int i = 0; i < 8; i++) ld_c_data[8*i +: 8] = 8'(sc[w == 1][0][8*k + i]);
        @(negedge clk);
      end
      ld_y_we = 0; ld_c_we = 0;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) dec[i][j] = 0;
      if (mb_i4) begin
        for (int z = 0; z < 16; z++) begin
          int bx, by, x0, y0;
          bit tr;
          bx = ((z >> 2) & 1) * 2 + (z & 1); by = ((z >> 3) & 1) * 2 + ((z >> 1) & 1);
          x0 = bx0 + 4 * bx; y0 = 4 * by;
          q_cls = CLS_L4; q_bx = 2'(bx); q_by = 2'(by);
          #1;
          if (by == 0) tr = (bx < 3) ? 1'b1 : (k < 3);
          else tr = (bx < 3) && dec[bx + 1][by - 1];
          expect_eq(int'(avail_top), int'(1), "4x4 avail_top");
          expect_eq(int'(avail_left), int'((k > 0) || (bx > 0)), "4x4 avail_left");
          for (int i = 0; i < 4; i++) begin
            expect_eq(int'(nbr.top[i]), int'(sy[y0][x0 + i]), $sformatf("4x4 blk %0d top %0d", z, i));
            expect_eq(int'(nbr.top[4 + i]), int'(tr ? sy[y0][x0 + 4 + i] : sy[y0][x0 + 3]), $sformatf("4x4 blk %0d top-right %0d", z, i));
            if (x0 > 0) expect_eq(int'(nbr.left[i]), int'(sy[y0 + 1 + i][x0 - 1]), $sformatf("4x4 blk %0d left %0d", z, i));
          end
          if (x0 > 0) expect_eq(int'(nbr.corner), int'(sy[y0][x0 - 1]), $sformatf("4x4 blk %0d corner", z));
          // reconstruct the block: two groups of two columns
          for (int h = 0; h < 2; h++) begin
            rec_valid = 1; rec_comp = COMP_Y; rec_x = 4'(4 * bx + 2 * h); rec_y = 4'(4 * by);
            for (int p = 0; p < 8; p++) begin
              rec_pix[p] = 8'($urandom);
              sy[y0 + 1 + p % 4][x0 + 2 * h + p / 4] = int'(rec_pix[p]);
            end
            // bypass: the block to the right sees this group in the same cycle
            if (h == 1 && bx < 3) begin
              q_bx = 2'(bx + 1); q_by = 2'(by);
              #1;
              for (int i = 0; i < 4; i++)
                expect_eq(int'(nbr.left[i]), int'(rec_pix[4 + i]), $sformatf("4x4 blk %0d bypass left %0d", z, i));
            end
            @(negedge clk);
          end
          rec_valid = 0;
          dec[bx][by] = 1;
        end
      end else begin
        q_cls = CLS_L16;
        #1;
        for (int i = 0; i < 16; i++) begin
          expect_eq(int'(nbr.top[i]), int'(sy[0][bx0 + i]), "16x16 top");
          if (k > 0) expect_eq(int'(nbr.left[i]), int'(sy[1 + i][bx0 - 1]), "16x16 left");
        end
        if (k > 0) expect_eq(int'(nbr.corner), int'(sy[0][bx0 - 1]), "16x16 corner");
        for (int g = 0; g < 32; g++) begin
          rec_valid = 1; rec_comp = COMP_Y; rec_x = 4'(g / 2); rec_y = 4'(8 * (g % 2));
          for (int p = 0; p < 8; p++) begin
            rec_pix[p] = 8'($urandom);
            sy[1 + 8 * (g % 2) + p][bx0 + g / 2] = int'(rec_pix[p]);
          end
          @(negedge clk);
        end
        rec_valid = 0;
      end
      for (int c = 0; c < 2; c++) begin
        q_cls = CLS_CH; q_cr = 1'(c);
        #1;
        for (int i = 0; i < 8; i++) begin
          expect_eq(int'(nbr.top[i]), int'(sc[c][0][8 * k + i]), "chroma top");
          if (k > 0) expect_eq(int'(nbr.left[i]), int'(sc[c][1 + i][8 * k - 1]), "chroma left");
        end
        if (k > 0) expect_eq(int'(nbr.corner), int'(sc[c][0][8 * k - 1]), "chroma corner");
        for (int g = 0; g < 8; g++) begin
          rec_valid = 1'b1; rec_comp = (c != 0) ? COMP_CR : COMP_CB; rec_x = 4'(g); rec_y = '0;
          for (int p = 0; p < 8; p++) begin
            rec_pix[p] = 8'($urandom);
            sc[c][1 + p][8 * k + g] = int'(rec_pix[p]);
          end
          @(negedge clk);
        end
        rec_valid = 0;
      end
      for (int i = 0; i < 8; i++) begin
        expect_eq(int'(wb_y0[8*i +: 8]), int'(sy[16][bx0 + i]), "write-back Y0");
        expect_eq(int'(wb_y1[8*i +: 8]), int'(sy[16][bx0 + 8 + i]), "write-back Y1");
        expect_eq(int'(wb_cb[8*i +: 8]), int'(sc[0][8][8 * k + i]), "write-back Cb");
        expect_eq(int'(wb_cr[8*i +: 8]), int'(sc[1][8][8 * k + i]), "write-back Cr");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
