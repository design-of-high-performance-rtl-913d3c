// tb_intra_core: end-to-end test bench body for intra_pred_top, used by the
// wrappers tb_intra_pred_top (small picture) and tb_intra_pred_full (one
// 1920x1088 picture at the design's default size).
//
// It plays the rest of the decoder: it chooses random legal prediction modes
// for every macroblock (about half Intra_4x4), encodes them as the
// bitstream's prev_intra4x4_pred_mode_flag / rem_intra4x4_pred_mode syntax
// with its own mode-prediction model, and returns every predicted group as
// prediction + random residual, clipped, in order, after a random delay (none
// at all in the first picture, so that the cycle budget per macroblock can be
// checked). It keeps its own reconstructed picture and predicts every block
// again from it with the reference model, pixel by pixel. It also counts how
// often each mechanism happened: every prediction mode of every block class,
// the DC cases by neighbour availability, the substitution of missing
// above-right pixels, stalls waiting for reconstruction and reuse of the
// common registers; a mechanism that never happened counts as a failure.
module tb_intra_core #(
  parameter int COLS   = 3,       // macroblocks per row
  parameter int ROWS   = 3,       // macroblock rows
  parameter int FRAMES = 2,
  parameter int MAX_MB_CYCLES = 112
) (
  output int checks,
  output int failures,
  output bit done
);
  import intra_pkg::*;
  import intra_ref_pkg::*;

  localparam int W = COLS * 16, H = ROWS * 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mb_valid, mb_ready, mb_i4;
  logic [15:0] mb_prev_flag;
  logic [15:0][2:0] mb_rem;
  logic [1:0] mb_i16_mode, mb_chroma_mode;
  logic pred_valid;
  comp_e pred_comp;
  logic [3:0] pred_x, pred_y;
  pix_t [7:0] pred_pix;
  logic rec_valid;
  comp_e rec_comp;
  logic [3:0] rec_x, rec_y;
  pix_t [7:0] rec_pix;
  logic mb_done;
  logic mon_stall, mon_reuse;   // controller stall, PSP register reuse

  // at the design's default picture size the top keeps its own defaults
  if (COLS == 120 && ROWS == 68) begin : g_full
    intra_pred_top dut (.*);
    assign mon_stall = dut.u_ctrl.stall;
    assign mon_reuse = dut.u_psp.reuse;
  end else begin : g_small
    intra_pred_top #(.MB_COLS(COLS), .MB_ROWS(ROWS)) dut (.*);
    assign mon_stall = dut.u_ctrl.stall;
    assign mon_reuse = dut.u_psp.reuse;
  end

  always #5 clk = ~clk;

  // reconstructed picture: [comp][y][x]
  byte unsigned fy [H][W];
  byte unsigned fc [2][H/2][W/2];
  int  m4 [ROWS*4][COLS*4];          // decoded 4x4 luma modes (2 in Intra_16x16 MBs)
  bit  dec [ROWS*4][COLS*4];         // 4x4 luma block reconstructed

  // current macroblock
  int  cur_mx, cur_my, cur_frame;
  bit  cur_i4;
  int  cur_m4 [16];
  int  cur_m16, cur_mc;

  // counters
  int  cnt_l4 [9], cnt_l16 [4], cnt_ch [4];
  int  cnt_dc4 [4], cnt_dc16 [4], cnt_dcc [4];   // index {top, left}
  int  cnt_trsub = 0, cnt_stall = 0, cnt_reuse = 0, cnt_mb = 0;
  int  max_cycles = 0;
  bit  delays_on = 1'b0;

  typedef struct { comp_e c; int x; int y; pix_t [7:0] p; } grp_s;
  grp_s q[$];

  initial begin
    int wd;
    wd = COLS * ROWS * FRAMES * 400 + 1000;
    repeat (wd) @(posedge clk);
    failures++;
    $display("watchdog expired");
    done = 1'b1;
  end

  function automatic int zx(int z); return ((z >> 2) & 1) * 2 + (z & 1); endfunction
  function automatic int zy(int z); return ((z >> 3) & 1) * 2 + ((z >> 1) & 1); endfunction

  // choose modes and syntax of the macroblock (mx, my)
  task automatic make_mb(input int mx, input int my);
    bit top, left;
    top = my > 0; left = mx > 0;
    cur_mx = mx; cur_my = my;
    cur_i4 = 1'($urandom_range(1));
    mb_i4 = cur_i4;
    mb_prev_flag = '0; mb_rem = '0;
    if (cur_i4) begin
      for (int z = 0; z < 16; z++) begin
        int gx, gy, a, b, pred, m, legal [$];
        bit bt, bl;
        gx = mx * 4 + zx(z); gy = my * 4 + zy(z);
        bt = gy > 0; bl = gx > 0;
        legal = {2};
        if (bt) legal = {legal, 0, 3, 7};
        if (bl) legal = {legal, 1, 8};
        if (bt && bl) legal = {legal, 4, 5, 6};
        m = legal[$urandom_range(legal.size() - 1)];
        a = bl ? m4[gy][gx-1] : -1;
        b = bt ? m4[gy-1][gx] : -1;
        pred = (a < 0 || b < 0) ? 2 : (a < b ? a : b);
        if (m == pred) mb_prev_flag[z] = 1'b1;
        else mb_rem[z] = 3'(m < pred ? m : m - 1);
        m4[gy][gx] = m;
        cur_m4[z] = m;
      end
    end else begin
      int legal [$];
      legal = {2};
      if (top) legal = {legal, 0};
      if (left) legal = {legal, 1};
      if (top && left) legal = {legal, 3};
      cur_m16 = legal[$urandom_range(legal.size() - 1)];
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) m4[my*4+i][mx*4+j] = 2;
      // random syntax for the unused 4x4 fields
      mb_prev_flag = 16'($urandom);
      for (int z = 0; z < 16; z++) mb_rem[z] = 3'($urandom_range(7));
    end
    begin
      int legal [$];
      legal = {0};
      if (left) legal = {legal, 1};
      if (top) legal = {legal, 2};
      if (top && left) legal = {legal, 3};
      cur_mc = legal[$urandom_range(legal.size() - 1)];
    end
    mb_i16_mode = 2'(cur_m16);
    mb_chroma_mode = 2'(cur_mc);
  endtask

  // reference prediction of the block a group belongs to
  blk_t rblk;
  int   rkey = -1;
  int   rx0, ry0;   // block origin inside the macroblock component

  task automatic ref_for_group(input comp_e c, input int gx, input int gy);
    int key, t[16], l[16], s, x0, y0;
    bit at, al;
    for (int i = 0; i < 16; i++) begin t[i] = 0; l[i] = 0; end
    s = 0;
    if (c == COMP_Y && cur_i4) begin
      int bx, by, t8[8], l4[4], m;
      bit tr;
      bx = gx / 4; by = gy / 4;
      key = (cur_my * COLS + cur_mx) * 64 + by * 4 + bx;
      if (key == rkey) return;
      rx0 = bx * 4; ry0 = by * 4;
      x0 = cur_mx * 16 + rx0; y0 = cur_my * 16 + ry0;
      at = y0 > 0; al = x0 > 0;
      tr = at && (x0 + 4 < W) && dec[(y0 - 1) / 4][(x0 + 4) / 4];
      for (int i = 0; i < 4; i++) begin
        t8[i] = at ? int'(fy[y0-1][x0+i]) : 0;
        l4[i] = al ? int'(fy[y0+i][x0-1]) : 0;
      end
      for (int i = 0; i < 4; i++) t8[4+i] = tr ? int'(fy[y0-1][x0+4+i]) : t8[3];
      s = (at && al) ? int'(fy[y0-1][x0-1]) : 0;
      m = cur_m4[{by[1], bx[1], by[0], bx[0]}];
      rblk = ref4(m, s, t8, l4, at, al);
      cnt_l4[m]++;
      if (m == 2) cnt_dc4[{at, al}]++;
      if ((m == 3 || m == 7) && !tr) cnt_trsub++;
    end else if (c == COMP_Y) begin
      key = (cur_my * COLS + cur_mx) * 64 + 16;
      if (key == rkey) return;
      rx0 = 0; ry0 = 0;
      x0 = cur_mx * 16; y0 = cur_my * 16;
      at = y0 > 0; al = x0 > 0;
      for (int i = 0; i < 16; i++) begin
        t[i] = at ? int'(fy[y0-1][x0+i]) : 0;
        l[i] = al ? int'(fy[y0+i][x0-1]) : 0;
      end
      s = (at && al) ? int'(fy[y0-1][x0-1]) : 0;
      rblk = refbig(cur_m16, 1'b0, s, t, l, at, al);
      cnt_l16[cur_m16]++;
      if (cur_m16 == 2) cnt_dc16[{at, al}]++;
    end else begin
      int ci;
      ci = (c == COMP_CR) ? 1 : 0;
      key = (cur_my * COLS + cur_mx) * 64 + 17 + ci;
      if (key == rkey) return;
      rx0 = 0; ry0 = 0;
      x0 = cur_mx * 8; y0 = cur_my * 8;
      at = y0 > 0; al = x0 > 0;
      for (int i = 0; i < 8; i++) begin
        t[i] = at ? int'(fc[ci][y0-1][x0+i]) : 0;
        l[i] = al ? int'(fc[ci][y0+i][x0-1]) : 0;
      end
      s = (at && al) ? int'(fc[ci][y0-1][x0-1]) : 0;
      rblk = refbig(cur_mc, 1'b1, s, t, l, at, al);
      cnt_ch[cur_mc]++;
      if (cur_mc == 0) cnt_dcc[{at, al}]++;
    end
    rkey = key;
  endtask

  // feed macroblocks
  initial begin
    int mbs, cyc_mb;
    checks = 0; failures = 0; done = 1'b0;
    for (int y = 0; y < ROWS * 4; y++) for (int x = 0; x < COLS * 4; x++) begin m4[y][x] = 2; dec[y][x] = 0; end
    mb_valid = 1'b0;
    make_mb(0, 0);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < FRAMES; f++) begin
      cur_frame = f;
      for (int y = 0; y < ROWS * 4; y++) for (int x = 0; x < COLS * 4; x++) dec[y][x] = 0;
      for (int my = 0; my < ROWS; my++)
        for (int mx = 0; mx < COLS; mx++) begin
          // reconstruction comes back at once in the first picture (in the
          // upper half of a single picture), after random delays afterwards
          delays_on = (FRAMES > 1) ? (f > 0) : (my >= ROWS / 2);
          make_mb(mx, my);
          rkey = -1;
          mb_valid = 1'b1;
          @(posedge clk);
          while (!mb_ready) @(posedge clk);
          @(negedge clk);
          mb_valid = 1'b0;
          cyc_mb = 1;
          while (!mb_done) begin @(negedge clk); cyc_mb++; end
          // the macroblock is finished: all of it counts as decoded
          for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) dec[my*4+i][mx*4+j] = 1;
          cnt_mb++;
          if (!delays_on) begin
            if (cyc_mb > max_cycles) max_cycles = cyc_mb;
            checks++;
            if (cyc_mb + 1 > MAX_MB_CYCLES) begin
              failures++;
              $display("MB (%0d,%0d) took %0d cycles", mx, my, cyc_mb + 1);
            end
          end
        end
    end
    @(negedge clk);
    // mechanisms
    for (int m = 0; m < 9; m++) begin checks++; if (cnt_l4[m] == 0) begin failures++; $display("luma 4x4 mode %0d never used", m); end end
    for (int m = 0; m < 4; m++) begin checks++; if (cnt_l16[m] == 0) begin failures++; $display("luma 16x16 mode %0d never used", m); end end
    for (int m = 0; m < 4; m++) begin checks++; if (cnt_ch[m] == 0) begin failures++; $display("chroma mode %0d never used", m); end end
    checks++; if (cnt_trsub == 0) begin failures++; $display("above-right substitution never used"); end
    checks++; if (cnt_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (cnt_reuse == 0) begin failures++; $display("no register reuse"); end
    checks++; if (cnt_dc4[3] == 0 || cnt_dc4[0] + cnt_dc4[1] + cnt_dc4[2] == 0) begin failures++; $display("4x4 DC cases missing"); end
    checks++; if (cnt_dcc[3] == 0 || cnt_dcc[0] == 0) begin failures++; $display("chroma DC cases missing"); end
    $display("macroblocks %0d, max cycles per macroblock %0d (no reconstruction delay)", cnt_mb, max_cycles + 1);
    $write("luma 4x4 modes:");   foreach (cnt_l4[m])  $write(" %0d", cnt_l4[m]);
    $write("\nluma 16x16 modes:"); foreach (cnt_l16[m]) $write(" %0d", cnt_l16[m]);
    $write("\nchroma modes:");     foreach (cnt_ch[m])  $write(" %0d", cnt_ch[m]);
    $write("\nDC with {top,left} = 00 01 10 11: 4x4");
    foreach (cnt_dc4[m])  $write(" %0d", cnt_dc4[m]);
    $write(", 16x16");  foreach (cnt_dc16[m]) $write(" %0d", cnt_dc16[m]);
    $write(", chroma"); foreach (cnt_dcc[m])  $write(" %0d", cnt_dcc[m]);
    $write("\n");
    $display("above-right substitutions %0d, stalls %0d, register reuse groups %0d", cnt_trsub, cnt_stall, cnt_reuse);
    done = 1'b1;
  end

  // check predictions, return reconstructions
  always @(negedge clk) begin
    if (rst_n) begin
      if (mon_stall) cnt_stall++;
      if (pred_valid) begin
        grp_s g;
        if (mon_reuse) cnt_reuse++;
        ref_for_group(pred_comp, int'(pred_x), int'(pred_y));
        g.c = pred_comp; g.x = int'(pred_x); g.y = int'(pred_y);
        for (int k = 0; k < 8; k++) begin
          int x, y, r;
          if (pred_comp == COMP_Y && cur_i4) begin x = int'(pred_x) + k / 4; y = int'(pred_y) + k % 4; end
          else begin x = int'(pred_x); y = int'(pred_y) + k; end
          checks++;
          if (int'(pred_pix[k]) != rblk[y - ry0][x - rx0]) begin
            failures++;
            if (failures < 20)
              $display("MB (%0d,%0d) comp %0d pixel (%0d,%0d): got %0d expected %0d",
                       cur_mx, cur_my, pred_comp, x, y, pred_pix[k], rblk[y - ry0][x - rx0]);
          end
          r = ($urandom_range(15) == 0) ? int'($urandom_range(510)) - 255 : int'($urandom_range(40)) - 20;
          g.p[k] = pix_t'(clip(int'(pred_pix[k]) + r));
        end
        q.push_back(g);
      end
      rec_valid = 1'b0;
      if (q.size() > 0 && (!delays_on || $urandom_range(2) == 0)) begin
        grp_s g;
        g = q.pop_front();
        rec_valid = 1'b1; rec_comp = g.c; rec_x = 4'(g.x); rec_y = 4'(g.y); rec_pix = g.p;
        for (int k = 0; k < 8; k++) begin
          int x, y;
          if (g.c == COMP_Y && cur_i4) begin x = g.x + k / 4; y = g.y + k % 4; end
          else begin x = g.x; y = g.y + k; end
          if (g.c == COMP_Y) fy[cur_my*16 + y][cur_mx*16 + x] = g.p[k];
          else fc[g.c == COMP_CR][cur_my*8 + y][cur_mx*8 + x] = g.p[k];
        end
        if (g.c == COMP_Y && cur_i4 && (g.x % 4) == 2)
          dec[cur_my*4 + g.y/4][cur_mx*4 + g.x/4] = 1;
      end
    end else begin
      rec_valid = 1'b0; rec_comp = COMP_Y; rec_x = '0; rec_y = '0; rec_pix = '0;
    end
  end
endmodule
