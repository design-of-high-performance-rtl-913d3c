// tb_psp: self-checking test of the predict samples processor.
// Runs every luma 4x4, luma 16x16 and chroma mode many times with random
// neighbouring samples and every legal combination of neighbour
// availability, compares each output pixel with the reference model and
// checks the number of cycles of each job (two cycles for a directional
// luma 4x4 block, as the document states, and the schedule for the others).
// Chains of luma 4x4 jobs started in the last-group cycle of the previous one
// check that jobs run back to back, two cycles per block (three for DC).
module tb_psp;
  import intra_pkg::*;
  import intra_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  cls_e cls;
  logic [3:0] mode;
  logic at, al;
  nbr_t nbr;
  logic busy, gv, gl, reuse;
  gpos_t gp;
  pix_t [7:0] pix;

  int checks = 0, failures = 0, reuse_cnt = 0;

  psp dut (.clk, .rst_n, .start, .cls, .mode, .avail_top(at), .avail_left(al), .nbr,
           .busy, .grp_valid(gv), .grp_last(gl), .grp_pos(gp), .pix, .reuse);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_job(input cls_e c, input int m, input bit a_t, input bit a_l, input int exp_cycles);
    int t[16], l[16], t8[8], l4[4], s;
    blk_t exp;
    int got[16][16];
    int cycles, n;
    bit ok;
    s = $urandom_range(255);
    for (int i = 0; i < 16; i++) begin t[i] = $urandom_range(255); l[i] = $urandom_range(255); end
    // occasionally use extreme samples to stress ranges
    if ($urandom_range(7) == 0) begin
      for (int i = 0; i < 16; i++) begin t[i] = (i < 8) ? 0 : 255; l[i] = (i < 8) ? 255 : 0; end
      s = $urandom_range(1) * 255;
    end
    for (int i = 0; i < 8; i++) t8[i] = t[i];
    for (int i = 0; i < 4; i++) l4[i] = l[i];
    nbr.corner = pix_t'(s);
    for (int i = 0; i < 16; i++) begin nbr.top[i] = pix_t'(t[i]); nbr.left[i] = pix_t'(l[i]); end
    if (c == CLS_L4) exp = ref4(m, s, t8, l4, a_t, a_l);
    else exp = refbig(m, c == CLS_CH, s, t, l, a_t, a_l);
    @(negedge clk);
    start = 1'b1; cls = c; mode = 4'(m); at = a_t; al = a_l;
    @(negedge clk);
    start = 1'b0;
    nbr = '0;            // the job must have latched the samples
    cycles = 0;
    while (1) begin
      cycles++;
      if (gv) begin
        if (reuse) reuse_cnt++;
        for (int k = 0; k < 8; k++) begin
          int x, y;
          if (c == CLS_L4) begin x = int'(gp.x) + k / 4; y = int'(gp.y) + k % 4; end
          else begin x = int'(gp.x); y = int'(gp.y) + k; end
          got[y][x] = int'(pix[k]);
        end
      end
      if (gl) break;
      @(negedge clk);
      if (cycles > 100) break;
    end
    @(negedge clk);
    checks++;
    if (cycles != exp_cycles || busy) begin
      failures++;
      $display("cycle count cls=%0d mode=%0d got %0d expected %0d", c, m, cycles, exp_cycles);
    end
    n = (c == CLS_L4) ? 4 : (c == CLS_L16) ? 16 : 8;
    ok = 1'b1;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        checks++;
        if (got[y][x] != exp[y][x]) begin
          failures++;
          if (ok) $display("mismatch cls=%0d mode=%0d at=%0d al=%0d (%0d,%0d) got %0d exp %0d",
                           c, m, a_t, a_l, x, y, got[y][x], exp[y][x]);
          ok = 1'b0;
        end
      end
  endtask

  // A chain of luma 4x4 jobs, each started in the grp_last cycle of the one
  // before: the PSP must take the start and run the jobs back to back.
  task automatic run_chain(input int njobs);
    blk_t  exp [8];
    nbr_t  nb [8];
    int    ms [8];
    bit    ats [8], als [8];
    int    got [16][16];
    int    t8[8], l4[4], sc, j, cycles, exp_cycles;
    exp_cycles = 0;
    for (int i = 0; i < njobs; i++) begin
      ms[i] = $urandom_range(8);
      ats[i] = 1'b1; als[i] = 1'b1;
      if (ms[i] == 2) begin ats[i] = 1'($urandom_range(1)); als[i] = 1'($urandom_range(1)); end
      sc = $urandom_range(255);
      for (int k = 0; k < 8; k++) t8[k] = $urandom_range(255);
      for (int k = 0; k < 4; k++) l4[k] = $urandom_range(255);
      nb[i] = '0;
      nb[i].corner = pix_t'(sc);
      for (int k = 0; k < 8; k++) nb[i].top[k] = pix_t'(t8[k]);
      for (int k = 0; k < 4; k++) nb[i].left[k] = pix_t'(l4[k]);
      exp[i] = ref4(ms[i], sc, t8, l4, ats[i], als[i]);
      exp_cycles += (ms[i] == 2) ? 3 : 2;
    end
    @(negedge clk);
    start = 1'b1; cls = CLS_L4; mode = 4'(ms[0]); at = ats[0]; al = als[0]; nbr = nb[0];
    @(negedge clk);
    start = 1'b0; nbr = '0;
    j = 0; cycles = 0;
    while (j < njobs && cycles <= 100) begin
      cycles++;
      if (gv)
        for (int k = 0; k < 8; k++) got[int'(gp.y) + k % 4][int'(gp.x) + k / 4] = int'(pix[k]);
      if (gl) begin
        for (int y = 0; y < 4; y++)
          for (int x = 0; x < 4; x++) begin
            checks++;
            if (got[y][x] != exp[j][y][x]) begin
              failures++;
              $display("chain job %0d mode %0d (%0d,%0d) got %0d exp %0d", j, ms[j], x, y, got[y][x], exp[j][y][x]);
            end
          end
        j++;
        if (j < njobs) begin
          start = 1'b1; mode = 4'(ms[j]); at = ats[j]; al = als[j]; nbr = nb[j];
        end
      end
      @(negedge clk);
      start = 1'b0; nbr = '0;
    end
    checks++;
    if (cycles != exp_cycles || busy) begin
      failures++;
      $display("chain of %0d jobs took %0d cycles, expected %0d", njobs, cycles, exp_cycles);
    end
  endtask

  initial begin
    start = 1'b0; cls = CLS_L4; mode = '0; at = 1'b0; al = 1'b0; nbr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 40; it++) begin
      for (int m = 0; m < 9; m++) begin
        bit a_t, a_l;
        a_t = 1'b1; a_l = 1'b1;
        if (m == 2) begin a_t = 1'($urandom_range(1)); a_l = 1'($urandom_range(1)); end
        if (m == 3 || m == 7) a_l = 1'($urandom_range(1));
        if (m == 0) a_l = 1'($urandom_range(1));
        if (m == 1 || m == 8) a_t = 1'($urandom_range(1));
        run_job(CLS_L4, m, a_t, a_l, (m == 2) ? 3 : 2);
      end
      for (int m = 0; m < 4; m++) begin
        bit a_t, a_l;
        a_t = 1'b1; a_l = 1'b1;
        if (m == 2) begin a_t = 1'($urandom_range(1)); a_l = 1'($urandom_range(1)); end
        run_job(CLS_L16, m, a_t, a_l, (m == 2) ? 36 : (m == 3) ? 34 : 32);
      end
      for (int m = 0; m < 4; m++) begin
        bit a_t, a_l;
        a_t = 1'b1; a_l = 1'b1;
        if (m == 0) begin a_t = 1'($urandom_range(1)); a_l = 1'($urandom_range(1)); end
        run_job(CLS_CH, m, a_t, a_l, (m == 0) ? 10 : (m == 3) ? 10 : 8);
      end
    end
    for (int it = 0; it < 200; it++) run_chain(2 + $urandom_range(6));
    checks++;
    if (reuse_cnt == 0) begin failures++; $display("common registers never reused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
