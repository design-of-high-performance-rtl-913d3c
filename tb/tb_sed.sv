// tb_sed: drives the syntactic elements decoder through two pictures of
// 3x3 macroblocks, about half of them Intra_4x4. For every 4x4 block it
// chooses a random mode, encodes it as flag/rem with its own model of the
// H.264 mode prediction (neighbours outside the picture -> DC, Intra_16x16
// neighbours count as DC), and checks that the SED decodes the chosen mode.
module tb_sed;
  import intra_pkg::*;
  localparam int COLS = 3, ROWS = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mb_load, i4_in, commit, mb_end, mb_left_avail, mb_top_avail;
  logic [15:0] prev_flag_in;
  logic [15:0][2:0] rem_in;
  logic [1:0] i16_mode_in, chroma_mode_in;
  logic [1:0] mbx;
  logic [3:0] blk, mode4, i16_mode, chroma_mode;
  logic i4;
  int m4 [ROWS*4][COLS*4];
  int want [16];
  int checks = 0, failures = 0, n_flag = 0, n_rem = 0;

  sed #(.MB_COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mb_load = 0; commit = 0; mb_end = 0; blk = 0; mbx = 0; i4_in = 0;
    prev_flag_in = 0; rem_in = 0; i16_mode_in = 0; chroma_mode_in = 0;
    mb_left_avail = 0; mb_top_avail = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int my = 0; my < ROWS; my++)
        for (int mx = 0; mx < COLS; mx++) begin
          bit is4;
          is4 = 1'($urandom_range(1));
          mbx = 2'(mx); mb_left_avail = mx > 0; mb_top_avail = my > 0;
          i4_in = is4;
          i16_mode_in = 2'($urandom); chroma_mode_in = 2'($urandom);
          prev_flag_in = 16'($urandom);
          for (int z = 0; z < 16; z++) rem_in[z] = 3'($urandom);
          if (is4)
            for (int z = 0; z < 16; z++) begin
              int bx, by, gx, gy, a, b, pred, m;
              bx = ((z >> 2) & 1) * 2 + (z & 1); by = ((z >> 3) & 1) * 2 + ((z >> 1) & 1);
              gx = mx * 4 + bx; gy = my * 4 + by;
              a = gx > 0 ? m4[gy][gx-1] : -1;
              b = gy > 0 ? m4[gy-1][gx] : -1;
              pred = (a < 0 || b < 0) ? 2 : (a < b ? a : b);
              m = $urandom_range(8);
              if ($urandom_range(2) == 0) m = pred;
              prev_flag_in[z] = (m == pred);
              if (m != pred) rem_in[z] = 3'(m < pred ? m : m - 1);
              if (m == pred) n_flag++; else n_rem++;
              m4[gy][gx] = m;
              want[z] = m;
            end
          else
            for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) m4[my*4+i][mx*4+j] = 2;
          mb_load = 1;
          @(negedge clk);
          mb_load = 0;
          checks++;
          if (i4 != is4 || i16_mode != {2'b0, i16_mode_in} || chroma_mode != {2'b0, chroma_mode_in}) begin
            failures++; $display("macroblock fields not captured");
          end
          if (is4)
            for (int z = 0; z < 16; z++) begin
              blk = 4'(z);
              #1;
              checks++;
              if (mode4 != 4'(want[z])) begin
                failures++;
                if (failures < 10) $display("MB (%0d,%0d) blk %0d: got %0d exp %0d", mx, my, z, mode4, want[z]);
              end
              commit = 1;
              @(negedge clk);
              commit = 0;
            end
          mb_end = 1;
          @(negedge clk);
          mb_end = 0;
        end
    checks++;
    if (n_flag == 0 || n_rem == 0) begin failures++; $display("flag or rem path unused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
