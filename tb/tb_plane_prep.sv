// tb_plane_prep: random and extreme neighbouring samples, luma and chroma;
// t1, t2 and t3 compared with the plane equations computed here with plain
// integer arithmetic.
module tb_plane_prep;
  import intra_pkg::*;
  nbr_t nbr;
  logic chroma;
  creg_t t1, t2, t3;
  int checks = 0, failures = 0;

  plane_prep dut (.nbr, .chroma, .t1, .t2, .t3);

  function automatic int tp(int i); return i < 0 ? int'(nbr.corner) : int'(nbr.top[i]); endfunction
  function automatic int lp(int i); return i < 0 ? int'(nbr.corner) : int'(nbr.left[i]); endfunction

  task automatic check();
    int h, v, e1, e2, e3, n;
    #1;
    n = chroma ? 8 : 16;
    h = 0; v = 0;
    for (int i = 0; i < n / 2; i++) begin
      h += (i + 1) * (tp(n/2 + i) - tp(n/2 - 2 - i));
      v += (i + 1) * (lp(n/2 + i) - lp(n/2 - 2 - i));
    end
    e1 = 16 * (lp(n - 1) + tp(n - 1));
    e2 = ((chroma ? 34 : 5) * h + 32) >>> 6;
    e3 = ((chroma ? 34 : 5) * v + 32) >>> 6;
    checks++;
    if (int'(t1) != e1 || int'(t2) != e2 || int'(t3) != e3) begin
      failures++;
      if (failures < 10) $display("chroma=%0d got %0d %0d %0d exp %0d %0d %0d", chroma, t1, t2, t3, e1, e2, e3);
    end
  endtask

  initial begin
    for (int i = 0; i < 4000; i++) begin
      chroma = 1'(i % 2);
      nbr.corner = 8'($urandom);
      for (int k = 0; k < 16; k++) begin nbr.top[k] = 8'($urandom); nbr.left[k] = 8'($urandom); end
      if (i % 13 == 0)
        for (int k = 0; k < 16; k++) begin
          nbr.top[k] = (k < n_half(chroma)) ? 8'd0 : 8'd255;
          nbr.left[k] = (k < n_half(chroma)) ? 8'd255 : 8'd0;
          nbr.corner = (i % 26 == 0) ? 8'd0 : 8'd255;
        end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int n_half(logic c); return c ? 4 : 8; endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
