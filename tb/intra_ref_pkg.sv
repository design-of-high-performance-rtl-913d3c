// intra_ref_pkg: reference model of the H.264 intra prediction modes, used by
// the testbenches. It computes whole predicted blocks straight from the
// equations of the standard (luma 4x4 modes 0..8, luma 16x16 modes 0..3,
// chroma modes 0..3), with none of the unit sharing of the hardware.
package intra_ref_pkg;

  typedef int blk_t [16][16];   // [y][x]

  function automatic int clip(input int v);
    return v < 0 ? 0 : (v > 255 ? 255 : v);
  endfunction

  // p(x,-1) = t[x] (x = -1 -> s), p(-1,y) = l[y] (y = -1 -> s)
  function automatic blk_t ref4(input int mode, input int s, input int t[8], input int l[4],
                                input bit at, input bit al);
    blk_t r;
    int pt[-1:7];
    int pl[-1:3];
    pt[-1] = s; pl[-1] = s;
    for (int i = 0; i < 8; i++) pt[i] = t[i];
    for (int i = 0; i < 4; i++) pl[i] = l[i];
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        int v, z;
        case (mode)
          0: v = pt[x];
          1: v = pl[y];
          2: begin
            int st, sl;
            st = pt[0] + pt[1] + pt[2] + pt[3];
            sl = pl[0] + pl[1] + pl[2] + pl[3];
            if (at && al) v = (st + sl + 4) >> 3;
            else if (at) v = (st + 2) >> 2;
            else if (al) v = (sl + 2) >> 2;
            else v = 128;
          end
          3: v = (x == 3 && y == 3) ? (pt[6] + 3 * pt[7] + 2) >> 2
                                    : (pt[x+y] + 2 * pt[x+y+1] + pt[x+y+2] + 2) >> 2;
          4: if (x > y) v = (pt[x-y-2] + 2 * pt[x-y-1] + pt[x-y] + 2) >> 2;
             else if (x < y) v = (pl[y-x-2] + 2 * pl[y-x-1] + pl[y-x] + 2) >> 2;
             else v = (pt[0] + 2 * s + pl[0] + 2) >> 2;
          5: begin
            z = 2 * x - y;
            if (z >= 0 && z % 2 == 0) v = (pt[x-(y>>1)-1] + pt[x-(y>>1)] + 1) >> 1;
            else if (z > 0) v = (pt[x-(y>>1)-2] + 2 * pt[x-(y>>1)-1] + pt[x-(y>>1)] + 2) >> 2;
            else if (z == -1) v = (pl[0] + 2 * s + pt[0] + 2) >> 2;
            else v = (pl[y-1] + 2 * pl[y-2] + pl[y-3] + 2) >> 2;
          end
          6: begin
            z = 2 * y - x;
            if (z >= 0 && z % 2 == 0) v = (pl[y-(x>>1)-1] + pl[y-(x>>1)] + 1) >> 1;
            else if (z > 0) v = (pl[y-(x>>1)-2] + 2 * pl[y-(x>>1)-1] + pl[y-(x>>1)] + 2) >> 2;
            else if (z == -1) v = (pl[0] + 2 * s + pt[0] + 2) >> 2;
            else v = (pt[x-1] + 2 * pt[x-2] + pt[x-3] + 2) >> 2;
          end
          7: if (y % 2 == 0) v = (pt[x+(y>>1)] + pt[x+(y>>1)+1] + 1) >> 1;
             else v = (pt[x+(y>>1)] + 2 * pt[x+(y>>1)+1] + pt[x+(y>>1)+2] + 2) >> 2;
          default: begin
            z = x + 2 * y;
            if (z > 5) v = pl[3];
            else if (z == 5) v = (pl[2] + 3 * pl[3] + 2) >> 2;
            else if (z % 2 == 0) v = (pl[y+(x>>1)] + pl[y+(x>>1)+1] + 1) >> 1;
            else v = (pl[y+(x>>1)] + 2 * pl[y+(x>>1)+1] + pl[y+(x>>1)+2] + 2) >> 2;
          end
        endcase
        r[y][x] = v;
      end
    return r;
  endfunction

  // luma 16x16 (n = 16, chroma = 0) and chroma 8x8 (n = 8, chroma = 1)
  // mode numbers: luma 0 V, 1 H, 2 DC, 3 plane; chroma 0 DC, 1 H, 2 V, 3 plane
  function automatic blk_t refbig(input int mode, input bit chroma, input int s,
                                  input int t[16], input int l[16], input bit at, input bit al);
    blk_t r;
    int n, kind; // kind: 0 V 1 H 2 DC 3 plane
    n = chroma ? 8 : 16;
    if (!chroma) kind = mode;
    else kind = (mode == 0) ? 2 : (mode == 1) ? 1 : (mode == 2) ? 0 : 3;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) r[y][x] = 0;
    if (kind == 3) begin
      int h, v, a, b, c, xc;
      h = 0; v = 0;
      xc = n / 2 - 1;
      for (int i = 0; i < n / 2; i++) begin
        h += (i + 1) * (t[n/2 + i] - ((n/2 - 2 - i) < 0 ? s : t[n/2 - 2 - i]));
        v += (i + 1) * (l[n/2 + i] - ((n/2 - 2 - i) < 0 ? s : l[n/2 - 2 - i]));
      end
      a = 16 * (l[n-1] + t[n-1]);
      b = chroma ? (34 * h + 32) >>> 6 : (5 * h + 32) >>> 6;
      c = chroma ? (34 * v + 32) >>> 6 : (5 * v + 32) >>> 6;
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++)
          r[y][x] = clip((a + b * (x - xc) + c * (y - xc) + 16) >>> 5);
    end else begin
      for (int y = 0; y < n; y++)
        for (int x = 0; x < n; x++) begin
          if (kind == 0) r[y][x] = t[x];
          else if (kind == 1) r[y][x] = l[y];
          else if (!chroma) begin
            int st, sl;
            st = 0; sl = 0;
            for (int i = 0; i < 16; i++) begin st += t[i]; sl += l[i]; end
            if (at && al) r[y][x] = (st + sl + 16) >> 5;
            else if (at) r[y][x] = (st + 8) >> 4;
            else if (al) r[y][x] = (sl + 8) >> 4;
            else r[y][x] = 128;
          end else begin
            int bx, by, st, sl;
            bx = x / 4; by = y / 4;
            st = 0; sl = 0;
            for (int i = 0; i < 4; i++) begin st += t[4*bx + i]; sl += l[4*by + i]; end
            if (!at && !al) r[y][x] = 128;
            else if ((bx == by) && at && al) r[y][x] = (st + sl + 4) >> 3;
            else if (bx == 1 && by == 0) r[y][x] = at ? (st + 2) >> 2 : (sl + 2) >> 2;
            else if (bx == 0 && by == 1) r[y][x] = al ? (sl + 2) >> 2 : (st + 2) >> 2;
            else r[y][x] = at ? (st + 2) >> 2 : (sl + 2) >> 2;
          end
        end
    end
    return r;
  endfunction

endpackage
