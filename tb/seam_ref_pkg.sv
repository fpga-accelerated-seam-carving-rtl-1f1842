// seam_ref_pkg: software reference of the seam carver, for the testbenches.
//
// Straightforward loops over whole frames, written from the algorithm and not
// from the RTL's structure:
//   test_pix        synthetic grey-scale video: a texture that drifts over time
//                   plus a bright vertical bar, so both energies are non-zero
//   rowrep_byte     the byte at an offset of the SDRAM video array (row above,
//                   row, row below per row, rows clamped at the frame border)
//   ref_energy      per pixel: max over frames of (|Gx|+|Gy|)>>3 (columns and
//                   rows clamped at the border), max over frames of
//                   |p(f) - p(f-1)|, then (w*S + (8-w)*T) >> 3
//   ref_accumulate  dynamic programming with the hardware's edge and tie rules
//   ref_seams       the K cheapest bottom cells (ties: smaller column) traced up
package seam_ref_pkg;

  function automatic int test_pix(int f, int r, int c);
    int v;
    v = ((r * 37) ^ (c * 11)) + f * (3 + (r + c) % 5) + ((c % 23 > 17) ? 90 : 0);
    if (((c + f) % 40) < 3) v = v + 120;      // moving bar
    return v & 255;
  endfunction

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int rowrep_byte(longint off, int H, int W);
    longint rr;
    int wofs, s, c, r, f;
    rr     = off / (3 * W);
    wofs = int'(off % (3 * W));
    s      = wofs / W;
    c      = wofs % W;
    f      = int'(rr / H);
    r      = int'(rr % H);
    return test_pix(f, clampi(r - 1 + s, 0, H - 1), c);
  endfunction

  function automatic int iabs(int v);
    return (v < 0) ? -v : v;
  endfunction

  // frame-sized energy map, index r*W + c
  function automatic void ref_energy(input int H, input int W, input int FR, input int wgt,
                                     output int emap[]);
    int sp[], tp[], pv[];
    int ws;
    sp = new[H * W]; tp = new[H * W]; pv = new[H * W];
    ws = (wgt > 8) ? 8 : wgt;
    for (int f = 0; f < FR; f++)
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int gx, gy, e, p, d;
          int ru, rd, cl, cr;
          ru = clampi(r - 1, 0, H - 1); rd = clampi(r + 1, 0, H - 1);
          cl = clampi(c - 1, 0, W - 1); cr = clampi(c + 1, 0, W - 1);
          gx = (test_pix(f, ru, cr) + 2 * test_pix(f, r, cr) + test_pix(f, rd, cr))
             - (test_pix(f, ru, cl) + 2 * test_pix(f, r, cl) + test_pix(f, rd, cl));
          gy = (test_pix(f, rd, cl) + 2 * test_pix(f, rd, c) + test_pix(f, rd, cr))
             - (test_pix(f, ru, cl) + 2 * test_pix(f, ru, c) + test_pix(f, ru, cr));
          e = (iabs(gx) + iabs(gy)) >> 3;
          p = test_pix(f, r, c);
          if (f == 0) begin
            sp[r * W + c] = e;
            tp[r * W + c] = 0;
          end else begin
            d = iabs(p - pv[r * W + c]);
            if (e > sp[r * W + c]) sp[r * W + c] = e;
            if (d > tp[r * W + c]) tp[r * W + c] = d;
          end
          pv[r * W + c] = p;
        end
    emap = new[H * W];
    for (int i = 0; i < H * W; i++) emap[i] = (ws * sp[i] + (8 - ws) * tp[i]) >> 3;
  endfunction

  // acc_last[c]: cost of the cheapest seam ending at (H-1, c);
  // path[r*W+c] (r >= 1): column in row r-1 of that seam
  function automatic void ref_accumulate(input int H, input int W, input int emap[],
                                         output int acc_last[], output int path[]);
    int prev[], cur[];
    prev = new[W]; cur = new[W]; path = new[H * W];
    for (int c = 0; c < W; c++) prev[c] = emap[c];
    for (int r = 1; r < H; r++) begin
      for (int c = 0; c < W; c++) begin
        int bc;
        bc = c;
        if (c > 0 && prev[c - 1] < prev[bc]) bc = c - 1;
        if (c < W - 1 && prev[c + 1] < prev[bc]) bc = c + 1;
        cur[c] = prev[bc] + emap[r * W + c];
        path[r * W + c] = bc;
      end
      prev = cur;
      cur = new[W];
    end
    acc_last = prev;
  endfunction

  // seams[k*H + r]: column of seam k in row r, k < K
  function automatic void ref_seams(input int H, input int W, input int K,
                                    input int acc_last[], input int path[],
                                    output int seams[]);
    int start[], used[];
    start = new[K]; used = new[W];
    seams = new[K * H];
    for (int c = 0; c < W; c++) used[c] = 0;
    for (int k = 0; k < K; k++) begin
      int best;
      best = -1;
      for (int c = 0; c < W; c++)
        if (!used[c] && (best < 0 || acc_last[c] < acc_last[best])) best = c;
      used[best] = 1;
      start[k] = best;
    end
    for (int k = 0; k < K; k++) begin
      int c;
      c = start[k];
      for (int r = H - 1; r >= 0; r--) begin
        seams[k * H + r] = c;
        if (r > 0) c = path[r * W + c];
      end
    end
  endfunction
endpackage
