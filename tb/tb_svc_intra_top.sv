// tb_svc_intra_top: end-to-end test of the intra encoder core at its default
// parameters. Several rounds each load two macroblocks (patterns chosen to
// give 4x4, 8x8 and 16x16 block-size decisions, several QPs, missing
// neighbours), start the global controller, let the outside stages finish,
// and compare everything the core produces with a behavioural model written
// here: AC1/AC2, block size, 4x4 and 16x16 candidates, the 8x8 merge rules,
// the best 4x4 mode of every block (SATD + most-probable-mode penalty), the
// levels of all three quality layers, the base-layer reconstruction (read back
// from its memory) and the highest-layer reconstruction stream. The same data
// is run first without and then with interleaving (the sequential run comes
// first so that no earlier identical round leaves the right neighbours
// behind); results must match. Mechanisms
// counted (each must occur): every block size, MB alternation in the
// reconstruction stage, dependency stalls without interleaving and none with
// it, non-zero levels in each quality layer, candidate pruning, ping-pong
// switching of the global controller and the side units (chroma DC Hadamard,
// chroma candidates, plane predictor). Each round also checks its cycle count:
// a fixed 412 cycles plus one per evaluated candidate and per stall.
module tb_svc_intra_top;
  import intra_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", msg); end
  endtask
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // DUT
  logic go, pingpong, busy, done, cur_we, interleave;
  logic [1:0] ext_stage_start, ext_stage_end;
  localparam int T_FIXED = 412;   // fixed cycles of one MB-pair operation
  logic [15:0] rounds, dep_stall, hand_stall, cand_evals, enc_cycles;
  logic [6:0] cur_addr, bl_raddr, el_raddr;
  logic [63:0] cur_wdata, bl_rdata, el_rdata;
  logic [5:0] qp;
  pix_t nb_top [2][20], nb_left [2][16], nb_corner [2];
  logic avail_top [2], avail_left [2], avail_topright [2];
  logic [31:0] ac1 [2], ac2 [2];
  bsize_e bsize [2];
  logic [3:0] cand16 [2];
  logic [8:0] cand4 [2][16], cand8 [2][4];
  logic [3:0] best_mode [2][16];
  logic lvl_valid, lvl_mb, lvl_half, el_valid, el_mb, el_half;
  logic [3:0] lvl_blk, el_blk;
  logic [1:0] lvl_layer;
  coef_t lvl_data [8];
  pix_t el_pix [8];
  coef_t cdc_in [4], cdc_out [4];
  logic [19:0] civ, cih;
  logic [3:0] ccand;
  logic pl_start, pl_chroma, pl_busy, pl_valid;
  pix_t pl_top [16], pl_left [16], pl_corner, pl_pix [16];
  logic [3:0] pl_row;
  svc_intra_top dut (.*);

  // ------------------------------------------------------------------
  // model
  int C4 [4][4] = '{'{1,1,1,1}, '{2,1,-1,-2}, '{1,-1,-1,1}, '{1,-2,2,-1}};
  int H4 [4][4] = '{'{1,1,1,1}, '{1,1,-1,-1}, '{1,-1,-1,1}, '{1,-1,1,-1}};
  int MF [6][3] = '{'{13107,5243,8066}, '{11916,4660,7490}, '{10082,4194,6554},
                    '{9362,3647,5825}, '{8192,3355,5243}, '{7282,2893,4559}};
  int V [6][3] = '{'{10,16,13}, '{11,18,14}, '{13,20,16}, '{14,23,18}, '{16,25,20}, '{18,29,23}};

  int pix [2][256];
  int rb [2][256];                        // model base-layer reconstruction
  int e_ac1 [2], e_ac2 [2], e_bs [2], e_c16 [2], e_c4 [2][16], e_mode [2][16];
  int e_lv [2][16][3][16], e_el [2][16][16];
  int g_lv [2][16][3][16], g_el [2][16][16];

  function automatic int ab(input int x); return x < 0 ? -x : x; endfunction
  function automatic int cls(input int i, input int j);
    return (i % 2 == 0 && j % 2 == 0) ? 0 : ((i % 2 == 1 && j % 2 == 1) ? 1 : 2);
  endfunction
  function automatic void fwd(input int x [16], input logic had, output int y [16]);
    int t [16];
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      t[i*4+j] = 0;
      for (int k = 0; k < 4; k++) t[i*4+j] += (had ? H4[i][k] : C4[i][k]) * x[k*4+j];
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) begin
      y[i*4+j] = 0;
      for (int k = 0; k < 4; k++) y[i*4+j] += t[i*4+k] * (had ? H4[j][k] : C4[j][k]);
    end
  endfunction
  function automatic void inv1(input int d [4], output int o [4]);
    o[0] = d[0] + d[1] + d[2] + (d[3] >>> 1); o[1] = d[0] + (d[1] >>> 1) - d[2] - d[3];
    o[2] = d[0] - (d[1] >>> 1) - d[2] + d[3]; o[3] = d[0] - d[1] + d[2] - (d[3] >>> 1);
  endfunction
  function automatic void inv(input int y [16], output int x [16]);
    int t [16], a [4], o [4];
    for (int r = 0; r < 4; r++) begin
      for (int c = 0; c < 4; c++) a[c] = y[r*4+c];
      inv1(a, o); for (int c = 0; c < 4; c++) t[r*4+c] = o[c];
    end
    for (int c = 0; c < 4; c++) begin
      for (int r = 0; r < 4; r++) a[r] = t[r*4+c];
      inv1(a, o); for (int r = 0; r < 4; r++) x[r*4+c] = (o[r] + 32) >>> 6;
    end
  endfunction
  function automatic int qz(input int w, input int q, input int c);
    longint a, z; int qb;
    qb = 15 + q / 6;
    a = ab(w);
    z = (a * MF[q % 6][c] + ((longint'(1) << qb) / 3)) >> qb;
    return (w < 0) ? -int'(z) : int'(z);
  endfunction
  function automatic int dqz(input int z, input int q, input int c);
    return z * V[q % 6][c] * (1 << (q / 6));
  endfunction
  function automatic int nrec(input int z, input int q, input int c);
    longint nf, r;
    nf = (134217728 + MF[q % 6][c] / 2) / MF[q % 6][c];
    r = ((longint'(ab(z)) * nf * (longint'(1) << (q / 6))) + 2048) / 4096;
    return (z < 0) ? -int'(r) : int'(r);
  endfunction
  function automatic int clip(input int v); return v < 0 ? 0 : (v > 255 ? 255 : v); endfunction
  function automatic int penalty(input int q);
    int fr [3] = '{218, 274, 345};
    return (fr[q % 3] << (q / 3)) >> 10;
  endfunction
  // intra 4x4 prediction on T (top, 8 incl. above-right), L (left), Q (corner)
  function automatic int pp(input int T [8], input int L [4], input int Q, input int x, input int y);
    if (x < 0 && y < 0) return Q;
    if (y < 0) return T[x];
    return L[y];
  endfunction
  function automatic int pr(input int m, input int T [8], input int L [4], input int Q, input int x, input int y);
    int z;
    case (m)
      0: return T[x];
      1: return L[y];
      3: return (x == 3 && y == 3) ? (T[6] + 3*T[7] + 2) >> 2 : (T[x+y] + 2*T[x+y+1] + T[x+y+2] + 2) >> 2;
      4: begin
        if (x > y) return (pp(T,L,Q,x-y-2,-1) + 2*pp(T,L,Q,x-y-1,-1) + T[x-y] + 2) >> 2;
        if (x < y) return (pp(T,L,Q,-1,y-x-2) + 2*pp(T,L,Q,-1,y-x-1) + L[y-x] + 2) >> 2;
        return (T[0] + 2*Q + L[0] + 2) >> 2;
      end
      5: begin
        z = 2*x - y;
        if (z >= 0 && z % 2 == 0) return (pp(T,L,Q,x-(y>>1)-1,-1) + T[x-(y>>1)] + 1) >> 1;
        if (z > 0)  return (pp(T,L,Q,x-(y>>1)-2,-1) + 2*pp(T,L,Q,x-(y>>1)-1,-1) + T[x-(y>>1)] + 2) >> 2;
        if (z == -1) return (L[0] + 2*Q + T[0] + 2) >> 2;
        return (pp(T,L,Q,-1,y-1) + 2*pp(T,L,Q,-1,y-2) + pp(T,L,Q,-1,y-3) + 2) >> 2;
      end
      6: begin
        z = 2*y - x;
        if (z >= 0 && z % 2 == 0) return (pp(T,L,Q,-1,y-(x>>1)-1) + L[y-(x>>1)] + 1) >> 1;
        if (z > 0)  return (pp(T,L,Q,-1,y-(x>>1)-2) + 2*pp(T,L,Q,-1,y-(x>>1)-1) + L[y-(x>>1)] + 2) >> 2;
        if (z == -1) return (L[0] + 2*Q + T[0] + 2) >> 2;
        return (pp(T,L,Q,x-1,-1) + 2*pp(T,L,Q,x-2,-1) + pp(T,L,Q,x-3,-1) + 2) >> 2;
      end
      7: return (y % 2 == 0) ? (T[x+(y>>1)] + T[x+(y>>1)+1] + 1) >> 1
                             : (T[x+(y>>1)] + 2*T[x+(y>>1)+1] + T[x+(y>>1)+2] + 2) >> 2;
      8: begin
        z = x + 2*y;
        if (z > 5) return L[3];
        if (z == 5) return (L[2] + 3*L[3] + 2) >> 2;
        if (z % 2 == 0) return (L[y+(x>>1)] + L[y+(x>>1)+1] + 1) >> 1;
        return (L[y+(x>>1)] + 2*L[y+(x>>1)+1] + L[y+(x>>1)+2] + 2) >> 2;
      end
      default: return 0;
    endcase
  endfunction

  task automatic model(input int q);
    for (int m = 0; m < 2; m++) begin
      int dc [16], h [16], th1, th2, iv, ih;
      e_ac1[m] = 0; e_ac2[m] = 0;
      for (int k = 0; k < 16; k++) begin
        int x0, y0, b [16], f [16];
        x0 = ((k >> 2) & 1) * 8 + (k & 1) * 4; y0 = ((k >> 3) & 1) * 8 + ((k >> 1) & 1) * 4;
        for (int i = 0; i < 16; i++) b[i] = pix[m][(y0 + i/4)*16 + x0 + i%4];
        fwd(b, 1'b0, f);
        e_ac2[m] += ab(f[1]) + ab(f[4]) + ab(f[8]);
        iv = ab(f[1]) + ab(f[2]) + ab(f[3]); ih = ab(f[4]) + ab(f[8]) + ab(f[12]);
        e_c4[m][k] = (iv > 2*ih) ? 9'b010100101 : (ih > 2*iv) ? 9'b101000110 : 9'b000011111;
        dc[(y0/4)*4 + x0/4] = f[0];
      end
      fwd(dc, 1'b1, h);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) e_ac1[m] += ab(h[i*4+j]) * ((i + j - 1) / 2);
      iv = ab(h[1]) + ab(h[2]) + ab(h[3]); ih = ab(h[4]) + ab(h[8]) + ab(h[12]);
      e_c16[m] = (iv > ih) ? 4'b0101 : (ih > iv) ? 4'b0110 : 4'b1100;
      th1 = (25714*q*q - 12286*q + 10000) / 10;
      th2 = (22857*q*q - 89143*q + 122000) / 100;
      e_bs[m] = (e_ac1[m] >= th1) ? 0 : (e_ac2[m] >= th2) ? 1 : 2;
      // 4x4 encoding in coding order
      for (int k = 0; k < 16; k++) begin
        int x0, y0, bx, by, T [8], L [4], Q, at, al, ac, atr, mask, mpm, best, bcost, dcv, s;
        int b [16], pd [16], bp [16], r [16], f [16], w [16], dq0 [16], dqs [16], xr [16];
        x0 = ((k >> 2) & 1) * 8 + (k & 1) * 4; y0 = ((k >> 3) & 1) * 8 + ((k >> 1) & 1) * 4;
        bx = x0 / 4; by = y0 / 4;
        at = (y0 > 0) || avail_top[m]; al = (x0 > 0) || avail_left[m];
        ac = (x0 > 0 && y0 > 0) ? 1 : (x0 == 0 && y0 == 0) ? (avail_top[m] && avail_left[m])
           : (y0 == 0) ? avail_top[m] : avail_left[m];
        if (y0 == 0) atr = (x0 < 12) ? avail_top[m] : avail_topright[m];
        else if (x0 == 12) atr = 0;
        else begin
          int kk;
          kk = ((by - 1) >> 1) * 8 + ((bx + 1) >> 1) * 4 + ((by - 1) & 1) * 2 + ((bx + 1) & 1);
          atr = kk < k;
        end
        for (int i = 0; i < 8; i++)
          T[i] = (y0 == 0) ? int'(nb_top[m][x0 + i]) : ((x0 + i < 16) ? rb[m][(y0-1)*16 + x0 + i] : 0);
        if (!atr) for (int i = 4; i < 8; i++) T[i] = T[3];
        for (int j = 0; j < 4; j++) L[j] = (x0 == 0) ? int'(nb_left[m][y0 + j]) : rb[m][(y0+j)*16 + x0 - 1];
        Q = (x0 == 0 && y0 == 0) ? int'(nb_corner[m]) : (y0 == 0) ? int'(nb_top[m][x0 - 1])
          : (x0 == 0) ? int'(nb_left[m][y0 - 1]) : rb[m][(y0-1)*16 + x0 - 1];
        mask = e_c4[m][k];
        if (!at) mask &= ~((1 << 0) | (1 << 3) | (1 << 7));
        if (!al) mask &= ~((1 << 1) | (1 << 8));
        if (!(at && al && ac)) mask &= ~((1 << 4) | (1 << 5) | (1 << 6));
        mask |= 4;
        s = 0;
        for (int i = 0; i < 4; i++) s += (at ? T[i] : 0) + (al ? L[i] : 0);
        dcv = (at && al) ? (s + 4) >> 3 : (at || al) ? (s + 2) >> 2 : 128;
        if (bx > 0 && by > 0) begin
          int ma, mb;
          ma = e_mode[m][((by) >> 1) * 8 + ((bx - 1) >> 1) * 4 + (by & 1) * 2 + ((bx - 1) & 1)];
          mb = e_mode[m][((by - 1) >> 1) * 8 + (bx >> 1) * 4 + ((by - 1) & 1) * 2 + (bx & 1)];
          mpm = ma < mb ? ma : mb;
        end else mpm = 2;
        for (int i = 0; i < 16; i++) b[i] = pix[m][(y0 + i/4)*16 + x0 + i%4];
        best = 2; bcost = 32'h7FFF_FFFF;
        for (int md = 0; md < 9; md++) if (mask[md]) begin
          int c;
          for (int i = 0; i < 16; i++) begin
            pd[i] = (md == 2) ? dcv : pr(md, T, L, Q, i % 4, i / 4);
            r[i] = b[i] - pd[i];
          end
          fwd(r, 1'b0, f);
          c = (md == mpm) ? 0 : penalty(q);
          for (int i = 0; i < 16; i++) c += ab(f[i]);
          if (c < bcost) begin bcost = c; best = md; bp = pd; w = f; end
        end
        e_mode[m][k] = best;
        for (int l = 0; l < 3; l++) begin
          int ql;
          ql = (q >= 6*l) ? q - 6*l : 0;
          for (int i = 0; i < 16; i++) begin
            int z;
            z = qz(w[i], ql, cls(i / 4, i % 4));
            e_lv[m][k][l][i] = z;
            if (l == 0) dq0[i] = dqz(z, ql, cls(i / 4, i % 4));
            dqs[i] = ((l == 0) ? 0 : dqs[i]) + dqz(z, ql, cls(i / 4, i % 4));
            w[i] = w[i] - nrec(z, ql, cls(i / 4, i % 4));
          end
        end
        inv(dq0, xr);
        for (int i = 0; i < 16; i++) rb[m][(y0 + i/4)*16 + x0 + i%4] = clip(bp[i] + xr[i]);
        inv(dqs, xr);
        for (int i = 0; i < 16; i++) e_el[m][k][i] = clip(bp[i] + xr[i]);
      end
    end
  endtask

  // ------------------------------------------------------------------
  // stream capture and mechanism counters
  int n_switch, n_lv_layer [3], n_bs [3], n_dep_nil, n_dep_il, n_prune, n_pp, n_side, n_lv_ev, n_el_ev;
  int last_mb = -1;
  always @(posedge clk) begin
    if (lvl_valid && rst_n) begin
      for (int i = 0; i < 8; i++) begin
        g_lv[lvl_mb][lvl_blk][lvl_layer][lvl_half*8 + i] = int'(lvl_data[i]);
        if (lvl_data[i] != 0) n_lv_layer[lvl_layer]++;
      end
      n_lv_ev++;
      if (lvl_layer == 0 && !lvl_half) begin
        if (last_mb >= 0 && last_mb != int'(lvl_mb)) n_switch++;
        last_mb = int'(lvl_mb);
      end
    end
    if (el_valid && rst_n) begin
      n_el_ev++;
      for (int kk = 0; kk < 2; kk++) for (int r = 0; r < 4; r++)
        g_el[el_mb][el_blk][r*4 + 2*el_half + kk] = int'(el_pix[kk*4 + r]);
    end
  end

  // outside pipeline stages: finish a few cycles after their start
  always @(posedge clk) begin
    ext_stage_end <= 2'b00;
    for (int s = 0; s < 2; s++) if (ext_stage_start[s]) ext_stage_end[s] <= 1'b1;
  end

  // ------------------------------------------------------------------
  task automatic load(input int pat0, input int pat1);
    int pat;
    for (int m = 0; m < 2; m++) begin
      pat = m ? pat1 : pat0;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
        int v;
        case (pat)
          0: v = (((x / 4) + (y / 4)) % 2 ? 200 : 40) + int'($urandom_range(0, 40));  // blocky texture
          1: v = 128 + ((x % 2) ? 25 : -25);                                        // fine stripes
          2: v = 60 + 4 * x + 3 * y;                                                // smooth ramp
          3: v = 100 + ((y % 4 < 2) ? 60 : -40) + int'($urandom_range(0, 6));         // horizontal bars
          default: v = int'($urandom_range(0, 255));                                // noise
        endcase
        pix[m][y*16 + x] = clip(v);
      end
      for (int i = 0; i < 20; i++) nb_top[m][i] = pix_t'(clip(pix[m][(i % 16)] + int'($urandom_range(0, 20)) - 10));
      for (int i = 0; i < 16; i++) nb_left[m][i] = pix_t'(clip(pix[m][i*16] + int'($urandom_range(0, 20)) - 10));
      nb_corner[m] = pix_t'($urandom_range(0, 255));
    end
    for (int m = 0; m < 2; m++) for (int w = 0; w < 32; w++) begin
      @(negedge clk);
      cur_we = 1'b1; cur_addr = 7'(m * 48 + w);
      for (int i = 0; i < 8; i++) cur_wdata[8*i +: 8] = 8'(pix[m][(w / 2)*16 + (w % 2)*8 + i]);
    end
    @(negedge clk); cur_we = 1'b0;
  endtask

  task automatic run_round(input int q, input logic il, input string name);
    int cyc, bad;
    qp = 6'(q); interleave = il;
    for (int m = 0; m < 2; m++) for (int k = 0; k < 16; k++) for (int i = 0; i < 16; i++) begin
      g_el[m][k][i] = -1;
      for (int l = 0; l < 3; l++) g_lv[m][k][l][i] = -99999;
    end
    for (int m = 0; m < 2; m++) for (int i = 0; i < 256; i++) rb[m][i] = 0;
    model(q);
    @(negedge clk); go = 1'b1;
    @(negedge clk); go = 1'b0;
    cyc = 0;
    while (!done && cyc < 20000) begin @(posedge clk); cyc++; end
    check(done, {name, ": done"});
    @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      check(int'(ac1[m]) == e_ac1[m], $sformatf("%s mb%0d ac1 %0d vs %0d", name, m, ac1[m], e_ac1[m]));
      check(int'(ac2[m]) == e_ac2[m], $sformatf("%s mb%0d ac2 %0d vs %0d", name, m, ac2[m], e_ac2[m]));
      check(int'(bsize[m]) == e_bs[m], $sformatf("%s mb%0d bsize %0d vs %0d", name, m, bsize[m], e_bs[m]));
      check(int'(cand16[m]) == e_c16[m], $sformatf("%s mb%0d cand16", name, m));
      n_bs[e_bs[m]]++;
      for (int b = 0; b < 4; b++) begin
        logic [8:0] u;
        u = 9'(e_c4[m][4*b] | e_c4[m][4*b+1] | e_c4[m][4*b+2] | e_c4[m][4*b+3]);
        check(cand8[m][b][2] && (cand8[m][b] & ~u) == 0 && $countones(cand8[m][b]) <= 4,
              $sformatf("%s mb%0d cand8[%0d] %b", name, m, b, cand8[m][b]));
      end
      for (int k = 0; k < 16; k++) begin
        check(int'(cand4[m][k]) == e_c4[m][k], $sformatf("%s mb%0d blk%0d cand4", name, m, k));
        check(int'(best_mode[m][k]) == e_mode[m][k],
              $sformatf("%s mb%0d blk%0d mode %0d vs %0d", name, m, k, best_mode[m][k], e_mode[m][k]));
        bad = 0;
        for (int l = 0; l < 3; l++) for (int i = 0; i < 16; i++) if (g_lv[m][k][l][i] != e_lv[m][k][l][i]) bad++;
        check(bad == 0, $sformatf("%s mb%0d blk%0d levels (%0d wrong)", name, m, k, bad));
        bad = 0;
        for (int i = 0; i < 16; i++) if (g_el[m][k][i] != e_el[m][k][i]) bad++;
        check(bad == 0, $sformatf("%s mb%0d blk%0d top-layer reconstruction (%0d wrong)", name, m, k, bad));
        if ($countones(e_c4[m][k]) < 9) n_prune++;
      end
    end
    // base-layer reconstruction memory
    bad = 0;
    for (int m = 0; m < 2; m++) for (int k = 0; k < 16; k++) for (int h = 0; h < 2; h++) begin
      int x0, y0;
      x0 = ((k >> 2) & 1) * 8 + (k & 1) * 4; y0 = ((k >> 3) & 1) * 8 + ((k >> 1) & 1) * 4;
      bl_raddr = 7'(m * 48 + k * 2 + h);
      @(posedge clk); #1;
      for (int kk = 0; kk < 2; kk++) for (int r = 0; r < 4; r++)
        if (int'(bl_rdata[8*(kk*4 + r) +: 8]) != rb[m][(y0 + r)*16 + x0 + 2*h + kk]) bad++;
      @(negedge clk);
    end
    check(bad == 0, $sformatf("%s base-layer reconstruction memory (%0d wrong)", name, bad));
    // timing: a fixed part (64 load cycles, 2 x 22 analysis cycles, the
    // per-block states other than candidate evaluation and the last block's
    // reconstruction) plus one cycle per evaluated candidate and per stall
    check(int'(enc_cycles) == T_FIXED + int'(cand_evals) + int'(dep_stall) + int'(hand_stall),
          $sformatf("%s: %0d cycles, expected %0d + %0d candidates + %0d stalls", name, enc_cycles,
                    T_FIXED, cand_evals, dep_stall + hand_stall));
    if (il) begin check(dep_stall == 0, {name, ": no dependency stall when interleaved"}); n_dep_il++; end
    else if (dep_stall > 0) n_dep_nil++;
    $display("%s: qp %0d interleave %0d bsize %0d/%0d cycles %0d dep_stall %0d hand_stall %0d candidates %0d",
             name, q, il, bsize[0], bsize[1], enc_cycles, dep_stall, hand_stall, cand_evals);
  endtask

  logic pp_last;
  initial begin
    go = 0; cur_we = 0; cur_addr = '0; cur_wdata = '0; qp = 6'd28; interleave = 1;
    bl_raddr = '0; el_raddr = '0;
    for (int m = 0; m < 2; m++) begin
      avail_top[m] = 1; avail_left[m] = 1; avail_topright[m] = 1; nb_corner[m] = '0;
      for (int i = 0; i < 20; i++) nb_top[m][i] = '0;
      for (int i = 0; i < 16; i++) nb_left[m][i] = '0;
    end
    for (int i = 0; i < 4; i++) cdc_in[i] = '0;
    civ = '0; cih = '0; pl_start = 0; pl_chroma = 0; pl_corner = '0;
    for (int i = 0; i < 16; i++) begin pl_top[i] = '0; pl_left[i] = '0; end
    n_switch = 0; n_bs = '{0, 0, 0}; n_lv_layer = '{0, 0, 0}; n_dep_nil = 0; n_dep_il = 0;
    n_prune = 0; n_pp = 0; n_side = 0; n_lv_ev = 0; n_el_ev = 0;
    repeat (3) @(posedge clk); #1 rst_n = 1;
    pp_last = pingpong;

    load(0, 1);
    run_round(4, 1'b0, "textured+stripes sequential");
    run_round(4, 1'b1, "textured+stripes");
    if (pingpong != pp_last) n_pp++;
    pp_last = pingpong;
    load(2, 3);
    avail_top[1] = 0; avail_left[0] = 0; avail_topright[0] = 0;
    run_round(6, 1'b1, "ramp+bars, edges");
    if (pingpong != pp_last) n_pp++;
    load(4, 2);
    avail_top[0] = 0; avail_left[0] = 1; avail_top[1] = 1; avail_left[1] = 0; avail_topright[1] = 0;
    run_round(28, 1'b0, "noise+ramp qp28 sequential");
    run_round(28, 1'b1, "noise+ramp qp28");
    load(4, 0);
    for (int m = 0; m < 2; m++) begin avail_top[m] = 1; avail_left[m] = 1; avail_topright[m] = 1; end
    run_round(16, 1'b1, "noise+textured qp16");
    check(rounds == 16'd6, $sformatf("global controller rounds %0d", rounds));

    // side units
    for (int n = 0; n < 20; n++) begin
      int a, b, c, d;
      a = int'($urandom_range(0, 2000)) - 1000; b = int'($urandom_range(0, 2000)) - 1000;
      c = int'($urandom_range(0, 2000)) - 1000; d = int'($urandom_range(0, 2000)) - 1000;
      cdc_in = '{coef_t'(a), coef_t'(b), coef_t'(c), coef_t'(d)};
      civ = 20'($urandom_range(0, 5000)); cih = 20'($urandom_range(0, 5000));
      #1;
      check(int'(cdc_out[0]) == a+b+c+d && int'(cdc_out[1]) == a-b+c-d &&
            int'(cdc_out[2]) == a+b-c-d && int'(cdc_out[3]) == a-b-c+d, "chroma DC Hadamard");
      check(ccand == ((civ >= cih) ? 4'b1101 : 4'b1011), "chroma candidates");
      n_side++;
    end
    for (int i = 0; i < 16; i++) begin pl_top[i] = 8'd77; pl_left[i] = 8'd77; end
    pl_corner = 8'd77; pl_chroma = 0;
    @(negedge clk); pl_start = 1; @(negedge clk); pl_start = 0;
    begin
      int rows, badp;
      rows = 0; badp = 0;
      repeat (30) begin
        @(posedge clk); #1;
        if (pl_valid) begin rows++; for (int i = 0; i < 16; i++) if (pl_pix[i] != 8'd77) badp++; end
      end
      check(rows == 16 && badp == 0, $sformatf("plane predictor rows %0d bad %0d", rows, badp));
      if (rows == 16) n_side++;
    end

    // mechanisms
    $display("mechanisms: bsize4x4=%0d bsize8x8=%0d bsize16x16=%0d mb_switches=%0d dep_stall_rounds=%0d interleaved_rounds=%0d",
             n_bs[0], n_bs[1], n_bs[2], n_switch, n_dep_nil, n_dep_il);
    $display("mechanisms: nonzero levels per layer %0d/%0d/%0d pruned_blocks=%0d pingpong=%0d side=%0d lvl_events=%0d el_events=%0d",
             n_lv_layer[0], n_lv_layer[1], n_lv_layer[2], n_prune, n_pp, n_side, n_lv_ev, n_el_ev);
    check(n_bs[0] > 0, "4x4 block size never chosen");
    check(n_bs[1] > 0, "8x8 block size never chosen");
    check(n_bs[2] > 0, "16x16 block size never chosen");
    check(n_switch > 0, "MB interleave never alternated");
    check(n_dep_nil > 0, "no dependency stall without interleaving");
    check(n_dep_il > 0, "no interleaved round");
    for (int l = 0; l < 3; l++) check(n_lv_layer[l] > 0, $sformatf("layer %0d never had a level", l));
    check(n_prune > 0, "candidates never pruned");
    check(n_pp > 0, "ping-pong never switched");
    check(n_side > 0, "side units never exercised");
    check(n_lv_ev == 6 * 32 * 6 && n_el_ev == 6 * 32 * 2, "stream event counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
