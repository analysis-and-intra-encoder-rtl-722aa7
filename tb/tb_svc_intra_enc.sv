// tb_svc_intra_enc: end-to-end test of the encoder core at its default
// (full) size.
//
// Two pictures' macroblocks (smooth gradients, vertical / horizontal /
// diagonal edges, flat areas and noise) are loaded into the current-MB
// buffer. Then 4x4 and 8x8 luma blocks of both pictures are encoded with
// random neighbours, availability, most probable modes and three QPs
// (BL >= EL1 >= EL2). A software model built from tb_ref_pkg computes for
// each block: the TraDED candidates from the transformed original, the
// prediction, residual transform and SATD of every candidate, the best
// mode (first minimum), the BL / EL1 / EL2 levels with inter-layer
// normalization, and the BL and top-layer reconstructions. The testbench
// compares the candidate word, every level beat, every reconstruction
// beat, best mode and cost, the neighbour-pixel and neighbour-mode RAM
// contents and the BL coefficient / reconstruction buffers. Between blocks
// it exercises the 16x16 / chroma analysis and the plane predictor side
// paths against their models.
// Mechanism counters (4x4 and 8x8 blocks, DC-dominant and DC-off
// decisions, MPM insertion, picture-boundary masking, best-candidate buffer
// swaps and keeps, non-zero EL2 refinements, reconstruction clipping,
// 16x16 and chroma analyses, plane predictions, both pictures) must all be
// non-zero. The cycle count of every block is checked against the
// sequencer's schedule.
//
// The expected values come from a block-level reference model built on
// tb_ref_pkg, written from the standard's equations and not from the RTL.
// The macroblock count, stimulus mix and watchdog limit are this
// testbench's own choices.
module tb_svc_intra_enc;
  import svc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s", what);
    end
  endtask
  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ DUT
  logic        ld_en;
  logic [6:0]  ld_addr;
  logic [63:0] ld_data;
  logic        cmd_valid, cmd_ready, cmd_is8, cmd_pic, cmd_b4row, cmd_b4col;
  logic [1:0]  cmd_blk8;
  pix_t        cmd_top [16], cmd_left [8], cmd_corner;
  logic        cmd_top_ok, cmd_left_ok, cmd_corner_ok, cmd_tr_ok;
  logic [3:0]  cmd_mpm;
  logic [5:0]  cmd_qp [3];
  logic [9:0]  cmd_nb_addr;
  logic [7:0]  cmd_nbm_addr;
  logic [1:0]  cmd_nbm_nib;
  logic        cand_valid, mode_valid, lvl_valid, rec_valid, rec_layer, done;
  logic [8:0]  cand_en;
  logic [3:0]  best_mode;
  cost_t       best_cost;
  logic [1:0]  lvl_layer;
  logic [2:0]  lvl_entry, rec_beat;
  coef_t       lvl [8];
  logic [7:0]  lvl_nz;
  pix_t        rec [8];
  logic        nb_rd_en, nbm_rd_en, lb_rd_en;
  logic [9:0]  nb_rd_addr;
  logic [63:0] nb_rd_data;
  logic [7:0]  nbm_rd_addr;
  logic [15:0] nbm_rd_data;
  logic [2:0]  lb_rd_sel;
  logic [6:0]  lb_rd_addr;
  logic [151:0] lb_rd_data;
  logic        a16_valid, a16_chroma, a16_top_ok, a16_left_ok, a16_out_valid;
  coef_t       a16_dc [16];
  logic [8:0]  a16_en;
  logic        pl_valid, pl_chroma, pl_out_valid;
  pix_t        pl_top [16], pl_left [16], pl_corner, pl_out [16];
  logic [1:0]  pl_bx, pl_by;

  svc_intra_enc dut (.*);

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // --------------------------------------------------------- test images
  int img [2][16][16];
  int chr [2][2][8][8];

  task automatic make_images();
    for (int p = 0; p < 2; p++) begin
      for (int q = 0; q < 4; q++) begin
        int kind, x0, y0, base;
        kind = $urandom_range(0, 5);
        x0 = 8 * (q % 2);
        y0 = 8 * (q / 2);
        base = $urandom_range(30, 220);
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) begin
            int v;
            case (kind)
              0: v = base + int'($urandom_range(0, 2));                    // flat
              1: v = (x < 3 + (q % 3)) ? 40 : 200;                           // vertical edge
              2: v = (y < 4) ? 30 : 220;                                     // horizontal edge
              3: v = (x > y) ? 210 : 50;                                     // diagonal edge
              4: v = base + 9 * (x - 4) - 5 * (y - 4);                       // gradient
              default: v = $urandom_range(0, 255);                           // noise
            endcase
            img[p][y0 + y][x0 + x] = clip255(v);
          end
      end
      for (int c = 0; c < 2; c++)
        for (int y = 0; y < 8; y++)
          for (int x = 0; x < 8; x++) chr[p][c][y][x] = $urandom_range(0, 255);
    end
  endtask

  task automatic load_images();
    for (int p = 0; p < 2; p++) begin
      for (int b8 = 0; b8 < 4; b8++)
        for (int w = 0; w < 8; w++) begin
          int b4r, h, b4c, x0, y0;
          b4r = w / 4; h = (w / 2) % 2; b4c = w % 2;
          x0 = 8 * (b8 % 2) + 4 * b4c;
          y0 = 8 * (b8 / 2) + 4 * b4r + 2 * h;
          @(negedge clk);
          ld_en = 1'b1;
          ld_addr = 7'(32 * p + 8 * b8 + w);
          for (int k = 0; k < 8; k++) ld_data[8*k +: 8] = 8'(img[p][y0 + k / 4][x0 + k % 4]);
        end
      for (int c = 0; c < 2; c++)
        for (int w = 0; w < 8; w++) begin
          int b4r, h, b4c;
          b4r = w / 4; h = (w / 2) % 2; b4c = w % 2;
          @(negedge clk);
          ld_en = 1'b1;
          ld_addr = 7'(64 + 16 * p + 8 * c + w);
          for (int k = 0; k < 8; k++)
            ld_data[8*k +: 8] = 8'(chr[p][c][4 * b4r + 2 * h + k / 4][4 * b4c + k % 4]);
        end
    end
    @(negedge clk);
    ld_en = 1'b0;
  endtask

  // ------------------------------------------------------ expected streams
  typedef struct {
    int layer, entry;
    int v [8];
  } lvl_exp_t;
  typedef struct {
    int layer, beat;
    int v [8];
  } rec_exp_t;
  lvl_exp_t lq [$];
  rec_exp_t rq [$];
  bit [8:0] exp_cand;
  int exp_mode, exp_cost;
  bit got_cand, got_mode;
  int nz_el2 = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (cand_valid) begin
        got_cand = 1'b1;
        check(cand_en == exp_cand, $sformatf("candidates got %b exp %b", cand_en, exp_cand));
      end
      if (mode_valid) begin
        got_mode = 1'b1;
        check(int'(best_mode) == exp_mode && int'(best_cost) == exp_cost,
              $sformatf("best mode %0d/%0d cost %0d/%0d", best_mode, exp_mode, best_cost, exp_cost));
      end
      if (lvl_valid) begin
        lvl_exp_t e;
        if (lq.size() == 0) check(1'b0, "unexpected levels");
        else begin
          e = lq.pop_front();
          check(int'(lvl_layer) == e.layer && int'(lvl_entry) == e.entry,
                $sformatf("level tags %0d/%0d %0d/%0d", lvl_layer, e.layer, lvl_entry, e.entry));
          for (int k = 0; k < 8; k++) begin
            check(int'(lvl[k]) == e.v[k], $sformatf("layer %0d entry %0d lane %0d level %0d exp %0d",
                                                    e.layer, e.entry, k, lvl[k], e.v[k]));
            check(lvl_nz[k] == (e.v[k] != 0), "nz flag");
            if (e.layer == 2 && e.v[k] != 0) nz_el2++;
          end
        end
      end
      if (rec_valid) begin
        rec_exp_t e;
        if (rq.size() == 0) check(1'b0, "unexpected reconstruction");
        else begin
          e = rq.pop_front();
          check(int'(rec_layer) == e.layer && int'(rec_beat) == e.beat, "reconstruction tags");
          for (int k = 0; k < 8; k++)
            check(int'(rec[k]) == e.v[k], $sformatf("rec layer %0d beat %0d lane %0d got %0d exp %0d",
                                                    e.layer, e.beat, k, rec[k], e.v[k]));
        end
      end
    end
  end

  // --------------------------------------------------- mechanism counters
  int n4 = 0, n8 = 0, n_dom = 0, n_off = 0, n_mpm = 0, n_edge = 0, n_swap = 0, n_keep = 0;
  int n_clip = 0, n_a16 = 0, n_chroma = 0, n_plane = 0, n_pic1 = 0, n_multi = 0;

  // neighbour RAM models
  logic [63:0] nbmem [960];
  logic [15:0] nbmmem [240];
  bit          nbvalid [960];
  bit          nbmvalid [240];

  // ------------------------------------------------------- one block
  task automatic run_block(input bit is8, input int pic, input int blk8, input int b4r, input int b4c);
    int n, x0, y0, ne, mpm, qp [3], nba, nbma, nbn;
    bit tok, lok, cok, trok;
    int top [16], left [8], corner;
    mat8_t org, t, bestw, pred, bestp, s, r;
    rit_t it;
    bit [8:0] en;
    int best, bcost, ncand, x;
    int tt [17], ll [9], tf [17], lf [9], ttr [16];
    longint t0;
    int exp_cycles, blk_cycles;
    int blr [8][8];

    n  = is8 ? 8 : 4;
    ne = is8 ? 8 : 2;
    x0 = 8 * (blk8 % 2) + (is8 ? 0 : 4 * b4c);
    y0 = 8 * (blk8 / 2) + (is8 ? 0 : 4 * b4r);
    org = '{default: 0};
    for (int y = 0; y < n; y++)
      for (int xx = 0; xx < n; xx++) org[y][xx] = img[pic][y0 + y][x0 + xx];

    // neighbours: mostly continuing the block, sometimes random
    tok  = ($urandom_range(0, 4) != 0);
    lok  = ($urandom_range(0, 4) != 0);
    cok  = tok && lok;
    trok = tok && ($urandom_range(0, 1) == 1);
    for (int k = 0; k < 16; k++)
      top[k] = clip255(org[0][k < n ? k : n - 1] + int'($urandom_range(0, 20)) - 10);
    for (int k = 0; k < 8; k++)
      left[k] = clip255(org[k < n ? k : n - 1][0] + int'($urandom_range(0, 20)) - 10);
    corner = clip255(org[0][0] + int'($urandom_range(0, 20)) - 10);
    if ($urandom_range(0, 3) == 0)
      for (int k = 0; k < 16; k++) top[k] = $urandom_range(0, 255);
    mpm  = $urandom_range(0, 8);
    qp[0] = $urandom_range(22, 40);
    qp[1] = qp[0] - int'($urandom_range(0, 6));
    qp[2] = qp[1] - int'($urandom_range(0, 6));
    nba  = $urandom_range(0, 959);
    nbma = $urandom_range(0, 239);
    nbn  = $urandom_range(0, 3);

    // ---- model: analysis
    t  = is8 ? xf8(org, 1'b0) : xf4(org, 0);
    it = rintens(t, n);
    en = rdecide(it, is8 ? 64 : 16, 2, mpm, tok, lok);
    if (it.dc > (is8 ? 64 : 16) * it.ac) n_dom++;
    if (!en[2]) n_off++;
    if ($countones(en & 9'h1FB) < 4 && mpm != 2 && en[mpm]) n_mpm++;
    if (!(tok && lok)) n_edge++;

    // ---- model: prediction edges
    for (int k = 0; k < 16; k++) ttr[k] = (trok || k < (is8 ? 8 : 4)) ? top[k] : top[is8 ? 7 : 3];
    tt = '{default: 0};
    ll = '{default: 0};
    tt[0] = corner; ll[0] = corner;
    for (int k = 0; k < 16; k++) tt[k + 1] = ttr[k];
    for (int k = 0; k < 8; k++) ll[k + 1] = left[k];
    if (is8) rfilt8(ttr, left, corner, tok, lok, cok, tf, lf);

    // ---- model: candidates
    best = -1;
    bcost = 0;
    ncand = 0;
    for (int m = 0; m < 9; m++) begin
      int cost;
      mat8_t res, c;
      if (!en[m]) continue;
      ncand++;
      pred = '{default: 0};
      for (int y = 0; y < n; y++)
        for (int xx = 0; xx < n; xx++) begin
          if (m == 2) begin
            int st, sl;
            st = 0;
            sl = 0;
            for (int k = 0; k < n; k++) begin
              st += is8 ? tf[k + 1] : top[k];
              sl += is8 ? lf[k + 1] : left[k];
            end
            if (tok && lok)  pred[y][xx] = (st + sl + n) / (2 * n);
            else if (tok)    pred[y][xx] = (st + n / 2) / n;
            else if (lok)    pred[y][xx] = (sl + n / 2) / n;
            else             pred[y][xx] = 128;
          end else begin
            pred[y][xx] = is8 ? rpred(8, m, xx, y, tf, lf) : rpred(4, m, xx, y, tt, ll);
          end
        end
      res = '{default: 0};
      for (int y = 0; y < n; y++)
        for (int xx = 0; xx < n; xx++) res[y][xx] = org[y][xx] - pred[y][xx];
      c = is8 ? xf8(res, 1'b0) : xf4(res, 0);
      cost = 0;
      for (int y = 0; y < n; y++)
        for (int xx = 0; xx < n; xx++) cost += iabs(c[y][xx]);
      if (best < 0 || cost < bcost) begin
        if (best >= 0) n_swap++;
        best = m;
        bcost = cost;
        bestw = c;
        bestp = pred;
      end else begin
        n_keep++;
      end
    end
    if (ncand > 1) n_multi++;
    exp_cand = en;
    exp_mode = best;
    exp_cost = bcost;

    // ---- model: three layers and reconstructions
    s = '{default: 0};
    for (int L = 0; L < 3; L++) begin
      for (int e = 0; e < ne; e++) begin
        lvl_exp_t le;
        le.layer = L;
        le.entry = e;
        for (int k = 0; k < 8; k++) begin
          int i, j, rr, lv;
          i = is8 ? k : 2 * e + k / 4;
          j = is8 ? e : k % 4;
          rr = (L == 0) ? bestw[i][j] : norm_sub(bestw[i][j], s[i][j], is8, i, j);
          lv = quant(rr, qp[L], is8, 1'b0, i, j);
          le.v[k] = lv;
          s[i][j] += dequant(lv, qp[L], is8, 0, i, j);
        end
        lq.push_back(le);
      end
      if (L == 0 || L == 2) begin
        r = is8 ? xf8(s, 1'b1) : xf4(s, 2);
        for (int b = 0; b < (is8 ? 8 : 2); b++) begin
          rec_exp_t re;
          re.layer = (L == 0) ? 0 : 1;
          re.beat  = b;
          for (int k = 0; k < 8; k++) begin
            int i, j, v;
            i = is8 ? k : k % 4;
            j = is8 ? b : 2 * b + k / 4;
            v = bestp[i][j] + r[i][j];
            if (v < 0 || v > 255) n_clip++;
            re.v[k] = clip255(v);
            if (L == 0) blr[b][k] = re.v[k];
            if (L == 0 && i == n - 1) begin
              // bottom row into the neighbour-pixel RAM model
              if (is8) nbmem[nba][8*j +: 8] = 8'(re.v[k]);
              else     nbmem[nba][32*b4c + 8*j +: 8] = 8'(re.v[k]);
            end
          end
          rq.push_back(re);
        end
      end
    end
    nbmmem[nbma][4*nbn +: 4] = 4'(best);
    nbvalid[nba] = is8 || nbvalid[nba];
    nbmvalid[nbma] = 1'b1;

    // ---- drive the command
    got_cand = 1'b0;
    got_mode = 1'b0;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1'b1;
    cmd_is8 = is8; cmd_pic = pic[0]; cmd_blk8 = 2'(blk8);
    cmd_b4row = b4r[0]; cmd_b4col = b4c[0];
    for (int k = 0; k < 16; k++) cmd_top[k] = pix_t'(top[k]);
    for (int k = 0; k < 8; k++) cmd_left[k] = pix_t'(left[k]);
    cmd_corner = pix_t'(corner);
    cmd_top_ok = tok; cmd_left_ok = lok; cmd_corner_ok = cok; cmd_tr_ok = trok;
    cmd_mpm = 4'(mpm);
    for (int L = 0; L < 3; L++) cmd_qp[L] = 6'(qp[L]);
    cmd_nb_addr = 10'(nba); cmd_nbm_addr = 8'(nbma); cmd_nbm_nib = 2'(nbn);
    t0 = cyc;
    @(negedge clk);
    cmd_valid = 1'b0;
    while (!done) @(negedge clk);
    blk_cycles = int'(cyc - t0);
    @(negedge clk);
    // schedule of the sequencer (see the top module's header)
    exp_cycles = is8 ? (93 + 12 * ncand) : (41 + 6 * ncand);
    check(blk_cycles == exp_cycles, $sformatf("block cycles %0d expected %0d (is8 %0d, %0d candidates)",
                                           blk_cycles, exp_cycles, is8, ncand));
    check(got_cand && got_mode, "candidate word and best mode reported");
    check(lq.size() == 0 && rq.size() == 0, "all levels and reconstructions seen");
    if (is8) n8++; else n4++;
    if (pic == 1) n_pic1++;

    // ---- read back RAMs
    @(negedge clk);
    nb_rd_en = 1'b1; nb_rd_addr = 10'(nba);
    nbm_rd_en = 1'b1; nbm_rd_addr = 8'(nbma);
    @(negedge clk);
    nb_rd_en = 1'b0; nbm_rd_en = 1'b0;
    if (is8) check(nb_rd_data == nbmem[nba], "neighbour pixels (8x8 bottom row)");
    else     check(nb_rd_data[32*b4c +: 32] == nbmem[nba][32*b4c +: 32], "neighbour pixels (4x4 bottom row)");
    check(nbm_rd_data[4*nbn +: 4] == 4'(best), "neighbour mode");
    for (int e = 0; e < ne; e++) begin
      int slot;
      slot = 32 * pic + 8 * blk8 + (is8 ? 0 : 4 * b4r + 2 * b4c);
      @(negedge clk);
      lb_rd_en = 1'b1; lb_rd_sel = 3'd0; lb_rd_addr = 7'(slot + e);
      @(negedge clk);
      lb_rd_en = 1'b0;
      for (int k = 0; k < 8; k++) begin
        int i, j;
        i = is8 ? k : 2 * e + k / 4;
        j = is8 ? e : k % 4;
        check(int'($signed(lb_rd_data[16*k +: 16])) == bestw[i][j], "BL coefficient buffer");
      end
      @(negedge clk);
      lb_rd_en = 1'b1; lb_rd_sel = 3'd4; lb_rd_addr = 7'(slot + e);
      @(negedge clk);
      lb_rd_en = 1'b0;
      if (is8 || e < 2) begin
        // BL reconstruction beat e
        for (int k = 0; k < 8; k++)
          check(int'(lb_rd_data[8*k +: 8]) == blr[e][k], "BL reconstruction buffer");
      end
    end
  endtask

  // ------------------------------------------------------- side paths
  task automatic run_a16();
    bit chroma, tok, lok;
    mat8_t d, h;
    rit_t it;
    bit [8:0] e;
    bit vmax, hmax;
    chroma = $urandom_range(0, 1);
    tok = $urandom_range(0, 3) != 0;
    lok = $urandom_range(0, 3) != 0;
    d = '{default: 0};
    for (int k = 0; k < 16; k++) d[k/4][k%4] = int'($urandom_range(0, 4000)) - 2000;
    if ($urandom_range(0, 2) == 0)
      for (int k = 1; k < 16; k++) d[k/4][k%4] = d[0][0] + int'($urandom_range(0, 10));
    it = '{default: 0};
    if (chroma) begin
      int cb [4], cr [4];
      cb[0] = d[0][0] + d[0][1] + d[1][0] + d[1][1];
      cb[1] = d[0][0] - d[0][1] + d[1][0] - d[1][1];
      cb[2] = d[0][0] + d[0][1] - d[1][0] - d[1][1];
      cb[3] = d[0][0] - d[0][1] - d[1][0] + d[1][1];
      cr[0] = d[0][2] + d[0][3] + d[1][2] + d[1][3];
      cr[1] = d[0][2] - d[0][3] + d[1][2] - d[1][3];
      cr[2] = d[0][2] + d[0][3] - d[1][2] - d[1][3];
      cr[3] = d[0][2] - d[0][3] - d[1][2] + d[1][3];
      it.dc = iabs(cb[0]) + iabs(cr[0]);
      it.v  = iabs(cb[1]) + iabs(cr[1]);
      it.h  = iabs(cb[2]) + iabs(cr[2]);
      it.d  = iabs(cb[3]) + iabs(cr[3]);
      it.ac = it.v + it.h + it.d;
      n_chroma++;
    end else begin
      h = xf4(d, 1);
      it = rintens(h, 4);
      n_a16++;
    end
    vmax = it.v >= it.h && it.v >= it.d;
    hmax = !vmax && it.h >= it.d;
    e = '0;
    if (chroma) begin
      e[0] = 1'b1;
      if (vmax) e[2] = tok; else if (hmax) e[1] = lok; else e[3] = tok && lok;
    end else begin
      e[2] = !(tok && lok) || !(it.dc < 2 * it.ac);
      if (vmax) e[0] = tok; else if (hmax) e[1] = lok; else e[3] = tok && lok;
    end
    @(negedge clk);
    a16_valid = 1'b1;
    a16_chroma = chroma;
    a16_top_ok = tok;
    a16_left_ok = lok;
    for (int k = 0; k < 16; k++) a16_dc[k] = coef_t'(d[k/4][k%4]);
    @(negedge clk);
    a16_valid = 1'b0;
    @(negedge clk);
    @(negedge clk);
    check(a16_out_valid, "16x16 / chroma analysis latency");
    check(a16_en == e, $sformatf("16x16/chroma (%0d) modes got %b exp %b", chroma, a16_en, e));
  endtask

  task automatic run_plane();
    bit chroma;
    int n, hh, vv, a, b, c, bx, by, xc;
    chroma = $urandom_range(0, 1);
    n = chroma ? 4 : 8;
    for (int k = 0; k < 16; k++) begin
      pl_top[k]  = pix_t'($urandom_range(0, 255));
      pl_left[k] = pix_t'($urandom_range(0, 255));
    end
    pl_corner = pix_t'($urandom_range(0, 255));
    hh = 0;
    vv = 0;
    for (int k = 0; k < n; k++) begin
      hh += (k + 1) * (int'(pl_top[n + k]) - ((n - 2 - k < 0) ? int'(pl_corner) : int'(pl_top[n - 2 - k])));
      vv += (k + 1) * (int'(pl_left[n + k]) - ((n - 2 - k < 0) ? int'(pl_corner) : int'(pl_left[n - 2 - k])));
    end
    a = 16 * (int'(pl_left[2*n - 1]) + int'(pl_top[2*n - 1]));
    b = ((chroma ? 34 : 5) * hh + 32) >>> 6;
    c = ((chroma ? 34 : 5) * vv + 32) >>> 6;
    bx = chroma ? $urandom_range(0, 1) : $urandom_range(0, 3);
    by = chroma ? $urandom_range(0, 1) : $urandom_range(0, 3);
    xc = chroma ? 3 : 7;
    @(negedge clk);
    pl_valid = 1'b1;
    pl_chroma = chroma;
    pl_bx = 2'(bx);
    pl_by = 2'(by);
    @(negedge clk);
    pl_valid = 1'b0;
    @(negedge clk);
    check(pl_out_valid, "plane latency");
    for (int k = 0; k < 16; k++)
      check(int'(pl_out[k]) == clip255((a + b * (4 * bx + k % 4 - xc) + c * (4 * by + k / 4 - xc) + 16) >>> 5),
            $sformatf("plane pixel %0d", k));
    n_plane++;
  endtask

  // ------------------------------------------------------- main
  initial begin
    ld_en = 1'b0; ld_addr = '0; ld_data = '0;
    cmd_valid = 1'b0; cmd_is8 = 1'b0; cmd_pic = 1'b0; cmd_blk8 = '0; cmd_b4row = 1'b0; cmd_b4col = 1'b0;
    cmd_top = '{default: '0}; cmd_left = '{default: '0}; cmd_corner = '0;
    cmd_top_ok = 1'b0; cmd_left_ok = 1'b0; cmd_corner_ok = 1'b0; cmd_tr_ok = 1'b0;
    cmd_mpm = '0; cmd_qp = '{default: '0}; cmd_nb_addr = '0; cmd_nbm_addr = '0; cmd_nbm_nib = '0;
    nb_rd_en = 1'b0; nb_rd_addr = '0; nbm_rd_en = 1'b0; nbm_rd_addr = '0;
    lb_rd_en = 1'b0; lb_rd_sel = '0; lb_rd_addr = '0;
    a16_valid = 1'b0; a16_chroma = 1'b0; a16_dc = '{default: '0}; a16_top_ok = 1'b0; a16_left_ok = 1'b0;
    pl_valid = 1'b0; pl_chroma = 1'b0; pl_top = '{default: '0}; pl_left = '{default: '0};
    pl_corner = '0; pl_bx = '0; pl_by = '0;
    nbmem = '{default: '0};
    nbmmem = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int mb = 0; mb < 12; mb++) begin
      make_images();
      load_images();
      for (int p = 0; p < 2; p++)
        for (int b8 = 0; b8 < 4; b8++) begin
          if ($urandom_range(0, 1) == 1) run_block(1'b1, p, b8, 0, 0);
          else
            for (int q = 0; q < 4; q++) run_block(1'b0, p, b8, q / 2, q % 2);
          run_a16();
          run_plane();
        end
    end
    repeat (5) @(negedge clk);
    $display("blocks: 4x4 %0d, 8x8 %0d, picture 1 %0d, several candidates %0d", n4, n8, n_pic1, n_multi);
    $display("decisions: DC-dominant %0d, DC off %0d, MPM added %0d, boundary %0d", n_dom, n_off, n_mpm, n_edge);
    $display("best buffer: swaps %0d, keeps %0d; EL2 non-zero levels %0d; clipped pixels %0d",
             n_swap, n_keep, nz_el2, n_clip);
    $display("side paths: 16x16 %0d, chroma %0d, plane %0d", n_a16, n_chroma, n_plane);
    check(n4 > 0 && n8 > 0 && n_pic1 > 0 && n_multi > 0, "block kinds exercised");
    check(n_dom > 0 && n_off > 0 && n_mpm > 0 && n_edge > 0, "decision cases exercised");
    check(n_swap > 0 && n_keep > 0 && nz_el2 > 0 && n_clip > 0, "buffer swap, keep, EL2 refinement, clipping exercised");
    check(n_a16 > 0 && n_chroma > 0 && n_plane > 0, "side paths exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
