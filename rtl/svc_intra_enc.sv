// svc_intra_enc: SVC intra encoder core with three quality layers.
//
// Encodes one luma block per command, a 4x4 or an 8x8 block of the
// current macroblock of either of two pictures coded in parallel, and
// produces its quantized levels for a base layer (BL) and two quality
// enhancement layers (EL1, EL2) plus the reconstructions of the base and
// top layer. The flow follows the design's three phases:
//   Intra-T   The original block is read from the current-MB buffer and
//             transformed (tran4dc for 4x4, tran48 for 8x8); the cost unit
//             turns the coefficients into edge intensities and the mode
//             decision unit (TraDED) enables a few candidate modes. For
//             each candidate, the prediction (pg416c / pg4816, pg_dc for
//             DC) minus the original (resid_gen) is transformed by tran48
//             and costed by costcal4816 (DCT-based SATD). Coefficients of
//             the candidate go to one half of the dual-port best-mode
//             buffer; when the candidate wins, the halves swap roles.
//   QQ-Rec    The winner's coefficients are quantized with the BL QP,
//             dequantized, inverse transformed and added to the prediction.
//   Quality   For EL1 and EL2, the same quantizer pair re-quantizes, with
//   Refine    the layer's QP, the coefficient minus the normalized sum of
//             the dequantized lower layers (qe_norm_sub). After EL2 the
//             top-layer reconstruction is formed from all three layers.
// Beside the block flow, two side paths reuse units while the sequencer is
// idle: a 16x16 / chroma analysis (DC terms -> tran4dc Hadamard ->
// costcal416c -> mode416c) and a plane-mode predictor (pg_pls + pg_plane).
//
// Interfaces (all single-cycle valid strobes unless noted):
//   ld_*    writes 64-bit words into the current-MB buffer (address map in
//           cur_mb_buf). Only while idle.
//   cmd_*   one block command, accepted when cmd_ready. Neighbours, their
//           availability, the most probable mode, the three QPs and the
//           neighbour-RAM slots for the block's bottom row and mode come
//           with it.
//   cand_*  the 9-bit candidate-enable word of the block (cand_valid).
//   mode_*  best mode and its SATD (mode_valid).
//   lvl_*   8 levels per beat, layer lvl_layer (0 BL, 1 EL1, 2 EL2), entry
//           lvl_entry: 4x4 entry e = rows 2e, 2e+1 row-major; 8x8 entry e =
//           column e rows 0..7.
//   rec_*   8 reconstructed pixels per beat, rec_layer 0 = BL, 1 = top
//           layer; 4x4 beat k = columns 2k, 2k+1 (rec[0..3], rec[4..7]),
//           8x8 beat k = column k.
//   nb_rd_* / nbm_rd_*  read the neighbour-pixel / neighbour-mode RAMs
//           while idle (data one cycle later).
//   a16_*   side analysis of a 16x16 (Hadamard of 16 luma DC terms, given
//           as 4x4 DCT DC values) or chroma (Cb DC terms in 0,1,4,5, Cr in
//           2,3,6,7) block; a16_en answers three cycles later.
//   pl_*    plane prediction of 4x4 piece (pl_bx, pl_by); pl_out two
//           cycles later.
// Timing: the block flow is sequential (one candidate at a time, layers
// one after another). From the accepted command to done a 4x4 block takes
// 41 + 6 cycles per candidate mode, an 8x8 block 93 + 12 per candidate.
// The design reaches 454 cycles per macroblock by pipelining macroblocks
// in two stages and running the phases concurrently; that
// macroblock-level schedule, inter-layer prediction and chroma / 16x16
// block coding are not sequenced here (the 16x16 / chroma analysis and
// plane predictor are exposed as side paths).
// Not used: the candidate generator's done pulse (the sequencer counts on
// cand_last) and the inverse transform's kind tag (one kind is in flight).
// The lint note that rst_n is used both synchronously and asynchronously
// (SYNCASYNCNET) comes from the assertions in the
// sub-blocks, which sample rst_n synchronously in disable iff.
module svc_intra_enc
  import svc_pkg::*;
#(
  parameter logic [7:0] TH4_DOM  = 8'd16,
  parameter logic [7:0] TH4_OFF  = 8'd2,
  parameter logic [7:0] TH8_DOM  = 8'd64,
  parameter logic [7:0] TH8_OFF  = 8'd2,
  parameter logic [7:0] TH16_OFF = 8'd2
) (
  input  logic        clk,
  input  logic        rst_n,
  // current-MB loading
  input  logic        ld_en,
  input  logic [6:0]  ld_addr,
  input  logic [63:0] ld_data,
  // block command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_is8,
  input  logic        cmd_pic,
  input  logic [1:0]  cmd_blk8,
  input  logic        cmd_b4row,
  input  logic        cmd_b4col,
  input  pix_t        cmd_top [16],
  input  pix_t        cmd_left [8],
  input  pix_t        cmd_corner,
  input  logic        cmd_top_ok,
  input  logic        cmd_left_ok,
  input  logic        cmd_corner_ok,
  input  logic        cmd_tr_ok,
  input  logic [3:0]  cmd_mpm,
  input  logic [5:0]  cmd_qp [3],
  input  logic [9:0]  cmd_nb_addr,
  input  logic [7:0]  cmd_nbm_addr,
  input  logic [1:0]  cmd_nbm_nib,
  // results
  output logic        cand_valid,
  output logic [8:0]  cand_en,
  output logic        mode_valid,
  output logic [3:0]  best_mode,
  output cost_t       best_cost,
  output logic        lvl_valid,
  output logic [1:0]  lvl_layer,
  output logic [2:0]  lvl_entry,
  output coef_t       lvl [8],
  output logic [7:0]  lvl_nz,
  output logic        rec_valid,
  output logic        rec_layer,
  output logic [2:0]  rec_beat,
  output pix_t        rec [8],
  output logic        done,
  // neighbour RAM read-out
  input  logic        nb_rd_en,
  input  logic [9:0]  nb_rd_addr,
  output logic [63:0] nb_rd_data,
  input  logic        nbm_rd_en,
  input  logic [7:0]  nbm_rd_addr,
  output logic [15:0] nbm_rd_data,
  // layer-buffer read-out (while idle): sel 0 BL coefficients, 1 BL scaled,
  // 2 EL scaled, 3 pre-quantized, 4 BL recon, 5 EL recon, 6 best-mode
  // coefficients; data zero-extended, one cycle later
  input  logic        lb_rd_en,
  input  logic [2:0]  lb_rd_sel,
  input  logic [6:0]  lb_rd_addr,
  output logic [151:0] lb_rd_data,
  // 16x16 / chroma analysis side path
  input  logic        a16_valid,
  input  logic        a16_chroma,
  input  coef_t       a16_dc [16],
  input  logic        a16_top_ok,
  input  logic        a16_left_ok,
  output logic        a16_out_valid,
  output logic [8:0]  a16_en,
  // plane prediction side path
  input  logic        pl_valid,
  input  logic        pl_chroma,
  input  pix_t        pl_top [16],
  input  pix_t        pl_left [16],
  input  pix_t        pl_corner,
  input  logic [1:0]  pl_bx,
  input  logic [1:0]  pl_by,
  output logic        pl_out_valid,
  output pix_t        pl_out [16]
);
  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_AN, S_ANW, S_CAND, S_CWAIT, S_Q, S_QW, S_REC, S_RECW, S_DONE
  } state_e;
  state_e state;

  // ---------------------------------------------------------------- command
  logic        is8, pic, b4row, b4col;
  logic [1:0]  blk8;
  logic [3:0]  mpm;
  logic [5:0]  qp [3];
  logic        top_ok, left_ok;
  logic [9:0]  nb_addr;
  logic [7:0]  nbm_addr;
  logic [1:0]  nbm_nib;
  pix_t        orgm [8][8];
  pix_t        pbuf [2][8][8];   // prediction of candidate / best
  coef_t       sm [8][8];        // accumulated scaled coefficients
  logic        cbuf, bbuf;       // candidate / best halves of the coef RAM
  logic        have_best;
  logic [3:0]  cur_mode;
  logic [2:0]  cnt, cnt2;
  logic [1:0]  layer;
  logic [3:0]  nent;             // entries per block: 2 (4x4) or 8 (8x8)
  pix_t        botrow [8];
  logic       cg_load, cg_ready, cg_valid, cg_last, cg_done;
  logic [3:0] cg_mode;
  logic [8:0] cg_en;

  assign nent      = is8 ? 4'd8 : 4'd2;
  assign cmd_ready = (state == S_IDLE);

  // --------------------------------------------------------- current MB buf
  logic  cm_rd_en, cm_rd_valid;
  logic  cm_b4row, cm_h;
  pix_t  cm_pix [16];
  cur_mb_buf u_cur (
    .clk(clk), .rst_n(rst_n),
    .ld_en(ld_en && state == S_IDLE), .ld_addr(ld_addr), .ld_data(ld_data),
    .rd_en(cm_rd_en), .rd_pic(pic), .rd_comp(2'd0), .rd_blk8(blk8),
    .rd_b4row(cm_b4row), .rd_b4col(b4col), .rd_h(cm_h), .rd_rows8(is8),
    .rd_valid(cm_rd_valid), .rd_pix(cm_pix)
  );
  assign cm_rd_en = (state == S_RD) && (cnt <= (is8 ? 3'd3 : 3'd0));
  assign cm_b4row = is8 ? cnt[1] : b4row;
  assign cm_h     = cnt[0];

  // ------------------------------------------------ analysis (4x4 / 16x16)
  logic    t4_valid, t4_out_valid;
  tmode_e  t4_mode;
  coef_t   t4_in [16], t4_out [16];
  logic    side_req;
  logic [2:0] side_pipe;
  blk_e    a4_blk, a4_blk_q;
  logic    cc4_valid;
  intens_t cc4_it;
  logic    md4_valid;
  logic [8:0] md4_en;
  logic    md4_top_ok, md4_left_ok;

  assign side_req = a16_valid && state == S_IDLE && !cmd_valid;
  always_comb begin
    t4_valid = 1'b0;
    t4_mode  = TR_DCT;
    a4_blk   = BLK_4X4;
    for (int k = 0; k < 16; k++) t4_in[k] = coef_t'(orgm[k/4][k%4]);
    if (state == S_AN && !is8) begin
      t4_valid = 1'b1;
    end else if (side_req) begin
      t4_valid = 1'b1;
      t4_mode  = a16_chroma ? TR_DHT2 : TR_DHT;
      a4_blk   = a16_chroma ? BLK_CHROMA : BLK_16X16;
      if (a16_chroma) begin
        for (int k = 0; k < 16; k++) t4_in[k] = '0;
        t4_in[0] = a16_dc[0]; t4_in[1] = a16_dc[1];   // Cb
        t4_in[4] = a16_dc[4]; t4_in[5] = a16_dc[5];
      end else begin
        t4_in = a16_dc;
      end
    end
  end
  tran4dc u_t4 (.clk(clk), .rst_n(rst_n), .in_valid(t4_valid), .in_mode(t4_mode),
                .in_x(t4_in), .out_valid(t4_out_valid), .out_y(t4_out));

  // chroma: Cr DC terms go through a 2x2 Hadamard next to Cb's
  coef_t cr_q [4];
  coef_t cc4_in [16];
  logic ok1_top, ok1_left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cr_q      <= '{default: '0};
      a4_blk_q  <= BLK_4X4;
      side_pipe <= '0;
      ok1_top   <= 1'b0;
      ok1_left  <= 1'b0;
      md4_top_ok  <= 1'b0;
      md4_left_ok <= 1'b0;
    end else begin
      if (t4_out_valid) begin
        md4_top_ok  <= ok1_top;
        md4_left_ok <= ok1_left;
      end
      side_pipe <= {side_pipe[1:0], side_req};
      if (t4_valid) begin
        a4_blk_q <= a4_blk;
        cr_q[0] <= a16_dc[2] + a16_dc[3] + a16_dc[6] + a16_dc[7];
        cr_q[1] <= a16_dc[2] - a16_dc[3] + a16_dc[6] - a16_dc[7];
        cr_q[2] <= a16_dc[2] + a16_dc[3] - a16_dc[6] - a16_dc[7];
        cr_q[3] <= a16_dc[2] - a16_dc[3] - a16_dc[6] + a16_dc[7];
        ok1_top  <= side_req ? a16_top_ok  : top_ok;
        ok1_left <= side_req ? a16_left_ok : left_ok;
      end
    end
  end
  always_comb begin
    cc4_in = t4_out;
    if (a4_blk_q == BLK_CHROMA) begin
      cc4_in[2] = cr_q[0]; cc4_in[3] = cr_q[1];
      cc4_in[6] = cr_q[2]; cc4_in[7] = cr_q[3];
    end
  end
  blk_e cc4_blk_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)            cc4_blk_q <= BLK_4X4;
    else if (t4_out_valid) cc4_blk_q <= a4_blk_q;
  end
  costcal416c u_cc4 (.clk(clk), .rst_n(rst_n), .in_valid(t4_out_valid), .in_blk(a4_blk_q),
                     .in_c(cc4_in), .out_valid(cc4_valid), .out_it(cc4_it));
  mode416c #(.TH4_DOM(TH4_DOM), .TH4_OFF(TH4_OFF), .TH16_OFF(TH16_OFF)) u_md4 (
    .clk(clk), .rst_n(rst_n), .in_valid(cc4_valid), .in_blk(cc4_blk_q), .in_it(cc4_it),
    .top_ok(md4_top_ok), .left_ok(md4_left_ok), .mpm(mpm),
    .out_valid(md4_valid), .out_en(md4_en));
  assign a16_out_valid = md4_valid && side_pipe[2];
  assign a16_en        = md4_en;

  // ------------------------------------------------ prediction generators
  logic  dc_valid;
  pix_t  dc_val;
  pix_t  dc_top [16], dc_left [16];
  always_comb begin
    for (int k = 0; k < 16; k++) begin
      dc_top[k]  = cmd_top[k];
      dc_left[k] = (k < 8) ? cmd_left[k] : 8'd0;
    end
  end
  pg_dc u_dc (.clk(clk), .rst_n(rst_n), .in_valid(cmd_valid && state == S_IDLE),
              .in_blk(BLK_4X4), .cblk(2'd0),
              .top(dc_top), .left(dc_left), .top_ok(cmd_top_ok), .left_ok(cmd_left_ok),
              .out_valid(dc_valid), .out_p(dc_val));
  pix_t dc_hold;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        dc_hold <= '0;
    else if (dc_valid) dc_hold <= dc_val;
  end

  logic  p4_req, p8_req;
  logic  p4_valid, p8_valid;
  pix_t  p4_out [16], p8_out [16];
  pix_t  p4_top [8], p4_left [4];
  pix_t cmd_top_q [16], cmd_left_q [8], cmd_corner_q;
  logic tr_ok_q;
  logic [1:0] p8_row;
  always_comb begin
    for (int k = 0; k < 8; k++) p4_top[k] = cmd_top_q[k];
    for (int k = 0; k < 4; k++) p4_left[k] = cmd_left_q[k];
  end
  pg416c u_p4 (.clk(clk), .rst_n(rst_n), .in_valid(p4_req), .in_blk(BLK_4X4),
               .in_mode(cg_mode), .top(p4_top), .left(p4_left), .corner(cmd_corner_q),
               .tr_ok(tr_ok_q), .out_valid(p4_valid), .out_p(p4_out));
  pg4816 u_p8 (.clk(clk), .rst_n(rst_n), .ref_load(cmd_valid && state == S_IDLE),
               .top(cmd_top), .left(cmd_left), .corner(cmd_corner),
               .top_ok(cmd_top_ok), .left_ok(cmd_left_ok), .corner_ok(cmd_corner_ok),
               .tr_ok(cmd_tr_ok), .in_valid(p8_req), .in_blk(BLK_8X8), .in_mode(cg_mode),
               .in_row(p8_row), .out_valid(p8_valid), .out_p(p8_out));

  // prediction stream -> residual -> tran48
  logic  pr_valid;
  pix_t  pr_pix [16];
  pix_t  pr_org [16];
  logic [1:0] pr_cnt;          // row pair of the 8x8 prediction stream
  logic  rs_valid;
  coef_t rs [16];
  always_comb begin
    pr_valid = is8 ? p8_valid : p4_valid;
    for (int k = 0; k < 16; k++) begin
      pr_pix[k] = is8 ? p8_out[k] : ((cur_mode == M_DC) ? dc_hold : p4_out[k]);
      pr_org[k] = is8 ? orgm[2*pr_cnt + k/8][k%8] : orgm[k/4][k%4];
    end
  end
  resid_gen u_rs (.clk(clk), .rst_n(rst_n), .in_valid(pr_valid), .org(pr_org), .prd(pr_pix),
                  .out_valid(rs_valid), .res(rs));

  logic  t8_valid, t8_out_valid, t8_out_is4;
  logic [1:0] t8_out_beat;
  coef_t t8_in [16], t8_out [16];
  always_comb begin
    t8_valid = rs_valid;
    t8_in    = rs;
    if (state == S_AN && is8) begin
      t8_valid = 1'b1;
      for (int k = 0; k < 16; k++) t8_in[k] = coef_t'(orgm[2*cnt[1:0] + k/8][k%8]);
    end
  end
  tran48 u_t8 (.clk(clk), .rst_n(rst_n), .in_valid(t8_valid), .in_is4(!is8), .in_x(t8_in),
               .out_valid(t8_out_valid), .out_is4(t8_out_is4), .out_beat(t8_out_beat),
               .out_y(t8_out));

  logic    cc8_valid;
  intens_t cc8_it;
  costcal4816 u_cc8 (.clk(clk), .rst_n(rst_n), .in_valid(t8_out_valid),
                     .in_blk(t8_out_is4 ? BLK_4X4 : BLK_8X8), .in_beat(t8_out_beat),
                     .in_c(t8_out), .out_valid(cc8_valid), .out_it(cc8_it));
  logic       md8_valid;
  logic [8:0] md8_en;
  mode48 #(.TH4_DOM(TH4_DOM), .TH4_OFF(TH4_OFF), .TH8_DOM(TH8_DOM), .TH8_OFF(TH8_OFF)) u_md8 (
    .clk(clk), .rst_n(rst_n), .in_valid(cc8_valid && state == S_ANW), .in_blk(BLK_8X8),
    .in_it(cc8_it), .top_ok(top_ok), .left_ok(left_ok), .mpm(mpm),
    .out_valid(md8_valid), .out_en(md8_en));

  // candidate stream
  assign cg_en = is8 ? md8_en : md4_en;
  mode_cand_gen u_cg (.clk(clk), .rst_n(rst_n), .load(cg_load), .en(cg_en),
                      .cand_ready(cg_ready), .cand_valid(cg_valid), .cand_mode(cg_mode),
                      .cand_last(cg_last), .done(cg_done));

  // ------------------------------------------------ best-mode coefficient RAM
  localparam int CW = 19;
  logic         bc_a_en, bc_a_we, bc_b_en, bc_b_we;
  logic [6:0]   bc_a_addr, bc_b_addr;
  logic [151:0] bc_a_wd, bc_b_wd, bc_a_rd, bc_b_rd;
  dp_ram #(.DEPTH(128), .WIDTH(152)) u_bestcoef (
    .clk(clk),
    .a_en(bc_a_en), .a_we(bc_a_we), .a_addr(bc_a_addr), .a_wdata(bc_a_wd), .a_rdata(bc_a_rd),
    .b_en(bc_b_en), .b_we(bc_b_we), .b_addr(bc_b_addr), .b_wdata(bc_b_wd), .b_rdata(bc_b_rd));

  function automatic logic [151:0] pack8(input coef_t c [16], input int base);
    logic [151:0] w;
    for (int k = 0; k < 8; k++) w[CW*k +: CW] = CW'(c[base+k]);
    return w;
  endfunction

  // lane position of coefficient k of entry e
  function automatic logic [2:0] lane_i(input logic b8, input logic [2:0] e, input int k);
    return b8 ? 3'(k) : 3'(2 * int'(e) + k / 4);
  endfunction
  function automatic logic [2:0] lane_j(input logic b8, input logic [2:0] e, input int k);
    return b8 ? e : 3'(k % 4);
  endfunction

  // ------------------------------------------------ quantization pipeline
  logic       q_issue;
  logic [2:0] q_e0;
  logic       q1_v;
  logic [2:0] q1_e, q2_e, q3_e;
  coef_t      q_w [8], q_s [8], q_r [8], q_l [8], q_dq [8];
  logic [2:0] q1_i [8], q1_j [8], q2_i [8], q2_j [8], q3_i [8], q3_j [8];
  logic       qe_valid, qn_valid, dq_valid;
  logic [7:0] q_nz;
  logic [3:0] q_out;            // entries retired in this layer

  always_comb begin
    for (int k = 0; k < 8; k++) begin
      q_w[k]  = coef_t'(bc_a_rd[CW*k +: CW]);
      q1_i[k] = lane_i(is8, q1_e, k);
      q1_j[k] = lane_j(is8, q1_e, k);
      q_s[k]  = (layer == 2'd0) ? '0 : sm[q1_i[k]][q1_j[k]];
    end
  end
  qe_norm_sub u_qe (.clk(clk), .rst_n(rst_n), .in_valid(q1_v), .is8(is8), .in_w(q_w),
                    .in_s(q_s), .in_i(q1_i), .in_j(q1_j), .out_valid(qe_valid), .out_r(q_r));
  quant8 u_q (.clk(clk), .rst_n(rst_n), .in_valid(qe_valid), .is8(is8), .is_dc(1'b0),
              .qp(qp[layer]), .in_c(q_r), .in_i(q2_i), .in_j(q2_j),
              .out_valid(qn_valid), .out_l(q_l), .out_nz(q_nz));
  dequant8 u_dq (.clk(clk), .rst_n(rst_n), .in_valid(qn_valid), .is8(is8), .dc_kind(2'd0),
                 .qp(qp[layer]), .in_l(q_l), .in_i(q3_i), .in_j(q3_j),
                 .out_valid(dq_valid), .out_c(q_dq));
  logic [2:0] q4_e;
  logic [2:0] q4_i [8], q4_j [8];
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      q4_i[k] = lane_i(is8, q4_e, k);
      q4_j[k] = lane_j(is8, q4_e, k);
    end
  end

  assign lvl_valid = qn_valid;
  assign lvl_layer = layer;
  assign lvl_entry = q3_e;
  assign lvl       = q_l;
  assign lvl_nz    = q_nz;

  // ------------------------------------------------ layer buffers (RAMs)
  logic [135:0] s_word, r_word;
  logic [127:0] w_word;
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      s_word[17*k +: 17] = 17'(q_dq[k]);
      r_word[17*k +: 17] = 17'(q_r[k]);
      w_word[16*k +: 16] = q_w[k];
    end
  end
  logic [6:0] blk_slot;   // 8-entry slot of this block in the layer buffers
  assign blk_slot = {1'b0, pic, blk8, is8 ? 3'd0 : {b4row, b4col, 1'b0}};
  // EL buffers hold one macroblock per layer: 48 words, luma in 0..31
  logic [6:0] el_slot;
  assign el_slot = (layer == 2'd2 ? 7'd48 : 7'd0) + {2'b00, blk8, is8 ? 3'd0 : {b4row, b4col, 1'b0}};
  logic [127:0] bl_coef_rd;
  logic [135:0] bl_scaled_rd, el_scaled_rd, prequant_rd;
  logic       lb_rd;
  logic       rc_valid;
  logic [2:0] lb_sel_q;
  assign lb_rd = lb_rd_en && state == S_IDLE;
  logic w_blc, w_bls, w_els, w_prq, w_blr, w_elr;
  assign w_blc = q1_v && layer == 2'd0;
  assign w_bls = dq_valid && layer == 2'd0;
  assign w_els = dq_valid && layer != 2'd0;
  assign w_prq = qe_valid && layer != 2'd0;
  assign w_blr = rc_valid && layer == 2'd0;
  assign w_elr = rc_valid && layer != 2'd0;
  sp_ram #(.DEPTH(128), .WIDTH(128)) u_bl_coef (
    .clk(clk), .en(w_blc || (lb_rd && lb_rd_sel == 3'd0)), .we(w_blc),
    .addr(w_blc ? blk_slot + 7'(q1_e) : lb_rd_addr),
    .wdata(w_word), .wmask('1), .rdata(bl_coef_rd));
  sp_ram #(.DEPTH(128), .WIDTH(136)) u_bl_scaled (
    .clk(clk), .en(w_bls || (lb_rd && lb_rd_sel == 3'd1)), .we(w_bls),
    .addr(w_bls ? blk_slot + 7'(q4_e) : lb_rd_addr),
    .wdata(s_word), .wmask('1), .rdata(bl_scaled_rd));
  sp_ram #(.DEPTH(96), .WIDTH(136)) u_el_scaled (
    .clk(clk), .en(w_els || (lb_rd && lb_rd_sel == 3'd2)), .we(w_els),
    .addr(w_els ? el_slot + 7'(q4_e) : lb_rd_addr),
    .wdata(s_word), .wmask('1), .rdata(el_scaled_rd));
  sp_ram #(.DEPTH(96), .WIDTH(136)) u_prequant (
    .clk(clk), .en(w_prq || (lb_rd && lb_rd_sel == 3'd3)), .we(w_prq),
    .addr(w_prq ? el_slot + 7'(q2_e) : lb_rd_addr),
    .wdata(r_word), .wmask('1), .rdata(prequant_rd));

  // ------------------------------------------------ reconstruction
  logic       it_valid, it_ready, it_out_valid, it_out_last;
  logic [1:0] it_kind, it_out_kind;
  logic [2:0] it_out_beat;
  coef_t      it_in [8], it_out [8];
  always_comb begin
    it_valid = (state == S_REC);
    it_kind  = is8 ? 2'd1 : 2'd0;
    for (int k = 0; k < 8; k++) begin
      if (is8) it_in[k] = sm[cnt][k];
      else     it_in[k] = sm[2*cnt[0] + k/4][k%4];
    end
  end
  itran u_it (.clk(clk), .rst_n(rst_n), .in_valid(it_valid), .in_ready(it_ready),
              .in_kind(it_kind), .in_c(it_in), .out_valid(it_out_valid), .out_kind(it_out_kind),
              .out_beat(it_out_beat), .out_last(it_out_last), .out_r(it_out));
  pix_t       rc_prd [8];
  pix_t       rc_pix [8];
  logic [2:0] rc_beat;
  logic       rc_last;
  always_comb begin
    for (int k = 0; k < 8; k++) begin
      if (is8) rc_prd[k] = pbuf[bbuf][k][it_out_beat];
      else     rc_prd[k] = pbuf[bbuf][k%4][2*it_out_beat[0] + k/4];
    end
  end
  recon8 u_rc (.clk(clk), .rst_n(rst_n), .in_valid(it_out_valid), .prd(rc_prd), .res(it_out),
               .out_valid(rc_valid), .rec(rc_pix));
  assign rec_valid = rc_valid;
  assign rec_layer = (layer != 2'd0);
  assign rec_beat  = rc_beat;
  assign rec       = rc_pix;

  logic [63:0] rc_word;
  always_comb for (int k = 0; k < 8; k++) rc_word[8*k +: 8] = rc_pix[k];
  logic [63:0] bl_rec_rd, el_rec_rd;
  sp_ram #(.DEPTH(128), .WIDTH(64)) u_bl_rec (
    .clk(clk), .en(w_blr || (lb_rd && lb_rd_sel == 3'd4)), .we(w_blr),
    .addr(w_blr ? blk_slot + 7'(rc_beat) : lb_rd_addr),
    .wdata(rc_word), .wmask('1), .rdata(bl_rec_rd));
  sp_ram #(.DEPTH(96), .WIDTH(64)) u_el_rec (
    .clk(clk), .en(w_elr || (lb_rd && lb_rd_sel == 3'd5)), .we(w_elr),
    .addr(w_elr ? blk_slot + 7'(rc_beat) : lb_rd_addr),
    .wdata(rc_word), .wmask('1), .rdata(el_rec_rd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     lb_sel_q <= '0;
    else if (lb_rd) lb_sel_q <= lb_rd_sel;
  end
  always_comb begin
    case (lb_sel_q)
      3'd0:    lb_rd_data = 152'(bl_coef_rd);
      3'd1:    lb_rd_data = 152'(bl_scaled_rd);
      3'd2:    lb_rd_data = 152'(el_scaled_rd);
      3'd3:    lb_rd_data = 152'(prequant_rd);
      3'd4:    lb_rd_data = 152'(bl_rec_rd);
      3'd5:    lb_rd_data = 152'(el_rec_rd);
      default: lb_rd_data = bc_b_rd;
    endcase
  end

  // neighbour RAMs: bottom row of the BL reconstruction, best mode
  logic        nb_we;
  logic [63:0] nb_wd, nb_wm;
  always_comb begin
    nb_wd = '0;
    nb_wm = '0;
    if (is8) begin
      for (int k = 0; k < 8; k++) nb_wd[8*k +: 8] = botrow[k];
      nb_wm = '1;
    end else begin
      for (int k = 0; k < 4; k++) nb_wd[32*b4col + 8*k +: 8] = botrow[k];
      nb_wm[32*b4col +: 32] = '1;
    end
  end
  sp_ram #(.DEPTH(960), .WIDTH(64)) u_nb_pix (
    .clk(clk), .en(nb_we || (nb_rd_en && state == S_IDLE)), .we(nb_we),
    .addr(nb_we ? nb_addr : nb_rd_addr), .wdata(nb_wd), .wmask(nb_wm), .rdata(nb_rd_data));
  logic        nbm_we;
  logic [15:0] nbm_wd, nbm_wm;
  always_comb begin
    nbm_wd = '0;
    nbm_wm = '0;
    nbm_wd[4*nbm_nib +: 4] = best_mode;
    nbm_wm[4*nbm_nib +: 4] = 4'hF;
  end
  sp_ram #(.DEPTH(240), .WIDTH(16)) u_nb_mode (
    .clk(clk), .en(nbm_we || (nbm_rd_en && state == S_IDLE)), .we(nbm_we),
    .addr(nbm_we ? nbm_addr : nbm_rd_addr), .wdata(nbm_wd), .wmask(nbm_wm),
    .rdata(nbm_rd_data));

  // ------------------------------------------------ plane side path
  logic               pls_valid;
  logic signed [15:0] pls_a, pls_b, pls_c;
  logic               pl_chroma_q;
  logic [1:0]         pl_bx_q, pl_by_q;
  pg_pls u_pls (.clk(clk), .rst_n(rst_n), .in_valid(pl_valid), .is_chroma(pl_chroma),
                .top(pl_top), .left(pl_left), .corner(pl_corner),
                .out_valid(pls_valid), .out_a(pls_a), .out_b(pls_b), .out_c(pls_c));
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pl_chroma_q <= 1'b0;
      pl_bx_q     <= '0;
      pl_by_q     <= '0;
    end else if (pl_valid) begin
      pl_chroma_q <= pl_chroma;
      pl_bx_q     <= pl_bx;
      pl_by_q     <= pl_by;
    end
  end
  pg_plane u_plane (.clk(clk), .rst_n(rst_n), .in_valid(pls_valid), .is_chroma(pl_chroma_q),
                    .a(pls_a), .b(pls_b), .c(pls_c), .bx(pl_bx_q), .by(pl_by_q),
                    .out_valid(pl_out_valid), .out_p(pl_out));

  // ------------------------------------------------ sequencer
  always_comb begin
    cg_load  = 1'b0;
    cg_ready = 1'b0;
    p4_req   = 1'b0;
    p8_req   = 1'b0;
    p8_row   = cnt[1:0];
    q_issue  = 1'b0;
    bc_a_en = 1'b0; bc_a_we = 1'b0; bc_a_addr = '0; bc_a_wd = '0;
    bc_b_en = 1'b0; bc_b_we = 1'b0; bc_b_addr = '0; bc_b_wd = '0;
    case (state)
      S_ANW:   cg_load = is8 ? md8_valid : md4_valid;
      S_CAND:  begin
        p4_req = !is8 && cg_valid;
        p8_req = is8 && cg_valid;
      end
      S_CWAIT: cg_ready = cc8_valid;
      S_Q:     q_issue = 1'b1;
      default: ;
    endcase
    // candidate coefficients into the candidate half
    if (t8_out_valid && (state == S_CAND || state == S_CWAIT)) begin
      bc_a_en = 1'b1; bc_a_we = 1'b1;
      bc_b_en = 1'b1; bc_b_we = 1'b1;
      bc_a_addr = {cbuf, 3'b000, t8_out_is4 ? 3'd0 : {t8_out_beat, 1'b0}};
      bc_b_addr = {cbuf, 3'b000, t8_out_is4 ? 3'd1 : {t8_out_beat, 1'b1}};
      bc_a_wd = pack8(t8_out, 0);
      bc_b_wd = pack8(t8_out, 8);
    end else if (q_issue) begin
      bc_a_en   = 1'b1;
      bc_a_addr = {bbuf, 3'b000, q_e0};
    end
    if (lb_rd && lb_rd_sel == 3'd6) begin
      bc_b_en   = 1'b1;
      bc_b_addr = lb_rd_addr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      is8 <= 1'b0; pic <= 1'b0; blk8 <= '0; b4row <= 1'b0; b4col <= 1'b0;
      mpm <= '0; qp <= '{default: '0}; top_ok <= 1'b0; left_ok <= 1'b0;
      nb_addr <= '0; nbm_addr <= '0; nbm_nib <= '0;
      cmd_top_q <= '{default: '0}; cmd_left_q <= '{default: '0}; cmd_corner_q <= '0;
      tr_ok_q <= 1'b0;
      orgm <= '{default: '0};
      pbuf <= '{default: '0};
      sm   <= '{default: '0};
      botrow <= '{default: '0};
      cbuf <= 1'b0; bbuf <= 1'b1; have_best <= 1'b0;
      cur_mode <= '0; cnt <= '0; cnt2 <= '0; layer <= '0; pr_cnt <= '0;
      cand_valid <= 1'b0; cand_en <= '0;
      mode_valid <= 1'b0; best_mode <= '0; best_cost <= '0;
      done <= 1'b0;
      q_e0 <= '0; q1_v <= 1'b0;
      q1_e <= '0; q2_e <= '0; q3_e <= '0; q4_e <= '0; q_out <= '0;
      q2_i <= '{default: '0}; q2_j <= '{default: '0};
      q3_i <= '{default: '0}; q3_j <= '{default: '0};
      rc_beat <= '0;
      rc_last <= 1'b0;
      nb_we <= 1'b0; nbm_we <= 1'b0;
    end else begin
      cand_valid <= 1'b0;
      mode_valid <= 1'b0;
      done       <= 1'b0;
      nb_we      <= 1'b0;
      nbm_we     <= 1'b0;

      // quantization pipeline tags
      q1_v <= q_issue;
      q1_e <= q_e0;
      q2_e <= q1_e;  q2_i <= q1_i;  q2_j <= q1_j;
      q3_e <= q2_e;  q3_i <= q2_i;  q3_j <= q2_j;
      q4_e <= q3_e;
      if (dq_valid) begin
        for (int k = 0; k < 8; k++) sm[q4_i[k]][q4_j[k]] <= sm[q4_i[k]][q4_j[k]] + q_dq[k];
        q_out <= q_out + 4'd1;
      end

      // prediction stream bookkeeping
      if (pr_valid) begin
        pr_cnt <= pr_cnt + 2'd1;
        for (int k = 0; k < 16; k++) begin
          if (is8) pbuf[cbuf][2*pr_cnt + k/8][k%8] <= pr_pix[k];
          else     pbuf[cbuf][k/4][k%4] <= pr_pix[k];
        end
      end

      // reconstruction bookkeeping: keep the BL bottom row
      if (it_out_valid) begin
        rc_beat <= it_out_beat;
        rc_last <= it_out_last;
      end
      if (rc_valid && layer == 2'd0) begin
        if (is8) botrow[rc_beat] <= rc_pix[7];
        else begin
          botrow[2*rc_beat[0]]     <= rc_pix[3];
          botrow[2*rc_beat[0] + 1] <= rc_pix[7];
        end
      end

      case (state)
        S_IDLE: if (cmd_valid) begin
          is8 <= cmd_is8; pic <= cmd_pic; blk8 <= cmd_blk8;
          b4row <= cmd_b4row; b4col <= cmd_b4col; mpm <= cmd_mpm; qp <= cmd_qp;
          top_ok <= cmd_top_ok; left_ok <= cmd_left_ok;
          nb_addr <= cmd_nb_addr; nbm_addr <= cmd_nbm_addr; nbm_nib <= cmd_nbm_nib;
          cmd_top_q <= cmd_top; cmd_left_q <= cmd_left; cmd_corner_q <= cmd_corner;
          tr_ok_q <= cmd_tr_ok;
          sm <= '{default: '0};
          have_best <= 1'b0;
          cnt <= '0; cnt2 <= '0; pr_cnt <= '0;
          state <= S_RD;
        end
        S_RD: begin
          if (cm_rd_en) cnt <= cnt + 3'd1;
          if (cm_rd_valid) begin
            cnt2 <= cnt2 + 3'd1;
            for (int k = 0; k < 16; k++) begin
              if (is8) orgm[2*cnt2[1:0] + k/8][k%8] <= cm_pix[k];
              else     orgm[k/4][k%4] <= cm_pix[k];
            end
            if (cnt2 == (is8 ? 3'd3 : 3'd0)) begin
              cnt   <= '0;
              state <= S_AN;
            end
          end
        end
        S_AN: begin
          cnt <= cnt + 3'd1;
          if (!is8 || cnt == 3'd3) begin
            cnt   <= '0;
            state <= S_ANW;
          end
        end
        S_ANW: if (cg_load) begin
          cand_valid <= 1'b1;
          cand_en    <= cg_en;
          state      <= S_CAND;
        end
        S_CAND: if (cg_valid) begin
          cur_mode <= cg_mode;
          cnt      <= cnt + 3'd1;
          if (!is8 || cnt == 3'd3) begin
            cnt    <= '0;
            state  <= S_CWAIT;
          end
        end
        S_CWAIT: if (cc8_valid) begin
          if (!have_best || cc8_it.satd < best_cost) begin
            have_best <= 1'b1;
            best_cost <= cc8_it.satd;
            best_mode <= cur_mode;
            bbuf      <= cbuf;
            cbuf      <= !cbuf;
          end
          if (cg_last) begin
            layer <= 2'd0;
            q_e0  <= '0;
            q_out <= '0;
            state <= S_Q;
          end else begin
            state <= S_CAND;
          end
        end
        S_Q: begin
          q_e0 <= q_e0 + 3'd1;
          if (4'(q_e0) == nent - 4'd1) state <= S_QW;
        end
        S_QW: if (q_out == nent) begin
          if (layer == 2'd1) begin
            layer <= 2'd2;
            q_e0  <= '0;
            q_out <= '0;
            state <= S_Q;
          end else begin
            cnt   <= '0;
            state <= S_REC;
          end
        end
        S_REC: if (it_ready) begin
          cnt <= cnt + 3'd1;
          if (4'(cnt) == nent - 4'd1) begin
            cnt   <= '0;
            state <= S_RECW;
          end
        end
        S_RECW: if (rc_valid && rc_last) begin
          if (layer == 2'd0) begin
            nb_we <= 1'b1;
            layer <= 2'd1;
            q_e0  <= '0;
            q_out <= '0;
            state <= S_Q;
          end else begin
            state <= S_DONE;
          end
        end
        S_DONE: begin
          mode_valid <= 1'b1;
          nbm_we     <= 1'b1;
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
