// svc_intra_top: intra encoder core for the base layer and two embedded
// quality layers of a scalable (SVC) encoder, working on two macroblocks (MBs)
// from different frames at once.
//
// How it works. After a start from the global controller (stage 0), the core
//   1. LOAD: reads the luma of MB 0 and MB 1 from the current-MB memory
//      (sram_dp; written by the host through cur_*; word = 8 pixels of one row,
//      address = mb*48 + y*2 + x/8) into registers, one word per cycle;
//   2. ANALYSIS (per MB, 22 cycles): every original 4x4 block goes through the
//      forward integer transform (trans48dc) into the cost unit (cost_mode),
//      which accumulates AC2 and gives the block's 4x4 mode candidates; the 16
//      DC terms then go through the 4x4 Hadamard and the cost unit gives AC1
//      and the 16x16 candidates; block_size decides the MB's block size and
//      four mode8x8 units merge the 4x4 candidates into 8x8 candidates;
//   3. ENCODE: a mode-decision stage (16 pixels per cycle) and a
//      reconstruction stage (8 pixels per cycle) run concurrently on the 32
//      luma 4x4 blocks. For each block the mode-decision stage predicts every
//      remaining candidate (pred, pred_dc), forms the residue, transforms it and
//      takes SATD plus a most-probable-mode penalty of 4*lambda as the cost,
//      then writes the best mode's coefficients to the pre-quantised
//      coefficient memory (sram_tp) and hands the block over. The
//      reconstruction stage quantises the coefficients at QP (base layer), then
//      at QP-6 and QP-12 the remainder left by the layer before (norm_minus),
//      dequantises every layer, inverse transforms the base layer alone
//      (base-layer reconstruction, the reference for later intra prediction)
//      and the sum of all three layers (highest quality-layer reconstruction).
//      Its schedule is fixed: quantiser at cycles 0-5, dequantiser 1-6,
//      inverse transform in 3-4 and 7-8, out 5-6 and 9-10, so one block takes
//      11 cycles in this stage.
// With interleave=1 the blocks are taken in the order A0 B0 A1 B1 ... (A, B =
// MB 0, MB 1): while block k of one MB is being reconstructed, the other MB's
// block is being mode-decided, so the wait for a neighbour's reconstruction is
// hidden. With interleave=0 the order is A0..A15 B0..B15 and the
// mode-decision stage stalls on every block (dep_stall counts those cycles).
// Results are identical in both orders.
//
// Interface. go starts a round of the global controller; stages 1 and 2 of it
// (the inter-prediction side and the entropy/loop-filter side of the encoder,
// outside this core) are brought out as ext_stage_start/ext_stage_end. The
// neighbours of each MB (row above incl. four above-right samples, left
// column, corner) and their availability are inputs; neighbouring MB modes
// are not, so the most probable mode falls back to DC at MB edges. Outputs:
// analysis results, best 4x4 modes, a level stream (one half block of one
// layer per cycle), the quality-layer reconstruction stream, and read ports of
// the base- and quality-layer reconstruction memories (block-organised:
// address mb*48 + blk*2 + half, 8 pixels = two columns of a 4x4 block; read
// them while busy is low). The chroma DC Hadamard, the chroma candidate rule
// and the plane predictor are brought out as side ports; the 8x8/16x16 and
// chroma coding paths that would use them are not sequenced by this core.
//
// What follows the document: the two-step fast block-size decision, transform-
// domain mode candidates and their 8x8 merge, the 16-pixel residue path and
// 8-pixel reconstruction path, three quality layers with QP steps of 6 and the
// two-MB interleave, and the memory organisation (96x64 current MB and
// reconstruction memories, 96x136 coefficient memory). This design's own
// choices: the cycle schedule of both stages, the handover register, the
// register copies of the current and reconstructed MBs used for neighbour
// access, and the MB-edge most probable mode.
// Lint note: rst_n is seen as both asynchronous reset and a synchronous signal
// because the transform units and the global controller use it in the
// disable condition of their protocol assertions; the logic itself only uses
// it as an asynchronous reset.
module svc_intra_top
  import intra_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // global control
  input  logic        go,
  output logic [1:0]  ext_stage_start,
  input  logic [1:0]  ext_stage_end,
  output logic        pingpong,
  output logic [15:0] rounds,
  output logic        busy,
  output logic        done,
  // current-MB memory write port
  input  logic        cur_we,
  input  logic [6:0]  cur_addr,
  input  logic [63:0] cur_wdata,
  // coding parameters
  input  logic [5:0]  qp,
  input  logic        interleave,
  // neighbours of MB 0 and MB 1
  input  pix_t        nb_top    [2][20],
  input  pix_t        nb_left   [2][16],
  input  pix_t        nb_corner [2],
  input  logic        avail_top [2],
  input  logic        avail_left [2],
  input  logic        avail_topright [2],
  // analysis results
  output logic [31:0] ac1 [2],
  output logic [31:0] ac2 [2],
  output bsize_e      bsize [2],
  output logic [3:0]  cand16 [2],
  output logic [8:0]  cand4 [2][16],
  output logic [8:0]  cand8 [2][4],
  output logic [3:0]  best_mode [2][16],
  // level stream
  output logic        lvl_valid,
  output logic        lvl_mb,
  output logic [3:0]  lvl_blk,
  output logic [1:0]  lvl_layer,
  output logic        lvl_half,
  output coef_t       lvl_data [8],
  // highest quality-layer reconstruction stream
  output logic        el_valid,
  output logic        el_mb,
  output logic [3:0]  el_blk,
  output logic        el_half,
  output pix_t        el_pix [8],
  // reconstruction memory read ports
  input  logic [6:0]  bl_raddr,
  output logic [63:0] bl_rdata,
  input  logic [6:0]  el_raddr,
  output logic [63:0] el_rdata,
  // statistics
  output logic [15:0] dep_stall,
  output logic [15:0] hand_stall,
  output logic [15:0] cand_evals,
  output logic [15:0] enc_cycles,
  // side ports: chroma DC Hadamard, chroma candidates, plane predictor
  input  coef_t       cdc_in  [4],
  output coef_t       cdc_out [4],
  input  logic [19:0] civ,
  input  logic [19:0] cih,
  output logic [3:0]  ccand,
  input  logic        pl_start,
  input  logic        pl_chroma,
  input  pix_t        pl_top  [16],
  input  pix_t        pl_left [16],
  input  pix_t        pl_corner,
  output logic        pl_busy,
  output logic        pl_valid,
  output logic [3:0]  pl_row,
  output pix_t        pl_pix  [16]
);

  // ------------------------------------------------------------------
  // helpers
  function automatic logic [3:0] blk_x(input logic [3:0] k); return {k[2], k[0], 2'b00}; endfunction
  function automatic logic [3:0] blk_y(input logic [3:0] k); return {k[3], k[1], 2'b00}; endfunction
  function automatic logic [3:0] blk_idx(input logic [1:0] bx, input logic [1:0] by);
    return {by[1], bx[1], by[0], bx[0]};
  endfunction
  function automatic logic [5:0] layer_qp(input logic [5:0] q, input int l);
    return (int'(q) >= 6 * l) ? 6'(int'(q) - 6 * l) : 6'd0;
  endfunction
  // 4*lambda with lambda = 0.85 * 2^((QP-12)/3), the usual intra-4x4 weight
  function automatic logic [15:0] mpm_penalty(input logic [5:0] q);
    logic [11:0] frac;
    case (int'(q) % 3)
      0:       frac = 12'd218;
      1:       frac = 12'd274;
      default: frac = 12'd345;
    endcase
    return 16'((32'(frac) << (int'(q) / 3)) >> 10);
  endfunction
  function automatic logic [3:0] lowest(input logic [8:0] m);
    for (int i = 0; i < 9; i++) if (m[i]) return 4'(i);
    return 4'd0;
  endfunction

  // ------------------------------------------------------------------
  // global control
  logic [2:0] st_start, st_end, st_working;
  logic       eng_done;
  global_ctrl #(.NSTAGE(3)) u_ctrl (
    .clk, .rst_n, .go, .stage_start(st_start), .stage_end(st_end),
    .working(st_working), .pingpong, .rounds);
  assign ext_stage_start = st_start[2:1];
  assign st_end = {ext_stage_end, eng_done};

  // ------------------------------------------------------------------
  // memories
  logic        cb_en;
  logic [6:0]  cb_addr;
  logic [63:0] cb_rdata, ca_rdata;
  sram_dp #(.DEPTH(96), .WIDTH(64)) u_cur (
    .clk, .a_en(cur_we), .a_we(cur_we), .a_addr(cur_addr), .a_wdata(cur_wdata), .a_rdata(ca_rdata),
    .b_en(cb_en), .b_we(1'b0), .b_addr(cb_addr), .b_wdata(64'd0), .b_rdata(cb_rdata));

  logic         tp_we, tp_re;
  logic [6:0]   tp_waddr, tp_raddr;
  logic [135:0] tp_wdata, tp_rdata;
  sram_tp #(.DEPTH(96), .WIDTH(136)) u_coef (
    .clk, .we(tp_we), .waddr(tp_waddr), .wdata(tp_wdata), .re(tp_re), .raddr(tp_raddr), .rdata(tp_rdata));

  logic        blm_we, elm_we;
  logic [6:0]  blm_waddr, elm_waddr;
  logic [63:0] blm_wdata, elm_wdata;
  sram_sp #(.DEPTH(96), .WIDTH(64)) u_rec_bl (
    .clk, .en(1'b1), .we(blm_we), .addr(blm_we ? blm_waddr : bl_raddr), .wdata(blm_wdata), .rdata(bl_rdata));
  sram_sp #(.DEPTH(96), .WIDTH(64)) u_rec_el (
    .clk, .en(1'b1), .we(elm_we), .addr(elm_we ? elm_waddr : el_raddr), .wdata(elm_wdata), .rdata(el_rdata));

  // ------------------------------------------------------------------
  // side units
  hadamard2x2 u_cdc (.in_dc(cdc_in), .out_dc(cdc_out));
  mode_chroma u_cmode (.iv(civ), .ih(cih), .cand(ccand));
  pred_plane u_plane (
    .clk, .rst_n, .start(pl_start), .chroma(pl_chroma), .top(pl_top), .left(pl_left),
    .corner(pl_corner), .busy(pl_busy), .pix_valid(pl_valid), .pix_row(pl_row), .pix(pl_pix));

  // ------------------------------------------------------------------
  // engine phase
  typedef enum logic [2:0] {PH_IDLE, PH_LOAD, PH_AN, PH_ENC, PH_DONE} phase_e;
  phase_e phase;
  pix_t   cur [2][256];
  pix_t   recbl [2][256];

  logic [6:0] ld_cnt;
  logic       ld_v;
  logic [5:0] ld_w;
  logic       ld_mb;
  logic       an_mb;
  logic [4:0] an_cnt;
  coef_t      dcs [16];
  coef_t      hadr [16];

  // shared forward transform and cost unit
  logic                t_in_valid;
  tkind_e              t_in_kind;
  logic signed [15:0]  t_in [16];
  logic                t_ready8, t_o4v, t_o8v;
  tkind_e              t_o4k;
  coef_t               t_o4 [16], t_o8 [16];
  logic [1:0]          t_o8c;
  trans48dc #(.DW(16)) u_trans (
    .clk, .rst_n, .in_valid(t_in_valid), .in_kind(t_in_kind), .in_data(t_in), .ready8(t_ready8),
    .out4_valid(t_o4v), .out4_kind(t_o4k), .out4(t_o4), .out8_valid(t_o8v), .out8_col(t_o8c), .out8(t_o8));

  logic        c_in_valid, c_acc_clr, c_out_valid;
  logic [2:0]  c_sel;
  coef_t       c_coef [16];
  logic [31:0] c_acc, c_cost;
  logic [8:0]  c_cand4;
  logic [3:0]  c_cand16;
  logic [19:0] c_iv, c_ih;
  cost_mode #(.AW(32)) u_cost (
    .clk, .rst_n, .in_valid(c_in_valid), .sel(c_sel), .acc_clr(c_acc_clr), .coef(c_coef),
    .out_valid(c_out_valid), .acc(c_acc), .blk_cost(c_cost), .cand4(c_cand4), .cand16(c_cand16),
    .iv(c_iv), .ih(c_ih));

  // block size decision and 8x8 merge
  logic [31:0] th1, th2;
  bsize_e      bs_now;
  block_size u_bsize (.qp, .ac1(ac1[an_mb]), .ac2(ac2[an_mb]), .th1, .th2, .bsize(bs_now));
  for (genvar m = 0; m < 2; m++) begin : g_m8
    for (genvar b = 0; b < 4; b++) begin : g_b
      logic [8:0] grp [4];
      always_comb for (int i = 0; i < 4; i++) grp[i] = cand4[m][4*b + i];
      mode8x8 #(.MAX8(4)) u_m8 (.cand4(grp), .cand8(cand8[m][b]));
    end
  end

  // ------------------------------------------------------------------
  // mode-decision stage state
  typedef enum logic [3:0] {RS_IDLE, RS_WAIT, RS_DC, RS_CAND, RS_DRAIN, RS_FIN, RS_FIN2,
                            RS_FIN3, RS_HAND, RS_END} rs_e;
  rs_e        rs;
  logic [4:0] rs_e_idx;
  logic       rs_mb;
  logic [3:0] rs_k;
  pix_t       ntop [8];
  pix_t       nleft [4];
  pix_t       ncorner;
  logic [8:0] mask;
  pix_t       dcval;
  logic [3:0] best_m, mpm, cur_m;
  logic [31:0] best_cost;
  logic [15:0] pen;
  logic       p1_v, p2_v;
  logic [3:0] p1_m, p2_m;
  coef_t      wh1 [8];
  pix_t       predb [16];
  logic [4:0] bl_cnt [2];

  // handover register
  logic       hand_valid, hand_mb;
  logic [3:0] hand_k;
  pix_t       hand_pred [16];

  // reconstruction stage state
  logic       rc_busy, rc_mb;
  logic [3:0] rc_k;
  logic [3:0] rc;
  pix_t       rc_pred [16];
  logic [5:0] rc_total;

  assign rs_mb = interleave ? rs_e_idx[0] : rs_e_idx[4];
  assign rs_k  = interleave ? rs_e_idx[4:1] : rs_e_idx[3:0];

  // neighbours of the block the mode-decision stage is about to start
  pix_t       g_top [8];
  pix_t       g_left [4];
  pix_t       g_corner;
  logic       g_at, g_al, g_ac, g_atr;
  logic [8:0] g_mask;
  logic [3:0] g_mpm;
  always_comb begin
    int x0, y0, bx, by;
    logic [3:0] ma, mb_;
    x0 = int'(blk_x(rs_k)); y0 = int'(blk_y(rs_k)); bx = x0 / 4; by = y0 / 4;
    g_at = (y0 > 0) || avail_top[rs_mb];
    g_al = (x0 > 0) || avail_left[rs_mb];
    if (x0 > 0 && y0 > 0)        g_ac = 1'b1;
    else if (x0 == 0 && y0 == 0) g_ac = avail_top[rs_mb] && avail_left[rs_mb];
    else if (y0 == 0)            g_ac = avail_top[rs_mb];
    else                         g_ac = avail_left[rs_mb];
    if (y0 == 0)        g_atr = (x0 + 4 < 16) ? avail_top[rs_mb] : avail_topright[rs_mb];
    else if (x0 >= 12)  g_atr = 1'b0;
    else                g_atr = blk_idx(2'(bx + 1), 2'(by - 1)) < rs_k;
    for (int i = 0; i < 8; i++) begin
      if (y0 == 0) g_top[i] = nb_top[rs_mb][x0 + i];
      else         g_top[i] = recbl[rs_mb][(y0 - 1) * 16 + ((x0 + i) % 16)];
    end
    if (!g_atr) for (int i = 4; i < 8; i++) g_top[i] = g_top[3];
    for (int j = 0; j < 4; j++) begin
      if (x0 == 0) g_left[j] = nb_left[rs_mb][y0 + j];
      else         g_left[j] = recbl[rs_mb][(y0 + j) * 16 + x0 - 1];
    end
    if (x0 == 0 && y0 == 0) g_corner = nb_corner[rs_mb];
    else if (y0 == 0)       g_corner = nb_top[rs_mb][x0 - 1];
    else if (x0 == 0)       g_corner = nb_left[rs_mb][y0 - 1];
    else                    g_corner = recbl[rs_mb][(y0 - 1) * 16 + x0 - 1];
    g_mask = cand4[rs_mb][rs_k];
    if (!g_at) begin g_mask[M_VER] = 1'b0; g_mask[M_DDL] = 1'b0; g_mask[M_VL] = 1'b0; end
    if (!g_al) begin g_mask[M_HOR] = 1'b0; g_mask[M_HU] = 1'b0; end
    if (!(g_at && g_al && g_ac)) begin g_mask[M_DDR] = 1'b0; g_mask[M_VR] = 1'b0; g_mask[M_HD] = 1'b0; end
    g_mask[M_DC] = 1'b1;
    ma  = (bx > 0) ? best_mode[rs_mb][blk_idx(2'(bx - 1), 2'(by))] : 4'd2;
    mb_ = (by > 0) ? best_mode[rs_mb][blk_idx(2'(bx), 2'(by - 1))] : 4'd2;
    g_mpm = (bx > 0 && by > 0) ? ((ma < mb_) ? ma : mb_) : 4'd2;
  end

  // predictor, DC predictor and residue for the mode-decision stage
  pix_t p_top [16], p_left [16], p_pix [16], m_pix [16], cur_blk [16];
  logic signed [15:0] r_res [16];
  logic       dc_start, dc_valid;
  pix_t       dc_samp [16], dc_out [4];
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      p_top[i]  = (i < 8) ? ntop[i] : 8'd0;
      p_left[i] = (i < 4) ? nleft[i] : 8'd0;
      dc_samp[i] = 8'd0;
    end
    for (int i = 0; i < 4; i++) begin
      dc_samp[i] = g_top[i]; dc_samp[8 + i] = g_left[i];
    end
  end
  assign cur_m = (rs == RS_CAND) ? lowest(mask) : best_m;
  pred u_pred (.size(PS_4X4), .mode(cur_m), .quad(4'd0), .top(p_top), .left(p_left),
               .corner(ncorner), .pix(p_pix));
  pred_dc u_pdc (.clk, .rst_n, .start(dc_start), .size(PS_4X4), .avail_top(g_at),
                 .avail_left(g_al), .samples(dc_samp), .dc_valid, .dc(dc_out));
  always_comb begin
    int x0, y0;
    x0 = int'(blk_x(rs_k)); y0 = int'(blk_y(rs_k));
    for (int i = 0; i < 16; i++) begin
      m_pix[i] = (cur_m == 4'(M_DC)) ? dcval : p_pix[i];
      cur_blk[i] = cur[rs_mb][(y0 + i / 4) * 16 + x0 + i % 4];
    end
  end
  residue #(.LANES(16)) u_res (.cur(cur_blk), .pred(m_pix), .res(r_res));

  // transform and cost unit input multiplexing
  always_comb begin
    int x0, y0, k;
    t_in_valid = 1'b0; t_in_kind = TK_INT4;
    c_in_valid = 1'b0; c_sel = 3'd2; c_acc_clr = 1'b0;
    for (int i = 0; i < 16; i++) begin t_in[i] = r_res[i]; c_coef[i] = t_o4[i]; end
    k = int'(an_cnt[3:0]);
    x0 = int'(blk_x(4'(k))); y0 = int'(blk_y(4'(k)));
    if (phase == PH_AN) begin
      if (an_cnt < 5'd16) begin
        t_in_valid = 1'b1;
        for (int i = 0; i < 16; i++) t_in[i] = 16'(cur[an_mb][(y0 + i / 4) * 16 + x0 + i % 4]);
      end else if (an_cnt == 5'd17) begin
        t_in_valid = 1'b1; t_in_kind = TK_HAD4;
        for (int i = 0; i < 16; i++) t_in[i] = 16'(dcs[i]);
      end
      if (an_cnt >= 5'd1 && an_cnt <= 5'd16) begin
        c_in_valid = 1'b1; c_sel = 3'd0; c_acc_clr = (an_cnt == 5'd1);
      end else if (an_cnt == 5'd18) begin
        c_in_valid = 1'b1; c_sel = 3'd1; c_acc_clr = 1'b1;
      end else if (an_cnt == 5'd19) begin
        c_in_valid = 1'b1; c_sel = 3'd6;
        for (int i = 0; i < 16; i++) c_coef[i] = hadr[i];
      end
    end else begin
      t_in_valid = (rs == RS_CAND) || (rs == RS_FIN);
      c_in_valid = p1_v;
      c_sel = 3'd2;
    end
  end

  // ------------------------------------------------------------------
  // engine sequencing: load and analysis
  assign cb_en   = (phase == PH_LOAD) && (ld_cnt < 7'd64);
  assign cb_addr = 7'((ld_cnt[5] ? 48 : 0) + int'(ld_cnt[4:0]));
  assign busy    = (phase != PH_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE; ld_cnt <= '0; ld_v <= 1'b0; ld_w <= '0; ld_mb <= 1'b0;
      an_mb <= 1'b0; an_cnt <= '0; eng_done <= 1'b0; done <= 1'b0; enc_cycles <= '0;
      for (int m = 0; m < 2; m++) begin
        ac1[m] <= '0; ac2[m] <= '0; bsize[m] <= BS_16X16; cand16[m] <= '0;
        for (int i = 0; i < 16; i++) cand4[m][i] <= 9'd4;
        for (int i = 0; i < 256; i++) cur[m][i] <= '0;
      end
      for (int i = 0; i < 16; i++) begin dcs[i] <= '0; hadr[i] <= '0; end
    end else begin
      eng_done <= 1'b0; done <= 1'b0;
      ld_v <= cb_en; ld_w <= {1'b0, ld_cnt[4:0]}; ld_mb <= ld_cnt[5];
      if (ld_v)
        for (int i = 0; i < 8; i++)
          cur[ld_mb][int'(ld_w[4:1]) * 16 + int'(ld_w[0]) * 8 + i] <= cb_rdata[8*i +: 8];
      if (phase != PH_IDLE) enc_cycles <= enc_cycles + 16'd1;
      case (phase)
        PH_IDLE: if (st_start[0]) begin
          phase <= PH_LOAD; ld_cnt <= '0; enc_cycles <= '0;
        end
        PH_LOAD: begin
          if (ld_cnt < 7'd64) ld_cnt <= ld_cnt + 7'd1;
          else if (!ld_v) begin phase <= PH_AN; an_mb <= 1'b0; an_cnt <= '0; end
        end
        PH_AN: begin
          an_cnt <= an_cnt + 5'd1;
          if (t_o4v && an_cnt >= 5'd1 && an_cnt <= 5'd16) begin
            logic [3:0] k;
            k = 4'(an_cnt - 5'd1);
            dcs[int'(blk_y(k)) + int'(blk_x(k)) / 4] <= t_o4[0];
          end
          if (an_cnt >= 5'd2 && an_cnt <= 5'd17) cand4[an_mb][4'(an_cnt - 5'd2)] <= c_cand4;
          if (an_cnt == 5'd17) ac2[an_mb] <= c_acc;
          if (an_cnt == 5'd18) for (int i = 0; i < 16; i++) hadr[i] <= t_o4[i];
          if (an_cnt == 5'd19) cand16[an_mb] <= c_cand16;
          if (an_cnt == 5'd20) ac1[an_mb] <= c_acc;
          if (an_cnt == 5'd21) begin
            bsize[an_mb] <= bs_now;
            an_cnt <= '0;
            if (an_mb == 1'b0) an_mb <= 1'b1;
            else phase <= PH_ENC;
          end
        end
        PH_ENC: if (rc_total == 6'd32) begin phase <= PH_DONE; end
        PH_DONE: begin eng_done <= 1'b1; done <= 1'b1; phase <= PH_IDLE; end
        default: phase <= PH_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // mode-decision stage
  logic dep_ok;
  assign dep_ok   = (rs_k == 4'd0) || (bl_cnt[rs_mb] >= {1'b0, rs_k});
  assign dc_start = (rs == RS_WAIT) && dep_ok;

  always_comb begin
    tp_we = 1'b0; tp_waddr = 7'(int'(rs_mb) * 48 + int'(rs_k) * 2); tp_wdata = '0;
    if (rs == RS_FIN2) begin
      tp_we = 1'b1;
      for (int i = 0; i < 8; i++) tp_wdata[17*i +: 17] = 17'(t_o4[i]);
    end else if (rs == RS_FIN3) begin
      tp_we = 1'b1; tp_waddr = tp_waddr + 7'd1;
      for (int i = 0; i < 8; i++) tp_wdata[17*i +: 17] = 17'(wh1[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rs <= RS_IDLE; rs_e_idx <= '0; mask <= '0; dcval <= '0; best_m <= 4'd2; mpm <= 4'd2;
      best_cost <= '0; pen <= '0; p1_v <= 1'b0; p2_v <= 1'b0; p1_m <= '0; p2_m <= '0;
      ncorner <= '0;
      dep_stall <= '0; hand_stall <= '0; cand_evals <= '0;
      for (int i = 0; i < 8; i++) begin ntop[i] <= '0; wh1[i] <= '0; end
      for (int i = 0; i < 4; i++) nleft[i] <= '0;
      for (int i = 0; i < 16; i++) predb[i] <= '0;
      for (int m = 0; m < 2; m++) for (int i = 0; i < 16; i++) best_mode[m][i] <= 4'd2;
    end else begin
      p1_v <= (rs == RS_CAND); p1_m <= cur_m;
      p2_v <= p1_v; p2_m <= p1_m;
      if (p2_v && rs != RS_IDLE) begin
        logic [31:0] cst;
        cst = c_cost + ((p2_m == mpm) ? 32'd0 : 32'(pen));
        if (cst < best_cost) begin best_cost <= cst; best_m <= p2_m; end
      end
      case (rs)
        RS_IDLE: if (phase == PH_AN && an_cnt == 5'd21 && an_mb) begin
          rs <= RS_WAIT; rs_e_idx <= '0; dep_stall <= '0; hand_stall <= '0; cand_evals <= '0;
        end
        RS_WAIT: if (dep_ok) begin
          ntop <= g_top; nleft <= g_left; ncorner <= g_corner;
          mask <= g_mask; mpm <= g_mpm; pen <= mpm_penalty(qp);
          best_cost <= 32'hFFFF_FFFF; best_m <= 4'd2;
          rs <= RS_DC;
        end else dep_stall <= dep_stall + 16'd1;
        RS_DC: begin dcval <= dc_out[0]; rs <= RS_CAND; end
        RS_CAND: begin
          logic [8:0] nm;
          nm = mask & ~(9'd1 << cur_m);
          mask <= nm;
          cand_evals <= cand_evals + 16'd1;
          if (nm == 9'd0) rs <= RS_DRAIN;
        end
        RS_DRAIN: if (!p1_v && !p2_v) rs <= RS_FIN;
        RS_FIN: begin
          predb <= m_pix;
          best_mode[rs_mb][rs_k] <= best_m;
          rs <= RS_FIN2;
        end
        RS_FIN2: begin
          for (int i = 0; i < 8; i++) wh1[i] <= t_o4[8 + i];
          rs <= RS_FIN3;
        end
        RS_FIN3: rs <= RS_HAND;
        RS_HAND: if (!hand_valid) begin
          if (rs_e_idx == 5'd31) rs <= RS_END;
          else begin rs_e_idx <= rs_e_idx + 5'd1; rs <= RS_WAIT; end
        end else hand_stall <= hand_stall + 16'd1;
        RS_END: if (phase == PH_DONE) rs <= RS_IDLE;
        default: rs <= RS_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------------
  // handover and reconstruction stage
  logic       q_in_v, q_out_v, iq_out_v, it_o4v, it_o4h, it_o8v;
  logic [1:0] q_l, iq_l;
  logic       q_h, iq_h;
  logic [5:0] q_qp, iq_qp_r;
  coef_t      q_coef [8], q_level [8], iq_coef [8], wq [2][8], wn [2][8], nm_rem [8];
  coef_t      dqbl [2][8], dqsum [2][8];
  logic       it_in_v;
  coef_t      it_in [8], it_o4 [8], it_o8 [8];
  tkind_e     it_o4k;
  logic [2:0] it_o8c;
  pix_t       rc_p8 [8], rc_pix [8];

  assign tp_re    = (!rc_busy && hand_valid) || (rc_busy && rc == 4'd0);
  assign tp_raddr = !rc_busy ? 7'(int'(hand_mb) * 48 + int'(hand_k) * 2)
                             : 7'(int'(rc_mb) * 48 + int'(rc_k) * 2 + 1);

  always_comb begin
    int l;
    l = int'(rc) / 2;
    q_in_v = rc_busy && (rc <= 4'd5);
    q_qp   = layer_qp(qp, l);
    for (int i = 0; i < 8; i++)
      q_coef[i] = (l == 0) ? coef_t'(signed'(tp_rdata[17*i +: 17])) : wn[rc[0]][i];
  end
  quant #(.LANES(8)) u_q (.clk, .rst_n, .in_valid(q_in_v), .qp(q_qp), .half(rc[0]), .row(3'd0), .mode(QM_AC4),
                          .coef(q_coef), .out_valid(q_out_v), .level(q_level));
  norm_minus #(.LANES(8)) u_nm (.qp(iq_qp_r), .half(q_h), .coef(wq[q_h]), .level(q_level), .rem(nm_rem));
  iquant #(.LANES(8)) u_iq (.clk, .rst_n, .in_valid(q_out_v), .qp(iq_qp_r), .half(q_h), .row(3'd0), .mode(QM_AC4),
                            .level(q_level), .out_valid(iq_out_v), .coef(iq_coef));

  assign it_in_v = rc_busy && (rc == 4'd3 || rc == 4'd4 || rc == 4'd7 || rc == 4'd8);
  always_comb
    for (int i = 0; i < 8; i++)
      it_in[i] = (rc <= 4'd4) ? dqbl[rc[0] ? 0 : 1][i] : dqsum[rc[0] ? 0 : 1][i];
  itrans48dc u_it (.clk, .rst_n, .in_valid(it_in_v), .in_kind(TK_INT4), .in_data(it_in),
                   .out4_valid(it_o4v), .out4_half(it_o4h), .out4_kind(it_o4k), .out4(it_o4),
                   .out8_valid(it_o8v), .out8_col(it_o8c), .out8(it_o8));
  always_comb
    for (int kk = 0; kk < 2; kk++)
      for (int r = 0; r < 4; r++)
        rc_p8[kk*4 + r] = rc_pred[r*4 + 2*int'(it_o4h) + kk];
  recon #(.LANES(8)) u_rec (.pred(rc_p8), .res(it_o4), .pix(rc_pix));

  // level and reconstruction outputs
  assign lvl_valid = q_out_v;
  assign lvl_mb    = rc_mb;
  assign lvl_blk   = rc_k;
  assign lvl_layer = q_l;
  assign lvl_half  = q_h;
  assign lvl_data  = q_level;
  logic rec_el;
  assign rec_el    = (rc >= 4'd9);
  assign el_valid  = it_o4v && rec_el;
  assign el_mb     = rc_mb;
  assign el_blk    = rc_k;
  assign el_half   = it_o4h;
  assign el_pix    = rc_pix;
  always_comb begin
    blm_we = it_o4v && !rec_el; elm_we = el_valid;
    blm_waddr = 7'(int'(rc_mb) * 48 + int'(rc_k) * 2 + int'(it_o4h));
    elm_waddr = blm_waddr;
    for (int i = 0; i < 8; i++) blm_wdata[8*i +: 8] = rc_pix[i];
    elm_wdata = blm_wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hand_valid <= 1'b0; hand_mb <= 1'b0; hand_k <= '0;
      rc_busy <= 1'b0; rc_mb <= 1'b0; rc_k <= '0; rc <= '0; rc_total <= '0;
      q_l <= '0; q_h <= 1'b0; iq_qp_r <= '0; iq_l <= '0; iq_h <= 1'b0;
      bl_cnt[0] <= '0; bl_cnt[1] <= '0;
      for (int i = 0; i < 16; i++) begin hand_pred[i] <= '0; rc_pred[i] <= '0; end
      for (int h = 0; h < 2; h++) for (int i = 0; i < 8; i++) begin
        wq[h][i] <= '0; wn[h][i] <= '0; dqbl[h][i] <= '0; dqsum[h][i] <= '0;
      end
      for (int m = 0; m < 2; m++) for (int i = 0; i < 256; i++) recbl[m][i] <= '0;
    end else begin
      if (phase == PH_AN) begin rc_total <= '0; bl_cnt[0] <= '0; bl_cnt[1] <= '0; end
      // handover from the mode-decision stage
      if (rs == RS_HAND && !hand_valid) begin
        hand_valid <= 1'b1; hand_mb <= rs_mb; hand_k <= rs_k; hand_pred <= predb;
      end else if (!rc_busy && hand_valid) begin
        hand_valid <= 1'b0;
      end
      if (!rc_busy && hand_valid) begin
        rc_busy <= 1'b1; rc <= '0; rc_mb <= hand_mb; rc_k <= hand_k; rc_pred <= hand_pred;
      end else if (rc_busy) begin
        rc <= rc + 4'd1;
        if (rc == 4'd6) bl_cnt[rc_mb] <= bl_cnt[rc_mb] + 5'd1;
        if (rc == 4'd10) begin rc_busy <= 1'b0; rc_total <= rc_total + 6'd1; end
      end
      // quantiser / dequantiser pipeline tags and layer data
      if (q_in_v) begin
        q_l <= 2'(int'(rc) / 2); q_h <= rc[0]; iq_qp_r <= q_qp;
        wq[rc[0]] <= q_coef;
      end
      if (q_out_v) begin
        wn[q_h] <= nm_rem; iq_l <= q_l; iq_h <= q_h;
      end
      if (iq_out_v) begin
        if (iq_l == 2'd0) begin dqbl[iq_h] <= iq_coef; dqsum[iq_h] <= iq_coef; end
        else for (int i = 0; i < 8; i++) dqsum[iq_h][i] <= dqsum[iq_h][i] + iq_coef[i];
      end
      // base-layer reconstruction kept for neighbour access
      if (it_o4v && !rec_el) begin
        int x0, y0;
        x0 = int'(blk_x(rc_k)); y0 = int'(blk_y(rc_k));
        for (int kk = 0; kk < 2; kk++)
          for (int r = 0; r < 4; r++)
            recbl[rc_mb][(y0 + r) * 16 + x0 + 2*int'(it_o4h) + kk] <= rc_pix[kk*4 + r];
      end
    end
  end

endmodule
