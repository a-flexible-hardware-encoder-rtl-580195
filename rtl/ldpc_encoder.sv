// Flexible LDPC encoder after the Richardson-Urbanke method (top level).
//
// The parity-check matrix is preprocessed offline into approximate lower
// triangular form H = [A B T; C D E] with gap g; the six lookup tables hold
// the sparse matrices A, B, T, C, E and F (F here holds the g x g matrix that
// maps the syndrome part to p1, i.e. the inverse of -E T^-1 B + D) plus the
// permutation that restores the original column order. Encoding a message s
// of k = n-m bits computes
//   p1 = F (E T^-1 A s + C s),   p2 = T^-1 (A s + B p1)
// with only sparse multiplications, forward substitutions and vector
// additions, and emits the codeword (s, p1, p2) through the permutation.
//
// The work is split into four stages that run concurrently on four
// consecutive message blocks, with double buffering between them:
//   stage 1  take the message in, one bit per clock (k clocks)
//   stage 2  A s and C s in parallel
//   stage 3  T^-1 (A s), E (..), + C s, F (..) = p1, B p1, A s + B p1
//   stage 4  p2 = T^-1 (A s + B p1), codeword generation (2n clocks)
// A stage controller starts all stages together once all have finished.
//
// W encoder instances run in lock step on W independent messages and share
// the lookup tables: every vector element is W bits wide, bit i belonging to
// instance i. W = 1 is the single encoder.
//
// Interface: load the tables through cfg_* (entries {end_row, column} with
// 1-based columns, column 0 for an empty row; permutation entries zero-based)
// and set cfg_k, cfg_g, cfg_mg (= n-m, g, m-g) before sending messages; they
// must then stay constant. Message bits enter on s_data when s_valid and
// s_ready are both high; codeword bits leave on cw_data when cw_valid is
// high, with cw_last on the last bit, and cannot be held back.
// Timing: a block takes CPC = max over the stages of their clock counts, plus
// two clocks of controller hand-over; latency is about four CPC.
// The stage partition, the buffers, the units and the table format follow
// the described architecture; lock-step sharing of the tables across
// instances, the configuration port and the stream handshakes are this
// design's choices.
module ldpc_encoder
  import ldpc_pkg::*;
#(
  parameter int unsigned W  = 1,
  parameter int unsigned N  = N_DEFAULT,
  parameter int unsigned M  = M_DEFAULT,
  parameter int unsigned G  = G_DEFAULT,
  parameter int unsigned EA = EA_DEFAULT,
  parameter int unsigned EB = EB_DEFAULT,
  parameter int unsigned ET = ET_DEFAULT,
  parameter int unsigned EC = EC_DEFAULT,
  parameter int unsigned EE = EE_DEFAULT,
  parameter int unsigned EF = EF_DEFAULT,
  localparam int unsigned IW = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // table loading and code dimensions
  input  logic           cfg_we,
  input  tbl_sel_e       cfg_sel,
  input  logic [TAW-1:0] cfg_addr,
  input  logic [IW:0]    cfg_data,
  input  logic [IW-1:0]  cfg_k,
  input  logic [IW-1:0]  cfg_g,
  input  logic [IW-1:0]  cfg_mg,
  // message input
  input  logic           s_valid,
  output logic           s_ready,
  input  logic [W-1:0]   s_data,
  // codeword output
  output logic           cw_valid,
  output logic [W-1:0]   cw_data,
  output logic           cw_last,
  // pipeline status
  output logic           stage_start,
  output logic [3:0]     stage_active,
  output logic           stage_bubble
);

  localparam int unsigned K  = N - M;
  localparam int unsigned MG = M - G;

  // ------------------------------------------------------------------
  // Stage controller
  // ------------------------------------------------------------------
  logic [3:0] finish;
  logic [1:0] epoch;
  logic       s1_empty;
  logic       start2, start3, start4;

  stage_controller u_ctrl (
    .clk, .rst_n,
    .finish      (finish),
    .s1_empty    (s1_empty),
    .msg_offered (s_valid),
    .start       (stage_start),
    .active      (stage_active),
    .epoch       (epoch),
    .bubble      (stage_bubble)
  );

  assign start2 = stage_start && stage_active[1];
  assign start3 = stage_start && stage_active[2];
  assign start4 = stage_start && stage_active[3];

  // Banks: stage 1 writes s bank epoch, stage 2 reads epoch-1, stage 4 reads
  // epoch-3; double buffers are written in bank epoch[0] and read in the other.
  logic [1:0] s_wbank, s_rbank2, s_rbank4;
  logic       wb, rb;
  assign s_wbank  = epoch;
  assign s_rbank2 = epoch - 2'd1;
  assign s_rbank4 = epoch - 2'd3;
  assign wb       = epoch[0];
  assign rb       = ~epoch[0];

  // ------------------------------------------------------------------
  // Lookup tables
  // ------------------------------------------------------------------
  logic [TAW-1:0] a_ra [1], b_ra [1], c_ra [1], e_ra [1], f_ra [1], p_ra [1], t_ra [2];
  logic [IW:0]    a_rd [1], b_rd [1], c_rd [1], e_rd [1], f_rd [1], t_rd [2];
  logic [IW-1:0]  p_rd [1];

  lut_ram #(.DW(IW+1), .DEPTH(EA), .AW(TAW), .NR(1)) u_tab_a (
    .clk, .we(cfg_we && cfg_sel == TBL_A), .waddr(cfg_addr), .wdata(cfg_data),
    .raddr(a_ra), .rdata(a_rd));
  lut_ram #(.DW(IW+1), .DEPTH(EB), .AW(TAW), .NR(1)) u_tab_b (
    .clk, .we(cfg_we && cfg_sel == TBL_B), .waddr(cfg_addr), .wdata(cfg_data),
    .raddr(b_ra), .rdata(b_rd));
  lut_ram #(.DW(IW+1), .DEPTH(ET), .AW(TAW), .NR(2)) u_tab_t (
    .clk, .we(cfg_we && cfg_sel == TBL_T), .waddr(cfg_addr), .wdata(cfg_data),
    .raddr(t_ra), .rdata(t_rd));
  lut_ram #(.DW(IW+1), .DEPTH(EC), .AW(TAW), .NR(1)) u_tab_c (
    .clk, .we(cfg_we && cfg_sel == TBL_C), .waddr(cfg_addr), .wdata(cfg_data),
    .raddr(c_ra), .rdata(c_rd));
  lut_ram #(.DW(IW+1), .DEPTH(EE), .AW(TAW), .NR(1)) u_tab_e (
    .clk, .we(cfg_we && cfg_sel == TBL_E), .waddr(cfg_addr), .wdata(cfg_data),
    .raddr(e_ra), .rdata(e_rd));
  lut_ram #(.DW(IW+1), .DEPTH(EF), .AW(TAW), .NR(1)) u_tab_f (
    .clk, .we(cfg_we && cfg_sel == TBL_F), .waddr(cfg_addr), .wdata(cfg_data),
    .raddr(f_ra), .rdata(f_rd));
  lut_ram #(.DW(IW), .DEPTH(N), .AW(TAW), .NR(1)) u_tab_p (
    .clk, .we(cfg_we && cfg_sel == TBL_P), .waddr(cfg_addr), .wdata(cfg_data[IW-1:0]),
    .raddr(p_ra), .rdata(p_rd));

  // ------------------------------------------------------------------
  // Stage 1: message buffer
  // ------------------------------------------------------------------
  logic          s1_run;
  logic [IW-1:0] s1_cnt;
  logic          s1_fin;
  logic          s_acc;

  assign s_ready  = s1_run && !stage_start;
  assign s_acc    = s_valid && s_ready;
  assign s1_empty = s1_run && (s1_cnt == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_run <= 1'b0;
      s1_cnt <= '0;
      s1_fin <= 1'b0;
    end else begin
      s1_fin <= 1'b0;
      if (stage_start) begin
        s1_run <= 1'b1;
        s1_cnt <= '0;
      end else if (s_acc) begin
        s1_cnt <= s1_cnt + 1'b1;
        if (s1_cnt == cfg_k - 1'b1) begin
          s1_run <= 1'b0;
          s1_fin <= 1'b1;
        end
      end
    end
  end

  // s: four banks, written by stage 1, read by stage 2 (two ports) and stage 4
  logic [1:0]    s_rbank [3];
  logic [IW-1:0] s_raddr [3];
  logic [W-1:0]  s_rdata [3];
  assign s_rbank = '{s_rbank2, s_rbank2, s_rbank4};

  vec_buf #(.W(W), .DEPTH(K), .NB(4), .IW(IW), .NR(3)) u_buf_s (
    .clk, .we(s_acc), .wbank(s_wbank), .waddr(s1_cnt), .wdata(s_data),
    .rbank(s_rbank), .raddr(s_raddr), .rdata(s_rdata));

  // ------------------------------------------------------------------
  // Stage 2: A s and C s
  // ------------------------------------------------------------------
  logic          mA_busy, mA_done, mC_busy, mC_done;
  logic          mA_we, mC_we;
  logic [IW-1:0] mA_za, mC_za;
  logic [W-1:0]  mA_zd, mC_zd;
  logic          mA_flag, mC_flag;

  mvm_unit #(.W(W), .IW(IW), .AW(TAW)) u_mvm_a (
    .clk, .rst_n, .start(start2), .rows(cfg_mg), .busy(mA_busy), .done(mA_done),
    .tab_addr(a_ra[0]), .tab_entry(a_rd[0]),
    .y_addr(s_raddr[0]), .y_data(s_rdata[0]),
    .z_we(mA_we), .z_addr(mA_za), .z_data(mA_zd));

  mvm_unit #(.W(W), .IW(IW), .AW(TAW)) u_mvm_c (
    .clk, .rst_n, .start(start2), .rows(cfg_g), .busy(mC_busy), .done(mC_done),
    .tab_addr(c_ra[0]), .tab_entry(c_rd[0]),
    .y_addr(s_raddr[1]), .y_data(s_rdata[1]),
    .z_we(mC_we), .z_addr(mC_za), .z_data(mC_zd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mA_flag <= 1'b0;
      mC_flag <= 1'b0;
    end else if (start2) begin
      mA_flag <= 1'b0;
      mC_flag <= 1'b0;
    end else begin
      if (mA_done) mA_flag <= 1'b1;
      if (mC_done) mC_flag <= 1'b1;
    end
  end

  assign finish[1] = (mA_done && (mC_flag || mC_done)) || (mC_done && mA_flag);

  // As (read twice in stage 3) and Cs, double buffered
  logic          as_rbank [2];
  logic [IW-1:0] as_raddr [2];
  logic [W-1:0]  as_rdata [2];
  logic          cs_rbank [1];
  logic [IW-1:0] cs_raddr [1];
  logic [W-1:0]  cs_rdata [1];
  assign as_rbank = '{rb, rb};
  assign cs_rbank = '{rb};

  vec_buf #(.W(W), .DEPTH(MG), .NB(2), .IW(IW), .NR(2)) u_buf_as (
    .clk, .we(mA_we), .wbank(wb), .waddr(mA_za), .wdata(mA_zd),
    .rbank(as_rbank), .raddr(as_raddr), .rdata(as_rdata));
  vec_buf #(.W(W), .DEPTH(G), .NB(2), .IW(IW), .NR(1)) u_buf_cs (
    .clk, .we(mC_we), .wbank(wb), .waddr(mC_za), .wdata(mC_zd),
    .rbank(cs_rbank), .raddr(cs_raddr), .rdata(cs_rdata));

  // ------------------------------------------------------------------
  // Stage 3: p1 and A s + B p1
  // ------------------------------------------------------------------
  logic          f3_busy, f3_done, mE_busy, mE_done, v1_busy, v1_done;
  logic          mF_busy, mF_done, mB_busy, mB_done, v2_busy, v2_done;
  logic          f3_we, mE_we, v1_we, mF_we, mB_we, v2_we;
  logic [IW-1:0] f3_za, mE_za, v1_idx, mF_za, mB_za, v2_idx;
  logic [W-1:0]  f3_zd, mE_zd, v1_zd, mF_zd, mB_zd, v2_zd;

  // T^-1 A s
  logic          tas_rbank [2];
  logic [IW-1:0] tas_raddr [2];
  logic [W-1:0]  tas_rdata [2];
  assign tas_rbank = '{1'b0, 1'b0};

  fs_unit #(.W(W), .IW(IW), .AW(TAW)) u_fs3 (
    .clk, .rst_n, .start(start3), .rows(cfg_mg), .busy(f3_busy), .done(f3_done),
    .tab_addr(t_ra[0]), .tab_entry(t_rd[0]),
    .y_addr(as_raddr[0]), .y_data(as_rdata[0]),
    .zr_addr(tas_raddr[0]), .zr_data(tas_rdata[0]),
    .z_we(f3_we), .z_addr(f3_za), .z_data(f3_zd));

  vec_buf #(.W(W), .DEPTH(MG), .NB(1), .IW(IW), .NR(2)) u_buf_tas (
    .clk, .we(f3_we), .wbank(1'b0), .waddr(f3_za), .wdata(f3_zd),
    .rbank(tas_rbank), .raddr(tas_raddr), .rdata(tas_rdata));

  // E T^-1 A s
  logic          etas_rbank [1];
  logic [IW-1:0] etas_raddr [1];
  logic [W-1:0]  etas_rdata [1];
  assign etas_rbank = '{1'b0};

  mvm_unit #(.W(W), .IW(IW), .AW(TAW)) u_mvm_e (
    .clk, .rst_n, .start(f3_done), .rows(cfg_g), .busy(mE_busy), .done(mE_done),
    .tab_addr(e_ra[0]), .tab_entry(e_rd[0]),
    .y_addr(tas_raddr[1]), .y_data(tas_rdata[1]),
    .z_we(mE_we), .z_addr(mE_za), .z_data(mE_zd));

  vec_buf #(.W(W), .DEPTH(G), .NB(1), .IW(IW), .NR(1)) u_buf_etas (
    .clk, .we(mE_we), .wbank(1'b0), .waddr(mE_za), .wdata(mE_zd),
    .rbank(etas_rbank), .raddr(etas_raddr), .rdata(etas_rdata));

  // E T^-1 A s + C s
  logic          etascs_rbank [1];
  logic [IW-1:0] etascs_raddr [1];
  logic [W-1:0]  etascs_rdata [1];
  assign etascs_rbank = '{1'b0};
  assign etas_raddr   = '{v1_idx};
  assign cs_raddr     = '{v1_idx};

  va_unit #(.W(W), .IW(IW)) u_va1 (
    .clk, .rst_n, .start(mE_done), .len(cfg_g), .busy(v1_busy), .done(v1_done),
    .idx(v1_idx), .x_data(etas_rdata[0]), .y_data(cs_rdata[0]),
    .z_we(v1_we), .z_data(v1_zd));

  vec_buf #(.W(W), .DEPTH(G), .NB(1), .IW(IW), .NR(1)) u_buf_etascs (
    .clk, .we(v1_we), .wbank(1'b0), .waddr(v1_idx), .wdata(v1_zd),
    .rbank(etascs_rbank), .raddr(etascs_raddr), .rdata(etascs_rdata));

  // p1 = F (E T^-1 A s + C s), double buffered towards stage 4
  logic          p1_rbank [2];
  logic [IW-1:0] p1_raddr [2];
  logic [W-1:0]  p1_rdata [2];
  assign p1_rbank = '{wb, rb};

  mvm_unit #(.W(W), .IW(IW), .AW(TAW)) u_mvm_f (
    .clk, .rst_n, .start(v1_done), .rows(cfg_g), .busy(mF_busy), .done(mF_done),
    .tab_addr(f_ra[0]), .tab_entry(f_rd[0]),
    .y_addr(etascs_raddr[0]), .y_data(etascs_rdata[0]),
    .z_we(mF_we), .z_addr(mF_za), .z_data(mF_zd));

  vec_buf #(.W(W), .DEPTH(G), .NB(2), .IW(IW), .NR(2)) u_buf_p1 (
    .clk, .we(mF_we), .wbank(wb), .waddr(mF_za), .wdata(mF_zd),
    .rbank(p1_rbank), .raddr(p1_raddr), .rdata(p1_rdata));

  // B p1
  logic          bp1_rbank [1];
  logic [IW-1:0] bp1_raddr [1];
  logic [W-1:0]  bp1_rdata [1];
  assign bp1_rbank = '{1'b0};

  mvm_unit #(.W(W), .IW(IW), .AW(TAW)) u_mvm_b (
    .clk, .rst_n, .start(mF_done), .rows(cfg_mg), .busy(mB_busy), .done(mB_done),
    .tab_addr(b_ra[0]), .tab_entry(b_rd[0]),
    .y_addr(p1_raddr[0]), .y_data(p1_rdata[0]),
    .z_we(mB_we), .z_addr(mB_za), .z_data(mB_zd));

  vec_buf #(.W(W), .DEPTH(MG), .NB(1), .IW(IW), .NR(1)) u_buf_bp1 (
    .clk, .we(mB_we), .wbank(1'b0), .waddr(mB_za), .wdata(mB_zd),
    .rbank(bp1_rbank), .raddr(bp1_raddr), .rdata(bp1_rdata));

  // A s + B p1, double buffered towards stage 4
  logic          asbp1_rbank [1];
  logic [IW-1:0] asbp1_raddr [1];
  logic [W-1:0]  asbp1_rdata [1];
  assign asbp1_rbank = '{rb};
  assign as_raddr[1] = v2_idx;
  assign bp1_raddr   = '{v2_idx};

  va_unit #(.W(W), .IW(IW)) u_va2 (
    .clk, .rst_n, .start(mB_done), .len(cfg_mg), .busy(v2_busy), .done(v2_done),
    .idx(v2_idx), .x_data(as_rdata[1]), .y_data(bp1_rdata[0]),
    .z_we(v2_we), .z_data(v2_zd));

  vec_buf #(.W(W), .DEPTH(MG), .NB(2), .IW(IW), .NR(1)) u_buf_asbp1 (
    .clk, .we(v2_we), .wbank(wb), .waddr(v2_idx), .wdata(v2_zd),
    .rbank(asbp1_rbank), .raddr(asbp1_raddr), .rdata(asbp1_rdata));

  assign finish[2] = v2_done;

  // ------------------------------------------------------------------
  // Stage 4: p2 = T^-1 (A s + B p1) and codeword generation
  // ------------------------------------------------------------------
  logic          f4_busy, f4_done, cw_busy, cw_done;
  logic          f4_we;
  logic [IW-1:0] f4_za;
  logic [W-1:0]  f4_zd;
  logic          p2_rbank [2];
  logic [IW-1:0] p2_raddr [2];
  logic [W-1:0]  p2_rdata [2];
  assign p2_rbank = '{1'b0, 1'b0};

  fs_unit #(.W(W), .IW(IW), .AW(TAW)) u_fs4 (
    .clk, .rst_n, .start(start4), .rows(cfg_mg), .busy(f4_busy), .done(f4_done),
    .tab_addr(t_ra[1]), .tab_entry(t_rd[1]),
    .y_addr(asbp1_raddr[0]), .y_data(asbp1_rdata[0]),
    .zr_addr(p2_raddr[0]), .zr_data(p2_rdata[0]),
    .z_we(f4_we), .z_addr(f4_za), .z_data(f4_zd));

  vec_buf #(.W(W), .DEPTH(MG), .NB(1), .IW(IW), .NR(2)) u_buf_p2 (
    .clk, .we(f4_we), .wbank(1'b0), .waddr(f4_za), .wdata(f4_zd),
    .rbank(p2_rbank), .raddr(p2_raddr), .rdata(p2_rdata));

  cwg_unit #(.W(W), .IW(IW), .AW(TAW), .N(N)) u_cwg (
    .clk, .rst_n, .start(f4_done), .k(cfg_k), .g(cfg_g), .mg(cfg_mg),
    .busy(cw_busy), .done(cw_done),
    .s_addr(s_raddr[2]), .s_data(s_rdata[2]),
    .p1_addr(p1_raddr[1]), .p1_data(p1_rdata[1]),
    .p2_addr(p2_raddr[1]), .p2_data(p2_rdata[1]),
    .perm_addr(p_ra[0]), .perm_data(p_rd[0]),
    .cw_valid(cw_valid), .cw_data(cw_data), .cw_last(cw_last));

  assign finish[3] = cw_done;
  assign finish[0] = s1_fin;

  // A start may only come when every unit has completed its previous run.
  assert property (@(posedge clk) disable iff (!rst_n)
    stage_start |-> !(mA_busy || mC_busy || f3_busy || mE_busy || v1_busy ||
                      mF_busy || mB_busy || v2_busy || f4_busy || cw_busy))
    else $error("ldpc_encoder: stage start while a unit is busy");

endmodule
