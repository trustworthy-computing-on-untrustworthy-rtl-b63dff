// axi_wrapper: W(AXI), the guard wrapped around the untrusted AXI interconnect.
// It holds one master interface unit U(M_i) per interconnect master port, one
// slave interface unit U(S_j) per interconnect slave port, and four shared
// logs: TR_log and DATA_log for reads and for writes. Master units allocate and
// retire log entries and check what the interconnect delivers to masters; slave
// units admit only what the logs expect and check what it delivers to slaves.
// Master-side and slave-side state of the logs are separate registers, so all
// units access them in the same cycle and traffic keeps full throughput.
// Each unit adds one cycle per channel. Ports are arrays indexed by master (l_m_*,
// ic_m_*) or slave (ic_s_*, l_s_*); alarm vectors are per unit.
module axi_wrapper
  import tcuc_pkg::*;
#(
  parameter int unsigned N_M       = 2,
  parameter int unsigned N_S       = 2,
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned MAX_BEATS = 16,
  parameter int unsigned SLV_SHIFT = 16
) (
  input  logic clk,
  input  logic rst_n,
  // towards the master wrappers
  input  logic [N_M-1:0] l_m_aw_valid, output logic [N_M-1:0] l_m_aw_ready, input  ax_t [N_M-1:0] l_m_aw,
  input  logic [N_M-1:0] l_m_w_valid,  output logic [N_M-1:0] l_m_w_ready,  input  w_t  [N_M-1:0] l_m_w,
  input  logic [N_M-1:0][TAG_W-1:0] l_m_w_tag,
  output logic [N_M-1:0] l_m_b_valid,  input  logic [N_M-1:0] l_m_b_ready,  output b_t  [N_M-1:0] l_m_b,
  input  logic [N_M-1:0] l_m_ar_valid, output logic [N_M-1:0] l_m_ar_ready, input  ax_t [N_M-1:0] l_m_ar,
  output logic [N_M-1:0] l_m_r_valid,  input  logic [N_M-1:0] l_m_r_ready,  output r_t  [N_M-1:0] l_m_r,
  // interconnect master ports
  output logic [N_M-1:0] ic_m_aw_valid, input  logic [N_M-1:0] ic_m_aw_ready, output ax_t [N_M-1:0] ic_m_aw,
  output logic [N_M-1:0] ic_m_w_valid,  input  logic [N_M-1:0] ic_m_w_ready,  output w_t  [N_M-1:0] ic_m_w,
  input  logic [N_M-1:0] ic_m_b_valid,  output logic [N_M-1:0] ic_m_b_ready,  input  b_t  [N_M-1:0] ic_m_b,
  output logic [N_M-1:0] ic_m_ar_valid, input  logic [N_M-1:0] ic_m_ar_ready, output ax_t [N_M-1:0] ic_m_ar,
  input  logic [N_M-1:0] ic_m_r_valid,  output logic [N_M-1:0] ic_m_r_ready,  input  r_t  [N_M-1:0] ic_m_r,
  // interconnect slave ports
  input  logic [N_S-1:0] ic_s_aw_valid, output logic [N_S-1:0] ic_s_aw_ready, input  ax_t [N_S-1:0] ic_s_aw,
  input  logic [N_S-1:0] ic_s_w_valid,  output logic [N_S-1:0] ic_s_w_ready,  input  w_t  [N_S-1:0] ic_s_w,
  output logic [N_S-1:0] ic_s_b_valid,  input  logic [N_S-1:0] ic_s_b_ready,  output b_t  [N_S-1:0] ic_s_b,
  input  logic [N_S-1:0] ic_s_ar_valid, output logic [N_S-1:0] ic_s_ar_ready, input  ax_t [N_S-1:0] ic_s_ar,
  output logic [N_S-1:0] ic_s_r_valid,  input  logic [N_S-1:0] ic_s_r_ready,  output r_t  [N_S-1:0] ic_s_r,
  // towards the slave wrappers
  output logic [N_S-1:0] l_s_aw_valid, input  logic [N_S-1:0] l_s_aw_ready, output ax_t [N_S-1:0] l_s_aw,
  output logic [N_S-1:0] l_s_w_valid,  input  logic [N_S-1:0] l_s_w_ready,  output w_t  [N_S-1:0] l_s_w,
  input  logic [N_S-1:0] l_s_b_valid,  output logic [N_S-1:0] l_s_b_ready,  input  b_t  [N_S-1:0] l_s_b,
  output logic [N_S-1:0] l_s_ar_valid, input  logic [N_S-1:0] l_s_ar_ready, output ax_t [N_S-1:0] l_s_ar,
  input  logic [N_S-1:0] l_s_r_valid,  output logic [N_S-1:0] l_s_r_ready,  input  r_t  [N_S-1:0] l_s_r,
  input  logic [N_S-1:0][TAG_W-1:0] l_s_r_tag,
  // alarms
  output alarm_t [N_M-1:0] alarm_um,
  output alarm_t [N_S-1:0] alarm_us
);
  localparam int unsigned LI_W = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1;
  localparam int unsigned BI_W = (MAX_BEATS > 1) ? $clog2(MAX_BEATS) : 1;
  localparam int unsigned SG_W = (N_M > 1) ? $clog2(N_M) : 1;

  // ---------------------------------------------------------------- TR_log(write)
  ax_t  [N_M-1:0][LOG_DEPTH-1:0]          wl_req;
  logic [N_M-1:0][LOG_DEPTH-1:0][SI_W-1:0]  wl_slv_u;
  logic [N_M-1:0][LOG_DEPTH-1:0][CNT_W-1:0] wl_mbeats, wl_sbeats;
  logic [N_M-1:0][LOG_DEPTH-1:0]          wl_valid_q, wl_fwd_q, wl_resp_q;
  logic [N_M-1:0] wm_alloc, wm_inc, wm_free;
  logic [N_M-1:0][LI_W-1:0] wm_alloc_idx, wm_inc_idx, wm_free_idx;
  ax_t  [N_M-1:0] wm_alloc_req;
  logic [N_M-1:0][SI_W-1:0] wm_alloc_slv;
  logic [N_S-1:0] ws_fwd, ws_inc, ws_resp;
  logic [N_S-1:0][MI_W-1:0] ws_fwd_seg, ws_inc_seg, ws_resp_seg;
  logic [N_S-1:0][LI_W-1:0] ws_fwd_idx, ws_inc_idx, ws_resp_idx;

  tr_log #(.N_M(N_M), .N_S(N_S), .LOG_DEPTH(LOG_DEPTH)) u_trlog_w (.clk, .rst_n,
    .m_alloc(wm_alloc), .m_alloc_idx(wm_alloc_idx), .m_alloc_req(wm_alloc_req), .m_alloc_slv(wm_alloc_slv),
    .m_inc(wm_inc), .m_inc_idx(wm_inc_idx), .m_free(wm_free), .m_free_idx(wm_free_idx),
    .s_fwd(ws_fwd), .s_fwd_seg(ws_fwd_seg), .s_fwd_idx(ws_fwd_idx),
    .s_inc(ws_inc), .s_inc_seg(ws_inc_seg), .s_inc_idx(ws_inc_idx),
    .s_resp(ws_resp), .s_resp_seg(ws_resp_seg), .s_resp_idx(ws_resp_idx),
    .q_valid(wl_valid_q), .q_req(wl_req), .q_slv(wl_slv_u), .q_mbeats(wl_mbeats),
    .q_fwd(wl_fwd_q), .q_sbeats(wl_sbeats), .q_resp(wl_resp_q));

  // ---------------------------------------------------------------- TR_log(read)
  ax_t  [N_M-1:0][LOG_DEPTH-1:0]            rl_req;
  logic [N_M-1:0][LOG_DEPTH-1:0][SI_W-1:0]  rl_slv;
  logic [N_M-1:0][LOG_DEPTH-1:0][CNT_W-1:0] rl_mbeats, rl_sbeats;
  logic [N_M-1:0][LOG_DEPTH-1:0]            rl_valid_q, rl_fwd_q, rl_resp_unused;
  logic [N_M-1:0] rm_alloc, rm_inc, rm_free;
  logic [N_M-1:0][LI_W-1:0] rm_alloc_idx, rm_inc_idx, rm_free_idx;
  ax_t  [N_M-1:0] rm_alloc_req;
  logic [N_M-1:0][SI_W-1:0] rm_alloc_slv;
  logic [N_S-1:0] rs_fwd, rs_inc;
  logic [N_S-1:0][MI_W-1:0] rs_fwd_seg, rs_inc_seg;
  logic [N_S-1:0][LI_W-1:0] rs_fwd_idx, rs_inc_idx;

  tr_log #(.N_M(N_M), .N_S(N_S), .LOG_DEPTH(LOG_DEPTH)) u_trlog_r (.clk, .rst_n,
    .m_alloc(rm_alloc), .m_alloc_idx(rm_alloc_idx), .m_alloc_req(rm_alloc_req), .m_alloc_slv(rm_alloc_slv),
    .m_inc(rm_inc), .m_inc_idx(rm_inc_idx), .m_free(rm_free), .m_free_idx(rm_free_idx),
    .s_fwd(rs_fwd), .s_fwd_seg(rs_fwd_seg), .s_fwd_idx(rs_fwd_idx),
    .s_inc(rs_inc), .s_inc_seg(rs_inc_seg), .s_inc_idx(rs_inc_idx),
    .s_resp('0), .s_resp_seg('0), .s_resp_idx('0),
    .q_valid(rl_valid_q), .q_req(rl_req), .q_slv(rl_slv), .q_mbeats(rl_mbeats),
    .q_fwd(rl_fwd_q), .q_sbeats(rl_sbeats), .q_resp(rl_resp_unused));

  // ---------------------------------------------------------------- DATA_log(write)
  logic [N_M-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0]            dw_tvalid;
  logic [N_M-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0][TAG_W-1:0] dw_tagq;
  logic [N_M-1:0] dw_clr, dw_we;
  logic [N_M-1:0][LI_W-1:0] dw_clr_idx, dw_idx;
  logic [N_M-1:0][BI_W-1:0] dw_beat;
  logic [N_M-1:0][TAG_W-1:0] dw_tag;
  logic [N_M-1:0][SG_W-1:0] dw_seg;

  always_comb
    for (int i = 0; i < N_M; i++) dw_seg[i] = SG_W'(i);

  data_log #(.N_SEG(N_M), .LOG_DEPTH(LOG_DEPTH), .MAX_BEATS(MAX_BEATS), .N_WP(N_M)) u_dlog_w (.clk, .rst_n,
    .clr(dw_clr), .clr_idx(dw_clr_idx),
    .we(dw_we), .w_seg(dw_seg), .w_idx(dw_idx), .w_beat(dw_beat), .w_tag(dw_tag),
    .tvalid(dw_tvalid), .tag(dw_tagq));

  // ---------------------------------------------------------------- DATA_log(read)
  logic [N_M-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0]            dr_tvalid;
  logic [N_M-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0][TAG_W-1:0] dr_tagq;
  logic [N_M-1:0] dr_clr;
  logic [N_M-1:0][LI_W-1:0] dr_clr_idx;
  logic [N_S-1:0] dr_we;
  logic [N_S-1:0][MI_W-1:0] dr_seg_s;
  logic [N_S-1:0][SG_W-1:0] dr_seg;
  logic [N_S-1:0][LI_W-1:0] dr_idx;
  logic [N_S-1:0][BI_W-1:0] dr_beat;
  logic [N_S-1:0][TAG_W-1:0] dr_tag;

  always_comb
    for (int j = 0; j < N_S; j++) dr_seg[j] = SG_W'(dr_seg_s[j]);

  data_log #(.N_SEG(N_M), .LOG_DEPTH(LOG_DEPTH), .MAX_BEATS(MAX_BEATS), .N_WP(N_S)) u_dlog_r (.clk, .rst_n,
    .clr(dr_clr), .clr_idx(dr_clr_idx),
    .we(dr_we), .w_seg(dr_seg), .w_idx(dr_idx), .w_beat(dr_beat), .w_tag(dr_tag),
    .tvalid(dr_tvalid), .tag(dr_tagq));

  // ---------------------------------------------------------------- U(M_i)
  for (genvar i = 0; i < N_M; i++) begin : g_um
    master_if_unit #(.N_S(N_S), .LOG_DEPTH(LOG_DEPTH), .MAX_BEATS(MAX_BEATS),
                     .SLV_SHIFT(SLV_SHIFT)) u_um (
      .clk, .rst_n,
      .l_aw_valid(l_m_aw_valid[i]), .l_aw_ready(l_m_aw_ready[i]), .l_aw(l_m_aw[i]),
      .l_w_valid(l_m_w_valid[i]),   .l_w_ready(l_m_w_ready[i]),   .l_w(l_m_w[i]), .l_w_tag(l_m_w_tag[i]),
      .l_b_valid(l_m_b_valid[i]),   .l_b_ready(l_m_b_ready[i]),   .l_b(l_m_b[i]),
      .l_ar_valid(l_m_ar_valid[i]), .l_ar_ready(l_m_ar_ready[i]), .l_ar(l_m_ar[i]),
      .l_r_valid(l_m_r_valid[i]),   .l_r_ready(l_m_r_ready[i]),   .l_r(l_m_r[i]),
      .ic_aw_valid(ic_m_aw_valid[i]), .ic_aw_ready(ic_m_aw_ready[i]), .ic_aw(ic_m_aw[i]),
      .ic_w_valid(ic_m_w_valid[i]),   .ic_w_ready(ic_m_w_ready[i]),   .ic_w(ic_m_w[i]),
      .ic_b_valid(ic_m_b_valid[i]),   .ic_b_ready(ic_m_b_ready[i]),   .ic_b(ic_m_b[i]),
      .ic_ar_valid(ic_m_ar_valid[i]), .ic_ar_ready(ic_m_ar_ready[i]), .ic_ar(ic_m_ar[i]),
      .ic_r_valid(ic_m_r_valid[i]),   .ic_r_ready(ic_m_r_ready[i]),   .ic_r(ic_m_r[i]),
      .wl_valid(wl_valid_q[i]), .wl_req(wl_req[i]), .wl_mbeats(wl_mbeats[i]), .wl_resp(wl_resp_q[i]),
      .wl_alloc(wm_alloc[i]), .wl_alloc_idx(wm_alloc_idx[i]), .wl_alloc_req(wm_alloc_req[i]),
      .wl_alloc_slv(wm_alloc_slv[i]), .wl_inc(wm_inc[i]), .wl_inc_idx(wm_inc_idx[i]),
      .wl_free(wm_free[i]), .wl_free_idx(wm_free_idx[i]),
      .rl_valid(rl_valid_q[i]), .rl_req(rl_req[i]), .rl_slv(rl_slv[i]), .rl_mbeats(rl_mbeats[i]),
      .rl_alloc(rm_alloc[i]), .rl_alloc_idx(rm_alloc_idx[i]), .rl_alloc_req(rm_alloc_req[i]),
      .rl_alloc_slv(rm_alloc_slv[i]), .rl_inc(rm_inc[i]), .rl_inc_idx(rm_inc_idx[i]),
      .rl_free(rm_free[i]), .rl_free_idx(rm_free_idx[i]),
      .dw_clr(dw_clr[i]), .dw_clr_idx(dw_clr_idx[i]), .dw_we(dw_we[i]), .dw_idx(dw_idx[i]),
      .dw_beat(dw_beat[i]), .dw_tag(dw_tag[i]),
      .dr_clr(dr_clr[i]), .dr_clr_idx(dr_clr_idx[i]), .dr_tvalid(dr_tvalid[i]), .dr_tag(dr_tagq[i]),
      .alarm(alarm_um[i]));
  end

  // ---------------------------------------------------------------- U(S_j)
  for (genvar j = 0; j < N_S; j++) begin : g_us
    slave_if_unit #(.N_M(N_M), .LOG_DEPTH(LOG_DEPTH), .MAX_BEATS(MAX_BEATS), .SJ(j)) u_us (
      .clk, .rst_n,
      .ic_aw_valid(ic_s_aw_valid[j]), .ic_aw_ready(ic_s_aw_ready[j]), .ic_aw(ic_s_aw[j]),
      .ic_w_valid(ic_s_w_valid[j]),   .ic_w_ready(ic_s_w_ready[j]),   .ic_w(ic_s_w[j]),
      .ic_b_valid(ic_s_b_valid[j]),   .ic_b_ready(ic_s_b_ready[j]),   .ic_b(ic_s_b[j]),
      .ic_ar_valid(ic_s_ar_valid[j]), .ic_ar_ready(ic_s_ar_ready[j]), .ic_ar(ic_s_ar[j]),
      .ic_r_valid(ic_s_r_valid[j]),   .ic_r_ready(ic_s_r_ready[j]),   .ic_r(ic_s_r[j]),
      .l_aw_valid(l_s_aw_valid[j]), .l_aw_ready(l_s_aw_ready[j]), .l_aw(l_s_aw[j]),
      .l_w_valid(l_s_w_valid[j]),   .l_w_ready(l_s_w_ready[j]),   .l_w(l_s_w[j]),
      .l_b_valid(l_s_b_valid[j]),   .l_b_ready(l_s_b_ready[j]),   .l_b(l_s_b[j]),
      .l_ar_valid(l_s_ar_valid[j]), .l_ar_ready(l_s_ar_ready[j]), .l_ar(l_s_ar[j]),
      .l_r_valid(l_s_r_valid[j]),   .l_r_ready(l_s_r_ready[j]),   .l_r(l_s_r[j]), .l_r_tag(l_s_r_tag[j]),
      .wl_valid(wl_valid_q), .wl_req(wl_req), .wl_slv(wl_slv_u), .wl_fwd(wl_fwd_q),
      .wl_sbeats(wl_sbeats), .wl_resp(wl_resp_q),
      .wl_fwd_we(ws_fwd[j]), .wl_fwd_seg(ws_fwd_seg[j]), .wl_fwd_idx(ws_fwd_idx[j]),
      .wl_inc(ws_inc[j]), .wl_inc_seg(ws_inc_seg[j]), .wl_inc_idx(ws_inc_idx[j]),
      .wl_resp_we(ws_resp[j]), .wl_resp_seg(ws_resp_seg[j]), .wl_resp_idx(ws_resp_idx[j]),
      .rl_valid(rl_valid_q), .rl_req(rl_req), .rl_slv(rl_slv), .rl_fwd(rl_fwd_q), .rl_sbeats(rl_sbeats),
      .rl_fwd_we(rs_fwd[j]), .rl_fwd_seg(rs_fwd_seg[j]), .rl_fwd_idx(rs_fwd_idx[j]),
      .rl_inc(rs_inc[j]), .rl_inc_seg(rs_inc_seg[j]), .rl_inc_idx(rs_inc_idx[j]),
      .dw_tvalid(dw_tvalid), .dw_tag(dw_tagq),
      .dr_we(dr_we[j]), .dr_seg(dr_seg_s[j]), .dr_idx(dr_idx[j]), .dr_beat(dr_beat[j]), .dr_tag(dr_tag[j]),
      .alarm(alarm_us[j]));
  end
endmodule
