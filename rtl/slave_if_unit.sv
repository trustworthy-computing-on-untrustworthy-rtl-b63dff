// slave_if_unit: U(S_j), the slave interface unit of the interconnect wrapper,
// sitting between slave port SJ of the untrusted interconnect and slave wrapper
// W(S_j). The interconnect is expected to carry the issuing master's index in
// the upper MI_W bits of the ID on this side. The unit guards all five channels:
//  AW/AR  admitted only if master mi's log holds an open, not yet admitted
//         entry with the same ID, address and length that targets this slave.
//         Anything else (a request the interconnect made up, diverted to the
//         wrong slave, or altered) is blocked (ALM_AW_UNEXP / ALM_AR_UNEXP).
//  W      beats belong to the admitted write bursts in order. Each beat's tag,
//         recomputed from the received data, the beat number and the master's
//         UID, must equal the tag logged by the master unit (ALM_W_TAG), with
//         WLAST where the length says. A beat with no admitted burst while no
//         AW is offered is flooding or replayed (shadowed) data (ALM_W_UNEXP).
//  B      from the slave, admitted only for an admitted write whose beats have
//         all been delivered and which has no response yet (ALM_B_UNEXP).
//  R      from the slave, admitted only for an admitted open read and within its
//         length (ALM_R_UNEXP); the tag from W(S_j) is logged in DATA_log(read)
//         for the master unit to verify.
// A blocked transfer is accepted and discarded and its alarm bit pulses.
// Every forwarded channel passes one register stage (1 cycle). The checks are
// this design's reading of the scheme's event verification.
module slave_if_unit
  import tcuc_pkg::*;
#(
  parameter int unsigned N_M       = 2,
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned MAX_BEATS = 16,
  parameter int unsigned SJ        = 0,
  localparam int unsigned LI_W = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  localparam int unsigned BI_W = (MAX_BEATS > 1) ? $clog2(MAX_BEATS) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // interconnect side
  input  logic ic_aw_valid, output logic ic_aw_ready, input  ax_t ic_aw,
  input  logic ic_w_valid,  output logic ic_w_ready,  input  w_t  ic_w,
  output logic ic_b_valid,  input  logic ic_b_ready,  output b_t  ic_b,
  input  logic ic_ar_valid, output logic ic_ar_ready, input  ax_t ic_ar,
  output logic ic_r_valid,  input  logic ic_r_ready,  output r_t  ic_r,
  // wrapper side (W(S_j))
  output logic l_aw_valid, input  logic l_aw_ready, output ax_t l_aw,
  output logic l_w_valid,  input  logic l_w_ready,  output w_t  l_w,
  input  logic l_b_valid,  output logic l_b_ready,  input  b_t  l_b,
  output logic l_ar_valid, input  logic l_ar_ready, output ax_t l_ar,
  input  logic l_r_valid,  output logic l_r_ready,  input  r_t  l_r,
  input  logic [TAG_W-1:0] l_r_tag,
  // TR_log(write), all segments
  input  logic [N_M-1:0][LOG_DEPTH-1:0]             wl_valid,
  input  ax_t  [N_M-1:0][LOG_DEPTH-1:0]             wl_req,
  input  logic [N_M-1:0][LOG_DEPTH-1:0][SI_W-1:0]   wl_slv,
  input  logic [N_M-1:0][LOG_DEPTH-1:0]             wl_fwd,
  input  logic [N_M-1:0][LOG_DEPTH-1:0][CNT_W-1:0]  wl_sbeats,
  input  logic [N_M-1:0][LOG_DEPTH-1:0]             wl_resp,
  output logic             wl_fwd_we,
  output logic [MI_W-1:0]  wl_fwd_seg,
  output logic [LI_W-1:0]  wl_fwd_idx,
  output logic             wl_inc,
  output logic [MI_W-1:0]  wl_inc_seg,
  output logic [LI_W-1:0]  wl_inc_idx,
  output logic             wl_resp_we,
  output logic [MI_W-1:0]  wl_resp_seg,
  output logic [LI_W-1:0]  wl_resp_idx,
  // TR_log(read), all segments
  input  logic [N_M-1:0][LOG_DEPTH-1:0]             rl_valid,
  input  ax_t  [N_M-1:0][LOG_DEPTH-1:0]             rl_req,
  input  logic [N_M-1:0][LOG_DEPTH-1:0][SI_W-1:0]   rl_slv,
  input  logic [N_M-1:0][LOG_DEPTH-1:0]             rl_fwd,
  input  logic [N_M-1:0][LOG_DEPTH-1:0][CNT_W-1:0]  rl_sbeats,
  output logic             rl_fwd_we,
  output logic [MI_W-1:0]  rl_fwd_seg,
  output logic [LI_W-1:0]  rl_fwd_idx,
  output logic             rl_inc,
  output logic [MI_W-1:0]  rl_inc_seg,
  output logic [LI_W-1:0]  rl_inc_idx,
  // DATA_log(write): read
  input  logic [N_M-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0]             dw_tvalid,
  input  logic [N_M-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0][TAG_W-1:0]  dw_tag,
  // DATA_log(read): write
  output logic             dr_we,
  output logic [MI_W-1:0]  dr_seg,
  output logic [LI_W-1:0]  dr_idx,
  output logic [BI_W-1:0]  dr_beat,
  output logic [TAG_W-1:0] dr_tag,
  output alarm_t alarm
);
  typedef struct packed {
    logic [MI_W-1:0] seg;
    logic [LI_W-1:0] idx;
  } ref_t;

  function automatic logic [MI_W-1:0] mi_of(input logic [XID_W-1:0] id);
    return id[XID_W-1:ID_W];
  endfunction

  // ------------------------------------------------------------------ AW
  logic aw_ok, aw_reg_rdy;
  ref_t aw_ref;
  ref_t wq_head;
  logic wq_empty, wq_full, wq_pop;

  always_comb begin
    aw_ok  = 1'b0;
    aw_ref = '0;
    for (int i = 0; i < N_M; i++)
      for (int e = 0; e < LOG_DEPTH; e++)
        if (mi_of(ic_aw.id) == MI_W'(i) && wl_valid[i][e] && !wl_fwd[i][e] &&
            wl_req[i][e].id[ID_W-1:0] == ic_aw.id[ID_W-1:0] &&
            wl_req[i][e].addr == ic_aw.addr && wl_req[i][e].len == ic_aw.len &&
            wl_slv[i][e] == SI_W'(SJ)) begin
          aw_ok  = 1'b1;
          aw_ref = '{seg: MI_W'(i), idx: LI_W'(e)};
        end
  end

  assign ic_aw_ready = aw_ok ? (aw_reg_rdy && !wq_full) : 1'b1;
  assign wl_fwd_we   = ic_aw_valid && ic_aw_ready && aw_ok;
  assign wl_fwd_seg  = aw_ref.seg;
  assign wl_fwd_idx  = aw_ref.idx;

  tcuc_reg #(.T(ax_t)) u_aw (.clk, .rst_n,
    .in_valid(ic_aw_valid && aw_ok && !wq_full), .in_ready(aw_reg_rdy), .in_data(ic_aw),
    .out_valid(l_aw_valid), .out_ready(l_aw_ready), .out_data(l_aw));

  tcuc_fifo #(.T(ref_t), .DEPTH(LOG_DEPTH)) u_wq (.clk, .rst_n,
    .push(wl_fwd_we), .push_data(aw_ref),
    .pop(wq_pop), .head(wq_head), .empty(wq_empty), .full(wq_full));

  // ------------------------------------------------------------------ W
  logic [CNT_W-1:0] w_beat;
  logic [LEN_W-1:0] w_len;
  logic             w_exp_last, w_tag_ok, w_ok, w_reg_rdy, w_fire;

  always_comb begin
    w_beat   = wl_sbeats[wq_head.seg][wq_head.idx];
    w_len    = wl_req[wq_head.seg][wq_head.idx].len;
    w_exp_last = (w_beat == CNT_W'(w_len));
    w_tag_ok = (w_beat < CNT_W'(MAX_BEATS)) &&
               dw_tvalid[wq_head.seg][wq_head.idx][BI_W'(w_beat)] &&
               (tag_fn(UID_W'(wq_head.seg), w_beat[7:0], ic_w.data) ==
                dw_tag[wq_head.seg][wq_head.idx][BI_W'(w_beat)]);
    w_ok     = !wq_empty && w_tag_ok && (ic_w.last == w_exp_last);
  end

  // with no admitted burst, wait if an AW is on offer, else block the beat
  assign ic_w_ready = wq_empty ? !ic_aw_valid : (w_ok ? w_reg_rdy : 1'b1);
  assign w_fire     = ic_w_valid && ic_w_ready;
  assign wq_pop     = w_fire && !wq_empty && (ic_w.last || w_exp_last);
  assign wl_inc     = w_fire && !wq_empty;
  assign wl_inc_seg = wq_head.seg;
  assign wl_inc_idx = wq_head.idx;

  tcuc_reg #(.T(w_t)) u_w (.clk, .rst_n,
    .in_valid(ic_w_valid && w_ok), .in_ready(w_reg_rdy), .in_data(ic_w),
    .out_valid(l_w_valid), .out_ready(l_w_ready), .out_data(l_w));

  // ------------------------------------------------------------------ B
  logic b_ok, b_reg_rdy;
  ref_t b_ref;

  always_comb begin
    b_ok  = 1'b0;
    b_ref = '0;
    for (int i = 0; i < N_M; i++)
      for (int e = 0; e < LOG_DEPTH; e++)
        if (mi_of(l_b.id) == MI_W'(i) && wl_valid[i][e] && wl_fwd[i][e] && !wl_resp[i][e] &&
            wl_req[i][e].id[ID_W-1:0] == l_b.id[ID_W-1:0] && wl_slv[i][e] == SI_W'(SJ) &&
            wl_sbeats[i][e] == CNT_W'(wl_req[i][e].len) + 1'b1) begin
          b_ok  = 1'b1;
          b_ref = '{seg: MI_W'(i), idx: LI_W'(e)};
        end
  end

  assign l_b_ready   = b_ok ? b_reg_rdy : 1'b1;
  assign wl_resp_we  = l_b_valid && l_b_ready && b_ok;
  assign wl_resp_seg = b_ref.seg;
  assign wl_resp_idx = b_ref.idx;

  tcuc_reg #(.T(b_t)) u_b (.clk, .rst_n,
    .in_valid(l_b_valid && b_ok), .in_ready(b_reg_rdy), .in_data(l_b),
    .out_valid(ic_b_valid), .out_ready(ic_b_ready), .out_data(ic_b));

  // ------------------------------------------------------------------ AR
  logic ar_ok, ar_reg_rdy;
  ref_t ar_ref;

  always_comb begin
    ar_ok  = 1'b0;
    ar_ref = '0;
    for (int i = 0; i < N_M; i++)
      for (int e = 0; e < LOG_DEPTH; e++)
        if (mi_of(ic_ar.id) == MI_W'(i) && rl_valid[i][e] && !rl_fwd[i][e] &&
            rl_req[i][e].id[ID_W-1:0] == ic_ar.id[ID_W-1:0] &&
            rl_req[i][e].addr == ic_ar.addr && rl_req[i][e].len == ic_ar.len &&
            rl_slv[i][e] == SI_W'(SJ)) begin
          ar_ok  = 1'b1;
          ar_ref = '{seg: MI_W'(i), idx: LI_W'(e)};
        end
  end

  assign ic_ar_ready = ar_ok ? ar_reg_rdy : 1'b1;
  assign rl_fwd_we   = ic_ar_valid && ic_ar_ready && ar_ok;
  assign rl_fwd_seg  = ar_ref.seg;
  assign rl_fwd_idx  = ar_ref.idx;

  tcuc_reg #(.T(ax_t)) u_ar (.clk, .rst_n,
    .in_valid(ic_ar_valid && ar_ok), .in_ready(ar_reg_rdy), .in_data(ic_ar),
    .out_valid(l_ar_valid), .out_ready(l_ar_ready), .out_data(l_ar));

  // ------------------------------------------------------------------ R
  logic             r_ok, r_reg_rdy;
  ref_t             r_ref;
  logic [CNT_W-1:0] r_beat;

  always_comb begin
    r_ok   = 1'b0;
    r_ref  = '0;
    r_beat = '0;
    for (int i = 0; i < N_M; i++)
      for (int e = 0; e < LOG_DEPTH; e++)
        if (mi_of(l_r.id) == MI_W'(i) && rl_valid[i][e] && rl_fwd[i][e] &&
            rl_req[i][e].id[ID_W-1:0] == l_r.id[ID_W-1:0] && rl_slv[i][e] == SI_W'(SJ) &&
            rl_sbeats[i][e] <= CNT_W'(rl_req[i][e].len) &&
            l_r.last == (rl_sbeats[i][e] == CNT_W'(rl_req[i][e].len))) begin
          r_ok   = 1'b1;
          r_ref  = '{seg: MI_W'(i), idx: LI_W'(e)};
          r_beat = rl_sbeats[i][e];
        end
  end

  assign l_r_ready  = r_ok ? r_reg_rdy : 1'b1;
  assign rl_inc     = l_r_valid && l_r_ready && r_ok;
  assign rl_inc_seg = r_ref.seg;
  assign rl_inc_idx = r_ref.idx;
  assign dr_we      = rl_inc;
  assign dr_seg     = r_ref.seg;
  assign dr_idx     = r_ref.idx;
  assign dr_beat    = BI_W'(r_beat);
  assign dr_tag     = l_r_tag;

  tcuc_reg #(.T(r_t)) u_r (.clk, .rst_n,
    .in_valid(l_r_valid && r_ok), .in_ready(r_reg_rdy), .in_data(l_r),
    .out_valid(ic_r_valid), .out_ready(ic_r_ready), .out_data(ic_r));

  // ------------------------------------------------------------------ alarms
  always_comb begin
    alarm = '0;
    alarm[ALM_AW_UNEXP] = ic_aw_valid && ic_aw_ready && !aw_ok;
    alarm[ALM_AR_UNEXP] = ic_ar_valid && ic_ar_ready && !ar_ok;
    alarm[ALM_W_UNEXP]  = w_fire && wq_empty;
    alarm[ALM_W_TAG]    = w_fire && !wq_empty && !w_ok;
    alarm[ALM_B_UNEXP]  = l_b_valid && l_b_ready && !b_ok;
    alarm[ALM_R_UNEXP]  = l_r_valid && l_r_ready && !r_ok;
  end
endmodule
