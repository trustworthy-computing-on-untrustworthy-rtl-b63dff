// master_if_unit: U(M_i), the master interface unit of the interconnect wrapper,
// sitting between master wrapper W(M_i) and master port i of the untrusted
// interconnect. It guards all five AXI channels of that port:
//  AW/AR  log the request in TR_log (segment i, wired by the parent) and forward it. A request to
//         an unmapped address or longer than MAX_BEATS is blocked (ALM_DECODE).
//         A request waits while the log is full or an entry with the same ID is
//         still open, so at most one transaction per ID and direction is open.
//  W      the beat's tag from W(M_i) is stored in DATA_log(write) under the
//         burst's entry and beat number, then the beat is forwarded. WLAST must
//         agree with the logged length (ALM_W_LAST).
//  B      admitted only if the matching write entry is complete on both sides
//         and the slave side saw the response; the entry is then freed
//         (otherwise ALM_B_UNEXP).
//  R      admitted only for an open read entry whose tag for this beat, written
//         by the slave interface unit, equals the tag recomputed here from the
//         received data, the beat number and the expected slave's UID
//         (ALM_R_TAG), with RLAST where the length says (ALM_R_UNEXP).
// A blocked transfer is accepted and discarded and its alarm bit pulses.
// Every forwarded channel passes one register stage (1 cycle). The checks are
// this design's reading of "monitor and verify the signals for the five AXI
// channels"; the log organisation is this design's choice.
module master_if_unit
  import tcuc_pkg::*;
#(
  parameter int unsigned N_S       = 2,
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned MAX_BEATS = 16,
  parameter int unsigned SLV_SHIFT = 16,
  localparam int unsigned LI_W = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  localparam int unsigned BI_W = (MAX_BEATS > 1) ? $clog2(MAX_BEATS) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // wrapper side (W(M_i))
  input  logic l_aw_valid, output logic l_aw_ready, input  ax_t l_aw,
  input  logic l_w_valid,  output logic l_w_ready,  input  w_t  l_w,
  input  logic [TAG_W-1:0] l_w_tag,
  output logic l_b_valid,  input  logic l_b_ready,  output b_t  l_b,
  input  logic l_ar_valid, output logic l_ar_ready, input  ax_t l_ar,
  output logic l_r_valid,  input  logic l_r_ready,  output r_t  l_r,
  // interconnect side
  output logic ic_aw_valid, input  logic ic_aw_ready, output ax_t ic_aw,
  output logic ic_w_valid,  input  logic ic_w_ready,  output w_t  ic_w,
  input  logic ic_b_valid,  output logic ic_b_ready,  input  b_t  ic_b,
  output logic ic_ar_valid, input  logic ic_ar_ready, output ax_t ic_ar,
  input  logic ic_r_valid,  output logic ic_r_ready,  input  r_t  ic_r,
  // TR_log(write), own segment
  input  logic [LOG_DEPTH-1:0]             wl_valid,
  input  ax_t  [LOG_DEPTH-1:0]             wl_req,
  input  logic [LOG_DEPTH-1:0][CNT_W-1:0]  wl_mbeats,
  input  logic [LOG_DEPTH-1:0]             wl_resp,
  output logic             wl_alloc,
  output logic [LI_W-1:0]  wl_alloc_idx,
  output ax_t              wl_alloc_req,
  output logic [SI_W-1:0]  wl_alloc_slv,
  output logic             wl_inc,
  output logic [LI_W-1:0]  wl_inc_idx,
  output logic             wl_free,
  output logic [LI_W-1:0]  wl_free_idx,
  // TR_log(read), own segment
  input  logic [LOG_DEPTH-1:0]             rl_valid,
  input  ax_t  [LOG_DEPTH-1:0]             rl_req,
  input  logic [LOG_DEPTH-1:0][SI_W-1:0]   rl_slv,
  input  logic [LOG_DEPTH-1:0][CNT_W-1:0]  rl_mbeats,
  output logic             rl_alloc,
  output logic [LI_W-1:0]  rl_alloc_idx,
  output ax_t              rl_alloc_req,
  output logic [SI_W-1:0]  rl_alloc_slv,
  output logic             rl_inc,
  output logic [LI_W-1:0]  rl_inc_idx,
  output logic             rl_free,
  output logic [LI_W-1:0]  rl_free_idx,
  // DATA_log(write): this unit writes its own segment
  output logic             dw_clr,
  output logic [LI_W-1:0]  dw_clr_idx,
  output logic             dw_we,
  output logic [LI_W-1:0]  dw_idx,
  output logic [BI_W-1:0]  dw_beat,
  output logic [TAG_W-1:0] dw_tag,
  // DATA_log(read): this unit reads its own segment
  output logic             dr_clr,
  output logic [LI_W-1:0]  dr_clr_idx,
  input  logic [LOG_DEPTH-1:0][MAX_BEATS-1:0]             dr_tvalid,
  input  logic [LOG_DEPTH-1:0][MAX_BEATS-1:0][TAG_W-1:0]  dr_tag,
  output alarm_t alarm
);
  typedef struct packed {
    logic            drop;
    logic [LI_W-1:0] idx;
  } wq_t;

  // ------------------------------------------------------------------ helpers
  function automatic logic [SI_W-1:0] slv_of(input logic [ADDR_W-1:0] a);
    return SI_W'(a >> SLV_SHIFT);
  endfunction
  function automatic logic mapped(input logic [ADDR_W-1:0] a);
    return (a >> SLV_SHIFT) < ADDR_W'(N_S);
  endfunction

  // ------------------------------------------------------------------ AW
  logic            aw_legal, aw_free_ok, aw_busy, aw_reg_rdy, aw_fire;
  logic [LI_W-1:0] aw_free_idx;
  ax_t             aw_fwd;
  wq_t             wq_head;
  logic            wq_empty, wq_full, wq_pop;

  always_comb begin
    aw_free_ok  = 1'b0;
    aw_free_idx = '0;
    aw_busy     = 1'b0;
    for (int e = LOG_DEPTH - 1; e >= 0; e--) begin
      if (!wl_valid[e]) begin
        aw_free_ok  = 1'b1;
        aw_free_idx = LI_W'(e);
      end
      if (wl_valid[e] && wl_req[e].id[ID_W-1:0] == l_aw.id[ID_W-1:0]) aw_busy = 1'b1;
    end
    aw_legal = mapped(l_aw.addr) && (int'(l_aw.len) < MAX_BEATS);
    aw_fwd   = l_aw;
    aw_fwd.id[XID_W-1:ID_W] = '0;
  end

  assign l_aw_ready = !wq_full && (aw_legal ? (aw_free_ok && !aw_busy && aw_reg_rdy) : 1'b1);
  assign aw_fire    = l_aw_valid && l_aw_ready;
  assign wl_alloc     = aw_fire && aw_legal;
  assign wl_alloc_idx = aw_free_idx;
  assign wl_alloc_req = aw_fwd;
  assign wl_alloc_slv = slv_of(l_aw.addr);
  assign dw_clr       = wl_alloc;
  assign dw_clr_idx   = aw_free_idx;

  tcuc_reg #(.T(ax_t)) u_aw (.clk, .rst_n,
    .in_valid(l_aw_valid && aw_legal && aw_free_ok && !aw_busy && !wq_full), .in_ready(aw_reg_rdy),
    .in_data(aw_fwd), .out_valid(ic_aw_valid), .out_ready(ic_aw_ready), .out_data(ic_aw));

  tcuc_fifo #(.T(wq_t), .DEPTH(LOG_DEPTH)) u_wq (.clk, .rst_n,
    .push(aw_fire), .push_data('{drop: !aw_legal, idx: aw_free_idx}),
    .pop(wq_pop), .head(wq_head), .empty(wq_empty), .full(wq_full));

  // ------------------------------------------------------------------ W
  logic [CNT_W-1:0] w_beat;
  logic             w_exp_last, w_ok, w_reg_rdy, w_fire;

  always_comb begin
    w_beat     = wl_mbeats[wq_head.idx];
    w_exp_last = (w_beat == CNT_W'(wl_req[wq_head.idx].len));
    w_ok       = !wq_head.drop && (l_w.last == w_exp_last);
  end

  assign l_w_ready = !wq_empty && (w_ok ? w_reg_rdy : 1'b1);
  assign w_fire    = l_w_valid && l_w_ready;
  assign wq_pop    = w_fire && (l_w.last || (!wq_head.drop && w_exp_last));
  assign wl_inc     = w_fire && !wq_head.drop;
  assign wl_inc_idx = wq_head.idx;
  assign dw_we      = w_fire && w_ok;
  assign dw_idx     = wq_head.idx;
  assign dw_beat    = BI_W'(w_beat);
  assign dw_tag     = l_w_tag;

  tcuc_reg #(.T(w_t)) u_w (.clk, .rst_n,
    .in_valid(l_w_valid && !wq_empty && w_ok), .in_ready(w_reg_rdy), .in_data(l_w),
    .out_valid(ic_w_valid), .out_ready(ic_w_ready), .out_data(ic_w));

  // ------------------------------------------------------------------ B
  logic            b_ok, b_reg_rdy;
  logic [LI_W-1:0] b_idx;
  b_t              b_fwd;

  always_comb begin
    b_ok  = 1'b0;
    b_idx = '0;
    for (int e = LOG_DEPTH - 1; e >= 0; e--)
      if (wl_valid[e] && wl_req[e].id[ID_W-1:0] == ic_b.id[ID_W-1:0] && wl_resp[e] &&
          wl_mbeats[e] == CNT_W'(wl_req[e].len) + 1'b1) begin
        b_ok  = 1'b1;
        b_idx = LI_W'(e);
      end
    b_fwd = ic_b;
    b_fwd.id[XID_W-1:ID_W] = '0;
  end

  assign ic_b_ready  = b_ok ? b_reg_rdy : 1'b1;
  assign wl_free     = ic_b_valid && ic_b_ready && b_ok;
  assign wl_free_idx = b_idx;

  tcuc_reg #(.T(b_t)) u_b (.clk, .rst_n,
    .in_valid(ic_b_valid && b_ok), .in_ready(b_reg_rdy), .in_data(b_fwd),
    .out_valid(l_b_valid), .out_ready(l_b_ready), .out_data(l_b));

  // ------------------------------------------------------------------ AR
  logic            ar_legal, ar_free_ok, ar_busy, ar_reg_rdy;
  logic [LI_W-1:0] ar_free_idx;
  ax_t             ar_fwd;

  always_comb begin
    ar_free_ok  = 1'b0;
    ar_free_idx = '0;
    ar_busy     = 1'b0;
    for (int e = LOG_DEPTH - 1; e >= 0; e--) begin
      if (!rl_valid[e]) begin
        ar_free_ok  = 1'b1;
        ar_free_idx = LI_W'(e);
      end
      if (rl_valid[e] && rl_req[e].id[ID_W-1:0] == l_ar.id[ID_W-1:0]) ar_busy = 1'b1;
    end
    ar_legal = mapped(l_ar.addr) && (int'(l_ar.len) < MAX_BEATS);
    ar_fwd   = l_ar;
    ar_fwd.id[XID_W-1:ID_W] = '0;
  end

  assign l_ar_ready   = ar_legal ? (ar_free_ok && !ar_busy && ar_reg_rdy) : 1'b1;
  assign rl_alloc     = l_ar_valid && l_ar_ready && ar_legal;
  assign rl_alloc_idx = ar_free_idx;
  assign rl_alloc_req = ar_fwd;
  assign rl_alloc_slv = slv_of(l_ar.addr);
  assign dr_clr       = rl_alloc;
  assign dr_clr_idx   = ar_free_idx;

  tcuc_reg #(.T(ax_t)) u_ar (.clk, .rst_n,
    .in_valid(l_ar_valid && ar_legal && ar_free_ok && !ar_busy), .in_ready(ar_reg_rdy),
    .in_data(ar_fwd), .out_valid(ic_ar_valid), .out_ready(ic_ar_ready), .out_data(ic_ar));

  // ------------------------------------------------------------------ R
  logic             r_found, r_tag_ok, r_last_ok, r_ok, r_reg_rdy, r_fire;
  logic [LI_W-1:0]  r_idx;
  logic [CNT_W-1:0] r_beat;
  logic [UID_W-1:0] r_uid;
  r_t               r_fwd;

  always_comb begin
    r_found = 1'b0;
    r_idx   = '0;
    for (int e = LOG_DEPTH - 1; e >= 0; e--)
      if (rl_valid[e] && rl_req[e].id[ID_W-1:0] == ic_r.id[ID_W-1:0]) begin
        r_found = 1'b1;
        r_idx   = LI_W'(e);
      end
    r_beat    = rl_mbeats[r_idx];
    r_uid     = UID_W'(S_UID_BASE) + UID_W'(rl_slv[r_idx]);
    r_tag_ok  = (r_beat < CNT_W'(MAX_BEATS)) && dr_tvalid[r_idx][BI_W'(r_beat)] &&
                (tag_fn(r_uid, r_beat[7:0], ic_r.data) == dr_tag[r_idx][BI_W'(r_beat)]);
    r_last_ok = (ic_r.last == (r_beat == CNT_W'(rl_req[r_idx].len)));
    r_ok      = r_found && r_tag_ok && r_last_ok;
    r_fwd     = ic_r;
    r_fwd.id[XID_W-1:ID_W] = '0;
  end

  assign ic_r_ready = r_ok ? r_reg_rdy : 1'b1;
  assign r_fire     = ic_r_valid && ic_r_ready;
  // a beat of an open transaction is counted even when blocked, so that later
  // beats keep their numbering
  assign rl_inc      = r_fire && r_found;
  assign rl_inc_idx  = r_idx;
  assign rl_free     = r_fire && r_found && (r_beat == CNT_W'(rl_req[r_idx].len));
  assign rl_free_idx = r_idx;

  tcuc_reg #(.T(r_t)) u_r (.clk, .rst_n,
    .in_valid(ic_r_valid && r_ok), .in_ready(r_reg_rdy), .in_data(r_fwd),
    .out_valid(l_r_valid), .out_ready(l_r_ready), .out_data(l_r));

  // ------------------------------------------------------------------ alarms
  always_comb begin
    alarm = '0;
    alarm[ALM_DECODE]  = (aw_fire && !aw_legal) || (l_ar_valid && l_ar_ready && !ar_legal);
    alarm[ALM_W_LAST]  = w_fire && !wq_head.drop && !w_ok;
    alarm[ALM_B_UNEXP] = ic_b_valid && ic_b_ready && !b_ok;
    alarm[ALM_R_UNEXP] = r_fire && (!r_found || (r_tag_ok && !r_last_ok));
    alarm[ALM_R_TAG]   = r_fire && r_found && !r_tag_ok;
  end
endmodule
