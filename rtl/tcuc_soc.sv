// tcuc_soc: the guarded SoC fabric. It places a master wrapper W(M_i) in front
// of every master IP, a slave wrapper W(S_j) in front of every slave IP and the
// interconnect wrapper W(AXI) around the ports of the untrusted AXI
// interconnect, which is outside this module: its master-side ports are
// ic_m_* and its slave-side ports ic_s_*. Traffic path:
//   master IP -> W(M_i) -> U(M_i) -> interconnect -> U(S_j) -> W(S_j) -> slave IP
// Added latency: 3 cycles on AW, W, AR and R (one register in each of three
// guards), 2 cycles on B (W(M_i) and W(S_j) pass B through), as the scheme
// reports. The interconnect must route by address (slave j owns
// [j<<SLV_SHIFT, (j+1)<<SLV_SHIFT)) and prefix the master index to IDs on its
// slave side. ACC_LO[i]/ACC_HI[i] give master i's allowed address window.
// alarm_wm/alarm_um/alarm_us pulse, per guard, one bit per detected event kind
// (tcuc_pkg::alarm_e); the matching transfer is discarded.
module tcuc_soc
  import tcuc_pkg::*;
#(
  parameter int unsigned N_M       = 2,
  parameter int unsigned N_S       = 2,
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned MAX_BEATS = 16,
  parameter int unsigned SLV_SHIFT = 16,
  parameter logic [N_M-1:0][ADDR_W-1:0] ACC_LO = '0,
  parameter logic [N_M-1:0][ADDR_W-1:0] ACC_HI = {N_M{32'h0001_FFFF}}
) (
  input  logic clk,
  input  logic rst_n,
  // master IPs
  input  logic [N_M-1:0] m_aw_valid, output logic [N_M-1:0] m_aw_ready, input  ax_t [N_M-1:0] m_aw,
  input  logic [N_M-1:0] m_w_valid,  output logic [N_M-1:0] m_w_ready,  input  w_t  [N_M-1:0] m_w,
  output logic [N_M-1:0] m_b_valid,  input  logic [N_M-1:0] m_b_ready,  output b_t  [N_M-1:0] m_b,
  input  logic [N_M-1:0] m_ar_valid, output logic [N_M-1:0] m_ar_ready, input  ax_t [N_M-1:0] m_ar,
  output logic [N_M-1:0] m_r_valid,  input  logic [N_M-1:0] m_r_ready,  output r_t  [N_M-1:0] m_r,
  // untrusted interconnect, master-side ports
  output logic [N_M-1:0] ic_m_aw_valid, input  logic [N_M-1:0] ic_m_aw_ready, output ax_t [N_M-1:0] ic_m_aw,
  output logic [N_M-1:0] ic_m_w_valid,  input  logic [N_M-1:0] ic_m_w_ready,  output w_t  [N_M-1:0] ic_m_w,
  input  logic [N_M-1:0] ic_m_b_valid,  output logic [N_M-1:0] ic_m_b_ready,  input  b_t  [N_M-1:0] ic_m_b,
  output logic [N_M-1:0] ic_m_ar_valid, input  logic [N_M-1:0] ic_m_ar_ready, output ax_t [N_M-1:0] ic_m_ar,
  input  logic [N_M-1:0] ic_m_r_valid,  output logic [N_M-1:0] ic_m_r_ready,  input  r_t  [N_M-1:0] ic_m_r,
  // untrusted interconnect, slave-side ports
  input  logic [N_S-1:0] ic_s_aw_valid, output logic [N_S-1:0] ic_s_aw_ready, input  ax_t [N_S-1:0] ic_s_aw,
  input  logic [N_S-1:0] ic_s_w_valid,  output logic [N_S-1:0] ic_s_w_ready,  input  w_t  [N_S-1:0] ic_s_w,
  output logic [N_S-1:0] ic_s_b_valid,  input  logic [N_S-1:0] ic_s_b_ready,  output b_t  [N_S-1:0] ic_s_b,
  input  logic [N_S-1:0] ic_s_ar_valid, output logic [N_S-1:0] ic_s_ar_ready, input  ax_t [N_S-1:0] ic_s_ar,
  output logic [N_S-1:0] ic_s_r_valid,  input  logic [N_S-1:0] ic_s_r_ready,  output r_t  [N_S-1:0] ic_s_r,
  // slave IPs
  output logic [N_S-1:0] s_aw_valid, input  logic [N_S-1:0] s_aw_ready, output ax_t [N_S-1:0] s_aw,
  output logic [N_S-1:0] s_w_valid,  input  logic [N_S-1:0] s_w_ready,  output w_t  [N_S-1:0] s_w,
  input  logic [N_S-1:0] s_b_valid,  output logic [N_S-1:0] s_b_ready,  input  b_t  [N_S-1:0] s_b,
  output logic [N_S-1:0] s_ar_valid, input  logic [N_S-1:0] s_ar_ready, output ax_t [N_S-1:0] s_ar,
  input  logic [N_S-1:0] s_r_valid,  output logic [N_S-1:0] s_r_ready,  input  r_t  [N_S-1:0] s_r,
  // alarms
  output alarm_t [N_M-1:0] alarm_wm,
  output alarm_t [N_M-1:0] alarm_um,
  output alarm_t [N_S-1:0] alarm_us
);
  // links W(M_i) <-> U(M_i)
  logic [N_M-1:0] lm_aw_valid, lm_aw_ready, lm_w_valid, lm_w_ready, lm_b_valid, lm_b_ready;
  logic [N_M-1:0] lm_ar_valid, lm_ar_ready, lm_r_valid, lm_r_ready;
  ax_t  [N_M-1:0] lm_aw, lm_ar;
  w_t   [N_M-1:0] lm_w;
  logic [N_M-1:0][TAG_W-1:0] lm_w_tag;
  b_t   [N_M-1:0] lm_b;
  r_t   [N_M-1:0] lm_r;
  // links U(S_j) <-> W(S_j)
  logic [N_S-1:0] ls_aw_valid, ls_aw_ready, ls_w_valid, ls_w_ready, ls_b_valid, ls_b_ready;
  logic [N_S-1:0] ls_ar_valid, ls_ar_ready, ls_r_valid, ls_r_ready;
  ax_t  [N_S-1:0] ls_aw, ls_ar;
  w_t   [N_S-1:0] ls_w;
  b_t   [N_S-1:0] ls_b;
  r_t   [N_S-1:0] ls_r;
  logic [N_S-1:0][TAG_W-1:0] ls_r_tag;

  for (genvar i = 0; i < N_M; i++) begin : g_wm
    master_wrapper #(.UID(UID_W'(i)), .ACC_LO(ACC_LO[i]), .ACC_HI(ACC_HI[i])) u_wm (
      .clk, .rst_n,
      .m_aw_valid(m_aw_valid[i]), .m_aw_ready(m_aw_ready[i]), .m_aw(m_aw[i]),
      .m_w_valid(m_w_valid[i]),   .m_w_ready(m_w_ready[i]),   .m_w(m_w[i]),
      .m_b_valid(m_b_valid[i]),   .m_b_ready(m_b_ready[i]),   .m_b(m_b[i]),
      .m_ar_valid(m_ar_valid[i]), .m_ar_ready(m_ar_ready[i]), .m_ar(m_ar[i]),
      .m_r_valid(m_r_valid[i]),   .m_r_ready(m_r_ready[i]),   .m_r(m_r[i]),
      .o_aw_valid(lm_aw_valid[i]), .o_aw_ready(lm_aw_ready[i]), .o_aw(lm_aw[i]),
      .o_w_valid(lm_w_valid[i]),   .o_w_ready(lm_w_ready[i]),   .o_w(lm_w[i]), .o_w_tag(lm_w_tag[i]),
      .o_b_valid(lm_b_valid[i]),   .o_b_ready(lm_b_ready[i]),   .o_b(lm_b[i]),
      .o_ar_valid(lm_ar_valid[i]), .o_ar_ready(lm_ar_ready[i]), .o_ar(lm_ar[i]),
      .o_r_valid(lm_r_valid[i]),   .o_r_ready(lm_r_ready[i]),   .o_r(lm_r[i]),
      .alarm(alarm_wm[i]));
  end

  axi_wrapper #(.N_M(N_M), .N_S(N_S), .LOG_DEPTH(LOG_DEPTH), .MAX_BEATS(MAX_BEATS),
                .SLV_SHIFT(SLV_SHIFT)) u_waxi (
    .clk, .rst_n,
    .l_m_aw_valid(lm_aw_valid), .l_m_aw_ready(lm_aw_ready), .l_m_aw(lm_aw),
    .l_m_w_valid(lm_w_valid),   .l_m_w_ready(lm_w_ready),   .l_m_w(lm_w), .l_m_w_tag(lm_w_tag),
    .l_m_b_valid(lm_b_valid),   .l_m_b_ready(lm_b_ready),   .l_m_b(lm_b),
    .l_m_ar_valid(lm_ar_valid), .l_m_ar_ready(lm_ar_ready), .l_m_ar(lm_ar),
    .l_m_r_valid(lm_r_valid),   .l_m_r_ready(lm_r_ready),   .l_m_r(lm_r),
    .ic_m_aw_valid, .ic_m_aw_ready, .ic_m_aw, .ic_m_w_valid, .ic_m_w_ready, .ic_m_w,
    .ic_m_b_valid, .ic_m_b_ready, .ic_m_b, .ic_m_ar_valid, .ic_m_ar_ready, .ic_m_ar,
    .ic_m_r_valid, .ic_m_r_ready, .ic_m_r,
    .ic_s_aw_valid, .ic_s_aw_ready, .ic_s_aw, .ic_s_w_valid, .ic_s_w_ready, .ic_s_w,
    .ic_s_b_valid, .ic_s_b_ready, .ic_s_b, .ic_s_ar_valid, .ic_s_ar_ready, .ic_s_ar,
    .ic_s_r_valid, .ic_s_r_ready, .ic_s_r,
    .l_s_aw_valid(ls_aw_valid), .l_s_aw_ready(ls_aw_ready), .l_s_aw(ls_aw),
    .l_s_w_valid(ls_w_valid),   .l_s_w_ready(ls_w_ready),   .l_s_w(ls_w),
    .l_s_b_valid(ls_b_valid),   .l_s_b_ready(ls_b_ready),   .l_s_b(ls_b),
    .l_s_ar_valid(ls_ar_valid), .l_s_ar_ready(ls_ar_ready), .l_s_ar(ls_ar),
    .l_s_r_valid(ls_r_valid),   .l_s_r_ready(ls_r_ready),   .l_s_r(ls_r), .l_s_r_tag(ls_r_tag),
    .alarm_um, .alarm_us);

  for (genvar j = 0; j < N_S; j++) begin : g_ws
    slave_wrapper #(.SJ(j)) u_ws (
      .clk, .rst_n,
      .i_aw_valid(ls_aw_valid[j]), .i_aw_ready(ls_aw_ready[j]), .i_aw(ls_aw[j]),
      .i_w_valid(ls_w_valid[j]),   .i_w_ready(ls_w_ready[j]),   .i_w(ls_w[j]),
      .i_b_valid(ls_b_valid[j]),   .i_b_ready(ls_b_ready[j]),   .i_b(ls_b[j]),
      .i_ar_valid(ls_ar_valid[j]), .i_ar_ready(ls_ar_ready[j]), .i_ar(ls_ar[j]),
      .i_r_valid(ls_r_valid[j]),   .i_r_ready(ls_r_ready[j]),   .i_r(ls_r[j]), .i_r_tag(ls_r_tag[j]),
      .s_aw_valid(s_aw_valid[j]), .s_aw_ready(s_aw_ready[j]), .s_aw(s_aw[j]),
      .s_w_valid(s_w_valid[j]),   .s_w_ready(s_w_ready[j]),   .s_w(s_w[j]),
      .s_b_valid(s_b_valid[j]),   .s_b_ready(s_b_ready[j]),   .s_b(s_b[j]),
      .s_ar_valid(s_ar_valid[j]), .s_ar_ready(s_ar_ready[j]), .s_ar(s_ar[j]),
      .s_r_valid(s_r_valid[j]),   .s_r_ready(s_r_ready[j]),   .s_r(s_r[j]));
  end
endmodule
