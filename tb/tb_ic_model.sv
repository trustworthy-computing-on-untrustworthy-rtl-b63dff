// tb_ic_model: behavioural model of an untrusted AXI crossbar (N_M masters,
// N_S slaves) for testbenches. Behavioural only, not part of the design.
// It serves one write and one read transaction at a time: it takes a request
// from the lowest-numbered requesting master, routes it by address
// (slave = addr >> SLV_SHIFT) with the master index prefixed to the ID, passes
// the data beats, and returns the response with the prefix stripped.
// Read requests are queued, up to 8 deep.
// `trojan` selects one misbehaviour, applied while `trojan` is non-zero:
//   1 divert writes to the wrong slave      2 modify write data (bit 0 of beat 0)
//   3 modify read data                      4 forge an AW on slave port 0
//   5 forge an AR on slave port 0           6 flood slave port 0 with a W beat
//   7 send an R beat to master 0 unasked    8 divert read data to the other master
//   9 modify the write address              10 replay (shadow) the last write beat to slave 1
//  11 send a B to master 0 unasked
module tb_ic_model
  import tcuc_pkg::*;
#(
  parameter int unsigned N_M       = 2,
  parameter int unsigned N_S       = 2,
  parameter int unsigned SLV_SHIFT = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  int   trojan,
  input  logic [N_M-1:0] m_aw_valid, output logic [N_M-1:0] m_aw_ready, input  ax_t [N_M-1:0] m_aw,
  input  logic [N_M-1:0] m_w_valid,  output logic [N_M-1:0] m_w_ready,  input  w_t  [N_M-1:0] m_w,
  output logic [N_M-1:0] m_b_valid,  input  logic [N_M-1:0] m_b_ready,  output b_t  [N_M-1:0] m_b,
  input  logic [N_M-1:0] m_ar_valid, output logic [N_M-1:0] m_ar_ready, input  ax_t [N_M-1:0] m_ar,
  output logic [N_M-1:0] m_r_valid,  input  logic [N_M-1:0] m_r_ready,  output r_t  [N_M-1:0] m_r,
  output logic [N_S-1:0] s_aw_valid, input  logic [N_S-1:0] s_aw_ready, output ax_t [N_S-1:0] s_aw,
  output logic [N_S-1:0] s_w_valid,  input  logic [N_S-1:0] s_w_ready,  output w_t  [N_S-1:0] s_w,
  input  logic [N_S-1:0] s_b_valid,  output logic [N_S-1:0] s_b_ready,  input  b_t  [N_S-1:0] s_b,
  output logic [N_S-1:0] s_ar_valid, input  logic [N_S-1:0] s_ar_ready, output ax_t [N_S-1:0] s_ar,
  input  logic [N_S-1:0] s_r_valid,  output logic [N_S-1:0] s_r_ready,  input  r_t  [N_S-1:0] s_r
);
  typedef enum logic [1:0] {IDLE, ADDR, DATA, RESP} st_e;

  // ------------------------------------------------------------ write path
  st_e wst;
  int  wm, ws;
  ax_t wreq;
  logic wfirst;
  logic inj_b_done, inj_aw_done, inj_w_done, inj_r_done, inj_ar_done, shadow_done;
  w_t   last_w;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wst <= IDLE; wm <= 0; ws <= 0; wreq <= '0; wfirst <= 1'b1;
      inj_aw_done <= 1'b0; inj_w_done <= 1'b0; shadow_done <= 1'b0; last_w <= '0; inj_b_done <= 1'b0;
    end else begin
      case (wst)
        IDLE: begin
          for (int i = N_M - 1; i >= 0; i--)
            if (m_aw_valid[i]) begin
              wm   <= i;
              wreq <= m_aw[i];
              wst  <= ADDR;
            end
        end
        ADDR: if (s_aw_valid[ws] && s_aw_ready[ws]) begin wst <= DATA; wfirst <= 1'b1; end
        DATA: if (m_w_valid[wm] && m_w_ready[wm]) begin
                wfirst <= 1'b0;
                last_w <= m_w[wm];
                if (m_w[wm].last) wst <= RESP;
              end
        RESP: if (m_b_valid[wm] && m_b_ready[wm]) wst <= IDLE;
      endcase
      if (wst == IDLE) begin
        for (int i = N_M - 1; i >= 0; i--)
          if (m_aw_valid[i]) ws <= int'(m_aw[i].addr >> SLV_SHIFT) % N_S;
      end
      if (trojan == 4 && s_aw_valid[0] && s_aw_ready[0] && wst != ADDR) inj_aw_done <= 1'b1;
      if (trojan == 6 && s_w_valid[0] && s_w_ready[0] && wst != DATA) inj_w_done <= 1'b1;
      if (trojan == 10 && s_w_valid[1] && s_w_ready[1] && wst == IDLE) shadow_done <= 1'b1;
      if (trojan == 11 && m_b_valid[0] && m_b_ready[0] && wst != RESP) inj_b_done <= 1'b1;
      if (trojan == 0) begin inj_aw_done <= 1'b0; inj_w_done <= 1'b0; shadow_done <= 1'b0; inj_b_done <= 1'b0; end
    end
  end

  int ws_eff;
  assign ws_eff = (trojan == 1) ? (ws + 1) % N_S : ws;

  always_comb begin
    m_aw_ready = '0; s_aw_valid = '0; s_aw = '0;
    m_w_ready  = '0; s_w_valid  = '0; s_w  = '0;
    m_b_valid  = '0; m_b = '0; s_b_ready = '0;
    if (wst == IDLE) begin
      for (int i = N_M - 1; i >= 0; i--)
        if (m_aw_valid[i]) begin m_aw_ready = '0; m_aw_ready[i] = 1'b1; end
    end
    if (wst == ADDR) begin
      s_aw_valid[ws_eff] = 1'b1;
      s_aw[ws_eff]       = wreq;
      s_aw[ws_eff].id    = {MI_W'(wm), wreq.id[ID_W-1:0]};
      if (trojan == 9) s_aw[ws_eff].addr = wreq.addr ^ 32'h40;
    end
    if (wst == DATA) begin
      s_w_valid[ws_eff] = m_w_valid[wm];
      s_w[ws_eff]       = m_w[wm];
      if (trojan == 2 && wfirst) s_w[ws_eff].data = m_w[wm].data ^ 32'h1;
      m_w_ready[wm]     = s_w_ready[ws_eff];
    end
    if (trojan == 11 && !inj_b_done && wst != RESP) begin
      m_b_valid[0] = 1'b1;
      m_b[0] = '{id: XID_W'(2), resp: 2'b00};
    end
    if (wst == RESP) begin
      m_b_valid[wm]  = s_b_valid[ws_eff];
      m_b[wm]        = s_b[ws_eff];
      m_b[wm].id     = {{MI_W{1'b0}}, s_b[ws_eff].id[ID_W-1:0]};
      s_b_ready[ws_eff] = m_b_ready[wm];
    end
    // injected traffic
    if (trojan == 4 && !inj_aw_done && wst != ADDR) begin
      s_aw_valid[0] = 1'b1;
      s_aw[0] = '{id: XID_W'(3), addr: 32'h0000_0100, len: 8'd0};
    end
    if (trojan == 6 && !inj_w_done && wst != DATA) begin
      s_w_valid[0] = 1'b1;
      s_w[0] = '{data: 32'hBAD0_F00D, last: 1'b1};
    end
    if (trojan == 10 && !shadow_done && wst == IDLE) begin
      s_w_valid[1] = 1'b1;
      s_w[1] = last_w;
    end
  end

  // ------------------------------------------------------------ read path
  // Read requests are queued (up to 8) as a pipelined crossbar would, then
  // served one at a time.
  st_e rst_q;
  int  rm, rs;
  ax_t rreq;
  logic rfirst;
  typedef struct packed { logic [MI_W-1:0] mi; ax_t req; } arq_t;
  arq_t arq [8];
  logic [2:0] arq_wp, arq_rp;
  logic [3:0] arq_n;
  logic arq_push, arq_pop;
  int   arq_src;

  always_comb begin
    arq_src = -1;
    for (int i = N_M - 1; i >= 0; i--)
      if (m_ar_valid[i]) arq_src = i;
  end
  assign arq_push = (arq_src >= 0) && (arq_n < 4'd8);
  assign arq_pop  = (rst_q == IDLE) && (arq_n != 0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rst_q <= IDLE; rm <= 0; rs <= 0; rreq <= '0; rfirst <= 1'b1;
      inj_r_done <= 1'b0; inj_ar_done <= 1'b0;
      arq_wp <= '0; arq_rp <= '0; arq_n <= '0;
    end else begin
      if (arq_push) begin
        arq[arq_wp] <= '{mi: MI_W'(arq_src), req: m_ar[arq_src]};
        arq_wp <= arq_wp + 1'b1;
      end
      if (arq_pop) arq_rp <= arq_rp + 1'b1;
      arq_n <= arq_n + 4'(arq_push) - 4'(arq_pop);
      case (rst_q)
        IDLE: if (arq_pop) begin
                rm    <= int'(arq[arq_rp].mi);
                rreq  <= arq[arq_rp].req;
                rs    <= int'(arq[arq_rp].req.addr >> SLV_SHIFT) % N_S;
                rst_q <= ADDR;
              end
        ADDR: if (s_ar_valid[rs] && s_ar_ready[rs]) begin rst_q <= DATA; rfirst <= 1'b1; end
        DATA: if (s_r_valid[rs] && s_r_ready[rs]) begin
                rfirst <= 1'b0;
                if (s_r[rs].last) rst_q <= IDLE;
              end
        default: rst_q <= IDLE;
      endcase
      if (trojan == 5 && s_ar_valid[0] && s_ar_ready[0] && rst_q != ADDR) inj_ar_done <= 1'b1;
      if (trojan == 7 && m_r_valid[0] && m_r_ready[0] && rst_q != DATA) inj_r_done <= 1'b1;
      if (trojan == 0) begin inj_r_done <= 1'b0; inj_ar_done <= 1'b0; end
    end
  end

  int rm_eff;
  assign rm_eff = (trojan == 8) ? (rm + 1) % N_M : rm;

  always_comb begin
    m_ar_ready = '0; s_ar_valid = '0; s_ar = '0;
    m_r_valid  = '0; m_r = '0; s_r_ready = '0;
    if (arq_push) m_ar_ready[arq_src] = 1'b1;
    if (rst_q == ADDR) begin
      s_ar_valid[rs] = 1'b1;
      s_ar[rs]       = rreq;
      s_ar[rs].id    = {MI_W'(rm), rreq.id[ID_W-1:0]};
    end
    if (rst_q == DATA) begin
      m_r_valid[rm_eff] = s_r_valid[rs];
      m_r[rm_eff]       = s_r[rs];
      m_r[rm_eff].id    = {{MI_W{1'b0}}, s_r[rs].id[ID_W-1:0]};
      if (trojan == 3 && rfirst) m_r[rm_eff].data = s_r[rs].data ^ 32'h8000_0000;
      s_r_ready[rs]     = m_r_ready[rm_eff];
    end
    if (trojan == 5 && !inj_ar_done && rst_q != ADDR) begin
      s_ar_valid[0] = 1'b1;
      s_ar[0] = '{id: XID_W'(2), addr: 32'h0000_0200, len: 8'd3};
    end
    if (trojan == 7 && !inj_r_done && rst_q != DATA) begin
      m_r_valid[0] = 1'b1;
      m_r[0] = '{id: XID_W'(1), data: 32'h5EC2_E7ED, resp: 2'b00, last: 1'b1};
    end
  end
endmodule
