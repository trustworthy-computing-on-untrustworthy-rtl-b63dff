// master_wrapper: W(M_i), the guard placed between a master IP and its port on
// the interconnect wrapper.
//  - AW/AR: the access control unit checks the burst against the master's
//    allowed window. Allowed requests go through a one-cycle register; denied
//    ones are accepted, discarded and reported on alarm[ALM_ACCESS].
//  - W: every beat of an allowed burst goes through the data tag generation
//    unit (one cycle) and leaves with a tag bound to this wrapper's UID; beats
//    of a denied burst are discarded. A FIFO of AW decisions tells the W path
//    which is which, so W beats wait until their AW has been decided.
//  - B/R: pass straight through (no added latency).
// The structure (access control unit plus tag generation unit) follows the
// scheme; discarding instead of answering with an error is this design's choice.
module master_wrapper
  import tcuc_pkg::*;
#(
  parameter logic [UID_W-1:0]  UID    = '0,
  parameter logic [ADDR_W-1:0] ACC_LO = '0,
  parameter logic [ADDR_W-1:0] ACC_HI = '1
) (
  input  logic clk,
  input  logic rst_n,
  // master IP side
  input  logic m_aw_valid, output logic m_aw_ready, input  ax_t m_aw,
  input  logic m_w_valid,  output logic m_w_ready,  input  w_t  m_w,
  output logic m_b_valid,  input  logic m_b_ready,  output b_t  m_b,
  input  logic m_ar_valid, output logic m_ar_ready, input  ax_t m_ar,
  output logic m_r_valid,  input  logic m_r_ready,  output r_t  m_r,
  // towards the interconnect wrapper unit U(M_i)
  output logic o_aw_valid, input  logic o_aw_ready, output ax_t o_aw,
  output logic o_w_valid,  input  logic o_w_ready,  output w_t  o_w,
  output logic [TAG_W-1:0] o_w_tag,
  input  logic o_b_valid,  output logic o_b_ready,  input  b_t  o_b,
  output logic o_ar_valid, input  logic o_ar_ready, output ax_t o_ar,
  input  logic o_r_valid,  output logic o_r_ready,  input  r_t  o_r,
  output alarm_t alarm
);
  logic aw_ok, ar_ok;
  logic aw_reg_rdy, ar_reg_rdy, tg_rdy;
  logic wq_head, wq_empty, wq_full, wq_pop;

  access_ctrl #(.ACC_LO(ACC_LO), .ACC_HI(ACC_HI)) u_acc_aw (.addr(m_aw.addr), .len(m_aw.len), .allowed(aw_ok));
  access_ctrl #(.ACC_LO(ACC_LO), .ACC_HI(ACC_HI)) u_acc_ar (.addr(m_ar.addr), .len(m_ar.len), .allowed(ar_ok));

  // AW: both outcomes need room in the decision FIFO
  assign m_aw_ready = !wq_full && (aw_ok ? aw_reg_rdy : 1'b1);
  tcuc_reg #(.T(ax_t)) u_aw (.clk, .rst_n,
    .in_valid(m_aw_valid && aw_ok && !wq_full), .in_ready(aw_reg_rdy), .in_data(m_aw),
    .out_valid(o_aw_valid), .out_ready(o_aw_ready), .out_data(o_aw));

  tcuc_fifo #(.T(logic), .DEPTH(4)) u_wq (.clk, .rst_n,
    .push(m_aw_valid && m_aw_ready), .push_data(aw_ok),
    .pop(wq_pop), .head(wq_head), .empty(wq_empty), .full(wq_full));

  // W: tag allowed beats, drop beats of denied bursts
  assign m_w_ready = !wq_empty && (wq_head ? tg_rdy : 1'b1);
  assign wq_pop    = m_w_valid && m_w_ready && m_w.last;
  tag_gen #(.T(w_t), .UID(UID)) u_tag (.clk, .rst_n,
    .in_valid(m_w_valid && !wq_empty && wq_head), .in_ready(tg_rdy),
    .in_pay(m_w), .in_data(m_w.data), .in_last(m_w.last),
    .out_valid(o_w_valid), .out_ready(o_w_ready), .out_pay(o_w), .out_tag(o_w_tag));

  // AR
  assign m_ar_ready = ar_ok ? ar_reg_rdy : 1'b1;
  tcuc_reg #(.T(ax_t)) u_ar (.clk, .rst_n,
    .in_valid(m_ar_valid && ar_ok), .in_ready(ar_reg_rdy), .in_data(m_ar),
    .out_valid(o_ar_valid), .out_ready(o_ar_ready), .out_data(o_ar));

  // responses pass through
  assign m_b_valid = o_b_valid;
  assign o_b_ready = m_b_ready;
  assign m_b       = o_b;
  assign m_r_valid = o_r_valid;
  assign o_r_ready = m_r_ready;
  assign m_r       = o_r;

  always_comb begin
    alarm = '0;
    alarm[ALM_ACCESS] = (m_aw_valid && m_aw_ready && !aw_ok) ||
                        (m_ar_valid && m_ar_ready && !ar_ok);
  end
endmodule
