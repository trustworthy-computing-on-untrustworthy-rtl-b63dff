// slave_wrapper: W(S_j), the guard placed between a slave IP and its port on
// the interconnect wrapper. Its data tag generation unit tags every read data
// beat leaving the slave with this wrapper's UID (S_UID_BASE + SJ), adding one
// cycle on R. AW, W, AR and B pass straight through. Only read data is tagged
// here, as in the scheme; the UID numbering is this design's choice.
module slave_wrapper
  import tcuc_pkg::*;
#(
  parameter int unsigned SJ = 0
) (
  input  logic clk,
  input  logic rst_n,
  // towards the interconnect wrapper unit U(S_j)
  input  logic i_aw_valid, output logic i_aw_ready, input  ax_t i_aw,
  input  logic i_w_valid,  output logic i_w_ready,  input  w_t  i_w,
  output logic i_b_valid,  input  logic i_b_ready,  output b_t  i_b,
  input  logic i_ar_valid, output logic i_ar_ready, input  ax_t i_ar,
  output logic i_r_valid,  input  logic i_r_ready,  output r_t  i_r,
  output logic [TAG_W-1:0] i_r_tag,
  // slave IP side
  output logic s_aw_valid, input  logic s_aw_ready, output ax_t s_aw,
  output logic s_w_valid,  input  logic s_w_ready,  output w_t  s_w,
  input  logic s_b_valid,  output logic s_b_ready,  input  b_t  s_b,
  output logic s_ar_valid, input  logic s_ar_ready, output ax_t s_ar,
  input  logic s_r_valid,  output logic s_r_ready,  input  r_t  s_r
);
  localparam logic [UID_W-1:0] UID = UID_W'(S_UID_BASE + SJ);

  assign s_aw_valid = i_aw_valid;
  assign i_aw_ready = s_aw_ready;
  assign s_aw       = i_aw;
  assign s_w_valid  = i_w_valid;
  assign i_w_ready  = s_w_ready;
  assign s_w        = i_w;
  assign s_ar_valid = i_ar_valid;
  assign i_ar_ready = s_ar_ready;
  assign s_ar       = i_ar;
  assign i_b_valid  = s_b_valid;
  assign s_b_ready  = i_b_ready;
  assign i_b        = s_b;

  tag_gen #(.T(r_t), .UID(UID)) u_tag (.clk, .rst_n,
    .in_valid(s_r_valid), .in_ready(s_r_ready),
    .in_pay(s_r), .in_data(s_r.data), .in_last(s_r.last),
    .out_valid(i_r_valid), .out_ready(i_r_ready), .out_pay(i_r), .out_tag(i_r_tag));
endmodule
