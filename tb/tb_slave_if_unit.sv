// tb_slave_if_unit: one slave interface unit (slave 1 of 2, two masters, 4-entry
// logs) wired to its transaction and data logs. The testbench plays the master
// interface units (it allocates log entries and stores write tags with the
// master's UID), the interconnect and the slave wrapper (it tags read beats
// with slave UID 9). Directed cases: an admitted write burst with response, a
// modified write beat, forged / misrouted / altered requests, flooding W,
// unsolicited B, an admitted read burst whose tags land in the read data log,
// read beats beyond the burst or without a request, and requests whose
// address, length or master prefix was altered, or that are replayed.
module tb_slave_if_unit;
  import tcuc_pkg::*;
  localparam int D = 4, MB = 16, NM = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic ic_aw_valid, ic_aw_ready, ic_w_valid, ic_w_ready, ic_b_valid, ic_b_ready, ic_ar_valid, ic_ar_ready;
  logic ic_r_valid, ic_r_ready;
  ax_t ic_aw, ic_ar; w_t ic_w; b_t ic_b; r_t ic_r;
  logic l_aw_valid, l_aw_ready, l_w_valid, l_w_ready, l_b_valid, l_b_ready, l_ar_valid, l_ar_ready;
  logic l_r_valid, l_r_ready;
  ax_t l_aw, l_ar; w_t l_w; b_t l_b; r_t l_r; logic [15:0] l_r_tag;
  alarm_t alarm;

  logic [NM-1:0][D-1:0] wq_valid, wq_fwd, wq_resp, rq_valid, rq_fwd, rq_resp;
  ax_t  [NM-1:0][D-1:0] wq_req, rq_req;
  logic [NM-1:0][D-1:0][SI_W-1:0] wq_slv, rq_slv;
  logic [NM-1:0][D-1:0][CNT_W-1:0] wq_mb, wq_sb, rq_mb, rq_sb;
  logic wf, wi, wr, rf, ri, dr_we;
  logic [MI_W-1:0] wf_s, wi_s, wr_s, rf_s, ri_s, dr_seg;
  logic [1:0] wf_i, wi_i, wr_i, rf_i, ri_i, dr_idx;
  logic [3:0] dr_beat;
  logic [15:0] dr_tag;
  logic [NM-1:0][D-1:0][MB-1:0] dw_tv, dr_tv;
  logic [NM-1:0][D-1:0][MB-1:0][15:0] dw_tq, dr_tq;
  // testbench as master units
  logic [1:0][NM-1:0] m_alloc;
  logic [1:0][NM-1:0][1:0] m_idx;
  ax_t  [1:0][NM-1:0] m_req;
  logic [1:0][NM-1:0][SI_W-1:0] m_slv;
  logic tw_we;
  logic [0:0] tw_seg;
  logic [1:0] tw_idx;
  logic [3:0] tw_beat;
  logic [15:0] tw_tag;

  slave_if_unit #(.N_M(NM), .LOG_DEPTH(D), .MAX_BEATS(MB), .SJ(1)) dut (.clk, .rst_n,
    .ic_aw_valid, .ic_aw_ready, .ic_aw, .ic_w_valid, .ic_w_ready, .ic_w, .ic_b_valid, .ic_b_ready, .ic_b,
    .ic_ar_valid, .ic_ar_ready, .ic_ar, .ic_r_valid, .ic_r_ready, .ic_r,
    .l_aw_valid, .l_aw_ready, .l_aw, .l_w_valid, .l_w_ready, .l_w, .l_b_valid, .l_b_ready, .l_b,
    .l_ar_valid, .l_ar_ready, .l_ar, .l_r_valid, .l_r_ready, .l_r, .l_r_tag,
    .wl_valid(wq_valid), .wl_req(wq_req), .wl_slv(wq_slv), .wl_fwd(wq_fwd), .wl_sbeats(wq_sb), .wl_resp(wq_resp),
    .wl_fwd_we(wf), .wl_fwd_seg(wf_s), .wl_fwd_idx(wf_i), .wl_inc(wi), .wl_inc_seg(wi_s), .wl_inc_idx(wi_i),
    .wl_resp_we(wr), .wl_resp_seg(wr_s), .wl_resp_idx(wr_i),
    .rl_valid(rq_valid), .rl_req(rq_req), .rl_slv(rq_slv), .rl_fwd(rq_fwd), .rl_sbeats(rq_sb),
    .rl_fwd_we(rf), .rl_fwd_seg(rf_s), .rl_fwd_idx(rf_i), .rl_inc(ri), .rl_inc_seg(ri_s), .rl_inc_idx(ri_i),
    .dw_tvalid(dw_tv), .dw_tag(dw_tq), .dr_we, .dr_seg, .dr_idx, .dr_beat, .dr_tag, .alarm);

  tr_log #(.N_M(NM), .N_S(1), .LOG_DEPTH(D)) u_wlog (.clk, .rst_n,
    .m_alloc(m_alloc[0]), .m_alloc_idx(m_idx[0]), .m_alloc_req(m_req[0]), .m_alloc_slv(m_slv[0]),
    .m_inc('0), .m_inc_idx('0), .m_free('0), .m_free_idx('0),
    .s_fwd(wf), .s_fwd_seg(wf_s), .s_fwd_idx(wf_i), .s_inc(wi), .s_inc_seg(wi_s), .s_inc_idx(wi_i),
    .s_resp(wr), .s_resp_seg(wr_s), .s_resp_idx(wr_i),
    .q_valid(wq_valid), .q_req(wq_req), .q_slv(wq_slv), .q_mbeats(wq_mb), .q_fwd(wq_fwd), .q_sbeats(wq_sb),
    .q_resp(wq_resp));
  tr_log #(.N_M(NM), .N_S(1), .LOG_DEPTH(D)) u_rlog (.clk, .rst_n,
    .m_alloc(m_alloc[1]), .m_alloc_idx(m_idx[1]), .m_alloc_req(m_req[1]), .m_alloc_slv(m_slv[1]),
    .m_inc('0), .m_inc_idx('0), .m_free('0), .m_free_idx('0),
    .s_fwd(rf), .s_fwd_seg(rf_s), .s_fwd_idx(rf_i), .s_inc(ri), .s_inc_seg(ri_s), .s_inc_idx(ri_i),
    .s_resp(1'b0), .s_resp_seg('0), .s_resp_idx('0),
    .q_valid(rq_valid), .q_req(rq_req), .q_slv(rq_slv), .q_mbeats(rq_mb), .q_fwd(rq_fwd), .q_sbeats(rq_sb),
    .q_resp(rq_resp));
  data_log #(.N_SEG(NM), .LOG_DEPTH(D), .MAX_BEATS(MB), .N_WP(1)) u_dw (.clk, .rst_n,
    .clr('0), .clr_idx('0), .we(tw_we), .w_seg(tw_seg), .w_idx(tw_idx), .w_beat(tw_beat), .w_tag(tw_tag),
    .tvalid(dw_tv), .tag(dw_tq));
  data_log #(.N_SEG(NM), .LOG_DEPTH(D), .MAX_BEATS(MB), .N_WP(1)) u_dr (.clk, .rst_n,
    .clr('0), .clr_idx('0), .we(dr_we), .w_seg(dr_seg[0]), .w_idx(dr_idx), .w_beat(dr_beat), .w_tag(dr_tag),
    .tvalid(dr_tv), .tag(dr_tq));

  function automatic logic [15:0] crc_ref(input logic [7:0] uid, input logic [7:0] beat, input logic [31:0] d);
    logic [7:0] m [6];
    logic [15:0] c = 16'hFFFF;
    m = '{uid, beat, d[31:24], d[23:16], d[15:8], d[7:0]};
    for (int i = 0; i < 6; i++) begin
      c ^= {m[i], 8'h00};
      for (int b = 0; b < 8; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  alarm_t seen;
  ax_t got_aw[$], got_ar[$]; w_t got_w[$]; b_t got_b[$]; r_t got_r[$];
  always @(posedge clk) if (rst_n) begin
    seen |= alarm;
    if (l_aw_valid && l_aw_ready) got_aw.push_back(l_aw);
    if (l_ar_valid && l_ar_ready) got_ar.push_back(l_ar);
    if (l_w_valid && l_w_ready) got_w.push_back(l_w);
    if (ic_b_valid && ic_b_ready) got_b.push_back(ic_b);
    if (ic_r_valid && ic_r_ready) got_r.push_back(ic_r);
  end
  assign l_aw_ready = 1'b1; assign l_w_ready = 1'b1; assign l_ar_ready = 1'b1;
  assign ic_b_ready = 1'b1; assign ic_r_ready = 1'b1;

  task automatic put_aw(input ax_t a);
    ic_aw = a; ic_aw_valid = 1; #1; while (!ic_aw_ready) @(negedge clk); @(posedge clk); @(negedge clk); ic_aw_valid = 0;
  endtask
  task automatic put_ar(input ax_t a);
    ic_ar = a; ic_ar_valid = 1; #1; while (!ic_ar_ready) @(negedge clk); @(posedge clk); @(negedge clk); ic_ar_valid = 0;
  endtask
  task automatic put_w(input logic [31:0] d, input bit last);
    ic_w = '{data: d, last: last};
    ic_w_valid = 1; #1; while (!ic_w_ready) @(negedge clk); @(posedge clk); @(negedge clk); ic_w_valid = 0;
  endtask
  task automatic put_b(input b_t b);
    l_b = b; l_b_valid = 1; #1; while (!l_b_ready) @(negedge clk); @(posedge clk); @(negedge clk); l_b_valid = 0;
  endtask
  task automatic put_r(input r_t r, input int beat);
    l_r = r; l_r_tag = crc_ref(8'd9, 8'(beat), r.data);
    l_r_valid = 1; #1; while (!l_r_ready) @(negedge clk); @(posedge clk); @(negedge clk); l_r_valid = 0;
  endtask
  // master unit actions
  task automatic alloc(input int dir, input int seg, input int idx, input ax_t req, input int slv);
    m_alloc[dir][seg] = 1; m_idx[dir][seg] = 2'(idx); m_req[dir][seg] = req; m_slv[dir][seg] = SI_W'(slv);
    @(negedge clk);
    m_alloc = '0;
  endtask
  task automatic wtag(input int seg, input int idx, input int beat, input logic [31:0] d);
    tw_we = 1; tw_seg = 1'(seg); tw_idx = 2'(idx); tw_beat = 4'(beat); tw_tag = crc_ref(8'(seg), 8'(beat), d);
    @(negedge clk);
    tw_we = 0;
  endtask

  initial begin
    ic_aw_valid = 0; ic_w_valid = 0; ic_ar_valid = 0; l_b_valid = 0; l_r_valid = 0;
    ic_aw = '0; ic_w = '0; ic_ar = '0; l_b = '0; l_r = '0; l_r_tag = '0;
    m_alloc = '0; m_idx = '0; m_req = '0; m_slv = '0; tw_we = 0; tw_seg = '0; tw_idx = '0; tw_beat = '0; tw_tag = '0;
    seen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- admitted write burst from master 1 (entry 2)
    alloc(0, 1, 2, '{id: 6'd5, addr: 32'h0001_0100, len: 8'd1}, 1);
    wtag(1, 2, 0, 32'hAAAA_0000);
    wtag(1, 2, 1, 32'hAAAA_0001);
    put_aw('{id: {2'b01, 4'd5}, addr: 32'h0001_0100, len: 8'd1});
    @(negedge clk);
    chk(got_aw.size() == 1 && got_aw[0].id == {2'b01, 4'd5} && wq_fwd[1][2], "logged write admitted");
    put_w(32'hAAAA_0000, 0);
    put_w(32'hAAAA_0001, 1);
    @(negedge clk);
    chk(got_w.size() == 2 && got_w[1].last && wq_sb[1][2] == 2, "write beats delivered and counted");
    put_b('{id: {2'b01, 4'd5}, resp: 2'b00});
    @(negedge clk);
    chk(got_b.size() == 1 && wq_resp[1][2], "response forwarded and noted");
    chk(seen == '0, "no alarm on legal write");

    // ---- modified write beat (master 0, entry 0)
    alloc(0, 0, 0, '{id: 6'd6, addr: 32'h0001_0000, len: 8'd0}, 1);
    wtag(0, 0, 0, 32'h1111_2222);
    put_aw('{id: {2'b00, 4'd6}, addr: 32'h0001_0000, len: 8'd0});
    put_w(32'h1111_2223, 1);
    @(negedge clk);
    chk(seen[ALM_W_TAG] && got_w.size() == 2, "modified write beat blocked");
    seen = '0;
    // tag of master 1 presented for master 0's burst (masquerade)
    alloc(0, 0, 1, '{id: 6'd7, addr: 32'h0001_0010, len: 8'd0}, 1);
    wtag(1, 1, 0, 32'h3333_0000);        // tag made under master 1's UID ...
    tw_we = 1; tw_seg = 1'b0; tw_idx = 2'd1; tw_beat = 4'd0; tw_tag = crc_ref(8'd1, 8'd0, 32'h3333_0000);
    @(negedge clk); tw_we = 0;           // ... stored under master 0's entry
    put_aw('{id: {2'b00, 4'd7}, addr: 32'h0001_0010, len: 8'd0});
    put_w(32'h3333_0000, 1);
    @(negedge clk);
    chk(seen[ALM_W_TAG] && got_w.size() == 2, "beat tagged under another master's UID blocked");
    seen = '0;

    // ---- request attacks
    put_aw('{id: {2'b00, 4'd9}, addr: 32'h0001_0000, len: 8'd0});
    @(negedge clk);
    chk(seen[ALM_AW_UNEXP] && got_aw.size() == 3, "forged AW blocked");
    seen = '0;
    alloc(0, 0, 2, '{id: 6'd8, addr: 32'h0000_0200, len: 8'd0}, 0);
    put_aw('{id: {2'b00, 4'd8}, addr: 32'h0000_0200, len: 8'd0});
    @(negedge clk);
    chk(seen[ALM_AW_UNEXP] && got_aw.size() == 3, "AW meant for slave 0 blocked");
    seen = '0;
    alloc(0, 0, 3, '{id: 6'd10, addr: 32'h0001_0300, len: 8'd0}, 1);
    put_aw('{id: {2'b00, 4'd10}, addr: 32'h0001_0304, len: 8'd0});
    @(negedge clk);
    chk(seen[ALM_AW_UNEXP] && got_aw.size() == 3, "altered AW address blocked");
    seen = '0;
    put_aw('{id: {2'b00, 4'd10}, addr: 32'h0001_0300, len: 8'd0});
    put_ar('{id: {2'b01, 4'd3}, addr: 32'h0001_0000, len: 8'd0});
    @(negedge clk);
    chk(seen[ALM_AR_UNEXP] && got_aw.size() == 4 && got_ar.size() == 0, "forged AR blocked, true AW admitted");
    seen = '0;
    // flush the admitted burst, then flood W
    wtag(0, 3, 0, 32'h4444_0000);
    put_w(32'h4444_0000, 1);
    put_w(32'hDEAD_BEEF, 1);
    @(negedge clk);
    chk(seen[ALM_W_UNEXP] && got_w.size() == 3, "W beat without a burst blocked");
    seen = '0;
    put_b('{id: {2'b00, 4'd15}, resp: 2'b00});
    @(negedge clk);
    chk(seen[ALM_B_UNEXP] && got_b.size() == 1, "unsolicited B blocked");
    seen = '0;
    put_b('{id: {2'b01, 4'd5}, resp: 2'b00});
    @(negedge clk);
    chk(seen[ALM_B_UNEXP] && got_b.size() == 1, "second B for a finished write blocked");
    seen = '0;

    // ---- admitted read burst (master 0, entry 0, 3 beats)
    alloc(1, 0, 0, '{id: 6'd3, addr: 32'h0001_0000, len: 8'd2}, 1);
    put_ar('{id: {2'b00, 4'd3}, addr: 32'h0001_0000, len: 8'd2});
    @(negedge clk);
    chk(got_ar.size() == 1 && rq_fwd[0][0], "logged read admitted");
    for (int k = 0; k < 3; k++) put_r('{id: {2'b00, 4'd3}, data: 32'h7700_0000 + k, resp: 2'b00, last: k == 2}, k);
    @(negedge clk);
    chk(got_r.size() == 3 && got_r[2].last && rq_sb[0][0] == 3, "read beats delivered and counted");
    for (int k = 0; k < 3; k++)
      chk(dr_tv[0][0][k] && dr_tq[0][0][k] == crc_ref(8'd9, 8'(k), 32'h7700_0000 + k), "read tag logged");
    chk(seen == '0, "no alarm on legal read");
    put_r('{id: {2'b00, 4'd3}, data: 32'h0, resp: 2'b00, last: 1'b1}, 3);
    @(negedge clk);
    chk(seen[ALM_R_UNEXP] && got_r.size() == 3, "read beat beyond the burst blocked");
    seen = '0;
    put_r('{id: {2'b01, 4'd12}, data: 32'h0, resp: 2'b00, last: 1'b1}, 0);
    @(negedge clk);
    chk(seen[ALM_R_UNEXP] && got_r.size() == 3, "read beat without a request blocked");
    seen = '0;

    // ---- altered requests against fresh entries of master 1
    alloc(1, 1, 1, '{id: 6'd2, addr: 32'h0001_0800, len: 8'd3}, 1);
    put_ar('{id: {2'b01, 4'd2}, addr: 32'h0001_0840, len: 8'd3});
    @(negedge clk);
    chk(seen[ALM_AR_UNEXP] && got_ar.size() == 1, "AR with altered address blocked");
    seen = '0;
    put_ar('{id: {2'b01, 4'd2}, addr: 32'h0001_0800, len: 8'd7});
    @(negedge clk);
    chk(seen[ALM_AR_UNEXP] && got_ar.size() == 1, "AR with altered length blocked");
    seen = '0;
    put_ar('{id: {2'b00, 4'd2}, addr: 32'h0001_0800, len: 8'd3});
    @(negedge clk);
    chk(seen[ALM_AR_UNEXP] && got_ar.size() == 1, "AR claiming the wrong master blocked");
    seen = '0;
    alloc(0, 1, 3, '{id: 6'd4, addr: 32'h0001_0A00, len: 8'd0}, 1);
    put_aw('{id: {2'b01, 4'd4}, addr: 32'h0001_0A40, len: 8'd0});
    @(negedge clk);
    chk(seen[ALM_AW_UNEXP] && got_aw.size() == 4, "AW with altered address blocked");
    seen = '0;
    put_aw('{id: {2'b01, 4'd4}, addr: 32'h0001_0A00, len: 8'd2});
    @(negedge clk);
    chk(seen[ALM_AW_UNEXP] && got_aw.size() == 4, "AW with altered length blocked");
    seen = '0;
    put_ar('{id: {2'b01, 4'd2}, addr: 32'h0001_0800, len: 8'd3});
    put_aw('{id: {2'b01, 4'd4}, addr: 32'h0001_0A00, len: 8'd0});
    @(negedge clk);
    chk(seen == '0 && got_ar.size() == 2 && got_aw.size() == 5, "unaltered requests still admitted");
    put_ar('{id: {2'b01, 4'd2}, addr: 32'h0001_0800, len: 8'd3});
    @(negedge clk);
    chk(seen[ALM_AR_UNEXP] && got_ar.size() == 2, "replayed AR blocked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
