// tb_master_if_unit: one master interface unit (master 0, 2 slaves, 4-entry
// logs) wired to its transaction and data logs. The testbench plays the master
// wrapper, the interconnect and the slave side (it updates the slave-side log
// fields and read-data tags the way a slave interface unit would). Directed
// cases: write and read bursts with one-cycle forwarding, tags logged, B held
// back until the slave side saw it, read tags verified (modified beat blocked),
// unknown read IDs, unmapped and over-long requests, busy-ID and log-full
// back-pressure.
module tb_master_if_unit;
  import tcuc_pkg::*;
  localparam int D = 4, MB = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic l_aw_valid, l_aw_ready, l_w_valid, l_w_ready, l_b_valid, l_b_ready, l_ar_valid, l_ar_ready;
  logic l_r_valid, l_r_ready;
  ax_t l_aw, l_ar; w_t l_w; b_t l_b; r_t l_r; logic [15:0] l_w_tag;
  logic ic_aw_valid, ic_aw_ready, ic_w_valid, ic_w_ready, ic_b_valid, ic_b_ready, ic_ar_valid, ic_ar_ready;
  logic ic_r_valid, ic_r_ready;
  ax_t ic_aw, ic_ar; w_t ic_w; b_t ic_b; r_t ic_r;
  alarm_t alarm;

  // logs (one master segment, two slave ports of which the testbench uses port 0)
  logic [0:0][D-1:0] wq_valid, wq_fwd, wq_resp, rq_valid, rq_fwd, rq_resp;
  ax_t  [0:0][D-1:0] wq_req, rq_req;
  logic [0:0][D-1:0][SI_W-1:0] wq_slv, rq_slv;
  logic [0:0][D-1:0][CNT_W-1:0] wq_mb, wq_sb, rq_mb, rq_sb;
  logic wl_alloc, wl_inc, wl_free, rl_alloc, rl_inc, rl_free;
  logic [1:0] wl_alloc_idx, wl_inc_idx, wl_free_idx, rl_alloc_idx, rl_inc_idx, rl_free_idx;
  ax_t wl_alloc_req, rl_alloc_req;
  logic [SI_W-1:0] wl_alloc_slv, rl_alloc_slv;
  logic [1:0] ts_fwd, ts_inc, ts_resp;          // testbench as slave unit
  logic [1:0][MI_W-1:0] ts_seg;
  logic [1:0][1:0] ts_idx;
  logic dw_clr, dw_we, dr_clr;
  logic [1:0] dw_clr_idx, dw_idx, dr_clr_idx;
  logic [3:0] dw_beat;
  logic [15:0] dw_tag;
  logic [0:0][D-1:0][MB-1:0] dw_tv, dr_tv;
  logic [0:0][D-1:0][MB-1:0][15:0] dw_tq, dr_tq;
  logic [0:0] dr_we;
  logic [0:0][1:0] dr_idx;
  logic [0:0][3:0] dr_beat;
  logic [0:0][15:0] dr_tag;

  master_if_unit dut (.clk, .rst_n,                    // default size: 2 slaves, 4-entry logs
    .l_aw_valid, .l_aw_ready, .l_aw, .l_w_valid, .l_w_ready, .l_w, .l_w_tag, .l_b_valid, .l_b_ready, .l_b,
    .l_ar_valid, .l_ar_ready, .l_ar, .l_r_valid, .l_r_ready, .l_r,
    .ic_aw_valid, .ic_aw_ready, .ic_aw, .ic_w_valid, .ic_w_ready, .ic_w, .ic_b_valid, .ic_b_ready, .ic_b,
    .ic_ar_valid, .ic_ar_ready, .ic_ar, .ic_r_valid, .ic_r_ready, .ic_r,
    .wl_valid(wq_valid[0]), .wl_req(wq_req[0]), .wl_mbeats(wq_mb[0]), .wl_resp(wq_resp[0]),
    .wl_alloc, .wl_alloc_idx, .wl_alloc_req, .wl_alloc_slv, .wl_inc, .wl_inc_idx, .wl_free, .wl_free_idx,
    .rl_valid(rq_valid[0]), .rl_req(rq_req[0]), .rl_slv(rq_slv[0]), .rl_mbeats(rq_mb[0]),
    .rl_alloc, .rl_alloc_idx, .rl_alloc_req, .rl_alloc_slv, .rl_inc, .rl_inc_idx, .rl_free, .rl_free_idx,
    .dw_clr, .dw_clr_idx, .dw_we, .dw_idx, .dw_beat, .dw_tag,
    .dr_clr, .dr_clr_idx, .dr_tvalid(dr_tv[0]), .dr_tag(dr_tq[0]), .alarm);

  tr_log #(.N_M(1), .N_S(1), .LOG_DEPTH(D)) u_wlog (.clk, .rst_n,
    .m_alloc(wl_alloc), .m_alloc_idx(wl_alloc_idx), .m_alloc_req(wl_alloc_req), .m_alloc_slv(wl_alloc_slv),
    .m_inc(wl_inc), .m_inc_idx(wl_inc_idx), .m_free(wl_free), .m_free_idx(wl_free_idx),
    .s_fwd(ts_fwd[0]), .s_fwd_seg(ts_seg[0]), .s_fwd_idx(ts_idx[0]), .s_inc(ts_inc[0]), .s_inc_seg(ts_seg[0]),
    .s_inc_idx(ts_idx[0]), .s_resp(ts_resp[0]), .s_resp_seg(ts_seg[0]), .s_resp_idx(ts_idx[0]),
    .q_valid(wq_valid), .q_req(wq_req), .q_slv(wq_slv), .q_mbeats(wq_mb), .q_fwd(wq_fwd), .q_sbeats(wq_sb),
    .q_resp(wq_resp));
  tr_log #(.N_M(1), .N_S(1), .LOG_DEPTH(D)) u_rlog (.clk, .rst_n,
    .m_alloc(rl_alloc), .m_alloc_idx(rl_alloc_idx), .m_alloc_req(rl_alloc_req), .m_alloc_slv(rl_alloc_slv),
    .m_inc(rl_inc), .m_inc_idx(rl_inc_idx), .m_free(rl_free), .m_free_idx(rl_free_idx),
    .s_fwd(ts_fwd[1]), .s_fwd_seg(ts_seg[1]), .s_fwd_idx(ts_idx[1]), .s_inc(ts_inc[1]), .s_inc_seg(ts_seg[1]),
    .s_inc_idx(ts_idx[1]), .s_resp(1'b0), .s_resp_seg('0), .s_resp_idx('0),
    .q_valid(rq_valid), .q_req(rq_req), .q_slv(rq_slv), .q_mbeats(rq_mb), .q_fwd(rq_fwd), .q_sbeats(rq_sb),
    .q_resp(rq_resp));
  data_log #(.N_SEG(1), .LOG_DEPTH(D), .MAX_BEATS(MB), .N_WP(1)) u_dw (.clk, .rst_n,
    .clr(dw_clr), .clr_idx(dw_clr_idx), .we(dw_we), .w_seg(1'b0), .w_idx(dw_idx), .w_beat(dw_beat),
    .w_tag(dw_tag), .tvalid(dw_tv), .tag(dw_tq));
  data_log #(.N_SEG(1), .LOG_DEPTH(D), .MAX_BEATS(MB), .N_WP(1)) u_dr (.clk, .rst_n,
    .clr(dr_clr), .clr_idx(dr_clr_idx), .we(dr_we), .w_seg(1'b0), .w_idx(dr_idx), .w_beat(dr_beat),
    .w_tag(dr_tag), .tvalid(dr_tv), .tag(dr_tq));

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

  // sticky observations
  alarm_t seen;
  ax_t got_aw[$], got_ar[$]; w_t got_w[$]; b_t got_b[$]; r_t got_r[$];
  always @(posedge clk) if (rst_n) begin
    seen |= alarm;
    if (ic_aw_valid && ic_aw_ready) begin got_aw.push_back(ic_aw); end
    if (ic_ar_valid && ic_ar_ready) got_ar.push_back(ic_ar);
    if (ic_w_valid && ic_w_ready) got_w.push_back(ic_w);
    if (l_b_valid && l_b_ready) got_b.push_back(l_b);
    if (l_r_valid && l_r_ready) got_r.push_back(l_r);
  end
  assign ic_aw_ready = 1'b1;
  assign ic_w_ready = 1'b1; assign ic_ar_ready = 1'b1; assign l_b_ready = 1'b1; assign l_r_ready = 1'b1;

  // drivers: signals change at the falling edge
  int wbeat = 0;
  task automatic put_aw(input ax_t a);
    l_aw = a; l_aw_valid = 1; #1; while (!l_aw_ready) @(negedge clk); @(posedge clk); @(negedge clk); l_aw_valid = 0;
  endtask
  task automatic put_ar(input ax_t a);
    l_ar = a; l_ar_valid = 1; #1; while (!l_ar_ready) @(negedge clk); @(posedge clk); @(negedge clk); l_ar_valid = 0;
  endtask
  task automatic put_w(input logic [31:0] d, input bit last);
    l_w = '{data: d, last: last}; l_w_tag = crc_ref(8'd0, 8'(wbeat), d);
    wbeat = last ? 0 : wbeat + 1;
    l_w_valid = 1; #1; while (!l_w_ready) @(negedge clk); @(posedge clk); @(negedge clk); l_w_valid = 0;
  endtask
  task automatic put_b(input b_t b);
    ic_b = b; ic_b_valid = 1; #1; while (!ic_b_ready) @(negedge clk); @(posedge clk); @(negedge clk); ic_b_valid = 0;
  endtask
  task automatic put_r(input r_t r);
    ic_r = r; ic_r_valid = 1; #1; while (!ic_r_ready) @(negedge clk); @(posedge clk); @(negedge clk); ic_r_valid = 0;
  endtask
  task automatic slave_op(input int dir, input int op, input int idx);   // op 0 fwd, 1 inc, 2 resp
    ts_seg[dir] = '0; ts_idx[dir] = 2'(idx);
    if (op == 0) ts_fwd[dir] = 1; else if (op == 1) ts_inc[dir] = 1; else ts_resp[dir] = 1;
    @(negedge clk);
    ts_fwd[dir] = 0; ts_inc[dir] = 0; ts_resp[dir] = 0;
  endtask
  task automatic log_rtag(input int idx, input int beat, input logic [7:0] uid, input logic [31:0] d);
    dr_we = 1; dr_idx = 2'(idx); dr_beat = 4'(beat); dr_tag = crc_ref(uid, 8'(beat), d);
    @(negedge clk);
    dr_we = 0;
  endtask

  initial begin
    int e;
    l_aw_valid = 0; l_w_valid = 0; l_ar_valid = 0; ic_b_valid = 0; ic_r_valid = 0;
    l_aw = '0; l_w = '0; l_ar = '0; ic_b = '0; ic_r = '0; l_w_tag = '0;
    ts_fwd = 0; ts_inc = 0; ts_resp = 0; ts_seg = '0; ts_idx = '0; dr_we = 0; dr_idx = '0; dr_beat = '0; dr_tag = '0;
    seen = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- write burst: AW to slave 1, two beats
    put_aw('{id: {2'b11, 4'd2}, addr: 32'h0001_0040, len: 8'd1});
    @(negedge clk);
    chk(wq_valid[0] == 4'b0001 && wq_slv[0][0] == 1 && wq_req[0][0].addr == 32'h0001_0040, "write logged, slave 1");
    chk(got_aw.size() == 1 && got_aw[0].id == XID_W'(2) && got_aw[0].addr == 32'h0001_0040,
        "AW forwarded with the ID prefix cleared");
    put_w(32'hCAFE_0000, 0);
    put_w(32'hCAFE_0001, 1);
    @(negedge clk);
    chk(got_w.size() == 2 && got_w[1].data == 32'hCAFE_0001 && got_w[1].last, "W beats forwarded");
    chk(dw_tv[0][0][1:0] == 2'b11 && dw_tq[0][0][0] == crc_ref(0, 0, 32'hCAFE_0000) &&
        dw_tq[0][0][1] == crc_ref(0, 1, 32'hCAFE_0001), "write tags logged per beat");
    chk(wq_mb[0][0] == 2, "master-side beat count");
    // B before the slave side saw a response: blocked
    put_b('{id: {2'b00, 4'd2}, resp: 2'b00});
    @(negedge clk);
    chk(seen[ALM_B_UNEXP] && got_b.size() == 0, "early B blocked");
    seen = '0;
    slave_op(0, 2, 0);
    put_b('{id: {2'b00, 4'd2}, resp: 2'b00});
    @(negedge clk);
    chk(got_b.size() == 1 && got_b[0].id == XID_W'(2) && wq_valid[0] == 4'b0000 && seen == '0,
        "B delivered and entry freed");

    // ---- read burst from slave 0, second beat modified
    put_ar('{id: 6'd3, addr: 32'h0000_0100, len: 8'd1});
    @(negedge clk);
    chk(rq_valid[0] == 4'b0001 && rq_slv[0][0] == 0 && got_ar.size() == 1, "read logged and forwarded");
    log_rtag(0, 0, 8'd8, 32'h1234_0000);
    log_rtag(0, 1, 8'd8, 32'h1234_0001);
    put_r('{id: 6'd3, data: 32'h1234_0000, resp: 2'b00, last: 1'b0});
    put_r('{id: 6'd3, data: 32'h1234_0001 ^ 32'h0010_0000, resp: 2'b00, last: 1'b1});
    @(negedge clk);
    chk(got_r.size() == 1 && got_r[0].data == 32'h1234_0000 && got_r[0].id == XID_W'(3), "good read beat delivered");
    chk(seen[ALM_R_TAG], "modified read beat raises the tag alarm");
    chk(rq_valid[0] == 4'b0000, "read entry freed after its last beat");
    seen = '0;
    // masquerade: tag made by slave 1 for a read from slave 0
    put_ar('{id: 6'd4, addr: 32'h0000_0200, len: 8'd0});
    log_rtag(0, 0, 8'd9, 32'h5555_0000);
    put_r('{id: 6'd4, data: 32'h5555_0000, resp: 2'b00, last: 1'b1});
    @(negedge clk);
    chk(seen[ALM_R_TAG] && got_r.size() == 1, "beat tagged by the wrong slave blocked");
    seen = '0;
    // unknown ID
    put_r('{id: 6'd7, data: 32'h0, resp: 2'b00, last: 1'b1});
    @(negedge clk);
    chk(seen[ALM_R_UNEXP] && got_r.size() == 1, "read beat without a request blocked");
    seen = '0;

    // ---- illegal requests
    put_ar('{id: 6'd1, addr: 32'h0003_0000, len: 8'd0});
    @(negedge clk);
    chk(seen[ALM_DECODE] && got_ar.size() == 2, "unmapped read blocked");
    seen = '0;
    put_aw('{id: 6'd1, addr: 32'h0000_0000, len: 8'd16});
    put_w(32'h0, 0);
    @(negedge clk);
    chk(seen[ALM_DECODE] && got_aw.size() == 1, "over-long write blocked");
    seen = '0;
    repeat (15) put_w(32'h0, 0);
    put_w(32'h0, 1);     // its beats are swallowed up to the logged length
    @(negedge clk);
    chk(got_w.size() == 2, "beats of a blocked write are discarded");

    // ---- back-pressure: log full
    for (int k = 0; k < 4; k++) put_ar('{id: 6'(8 + k), addr: 32'h0000_0000, len: 8'd0});
    chk(rq_valid[0] == 4'b1111, "read log full");
    l_ar = '{id: 6'd12, addr: 32'h0, len: 8'd0}; l_ar_valid = 1;
    repeat (3) @(negedge clk);
    chk(!l_ar_ready, "fifth read waits while the log is full");
    l_ar_valid = 0;
    // busy ID: second write with ID 2 waits for the first
    put_aw('{id: 6'd2, addr: 32'h0000_0040, len: 8'd0});
    l_aw = '{id: 6'd2, addr: 32'h0000_0080, len: 8'd0}; l_aw_valid = 1;
    repeat (3) @(negedge clk);
    chk(!l_aw_ready, "write with a busy ID waits");
    l_aw_valid = 0;
    chk(seen == '0, "no alarm from legal traffic");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired rq_valid=%b wq_valid=%b l_ar_valid=%b l_aw_valid=%b l_w_valid=%b", rq_valid, wq_valid, l_ar_valid, l_aw_valid, l_w_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
