// tb_axi_wrapper: the interconnect wrapper W(AXI) (2 masters, 2 slaves, default
// logs) around a behavioural interconnect that can be switched into several
// Trojan behaviours, with two behavioural memories as slaves. The testbench
// plays both master wrappers (it tags write beats with the master UID) and
// both slave wrappers (it tags read beats with UID 8 + slave index).
// Checks: cross-traffic write/read-back with data, IDs and one-cycle
// forwarding at the master unit, no alarms on legal traffic; then from reset
// each of: a write tagged under the other master's UID, modified write data,
// modified read data, forged AW, unsolicited R and forged B, each of which must
// raise the right alarm and not reach its target.
module tb_axi_wrapper;
  import tcuc_pkg::*;
  localparam int N_M = 2, N_S = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  int trojan = 0;

  logic [N_M-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic [N_M-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t [N_M-1:0] m_aw, m_ar; w_t [N_M-1:0] m_w; b_t [N_M-1:0] m_b; r_t [N_M-1:0] m_r;
  logic [N_M-1:0][15:0] m_w_tag;
  logic [N_M-1:0] icm_aw_valid, icm_aw_ready, icm_w_valid, icm_w_ready, icm_b_valid, icm_b_ready;
  logic [N_M-1:0] icm_ar_valid, icm_ar_ready, icm_r_valid, icm_r_ready;
  ax_t [N_M-1:0] icm_aw, icm_ar; w_t [N_M-1:0] icm_w; b_t [N_M-1:0] icm_b; r_t [N_M-1:0] icm_r;
  logic [N_S-1:0] ics_aw_valid, ics_aw_ready, ics_w_valid, ics_w_ready, ics_b_valid, ics_b_ready;
  logic [N_S-1:0] ics_ar_valid, ics_ar_ready, ics_r_valid, ics_r_ready;
  ax_t [N_S-1:0] ics_aw, ics_ar; w_t [N_S-1:0] ics_w; b_t [N_S-1:0] ics_b; r_t [N_S-1:0] ics_r;
  logic [N_S-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic [N_S-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t [N_S-1:0] s_aw, s_ar; w_t [N_S-1:0] s_w; b_t [N_S-1:0] s_b; r_t [N_S-1:0] s_r;
  logic [N_S-1:0][15:0] s_r_tag;
  alarm_t [N_M-1:0] alarm_um;
  alarm_t [N_S-1:0] alarm_us;

  axi_wrapper dut (.clk, .rst_n,
    .l_m_aw_valid(m_aw_valid), .l_m_aw_ready(m_aw_ready), .l_m_aw(m_aw),
    .l_m_w_valid(m_w_valid), .l_m_w_ready(m_w_ready), .l_m_w(m_w), .l_m_w_tag(m_w_tag),
    .l_m_b_valid(m_b_valid), .l_m_b_ready(m_b_ready), .l_m_b(m_b),
    .l_m_ar_valid(m_ar_valid), .l_m_ar_ready(m_ar_ready), .l_m_ar(m_ar),
    .l_m_r_valid(m_r_valid), .l_m_r_ready(m_r_ready), .l_m_r(m_r),
    .ic_m_aw_valid(icm_aw_valid), .ic_m_aw_ready(icm_aw_ready), .ic_m_aw(icm_aw),
    .ic_m_w_valid(icm_w_valid), .ic_m_w_ready(icm_w_ready), .ic_m_w(icm_w),
    .ic_m_b_valid(icm_b_valid), .ic_m_b_ready(icm_b_ready), .ic_m_b(icm_b),
    .ic_m_ar_valid(icm_ar_valid), .ic_m_ar_ready(icm_ar_ready), .ic_m_ar(icm_ar),
    .ic_m_r_valid(icm_r_valid), .ic_m_r_ready(icm_r_ready), .ic_m_r(icm_r),
    .ic_s_aw_valid(ics_aw_valid), .ic_s_aw_ready(ics_aw_ready), .ic_s_aw(ics_aw),
    .ic_s_w_valid(ics_w_valid), .ic_s_w_ready(ics_w_ready), .ic_s_w(ics_w),
    .ic_s_b_valid(ics_b_valid), .ic_s_b_ready(ics_b_ready), .ic_s_b(ics_b),
    .ic_s_ar_valid(ics_ar_valid), .ic_s_ar_ready(ics_ar_ready), .ic_s_ar(ics_ar),
    .ic_s_r_valid(ics_r_valid), .ic_s_r_ready(ics_r_ready), .ic_s_r(ics_r),
    .l_s_aw_valid(s_aw_valid), .l_s_aw_ready(s_aw_ready), .l_s_aw(s_aw),
    .l_s_w_valid(s_w_valid), .l_s_w_ready(s_w_ready), .l_s_w(s_w),
    .l_s_b_valid(s_b_valid), .l_s_b_ready(s_b_ready), .l_s_b(s_b),
    .l_s_ar_valid(s_ar_valid), .l_s_ar_ready(s_ar_ready), .l_s_ar(s_ar),
    .l_s_r_valid(s_r_valid), .l_s_r_ready(s_r_ready), .l_s_r(s_r), .l_s_r_tag(s_r_tag),
    .alarm_um, .alarm_us);

  tb_ic_model #(.N_M(N_M), .N_S(N_S), .SLV_SHIFT(16)) u_ic (.clk, .rst_n, .trojan,
    .m_aw_valid(icm_aw_valid), .m_aw_ready(icm_aw_ready), .m_aw(icm_aw),
    .m_w_valid(icm_w_valid), .m_w_ready(icm_w_ready), .m_w(icm_w),
    .m_b_valid(icm_b_valid), .m_b_ready(icm_b_ready), .m_b(icm_b),
    .m_ar_valid(icm_ar_valid), .m_ar_ready(icm_ar_ready), .m_ar(icm_ar),
    .m_r_valid(icm_r_valid), .m_r_ready(icm_r_ready), .m_r(icm_r),
    .s_aw_valid(ics_aw_valid), .s_aw_ready(ics_aw_ready), .s_aw(ics_aw),
    .s_w_valid(ics_w_valid), .s_w_ready(ics_w_ready), .s_w(ics_w),
    .s_b_valid(ics_b_valid), .s_b_ready(ics_b_ready), .s_b(ics_b),
    .s_ar_valid(ics_ar_valid), .s_ar_ready(ics_ar_ready), .s_ar(ics_ar),
    .s_r_valid(ics_r_valid), .s_r_ready(ics_r_ready), .s_r(ics_r));

  for (genvar j = 0; j < N_S; j++) begin : g_mem
    tb_axi_mem #(.WORDS(256)) u_mem (.clk, .rst_n, .flood_r(1'b0), .flood_b(1'b0), .flood_id('0),
      .aw_valid(s_aw_valid[j]), .aw_ready(s_aw_ready[j]), .aw(s_aw[j]),
      .w_valid(s_w_valid[j]), .w_ready(s_w_ready[j]), .w(s_w[j]),
      .b_valid(s_b_valid[j]), .b_ready(s_b_ready[j]), .b(s_b[j]),
      .ar_valid(s_ar_valid[j]), .ar_ready(s_ar_ready[j]), .ar(s_ar[j]),
      .r_valid(s_r_valid[j]), .r_ready(s_r_ready[j]), .r(s_r[j]));
  end

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

  // slave wrappers: tag every read beat with the slave's UID and beat number
  int s_rbeat [N_S];
  for (genvar j = 0; j < N_S; j++) begin : g_stag
    assign s_r_tag[j] = crc_ref(8'(8 + j), 8'(s_rbeat[j]), s_r[j].data);
  end

  // observation
  logic clear_obs = 1'b0;
  alarm_t seen_um, seen_us;
  int s_aw_cnt [N_S], s_w_cnt [N_S], s_ar_cnt [N_S], m_b_cnt [N_M], m_r_cnt [N_M];
  b_t bq [N_M][$];
  r_t rq [N_M][$];
  longint t_fire [N_M], lat_aw [N_M];
  logic [N_M-1:0] icm_aw_valid_q;
  assign m_b_ready = '1; assign m_r_ready = '1;
  always @(posedge clk) begin
    icm_aw_valid_q <= icm_aw_valid;
    if (!rst_n || clear_obs) begin
      seen_um = '0; seen_us = '0;
      for (int j = 0; j < N_S; j++) begin s_aw_cnt[j] = 0; s_w_cnt[j] = 0; s_ar_cnt[j] = 0; s_rbeat[j] = 0; end
      for (int i = 0; i < N_M; i++) begin m_b_cnt[i] = 0; m_r_cnt[i] = 0; bq[i].delete(); rq[i].delete(); end
    end else begin
      for (int i = 0; i < N_M; i++) begin
        seen_um |= alarm_um[i];
        if (m_b_valid[i]) begin m_b_cnt[i]++; bq[i].push_back(m_b[i]); end
        if (m_r_valid[i]) begin m_r_cnt[i]++; rq[i].push_back(m_r[i]); end
        if (m_aw_valid[i] && m_aw_ready[i]) t_fire[i] = cyc;
        if (icm_aw_valid[i] && !icm_aw_valid_q[i]) lat_aw[i] = cyc - t_fire[i];
      end
      for (int j = 0; j < N_S; j++) begin
        seen_us |= alarm_us[j];
        if (s_aw_valid[j] && s_aw_ready[j]) s_aw_cnt[j]++;
        if (s_w_valid[j] && s_w_ready[j]) s_w_cnt[j]++;
        if (s_ar_valid[j] && s_ar_ready[j]) s_ar_cnt[j]++;
        if (s_r_valid[j] && s_r_ready[j]) s_rbeat[j] = s_r[j].last ? 0 : s_rbeat[j] + 1;
      end
    end
  end

  // ---- master wrapper drivers (signals change at the falling edge)
  task automatic aw_put(input int mi, input ax_t a);
    int n = 0;
    m_aw[mi] = a; m_aw_valid[mi] = 1'b1; #1;
    while (!m_aw_ready[mi] && n < 200) begin @(negedge clk); n++; end
    @(posedge clk); @(negedge clk) m_aw_valid[mi] = 1'b0;
  endtask
  task automatic ar_put(input int mi, input ax_t a);
    int n = 0;
    m_ar[mi] = a; m_ar_valid[mi] = 1'b1; #1;
    while (!m_ar_ready[mi] && n < 200) begin @(negedge clk); n++; end
    @(posedge clk); @(negedge clk) m_ar_valid[mi] = 1'b0;
  endtask
  task automatic w_burst(input int mi, input int len, input logic [31:0] base, input int uid);
    for (int b = 0; b <= len; b++) begin
      int n;
      n = 0;
      m_w[mi] = '{data: base + b, last: b == len};
      m_w_tag[mi] = crc_ref(8'(uid), 8'(b), base + b);
      m_w_valid[mi] = 1'b1; #1;
      while (!m_w_ready[mi] && n < 200) begin @(negedge clk); n++; end
      @(posedge clk); @(negedge clk);
    end
    m_w_valid[mi] = 1'b0;
  endtask
  task automatic do_write(input int mi, input logic [31:0] addr, input int len, input int id,
                          input logic [31:0] base, input int uid);
    fork
      aw_put(mi, '{id: 6'(id), addr: addr, len: 8'(len)});
      w_burst(mi, len, base, uid);
    join
  endtask
  task automatic wait_n(input int n);
    repeat (n) @(negedge clk);
  endtask
  task automatic sys_reset();
    trojan = 0;
    rst_n = 1'b0; m_aw_valid = '0; m_w_valid = '0; m_ar_valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
  endtask

  initial begin
    m_aw = '0; m_w = '0; m_ar = '0; m_w_tag = '0;
    sys_reset();

    // ---- legal cross traffic
    do_write(0, 32'h0001_0020, 3, 2, 32'h0A0B_0000, 0);
    wait_n(30);
    chk(lat_aw[0] == 1, "AW leaves the master unit one cycle after acceptance");
    chk(m_b_cnt[0] == 1 && bq[0][0].id == 6'd2 && bq[0][0].resp == 2'b00, "write m0 -> s1 answered");
    chk(s_w_cnt[1] == 4, "all write beats reach slave 1");
    do_write(1, 32'h0000_0010, 1, 5, 32'h0C0D_0000, 1);
    wait_n(30);
    chk(m_b_cnt[1] == 1 && bq[1][0].id == 6'd5, "write m1 -> s0 answered");
    ar_put(1, '{id: 6'd7, addr: 32'h0001_0020, len: 8'd3});
    wait_n(40);
    chk(m_r_cnt[1] == 4, "m1 reads back four beats");
    for (int k = 0; k < 4 && k < rq[1].size(); k++)
      chk(rq[1][k].data == 32'h0A0B_0000 + k && rq[1][k].id == 6'd7 && rq[1][k].last == (k == 3),
          $sformatf("read-back beat %0d", k));
    ar_put(0, '{id: 6'd1, addr: 32'h0000_0010, len: 8'd1});
    wait_n(40);
    chk(m_r_cnt[0] == 2 && rq[0][0].data == 32'h0C0D_0000 && rq[0][1].data == 32'h0C0D_0001,
        "m0 reads back m1's data");
    chk(seen_um == '0 && seen_us == '0, "no alarm on legal traffic");

    // ---- masquerade: master 0 presents beats tagged as master 1
    sys_reset();
    do_write(0, 32'h0000_0040, 0, 3, 32'h5151_0000, 1);
    wait_n(30);
    chk(seen_us[ALM_W_TAG] && s_w_cnt[0] == 0, "beat tagged under another master blocked");

    // ---- interconnect Trojans
    sys_reset(); trojan = 2;
    do_write(0, 32'h0000_0040, 1, 1, 32'h6262_0000, 0);
    wait_n(40);
    chk(seen_us[ALM_W_TAG] && s_w_cnt[0] == 1, "modified write beat blocked");
    sys_reset(); trojan = 3;
    ar_put(0, '{id: 6'd1, addr: 32'h0000_0040, len: 8'd1});
    wait_n(40);
    chk(seen_um[ALM_R_TAG] && m_r_cnt[0] == 1, "modified read beat blocked");
    sys_reset(); trojan = 4;
    wait_n(20);
    chk(seen_us[ALM_AW_UNEXP] && s_aw_cnt[0] == 0, "forged AW blocked");
    sys_reset(); trojan = 7;
    wait_n(20);
    chk(seen_um[ALM_R_UNEXP] && m_r_cnt[0] == 0, "unsolicited R blocked");
    sys_reset(); trojan = 11;
    wait_n(20);
    chk(seen_um[ALM_B_UNEXP] && m_b_cnt[0] == 0, "forged B blocked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
