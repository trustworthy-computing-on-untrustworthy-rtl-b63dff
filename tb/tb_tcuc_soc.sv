// tb_tcuc_soc: end-to-end test of the guarded fabric at its default size
// (2 masters, 2 slaves, 4-entry logs, 16-beat bursts). A behavioural crossbar
// with switchable Trojan behaviour sits between the interconnect wrapper's
// ports, and two behavioural memories act as slave IPs.
//  1. Normal traffic: every master writes a 4-beat burst to every slave and
//     reads it back; data, IDs and responses are compared with a reference
//     memory kept here. Latency monitors check, beat by beat, that the guards
//     add 3 cycles on AW, W, AR, R (2 on the master side, 1 on the slave side)
//     and 2 cycles on B (1 + 1). A 16-beat write and read must cross all
//     guards at one beat per cycle (no loss of throughput).
//  2. Back-pressure: six pipelined reads with distinct IDs overflow the
//     4-entry read log, and two writes with one ID must wait for each other.
//  3. Both masters run traffic at the same time.
//  4. Attacks, each from reset: every Trojan mode of the crossbar, misbehaving
//     slaves (unsolicited R and B) and misbehaving masters (access outside the
//     allowed window, over-long burst, early WLAST). Each must raise its alarm
//     and its offending transfer must not reach the victim.
// Every mechanism must have happened at least once.
module tb_tcuc_soc;
  import tcuc_pkg::*;
  localparam int N_M = 2, N_S = 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------- DUT and models
  logic [N_M-1:0] m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic [N_M-1:0] m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  ax_t  [N_M-1:0] m_aw, m_ar;  w_t [N_M-1:0] m_w;  b_t [N_M-1:0] m_b;  r_t [N_M-1:0] m_r;
  logic [N_M-1:0] icm_aw_valid, icm_aw_ready, icm_w_valid, icm_w_ready, icm_b_valid, icm_b_ready;
  logic [N_M-1:0] icm_ar_valid, icm_ar_ready, icm_r_valid, icm_r_ready;
  ax_t  [N_M-1:0] icm_aw, icm_ar;  w_t [N_M-1:0] icm_w;  b_t [N_M-1:0] icm_b;  r_t [N_M-1:0] icm_r;
  logic [N_S-1:0] ics_aw_valid, ics_aw_ready, ics_w_valid, ics_w_ready, ics_b_valid, ics_b_ready;
  logic [N_S-1:0] ics_ar_valid, ics_ar_ready, ics_r_valid, ics_r_ready;
  ax_t  [N_S-1:0] ics_aw, ics_ar;  w_t [N_S-1:0] ics_w;  b_t [N_S-1:0] ics_b;  r_t [N_S-1:0] ics_r;
  logic [N_S-1:0] s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic [N_S-1:0] s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  ax_t  [N_S-1:0] s_aw, s_ar;  w_t [N_S-1:0] s_w;  b_t [N_S-1:0] s_b;  r_t [N_S-1:0] s_r;
  alarm_t [N_M-1:0] alarm_wm, alarm_um;
  alarm_t [N_S-1:0] alarm_us;
  int trojan = 0;
  logic [N_S-1:0] flood_r = '0, flood_b = '0;
  logic [XID_W-1:0] flood_id = '0;

  tcuc_soc dut (.clk, .rst_n,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w, .m_b_valid, .m_b_ready, .m_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
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
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w, .s_b_valid, .s_b_ready, .s_b,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r,
    .alarm_wm, .alarm_um, .alarm_us);

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
    tb_axi_mem #(.WORDS(256)) u_mem (.clk, .rst_n, .flood_r(flood_r[j]), .flood_b(flood_b[j]), .flood_id,
      .aw_valid(s_aw_valid[j]), .aw_ready(s_aw_ready[j]), .aw(s_aw[j]),
      .w_valid(s_w_valid[j]), .w_ready(s_w_ready[j]), .w(s_w[j]),
      .b_valid(s_b_valid[j]), .b_ready(s_b_ready[j]), .b(s_b[j]),
      .ar_valid(s_ar_valid[j]), .ar_ready(s_ar_ready[j]), .ar(s_ar[j]),
      .r_valid(s_r_valid[j]), .r_ready(s_r_ready[j]), .r(s_r[j]));
  end

  // ------------------------------------------------------------- latency monitors
  logic mon_en = 1'b0;
  logic mon_rst;
  assign mon_rst = rst_n && mon_en;
  localparam int NMON = 20;
  int mc [NMON], mf [NMON], mx [NMON], ms [NMON];
  for (genvar i = 0; i < N_M; i++) begin : g_mmon
    // master side: W(M_i) + U(M_i) on requests, U(M_i) on responses
    tb_lat_mon #(2) u_aw (.clk, .rst_n(mon_rst), .up_fire(m_aw_valid[i] && m_aw_ready[i]),
      .dn_valid(icm_aw_valid[i]), .dn_ready(icm_aw_ready[i]), .checks(mc[10*i+0]), .failures(mf[10*i+0]),
      .exact(mx[10*i+0]), .stalled(ms[10*i+0]));
    tb_lat_mon #(2) u_w  (.clk, .rst_n(mon_rst), .up_fire(m_w_valid[i] && m_w_ready[i]),
      .dn_valid(icm_w_valid[i]), .dn_ready(icm_w_ready[i]), .checks(mc[10*i+1]), .failures(mf[10*i+1]),
      .exact(mx[10*i+1]), .stalled(ms[10*i+1]));
    tb_lat_mon #(2) u_ar (.clk, .rst_n(mon_rst), .up_fire(m_ar_valid[i] && m_ar_ready[i]),
      .dn_valid(icm_ar_valid[i]), .dn_ready(icm_ar_ready[i]), .checks(mc[10*i+2]), .failures(mf[10*i+2]),
      .exact(mx[10*i+2]), .stalled(ms[10*i+2]));
    tb_lat_mon #(1) u_r  (.clk, .rst_n(mon_rst), .up_fire(icm_r_valid[i] && icm_r_ready[i]),
      .dn_valid(m_r_valid[i]), .dn_ready(m_r_ready[i]), .checks(mc[10*i+3]), .failures(mf[10*i+3]),
      .exact(mx[10*i+3]), .stalled(ms[10*i+3]));
    tb_lat_mon #(1) u_b  (.clk, .rst_n(mon_rst), .up_fire(icm_b_valid[i] && icm_b_ready[i]),
      .dn_valid(m_b_valid[i]), .dn_ready(m_b_ready[i]), .checks(mc[10*i+4]), .failures(mf[10*i+4]),
      .exact(mx[10*i+4]), .stalled(ms[10*i+4]));
  end
  for (genvar j = 0; j < N_S; j++) begin : g_smon
    // slave side: U(S_j) on requests, W(S_j) + U(S_j) on read data, U(S_j) on B
    tb_lat_mon #(1) u_aw (.clk, .rst_n(mon_rst), .up_fire(ics_aw_valid[j] && ics_aw_ready[j]),
      .dn_valid(s_aw_valid[j]), .dn_ready(s_aw_ready[j]), .checks(mc[10*j+5]), .failures(mf[10*j+5]),
      .exact(mx[10*j+5]), .stalled(ms[10*j+5]));
    tb_lat_mon #(1) u_w  (.clk, .rst_n(mon_rst), .up_fire(ics_w_valid[j] && ics_w_ready[j]),
      .dn_valid(s_w_valid[j]), .dn_ready(s_w_ready[j]), .checks(mc[10*j+6]), .failures(mf[10*j+6]),
      .exact(mx[10*j+6]), .stalled(ms[10*j+6]));
    tb_lat_mon #(1) u_ar (.clk, .rst_n(mon_rst), .up_fire(ics_ar_valid[j] && ics_ar_ready[j]),
      .dn_valid(s_ar_valid[j]), .dn_ready(s_ar_ready[j]), .checks(mc[10*j+7]), .failures(mf[10*j+7]),
      .exact(mx[10*j+7]), .stalled(ms[10*j+7]));
    tb_lat_mon #(2) u_r  (.clk, .rst_n(mon_rst), .up_fire(s_r_valid[j] && s_r_ready[j]),
      .dn_valid(ics_r_valid[j]), .dn_ready(ics_r_ready[j]), .checks(mc[10*j+8]), .failures(mf[10*j+8]),
      .exact(mx[10*j+8]), .stalled(ms[10*j+8]));
    tb_lat_mon #(1) u_b  (.clk, .rst_n(mon_rst), .up_fire(s_b_valid[j] && s_b_ready[j]),
      .dn_valid(ics_b_valid[j]), .dn_ready(ics_b_ready[j]), .checks(mc[10*j+9]), .failures(mf[10*j+9]),
      .exact(mx[10*j+9]), .stalled(ms[10*j+9]));
  end

  // ------------------------------------------------------------- observers
  alarm_t seen_wm, seen_um, seen_us;       // alarms since the last clear
  int s_aw_cnt [N_S], s_ar_cnt [N_S], s_w_cnt [N_S], m_r_cnt [N_M], m_b_cnt [N_M];
  r_t rq [N_M][$];
  b_t bq [N_M][$];
  int log_full_stall = 0, id_busy_stall = 0, blocked = 0;
  logic clear_obs = 1'b0;
  longint t_sw0 [$], t_mr1 [$];            // cycles of W beats at slave 0, R beats at master 1

  assign m_b_ready = '1;
  assign m_r_ready = '1;

  always @(posedge clk) begin
    if (clear_obs) begin
      seen_wm = '0; seen_um = '0; seen_us = '0;
      for (int j = 0; j < N_S; j++) begin s_aw_cnt[j] = 0; s_ar_cnt[j] = 0; s_w_cnt[j] = 0; end
      for (int i = 0; i < N_M; i++) begin m_r_cnt[i] = 0; m_b_cnt[i] = 0; rq[i].delete(); bq[i].delete(); end
    end else if (rst_n) begin
      for (int i = 0; i < N_M; i++) begin
        seen_wm |= alarm_wm[i];
        seen_um |= alarm_um[i];
        if (m_r_valid[i]) begin rq[i].push_back(m_r[i]); m_r_cnt[i]++; end
        if (m_r_valid[i] && i == 1) t_mr1.push_back(cyc);
        if (m_b_valid[i]) begin bq[i].push_back(m_b[i]); m_b_cnt[i]++; end
        blocked += $countones(alarm_wm[i]) + $countones(alarm_um[i]);
      end
      for (int j = 0; j < N_S; j++) begin
        seen_us |= alarm_us[j];
        blocked += $countones(alarm_us[j]);
        if (s_aw_valid[j] && s_aw_ready[j]) s_aw_cnt[j]++;
        if (s_ar_valid[j] && s_ar_ready[j]) s_ar_cnt[j]++;
        if (s_w_valid[j] && s_w_ready[j]) s_w_cnt[j]++;
        if (s_w_valid[j] && s_w_ready[j] && j == 0) t_sw0.push_back(cyc);
      end
      if (dut.u_waxi.g_um[0].u_um.l_ar_valid && !dut.u_waxi.g_um[0].u_um.ar_free_ok) log_full_stall++;
      if (dut.u_waxi.g_um[0].u_um.l_aw_valid && dut.u_waxi.g_um[0].u_um.aw_busy) id_busy_stall++;
    end
  end

  // ------------------------------------------------------------- reference memory
  logic [DATA_W-1:0] ref_mem [N_S][256];
  task automatic ref_reset();
    for (int j = 0; j < N_S; j++)
      for (int k = 0; k < 256; k++) ref_mem[j][k] = DATA_W'(k) ^ 32'hA5A5_0000;
  endtask

  // ------------------------------------------------------------- master drivers
  // Signals change at the falling edge; a handshake completes at the rising edge.
  task automatic aw_put(input int mi, input ax_t a, output bit ok);
    int n = 0;
    @(negedge clk);
    m_aw[mi] = a; m_aw_valid[mi] = 1'b1;
    while (!m_aw_ready[mi] && n < 200) begin @(negedge clk); n++; end
    ok = m_aw_ready[mi];
    @(posedge clk);
    @(negedge clk) m_aw_valid[mi] = 1'b0;
  endtask
  task automatic ar_put(input int mi, input ax_t a, output bit ok);
    int n = 0;
    @(negedge clk);
    m_ar[mi] = a; m_ar_valid[mi] = 1'b1;
    while (!m_ar_ready[mi] && n < 200) begin @(negedge clk); n++; end
    ok = m_ar_ready[mi];
    @(posedge clk);
    @(negedge clk) m_ar_valid[mi] = 1'b0;
  endtask
  task automatic w_burst(input int mi, input int len, input logic [DATA_W-1:0] base, input int early_last,
                         output bit ok);
    ok = 1'b1;
    for (int b = 0; b <= len; b++) begin
      int n = 0;
      if (b == 0) @(negedge clk);
      m_w[mi] = '{data: base + DATA_W'(b), last: (b == len) || (b == early_last)};
      m_w_valid[mi] = 1'b1;
      while (!m_w_ready[mi] && n < 200) begin @(negedge clk); n++; end
      if (!m_w_ready[mi]) ok = 1'b0;
      @(posedge clk);
      @(negedge clk);
      if (b == early_last) break;
    end
    m_w_valid[mi] = 1'b0;
  endtask
  function automatic logic [DATA_W-1:0] pat(input int mi, input int id, input int seed);
    return {8'(mi), 8'(id), 16'(seed * 16)};
  endfunction

  task automatic wait_b(input int mi, input int tmo, output bit got, output b_t b);
    int n = 0;
    while (bq[mi].size() == 0 && n < tmo) begin @(posedge clk); n++; end
    got = bq[mi].size() != 0;
    b = got ? bq[mi].pop_front() : '0;
  endtask
  task automatic wait_r(input int mi, input int tmo, output bit got, output r_t r);
    int n = 0;
    while (rq[mi].size() == 0 && n < tmo) begin @(posedge clk); n++; end
    got = rq[mi].size() != 0;
    r = got ? rq[mi].pop_front() : '0;
  endtask

  int n_write = 0, n_read = 0;

  // full write with checks
  task automatic do_write(input int mi, input logic [ADDR_W-1:0] addr, input int len, input int id,
                          input int seed);
    bit ok1, ok2, got; b_t b;
    logic [DATA_W-1:0] base = pat(mi, id, seed);
    fork
      aw_put(mi, '{id: XID_W'(id), addr: addr, len: LEN_W'(len)}, ok1);
      w_burst(mi, len, base, -1, ok2);
    join
    wait_b(mi, 200, got, b);
    check(ok1 && ok2 && got, $sformatf("write m%0d @%h completes", mi, addr));
    check(b.id == XID_W'(id) && b.resp == 2'b00, $sformatf("write m%0d B id/resp", mi));
    for (int k = 0; k <= len; k++)
      ref_mem[int'(addr >> 16)][((addr & 32'hFFFF) >> 2) + k] = base + DATA_W'(k);
    n_write++;
  endtask

  task automatic do_read(input int mi, input logic [ADDR_W-1:0] addr, input int len, input int id);
    bit ok, got; r_t r;
    ar_put(mi, '{id: XID_W'(id), addr: addr, len: LEN_W'(len)}, ok);
    check(ok, $sformatf("read m%0d @%h accepted", mi, addr));
    for (int k = 0; k <= len; k++) begin
      wait_r(mi, 200, got, r);
      check(got, $sformatf("read m%0d beat %0d arrives", mi, k));
      if (got) begin
        check(r.data == ref_mem[int'(addr >> 16)][((addr & 32'hFFFF) >> 2) + k],
              $sformatf("read m%0d @%h beat %0d data %h", mi, addr, k, r.data));
        check(r.id == XID_W'(id) && r.last == (k == len), $sformatf("read m%0d beat %0d id/last", mi, k));
      end
    end
    n_read++;
  endtask

  task automatic sys_reset();
    @(negedge clk);
    rst_n = 1'b0; clear_obs = 1'b1;
    m_aw_valid = '0; m_w_valid = '0; m_ar_valid = '0;
    m_aw = '0; m_w = '0; m_ar = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1; clear_obs = 1'b0;
    ref_reset();
    repeat (2) @(negedge clk);
  endtask

  // ------------------------------------------------------------- attacks
  int n_detected = 0;
  // arguments are sampled at the call, so callers let the attack play out first
  task automatic attack_done(input string name, input bit alarm_ok, input bit blocked_ok);
    check(alarm_ok, {name, ": alarm raised"});
    check(blocked_ok, {name, ": offending transfer blocked"});
    if (alarm_ok && blocked_ok) n_detected++;
    trojan = 0; flood_r = '0; flood_b = '0;
  endtask

  initial begin
    bit ok, got; r_t r; b_t b;
    int mech_ok;
    m_aw_valid = '0; m_w_valid = '0; m_ar_valid = '0; m_aw = '0; m_w = '0; m_ar = '0;
    sys_reset();

    // ---------------- 1. normal traffic with latency monitoring
    mon_en = 1'b1;
    for (int mi = 0; mi < N_M; mi++)
      for (int sl = 0; sl < N_S; sl++) begin
        do_write(mi, (sl << 16) + 32'h100 * (mi + 1), 3, mi + 2 * sl, 1 + sl);
        do_read(mi, (sl << 16) + 32'h100 * (mi + 1), 3, 5 + sl);
      end
    // a single-beat and a maximum-length burst
    do_write(0, 32'h0001_0400, 0, 1, 7);
    // full throughput: once a 16-beat burst flows, one beat per cycle crosses
    // all three guards (checked at the slave for W and at the master for R)
    t_sw0.delete();
    do_write(1, 32'h0000_0800, 15, 3, 9);
    check(t_sw0.size() == 16 && t_sw0[15] - t_sw0[0] == 15, "16 W beats reach the slave on consecutive cycles");
    t_mr1.delete();
    do_read(1, 32'h0000_0800, 15, 4);
    check(t_mr1.size() == 16 && t_mr1[15] - t_mr1[0] == 15, "16 R beats reach the master on consecutive cycles");
    do_read(0, 32'h0001_0400, 0, 2);

    // ---------------- 2. back-pressure: log full, busy ID
    fork
      begin
        for (int k = 0; k < 6; k++) begin
          ar_put(0, '{id: XID_W'(k), addr: 32'h0000_0100 + 32'(32 * k), len: 8'd7}, ok);
          check(ok, "pipelined read accepted");
        end
      end
      begin
        for (int k = 0; k < 48; k++) begin
          wait_r(0, 400, got, r);
          check(got && r.id == XID_W'(k / 8) && r.last == (k % 8 == 7) &&
                r.data == ref_mem[0][(32'h100 >> 2) + k], $sformatf("pipelined read beat %0d", k));
        end
      end
    join
    n_read += 6;
    fork
      begin
        aw_put(0, '{id: XID_W'(9), addr: 32'h0001_0040, len: 8'd1}, ok);
        aw_put(0, '{id: XID_W'(9), addr: 32'h0001_0080, len: 8'd1}, ok);
      end
      begin
        w_burst(0, 1, 32'h1111_0000, -1, ok);
        w_burst(0, 1, 32'h2222_0000, -1, ok);
      end
    join
    for (int k = 0; k < 2; k++) begin
      wait_b(0, 300, got, b);
      check(got && b.id == XID_W'(9), "same-ID writes both answered");
    end
    ref_mem[1][16] = 32'h1111_0000; ref_mem[1][17] = 32'h1111_0001;
    ref_mem[1][32] = 32'h2222_0000; ref_mem[1][33] = 32'h2222_0001;
    n_write += 2;
    do_read(1, 32'h0001_0040, 1, 0);
    do_read(1, 32'h0001_0080, 1, 0);

    // ---------------- 3. both masters at once
    fork
      begin do_write(0, 32'h0000_0200, 7, 4, 3); do_read(0, 32'h0001_0100, 3, 6); end
      begin do_write(1, 32'h0001_0300, 5, 4, 4); do_read(1, 32'h0000_0200, 7, 6); end
    join
    repeat (10) @(posedge clk);
    check(seen_wm == '0 && seen_um == '0 && seen_us == '0, "no alarm during normal traffic");
    mon_en = 1'b0;
    begin
      int c = 0, f = 0, st = 0;
      for (int k = 0; k < NMON; k++) begin
        c += mc[k]; f += mf[k];
        check(mx[k] > 0, $sformatf("latency monitor %0d saw beats at the nominal latency", k));
        st += ms[k];
      end
      checks += c; failures += f;
      $display("latency: %0d beats checked, %0d too early, %0d held up downstream", c, f, st);
      check(st > 0, "a downstream stall happened");
    end

    // ---------------- 4. attacks from the interconnect
    sys_reset(); trojan = 1;                       // data diversion (write)
    fork do_write(0, 32'h0000_0040, 1, 1, 1); join_none
    repeat (40) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("diversion", seen_us[ALM_AW_UNEXP], s_aw_cnt[0] == 0 && s_aw_cnt[1] == 0 && s_w_cnt[1] == 0);
    disable fork;

    sys_reset(); trojan = 2;                       // write data modification
    fork do_write(0, 32'h0000_0040, 1, 1, 1); join_none
    repeat (40) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("write modification", seen_us[ALM_W_TAG], s_w_cnt[0] == 1);
    disable fork;

    sys_reset(); trojan = 3;                       // read data modification
    fork ar_put(0, '{id: XID_W'(1), addr: 32'h0000_0040, len: 8'd1}, ok); join_none
    repeat (40) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("read modification", seen_um[ALM_R_TAG], m_r_cnt[0] == 1);
    disable fork;

    sys_reset(); trojan = 4;                       // illegitimate write request
    repeat (20) @(posedge clk);
    attack_done("forged AW", seen_us[ALM_AW_UNEXP], s_aw_cnt[0] == 0);

    sys_reset(); trojan = 5;                       // illegitimate read request
    repeat (20) @(posedge clk);
    attack_done("forged AR", seen_us[ALM_AR_UNEXP], s_ar_cnt[0] == 0);

    sys_reset(); trojan = 6;                       // write data flooding
    repeat (20) @(posedge clk);
    attack_done("W flooding", seen_us[ALM_W_UNEXP], s_w_cnt[0] == 0);

    sys_reset(); trojan = 7;                       // read data flooding to a master
    repeat (20) @(posedge clk);
    attack_done("R flooding", seen_um[ALM_R_UNEXP], m_r_cnt[0] == 0);

    sys_reset(); trojan = 8;                       // read data diverted to the other master
    fork ar_put(0, '{id: XID_W'(1), addr: 32'h0001_0040, len: 8'd1}, ok); join_none
    repeat (40) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("read diversion", seen_um[ALM_R_UNEXP], m_r_cnt[1] == 0 && m_r_cnt[0] == 0);
    disable fork;

    sys_reset(); trojan = 9;                       // address modification
    fork do_write(1, 32'h0001_0000, 0, 2, 1); join_none
    repeat (40) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("address modification", seen_us[ALM_AW_UNEXP], s_aw_cnt[1] == 0);
    disable fork;

    sys_reset();                                   // shadowing: replay a copied beat later
    do_write(0, 32'h0000_0010, 0, 1, 5);
    trojan = 10;
    repeat (20) @(posedge clk);
    attack_done("shadow replay", seen_us[ALM_W_UNEXP], s_w_cnt[1] == 0);

    sys_reset(); trojan = 11;                      // forged write response
    repeat (20) @(posedge clk);
    attack_done("forged B", seen_um[ALM_B_UNEXP], m_b_cnt[0] == 0);

    // ---------------- attacks from slave IPs
    sys_reset(); flood_id = {2'd0, 4'd3}; flood_r[1] = 1'b1;
    repeat (20) @(posedge clk);
    attack_done("slave R flooding", seen_us[ALM_R_UNEXP], m_r_cnt[0] == 0);
    sys_reset(); flood_id = {2'd1, 4'd2}; flood_b[0] = 1'b1;
    repeat (20) @(posedge clk);
    attack_done("slave B flooding", seen_us[ALM_B_UNEXP], m_b_cnt[1] == 0);

    // ---------------- attacks from master IPs
    sys_reset();
    fork do_write(1, 32'h0002_0000, 0, 1, 1); join_none
    repeat (30) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("illegitimate write access", seen_wm[ALM_ACCESS], s_aw_cnt[0] == 0 && s_aw_cnt[1] == 0);
    disable fork;
    sys_reset();
    fork ar_put(0, '{id: XID_W'(1), addr: 32'h0003_0000, len: 8'd0}, ok); join_none
    repeat (30) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("illegitimate read access", seen_wm[ALM_ACCESS], s_ar_cnt[0] == 0 && s_ar_cnt[1] == 0);
    disable fork;
    sys_reset();
    fork ar_put(0, '{id: XID_W'(1), addr: 32'h0000_0000, len: 8'd20}, ok); join_none
    repeat (30) @(posedge clk);
    repeat (20) @(posedge clk);
    attack_done("over-long burst", seen_um[ALM_DECODE], s_ar_cnt[0] == 0);
    disable fork;
    sys_reset();
    fork
      begin aw_put(0, '{id: XID_W'(1), addr: 32'h0000_0020, len: 8'd3}, ok); end
      begin w_burst(0, 3, 32'h7777_0000, 1, ok); end
    join
    repeat (20) @(posedge clk);
    attack_done("early WLAST", seen_um[ALM_W_LAST], s_w_cnt[0] == 1);

    // ---------------- recovery after the attacks
    sys_reset();
    do_write(1, 32'h0001_0020, 2, 3, 2);
    do_read(0, 32'h0001_0020, 2, 3);

    // ---------------- mechanisms
    $display("mechanisms: writes=%0d reads=%0d log_full_stall=%0d id_busy_stall=%0d attacks_detected=%0d blocked_events=%0d",
             n_write, n_read, log_full_stall, id_busy_stall, n_detected, blocked);
    check(n_write > 0, "normal writes happened");
    check(n_read > 0, "normal reads happened");
    check(log_full_stall > 0, "log-full back-pressure happened");
    check(id_busy_stall > 0, "busy-ID back-pressure happened");
    check(n_detected == 17, "all 17 attacks detected and blocked");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
