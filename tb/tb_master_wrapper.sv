// tb_master_wrapper: drives a master wrapper (window 0x1000..0x1FFF, UID 3)
// with a random mix of allowed and out-of-window write and read bursts under
// random back-pressure. Checks that exactly the allowed requests come out, in
// order and one cycle after acceptance, that write beats of allowed bursts
// come out with the right tag and those of denied bursts never do, that every
// denial pulses the access alarm, and that B and R pass straight through.
module tb_master_wrapper;
  import tcuc_pkg::*;
  localparam logic [7:0] UID = 8'd3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready, m_ar_valid, m_ar_ready;
  logic m_r_valid, m_r_ready;
  ax_t m_aw, m_ar; w_t m_w; b_t m_b; r_t m_r;
  logic o_aw_valid, o_aw_ready, o_w_valid, o_w_ready, o_b_valid, o_b_ready, o_ar_valid, o_ar_ready;
  logic o_r_valid, o_r_ready;
  ax_t o_aw, o_ar; w_t o_w; b_t o_b; r_t o_r;
  logic [15:0] o_w_tag;
  alarm_t alarm;

  master_wrapper #(.UID(UID), .ACC_LO(32'h1000), .ACC_HI(32'h1FFF)) dut (.clk, .rst_n,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w, .m_b_valid, .m_b_ready, .m_b,
    .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .o_aw_valid, .o_aw_ready, .o_aw, .o_w_valid, .o_w_ready, .o_w, .o_w_tag, .o_b_valid, .o_b_ready, .o_b,
    .o_ar_valid, .o_ar_ready, .o_ar, .o_r_valid, .o_r_ready, .o_r, .alarm);

  function automatic logic [15:0] crc_ref(input logic [7:0] beat, input logic [31:0] d);
    logic [7:0] m [6];
    logic [15:0] c = 16'hFFFF;
    m = '{UID, beat, d[31:24], d[23:16], d[15:8], d[7:0]};
    for (int i = 0; i < 6; i++) begin
      c ^= {m[i], 8'h00};
      for (int b = 0; b < 8; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction

  typedef struct { ax_t a; longint t; } req_t;
  typedef struct { w_t w; logic [7:0] beat; } beat_t;
  req_t  awq[$], arq[$];
  beat_t wq[$];
  int denied = 0, alarms = 0, allowed_n = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  function automatic bit in_win(input ax_t a);
    return a.addr >= 32'h1000 && longint'(a.addr) + (longint'(a.len) + 1) * 4 - 1 <= 32'h1FFF;
  endfunction

  initial begin
    m_aw_valid = 0; m_w_valid = 0; m_ar_valid = 0; m_aw = '0; m_w = '0; m_ar = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 80; n++) begin
      ax_t a;
      bit ok;
      a.id   = XID_W'($urandom % 16);
      a.len  = 8'($urandom % 4);
      a.addr = (($urandom % 3) == 0) ? 32'h3000 + 32'(4 * ($urandom % 64)) : 32'h1000 + 32'(4 * ($urandom % 1000));
      ok = in_win(a);
      if (n % 2 == 0) begin
        m_aw = a; m_aw_valid = 1'b1;
        while (!m_aw_ready) @(negedge clk);
        @(posedge clk);
        if (ok) begin awq.push_back('{a: a, t: cyc}); allowed_n++; end else denied++;
        @(negedge clk);
        m_aw_valid = 1'b0;
        for (int b = 0; b <= a.len; b++) begin
          m_w = '{data: $urandom, last: (b == a.len)}; m_w_valid = 1'b1;
          while (!m_w_ready) @(negedge clk);
          @(posedge clk);
          if (ok) wq.push_back('{w: m_w, beat: 8'(b)});
          @(negedge clk);
          m_w_valid = 1'b0;
        end
      end else begin
        m_ar = a; m_ar_valid = 1'b1;
        while (!m_ar_ready) @(negedge clk);
        @(posedge clk);
        if (ok) begin arq.push_back('{a: a, t: cyc}); allowed_n++; end else denied++;
        @(negedge clk);
        m_ar_valid = 1'b0;
      end
    end
    repeat (20) @(posedge clk);
    chk(awq.size() == 0 && arq.size() == 0 && wq.size() == 0, "every allowed transfer came out");
    chk(alarms == denied && denied > 0, $sformatf("alarms %0d for %0d denials", alarms, denied));
    chk(allowed_n > 0, "some requests allowed");
    $display("allowed=%0d denied=%0d", allowed_n, denied);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // downstream: random ready, checks
  always @(posedge clk) begin
    o_aw_ready <= ($urandom % 4) != 0;
    o_w_ready  <= ($urandom % 4) != 0;
    o_ar_ready <= ($urandom % 4) != 0;
  end
  logic aw_pv = 0, aw_pf = 0, ar_pv = 0, ar_pf = 0;
  always @(posedge clk) if (rst_n) begin
    alarms += alarm[ALM_ACCESS];
    if (o_aw_valid && (!aw_pv || aw_pf) && awq.size() > 0)
      chk(cyc - awq[0].t == 1, "AW one cycle through the wrapper");
    if (o_ar_valid && (!ar_pv || ar_pf) && arq.size() > 0)
      chk(cyc - arq[0].t == 1, "AR one cycle through the wrapper");
    if (o_aw_valid && o_aw_ready) begin
      chk(awq.size() > 0 && o_aw == awq[0].a, "AW payload");
      if (awq.size() > 0) void'(awq.pop_front());
    end
    if (o_ar_valid && o_ar_ready) begin
      chk(arq.size() > 0 && o_ar == arq[0].a, "AR payload");
      if (arq.size() > 0) void'(arq.pop_front());
    end
    if (o_w_valid && o_w_ready) begin
      chk(wq.size() > 0 && o_w == wq[0].w && o_w_tag == crc_ref(wq[0].beat, wq[0].w.data), "W beat and tag");
      if (wq.size() > 0) void'(wq.pop_front());
    end
    aw_pv <= o_aw_valid; aw_pf <= o_aw_valid && o_aw_ready;
    ar_pv <= o_ar_valid; ar_pf <= o_ar_valid && o_ar_ready;
  end

  // responses pass through combinationally
  always @(negedge clk) begin
    o_b_valid = $urandom; o_b = b_t'($urandom); m_b_ready = $urandom;
    o_r_valid = $urandom; o_r = r_t'({$urandom, $urandom}); m_r_ready = $urandom;
    #1;
    chk(m_b_valid == o_b_valid && m_b == o_b && o_b_ready == m_b_ready, "B passes through");
    chk(m_r_valid == o_r_valid && m_r == o_r && o_r_ready == m_r_ready, "R passes through");
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
