// tb_slave_wrapper: streams read bursts from a slave through the slave wrapper
// (SJ = 1, so UID 9) under random back-pressure and checks each beat's
// payload, its tag against a byte-wise CRC-16-CCITT reference and the
// one-cycle latency; checks that AW, W, AR and B pass straight through.
module tb_slave_wrapper;
  import tcuc_pkg::*;
  localparam logic [7:0] UID = 8'd9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic i_aw_valid, i_aw_ready, i_w_valid, i_w_ready, i_b_valid, i_b_ready, i_ar_valid, i_ar_ready;
  logic i_r_valid, i_r_ready;
  ax_t i_aw, i_ar; w_t i_w; b_t i_b; r_t i_r;
  logic [15:0] i_r_tag;
  logic s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready, s_ar_valid, s_ar_ready;
  logic s_r_valid, s_r_ready;
  ax_t s_aw, s_ar; w_t s_w; b_t s_b; r_t s_r;

  slave_wrapper #(.SJ(1)) dut (.clk, .rst_n,
    .i_aw_valid, .i_aw_ready, .i_aw, .i_w_valid, .i_w_ready, .i_w, .i_b_valid, .i_b_ready, .i_b,
    .i_ar_valid, .i_ar_ready, .i_ar, .i_r_valid, .i_r_ready, .i_r, .i_r_tag,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w, .s_b_valid, .s_b_ready, .s_b,
    .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r);

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

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL @%0d: %s", cyc, s); end
  endtask

  typedef struct { r_t r; logic [7:0] beat; longint t; } exp_t;
  exp_t q[$];
  int exact = 0;

  initial begin
    s_r_valid = 0; s_r = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 50; n++) begin
      int len;
      len = $urandom % 5;
      for (int b = 0; b <= len; b++) begin
        s_r = '{id: XID_W'($urandom), data: $urandom, resp: 2'b00, last: (b == len)};
        s_r_valid = 1'b1;
        while (!s_r_ready) @(negedge clk);
        @(posedge clk);
        q.push_back('{r: s_r, beat: 8'(b), t: cyc});
        @(negedge clk);
        s_r_valid = 1'b0;
      end
    end
    repeat (20) @(posedge clk);
    chk(q.size() == 0, "all read beats delivered");
    chk(exact > 0, "one-cycle latency seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) i_r_ready <= ($urandom % 3) != 0;
  logic pv = 0, pf = 0;
  always @(posedge clk) if (rst_n) begin
    if (i_r_valid && (!pv || pf) && q.size() > 0) begin
      chk(cyc - q[0].t >= 1, "R not early");
      if (cyc - q[0].t == 1) exact++;
    end
    if (i_r_valid && i_r_ready) begin
      chk(q.size() > 0 && i_r == q[0].r && i_r_tag == crc_ref(q[0].beat, q[0].r.data), "R beat and tag");
      if (q.size() > 0) void'(q.pop_front());
    end
    pv <= i_r_valid; pf <= i_r_valid && i_r_ready;
  end

  always @(negedge clk) begin
    i_aw_valid = $urandom; i_aw = ax_t'({$urandom, $urandom}); s_aw_ready = $urandom;
    i_w_valid = $urandom; i_w = w_t'({$urandom, $urandom}); s_w_ready = $urandom;
    i_ar_valid = $urandom; i_ar = ax_t'({$urandom, $urandom}); s_ar_ready = $urandom;
    s_b_valid = $urandom; s_b = b_t'($urandom); i_b_ready = $urandom;
    #1;
    chk(s_aw_valid == i_aw_valid && s_aw == i_aw && i_aw_ready == s_aw_ready, "AW passes through");
    chk(s_w_valid == i_w_valid && s_w == i_w && i_w_ready == s_w_ready, "W passes through");
    chk(s_ar_valid == i_ar_valid && s_ar == i_ar && i_ar_ready == s_ar_ready, "AR passes through");
    chk(i_b_valid == s_b_valid && i_b == s_b && s_b_ready == i_b_ready, "B passes through");
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
