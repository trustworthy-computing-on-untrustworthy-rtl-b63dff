// tb_tag_gen: streams bursts of random length through the tag generation unit
// with random back-pressure. Checks every beat's payload, its tag against a
// byte-wise CRC-16-CCITT reference computed here, the beat numbering across
// bursts, and the one-cycle latency of an unstalled beat.
module tb_tag_gen;
  import tcuc_pkg::*;
  localparam logic [7:0] UID = 8'd5;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic in_valid, in_ready, out_valid, out_ready;
  w_t   in_pay, out_pay;
  logic [15:0] out_tag;

  tag_gen #(.T(w_t), .UID(UID)) dut (.clk, .rst_n, .in_valid, .in_ready, .in_pay,
    .in_data(in_pay.data), .in_last(in_pay.last), .out_valid, .out_ready, .out_pay, .out_tag);

  // reference CRC-16-CCITT, byte at a time
  function automatic logic [15:0] crc_ref(input logic [7:0] bytes [6]);
    logic [15:0] c = 16'hFFFF;
    for (int i = 0; i < 6; i++) begin
      c ^= {bytes[i], 8'h00};
      for (int b = 0; b < 8; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    return c;
  endfunction
  function automatic logic [15:0] exp_tag(input logic [7:0] beat, input logic [31:0] d);
    logic [7:0] m [6];
    m = '{UID, beat, d[31:24], d[23:16], d[15:8], d[7:0]};
    return crc_ref(m);
  endfunction

  typedef struct { w_t pay; logic [7:0] beat; longint t; } exp_t;
  exp_t q[$];
  int exact = 0, stalled_beats = 0;

  // sender
  initial begin
    in_valid = 1'b0; in_pay = '0; out_ready = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int burst = 0; burst < 60; burst++) begin
      int len;
      len = $urandom % 6;
      for (int b = 0; b <= len; b++) begin
        // signals change at the falling edge only
        in_pay = '{data: $urandom, last: (b == len)};
        in_valid = 1'b1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        q.push_back('{pay: in_pay, beat: 8'(b), t: cyc});
        @(negedge clk);
        in_valid = 1'b0;
        if ($urandom % 4 == 0) @(negedge clk);
      end
    end
    repeat (20) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d beats lost", q.size()); end
    checks++;
    if (exact == 0) begin failures++; $display("FAIL: no beat with 1-cycle latency"); end
    $display("beats: %0d at 1-cycle latency, %0d held by back-pressure", exact, stalled_beats);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // receiver with random back-pressure
  logic prev_valid = 1'b0, prev_fire = 1'b0;
  always @(posedge clk) out_ready <= rst_n && ($urandom % 3 != 0);
  always @(posedge clk) if (rst_n) begin
    if (out_valid && (!prev_valid || prev_fire) && q.size() > 0) begin
      if (cyc - q[0].t == 1) exact++; else stalled_beats++;
    end
    if (out_valid && out_ready) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected beat"); end
      else begin
        e = q.pop_front();
        if (out_pay != e.pay || out_tag != exp_tag(e.beat, e.pay.data)) begin
          failures++;
          $display("FAIL: beat %0d pay %h tag %h expected %h", e.beat, out_pay, out_tag,
                   exp_tag(e.beat, e.pay.data));
        end
      end
    end
    prev_valid <= out_valid;
    prev_fire  <= out_valid && out_ready;
  end

  // the reference itself, on the standard check vector: "123456789" -> 0x29B1
  initial begin
    logic [15:0] c = 16'hFFFF;
    string s = "123456789";
    for (int i = 0; i < 9; i++) begin
      c ^= {s[i], 8'h00};
      for (int b = 0; b < 8; b++) c = c[15] ? ((c << 1) ^ 16'h1021) : (c << 1);
    end
    checks++;
    if (c != 16'h29B1) begin failures++; $display("FAIL: reference CRC %h", c); end
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
