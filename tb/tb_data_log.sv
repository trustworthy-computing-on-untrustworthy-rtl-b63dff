// tb_data_log: random tag writes from three write ports and random entry
// clears on a 2-segment, 4-entry, 8-beat data log, compared every cycle with a
// reference model kept here (valid bits everywhere, tags where valid).
module tb_data_log;
  import tcuc_pkg::*;
  localparam int S = 2, D = 4, B = 8, P = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [S-1:0] clr;
  logic [S-1:0][1:0] clr_idx;
  logic [P-1:0] we;
  logic [P-1:0][0:0] w_seg;
  logic [P-1:0][1:0] w_idx;
  logic [P-1:0][2:0] w_beat;
  logic [P-1:0][15:0] w_tag;
  logic [S-1:0][D-1:0][B-1:0] tvalid;
  logic [S-1:0][D-1:0][B-1:0][15:0] tag;

  data_log #(.N_SEG(S), .LOG_DEPTH(D), .MAX_BEATS(B), .N_WP(P)) dut (.clk, .rst_n,
    .clr, .clr_idx, .we, .w_seg, .w_idx, .w_beat, .w_tag, .tvalid, .tag);

  bit r_v [S][D][B];
  logic [15:0] r_t [S][D][B];

  initial begin
    clr = '0; clr_idx = '0; we = '0; w_seg = '0; w_idx = '0; w_beat = '0; w_tag = '0;
    foreach (r_v[s, d, b]) begin r_v[s][d][b] = 0; r_t[s][d][b] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bit hit [S][D][B];
      bit chit [S][D];
      @(negedge clk);
      foreach (r_v[s, d, b]) begin
        checks++;
        if (tvalid[s][d][b] != r_v[s][d][b] || (r_v[s][d][b] && tag[s][d][b] != r_t[s][d][b])) begin
          failures++;
          $display("FAIL cycle %0d [%0d][%0d][%0d]: v%b/%b tag %h/%h", n, s, d, b,
                   tvalid[s][d][b], r_v[s][d][b], tag[s][d][b], r_t[s][d][b]);
        end
      end
      foreach (hit[s, d, b]) hit[s][d][b] = 0;
      foreach (chit[s, d]) chit[s][d] = 0;
      for (int s = 0; s < S; s++) begin
        clr[s] = ($urandom % 8) == 0; clr_idx[s] = 2'($urandom);
        if (clr[s]) chit[s][clr_idx[s]] = 1;
      end
      for (int p = 0; p < P; p++) begin
        we[p] = $urandom; w_seg[p] = 1'($urandom); w_idx[p] = 2'($urandom);
        w_beat[p] = 3'($urandom); w_tag[p] = 16'($urandom);
        // one writer per beat and no write to an entry being cleared
        if (hit[w_seg[p]][w_idx[p]][w_beat[p]] || chit[w_seg[p]][w_idx[p]]) we[p] = 0;
        if (we[p]) hit[w_seg[p]][w_idx[p]][w_beat[p]] = 1;
      end
      for (int p = 0; p < P; p++)
        if (we[p]) begin
          r_v[w_seg[p]][w_idx[p]][w_beat[p]] = 1;
          r_t[w_seg[p]][w_idx[p]][w_beat[p]] = w_tag[p];
        end
      for (int s = 0; s < S; s++)
        if (clr[s]) for (int b = 0; b < B; b++) r_v[s][clr_idx[s]][b] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
