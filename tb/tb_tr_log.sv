// tb_tr_log: random operations from both master ports and both slave ports
// every cycle on a 2x4-entry transaction log, compared after every clock edge
// with a reference model kept here. Operations from different ports never hit
// the same field of the same entry in one cycle, as in the design where every
// entry has one owner per side.
module tb_tr_log;
  import tcuc_pkg::*;
  localparam int N_M = 2, N_S = 2, D = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N_M-1:0] m_alloc, m_inc, m_free;
  logic [N_M-1:0][1:0] m_alloc_idx, m_inc_idx, m_free_idx;
  ax_t [N_M-1:0] m_alloc_req;
  logic [N_M-1:0][SI_W-1:0] m_alloc_slv;
  logic [N_S-1:0] s_fwd, s_inc, s_resp;
  logic [N_S-1:0][MI_W-1:0] s_fwd_seg, s_inc_seg, s_resp_seg;
  logic [N_S-1:0][1:0] s_fwd_idx, s_inc_idx, s_resp_idx;
  logic [N_M-1:0][D-1:0] q_valid, q_fwd, q_resp;
  ax_t [N_M-1:0][D-1:0] q_req;
  logic [N_M-1:0][D-1:0][SI_W-1:0] q_slv;
  logic [N_M-1:0][D-1:0][CNT_W-1:0] q_mbeats, q_sbeats;

  tr_log #(.N_M(N_M), .N_S(N_S), .LOG_DEPTH(D)) dut (.clk, .rst_n,
    .m_alloc, .m_alloc_idx, .m_alloc_req, .m_alloc_slv, .m_inc, .m_inc_idx, .m_free, .m_free_idx,
    .s_fwd, .s_fwd_seg, .s_fwd_idx, .s_inc, .s_inc_seg, .s_inc_idx, .s_resp, .s_resp_seg, .s_resp_idx,
    .q_valid, .q_req, .q_slv, .q_mbeats, .q_fwd, .q_sbeats, .q_resp);

  // reference
  bit  r_valid [N_M][D], r_fwd [N_M][D], r_resp [N_M][D];
  ax_t r_req [N_M][D];
  int  r_slv [N_M][D], r_mb [N_M][D], r_sb [N_M][D];

  initial begin
    m_alloc = '0; m_inc = '0; m_free = '0; s_fwd = '0; s_inc = '0; s_resp = '0;
    m_alloc_idx = '0; m_inc_idx = '0; m_free_idx = '0; m_alloc_req = '0; m_alloc_slv = '0;
    s_fwd_seg = '0; s_inc_seg = '0; s_resp_seg = '0; s_fwd_idx = '0; s_inc_idx = '0; s_resp_idx = '0;
    for (int i = 0; i < N_M; i++)
      for (int e = 0; e < D; e++) begin
        r_valid[i][e] = 0; r_fwd[i][e] = 0; r_resp[i][e] = 0; r_req[i][e] = '0;
        r_slv[i][e] = 0; r_mb[i][e] = 0; r_sb[i][e] = 0;
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bit used_inc [N_M][D], used_fwd [N_M][D], used_resp [N_M][D], alloc_hit [N_M][D];
      @(negedge clk);
      // compare state
      for (int i = 0; i < N_M; i++)
        for (int e = 0; e < D; e++) begin
          checks++;
          if (q_valid[i][e] != r_valid[i][e] || q_fwd[i][e] != r_fwd[i][e] || q_resp[i][e] != r_resp[i][e] ||
              (r_valid[i][e] && (q_req[i][e] != r_req[i][e] || int'(q_slv[i][e]) != r_slv[i][e])) ||
              int'(q_mbeats[i][e]) != r_mb[i][e] || int'(q_sbeats[i][e]) != r_sb[i][e]) begin
            failures++;
            $display("FAIL cycle %0d entry %0d/%0d: v%b/%b f%b/%b r%b/%b mb%0d/%0d sb%0d/%0d", n, i, e,
                     q_valid[i][e], r_valid[i][e], q_fwd[i][e], r_fwd[i][e], q_resp[i][e], r_resp[i][e],
                     q_mbeats[i][e], r_mb[i][e], q_sbeats[i][e], r_sb[i][e]);
          end
        end
      foreach (used_inc[i, e]) begin used_inc[i][e] = 0; used_fwd[i][e] = 0; used_resp[i][e] = 0; alloc_hit[i][e] = 0; end
      // new random operations
      for (int i = 0; i < N_M; i++) begin
        m_alloc[i] = ($urandom % 3) == 0;
        m_alloc_idx[i] = 2'($urandom);
        m_alloc_req[i] = ax_t'({$urandom, $urandom});
        m_alloc_slv[i] = SI_W'($urandom);
        m_inc[i] = $urandom;  m_inc_idx[i] = 2'($urandom);
        m_free[i] = ($urandom % 4) == 0; m_free_idx[i] = 2'($urandom);
        if (m_alloc[i]) alloc_hit[i][m_alloc_idx[i]] = 1;
      end
      for (int j = 0; j < N_S; j++) begin
        s_fwd[j] = $urandom;  s_fwd_seg[j] = MI_W'($urandom % N_M);  s_fwd_idx[j] = 2'($urandom);
        s_inc[j] = $urandom;  s_inc_seg[j] = MI_W'($urandom % N_M);  s_inc_idx[j] = 2'($urandom);
        s_resp[j] = $urandom; s_resp_seg[j] = MI_W'($urandom % N_M); s_resp_idx[j] = 2'($urandom);
        if (used_fwd[s_fwd_seg[j]][s_fwd_idx[j]]) s_fwd[j] = 0;
        if (used_inc[s_inc_seg[j]][s_inc_idx[j]]) s_inc[j] = 0;
        if (used_resp[s_resp_seg[j]][s_resp_idx[j]]) s_resp[j] = 0;
        if (s_fwd[j]) used_fwd[s_fwd_seg[j]][s_fwd_idx[j]] = 1;
        if (s_inc[j]) used_inc[s_inc_seg[j]][s_inc_idx[j]] = 1;
        if (s_resp[j]) used_resp[s_resp_seg[j]][s_resp_idx[j]] = 1;
      end
      // reference update: allocation overrides everything else on its entry
      for (int i = 0; i < N_M; i++) begin
        if (m_inc[i])  r_mb[i][m_inc_idx[i]] = (r_mb[i][m_inc_idx[i]] + 1) % 512;
        if (m_free[i]) r_valid[i][m_free_idx[i]] = 0;
      end
      for (int j = 0; j < N_S; j++) begin
        if (s_fwd[j])  r_fwd[s_fwd_seg[j]][s_fwd_idx[j]] = 1;
        if (s_inc[j])  r_sb[s_inc_seg[j]][s_inc_idx[j]] = (r_sb[s_inc_seg[j]][s_inc_idx[j]] + 1) % 512;
        if (s_resp[j]) r_resp[s_resp_seg[j]][s_resp_idx[j]] = 1;
      end
      for (int i = 0; i < N_M; i++)
        if (m_alloc[i]) begin
          int e;
          e = int'(m_alloc_idx[i]);
          r_valid[i][e] = 1; r_req[i][e] = m_alloc_req[i]; r_slv[i][e] = int'(m_alloc_slv[i]);
          r_mb[i][e] = 0; r_fwd[i][e] = 0; r_sb[i][e] = 0; r_resp[i][e] = 0;
        end
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
