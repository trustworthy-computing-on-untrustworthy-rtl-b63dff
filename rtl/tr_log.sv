// tr_log: transaction log (TR_log) of the interconnect wrapper. One instance
// logs reads, another writes. It has N_M segments of LOG_DEPTH entries; segment
// i belongs to master i. An entry holds the request as the master issued it
// (id, addr, len, target slave) and the progress seen on each side of the
// interconnect.
//
// To let master and slave interface units work on the log in the same cycle,
// the master-side fields (mq) and slave-side fields (sq) are separate register
// sets with separate update ports:
//   master unit i : alloc (new entry, clears its slave-side fields),
//                   inc (one more beat on the master side), free;
//   slave unit j  : fwd (request admitted at the slave), inc (one more beat on
//                   the slave side), resp (write response admitted).
// Updates take effect at the next clock edge; all contents are outputs so any
// unit can search them combinationally. The field split is this design's choice.
module tr_log
  import tcuc_pkg::*;
#(
  parameter int unsigned N_M       = 2,
  parameter int unsigned N_S       = 2,
  parameter int unsigned LOG_DEPTH = 4,
  localparam int unsigned LI_W     = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1
) (
  input  logic clk,
  input  logic rst_n,
  // master-side ports, one per master (segment = port number)
  input  logic [N_M-1:0]           m_alloc,
  input  logic [N_M-1:0][LI_W-1:0] m_alloc_idx,
  input  ax_t  [N_M-1:0]           m_alloc_req,
  input  logic [N_M-1:0][SI_W-1:0] m_alloc_slv,
  input  logic [N_M-1:0]           m_inc,
  input  logic [N_M-1:0][LI_W-1:0] m_inc_idx,
  input  logic [N_M-1:0]           m_free,
  input  logic [N_M-1:0][LI_W-1:0] m_free_idx,
  // slave-side ports, one per slave
  input  logic [N_S-1:0]           s_fwd,
  input  logic [N_S-1:0][MI_W-1:0] s_fwd_seg,
  input  logic [N_S-1:0][LI_W-1:0] s_fwd_idx,
  input  logic [N_S-1:0]           s_inc,
  input  logic [N_S-1:0][MI_W-1:0] s_inc_seg,
  input  logic [N_S-1:0][LI_W-1:0] s_inc_idx,
  input  logic [N_S-1:0]           s_resp,
  input  logic [N_S-1:0][MI_W-1:0] s_resp_seg,
  input  logic [N_S-1:0][LI_W-1:0] s_resp_idx,
  // contents
  output logic [N_M-1:0][LOG_DEPTH-1:0]             q_valid,
  output ax_t  [N_M-1:0][LOG_DEPTH-1:0]             q_req,
  output logic [N_M-1:0][LOG_DEPTH-1:0][SI_W-1:0]   q_slv,
  output logic [N_M-1:0][LOG_DEPTH-1:0][CNT_W-1:0]  q_mbeats,
  output logic [N_M-1:0][LOG_DEPTH-1:0]             q_fwd,
  output logic [N_M-1:0][LOG_DEPTH-1:0][CNT_W-1:0]  q_sbeats,
  output logic [N_M-1:0][LOG_DEPTH-1:0]             q_resp
);
  initial begin
    assert (N_M <= 2**MI_W) else $error("tr_log: N_M exceeds the master index width");
    assert (N_S <= 2**SI_W) else $error("tr_log: N_S exceeds the slave index width");
  end

  // master-side fields
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_valid  <= '0;
      q_req    <= '0;
      q_slv    <= '0;
      q_mbeats <= '0;
    end else begin
      for (int i = 0; i < N_M; i++) begin
        if (m_inc[i])  q_mbeats[i][m_inc_idx[i]] <= q_mbeats[i][m_inc_idx[i]] + 1'b1;
        if (m_free[i]) q_valid[i][m_free_idx[i]] <= 1'b0;
        if (m_alloc[i]) begin
          q_valid[i][m_alloc_idx[i]]  <= 1'b1;
          q_req[i][m_alloc_idx[i]]    <= m_alloc_req[i];
          q_slv[i][m_alloc_idx[i]]    <= m_alloc_slv[i];
          q_mbeats[i][m_alloc_idx[i]] <= '0;
        end
      end
    end
  end

  // slave-side fields; an allocation resets them
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_fwd    <= '0;
      q_sbeats <= '0;
      q_resp   <= '0;
    end else begin
      for (int j = 0; j < N_S; j++) begin
        if (s_fwd[j])  q_fwd[s_fwd_seg[j]][s_fwd_idx[j]] <= 1'b1;
        if (s_inc[j])  q_sbeats[s_inc_seg[j]][s_inc_idx[j]] <= q_sbeats[s_inc_seg[j]][s_inc_idx[j]] + 1'b1;
        if (s_resp[j]) q_resp[s_resp_seg[j]][s_resp_idx[j]] <= 1'b1;
      end
      for (int i = 0; i < N_M; i++) begin
        if (m_alloc[i]) begin
          q_fwd[i][m_alloc_idx[i]]    <= 1'b0;
          q_sbeats[i][m_alloc_idx[i]] <= '0;
          q_resp[i][m_alloc_idx[i]]   <= 1'b0;
        end
      end
    end
  end
endmodule
