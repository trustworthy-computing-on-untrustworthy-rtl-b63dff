// data_log: data log (DATA_log) of the interconnect wrapper. For every entry of
// the matching transaction log it holds, per beat, the tag that the data's
// source wrapper attached and a valid bit. The unit on the source side of the
// interconnect writes a beat's tag when it sends the beat in; the unit on the
// destination side reads it when the beat comes out and compares it with a
// tag it recomputes from the received data.
//   clr[p]  : clear the valid bits of entry clr_idx[p] of segment p (on
//             allocation of that log entry),
//   we[k]   : write port k stores w_tag[k] for (w_seg, w_idx, w_beat).
// Writes take effect at the next clock edge; contents are outputs. Tags are
// kept for every beat so that the interconnect may buffer several beats; this
// organisation is this design's choice.
module data_log
  import tcuc_pkg::*;
#(
  parameter int unsigned N_SEG     = 2,
  parameter int unsigned LOG_DEPTH = 4,
  parameter int unsigned MAX_BEATS = 16,
  parameter int unsigned N_WP      = 2,
  localparam int unsigned LI_W = (LOG_DEPTH > 1) ? $clog2(LOG_DEPTH) : 1,
  localparam int unsigned BI_W = (MAX_BEATS > 1) ? $clog2(MAX_BEATS) : 1,
  localparam int unsigned SG_W = (N_SEG > 1) ? $clog2(N_SEG) : 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic [N_SEG-1:0]            clr,
  input  logic [N_SEG-1:0][LI_W-1:0]  clr_idx,
  input  logic [N_WP-1:0]             we,
  input  logic [N_WP-1:0][SG_W-1:0]   w_seg,
  input  logic [N_WP-1:0][LI_W-1:0]   w_idx,
  input  logic [N_WP-1:0][BI_W-1:0]   w_beat,
  input  logic [N_WP-1:0][TAG_W-1:0]  w_tag,
  output logic [N_SEG-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0]             tvalid,
  output logic [N_SEG-1:0][LOG_DEPTH-1:0][MAX_BEATS-1:0][TAG_W-1:0]  tag
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tvalid <= '0;
    end else begin
      for (int k = 0; k < N_WP; k++)
        if (we[k]) tvalid[w_seg[k]][w_idx[k]][w_beat[k]] <= 1'b1;
      for (int p = 0; p < N_SEG; p++)
        if (clr[p]) tvalid[p][clr_idx[p]] <= '0;
    end
  end

  // tag storage needs no reset: a tag is only read when its valid bit is set
  always_ff @(posedge clk) begin
    for (int k = 0; k < N_WP; k++)
      if (we[k]) tag[w_seg[k]][w_idx[k]][w_beat[k]] <= w_tag[k];
  end
endmodule
