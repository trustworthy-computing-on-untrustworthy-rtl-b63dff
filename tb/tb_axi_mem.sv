// tb_axi_mem: behavioural AXI slave memory for testbenches (a slave IP model),
// not part of the design. Word-addressed array of WORDS entries; serves one
// write and one read burst at a time, answers B after the last W beat and R
// beats one per cycle. Misbehaviour for tests: `flood_r` sends one R beat with
// ID flood_id that nobody asked for, `flood_b` one unsolicited B.
module tb_axi_mem
  import tcuc_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic clk,
  input  logic rst_n,
  input  logic flood_r,
  input  logic flood_b,
  input  logic [XID_W-1:0] flood_id,
  input  logic aw_valid, output logic aw_ready, input  ax_t aw,
  input  logic w_valid,  output logic w_ready,  input  w_t  w,
  output logic b_valid,  input  logic b_ready,  output b_t  b,
  input  logic ar_valid, output logic ar_ready, input  ax_t ar,
  output logic r_valid,  input  logic r_ready,  output r_t  r
);
  localparam int AW_ = $clog2(WORDS);
  logic [DATA_W-1:0] mem [WORDS];
  logic       wbusy, bpend, rbusy;
  ax_t        wreq, rreq;
  logic [LEN_W-1:0] wcnt, rcnt;

  assign aw_ready = !wbusy && !bpend;
  assign w_ready  = wbusy;
  assign ar_ready = !rbusy;

  always_comb begin
    b_valid = bpend || (flood_b && !bpend);
    b       = bpend ? '{id: wreq.id, resp: 2'b00} : '{id: flood_id, resp: 2'b00};
    r_valid = rbusy || (flood_r && !rbusy);
    r       = rbusy ? '{id: rreq.id, data: mem[AW_'((rreq.addr >> 2) + 32'(rcnt))], resp: 2'b00,
                        last: (rcnt == rreq.len)}
                    : '{id: flood_id, data: 32'hF100_D000, resp: 2'b00, last: 1'b1};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbusy <= 1'b0; bpend <= 1'b0; rbusy <= 1'b0;
      wreq <= '0; rreq <= '0; wcnt <= '0; rcnt <= '0;
      for (int k = 0; k < WORDS; k++) mem[k] <= DATA_W'(k) ^ 32'hA5A5_0000;
    end else begin
      if (aw_valid && aw_ready) begin wbusy <= 1'b1; wreq <= aw; wcnt <= '0; end
      if (w_valid && w_ready) begin
        mem[AW_'((wreq.addr >> 2) + 32'(wcnt))] <= w.data;
        wcnt <= wcnt + 1'b1;
        if (w.last) begin wbusy <= 1'b0; bpend <= 1'b1; end
      end
      if (b_valid && b_ready && bpend) bpend <= 1'b0;
      if (ar_valid && ar_ready) begin rbusy <= 1'b1; rreq <= ar; rcnt <= '0; end
      if (r_valid && r_ready && rbusy) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == rreq.len) rbusy <= 1'b0;
      end
    end
  end
endmodule
