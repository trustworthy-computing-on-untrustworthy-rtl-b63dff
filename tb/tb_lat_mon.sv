// tb_lat_mon: testbench latency monitor. Every handshake at the upstream point
// (up_fire) is queued with its cycle number; every new beat appearing at the
// downstream point (dn_valid first seen, or seen again after a handshake) must
// arrive no earlier than LAT cycles later, and exactly LAT cycles later when
// nothing downstream held it up. A beat that waited longer is counted in
// `stalled`; a run where no beat ever took exactly LAT cycles is a failure.
module tb_lat_mon #(
  parameter int LAT = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic up_fire,
  input  logic dn_valid,
  input  logic dn_ready,
  output int   checks,
  output int   failures,
  output int   exact,
  output int   stalled
);
  longint cyc;
  longint q[$];
  logic   prev_valid, prev_fire;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      prev_valid <= 1'b0;
      prev_fire  <= 1'b0;
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (dn_valid && (!prev_valid || prev_fire)) begin
        if (q.size() == 0) begin
          checks   <= checks + 1;
          failures <= failures + 1;
          $display("LAT: beat with no upstream handshake at cycle %0d", cyc);
        end else begin
          checks <= checks + 1;
          if (cyc - q[0] < LAT) begin
            failures <= failures + 1;
            $display("LAT: latency %0d, expected %0d", cyc - q[0], LAT);
          end else if (cyc - q[0] == LAT) exact <= exact + 1;
          else stalled <= stalled + 1;
          void'(q.pop_front());
        end
      end
      if (up_fire) q.push_back(cyc);
      prev_valid <= dn_valid;
      prev_fire  <= dn_valid && dn_ready;
    end
  end

  initial begin
    checks = 0;
    failures = 0;
    exact = 0;
    stalled = 0;
  end
endmodule
