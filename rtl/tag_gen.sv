// tag_gen: data tag generation unit. A one-cycle register stage on a data
// channel (W from a master IP, R from a slave IP) that attaches to each beat a
// TAG_W-bit tag, tag_fn(UID, beat index, data), so that the far side of the
// interconnect can prove where the beat came from and that it is unmodified.
// The beat index restarts after every beat with `last` set (bursts are assumed
// not to interleave at the source). Payload type T carries the rest of the
// channel unchanged. Latency: 1 cycle, full throughput.
module tag_gen
  import tcuc_pkg::*;
#(
  parameter type               T   = w_t,
  parameter logic [UID_W-1:0]  UID = '0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  T                  in_pay,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  output logic              out_valid,
  input  logic              out_ready,
  output T                  out_pay,
  output logic [TAG_W-1:0]  out_tag
);
  typedef struct packed {
    T                 pay;
    logic [TAG_W-1:0] tag;
  } tagged_t;

  logic [7:0] beat;
  tagged_t    d_in, d_out;

  assign d_in.pay = in_pay;
  assign d_in.tag = tag_fn(UID, beat, in_data);

  tcuc_reg #(.T(tagged_t)) u_reg (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(d_in),
    .out_valid, .out_ready, .out_data(d_out)
  );
  assign out_pay = d_out.pay;
  assign out_tag = d_out.tag;

  always_ff @(posedge clk) begin
    if (!rst_n)                     beat <= '0;
    else if (in_valid && in_ready)  beat <= in_last ? '0 : beat + 1'b1;
  end
endmodule
