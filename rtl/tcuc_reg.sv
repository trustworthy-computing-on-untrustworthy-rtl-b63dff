// tcuc_reg: one-deep valid/ready register slice used for every channel stage of
// the wrappers. Each stage adds exactly one clock cycle of latency and keeps
// full throughput: the input is ready whenever the register is empty or is
// being emptied in the same cycle. The payload type is a parameter.
module tcuc_reg #(
  parameter type T = logic [31:0]
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data
);
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else if (in_ready) begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data;
    end
  end
endmodule
