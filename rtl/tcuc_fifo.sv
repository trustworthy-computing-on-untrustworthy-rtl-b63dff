// tcuc_fifo: small synchronous FIFO (register array) used by the guarding units
// to remember, in request order, which write burst the next W beats belong to.
// Push and pop may happen in the same cycle. Reading an empty FIFO returns the
// stale head; callers check `empty`.
module tcuc_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     push_data,
  input  logic pop,
  output T     head,
  output logic empty,
  output logic full
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  T mem [DEPTH];
  logic [PW-1:0] rp, wp;
  logic [PW:0]   cnt;

  assign empty = (cnt == 0);
  assign full  = (cnt == (PW+1)'(DEPTH));
  assign head  = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rp  <= '0;
      wp  <= '0;
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= push_data;
        wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      end
      if (pop && !empty) rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (PW+1)'(push && !full) - (PW+1)'(pop && !empty);
    end
  end
endmodule
