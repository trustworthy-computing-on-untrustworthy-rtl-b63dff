// access_ctrl: access control unit of a master IP wrapper. A request is allowed
// when every byte of its burst lies inside the master's address window
// [ACC_LO, ACC_HI]. The window is set per master by the SoC integrator; the
// range form of the check, and the byte-exact burst end, are this design's
// choices. Interface: start address and AXI length (beats - 1) in, `allowed`
// out. Purely combinational. With the default ACC_LO of 0 the lower bound
// test is always true; lint tools note the constant comparison and synthesis
// drops it.
module access_ctrl
  import tcuc_pkg::*;
#(
  parameter logic [ADDR_W-1:0] ACC_LO = '0,
  parameter logic [ADDR_W-1:0] ACC_HI = '1
) (
  input  logic [ADDR_W-1:0] addr,
  input  logic [LEN_W-1:0]  len,
  output logic              allowed
);
  logic [ADDR_W:0] last_byte;   // one extra bit so a wrap past 2^ADDR_W is caught

  always_comb begin
    last_byte = {1'b0, addr} + ((ADDR_W+1)'(len) + 1) * (ADDR_W+1)'(BYTES) - 1;
    allowed   = (addr >= ACC_LO) && (last_byte <= {1'b0, ACC_HI});
  end
endmodule
