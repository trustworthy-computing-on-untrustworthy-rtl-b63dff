// tb_access_ctrl: checks the address-window test of the access control unit
// against a 64-bit reference, on the window edges and on random bursts.
module tb_access_ctrl;
  import tcuc_pkg::*;
  localparam logic [31:0] LO = 32'h0000_1000, HI = 32'h0000_1FFF;
  logic [31:0] addr;
  logic [7:0]  len;
  logic        allowed;
  int checks = 0, failures = 0;

  access_ctrl #(.ACC_LO(LO), .ACC_HI(HI)) dut (.addr, .len, .allowed);

  task automatic try(input logic [31:0] a, input logic [7:0] l);
    longint unsigned last;
    bit exp;
    addr = a; len = l;
    #1;
    last = longint'(a) + (longint'(l) + 1) * 4 - 1;
    exp  = (longint'(a) >= longint'(LO)) && (last <= longint'(HI));
    checks++;
    if (allowed !== exp) begin
      failures++;
      $display("FAIL addr=%h len=%0d allowed=%b expected %b", a, l, allowed, exp);
    end
  endtask

  initial begin
    try(32'h0000_1000, 0);     // first word
    try(32'h0000_0FFC, 0);     // just below
    try(32'h0000_1FFC, 0);     // last word
    try(32'h0000_1FFC, 1);     // runs past the end
    try(32'h0000_1FC0, 15);    // ends exactly at the end
    try(32'h0000_1FC4, 15);    // one word too long
    try(32'hFFFF_FFFC, 1);     // wraps around
    for (int k = 0; k < 2000; k++)
      try(32'h0000_0F00 + ($urandom % 32'h1200), 8'($urandom % 20));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
