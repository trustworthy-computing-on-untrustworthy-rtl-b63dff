// tcuc_pkg: shared constants, AXI channel payload types, alarm codes and the
// data-tag function of the interconnect-guarding wrappers.
//
// All channels use valid/ready handshakes; the structs below are the payloads.
// A single ID width (XID_W) is used everywhere: master-side IDs use the low
// ID_W bits, and the interconnect puts the master index in the upper MI_W bits
// on its slave side. Widths are this design's choice (the scheme is width
// independent). The tag function is a CRC-16-CCITT over the source wrapper ID,
// the beat index and the data beat; the scheme only requires a tag that binds a
// beat to its position and its source, the CRC is this design's choice.
package tcuc_pkg;

  localparam int ADDR_W = 32;
  localparam int DATA_W = 32;
  localparam int ID_W   = 4;              // ID width issued by a master IP
  localparam int MI_W   = 2;              // master index added by the interconnect
  localparam int XID_W  = ID_W + MI_W;    // ID width on every wrapped channel
  localparam int SI_W   = 2;              // slave index width
  localparam int LEN_W  = 8;              // AXI4 burst length field
  localparam int CNT_W  = LEN_W + 1;      // beat counters (0 .. 256)
  localparam int TAG_W  = 16;
  localparam int UID_W  = 8;              // wrapper ID width
  localparam int S_UID_BASE = 8;          // slave wrapper j has ID S_UID_BASE + j
  localparam int BYTES  = DATA_W / 8;

  typedef struct packed {
    logic [XID_W-1:0]  id;
    logic [ADDR_W-1:0] addr;
    logic [LEN_W-1:0]  len;
  } ax_t;                                  // AW and AR payload

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic              last;
  } w_t;

  typedef struct packed {
    logic [XID_W-1:0] id;
    logic [1:0]       resp;
  } b_t;

  typedef struct packed {
    logic [XID_W-1:0]  id;
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } r_t;

  // Alarm bit positions. Every guarding unit reports a vector of ALM_N bits,
  // each a one-cycle pulse when the event is detected and the transfer blocked.
  typedef enum int {
    ALM_ACCESS  = 0,   // W(M): request outside the master's allowed range
    ALM_DECODE  = 1,   // U(M): unmapped address or burst longer than the log holds
    ALM_AW_UNEXP= 2,   // U(S): AW with no matching logged request (forged/diverted/modified)
    ALM_AR_UNEXP= 3,   // U(S): AR with no matching logged request
    ALM_W_UNEXP = 4,   // U(S): W beat with no admitted write burst (flooding/shadowing)
    ALM_W_TAG   = 5,   // U(S): write data tag mismatch (modification/masquerade)
    ALM_W_LAST  = 6,   // U(M): WLAST inconsistent with the logged length
    ALM_B_UNEXP = 7,   // U(S)/U(M): write response with no matching transaction
    ALM_R_UNEXP = 8,   // U(S)/U(M): read beat with no matching transaction
    ALM_R_TAG   = 9    // U(M): read data tag mismatch (modification/masquerade)
  } alarm_e;
  localparam int ALM_N = 10;

  typedef logic [ALM_N-1:0] alarm_t;

  // Data tag: CRC-16-CCITT (polynomial 0x1021, initial value 0xFFFF), MSB
  // first, over {uid, beat, data}.
  function automatic logic [TAG_W-1:0] tag_fn(input logic [UID_W-1:0] uid,
                                              input logic [7:0] beat,
                                              input logic [DATA_W-1:0] data);
    logic [UID_W+8+DATA_W-1:0] msg;
    logic [TAG_W-1:0] crc;
    logic fb;
    msg = {uid, beat, data};
    crc = 16'hFFFF;
    for (int i = UID_W + 8 + DATA_W - 1; i >= 0; i--) begin
      fb  = crc[15] ^ msg[i];
      crc = {crc[14:0], 1'b0};
      if (fb) crc = crc ^ 16'h1021;
    end
    return crc;
  endfunction

endpackage
