// tfc_pkg: types and constants shared by the TFC link gateware.
//
// The downstream link carries one 80-bit user data word per 40 MHz frame
// clock (the data field of a GBT frame). This package fixes how a word is
// laid out as a TFC message: an 8-bit message kind, 8 reserved bits and a
// 64-bit payload. A timing message carries the 64-bit timestamp of the
// Master; a user message carries a 64-bit test word programmed over
// Wishbone; an idle word is sent when there is nothing else.
//
// Downstream (Master to Endpoint) the link also carries fast control
// commands, such as throttling decisions; upstream (Endpoint to Master) it
// carries Endpoint status messages. A command message holds a 16-bit command
// code in payload bits 15:0. A status message holds the Endpoint's 32-bit
// board status in payload bits 63:32 (bit 32, the first status bit, means
// "busy, please throttle"), its time adjustment count in bits 31:16 and its
// synchronised flag in bit 0.
//
// The 64-bit timestamp, the 40 MHz frame rate and the existence of the
// command and status paths follow the design's description. The 80-bit
// word width is the GBT frame's data field; the message layouts, command
// codes and code values are this design's own choice.
package tfc_pkg;

  localparam int unsigned DATA_W = 80;  // GBT user data word
  localparam int unsigned TS_W   = 64;  // timestamp / time counter width

  typedef enum logic [7:0] {
    MSG_IDLE = 8'h00,
    MSG_TIME = 8'h5A,
    MSG_USER   = 8'hC3,
    MSG_CMD    = 8'h96,
    MSG_STATUS = 8'h69
  } msg_kind_e;

  typedef enum logic [15:0] {
    CMD_NOP          = 16'h0000,
    CMD_THROTTLE_ON  = 16'h0001,
    CMD_THROTTLE_OFF = 16'h0002
  } cmd_code_e;

  // Bit of the board status word that asks for throttling.
  localparam int unsigned STATUS_BUSY_BIT = 0;

  typedef struct packed {
    msg_kind_e         kind;
    logic [7:0]        rsvd;
    logic [TS_W-1:0]   payload;
  } tfc_frame_t;

  localparam tfc_frame_t IDLE_FRAME = '{kind: MSG_IDLE, rsvd: 8'h00, payload: '0};

  function automatic tfc_frame_t make_frame(msg_kind_e kind, logic [TS_W-1:0] payload);
    tfc_frame_t f;
    f.kind    = kind;
    f.rsvd    = 8'h00;
    f.payload = payload;
    return f;
  endfunction

endpackage
