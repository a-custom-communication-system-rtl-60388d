// urt_pkg: shared types and constants of the master/slave I/O link.
//
// The link carries two kinds of message over one shared two-wire line. The
// master (central unit) sends checking, switch-off, digital and mixed
// messages; a slave (peripheral unit) answers with the state of its inputs.
// Every message is: sync pattern, 5-bit address, (master only) 2-bit type,
// payload, 16-bit CRC. Field widths and type codes follow the message layout
// of the protocol; the CRC polynomial, the bit order and the line timing are
// this design's choices.
package urt_pkg;

  // Field widths of the protocol
  localparam int unsigned ADDR_W = 5;   // peripheral address
  localparam int unsigned TYPE_W = 2;   // message type (master to slave)
  localparam int unsigned DIG_W  = 10;  // digital outputs / inputs of a slave
  localparam int unsigned ANA_W  = 8;   // analogue output / input of a slave
  localparam int unsigned CRC_W  = 16;

  // Longest payload (everything between sync and CRC): mixed message
  localparam int unsigned MAX_PAYLOAD = ADDR_W + TYPE_W + DIG_W + ANA_W; // 25
  localparam int unsigned LEN_W       = 6;  // holds 0..63 bits

  // Payload lengths of each message, in bits
  localparam int unsigned LEN_SHORT  = ADDR_W + TYPE_W;                  // check, switch-off: 7
  localparam int unsigned LEN_DIG    = ADDR_W + TYPE_W + DIG_W;          // digital: 17
  localparam int unsigned LEN_MIXED  = ADDR_W + TYPE_W + DIG_W + ANA_W;  // mixed: 25
  localparam int unsigned LEN_ANSWER = ADDR_W + DIG_W + ANA_W;           // answer: 23

  typedef enum logic [TYPE_W-1:0] {
    MSG_DIGITAL = 2'b00,
    MSG_SWOFF   = 2'b01,
    MSG_MIXED   = 2'b10,
    MSG_CHECK   = 2'b11
  } msg_type_e;

  // Address 0 is the broadcast address of the switch-off message; the sweep
  // polls addresses 1 .. last.
  localparam logic [ADDR_W-1:0] BCAST_ADDR = '0;

  // CRC-16-CCITT polynomial x^16 + x^12 + x^5 + 1, register preset to all ones,
  // no reflection, no final inversion: CRC over payload and CRC is then zero.
  localparam logic [CRC_W-1:0] CRC_POLY = 16'h1021;
  localparam logic [CRC_W-1:0] CRC_INIT = 16'hFFFF;

  // Line rate
  localparam int unsigned BAUD   = 9600;
  localparam int unsigned CLK_HZ = 11_059_200;           // system clock
  localparam int unsigned HALF_BIT_CLKS = CLK_HZ / (2 * BAUD);  // 576

endpackage
