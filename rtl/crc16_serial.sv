// crc16_serial: bit-serial CRC generator and checker.
//
// A linear feedback shift register, one message bit per enabled clock, most
// significant bit of the message first. `clear` presets the register to INIT.
// A transmitter sends the register, MSB first, after the payload; a receiver
// that runs the same register over payload and CRC ends with zero (`zero`).
// The protocol only names a 16-bit CRC; the polynomial (CCITT, 0x1021) and the
// preset are this design's choice, set in urt_pkg.
//
// Timing: `crc` holds the CRC of all bits entered up to the previous clock.
module crc16_serial
  import urt_pkg::*;
#(
  parameter logic [CRC_W-1:0] POLY = CRC_POLY,
  parameter logic [CRC_W-1:0] INIT = CRC_INIT
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,   // preset register (wins over en)
  input  logic             en,      // shift one bit in
  input  logic             din,
  output logic [CRC_W-1:0] crc,
  output logic             zero     // register is all zeros
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      crc <= INIT;
    else if (clear)
      crc <= INIT;
    else if (en)
      crc <= {crc[CRC_W-2:0], 1'b0} ^ ((crc[CRC_W-1] ^ din) ? POLY : '0);
  end

  assign zero = (crc == '0);

endmodule
