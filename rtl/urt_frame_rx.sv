// urt_frame_rx: receives one protocol message from the line.
//
// The Manchester decoder delivers the bits after a sync pattern. They are
// shifted into a register and run through the CRC checker at the same time.
// When the decoder reports the end of the frame, `frame_valid` pulses with
// the last MAX_PAYLOAD bits before the CRC right-aligned in `payload`, the
// number of payload bits in `len` (bits received minus 16) and `crc_ok`.
// The frame length is thus found from the line itself, so one receiver takes
// every message of the protocol; the user checks that `len` fits the type. A
// frame shorter than the CRC, or longer than payload plus CRC, gives
// `crc_ok` = 0.
//
// Timing: `frame_valid` comes one clock after the decoder's `frame_end`,
// about one bit cell after the last CRC bit.
module urt_frame_rx
  import urt_pkg::*;
#(
  parameter int unsigned HALF = HALF_BIT_CLKS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   enable,
  input  logic                   line_in,
  output logic                   frame_valid,
  output logic [MAX_PAYLOAD-1:0] payload,
  output logic [LEN_W-1:0]       len,
  output logic                   crc_ok
);

  localparam int unsigned SR_W = MAX_PAYLOAD + CRC_W;

  logic             frame_start, bit_valid, bit_out, frame_end;
  logic [SR_W-1:0]  sr;
  logic [LEN_W-1:0] nbits;
  logic [CRC_W-1:0] crc;
  logic             crc_zero;

  manchester_rx #(.HALF(HALF)) u_dec (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (enable),
    .line_in    (line_in),
    .frame_start(frame_start),
    .bit_valid  (bit_valid),
    .bit_out    (bit_out),
    .frame_end  (frame_end)
  );

  crc16_serial u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(frame_start),
    .en   (bit_valid),
    .din  (bit_out),
    .crc  (crc),
    .zero (crc_zero)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr          <= '0;
      nbits       <= '0;
      frame_valid <= 1'b0;
      payload     <= '0;
      len         <= '0;
      crc_ok      <= 1'b0;
    end else begin
      frame_valid <= 1'b0;
      if (frame_start) begin
        sr    <= '0;
        nbits <= '0;
      end else if (bit_valid) begin
        sr    <= {sr[SR_W-2:0], bit_out};
        nbits <= (nbits == '1) ? nbits : nbits + 1'b1;
      end else if (frame_end) begin
        frame_valid <= 1'b1;
        payload     <= sr[SR_W-1:CRC_W];
        len         <= (nbits > LEN_W'(CRC_W)) ? nbits - LEN_W'(CRC_W) : '0;
        crc_ok      <= crc_zero && nbits > LEN_W'(CRC_W) && nbits <= LEN_W'(SR_W);
      end
    end
  end

endmodule
