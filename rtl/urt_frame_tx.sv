// urt_frame_tx: sends one protocol message on the line.
//
// On `start` the payload (address, type and data fields, right-aligned in
// `payload`, `len` bits long) is captured. The Manchester encoder then sends
// the sync pattern, the payload most significant bit first, and the 16-bit
// CRC of the payload, also MSB first. The CRC is built bit by bit while the
// payload goes out. The message layout (sync, fields, CRC) is the protocol's;
// MSB-first order and the CRC polynomial are this design's choices.
//
// Timing: `done` pulses (6 + 2*(len+16)) * HALF clocks after `start`, plus
// one clock; `busy` is high in between.
module urt_frame_tx
  import urt_pkg::*;
#(
  parameter int unsigned HALF = HALF_BIT_CLKS
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [MAX_PAYLOAD-1:0] payload,
  input  logic [LEN_W-1:0]       len,      // payload bits, 1..MAX_PAYLOAD
  output logic                   busy,
  output logic                   done,
  output logic                   line
);

  logic [MAX_PAYLOAD-1:0] sr;        // payload, left-aligned
  logic [LEN_W-1:0]       rem;       // payload bits still to send
  logic [4:0]             crc_left;  // CRC bits still to send
  logic [CRC_W-1:0]       crc;
  logic                   have_bit, bit_in, bit_take, crc_zero, enc_busy;

  assign have_bit = (rem != '0) || (crc_left != '0);
  assign bit_in   = (rem != '0) ? sr[MAX_PAYLOAD-1] : crc[crc_left[3:0] - 4'd1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr       <= '0;
      rem      <= '0;
      crc_left <= '0;
    end else if (start && !enc_busy) begin
      sr       <= payload << (MAX_PAYLOAD - 32'(len));
      rem      <= len;
      crc_left <= 5'(CRC_W);
    end else if (bit_take) begin
      if (rem != '0) begin
        sr  <= sr << 1;
        rem <= rem - 1'b1;
      end else begin
        crc_left <= crc_left - 1'b1;
      end
    end
  end

  crc16_serial u_crc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(start && !enc_busy),
    .en   (bit_take && rem != '0),
    .din  (sr[MAX_PAYLOAD-1]),
    .crc  (crc),
    .zero (crc_zero)
  );

  manchester_tx #(.HALF(HALF)) u_enc (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (start),
    .have_bit(have_bit),
    .bit_in  (bit_in),
    .bit_take(bit_take),
    .busy    (enc_busy),
    .done    (done),
    .line    (line)
  );

  assign busy = enc_busy;

endmodule
