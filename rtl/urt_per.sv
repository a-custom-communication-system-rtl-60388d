// urt_per: the peripheral unit (slave) of the I/O link.
//
// A peripheral drives 10 digital outputs and one 8-bit analogue output (to a
// D/A converter) and reads 10 digital inputs and one 8-bit analogue input
// (from an A/D converter). Its 5-bit address is set with switches. It never
// speaks unless asked. Every frame on the line is received; a frame with a
// good CRC whose length fits its type is acted on:
//   check     (type 11, 7 bits)  addressed here: answer only
//   digital   (type 00, 17 bits) addressed here: set digital outputs, answer
//   mixed     (type 10, 25 bits) addressed here: set digital and analogue
//                                outputs, answer
//   switch-off(type 01, address 00000): every peripheral clears all outputs,
//                                none answers
// The answer carries the address, the digital inputs and the analogue input.
// Message layouts and the I/O counts follow the protocol. Answering digital
// and mixed messages (not only checks), the turnaround pause and the
// reset value of the outputs (all off) are this design's choices. Address 0
// is the broadcast address and is never answered.
//
// Timing: the answer starts TURN_BITS bit cells after the end of the received
// frame; inputs are sampled when it starts. The receiver is off while the
// peripheral waits to answer and while it sends.
module urt_per
  import urt_pkg::*;
#(
  parameter int unsigned HALF      = HALF_BIT_CLKS,
  parameter int unsigned TURN_BITS = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] my_addr,   // address switches
  input  logic              line_in,
  output logic              line_out,  // low when not sending
  input  logic [DIG_W-1:0]  dig_in,    // asynchronous digital inputs
  input  logic [ANA_W-1:0]  ana_in,    // A/D converter result
  output logic [DIG_W-1:0]  dig_out,
  output logic [ANA_W-1:0]  ana_out    // to the D/A converter
);

  localparam int unsigned TURN_CLKS = TURN_BITS * 2 * HALF;
  localparam int unsigned TW = $clog2(TURN_CLKS + 2);

  logic                   rx_valid, rx_crc_ok;
  logic [MAX_PAYLOAD-1:0] rx_p;
  logic [LEN_W-1:0]       rx_len;
  logic                   tx_start, tx_busy, tx_done;
  logic [MAX_PAYLOAD-1:0] tx_p;
  logic [DIG_W-1:0]       din_s1, din_s2;
  logic                   answering;      // waiting for turnaround or sending
  logic [TW-1:0]          turn_cnt;

  urt_frame_rx #(.HALF(HALF)) u_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .enable     (!answering),
    .line_in    (line_in),
    .frame_valid(rx_valid),
    .payload    (rx_p),
    .len        (rx_len),
    .crc_ok     (rx_crc_ok)
  );

  // Fields of a received master message, by length
  logic [ADDR_W-1:0] f_addr;
  msg_type_e         f_type;
  logic              f_known;
  always_comb begin
    f_addr  = '0;
    f_type  = MSG_CHECK;
    f_known = 1'b0;
    unique case (rx_len)
      LEN_W'(LEN_SHORT): begin
        f_addr  = rx_p[6:2];
        f_type  = msg_type_e'(rx_p[1:0]);
        f_known = (f_type == MSG_CHECK) || (f_type == MSG_SWOFF && f_addr == BCAST_ADDR);
      end
      LEN_W'(LEN_DIG): begin
        f_addr  = rx_p[16:12];
        f_type  = msg_type_e'(rx_p[11:10]);
        f_known = (f_type == MSG_DIGITAL);
      end
      LEN_W'(LEN_MIXED): begin
        f_addr  = rx_p[24:20];
        f_type  = msg_type_e'(rx_p[19:18]);
        f_known = (f_type == MSG_MIXED);
      end
      default: ;
    endcase
  end

  logic accept, for_me, swoff;
  assign accept = rx_valid && rx_crc_ok && f_known;
  assign swoff  = accept && f_type == MSG_SWOFF;
  assign for_me = accept && f_type != MSG_SWOFF && f_addr == my_addr && my_addr != BCAST_ADDR;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dig_out   <= '0;
      ana_out   <= '0;
      din_s1    <= '0;
      din_s2    <= '0;
      answering <= 1'b0;
      turn_cnt  <= '0;
      tx_start  <= 1'b0;
      tx_p      <= '0;
    end else begin
      din_s1   <= dig_in;
      din_s2   <= din_s1;
      tx_start <= 1'b0;
      if (swoff) begin
        dig_out <= '0;
        ana_out <= '0;
      end
      if (for_me) begin
        if (f_type == MSG_DIGITAL) dig_out <= rx_p[9:0];
        if (f_type == MSG_MIXED) begin
          dig_out <= rx_p[17:8];
          ana_out <= rx_p[7:0];
        end
        answering <= 1'b1;
        turn_cnt  <= '0;
      end
      if (answering && !tx_busy && !tx_start) begin
        if (turn_cnt == TW'(TURN_CLKS)) begin
          // turnaround over: sample the inputs and send
          tx_p     <= MAX_PAYLOAD'({my_addr, din_s2, ana_in});
          tx_start <= 1'b1;
          turn_cnt <= turn_cnt + 1'b1;
        end else if (turn_cnt < TW'(TURN_CLKS))
          turn_cnt <= turn_cnt + 1'b1;
      end
      if (tx_done) answering <= 1'b0;
    end
  end

  urt_frame_tx #(.HALF(HALF)) u_tx (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (tx_start),
    .payload(tx_p),
    .len    (LEN_W'(LEN_ANSWER)),
    .busy   (tx_busy),
    .done   (tx_done),
    .line   (line_out)
  );

  // A peripheral only drives the line while it answers
  assert property (@(posedge clk) disable iff (!rst_n) line_out |-> answering);

endmodule
