// manchester_rx: Manchester decoder for the shared I/O line.
//
// The line is first brought into the clock domain by two flip-flops. While
// idle the decoder measures how long the line stays high; a high period of
// 2.5 to 3.5 half-bits ended by a falling edge is the sync pattern sent by
// manchester_tx (data never stays high for more than two half-bits). The
// sync's low half must still be low at its middle. From there, bit cells
// follow every 2*HALF clocks. Each cell is sampled at a quarter and at three
// quarters of its length. Unequal samples make one bit, whose value is the
// first half (high-then-low is 1). Equal samples mean the cell has no middle
// transition: the frame has ended and `frame_end` pulses. Every transition
// seen between the two sampling points is taken as the middle of the cell
// and realigns the cell timer, so transmitter and receiver clocks need not
// match exactly. With `enable` low the decoder stays idle: a station turns
// its receiver off while it sends. Polarity, sync shape and the tolerance
// windows are this design's choices; the protocol only asks for Manchester
// code.
//
// Timing: `bit_valid` pulses 1.5 half-bits after the start of each cell
// plus the two synchroniser clocks; `frame_end` comes one cell after the
// last bit.
module manchester_rx
  import urt_pkg::*;
#(
  parameter int unsigned HALF = HALF_BIT_CLKS  // clocks per half bit cell
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic line_in,      // asynchronous line level
  output logic frame_start,  // sync pattern recognised
  output logic bit_valid,    // one data bit decoded
  output logic bit_out,
  output logic frame_end     // cell without middle transition after a sync
);

  localparam int unsigned CW = $clog2(4 * HALF + 1);
  localparam logic [CW-1:0] SYNC_MIN = CW'((5 * HALF) / 2);
  localparam logic [CW-1:0] SYNC_MAX = CW'((7 * HALF) / 2);
  localparam logic [CW-1:0] RUN_SAT  = CW'(4 * HALF);
  localparam logic [CW-1:0] Q1       = CW'(HALF / 2);
  localparam logic [CW-1:0] Q3       = CW'((3 * HALF) / 2);

  typedef enum logic [1:0] {S_IDLE, S_SYNC_LO, S_BITS} state_e;
  state_e        state;
  logic [1:0]    sync_ff;
  logic          s, prev;
  logic [CW-1:0] run;   // length of the current high period (idle)
  logic [CW-1:0] cnt;   // sync low timer / bit cell timer
  logic          s0;    // first-half sample

  assign s = sync_ff[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_ff     <= '0;
      prev        <= 1'b0;
      state       <= S_IDLE;
      run         <= '0;
      cnt         <= '0;
      s0          <= 1'b0;
      frame_start <= 1'b0;
      bit_valid   <= 1'b0;
      bit_out     <= 1'b0;
      frame_end   <= 1'b0;
    end else begin
      sync_ff     <= {sync_ff[0], line_in};
      prev        <= s;
      frame_start <= 1'b0;
      bit_valid   <= 1'b0;
      frame_end   <= 1'b0;
      if (!enable) begin
        state <= S_IDLE;
        run   <= '0;
      end else begin
        unique case (state)
          S_IDLE: begin
            if (s)
              run <= (run == RUN_SAT) ? run : run + 1'b1;
            else begin
              run <= '0;
              if (prev && run >= SYNC_MIN && run <= SYNC_MAX) begin
                state       <= S_SYNC_LO;
                cnt         <= CW'(1);
                frame_start <= 1'b1;
              end
            end
          end
          S_SYNC_LO: begin
            if (cnt == CW'((3 * HALF) / 2) && s) begin
              state <= S_IDLE;          // not a sync after all
              run   <= '0;
            end else if (cnt == CW'(3 * HALF - 1)) begin
              state <= S_BITS;
              cnt   <= '0;
            end else cnt <= cnt + 1'b1;
          end
          S_BITS: begin
            if (s != prev && cnt > Q1 && cnt < Q3)
              cnt <= CW'(HALF + 1);     // mid-cell transition: realign
            else if (cnt == CW'(2 * HALF - 1))
              cnt <= '0;
            else
              cnt <= cnt + 1'b1;
            if (cnt == Q1) s0 <= s;
            if (cnt == Q3) begin
              if (s0 != s) begin
                bit_valid <= 1'b1;
                bit_out   <= s0;
              end else begin
                frame_end <= 1'b1;
                state     <= S_IDLE;
                run       <= '0;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

endmodule
