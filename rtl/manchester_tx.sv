// manchester_tx: Manchester encoder for the shared I/O line.
//
// After `start` the encoder sends the sync pattern, three half-bit periods
// high then three low. This pattern cannot occur inside Manchester data,
// where no level lasts longer than two half-bits. It then sends one bit cell
// of 2*HALF clocks per data bit: a 1 is high then low, a 0 is low then high,
// so every cell has a transition in its middle. Bits come from the user with
// a take handshake: at the end of the sync and of every cell the encoder
// looks at `have_bit`. If it is set, `bit_in` is taken and `bit_take` pulses
// for that clock; if not, the line returns to idle (low) and `done` pulses.
// The protocol asks for a Manchester code; the sync shape, the polarity and
// the low idle level are this design's choices.
//
// Timing: a frame of N bits occupies 6*HALF + 2*N*HALF clocks from the clock
// after `start` to `done`.
module manchester_tx
  import urt_pkg::*;
#(
  parameter int unsigned HALF = HALF_BIT_CLKS  // clocks per half bit cell
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,     // begin a frame (ignored while busy)
  input  logic have_bit,  // another bit is available
  input  logic bit_in,    // that bit
  output logic bit_take,  // bit_in is consumed in this clock
  output logic busy,
  output logic done,      // frame finished, line back to idle
  output logic line       // encoded line level
);

  localparam int unsigned CW = $clog2(3 * HALF + 1);

  typedef enum logic [1:0] {S_IDLE, S_SYNC_HI, S_SYNC_LO, S_BIT} state_e;
  state_e        state;
  logic [CW-1:0] cnt;
  logic          cur;

  // A bit boundary: last clock of the sync low part or of a bit cell
  logic boundary;
  assign boundary = (state == S_SYNC_LO && cnt == CW'(3 * HALF - 1)) ||
                    (state == S_BIT     && cnt == CW'(2 * HALF - 1));
  assign bit_take = boundary && have_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cnt   <= '0;
      cur   <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_SYNC_HI;
          cnt   <= '0;
        end
        S_SYNC_HI: begin
          if (cnt == CW'(3 * HALF - 1)) begin
            state <= S_SYNC_LO;
            cnt   <= '0;
          end else cnt <= cnt + 1'b1;
        end
        S_SYNC_LO, S_BIT: begin
          if (boundary) begin
            cnt <= '0;
            if (have_bit) begin
              state <= S_BIT;
              cur   <= bit_in;
            end else begin
              state <= S_IDLE;
              done  <= 1'b1;
            end
          end else cnt <= cnt + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // Bits are only taken inside a frame
  assert property (@(posedge clk) disable iff (!rst_n) bit_take |-> busy);
  assign line = (state == S_SYNC_HI) ||
                (state == S_BIT && ((cnt < CW'(HALF)) ? cur : ~cur));

endmodule
