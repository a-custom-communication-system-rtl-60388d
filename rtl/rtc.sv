// rtc: real-time clock of the central unit.
//
// Counts seconds, minutes and hours of the day and a 16-bit day number, so
// the control program can record when the machine is used. The clock runs
// from `tick`, a one-clock enable from an external 32.768 kHz time base
// (battery-backed on the board); TICKS_PER_SEC ticks make one second. The
// processor reads and sets the counters as bytes; writing the seconds also
// restarts the current second. The counter layout, the binary coding and the
// register map are this design's choices; the original system description
// only gives the clock's purpose.
//
// Registers: 0 seconds (0..59), 1 minutes (0..59), 2 hours (0..23),
// 3 day number [7:0], 4 day number [15:8]. Reads are combinational.
module rtc #(
  parameter int unsigned TICKS_PER_SEC = 32768
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick,
  input  logic       bus_sel,
  input  logic       bus_wr,     // one-clock write strobe
  input  logic [2:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata
);

  localparam int unsigned PW = $clog2(TICKS_PER_SEC + 1);

  logic [PW-1:0] presc;
  logic [5:0]    sec, min;
  logic [4:0]    hour;
  logic [15:0]   day;

  logic sec_end, min_end, hour_end, day_end;
  assign sec_end  = tick && presc == PW'(TICKS_PER_SEC - 1);
  assign min_end  = sec_end && sec == 6'd59;
  assign hour_end = min_end && min == 6'd59;
  assign day_end  = hour_end && hour == 5'd23;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      presc <= '0;
      sec   <= '0;
      min   <= '0;
      hour  <= '0;
      day   <= '0;
    end else if (bus_sel && bus_wr) begin
      unique case (bus_addr)
        3'd0: begin sec <= bus_wdata[5:0]; presc <= '0; end
        3'd1: min       <= bus_wdata[5:0];
        3'd2: hour      <= bus_wdata[4:0];
        3'd3: day[7:0]  <= bus_wdata;
        3'd4: day[15:8] <= bus_wdata;
        default: ;
      endcase
    end else if (tick) begin
      presc <= sec_end ? '0 : presc + 1'b1;
      if (sec_end)  sec  <= min_end  ? '0 : sec + 1'b1;
      if (min_end)  min  <= hour_end ? '0 : min + 1'b1;
      if (hour_end) hour <= day_end  ? '0 : hour + 1'b1;
      if (day_end)  day  <= day + 1'b1;
    end
  end

  always_comb begin
    unique case (bus_addr)
      3'd0:    bus_rdata = {2'b0, sec};
      3'd1:    bus_rdata = {2'b0, min};
      3'd2:    bus_rdata = {3'b0, hour};
      3'd3:    bus_rdata = day[7:0];
      3'd4:    bus_rdata = day[15:8];
      default: bus_rdata = '0;
    endcase
  end

endmodule
