// asicuc: the central unit ASIC, minus its processor core.
//
// The central unit manages the whole machine: an 8051-compatible processor
// runs the control program from an external ROM and reaches the I/O through
// the URT, which keeps polling the peripheral units over the shared line.
// This module holds the blocks of that chip that are logic of its own: the
// bus control (combina), the 256-byte internal RAM, the URT and the
// real-time clock. The 8051 core is a bought-in macrocell and is not part of
// this RTL: its demultiplexed external bus (address, write data, read data,
// active-low read, write and program-fetch strobes) forms this module's
// processor ports. The external ROM and the serial port / modem / keyboard
// group are reached through the ROM and external-I/O ports. The partition
// follows the central unit's block diagram; the bus form is this design's
// choice.
//
// Timing: RAM reads take one clock (the processor's read strobe lasts
// longer); register reads of URT and clock are combinational.
module asicuc
  import urt_pkg::*;
#(
  parameter int unsigned HALF          = HALF_BIT_CLKS,
  parameter int unsigned RETRIES       = 5,
  parameter int unsigned TIMEOUT_BITS  = 64,
  parameter logic [ADDR_W-1:0] LAST_ADDR_RST = 5'd31,
  parameter int unsigned TICKS_PER_SEC = 32768
) (
  input  logic        clk,
  input  logic        rst_n,
  // 8051 core external bus
  input  logic [15:0] cpu_addr,
  input  logic [7:0]  cpu_wdata,
  output logic [7:0]  cpu_rdata,
  input  logic        cpu_rd_n,
  input  logic        cpu_wr_n,
  input  logic        cpu_psen_n,
  // external ROM and external I/O group
  output logic        rom_oe_n,
  output logic        ext_cs_n,
  output logic        ext_rd_n,
  output logic        ext_wr_n,
  input  logic [7:0]  ext_rdata,
  // 32.768 kHz time base, one-clock enable
  input  logic        rtc_tick,
  // line
  input  logic        line_in,
  output logic        line_out,
  output logic        fail
);

  logic       wr_stb, ram_sel, urt_sel, rtc_sel;
  logic [7:0] ram_rdata, urt_rdata, rtc_rdata;

  combina u_combina (
    .clk(clk), .rst_n(rst_n),
    .cpu_addr(cpu_addr), .cpu_rd_n(cpu_rd_n), .cpu_wr_n(cpu_wr_n),
    .cpu_psen_n(cpu_psen_n), .cpu_rdata(cpu_rdata),
    .wr_stb(wr_stb), .ram_sel(ram_sel), .urt_sel(urt_sel), .rtc_sel(rtc_sel),
    .ram_rdata(ram_rdata), .urt_rdata(urt_rdata), .rtc_rdata(rtc_rdata),
    .rom_oe_n(rom_oe_n), .ext_cs_n(ext_cs_n), .ext_rd_n(ext_rd_n),
    .ext_wr_n(ext_wr_n), .ext_rdata(ext_rdata)
  );

  int_ram #(.DEPTH(256)) u_ram (
    .clk(clk), .we(ram_sel && wr_stb), .addr(cpu_addr[7:0]),
    .wdata(cpu_wdata), .rdata(ram_rdata)
  );

  urt_uc #(
    .HALF(HALF), .RETRIES(RETRIES), .TIMEOUT_BITS(TIMEOUT_BITS),
    .LAST_ADDR_RST(LAST_ADDR_RST)
  ) u_urt (
    .clk(clk), .rst_n(rst_n),
    .bus_sel(urt_sel), .bus_wr(wr_stb), .bus_addr(cpu_addr[7:0]),
    .bus_wdata(cpu_wdata), .bus_rdata(urt_rdata),
    .line_in(line_in), .line_out(line_out), .fail(fail)
  );

  rtc #(.TICKS_PER_SEC(TICKS_PER_SEC)) u_rtc (
    .clk(clk), .rst_n(rst_n), .tick(rtc_tick),
    .bus_sel(rtc_sel), .bus_wr(wr_stb), .bus_addr(cpu_addr[2:0]),
    .bus_wdata(cpu_wdata), .bus_rdata(rtc_rdata)
  );

endmodule
