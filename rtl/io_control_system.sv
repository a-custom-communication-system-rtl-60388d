// io_control_system: central unit and peripheral units on one shared line.
//
// A machine's ~200 inputs and outputs are spread over N_PER peripheral units
// (each 10 digital outputs, 10 digital inputs, one analogue output and one
// analogue input) that hang on one two-wire line, up to about 30 m long,
// together with the central unit. The central unit is the only master: it
// polls every peripheral in turn and sends output changes ordered by its
// processor; a peripheral only speaks to answer. Here the line is the
// wired OR of every station's transmit level (each holds its output low
// when silent), and every receiver listens to it. Frequency-shift keying
// onto the coaxial cable, the A/D and D/A converters, the 8051 core, the
// program ROM and the external I/O group are outside this RTL; their
// signals are ports. Peripheral k's address switches are
// per_addr[k]; they should be distinct and non-zero.
//
// N_PER = 10 is this design's default: 200 I/O at 22 per unit is about ten
// units. The central unit's sweep starts with addresses 1..N_PER.
module io_control_system
  import urt_pkg::*;
#(
  parameter int unsigned N_PER         = 10,
  parameter int unsigned HALF          = HALF_BIT_CLKS,
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
  input  logic        rtc_tick,
  output logic        fail,
  output logic        line,         // level on the shared line
  // peripheral units
  input  logic [N_PER-1:0][ADDR_W-1:0] per_addr,
  input  logic [N_PER-1:0][DIG_W-1:0]  per_dig_in,
  input  logic [N_PER-1:0][ANA_W-1:0]  per_ana_in,
  output logic [N_PER-1:0][DIG_W-1:0]  per_dig_out,
  output logic [N_PER-1:0][ANA_W-1:0]  per_ana_out
);

  logic             uc_line;
  logic [N_PER-1:0] per_line;

  assign line = uc_line | (|per_line);

  asicuc #(
    .HALF(HALF), .LAST_ADDR_RST(ADDR_W'(N_PER)), .TICKS_PER_SEC(TICKS_PER_SEC)
  ) u_uc (
    .clk(clk), .rst_n(rst_n),
    .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata), .cpu_rdata(cpu_rdata),
    .cpu_rd_n(cpu_rd_n), .cpu_wr_n(cpu_wr_n), .cpu_psen_n(cpu_psen_n),
    .rom_oe_n(rom_oe_n), .ext_cs_n(ext_cs_n), .ext_rd_n(ext_rd_n),
    .ext_wr_n(ext_wr_n), .ext_rdata(ext_rdata), .rtc_tick(rtc_tick),
    .line_in(line), .line_out(uc_line), .fail(fail)
  );

  for (genvar k = 0; k < N_PER; k++) begin : g_per
    urt_per #(.HALF(HALF)) u_per (
      .clk(clk), .rst_n(rst_n), .my_addr(per_addr[k]),
      .line_in(line), .line_out(per_line[k]),
      .dig_in(per_dig_in[k]), .ana_in(per_ana_in[k]),
      .dig_out(per_dig_out[k]), .ana_out(per_ana_out[k])
    );
  end

endmodule
