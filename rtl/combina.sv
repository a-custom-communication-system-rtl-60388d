// combina: bus control of the central unit.
//
// Sits between the 8051 processor core and everything on its external bus.
// From the processor's address and its active-low read, write and program
// fetch strobes it makes the selects and enables of the internal blocks
// (RAM, URT, real-time clock) and of the external ones (program ROM and the
// serial port / modem / keyboard group), and returns to the processor the
// read data of whichever block is selected. A write becomes one clock-wide
// strobe at the falling edge of the write line, so a register is written
// once per bus cycle. The block's role follows the original system
// description; the memory map and the strobe timing are this design's
// choices:
//   program fetch (psen_n low)  external ROM, rom_oe_n
//   0x0000-0x00FF               internal RAM (256 bytes)
//   0xE000-0xE0FF               URT registers
//   0xE100-0xE1FF               real-time clock
//   0xE200-0xE2FF               external I/O (serial port, modem, keyboard)
// Addresses elsewhere select nothing and read as 0xFF.
module combina (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic [15:0] cpu_addr,
  input  logic        cpu_rd_n,
  input  logic        cpu_wr_n,
  input  logic        cpu_psen_n,
  output logic [7:0]  cpu_rdata,
  // internal blocks
  output logic        wr_stb,     // one-clock write strobe for all blocks
  output logic        ram_sel,
  output logic        urt_sel,
  output logic        rtc_sel,
  input  logic [7:0]  ram_rdata,
  input  logic [7:0]  urt_rdata,
  input  logic [7:0]  rtc_rdata,
  // external blocks
  output logic        rom_oe_n,
  output logic        ext_cs_n,
  output logic        ext_rd_n,
  output logic        ext_wr_n,
  input  logic [7:0]  ext_rdata
);

  logic wr_n_q;
  logic ext_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) wr_n_q <= 1'b1;
    else        wr_n_q <= cpu_wr_n;
  end
  assign wr_stb = wr_n_q && !cpu_wr_n;

  always_comb begin
    ram_sel = cpu_addr[15:8] == 8'h00;
    urt_sel = cpu_addr[15:8] == 8'hE0;
    rtc_sel = cpu_addr[15:8] == 8'hE1;
    ext_sel = cpu_addr[15:8] == 8'hE2;
  end

  assign rom_oe_n = cpu_psen_n;
  assign ext_cs_n = !(ext_sel && (!cpu_rd_n || !cpu_wr_n));
  assign ext_rd_n = !(ext_sel && !cpu_rd_n);
  assign ext_wr_n = !(ext_sel && !cpu_wr_n);

  always_comb begin
    if      (ram_sel) cpu_rdata = ram_rdata;
    else if (urt_sel) cpu_rdata = urt_rdata;
    else if (rtc_sel) cpu_rdata = rtc_rdata;
    else if (ext_sel) cpu_rdata = ext_rdata;
    else              cpu_rdata = 8'hFF;
  end

endmodule
