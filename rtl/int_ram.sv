// int_ram: the central unit's internal data RAM, 256 bytes.
//
// A single-port synchronous memory on the processor bus: a write strobe
// stores `wdata` at `addr`; the byte at `addr` appears on `rdata` one clock
// later. The size is the one of the central unit's RAM; the synchronous
// single-port organisation is this design's choice. The contents are not
// reset.
module int_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [7:0]    wdata,
  output logic [7:0]    rdata
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
