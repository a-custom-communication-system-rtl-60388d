// tb_line_tasks.svh: reference model of the line protocol for testbenches.
//
// Included inside a testbench module that declares `clk`, a driven line
// level `tb_line`, an observed line level `mon_line` and a localparam `H`
// (clocks per half bit). It writes messages to the line and reads them back
// with its own code, independent of the RTL:
//   ref_crc   CRC-16, polynomial 0x1021, preset 0xFFFF, MSB first
//   send_frame  sync (3 half-bits high, 3 low), payload MSB first, CRC,
//               Manchester 1 = high-then-low; optional CRC corruption
//   recv_frame  waits for a sync, samples each cell at 1/4 and 3/4, stops at
//               a cell without a middle transition, checks the CRC

function automatic logic [15:0] ref_crc(input logic [63:0] bits, input int n);
  logic [15:0] c = 16'hFFFF;
  for (int i = n - 1; i >= 0; i--) begin
    logic fb = c[15] ^ bits[i];
    c = {c[14:0], 1'b0};
    if (fb) c = c ^ 16'h1021;
  end
  return c;
endfunction

task automatic drive_cell(input logic b);
  tb_line = b;
  repeat (H) @(posedge clk);
  tb_line = ~b;
  repeat (H) @(posedge clk);
endtask

task automatic send_frame(input logic [31:0] payload, input int len, input logic corrupt);
  logic [15:0] c;
  c = ref_crc({32'b0, payload}, len);
  if (corrupt) c = c ^ 16'h0100;
  tb_line = 1'b1;
  repeat (3 * H) @(posedge clk);
  tb_line = 1'b0;
  repeat (3 * H) @(posedge clk);
  for (int i = len - 1; i >= 0; i--) drive_cell(payload[i]);
  for (int i = 15; i >= 0; i--) drive_cell(c[i]);
  tb_line = 1'b0;
endtask

// Returns n = number of payload bits (-1 on timeout or bad sync)
task automatic recv_frame(output logic [31:0] payload, output int n, output logic ok,
                          input int timeout_clks);
  logic [63:0] bits;
  int nb, t, hi;
  logic a, b;
  bits = '0; nb = 0; t = 0; ok = 1'b0; n = -1; payload = '0;
  while (!mon_line && t < timeout_clks) begin @(posedge clk); t++; end
  if (!mon_line) return;
  hi = 0;
  while (mon_line) begin @(posedge clk); hi++; end
  if (hi < (5 * H) / 2 || hi > (7 * H) / 2) return;
  // now at the centre of the sync; low half is 3H long
  repeat (3 * H - 1) @(posedge clk);
  forever begin
    repeat (H / 2) @(posedge clk);
    a = mon_line;
    repeat (H) @(posedge clk);
    b = mon_line;
    repeat (H - H / 2) @(posedge clk);
    if (a == b) break;
    bits = {bits[62:0], a};
    nb++;
  end
  n = nb - 16;
  if (n > 0) begin
    payload = 32'(bits >> 16);
    ok = (ref_crc(bits, nb) == 16'h0000) ? 1'b1 : 1'b0;
  end
endtask
