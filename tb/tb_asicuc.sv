// tb_asicuc: drives the central unit through 8051-style bus cycles (address,
// then a read or write strobe held for three clocks). Checks the internal
// RAM, setting and reading the real-time clock, the URT registers, the
// external I/O chip select and data path, and the program ROM enable. With
// no peripheral on the line, it checks that the URT sends its checking
// message to unit 1 six times (1 + 5 resends), raises `fail`, and reports
// it in its status and failing-address registers.
module tb_asicuc;
  localparam int H = 4;
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, ext_rdata = 0;
  logic cpu_rd_n = 1, cpu_wr_n = 1, cpu_psen_n = 1;
  logic rom_oe_n, ext_cs_n, ext_rd_n, ext_wr_n, rtc_tick = 0;
  logic line_out, fail;
  logic tb_line, mon_line;
  int checks = 0, failures = 0;
  int frames = 0;
  int frame_addr [$];

  asicuc #(.HALF(H), .RETRIES(5), .TIMEOUT_BITS(16), .LAST_ADDR_RST(5'd2),
           .TICKS_PER_SEC(2)) dut (
    .clk, .rst_n, .cpu_addr, .cpu_wdata, .cpu_rdata, .cpu_rd_n, .cpu_wr_n, .cpu_psen_n,
    .rom_oe_n, .ext_cs_n, .ext_rd_n, .ext_wr_n, .ext_rdata, .rtc_tick,
    .line_in(line_out), .line_out, .fail);
  assign mon_line = line_out;
  always #5 clk = ~clk;

  `include "tb/tb_line_tasks.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic cpu_write(input logic [15:0] a, input logic [7:0] d);
    @(negedge clk); cpu_addr = a; cpu_wdata = d;
    @(negedge clk); cpu_wr_n = 0;
    repeat (3) @(negedge clk);
    cpu_wr_n = 1;
  endtask

  task automatic cpu_read(input logic [15:0] a, output logic [7:0] d);
    @(negedge clk); cpu_addr = a;
    @(negedge clk); cpu_rd_n = 0;
    repeat (3) @(negedge clk);
    d = cpu_rdata;
    cpu_rd_n = 1;
  endtask

  // frames on the line
  initial begin
    logic [31:0] rp; int rn; logic ok;
    forever begin
      recv_frame(rp, rn, ok, 1 << 30);
      if (rn == 7 && ok) begin frames++; frame_addr.push_back(int'(rp[6:2])); end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] ram_model [256];
    logic [7:0] d, a;
    tb_line = 0;
    repeat (3) @(negedge clk); rst_n = 1;
    // RAM
    for (int i = 0; i < 16; i++) begin
      a = 8'(i * 17); ram_model[a] = 8'($urandom);
      cpu_write({8'h00, a}, ram_model[a]);
    end
    for (int i = 15; i >= 0; i--) begin
      a = 8'(i * 17);
      cpu_read({8'h00, a}, d);
      check(d == ram_model[a], $sformatf("RAM %h: %h, expected %h", a, d, ram_model[a]));
    end
    // real-time clock: set 12 s, 3 seconds of ticks
    cpu_write(16'hE100, 8'd12);
    repeat (6) begin @(negedge clk); rtc_tick = 1; @(negedge clk); rtc_tick = 0; end
    cpu_read(16'hE100, d);
    check(d == 8'd15, $sformatf("clock seconds %0d, expected 15", d));
    // URT registers
    cpu_write(16'hE005, 8'h9C);
    cpu_read(16'hE005, d);
    check(d == 8'h9C, "URT analogue output register");
    cpu_read(16'hE006, d);
    check(d == 8'd2, "URT last address after reset");
    // external I/O group and ROM
    ext_rdata = 8'h5A;
    fork
      cpu_read(16'hE203, d);
      begin repeat (3) @(negedge clk); check(!ext_cs_n && !ext_rd_n && ext_wr_n, "external read strobes"); end
    join
    check(d == 8'h5A, "external read data");
    #1 check(ext_cs_n, "external select released");
    cpu_psen_n = 0; #1 check(!rom_oe_n, "ROM enabled on fetch"); cpu_psen_n = 1;
    #1 check(rom_oe_n, "ROM disabled");
    // no peripheral answers: unit 1 tried six times, then failure
    wait (fail);
    repeat (100 * H) @(posedge clk);
    check(frames == 6, $sformatf("%0d checking messages before the failure", frames));
    foreach (frame_addr[i]) check(frame_addr[i] == 1, "all to unit 1");
    cpu_read(16'hE000, d);
    check(d[1] == 1'b1, $sformatf("status %h shows the failure", d));
    cpu_read(16'hE007, d);
    check(d == 8'd1, "failing address 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
