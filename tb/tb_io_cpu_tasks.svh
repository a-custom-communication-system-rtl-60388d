// tb_io_cpu_tasks.svh: 8051-style bus cycles for the system testbenches.
// Included in a module that declares clk, cpu_addr, cpu_wdata, cpu_rdata,
// cpu_rd_n and cpu_wr_n. The strobe is held for three clocks.

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

// URT page is 0xE0xx: queue a message and start it
task automatic urt_send(input int addr, input int mtype, input logic [9:0] dout, input logic [7:0] aout);
  cpu_write(16'hE001, 8'(addr));
  cpu_write(16'hE002, 8'(mtype));
  cpu_write(16'hE003, dout[7:0]);
  cpu_write(16'hE004, {6'b0, dout[9:8]});
  cpu_write(16'hE005, aout);
  cpu_write(16'hE000, 8'h01);
endtask

// read a unit's entry of the input image
task automatic urt_image(input int addr, output logic [9:0] din, output logic [7:0] ain,
                         output logic valid);
  logic [7:0] b0, b1, b2, b3;
  cpu_read(16'hE080 + 16'(4 * addr), b0);
  cpu_read(16'hE081 + 16'(4 * addr), b1);
  cpu_read(16'hE082 + 16'(4 * addr), b2);
  cpu_read(16'hE083 + 16'(4 * addr), b3);
  din = {b1[1:0], b0}; ain = b2; valid = b3[0];
endtask
