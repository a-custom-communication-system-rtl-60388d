// tb_io_control_system_full: the system at its default size, ten peripheral
// units and the real line rate: 9600 bit/s from an 11.0592 MHz clock, so
// 1152 clocks per bit cell. Checks the sync and bit-cell lengths on the line,
// one complete sweep of all ten units into the input image, a mixed message
// to unit 10 and a switch-off message.
module tb_io_control_system_full;
  import urt_pkg::*;
  localparam int NP = 10;
  localparam int H  = 11_059_200 / (2 * 9600);   // 576 clocks per half bit
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, ext_rdata = 8'h00;
  logic cpu_rd_n = 1, cpu_wr_n = 1, cpu_psen_n = 1;
  logic rom_oe_n, ext_cs_n, ext_rd_n, ext_wr_n, rtc_tick = 0, fail, line;
  logic [NP-1:0][ADDR_W-1:0] per_addr;
  logic [NP-1:0][DIG_W-1:0]  per_dig_in, per_dig_out;
  logic [NP-1:0][ANA_W-1:0]  per_ana_in, per_ana_out;
  logic tb_line, mon_line;
  int checks = 0, failures = 0;

  io_control_system dut (.*);
  assign mon_line = line;
  always #45 clk = ~clk;   // ~11.06 MHz

  `include "tb/tb_io_cpu_tasks.svh"
  `include "tb/tb_line_tasks.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_answer = 0, n_mixed = 0, n_swoff = 0;
  int polled [$];
  initial begin
    logic [31:0] rp; int rn; logic ok;
    tb_line = 0;
    forever begin
      recv_frame(rp, rn, ok, 1 << 30);
      if (rn <= 0 || !ok) continue;
      if (rn == LEN_ANSWER) n_answer++;
      else if (rn == LEN_SHORT && rp[1:0] == 2'b11) polled.push_back(int'(rp[6:2]));
      else if (rn == LEN_SHORT && rp[1:0] == 2'b01) n_swoff++;
      else if (rn == LEN_MIXED) n_mixed++;
    end
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] d; logic [7:0] a; logic v;
    int hi, lo, cell_len;
    realtime t0, t1, t2, t3, t4;
    for (int k = 0; k < NP; k++) begin
      per_addr[k] = 5'(k + 1);
      per_dig_in[k] = 10'($urandom);
      per_ana_in[k] = 8'($urandom);
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // line timing of the first message: sync high, sync low + first half,
    // and the first cell measured between two mid-cell edges of bits 1, 2
    // (checking message to unit 1: address 00001, type 11 -> bits 0,0,0,0,1,1,1)
    wait (line); t0 = $realtime;
    wait (!line); t1 = $realtime;
    wait (line); t2 = $realtime;
    wait (!line); t3 = $realtime;
    wait (line); t4 = $realtime;
    hi = int'((t1 - t0) / 90.0);
    lo = int'((t2 - t1) / 90.0);
    cell_len = int'((t4 - t2) / 90.0);
    check(hi == 3 * H, $sformatf("sync high %0d clocks, expected %0d", hi, 3 * H));
    check(lo == 3 * H + H, $sformatf("sync low + first half %0d clocks", lo));
    check(cell_len == 2 * H && 2 * H == 1152, $sformatf("bit cell %0d clocks: 9600 bit/s needs 1152", cell_len));

    // one complete sweep
    wait (n_answer >= NP);
    for (int k = 0; k < NP; k++) check(polled[k] == k + 1, $sformatf("poll %0d went to unit %0d", k, polled[k]));
    for (int k = 0; k < NP; k++) begin
      urt_image(k + 1, d, a, v);
      check(v && d == per_dig_in[k] && a == per_ana_in[k],
            $sformatf("image of unit %0d %h/%h, inputs %h/%h", k + 1, d, a, per_dig_in[k], per_ana_in[k]));
    end
    check(!fail, "no failure");

    // mixed message to unit 10, then switch-off
    urt_send(10, 2, 10'h3A5, 8'h81);
    wait (n_mixed == 1);
    wait (per_dig_out[9] != 0);
    check(per_dig_out[9] == 10'h3A5 && per_ana_out[9] == 8'h81, "mixed message to unit 10");
    urt_send(0, 1, 10'h0, 8'h0);
    wait (n_swoff == 1);
    repeat (4 * H) @(negedge clk);
    check(per_dig_out == '0 && per_ana_out == '0, "switch-off");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

