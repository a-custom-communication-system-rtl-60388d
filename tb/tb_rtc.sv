// tb_rtc: runs the clock with 4 ticks per second and a tick every other
// clock. Checks the count after a known number of seconds, the carries from
// seconds to minutes to hours to days, setting through the bus, and that
// writing the seconds restarts the second.
module tb_rtc;
  localparam int TPS = 4;
  logic clk = 0, rst_n = 0, tick = 0, bus_sel = 0, bus_wr = 0;
  logic [2:0] bus_addr = 0;
  logic [7:0] bus_wdata = 0, bus_rdata;
  int checks = 0, failures = 0;

  rtc #(.TICKS_PER_SEC(TPS)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); bus_sel = 1; bus_wr = 1; bus_addr = 3'(a); bus_wdata = 8'(d);
    @(negedge clk); bus_sel = 0; bus_wr = 0;
  endtask

  task automatic rd(input int a, output int v);
    bus_addr = 3'(a);
    #1 v = int'(bus_rdata);
  endtask

  task automatic ticks(input int n);
    for (int i = 0; i < n; i++) begin
      @(negedge clk); tick = 1;
      @(negedge clk); tick = 0;
    end
  endtask

  task automatic expect_time(input int d, input int h, input int m, input int s, input string what);
    int gs, gm, gh, gd, dl, dh;
    @(negedge clk);
    rd(0, gs); rd(1, gm); rd(2, gh); rd(3, dl); rd(4, dh);
    gd = dl + 256 * dh;
    check(gs == s && gm == m && gh == h && gd == d,
          $sformatf("%s: day %0d %0d:%0d:%0d, expected day %0d %0d:%0d:%0d", what, gd, gh, gm, gs, d, h, m, s));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    expect_time(0, 0, 0, 0, "after reset");
    ticks(TPS * 75);
    expect_time(0, 0, 1, 15, "75 s");
    wr(0, 57); wr(1, 59); wr(2, 23); wr(3, 8'hFF); wr(4, 8'h00);
    expect_time(255, 23, 59, 57, "set");
    ticks(TPS * 2);
    expect_time(255, 23, 59, 59, "two seconds later");
    ticks(TPS - 1);
    expect_time(255, 23, 59, 59, "one tick short of midnight");
    ticks(1);
    expect_time(256, 0, 0, 0, "midnight");
    ticks(TPS - 1);
    wr(0, 10);
    ticks(TPS - 1);
    expect_time(256, 0, 0, 10, "second restarted by the write");
    ticks(1);
    expect_time(256, 0, 0, 11, "next second");
    wr(2, 5); wr(1, 30);
    ticks(TPS * 3600);
    expect_time(256, 6, 30, 11, "one hour");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
