// tb_urt_frame_tx: sends messages of every length the protocol uses and of
// random content, reads the line back with the reference receiver and checks
// payload, length and CRC, and the frame time in clocks:
// (6 + 2*(len + 16)) half-bits from start to done (measured here from the
// falling clock edge after start to the rising edge that raises done).
module tb_urt_frame_tx;
  import urt_pkg::*;
  localparam int H = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [MAX_PAYLOAD-1:0] payload;
  logic [LEN_W-1:0] len;
  logic busy, done, line;
  logic tb_line, mon_line;
  int checks = 0, failures = 0;

  urt_frame_tx #(.HALF(H)) dut (.clk, .rst_n, .start, .payload, .len, .busy, .done, .line);

  assign mon_line = line;
  always #5 clk = ~clk;

  `include "tb/tb_line_tasks.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens[4] = '{7, 17, 25, 23};
    logic [31:0] rp;
    int rn, t0, t1;
    logic ok;
    logic [31:0] p;
    int l;
    tb_line = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 24; t++) begin
      l = (t < 4) ? lens[t] : lens[$urandom % 4];
      p = $urandom & ((32'd1 << l) - 1);
      @(negedge clk);
      payload = MAX_PAYLOAD'(p); len = LEN_W'(l); start = 1;
      @(negedge clk);
      start = 0;
      t0 = $time / 10;
      fork
        recv_frame(rp, rn, ok, 100);
        begin @(posedge done); t1 = $time / 10; end
      join
      check(rn == l, $sformatf("len %0d read back as %0d", l, rn));
      check(rp == p, $sformatf("payload %h read back as %h", p, rp));
      check(ok, "CRC good");
      check(t1 - t0 == (6 + 2 * (l + 16)) * H - 1, $sformatf("frame took %0d clocks", t1 - t0));
      repeat (2) @(posedge clk);
      check(!busy && !line, "idle after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
