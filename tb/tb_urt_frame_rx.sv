// tb_urt_frame_rx: the reference transmitter sends messages of every length
// the protocol uses, some with a corrupted CRC; checks that the receiver
// reports payload, length and CRC status for each, about one bit cell after
// the frame.
module tb_urt_frame_rx;
  import urt_pkg::*;
  localparam int H = 8;
  logic clk = 0, rst_n = 0, enable = 1;
  logic frame_valid, crc_ok;
  logic [MAX_PAYLOAD-1:0] payload;
  logic [LEN_W-1:0] len;
  logic tb_line, mon_line;
  int checks = 0, failures = 0;

  urt_frame_rx #(.HALF(H)) dut (.clk, .rst_n, .enable, .line_in(tb_line), .frame_valid,
                                .payload, .len, .crc_ok);
  assign mon_line = tb_line;
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
    logic [31:0] p;
    int l, wait_clks;
    logic bad;
    tb_line = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int t = 0; t < 40; t++) begin
      l = lens[t % 4];
      p = $urandom & ((32'd1 << l) - 1);
      bad = (t % 5 == 3);
      fork
        send_frame(p, l, bad);
        begin @(posedge frame_valid); end
      join_any
      wait_clks = 0;
      while (!frame_valid && wait_clks < 4 * H) begin @(posedge clk); wait_clks++; end
      check(frame_valid === 1'b1, $sformatf("frame %0d reported", t));
      check(wait_clks <= 2 * H + 4, $sformatf("reported %0d clocks after the frame", wait_clks));
      check(int'(len) == l, $sformatf("len %0d vs %0d", len, l));
      check(32'(payload & ((25'd1 << l) - 1)) == p, $sformatf("payload %h vs %h", payload, p));
      check(crc_ok == !bad, $sformatf("crc_ok %0d with corrupt=%0d", crc_ok, bad));
      repeat (4 * H) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
