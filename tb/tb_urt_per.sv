// tb_urt_per: plays the central unit against one peripheral. The reference
// transmitter sends check, digital, mixed and switch-off messages, some to
// other addresses, some with a bad CRC or a type that does not fit the
// length; the reference receiver reads the answers. Checks the outputs after
// each message, the answer's address, inputs and CRC, that only messages
// for this address are answered, and the turnaround time before the answer.
module tb_urt_per;
  import urt_pkg::*;
  localparam int H = 8;
  localparam logic [4:0] ME = 5'd19;
  logic clk = 0, rst_n = 0;
  logic line_out;
  logic [DIG_W-1:0] dig_in, dig_out;
  logic [ANA_W-1:0] ana_in, ana_out;
  logic tb_line, mon_line;
  int checks = 0, failures = 0;

  urt_per #(.HALF(H), .TURN_BITS(2)) dut (
    .clk, .rst_n, .my_addr(ME), .line_in(tb_line | line_out), .line_out,
    .dig_in, .ana_in, .dig_out, .ana_out);
  assign mon_line = line_out;
  always #5 clk = ~clk;

  `include "tb/tb_line_tasks.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // expected state of the outputs
  logic [DIG_W-1:0] e_dig;
  logic [ANA_W-1:0] e_ana;

  // send one message; expect an answer or not
  task automatic transact(input logic [31:0] p, input int l, input logic corrupt,
                          input bit expect_answer, input string what);
    logic [31:0] rp; int rn; logic ok; int t0, t1;
    dig_in = 10'($urandom); ana_in = 8'($urandom);
    send_frame(p, l, corrupt);
    t0 = $time / 10;
    fork
      recv_frame(rp, rn, ok, 12 * 2 * H);
      begin wait (line_out); t1 = $time / 10; end
    join_any
    if (expect_answer) begin
      wait fork;
      check(rn == LEN_ANSWER && ok, $sformatf("%s: answer len %0d ok %0d", what, rn, ok));
      check(rp == {ME, dig_in, ana_in}, $sformatf("%s: answer %h, expected %h", what, rp, {ME, dig_in, ana_in}));
      // turnaround: end of frame detected one cell later, then TURN_BITS cells
      check(t1 - t0 >= 2 * 2 * H && t1 - t0 <= 4 * 2 * H, $sformatf("%s: answer after %0d clocks", what, t1 - t0));
    end else begin
      disable fork;
      check(rn < 0 && !line_out, $sformatf("%s: unexpected answer", what));
    end
    repeat (4 * H) @(posedge clk);
    check(dig_out == e_dig && ana_out == e_ana,
          $sformatf("%s: outputs %h/%h, expected %h/%h", what, dig_out, ana_out, e_dig, e_ana));
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] d; logic [7:0] a; logic [4:0] other;
    tb_line = 0; dig_in = '0; ana_in = '0;
    e_dig = '0; e_ana = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    check(dig_out == 0 && ana_out == 0, "outputs off after reset");
    for (int r = 0; r < 4; r++) begin
      other = 5'($urandom); if (other == ME) other = ME + 1;
      transact({ME, 2'b11}, 7, 0, 1, "check");
      d = 10'($urandom); e_dig = d;
      transact({ME, 2'b00, d}, 17, 0, 1, "digital");
      d = 10'($urandom); a = 8'($urandom); e_dig = d; e_ana = a;
      transact({ME, 2'b10, d, a}, 25, 0, 1, "mixed");
      transact({other, 2'b10, 10'($urandom), 8'($urandom)}, 25, 0, 0, "mixed to another unit");
      transact({other, 2'b11}, 7, 0, 0, "check to another unit");
      transact({ME, 2'b10, 10'($urandom), 8'($urandom)}, 25, 1, 0, "mixed with bad CRC");
      transact({ME, 2'b11, 10'($urandom)}, 17, 0, 0, "type not fitting length");
      e_dig = '0; e_ana = '0;
      transact({5'd0, 2'b01}, 7, 0, 0, "switch-off");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
