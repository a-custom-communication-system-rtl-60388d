// tb_urt_uc: plays the processor and up to 31 peripherals against the
// central unit's URT. The peripherals are a reference model built on the
// reference receiver and transmitter; it logs every message it sees and
// answers for the addresses marked alive. Checks:
//   - the sweep polls 1..LAST in order and stores the answers in the image
//   - a processor message (digital, mixed) goes out with its fields, also
//     one queued while the previous one waits for its answer
//   - an answer with a bad CRC is resent and then accepted
//   - a dead unit is tried 1 + 5 times, then `fail` rises, the failing
//     address is kept and the line falls silent
//   - a processor switch-off message (address 0, no answer) clears `fail`
//     and the sweep starts again at address 1
//   - a new last address shortens the sweep
module tb_urt_uc;
  import urt_pkg::*;
  localparam int H = 8;
  localparam int LAST = 4;
  logic clk = 0, rst_n = 0;
  logic bus_sel = 0, bus_wr = 0;
  logic [7:0] bus_addr = 0, bus_wdata = 0, bus_rdata;
  logic line_out, fail;
  logic tb_line, mon_line;
  int checks = 0, failures = 0;

  urt_uc #(.HALF(H), .RETRIES(5), .TIMEOUT_BITS(64), .GAP_BITS(2),
           .LAST_ADDR_RST(5'(LAST))) dut (
    .clk, .rst_n, .bus_sel, .bus_wr, .bus_addr, .bus_wdata, .bus_rdata,
    .line_in(tb_line | line_out), .line_out, .fail);
  assign mon_line = line_out;
  always #5 clk = ~clk;

  `include "tb/tb_line_tasks.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic bus_write(input logic [7:0] a, input logic [7:0] d);
    @(negedge clk); bus_sel = 1; bus_wr = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_sel = 0; bus_wr = 0;
  endtask

  task automatic bus_read(input logic [7:0] a, output logic [7:0] d);
    @(negedge clk); bus_sel = 1; bus_addr = a;
    #1 d = bus_rdata;
    @(negedge clk); bus_sel = 0;
  endtask

  // ---- peripheral model ----
  typedef struct { int addr; int mtype; int len; logic [31:0] p; } msg_t;
  msg_t log_q [$];
  bit alive [32];
  int bad_crc_left [32];
  logic [9:0] din [32];
  logic [7:0] ain [32];

  initial begin
    logic [31:0] rp; int rn; logic ok; msg_t m;
    forever begin
      recv_frame(rp, rn, ok, 1 << 30);
      if (rn <= 0 || !ok) continue;
      m.len = rn; m.p = rp;
      m.addr = (rn == 7) ? int'(rp[6:2]) : (rn == 17) ? int'(rp[16:12]) : int'(rp[24:20]);
      m.mtype = (rn == 7) ? int'(rp[1:0]) : (rn == 17) ? int'(rp[11:10]) : int'(rp[19:18]);
      log_q.push_back(m);
      if (m.mtype != 1 && alive[m.addr]) begin
        repeat (2 * 2 * H) @(posedge clk);
        send_frame({4'b0, 5'(m.addr), din[m.addr], ain[m.addr]}, 23, bad_crc_left[m.addr] > 0);
        if (bad_crc_left[m.addr] > 0) bad_crc_left[m.addr]--;
      end
    end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic string seq();
    string s = "";
    foreach (log_q[i]) s = {s, $sformatf("%0d/%0d ", log_q[i].addr, log_q[i].mtype)};
    return s;
  endfunction

  initial begin
    logic [7:0] r0, r1, r2, r3;
    int n, cnt2, k;
    tb_line = 0;
    for (int a = 0; a < 32; a++) begin
      alive[a] = (a >= 1 && a <= LAST);
      bad_crc_left[a] = 0;
      din[a] = 10'($urandom); ain[a] = 8'($urandom);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. two full sweeps
    wait (log_q.size() >= 2 * LAST + 1);
    for (int i = 0; i < 2 * LAST; i++)
      check(log_q[i].addr == (i % LAST) + 1 && log_q[i].mtype == 3 && log_q[i].len == 7,
            $sformatf("sweep order: %s", seq()));
    for (int a = 1; a <= LAST; a++) begin
      bus_read(8'h80 + 8'(4 * a), r0); bus_read(8'h81 + 8'(4 * a), r1);
      bus_read(8'h82 + 8'(4 * a), r2); bus_read(8'h83 + 8'(4 * a), r3);
      check({r1[1:0], r0} == din[a] && r2 == ain[a] && r3 == 8'h01,
            $sformatf("image of unit %0d: %h %h %h %h", a, r3, r2, r1, r0));
    end
    bus_read(8'h80 + 8'(4 * 9), r3);
    bus_read(8'h83 + 8'(4 * 9), r3);
    check(r3 == 8'h00, "unpolled unit has no image");

    // 2. processor messages: digital to 3, mixed to 2
    bus_write(8'h01, 8'd3); bus_write(8'h02, 8'd0);
    bus_write(8'h03, 8'hA5); bus_write(8'h04, 8'h02);
    log_q.delete();
    bus_write(8'h00, 8'h01);
    bus_read(8'h00, r0);
    check(r0[0] == 1'b1, "message pending");
    wait (log_q.size() >= 3);
    k = -1;
    foreach (log_q[i]) if (log_q[i].mtype == 0) k = i;
    check(k >= 0 && log_q[k].addr == 3 && log_q[k].len == 17 && log_q[k].p[9:0] == 10'h2A5,
          $sformatf("digital message: %s", seq()));
    repeat (200 * H) @(posedge clk);
    bus_read(8'h00, r0);
    check(r0[0] == 1'b0 && r0[3] == 1'b1, $sformatf("digital message answered, status %h", r0));
    bus_write(8'h01, 8'd2); bus_write(8'h02, 8'd2);
    bus_write(8'h03, 8'h3C); bus_write(8'h04, 8'h01); bus_write(8'h05, 8'h77);
    log_q.delete();
    bus_write(8'h00, 8'h01);
    wait (log_q.size() >= 3);
    k = -1;
    foreach (log_q[i]) if (log_q[i].mtype == 2) k = i;
    check(k >= 0 && log_q[k].addr == 2 && log_q[k].len == 25 && log_q[k].p[17:0] == {10'h13C, 8'h77},
          $sformatf("mixed message: %s", seq()));

    // 2b. a message queued while the previous one is still under way
    repeat (200 * H) @(posedge clk);
    bus_write(8'h01, 8'd1); bus_write(8'h02, 8'd0);
    bus_write(8'h03, 8'h0F); bus_write(8'h04, 8'h00);
    log_q.delete();
    bus_write(8'h00, 8'h01);
    wait (log_q.size() >= 1 && log_q[log_q.size() - 1].mtype == 0);
    bus_write(8'h01, 8'd4); bus_write(8'h02, 8'd2);
    bus_write(8'h03, 8'hF0); bus_write(8'h04, 8'h03); bus_write(8'h05, 8'h12);
    bus_write(8'h00, 8'h01);
    wait (log_q.size() >= 6);
    k = -1;
    foreach (log_q[i]) if (log_q[i].mtype == 2) k = i;
    check(k >= 0 && log_q[k].addr == 4 && log_q[k].p[17:0] == {10'h3F0, 8'h12},
          $sformatf("second queued message: %s", seq()));

    // 3. unit 3 answers twice with a bad CRC: resent, then accepted
    bad_crc_left[3] = 2;
    log_q.delete();
    wait (log_q.size() >= 2 * LAST + 2);
    cnt2 = 0;
    foreach (log_q[i]) if (log_q[i].addr == 3) cnt2++;
    check(cnt2 >= 3 && !fail && bad_crc_left[3] == 0, $sformatf("resend after bad CRC: %s", seq()));

    // 4. unit 2 dies: 1 + 5 attempts, then fail and silence
    alive[2] = 0;
    log_q.delete();
    wait (fail);
    repeat (200 * H) @(posedge clk);
    n = 0;
    for (int i = log_q.size() - 1; i >= 0 && log_q[i].addr == 2; i--) n++;
    check(n == 6, $sformatf("%0d attempts at dead unit: %s", n, seq()));
    check(log_q[log_q.size() - 1].addr == 2, "nothing sent after the failure");
    bus_read(8'h07, r0);
    check(r0 == 8'd2, $sformatf("failing address %0d", r0));
    bus_read(8'h00, r0);
    check(r0[1] == 1'b1 && r0[2] == 1'b0, $sformatf("status after failure %h", r0));
    n = log_q.size();
    repeat (2000 * H) @(posedge clk);
    check(log_q.size() == n && fail, "sweep stopped");

    // 5. switch-off from the processor clears fail, sweep restarts at 1
    alive[2] = 1;
    bus_write(8'h01, 8'd9); bus_write(8'h02, 8'd1);
    log_q.delete();
    bus_write(8'h00, 8'h01);
    wait (log_q.size() >= 3);
    check(log_q[0].addr == 0 && log_q[0].mtype == 1 && log_q[0].len == 7,
          $sformatf("switch-off broadcast: %s", seq()));
    check(log_q[1].addr == 1 && log_q[2].addr == 2 && !fail, $sformatf("sweep restarted: %s", seq()));

    // 6. last address 2
    bus_write(8'h06, 8'd2);
    wait (log_q.size() >= 12);
    log_q.delete();
    wait (log_q.size() >= 6);
    foreach (log_q[i]) check(log_q[i].addr == 1 || log_q[i].addr == 2, $sformatf("short sweep: %s", seq()));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
