// tb_io_control_system: the whole system end to end, with three peripheral
// units at addresses 1..3 and a short bit time. The processor side is driven
// with 8051-style bus cycles. Steps: two sweeps fill the input image; a
// digital message to unit 2 and a mixed message to unit 3 set their outputs;
// unit 1's address switches are moved so it stops answering, which must give
// resends and then the failure; the processor's switch-off message clears
// all outputs and the failure and restarts the sweep; inputs changed later
// show up in the image; RAM and clock are used on the same bus. Counts how
// often each mechanism happened, from the frames a reference receiver sees
// on the line, and fails any that never did.
module tb_io_control_system;
  import urt_pkg::*;
  localparam int NP = 3;
  localparam int H  = 8;
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic [7:0] cpu_wdata = 0, cpu_rdata, ext_rdata = 8'h00;
  logic cpu_rd_n = 1, cpu_wr_n = 1, cpu_psen_n = 1;
  logic rom_oe_n, ext_cs_n, ext_rd_n, ext_wr_n, rtc_tick = 0, fail, line;
  logic [NP-1:0][ADDR_W-1:0] per_addr;
  logic [NP-1:0][DIG_W-1:0]  per_dig_in, per_dig_out;
  logic [NP-1:0][ANA_W-1:0]  per_ana_in, per_ana_out;
  int checks = 0, failures = 0;

  io_control_system #(.N_PER(NP), .HALF(H), .TICKS_PER_SEC(2)) dut (.*);
  always #5 clk = ~clk;

  `include "tb/tb_io_cpu_tasks.svh"

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters, from the frames seen on the line by the reference
  // receiver: a check to the same unit twice with no answer between is a
  // resend
  logic tb_line, mon_line;
  assign mon_line = line;
  `include "tb/tb_line_tasks.svh"
  int n_poll = 0, n_answer = 0, n_retry = 0, n_fail = 0, n_resume = 0;
  int n_digital = 0, n_mixed = 0, n_swoff = 0, n_second = 0;
  logic fail_q = 0;
  initial begin
    logic [31:0] rp; int rn; logic ok;
    int last_check = -1;
    tb_line = 0;
    forever begin
      recv_frame(rp, rn, ok, 1 << 30);
      if (rn <= 0 || !ok) continue;
      if (rn == LEN_ANSWER) begin n_answer++; last_check = -1; end
      else if (rn == LEN_SHORT && rp[1:0] == 2'b11) begin
        n_poll++;
        if (int'(rp[6:2]) == last_check) n_retry++;
        last_check = int'(rp[6:2]);
      end
      else begin
        last_check = -1;
        if (rn == LEN_SHORT && rp[1:0] == 2'b01) n_swoff++;
        else if (rn == LEN_DIG) n_digital++;
        else if (rn == LEN_MIXED) n_mixed++;
      end
    end
  end
  always @(posedge clk) begin
    if (fail && !fail_q) n_fail++;
    if (!fail && fail_q) n_resume++;
    fail_q <= fail;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_image(input string what);
    logic [9:0] d; logic [7:0] a; logic v;
    for (int k = 0; k < NP; k++) begin
      urt_image(k + 1, d, a, v);
      check(v && d == per_dig_in[k] && a == per_ana_in[k],
            $sformatf("%s: image of unit %0d %h/%h, inputs %h/%h", what, k + 1, d, a,
                      per_dig_in[k], per_ana_in[k]));
    end
  endtask

  initial begin
    logic [7:0] d;
    int p0;
    for (int k = 0; k < NP; k++) begin
      per_addr[k] = 5'(k + 1);
      per_dig_in[k] = 10'($urandom);
      per_ana_in[k] = 8'($urandom);
    end
    repeat (3) @(negedge clk); rst_n = 1;

    // two sweeps fill the image
    wait (n_answer >= 2 * NP);
    check_image("first sweeps");

    // processor messages
    urt_send(2, 0, 10'h2C3, 8'h00);
    wait (n_digital == 1);
    repeat (200 * H) @(negedge clk);
    check(per_dig_out[1] == 10'h2C3 && per_ana_out[1] == 8'h00, "digital message to unit 2");
    urt_send(3, 2, 10'h15A, 8'hE7);
    wait (n_mixed == 1);
    repeat (200 * H) @(negedge clk);
    check(per_dig_out[2] == 10'h15A && per_ana_out[2] == 8'hE7, "mixed message to unit 3");
    check(per_dig_out[0] == 0 && per_ana_out[0] == 0, "unit 1 untouched");

    // RAM and clock on the same bus
    cpu_write(16'h0042, 8'hC9);
    cpu_read(16'h0042, d);
    check(d == 8'hC9, "RAM");
    repeat (8) begin @(negedge clk); rtc_tick = 1; @(negedge clk); rtc_tick = 0; end
    cpu_read(16'hE100, d);
    n_second = int'(d);
    check(d == 8'd4, $sformatf("clock %0d s", d));

    // unit 1 disappears: resends, then the failure
    per_addr[0] = 5'd9;
    wait (fail);
    cpu_read(16'hE007, d);
    check(d == 8'd1, $sformatf("failing address %0d", d));
    p0 = n_poll;
    repeat (3000 * H) @(negedge clk);
    check(n_poll == p0 && !line, "sweep stopped after the failure");

    // switch-off from the processor: outputs off, failure cleared, sweep again
    per_addr[0] = 5'd1;
    urt_send(0, 1, 10'h0, 8'h0);
    wait (n_swoff == 1);
    repeat (200 * H) @(negedge clk);
    check(per_dig_out == '0 && per_ana_out == '0, "all outputs off");
    check(!fail, "failure cleared by the processor message");
    for (int k = 0; k < NP; k++) begin
      per_dig_in[k] = 10'($urandom);
      per_ana_in[k] = 8'($urandom);
    end
    p0 = n_answer;
    wait (n_answer >= p0 + 2 * NP);
    check_image("after restart");

    $display("mechanisms: polls=%0d answers=%0d resends=%0d failures=%0d restarts=%0d digital=%0d mixed=%0d switch-off=%0d seconds=%0d",
             n_poll, n_answer, n_retry, n_fail, n_resume, n_digital, n_mixed, n_swoff, n_second);
    check(n_poll > 0, "sweep happened");
    check(n_answer > 0, "answers stored");
    check(n_retry == 5, $sformatf("%0d resends before the failure", n_retry));
    check(n_fail == 1, "failure happened once");
    check(n_resume == 1, "restart happened");
    check(n_digital == 1 && n_mixed == 1 && n_swoff == 1, "processor messages sent");
    check(n_second > 0, "clock ticked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
