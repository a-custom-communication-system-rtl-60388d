// tb_crc16_serial: checks the bit-serial CRC against the published check
// value of CRC-16/CCITT-FALSE ("123456789" -> 0x29B1), against a reference
// model on random messages, and that message plus CRC leaves zero.
module tb_crc16_serial;
  localparam int H = 2;  // unused by the CRC, required by the shared tasks
  logic clk = 0, rst_n = 0, clear = 0, en = 0, din = 0;
  logic [15:0] crc;
  logic zero, tb_line, mon_line;
  int checks = 0, failures = 0;

  crc16_serial dut (.clk, .rst_n, .clear, .en, .din, .crc, .zero);

  always #5 clk = ~clk;

  `include "tb/tb_line_tasks.svh"

  task automatic shift(input logic b);
    en = 1; din = b;
    @(posedge clk); #1;
    en = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [71:0] s;
    logic [63:0] m;
    logic [15:0] c;
    int n;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    check(crc == 16'hFFFF, "preset after reset");
    s = "123456789";
    for (int i = 71; i >= 0; i--) shift(s[i]);
    check(crc == 16'h29B1, $sformatf("check value 0x%04h", crc));
    for (int t = 0; t < 200; t++) begin
      clear = 1; @(posedge clk); #1 clear = 0;
      n = 1 + ($urandom % 40);
      m = {$urandom, $urandom};
      for (int i = n - 1; i >= 0; i--) shift(m[i]);
      c = ref_crc(m, n);
      check(crc == c, $sformatf("random crc %04h vs %04h", crc, c));
      for (int i = 15; i >= 0; i--) shift(c[i]);
      check(zero, "residue zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
