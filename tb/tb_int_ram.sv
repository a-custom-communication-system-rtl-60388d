// tb_int_ram: random writes and reads of the 256-byte RAM against a
// reference array; reads have one clock of latency.
module tb_int_ram;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0, wdata = 0, rdata;
  logic [7:0] model [256];
  bit written [256];
  int checks = 0, failures = 0;

  int_ram #(.DEPTH(256)) dut (.clk, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      @(negedge clk); we = 1; addr = 8'(a); wdata = 8'($urandom);
      model[a] = wdata; written[a] = 1;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      addr = 8'($urandom);
      we = $urandom % 2;
      wdata = 8'($urandom);
      if (we) model[addr] = wdata;
      else begin
        @(negedge clk);
        we = 0;
        check(rdata == model[addr], $sformatf("read %h at %h, expected %h", rdata, addr, model[addr]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
