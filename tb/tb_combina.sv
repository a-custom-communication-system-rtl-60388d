// tb_combina: random processor bus cycles against a reference address
// decoder. Checks the block selects, the read-data multiplexer, the external
// chip select and strobes, the ROM output enable, and that a write cycle of
// several clocks gives exactly one write strobe.
module tb_combina;
  logic clk = 0, rst_n = 0;
  logic [15:0] cpu_addr = 0;
  logic cpu_rd_n = 1, cpu_wr_n = 1, cpu_psen_n = 1;
  logic [7:0] cpu_rdata;
  logic wr_stb, ram_sel, urt_sel, rtc_sel, rom_oe_n, ext_cs_n, ext_rd_n, ext_wr_n;
  logic [7:0] ram_rdata = 8'h11, urt_rdata = 8'h22, rtc_rdata = 8'h33, ext_rdata = 8'h44;
  int checks = 0, failures = 0;

  combina dut (.*);
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
    int region, strobes, len;
    logic [7:0] exp_rd;
    bit is_wr;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      region = $urandom % 5;
      case (region)
        0: cpu_addr = {8'h00, 8'($urandom)};
        1: cpu_addr = {8'hE0, 8'($urandom)};
        2: cpu_addr = {8'hE1, 8'($urandom)};
        3: cpu_addr = {8'hE2, 8'($urandom)};
        default: cpu_addr = {8'h40 + 8'($urandom % 8'h80), 8'($urandom)};
      endcase
      ram_rdata = 8'($urandom); urt_rdata = 8'($urandom);
      rtc_rdata = 8'($urandom); ext_rdata = 8'($urandom);
      exp_rd = (region == 0) ? ram_rdata : (region == 1) ? urt_rdata :
               (region == 2) ? rtc_rdata : (region == 3) ? ext_rdata : 8'hFF;
      is_wr = $urandom % 2;
      len = 2 + $urandom % 4;
      strobes = 0;
      if (is_wr) cpu_wr_n = 0; else cpu_rd_n = 0;
      for (int c = 0; c < len; c++) begin
        #1;
        if (wr_stb) strobes++;
        check(ram_sel == (region == 0) && urt_sel == (region == 1) && rtc_sel == (region == 2),
              $sformatf("selects for %h", cpu_addr));
        check(ext_cs_n == (region != 3) && ext_wr_n == !(region == 3 && is_wr) &&
              ext_rd_n == !(region == 3 && !is_wr), $sformatf("external strobes for %h", cpu_addr));
        if (!is_wr) check(cpu_rdata == exp_rd, $sformatf("read %h from %h, expected %h", cpu_rdata, cpu_addr, exp_rd));
        @(negedge clk);
      end
      check(strobes == (is_wr ? 1 : 0), $sformatf("%0d write strobes in one cycle", strobes));
      cpu_wr_n = 1; cpu_rd_n = 1;
      cpu_psen_n = $urandom % 2;
      #1 check(rom_oe_n == cpu_psen_n, "ROM enable follows program fetch");
      check(ext_cs_n, "external chip select idle");
      @(negedge clk);
      cpu_psen_n = 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
