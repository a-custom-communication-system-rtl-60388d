// tb_manchester_tx: sends frames of random bits and compares the line,
// sampled every clock, with the waveform the protocol defines: 3 half-bits
// high, 3 low, then one Manchester cell per bit (1 = high then low), then
// idle low. Also checks the frame length in clocks and the `done` pulse.
module tb_manchester_tx;
  localparam int H = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic have_bit, bit_in, bit_take, busy, done, line;
  logic [63:0] bits;
  int n, idx;
  int checks = 0, failures = 0;

  manchester_tx #(.HALF(H)) dut (.clk, .rst_n, .start, .have_bit, .bit_in,
                                 .bit_take, .busy, .done, .line);

  always #5 clk = ~clk;
  assign have_bit = idx < n;
  assign bit_in   = bits[idx];
  always_ff @(posedge clk) if (bit_take) idx <= idx + 1;

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
    logic exp [$];
    int k, err, done_at;
    idx = 0; n = 0; bits = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      n = 1 + ($urandom % 41);
      bits = {$urandom, $urandom};
      idx = 0;
      exp.delete();
      for (int i = 0; i < 3 * H; i++) exp.push_back(1'b1);
      for (int i = 0; i < 3 * H; i++) exp.push_back(1'b0);
      for (int b = 0; b < n; b++) begin
        for (int i = 0; i < H; i++) exp.push_back(bits[b]);
        for (int i = 0; i < H; i++) exp.push_back(~bits[b]);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      k = 0; err = 0; done_at = -1;
      while (k < exp.size() + 4) begin
        if (k < exp.size()) begin if (line !== exp[k]) err++; end
        else if (line !== 1'b0) err++;
        if (done && done_at < 0) done_at = k;
        k++;
        @(negedge clk);
      end
      check(err == 0, $sformatf("frame %0d: %0d wrong line samples", t, err));
      check(done_at == exp.size(), $sformatf("done at %0d, expected %0d", done_at, exp.size()));
      check(idx == n, $sformatf("took %0d bits of %0d", idx, n));
      check(!busy, "idle after frame");
      repeat ($urandom % 5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
