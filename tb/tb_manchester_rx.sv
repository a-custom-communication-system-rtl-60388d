// tb_manchester_rx: drives the line with Manchester frames whose half-bit
// lengths wander by one clock around nominal (a transmitter running off a
// slightly different clock), and checks the decoded bits, one frame_start and
// one frame_end per frame, also when the transmitter's rate is 12% off. Also checks that a high pulse shorter than the
// sync starts nothing and that a disabled receiver decodes nothing.
module tb_manchester_rx;
  localparam int H = 8;
  logic clk = 0, rst_n = 0, enable = 1, line_in = 0;
  logic frame_start, bit_valid, bit_out, frame_end;
  int checks = 0, failures = 0;
  logic got [$];
  int n_start = 0, n_end = 0;

  manchester_rx #(.HALF(H)) dut (.clk, .rst_n, .enable, .line_in, .frame_start,
                                 .bit_valid, .bit_out, .frame_end);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (bit_valid) got.push_back(bit_out);
    if (frame_start) n_start++;
    if (frame_end) n_end++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one half-bit of level v, length H plus jitter in {-1,0,+1}
  task automatic half(input logic v, input int len);
    line_in = v;
    repeat (len) @(negedge clk);
  endtask

  task automatic frame(input logic [63:0] bits, input int n, input bit jitter,
                       input int skew = 0);
    int j;
    half(1'b1, 3 * H);
    half(1'b0, 3 * H);
    for (int i = n - 1; i >= 0; i--) begin
      j = jitter ? int'($urandom % 3) - 1 : 0;
      half(bits[i], H + j + skew);
      half(~bits[i], H - j + skew);
    end
    half(1'b0, 4 * H);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] bits;
    int n, err;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (10) @(negedge clk);
    for (int t = 0; t < 30; t++) begin
      n = 1 + ($urandom % 41);
      bits = {$urandom, $urandom};
      got.delete(); n_start = 0; n_end = 0;
      frame(bits, n, t > 2);
      err = 0;
      if (got.size() != n) err++;
      else for (int i = 0; i < n; i++) if (got[i] !== bits[n - 1 - i]) err++;
      check(err == 0, $sformatf("frame %0d: %0d bits decoded of %0d, %0d errors", t, got.size(), n, err));
      check(n_start == 1 && n_end == 1, $sformatf("frame %0d: %0d starts, %0d ends", t, n_start, n_end));
    end
    // a transmitter 12% fast or slow: only realignment keeps the cells
    for (int t = 0; t < 10; t++) begin
      n = 30 + ($urandom % 12);
      bits = {$urandom, $urandom};
      got.delete(); n_start = 0; n_end = 0;
      frame(bits, n, 0, (t % 2) ? 1 : -1);
      err = 0;
      if (got.size() != n) err++;
      else for (int i = 0; i < n; i++) if (got[i] !== bits[n - 1 - i]) err++;
      check(err == 0, $sformatf("skewed frame %0d: %0d bits of %0d, %0d errors", t, got.size(), n, err));
    end
    // a 2-half-bit high pulse is data, not a sync
    got.delete(); n_start = 0; n_end = 0;
    half(1'b1, 2 * H); half(1'b0, 8 * H);
    check(n_start == 0 && got.size() == 0, "short pulse ignored");
    // a disabled receiver sees nothing
    enable = 0;
    frame(64'h5, 3, 0);
    check(n_start == 0 && got.size() == 0, "disabled receiver");
    enable = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
