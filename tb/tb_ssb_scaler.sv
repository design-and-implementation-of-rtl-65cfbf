// Self-checking testbench for ssb_scaler.
// Feeds a new signed 16-bit value every clock (extremes, zero crossings,
// multiples of 255 and random values) and checks that two clocks later the
// output is the low byte of trunc(din / 255) + 128.
module tb_ssb_scaler;

  logic              clk = 1'b0;
  logic signed [15:0] din;
  logic [7:0]        dout;

  int checks = 0, failures = 0, neg_seen = 0;
  int hist [$];

  ssb_scaler dut (.clk(clk), .din(din), .dout(dout));

  always #5 clk = ~clk;

  function automatic int expect_out(int v);
    int q;
    q = (v >= 0) ? (v / 255) : -((-v) / 255);   // truncation toward zero
    return (q + 128) & 255;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fixed [] = '{0, 1, -1, 254, 255, 256, -254, -255, -256, 32258, -32258,
                     32767, -32768, 16129, -16129, 510, -510, 127, -127};
    for (int i = 0; i < 2000; i++) begin
      int v;
      v = (i < fixed.size()) ? fixed[i] : ($signed($urandom) % 32768);
      @(negedge clk);
      din = 16'(v);
      hist.push_back(v);
      if (hist.size() > 2) begin
        int old;
        old = hist.pop_front();
        // dout now holds the value applied two clocks before the current one
        checks++;
        if (int'(dout) != expect_out(old)) begin
          failures++;
          if (failures < 10) $display("FAIL din=%0d dout=%0d exp=%0d", old, dout, expect_out(old));
        end
        if (old < 0) neg_seen++;
      end
    end
    checks++;
    if (neg_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
