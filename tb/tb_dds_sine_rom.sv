// Self-checking testbench for dds_sine_rom.
// Reads every address of a sine ROM and of a cosine ROM (quarter-period
// offset) and compares each word, one clock after its address, with
// 128 + round(127 * sin(2*pi*k/8192)) computed here over the full period
// (no half-wave folding), so both the stored half and the mirrored half are
// checked.
module tb_dds_sine_rom;

  localparam int unsigned ADDR_W = 13;
  localparam int unsigned FULL   = 2 ** ADDR_W;

  logic              clk = 1'b0;
  logic [ADDR_W-1:0] addr;
  logic [7:0]        q_sin, q_cos;

  int checks = 0, failures = 0, upper_reads = 0;

  dds_sine_rom #(.ADDR_W(ADDR_W), .PHASE_OFFSET(0))        u_sin (.clk(clk), .addr(addr), .q(q_sin));
  dds_sine_rom #(.ADDR_W(ADDR_W), .PHASE_OFFSET(FULL / 4)) u_cos (.clk(clk), .addr(addr), .q(q_cos));

  always #5 clk = ~clk;

  function automatic int ref_word(int k);
    real s;
    s = 127.0 * $sin(6.283185307179586 * real'(k % FULL) / real'(FULL));
    return 128 + ((s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(0.5 - s));
  endfunction

  initial begin
    repeat (3 * FULL) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int min_w = 255, max_w = 0;
    for (int k = 0; k < FULL; k++) begin
      @(negedge clk) addr = ADDR_W'(k);
      @(negedge clk);                       // one clock of read latency
      checks += 2;
      if (int'(q_sin) != ref_word(k)) begin
        failures++;
        if (failures < 10) $display("FAIL sin k=%0d q=%0d exp=%0d", k, q_sin, ref_word(k));
      end
      if (int'(q_cos) != ref_word(k + FULL / 4)) begin
        failures++;
        if (failures < 10) $display("FAIL cos k=%0d q=%0d exp=%0d", k, q_cos, ref_word(k + FULL / 4));
      end
      if (k >= FULL / 2) upper_reads++;
      if (int'(q_sin) < min_w) min_w = int'(q_sin);
      if (int'(q_sin) > max_w) max_w = int'(q_sin);
    end
    checks++;
    if (min_w != 1 || max_w != 255) begin
      failures++;
      $display("FAIL range %0d..%0d", min_w, max_w);
    end
    checks++;
    if (upper_reads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
