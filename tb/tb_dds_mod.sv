// Self-checking testbench for dds_mod.
// Keeps its own phase accumulator and computes the expected sine and cosine
// words from 128 + round(127 * sin(2*pi*k/8192)) over the full period. Every
// clock it checks the raw ROM outputs against the phase one clock earlier
// (registered ROM) and the signed outputs against those words minus 128.
// Runs the 10 kHz and 20 kHz modulating codes and a random code.
module tb_dds_mod;

  logic              clk = 1'b0;
  logic              rst;
  logic [23:0]       code_f;
  logic [7:0]        out_sin, out_cos;
  logic signed [7:0] sin_modl, cos_modl;

  int checks = 0, failures = 0, wraps = 0;
  logic [23:0] ph_model, ph_prev;

  dds_mod dut (.clk(clk), .rst(rst), .code_f(code_f), .out_sin(out_sin), .sin_modl(sin_modl),
               .out_cos(out_cos), .cos_modl(cos_modl));

  always #5 clk = ~clk;

  function automatic int ref_word(int k);
    real s;
    s = 127.0 * $sin(6.283185307179586 * real'(k % 8192) / 8192.0);
    return 128 + ((s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(0.5 - s));
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step_and_check();
    int ks, kc;
    ph_prev = ph_model;
    @(posedge clk);
    ph_model = ph_model + code_f;
    if (ph_model < ph_prev) wraps++;
    @(negedge clk);
    // the ROM word now out was addressed by the phase before this edge
    ks = int'(ph_prev[23:11]);
    kc = ks + 2048;
    checks += 4;
    if (int'(out_sin) != ref_word(ks)) failures++;
    if (int'(out_cos) != ref_word(kc)) failures++;
    if (int'(sin_modl) != ref_word(ks) - 128) failures++;
    if (int'(cos_modl) != ref_word(kc) - 128) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d cos_modl=%0d exp=%0d", ks, cos_modl, ref_word(kc) - 128);
    end
  endtask

  initial begin
    rst = 1'b1; code_f = 24'd3355;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    ph_model = '0;
    for (int i = 0; i < 10000; i++) step_and_check();   // 10 kHz
    code_f = 24'd6710;
    for (int i = 0; i < 5000; i++) step_and_check();    // 20 kHz
    code_f = 24'($urandom);
    for (int i = 0; i < 2000; i++) step_and_check();
    checks++;
    if (wraps < 3) begin failures++; $display("FAIL too few wraps %0d", wraps); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
