// Self-checking testbench for dds_car.
// Keeps its own phase accumulator; the signed carrier samples must equal
// 128 + round(127 * sin(2*pi*k/8192)) - 128 (and the cosine, k + 2048) for
// the phase two clocks earlier (ROM register plus subtractor register).
// Runs the 100 kHz carrier code and a random code.
module tb_dds_car;

  logic              clk = 1'b0;
  logic              rst;
  logic [23:0]       code_f;
  logic signed [7:0] sin_carr, cos_carr;

  int checks = 0, failures = 0, wraps = 0;
  logic [23:0] ph_model, ph_d1, ph_d2;

  dds_car dut (.clk(clk), .rst(rst), .code_f(code_f), .sin_carr(sin_carr), .cos_carr(cos_carr));

  always #5 clk = ~clk;

  function automatic int ref_word(int k);
    real s;
    s = 127.0 * $sin(6.283185307179586 * real'(k % 8192) / 8192.0);
    return 128 + ((s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(0.5 - s));
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; code_f = 24'd33554;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    ph_model = '0; ph_d1 = '0; ph_d2 = '0;
    for (int i = 0; i < 8000; i++) begin
      int ks;
      if (i == 6000) code_f = 24'($urandom);
      @(posedge clk);
      ph_d2 = ph_d1;
      ph_d1 = ph_model;
      ph_model = ph_model + code_f;
      if (ph_model < ph_d1) wraps++;
      @(negedge clk);
      if (i >= 1) begin
        ks = int'(ph_d2[23:11]);
        checks += 2;
        if (int'(sin_carr) != ref_word(ks) - 128) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d k=%0d sin=%0d exp=%0d", i, ks, sin_carr, ref_word(ks) - 128);
        end
        if (int'(cos_carr) != ref_word(ks + 2048) - 128) failures++;
      end
    end
    checks++;
    if (wraps < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
