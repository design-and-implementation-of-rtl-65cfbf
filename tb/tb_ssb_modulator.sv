// Self-checking testbench for ssb_modulator.
// Drives random signed samples in -127..127 every clock, holding each
// modulation type for a burst, and checks the output against
//   LSB: (sin_mod*cos_car - cos_mod*sin_car) / 255 + 128   four clocks later
//   USB: (sin_mod*cos_car + cos_mod*sin_car) / 255 + 128   four clocks later
//   LSB+USB: (2*sin_mod*cos_car) / 255 + 128               five clocks later
// with division truncating toward zero. Also checks extreme samples.
module tb_ssb_modulator;
  import ssb_pkg::*;

  logic              clk = 1'b0;
  logic signed [7:0] sin_mod, cos_mod, sin_car, cos_car;
  type_mod_e         type_mod;
  logic [7:0]        ssb;

  int checks = 0, failures = 0;
  int n_mode [4] = '{0, 0, 0, 0};
  int h_sm [$], h_cm [$], h_sc [$], h_cc [$];

  ssb_modulator dut (.clk(clk), .sin_mod(sin_mod), .cos_mod(cos_mod), .sin_car(sin_car),
                     .cos_car(cos_car), .type_mod(type_mod), .ssb(ssb));

  always #5 clk = ~clk;

  function automatic int scale(int v);
    int q;
    q = (v >= 0) ? (v / 255) : -((-v) / 255);
    return (q + 128) & 255;
  endfunction

  function automatic int rnd_sample();
    return int'($urandom_range(254)) - 127;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    type_mod = MOD_LSB;
    for (int burst = 0; burst < 160; burst++) begin
      type_mod = type_mod_e'(burst % 4);
      for (int i = 0; i < 40; i++) begin
        int lat, e, idx;
        @(negedge clk);
        // samples applied at this negedge are index h_*.size()
        if (burst % 8 == 7) begin
          sin_mod = (i % 2) ? 8'sd127 : -8'sd127;
          cos_mod = (i % 3) ? 8'sd127 : -8'sd127;
          sin_car = (i % 5) ? -8'sd127 : 8'sd127;
          cos_car = 8'sd127;
        end else begin
          sin_mod = 8'(rnd_sample()); cos_mod = 8'(rnd_sample());
          sin_car = 8'(rnd_sample()); cos_car = 8'(rnd_sample());
        end
        h_sm.push_back(int'(sin_mod)); h_cm.push_back(int'(cos_mod));
        h_sc.push_back(int'(sin_car)); h_cc.push_back(int'(cos_car));
        lat = (type_mod == MOD_LSB || type_mod == MOD_USB) ? 4 : 5;
        // output now reflects samples applied lat clocks before the current
        // ones; skip the start of each burst while the pipeline changes mode
        if (i >= 6) begin
          idx = h_sm.size() - 1 - lat;
          case (type_mod)
            MOD_LSB: e = scale(h_sm[idx] * h_cc[idx] - h_cm[idx] * h_sc[idx]);
            MOD_USB: e = scale(h_sm[idx] * h_cc[idx] + h_cm[idx] * h_sc[idx]);
            default: e = scale(2 * h_sm[idx] * h_cc[idx]);
          endcase
          checks++;
          n_mode[type_mod]++;
          if (int'(ssb) != e) begin
            failures++;
            if (failures < 10) $display("FAIL mode=%0d i=%0d ssb=%0d exp=%0d", type_mod, i, ssb, e);
          end
        end
      end
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never checked", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
