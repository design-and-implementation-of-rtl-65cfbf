// End-to-end testbench for the ssb_dds top, at its default parameters.
//
// Runs the 100 kHz carrier (code 33554) with the 10 kHz modulating tone
// (code 3355) in LSB, USB and LSB+USB, then LSB+USB with a 20 kHz tone
// (code 6710), then a reset in mid-run. Two kinds of checks:
//  * bit-exact: the testbench keeps its own copy of both phase accumulators
//    and computes every output sample from the sine formula
//    128 + round(127 * sin(2*pi*k/8192)), the crosswise products, /255
//    (toward zero) and +128, with the pipeline delays of the design
//    (X depends on the modulating phase 5 clocks and the carrier phase 6
//    clocks earlier for LSB/USB, one clock more for LSB+USB);
//  * spectral: over one 10 kHz period (5000 samples) the power of X at
//    90 kHz and 110 kHz must show the selected sideband(s) and suppress the
//    other by at least 20 dB; Y must cross mid-scale at the modulating rate.
// Counts how often each mechanism occurred: each modulation type, a mode
// switch, wraps of both accumulators, reads of the mirrored ROM half, and
// a reset.
module tb_ssb_dds;

  localparam int unsigned CODE_MOD10 = 3355;
  localparam int unsigned CODE_MOD20 = 6710;
  localparam int unsigned CODE_CAR   = 33554;
  localparam int          HIST       = 16;
  localparam real         TWOPI      = 6.283185307179586;
  localparam real         FCLK       = 50.0e6;

  logic        CLK = 1'b0;
  logic        RESETDDS;
  logic [23:0] CODE_F_X, CODE_F_Y;
  logic [1:0]  type_mod;
  logic [7:0]  X, Y;

  int checks = 0, failures = 0;
  int cnt_lsb = 0, cnt_usb = 0, cnt_dsb = 0, cnt_switch = 0, cnt_reset = 0;
  int cnt_wrap_x = 0, cnt_wrap_y = 0, cnt_upper = 0;

  // model phase histories, index 0 = value after the latest edge
  logic [23:0] phx [HIST];
  logic [23:0] phy [HIST];
  int          stable;          // clocks since the last mode change or reset

  ssb_dds dut (.CLK(CLK), .RESETDDS(RESETDDS), .CODE_F_X(CODE_F_X), .CODE_F_Y(CODE_F_Y),
               .type_mod(type_mod), .X(X), .Y(Y));

  always #10 CLK = ~CLK;       // 50 MHz

  function automatic int ref_word(int k);
    real s;
    s = 127.0 * $sin(TWOPI * real'(k % 8192) / 8192.0);
    return 128 + ((s >= 0.0) ? $rtoi(s + 0.5) : -$rtoi(0.5 - s));
  endfunction

  function automatic int scale(int v);
    int q;
    q = (v >= 0) ? (v / 255) : -((-v) / 255);
    return (q + 128) & 255;
  endfunction

  function automatic int expected_x(int mode);
    int dm, dc, km, kc, sm, cm, sc, cc;
    dm = (mode < 2) ? 5 : 6;
    dc = dm + 1;
    km = int'(phx[dm][23:11]);
    kc = int'(phy[dc][23:11]);
    sm = ref_word(km) - 128;  cm = ref_word(km + 2048) - 128;
    sc = ref_word(kc) - 128;  cc = ref_word(kc + 2048) - 128;
    case (mode)
      0:       return scale(sm * cc - cm * sc);
      1:       return scale(sm * cc + cm * sc);
      default: return scale(2 * sm * cc);
    endcase
  endfunction

  // model accumulators, updated on the same edges as the design
  always @(posedge CLK or posedge RESETDDS) begin
    for (int i = HIST - 1; i > 0; i--) begin
      phx[i] <= phx[i-1];
      phy[i] <= phy[i-1];
    end
    if (RESETDDS) begin
      phx[0] <= '0;
      phy[0] <= '0;
    end else begin
      phx[0] <= phx[0] + CODE_F_X;
      phy[0] <= phy[0] + CODE_F_Y;
      if (phx[0] + CODE_F_X < phx[0]) cnt_wrap_x++;
      if (phy[0] + CODE_F_Y < phy[0]) cnt_wrap_y++;
      if (phx[0][23] || phy[0][23]) cnt_upper++;
    end
  end

  initial begin
    repeat (200000) @(posedge CLK);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Goertzel-style power of X - 128 at frequency f over n samples.
  real acc_re [3], acc_im [3];
  real freqs  [3];

  task automatic run_mode(input int mode, input int unsigned code_x, input int n,
                          input bit spectral, input string tag);
    int y_cross;
    logic y_hi;
    real p_lo, p_hi, p_car, f_mod;
    if (int'(type_mod) != mode) cnt_switch++;
    type_mod = 2'(mode);
    CODE_F_X = 24'(code_x);
    stable = 0;
    f_mod = real'(code_x) * FCLK / 16777216.0;
    freqs[0] = real'(CODE_F_Y) * FCLK / 16777216.0 - f_mod;
    freqs[1] = real'(CODE_F_Y) * FCLK / 16777216.0 + f_mod;
    freqs[2] = real'(CODE_F_Y) * FCLK / 16777216.0;
    for (int j = 0; j < 3; j++) begin acc_re[j] = 0.0; acc_im[j] = 0.0; end
    y_cross = 0;
    y_hi = 1'b0;
    for (int i = 0; i < n + 20; i++) begin
      @(negedge CLK);
      stable++;
      if (stable > 8) begin
        checks++;
        if (int'(X) != expected_x(mode)) begin
          failures++;
          if (failures < 10) $display("FAIL %s i=%0d X=%0d exp=%0d", tag, i, X, expected_x(mode));
        end
        case (mode)
          0: cnt_lsb++;
          1: cnt_usb++;
          default: cnt_dsb++;
        endcase
      end
      if (i >= 20) begin
        for (int j = 0; j < 3; j++) begin
          acc_re[j] += real'(int'(X) - 128) * $cos(TWOPI * freqs[j] * real'(i) / FCLK);
          acc_im[j] += real'(int'(X) - 128) * $sin(TWOPI * freqs[j] * real'(i) / FCLK);
        end
        if (!y_hi && Y >= 8'd160) begin y_hi = 1'b1; y_cross++; end
        if (y_hi && Y <= 8'd96) y_hi = 1'b0;
      end
    end
    p_lo  = acc_re[0] * acc_re[0] + acc_im[0] * acc_im[0];
    p_hi  = acc_re[1] * acc_re[1] + acc_im[1] * acc_im[1];
    p_car = acc_re[2] * acc_re[2] + acc_im[2] * acc_im[2];
    $display("%s: P(fc-fm)=%0.3e P(fc+fm)=%0.3e P(fc)=%0.3e Y periods=%0d", tag, p_lo, p_hi, p_car, y_cross);
    if (spectral) begin
      // the modulating tone completes n * f_mod / F_CLK periods
      checks++;
      if (y_cross < $rtoi(real'(n) * f_mod / FCLK) - 1 || y_cross > $rtoi(real'(n) * f_mod / FCLK) + 1) begin
        failures++;
        $display("FAIL %s: Y periods %0d", tag, y_cross);
      end
      checks += 2;
      case (mode)
        0: begin
          if (!(p_lo > 100.0 * p_hi)) begin failures++; $display("FAIL %s: USB not suppressed", tag); end
          if (!(p_lo > 100.0 * p_car)) begin failures++; $display("FAIL %s: carrier present", tag); end
        end
        1: begin
          if (!(p_hi > 100.0 * p_lo)) begin failures++; $display("FAIL %s: LSB not suppressed", tag); end
          if (!(p_hi > 100.0 * p_car)) begin failures++; $display("FAIL %s: carrier present", tag); end
        end
        default: begin
          if (!(p_lo > 0.5 * p_hi && p_hi > 0.5 * p_lo)) begin failures++; $display("FAIL %s: sidebands unequal", tag); end
          if (!(p_lo > 100.0 * p_car)) begin failures++; $display("FAIL %s: carrier present", tag); end
        end
      endcase
    end
  endtask

  initial begin
    RESETDDS = 1'b1;
    CODE_F_X = 24'(CODE_MOD10);
    CODE_F_Y = 24'(CODE_CAR);
    type_mod = 2'd0;
    repeat (3) @(negedge CLK);
    RESETDDS = 1'b0;
    cnt_reset++;
    run_mode(0, CODE_MOD10, 5000, 1'b1, "LSB 10k");
    run_mode(1, CODE_MOD10, 5000, 1'b1, "USB 10k");
    run_mode(2, CODE_MOD10, 5000, 1'b1, "LSB+USB 10k");
    run_mode(2, CODE_MOD20, 5000, 1'b1, "LSB+USB 20k");
    run_mode(3, CODE_MOD20, 500, 1'b0, "spare code");
    // reset in mid-run, then LSB again with the 20 kHz tone
    @(negedge CLK) RESETDDS = 1'b1;
    @(negedge CLK) RESETDDS = 1'b0;
    cnt_reset++;
    run_mode(1, CODE_MOD20, 2500, 1'b1, "USB 20k after reset");

    $display("lsb=%0d usb=%0d dsb=%0d switches=%0d resets=%0d wrap_mod=%0d wrap_car=%0d upper_half=%0d",
             cnt_lsb, cnt_usb, cnt_dsb, cnt_switch, cnt_reset, cnt_wrap_x, cnt_wrap_y, cnt_upper);
    checks += 8;
    if (cnt_lsb == 0)    begin failures++; $display("FAIL no LSB"); end
    if (cnt_usb == 0)    begin failures++; $display("FAIL no USB"); end
    if (cnt_dsb == 0)    begin failures++; $display("FAIL no LSB+USB"); end
    if (cnt_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    if (cnt_reset < 2)   begin failures++; $display("FAIL no mid-run reset"); end
    if (cnt_wrap_x == 0) begin failures++; $display("FAIL modulating phase never wrapped"); end
    if (cnt_wrap_y == 0) begin failures++; $display("FAIL carrier phase never wrapped"); end
    if (cnt_upper == 0)  begin failures++; $display("FAIL mirrored ROM half never read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
