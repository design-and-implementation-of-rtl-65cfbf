// Digital single-sideband modulator built from two direct digital
// synthesizers (top level, SSB_DDS).
//
// DDS_MOD synthesizes the modulating wave at CODE_F_X * F_CLK / 2^24 and
// DDS_CAR the carrier at CODE_F_Y * F_CLK / 2^24, each as a signed sine and
// cosine pair. The modulator multiplies them crosswise, forms the lower
// sideband, the upper sideband or both (type_mod), and scales the result to
// an 8-bit offset-binary sample X for an external DAC and low-pass filter.
// Y carries the raw modulating sine for observation. With a 50 MHz clock,
// CODE_F_Y = 33554 gives a 100 kHz carrier and CODE_F_X = 3355 a 10 kHz
// modulating tone, so X holds 90 kHz (LSB), 110 kHz (USB) or both.
//
// Interface: all inputs are sampled on CLK. RESETDDS is an asynchronous,
// active-high clear of both phase accumulators. Latency from the phase
// registers to X is six clocks for LSB/USB and seven for LSB+USB (carrier
// path). The block structure and port names follow the published design; the
// reset polarity and the type_mod encoding (0 LSB, 1 USB, 2/3 LSB+USB) are
// this design's choices.
module ssb_dds #(
  parameter int unsigned ACC_W    = ssb_pkg::ACC_W,
  parameter int unsigned ADDR_W   = ssb_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W = ssb_pkg::SAMPLE_W
) (
  input  logic                CLK,
  input  logic                RESETDDS,
  input  logic [ACC_W-1:0]    CODE_F_X,
  input  logic [ACC_W-1:0]    CODE_F_Y,
  input  logic [1:0]          type_mod,
  output logic [SAMPLE_W-1:0] X,
  output logic [SAMPLE_W-1:0] Y
);

  logic signed [SAMPLE_W-1:0] sin_modl, cos_modl;
  logic signed [SAMPLE_W-1:0] sin_carr, cos_carr;
  logic [SAMPLE_W-1:0]        out_cos_unused;

  dds_mod #(.ACC_W(ACC_W), .ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W)) u_dds_mod (
    .clk     (CLK),
    .rst     (RESETDDS),
    .code_f  (CODE_F_X),
    .out_sin (Y),
    .sin_modl(sin_modl),
    .out_cos (out_cos_unused),
    .cos_modl(cos_modl)
  );

  dds_car #(.ACC_W(ACC_W), .ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W)) u_dds_car (
    .clk     (CLK),
    .rst     (RESETDDS),
    .code_f  (CODE_F_Y),
    .sin_carr(sin_carr),
    .cos_carr(cos_carr)
  );

  ssb_modulator #(.SAMPLE_W(SAMPLE_W), .PROD_W(2 * SAMPLE_W)) u_mod (
    .clk     (CLK),
    .sin_mod (sin_modl),
    .cos_mod (cos_modl),
    .sin_car (sin_carr),
    .cos_car (cos_carr),
    .type_mod(ssb_pkg::type_mod_e'(type_mod)),
    .ssb     (X)
  );

endmodule
