// SSB / DSB modulator (AM_MODULATOR) built by the phase-shift method.
//
// The modulating wave and the carrier each arrive as a signed sine and
// cosine sample pair. Two signed 8 x 8 multipliers form
//   p1 = sin_mod * cos_car      p0 = cos_mod * sin_car
// Their sum p1 + p0 = sin((w_car + W_mod) i) is the upper sideband and their
// difference p1 - p0 = -sin((w_car - W_mod) i) the lower sideband; the sum of
// both sidebands, 2 * p1, is the double-sideband signal. A multiplexer picks
// one of the three by type_mod and the scaler divides it by 255 and adds 128.
//
// Pipeline (all on clk, no reset, flushed within five clocks):
//   stage 1  products p1, p0                       (16 bit)
//   stage 2  usb = p1 + p0, lsb = p1 - p0          (16 bit)
//   stage 3  dsb = usb + lsb                        (16 bit)
//   mux      combinational, selected by type_mod
//   stage 4-5 scaler: /255, then +128
// LSB and USB reach ssb four clocks after the inputs, LSB+USB five clocks,
// because its extra adder is registered too. type_mod is used as it arrives.
//
// The multiplier pairing, widths, registered adders, divider and offset
// follow the published design's schematic. The numeric type_mod encoding
// (see ssb_pkg) and the combinational multiplexer are this design's choices.
module ssb_modulator #(
  parameter int unsigned SAMPLE_W = ssb_pkg::SAMPLE_W,
  parameter int unsigned PROD_W   = ssb_pkg::PROD_W
) (
  input  logic                       clk,
  input  logic signed [SAMPLE_W-1:0] sin_mod,
  input  logic signed [SAMPLE_W-1:0] cos_mod,
  input  logic signed [SAMPLE_W-1:0] sin_car,
  input  logic signed [SAMPLE_W-1:0] cos_car,
  input  ssb_pkg::type_mod_e         type_mod,
  output logic [SAMPLE_W-1:0]        ssb
);

  import ssb_pkg::*;

  logic signed [PROD_W-1:0] p1, p0;        // stage 1
  logic signed [PROD_W-1:0] usb, lsb;      // stage 2
  logic signed [PROD_W-1:0] dsb;           // stage 3
  logic signed [PROD_W-1:0] selected;

  always_ff @(posedge clk) begin
    p1  <= PROD_W'(sin_mod * cos_car);
    p0  <= PROD_W'(cos_mod * sin_car);
    usb <= p1 + p0;
    lsb <= p1 - p0;
    dsb <= usb + lsb;
  end

  always_comb begin
    unique case (type_mod)
      MOD_LSB: selected = lsb;
      MOD_USB: selected = usb;
      default: selected = dsb;             // MOD_DSB and the spare code
    endcase
  end

  ssb_scaler #(
    .IN_W   (PROD_W),
    .OUT_W  (SAMPLE_W),
    .DIVISOR(SCALE_DIVISOR),
    .OFFSET (SAMPLE_OFFSET)
  ) u_scaler (
    .clk (clk),
    .din (selected),
    .dout(ssb)
  );

endmodule
