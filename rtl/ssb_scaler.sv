// Scaler: brings the 16-bit signed sideband sum back to an 8-bit
// offset-binary sample for the DAC.
//
// The product of two signed 8-bit samples and the sum of two such products
// need 16 bits; dividing by 255 returns the value to the 8-bit range and
// adding 128 moves it to mid-scale (offset binary). Stage 1 is a signed
// division by the unsigned constant DIVISOR, truncating toward zero
// (remainder unused); stage 2 adds OFFSET and keeps the low OUT_W bits.
//
// Timing: two registers, dout follows din by two clocks. No reset: the two
// stages flush in two clocks. The divisor, offset and the one-stage divider
// pipeline follow the published design; truncation toward zero is this
// design's choice.
module ssb_scaler #(
  parameter int unsigned IN_W    = ssb_pkg::PROD_W,
  parameter int unsigned OUT_W   = ssb_pkg::SAMPLE_W,
  parameter int unsigned DIVISOR = ssb_pkg::SCALE_DIVISOR,
  parameter int unsigned OFFSET  = ssb_pkg::SAMPLE_OFFSET
) (
  input  logic                   clk,
  input  logic signed [IN_W-1:0] din,
  output logic [OUT_W-1:0]       dout
);

  localparam logic signed [IN_W:0] DIV = (IN_W+1)'(DIVISOR);

  logic signed [IN_W:0]   q_wide;
  logic signed [IN_W-1:0] quotient;
  logic        [IN_W-1:0] shifted;

  // Signed division by a positive constant; SystemVerilog '/' truncates
  // toward zero. One extra bit keeps the divisor positive.
  assign q_wide  = signed'({din[IN_W-1], din}) / DIV;
  assign shifted = quotient + IN_W'(OFFSET);

  always_ff @(posedge clk) begin
    quotient <= q_wide[IN_W-1:0];
    dout     <= shifted[OUT_W-1:0];
  end

endmodule
