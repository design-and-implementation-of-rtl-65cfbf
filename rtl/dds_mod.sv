// Direct digital synthesizer for the modulating wave (DDS_MOD).
//
// A 24-bit phase accumulator advances by code_f every clock. Its top 13
// bits address a sine ROM directly and a second, identical sine ROM through
// an adder of +2048 (a quarter of the 8192-word period, wrapping), which
// turns that ROM's output into the cosine. Both ROMs give offset-binary
// samples 1..255; subtracting 128 gives the signed samples the modulator
// multiplies. The raw ROM words are brought out as well (out_sin drives the
// board output used to watch the modulating wave).
//
// Timing: phase is registered (1 clock), the ROMs are registered (1 clock)
// and the -128 is combinational, so a sample reflects the phase one clock
// earlier. rst clears the accumulator asynchronously. The structure, widths
// and constants follow the published design; the combinational -128 follows
// its schematic, where that subtractor has no clock.
module dds_mod #(
  parameter int unsigned ACC_W    = ssb_pkg::ACC_W,
  parameter int unsigned ADDR_W   = ssb_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W = ssb_pkg::SAMPLE_W,
  parameter int unsigned QUARTER  = 2 ** (ADDR_W - 2)    // 2048
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [ACC_W-1:0]           code_f,
  output logic [SAMPLE_W-1:0]        out_sin,
  output logic signed [SAMPLE_W-1:0] sin_modl,
  output logic [SAMPLE_W-1:0]        out_cos,
  output logic signed [SAMPLE_W-1:0] cos_modl
);

  localparam logic [SAMPLE_W-1:0] MID = SAMPLE_W'(2 ** (SAMPLE_W - 1));

  logic [ACC_W-1:0]  phase;
  logic [ADDR_W-1:0] addr_sin, addr_cos;

  dds_phase_acc #(.ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .code_f(code_f), .phase(phase)
  );

  assign addr_sin = phase[ACC_W-1 -: ADDR_W];
  assign addr_cos = addr_sin + ADDR_W'(QUARTER);          // wraps modulo 2^ADDR_W

  dds_sine_rom #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W), .PHASE_OFFSET(0)) u_rom_sin (
    .clk(clk), .addr(addr_sin), .q(out_sin)
  );

  dds_sine_rom #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W), .PHASE_OFFSET(0)) u_rom_cos (
    .clk(clk), .addr(addr_cos), .q(out_cos)
  );

  // Offset binary to two's complement.
  assign sin_modl = signed'(out_sin - MID);
  assign cos_modl = signed'(out_cos - MID);

endmodule
