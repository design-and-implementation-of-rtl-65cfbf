// Direct digital synthesizer for the carrier (DDS_CAR).
//
// A 24-bit phase accumulator advances by code_f every clock; its top 13
// bits address a sine ROM and a cosine ROM (the same half-wave table shifted
// by a quarter period). Each ROM word, offset binary 1..255, has 128
// subtracted in a register to give the signed carrier samples.
//
// Timing: phase register, ROM output register and subtractor register, so a
// sample reflects the phase two clocks earlier and arrives one clock after
// the matching modulating-wave sample of the other synthesizer. rst clears
// the accumulator asynchronously. The structure, widths, constants and the
// clocked subtractors follow the published design; storing the cosine as its
// own table (rather than offsetting the address) follows its schematic, where
// both ROMs see the same address.
module dds_car #(
  parameter int unsigned ACC_W    = ssb_pkg::ACC_W,
  parameter int unsigned ADDR_W   = ssb_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W = ssb_pkg::SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic [ACC_W-1:0]           code_f,
  output logic signed [SAMPLE_W-1:0] sin_carr,
  output logic signed [SAMPLE_W-1:0] cos_carr
);

  localparam logic [SAMPLE_W-1:0] MID     = SAMPLE_W'(2 ** (SAMPLE_W - 1));
  localparam int unsigned         QUARTER = 2 ** (ADDR_W - 2);

  logic [ACC_W-1:0]    phase;
  logic [ADDR_W-1:0]   addr;
  logic [SAMPLE_W-1:0] q_sin, q_cos;

  dds_phase_acc #(.ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst(rst), .code_f(code_f), .phase(phase)
  );

  assign addr = phase[ACC_W-1 -: ADDR_W];

  dds_sine_rom #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W), .PHASE_OFFSET(0)) u_rom_sin (
    .clk(clk), .addr(addr), .q(q_sin)
  );

  dds_sine_rom #(.ADDR_W(ADDR_W), .SAMPLE_W(SAMPLE_W), .PHASE_OFFSET(QUARTER)) u_rom_cos (
    .clk(clk), .addr(addr), .q(q_cos)
  );

  always_ff @(posedge clk) begin
    sin_carr <= signed'(q_sin - MID);
    cos_carr <= signed'(q_cos - MID);
  end

endmodule
