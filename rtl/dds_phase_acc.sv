// Phase accumulator of a direct digital synthesizer.
//
// Each clock the unsigned frequency code is added to the phase register,
// which wraps modulo 2^ACC_W. The phase therefore advances at
// code * F_CLK / 2^ACC_W turns per second: with ACC_W = 24 and a 50 MHz
// clock the step is about 3 Hz and a 100 kHz tone needs code 33554.
//
// Interface: code_f is sampled every clock; phase is the register itself,
// so a new code shows in phase one clock later. rst is an asynchronous,
// active-high clear (the accumulator's aclr). The width and the clear
// follow the published design; the reset polarity is this design's choice.
module dds_phase_acc #(
  parameter int unsigned ACC_W = ssb_pkg::ACC_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [ACC_W-1:0] code_f,
  output logic [ACC_W-1:0] phase
);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) phase <= '0;
    else     phase <= phase + code_f;   // wraps modulo 2^ACC_W
  end

endmodule
