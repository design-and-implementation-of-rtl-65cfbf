// Synchronous waveform ROM of 2^ADDR_W words of SAMPLE_W bits, stored as
// half a period.
//
// Word k of the full period is
//   128 + round(AMPLITUDE * sin(2*pi*(k + PHASE_OFFSET) / 2^ADDR_W)),
// rounded half away from zero. The table is computed at elaboration in
// 64-bit fixed point (Taylor series on one quadrant, no real arithmetic).
// With AMPLITUDE = 127 all words lie in 1..255 (offset binary).
// Because the second half of a sine period is the first half mirrored about
// mid-scale, only the first 2^(ADDR_W-1) words are stored; when the top
// address bit is set the output is 256 minus the stored word. This halves
// the memory, which is what lets four such ROMs fit in the FPGA's block RAM.
// PHASE_OFFSET = 0 gives a sine table, PHASE_OFFSET = 2^(ADDR_W-2) a cosine.
//
// Interface: addr is registered together with the read, q is valid one
// clock after addr (the ROM has an output clock). The 8192 x 8 size and the
// 0..255 range are the published design's; the amplitude of 127, the rounding
// and the half-wave folding scheme are this design's choices.
module dds_sine_rom #(
  parameter int unsigned ADDR_W       = ssb_pkg::ADDR_W,
  parameter int unsigned SAMPLE_W     = ssb_pkg::SAMPLE_W,
  parameter int unsigned PHASE_OFFSET = 0,
  parameter int unsigned AMPLITUDE    = ssb_pkg::ROM_AMPLITUDE
) (
  input  logic                clk,
  input  logic [ADDR_W-1:0]   addr,
  output logic [SAMPLE_W-1:0] q
);

  localparam int unsigned HALF    = 2 ** (ADDR_W - 1);
  localparam int unsigned FULL    = 2 ** ADDR_W;
  localparam int unsigned QUARTER = 2 ** (ADDR_W - 2);
  localparam int          MID     = 2 ** (SAMPLE_W - 1);     // 128
  localparam int          FRAC    = 30;                      // fixed-point bits
  localparam longint      HALF_PI = 64'd1686629713;          // pi/2 * 2^30

  // sin(pi/2 * j / QUARTER) * 2^FRAC for 0 <= j <= QUARTER, by the Taylor
  // series x - x^3/3! + x^5/5! - ... up to x^17 in 64-bit fixed point.
  function automatic longint quarter_sine(input int unsigned j);
    longint x, x2, term, sum;
    x    = (HALF_PI * longint'(j)) / longint'(QUARTER);
    x2   = (x * x) >>> FRAC;
    term = x;
    sum  = x;
    for (int n = 1; n <= 8; n++) begin
      term = -((term * x2) >>> FRAC) / longint'((2 * n) * (2 * n + 1));
      sum  = sum + term;
    end
    return sum;
  endfunction

  // Offset-binary word for full-period index m: MID + round(AMPLITUDE*sin),
  // rounded half away from zero, using the quadrant symmetry of the sine.
  function automatic logic [SAMPLE_W-1:0] sine_word(input int unsigned m);
    int unsigned quadrant, r, j;
    longint      mag;
    quadrant = m / QUARTER;
    r        = m % QUARTER;
    j        = (quadrant % 2 == 1) ? QUARTER - r : r;
    mag      = (longint'(AMPLITUDE) * quarter_sine(j) + (64'd1 <<< (FRAC - 1))) >>> FRAC;
    return (quadrant >= 2) ? SAMPLE_W'(MID - int'(mag)) : SAMPLE_W'(MID + int'(mag));
  endfunction

  logic [SAMPLE_W-1:0] half_tab [HALF];

  // Table contents, computed at elaboration.
  initial begin
    for (int unsigned k = 0; k < HALF; k++)
      half_tab[k] = sine_word((k + PHASE_OFFSET) % FULL);
  end

  logic [SAMPLE_W-1:0] word;
  logic                upper;

  always_ff @(posedge clk) begin
    word  <= half_tab[addr[ADDR_W-2:0]];
    upper <= addr[ADDR_W-1];
  end

  // Second half of the period: 2*MID - word.
  assign q = upper ? SAMPLE_W'((2 * MID) - int'(word)) : word;

endmodule
