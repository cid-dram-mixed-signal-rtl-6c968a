// flash_adc: behavioural model of one B-bit flash A/D converter with gray-coded output, one per
// binary row of the array. This models an analog block and is not synthesizable logic for it.
//
// The summing-line level arrives as a count of charge packets (see cid_dram_row). A ladder of
// 2^B-1 comparators compares it with thresholds c*FULL_SCALE/2^B, c = 1 .. 2^B-1, giving a
// thermometer code that therm2gray turns into gray code. The result is the truncated level
// floor(level*2^B/FULL_SCALE), clipped at 2^B-1. The 6-bit resolution and the gray output are
// the prototype's; the full scale equal to the row length (one LSB = COLS/64 cells) and the
// truncating ladder are this design's choice.
// Timing: samples when sample is high, code valid from the next clock edge.
module flash_adc #(
  parameter int unsigned B          = vmm_pkg::ADC_BITS_D,
  parameter int unsigned IN_W       = 11,
  parameter int unsigned FULL_SCALE = vmm_pkg::COLS_D
) (
  input  logic            clk,
  input  logic            sample,
  input  logic [IN_W-1:0] level,
  output logic [B-1:0]    gray
);
  logic [(1<<B)-2:0] therm;
  logic [B-1:0]      gray_c;

  // Comparator bank: level >= threshold c  <=>  level*2^B >= c*FULL_SCALE.
  always_comb begin
    for (int unsigned c = 1; c < (1 << B); c++)
      therm[c-1] = (64'(level) << B) >= 64'(c) * 64'(FULL_SCALE);
  end

  therm2gray #(.B(B)) u_enc (.therm, .gray(gray_c));

  always_ff @(posedge clk) if (sample) gray <= gray_c;
endmodule
