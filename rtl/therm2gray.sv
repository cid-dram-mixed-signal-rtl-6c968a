// therm2gray: encodes the thermometer code of a flash converter's comparator bank straight
// into a B-bit gray code. therm[c-1] is 1 when the input is at or above threshold c
// (c = 1 .. 2^B-1). Gray bit k changes at the levels that are odd multiples of 2^k, so it is
// the XOR of the comparators at those thresholds; the top bit is the single comparator at
// 2^(B-1). Only one comparator feeds each XOR term, so a one-step bubble disturbs at most one
// output bit. The paper states that the ADCs produce gray code; this encoder structure is this
// design's choice. Purely combinational.
module therm2gray #(
  parameter int unsigned B = vmm_pkg::ADC_BITS_D
) (
  input  logic [(1<<B)-2:0] therm,
  output logic [B-1:0]      gray
);
  always_comb begin
    for (int unsigned k = 0; k < B; k++) begin
      gray[k] = 1'b0;
      for (int unsigned c = 1; c < (1 << B); c++)
        if (((c >> k) & 1) == 1 && (c & ((1 << k) - 1)) == 0) gray[k] ^= therm[c-1];
    end
  end
endmodule
