// gray2bin: converts a B-bit gray code back to plain binary: the top bit is copied and each
// lower bit is the XOR of the gray bit with the binary bit above it. Combinational. Used on the
// digital side to read the gray-coded flash ADC outputs (the decoder structure is the
// standard one; the paper only says the ADCs use gray code).
module gray2bin #(
  parameter int unsigned B = vmm_pkg::ADC_BITS_D
) (
  input  logic [B-1:0] gray,
  output logic [B-1:0] bin
);
  always_comb begin
    bin[B-1] = gray[B-1];
    for (int k = int'(B) - 2; k >= 0; k--) bin[k] = bin[k+1] ^ gray[k];
  end
endmodule
