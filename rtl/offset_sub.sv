// offset_sub: offset compensation with a reference chip. The reference chip gets the same
// inputs, the same refresh timing and an all-zero matrix, so its row outputs hold only the
// input-dependent feedthrough and the time-dependent leakage offsets. For every row this block
// decodes both gray-coded ADC outputs and subtracts the reference row from the matching main
// row, giving a signed code of B+1 bits. Subtracting equivalent rows in the digital domain
// follows the paper; doing it on the ADC codes before recombination (rather than on the final
// outputs, which gives the same sum) is this design's choice.
// Timing: one register stage; out_valid follows in_valid by one cycle.
module offset_sub #(
  parameter int unsigned ROWS = vmm_pkg::ROWS_D,
  parameter int unsigned B    = vmm_pkg::ADC_BITS_D
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [ROWS-1:0][B-1:0]    main_gray,
  input  logic [ROWS-1:0][B-1:0]    ref_gray,
  output logic                      out_valid,
  output logic signed [ROWS-1:0][B:0] diff
);
  logic [ROWS-1:0][B-1:0] main_bin, ref_bin;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    gray2bin #(.B(B)) u_main (.gray(main_gray[r]), .bin(main_bin[r]));
    gray2bin #(.B(B)) u_ref  (.gray(ref_gray[r]),  .bin(ref_bin[r]));
    always_ff @(posedge clk) if (in_valid) diff[r] <= {1'b0, main_bin[r]} - {1'b0, ref_bin[r]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end
endmodule
