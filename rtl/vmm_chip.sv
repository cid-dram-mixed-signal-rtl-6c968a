// vmm_chip: one mixed-signal vector-matrix multiplier chip. A ROWS x COLS array of CID/DRAM
// cells holds the binary matrix, one matrix bit w_i(m,n) per cell, I rows of cells per output m.
// Each compute presents one bit-plane x_j of the input vector on the input lines; every row
// then adds up, on its output line, the products w_i(m,n)*x_j(n) of its COLS cells (the binary
// partial Y_ij(m)), and ROWS row-parallel flash ADCs quantize all the partials at once into
// gray code. Recombining the partials over i and j is left to logic outside the chip.
//
// Interface. Matrix rows are loaded through two shift registers, even and odd columns, one bit
// each per w_shift, then written with OP_WRITE. OP_READ senses a row back into the same
// registers, which then shift it out on w_out_even/w_out_odd (test readout). The input register
// is loaded serially with x_shift/x_in and emptied with x_clr. OP_COMPUTE samples all ROWS
// outputs; adc_gray is valid while adc_valid is high, two cycles after the operation is taken.
// A built-in refresh scheduler restores one half row every REFRESH_INTERVAL cycles and may
// hold op_ready low for a cycle; ref_busy shows it. Column n is even-register bit n/2 (n even)
// or odd-register bit n/2 (n odd); input register bit n drives column n.
// The array and ADCs are behavioural models; the rest is synthesizable. The array size, the
// ADC count and resolution, the even/odd load registers, the alternating refresh and the test
// readout follow the paper; the operation handshake and the timing are this design's choice.
module vmm_chip #(
  parameter int unsigned ROWS             = vmm_pkg::ROWS_D,
  parameter int unsigned COLS             = vmm_pkg::COLS_D,
  parameter int unsigned ADC_BITS         = vmm_pkg::ADC_BITS_D,
  parameter int unsigned FULL_SCALE       = COLS,
  parameter int unsigned REFRESH_INTERVAL = 64,
  parameter int unsigned FT_DIV           = 0,
  parameter int unsigned LEAK_PERIOD      = 0,
  localparam int unsigned RW              = $clog2(ROWS)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         w_shift,
  input  logic                         w_in_even,
  input  logic                         w_in_odd,
  output logic                         w_out_even,
  output logic                         w_out_odd,
  input  logic                         x_shift,
  input  logic                         x_in,
  input  logic                         x_clr,
  input  logic                         op_valid,
  input  vmm_pkg::op_e                 op,
  input  logic [RW-1:0]                op_row,
  output logic                         op_ready,
  output logic [ROWS-1:0][ADC_BITS-1:0] adc_gray,
  output logic                         adc_valid,
  output logic                         ref_busy
);
  import vmm_pkg::*;
  localparam int unsigned SUM_W = $clog2(COLS + 1) + 1;

  logic ref_req, ref_ack;
  logic [RW-1:0] ref_row;
  par_e ref_par;
  logic wr_en, rd_en, x_en, sreg_load, adc_sample;
  logic [RW-1:0] wr_row, rd_row;
  logic [1:0] wr_par, rd_par;
  logic [COLS/2-1:0] bl_even, bl_odd, sa_even, sa_odd;
  logic [COLS-1:0] x;
  logic [ROWS-1:0][SUM_W-1:0] sum;

  refresh_ctrl #(.ROWS(ROWS), .INTERVAL(REFRESH_INTERVAL)) u_refresh (
    .clk, .rst_n, .req(ref_req), .ack(ref_ack), .row(ref_row), .par(ref_par));

  chip_ctrl #(.ROWS(ROWS)) u_ctrl (
    .clk, .rst_n, .op_valid, .op, .op_row, .op_ready,
    .ref_req, .ref_row, .ref_par, .ref_ack,
    .wr_en, .wr_row, .wr_par, .rd_en, .rd_row, .rd_par, .x_en, .sreg_load, .adc_sample, .adc_valid);

  wload_sreg #(.LEN(COLS/2)) u_wl_even (
    .clk, .shift(w_shift), .sin(w_in_even), .load(sreg_load), .d(sa_even), .q(bl_even), .sout(w_out_even));
  wload_sreg #(.LEN(COLS/2)) u_wl_odd (
    .clk, .shift(w_shift), .sin(w_in_odd), .load(sreg_load), .d(sa_odd), .q(bl_odd), .sout(w_out_odd));

  input_sreg #(.COLS(COLS)) u_xreg (
    .clk, .rst_n, .clr(x_clr), .shift(x_shift), .x_in, .x);

  cid_dram_array #(.ROWS(ROWS), .COLS(COLS), .SUM_W(SUM_W), .FT_DIV(FT_DIV), .LEAK_PERIOD(LEAK_PERIOD)) u_array (
    .clk, .wr_en, .wr_row, .wr_par, .bl_even, .bl_odd, .rd_en, .rd_row, .rd_par, .sa_even, .sa_odd,
    .x_en, .x, .sum);

  for (genvar r = 0; r < ROWS; r++) begin : g_adc
    flash_adc #(.B(ADC_BITS), .IN_W(SUM_W), .FULL_SCALE(FULL_SCALE)) u_adc (
      .clk, .sample(adc_sample), .level(sum[r]), .gray(adc_gray[r]));
  end

  assign ref_busy = ref_req;
endmodule
