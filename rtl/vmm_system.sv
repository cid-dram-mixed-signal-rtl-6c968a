// vmm_system: the complete vector-matrix multiplier, Y(m) = sum_n W(m,n) X(n), with an I-bit
// matrix and J-bit inputs, all unsigned. Two identical chips run in lock step: the main chip
// holds the matrix, the reference chip holds all zeros and sees exactly the same inputs and
// refresh timing. Their row outputs are subtracted row by row (offset_sub), removing the
// feedthrough and leakage offsets common to both, and one partial_combiner per output m
// weights and adds the I x J quantized partials into Q(m).
//
// Matrix layout: output m uses rows m*I .. m*I+I-1; row m*I+i holds bit i of W(m,n) (i = 0 the
// most significant) in column n. Use: load and write each row (w_shift, OP_WRITE), then for
// every input vector present its J bit-planes least significant first (j = J-1 down to 0):
// shift the plane into the input register and issue OP_COMPUTE. After the J-th compute of a
// vector, further computes are held off (op_ready low for OP_COMPUTE, hold high) until q_valid,
// because the combiner's delay line drains for I-1 steps. q(m) is valid while q_valid is high:
//     q(m) = sum_{i,j} Qc(m*I+i, j) * 2^((I-1-i)+(J-1-j)),
// Qc being the offset-corrected ADC code; with FULL_SCALE = COLS one code step is COLS/2^B
// cells, so q(m) * COLS / 2^ADC_BITS estimates the integer product sum_n W(m,n) X(n).
// Latency from the last compute to q_valid: I + 3 cycles.
// Both chips, the reference subtraction and the recombination follow the paper; where the
// subtraction sits and all handshakes are this design's choice.
module vmm_system #(
  parameter int unsigned ROWS             = vmm_pkg::ROWS_D,
  parameter int unsigned COLS             = vmm_pkg::COLS_D,
  parameter int unsigned I_BITS           = vmm_pkg::I_BITS_D,
  parameter int unsigned J_BITS           = vmm_pkg::J_BITS_D,
  parameter int unsigned ADC_BITS         = vmm_pkg::ADC_BITS_D,
  parameter int unsigned FULL_SCALE       = COLS,
  parameter int unsigned REFRESH_INTERVAL = 64,
  parameter int unsigned FT_DIV           = 0,
  parameter int unsigned LEAK_PERIOD      = 0,
  localparam int unsigned M               = ROWS / I_BITS,
  localparam int unsigned RW              = $clog2(ROWS),
  localparam int unsigned QW              = ADC_BITS + 1 + I_BITS + J_BITS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        w_shift,
  input  logic                        w_in_even,
  input  logic                        w_in_odd,
  output logic                        w_out_even,
  output logic                        w_out_odd,
  input  logic                        x_shift,
  input  logic                        x_in,
  input  logic                        x_clr,
  input  logic                        op_valid,
  input  vmm_pkg::op_e                op,
  input  logic [RW-1:0]               op_row,
  output logic                        op_ready,
  output logic                        hold,
  output logic                        ref_busy,
  output logic signed [M-1:0][QW-1:0] q,
  output logic                        q_valid
);
  import vmm_pkg::*;

  logic chip_valid, main_ready, ref_ready, main_adc_valid, ref_adc_valid, ref_ref_busy;
  logic [ROWS-1:0][ADC_BITS-1:0] main_gray, ref_gray;
  logic unused_ref_out_even, unused_ref_out_odd;
  logic diff_valid;
  logic signed [ROWS-1:0][ADC_BITS:0] diff;
  logic [M-1:0] pc_busy, pc_qv;
  logic [$clog2(J_BITS+1)-1:0] n_cmp;   // computes taken in the current vector
  logic blocked;

  assign blocked    = (op == OP_COMPUTE) && hold;
  assign chip_valid = op_valid && !blocked;
  assign op_ready   = main_ready && !blocked;

  vmm_chip #(.ROWS(ROWS), .COLS(COLS), .ADC_BITS(ADC_BITS), .FULL_SCALE(FULL_SCALE),
             .REFRESH_INTERVAL(REFRESH_INTERVAL), .FT_DIV(FT_DIV), .LEAK_PERIOD(LEAK_PERIOD)) u_main (
    .clk, .rst_n, .w_shift, .w_in_even, .w_in_odd, .w_out_even, .w_out_odd,
    .x_shift, .x_in, .x_clr, .op_valid(chip_valid), .op, .op_row, .op_ready(main_ready),
    .adc_gray(main_gray), .adc_valid(main_adc_valid), .ref_busy);

  vmm_chip #(.ROWS(ROWS), .COLS(COLS), .ADC_BITS(ADC_BITS), .FULL_SCALE(FULL_SCALE),
             .REFRESH_INTERVAL(REFRESH_INTERVAL), .FT_DIV(FT_DIV), .LEAK_PERIOD(LEAK_PERIOD)) u_ref (
    .clk, .rst_n, .w_shift, .w_in_even(1'b0), .w_in_odd(1'b0),
    .w_out_even(unused_ref_out_even), .w_out_odd(unused_ref_out_odd),
    .x_shift, .x_in, .x_clr, .op_valid(chip_valid), .op, .op_row, .op_ready(ref_ready),
    .adc_gray(ref_gray), .adc_valid(ref_adc_valid), .ref_busy(ref_ref_busy));

  offset_sub #(.ROWS(ROWS), .B(ADC_BITS)) u_offset (
    .clk, .rst_n, .in_valid(main_adc_valid), .main_gray, .ref_gray, .out_valid(diff_valid), .diff);

  for (genvar m = 0; m < M; m++) begin : g_out
    partial_combiner #(.I_BITS(I_BITS), .J_BITS(J_BITS), .IN_W(ADC_BITS + 1), .QW(QW)) u_comb (
      .clk, .rst_n, .in_valid(diff_valid), .d(diff[m*I_BITS +: I_BITS]),
      .busy(pc_busy[m]), .q(q[m]), .q_valid(pc_qv[m]));
  end
  assign q_valid = pc_qv[0];

  // Hold off the next vector's computes until the combiners have drained.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_cmp <= '0;
      hold  <= 1'b0;
    end else begin
      if (op_valid && op_ready && op == OP_COMPUTE) begin
        if (n_cmp == $bits(n_cmp)'(J_BITS - 1)) begin
          n_cmp <= '0;
          hold  <= 1'b1;
        end else begin
          n_cmp <= n_cmp + 1'b1;
        end
      end
      if (q_valid) hold <= 1'b0;
    end
  end

  a_chips_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    main_ready == ref_ready && main_adc_valid == ref_adc_valid && ref_busy == ref_ref_busy);
  // All combiners see the same valid stream, so they drain and finish together.
  a_combiners_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (pc_busy == '0 || pc_busy == '1) && (pc_qv == '0 || pc_qv == '1));
endmodule
