// partial_combiner: digital recombination of the quantized binary partials for one output m.
// With matrix bit i (i = 0 the most significant) and input bit j (j = 0 the most significant),
// the chip delivers, once per input bit-plane and least significant plane first, the I codes
// Q(i,j), i = 0..I-1, for j = J-1 down to 0. The result is
//     q = sum_{i,j} Q(i,j) * 2^((I-1-i)+(J-1-j)),
// which is the paper's Q(m) multiplied by 2^(I+J), i.e. an exact integer.
// Structure (as in the paper's postprocessing diagram): row 0 passes through a delay, is added
// to row 1, delayed again, added to row 2 and so on, so that the adder output at step t is the
// diagonal sum Q'(k) = sum_i Q(i,k-i) for k = K-1-t, K = I+J-1. A shift-and-add accumulator
// with a feedback of one half then forms sum_k Q'(k) 2^(K-1-k); it is kept scaled by 2^(K-1)
// so the halving never drops a bit, and the output register (the switch in the diagram) takes
// it after the K-th step. Steps 0..J-1 advance on in_valid; steps J..K-1 follow on consecutive
// cycles with zero inputs to drain the delays (busy is high then and no input may arrive).
// The first step of a vector clears the feedback. q_valid pulses one cycle after the last step.
// Latency from the last in_valid: I cycles. Inputs are signed so offset-corrected codes fit.
module partial_combiner #(
  parameter int unsigned I_BITS = vmm_pkg::I_BITS_D,
  parameter int unsigned J_BITS = vmm_pkg::J_BITS_D,
  parameter int unsigned IN_W   = vmm_pkg::ADC_BITS_D + 1,
  parameter int unsigned QW     = IN_W + I_BITS + J_BITS
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                in_valid,
  input  logic signed [I_BITS-1:0][IN_W-1:0]  d,       // d[i] = Q(i, j) of the current plane
  output logic                                busy,
  output logic signed [QW-1:0]                q,
  output logic                                q_valid
);
  localparam int unsigned K     = I_BITS + J_BITS - 1;
  localparam int unsigned DW    = IN_W + $clog2(I_BITS + 1);   // diagonal-sum width
  localparam int unsigned ACC_W = DW + K + 1;
  localparam int unsigned CW    = $clog2(K + 1);

  logic [CW-1:0] cnt;              // step index within the vector
  logic step, last;
  logic signed [DW-1:0] sum [I_BITS];      // adder chain outputs
  logic signed [DW-1:0] dly [I_BITS-1];    // z^-1 elements
  logic signed [ACC_W-1:0] acc, acc_nxt;

  assign busy = cnt >= CW'(J_BITS);
  assign step = busy || in_valid;
  assign last = cnt == CW'(K - 1);

  always_comb begin
    for (int unsigned i = 0; i < I_BITS; i++) begin
      logic signed [DW-1:0] x;
      x = busy ? '0 : DW'(signed'(d[i]));   // packed elements are unsigned: sign-extend
      sum[i] = (i == 0) ? x : dly[i-1] + x;
    end
    acc_nxt = ((cnt == '0) ? ACC_W'(0) : (acc >>> 1)) + (ACC_W'(sum[I_BITS-1]) <<< (K - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      for (int unsigned i = 0; i + 1 < I_BITS; i++) dly[i] <= '0;
      acc     <= '0;
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= 1'b0;
      if (step) begin
        for (int unsigned i = 0; i + 1 < I_BITS; i++) dly[i] <= sum[i];
        acc <= acc_nxt;
        cnt <= last ? '0 : cnt + 1'b1;
        if (last) begin
          q       <= QW'(acc_nxt);
          q_valid <= 1'b1;
        end
      end
    end
  end

  a_no_input_while_draining: assert property (@(posedge clk) disable iff (!rst_n) !(busy && in_valid));
endmodule
