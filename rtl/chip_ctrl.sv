// chip_ctrl: the chip's operation controller. Each cycle the array does at most one thing:
// a refresh of a half row, a row write, a row read or a compute. A pending refresh goes first
// and holds op_ready low for that cycle, so a host operation stalls by one cycle. Otherwise the
// offered operation is taken (op_valid && op_ready):
//   OP_WRITE   both row selects of op_row go high; the even/odd load registers drive the bit
//              lines. Input lines stay inactive, as the paper requires during a write.
//   OP_READ    both halves of op_row are sensed (and restored) into the sense-amplifier
//              latches; one cycle later sreg_load copies them into the load registers for
//              serial readout.
//   OP_COMPUTE the input lines are driven for one cycle (x_en); the array registers every
//              summing-line level, adc_sample follows one cycle later, and adc_valid marks the
//              cycle after that, when the ADC codes are ready. Latency 2 cycles, one compute
//              per cycle possible.
// A refresh is a sense of one half row with the result unused. Write and compute phases
// follow the paper; the one-cycle phases, the priority and the handshake are this design's.
module chip_ctrl #(
  parameter int unsigned ROWS = vmm_pkg::ROWS_D,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  logic          clk,
  input  logic          rst_n,
  // host operations
  input  logic          op_valid,
  input  vmm_pkg::op_e  op,
  input  logic [RW-1:0] op_row,
  output logic          op_ready,
  // refresh scheduler
  input  logic          ref_req,
  input  logic [RW-1:0] ref_row,
  input  vmm_pkg::par_e ref_par,
  output logic          ref_ack,
  // array controls
  output logic          wr_en,
  output logic [RW-1:0] wr_row,
  output logic [1:0]    wr_par,
  output logic          rd_en,
  output logic [RW-1:0] rd_row,
  output logic [1:0]    rd_par,
  output logic          x_en,
  output logic          sreg_load,
  output logic          adc_sample,
  output logic          adc_valid
);
  import vmm_pkg::*;
  logic take;

  assign op_ready = !ref_req;
  assign ref_ack  = ref_req;
  assign take     = op_valid && op_ready;

  always_comb begin
    wr_en  = take && op == OP_WRITE;
    wr_row = op_row;
    wr_par = 2'b11;
    x_en   = take && op == OP_COMPUTE;
    rd_en  = ref_req || (take && op == OP_READ);
    rd_row = ref_req ? ref_row : op_row;
    rd_par = ref_req ? (ref_par == PAR_EVEN ? 2'b01 : 2'b10) : 2'b11;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sreg_load  <= 1'b0;
      adc_sample <= 1'b0;
      adc_valid  <= 1'b0;
    end else begin
      sreg_load  <= take && op == OP_READ;
      adc_sample <= x_en;
      adc_valid  <= adc_sample;
    end
  end

  a_one_phase: assert property (@(posedge clk) disable iff (!rst_n) $onehot0({wr_en, rd_en, x_en}));
endmodule
