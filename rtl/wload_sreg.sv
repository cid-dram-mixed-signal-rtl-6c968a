// wload_sreg: matrix-element shift register for the cells of one column parity. The chip has
// two of them, one for the even and one for the odd columns, so a full row of COLS bits is
// loaded two bits per clock. Bits enter at sin and move towards the top: after LEN shifts the
// first bit in sits at q[LEN-1] (the highest column of that parity) and the last at q[0]. The
// register drives the bit lines of its parity for a row write. For test readout it takes the
// sensed half row in parallel (load) and shifts it out at sout, highest column first, the same
// order it was loaded in. Two serial registers along odd and even columns and serial readout
// follow the paper; sharing one register for load and readout, and the bit order, are this
// design's choice. Timing: load and shift act on the clock edge, load wins; no reset (the
// contents are data).
module wload_sreg #(
  parameter int unsigned LEN = vmm_pkg::COLS_D / 2
) (
  input  logic           clk,
  input  logic           shift,
  input  logic           sin,
  input  logic           load,
  input  logic [LEN-1:0] d,
  output logic [LEN-1:0] q,
  output logic           sout
);
  always_ff @(posedge clk) begin
    if (load)       q <= d;
    else if (shift) q <= {q[LEN-2:0], sin};
  end
  assign sout = q[LEN-1];
endmodule
