// input_sreg: the input register. It holds one bit-plane x_j of the input vector, one bit per
// column, and drives the input lines of the array during a compute. It is loaded serially:
// each shift moves the contents one column up and enters x_in at column 0, so after COLS shifts
// the first bit in sits at column COLS-1. clr empties it (all zeros), as at reset. A serially
// shifted input register that starts from all zeros follows the paper's linearity measurement;
// the single serial lane and the bit order are this design's choice.
// Timing: shift and clr act on the clock edge; clr wins.
module input_sreg #(
  parameter int unsigned COLS = vmm_pkg::COLS_D
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clr,
  input  logic            shift,
  input  logic            x_in,
  output logic [COLS-1:0] x
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     x <= '0;
    else if (clr)   x <= '0;
    else if (shift) x <= {x[COLS-2:0], x_in};
  end
endmodule
