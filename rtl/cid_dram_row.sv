// cid_dram_row: behavioural model of one binary row of CID/DRAM cells, i.e. the N cells that
// share one row select and one output summing line (one matrix bit i of one output m).
// This is a model of an analog circuit, not synthesizable logic for a digital chip.
//
// Each three-transistor cell keeps one matrix bit as charge under its storage gate (DRAM part)
// and, while its input line is active, moves that charge onto the output line (CID part); the
// charge moved is the AND of the stored bit and the input bit, and the line voltage change is
// proportional to the number of cells that transfer. The model therefore reports the summing
// line as a count of transferred charge packets. The transfer is non-destructive: computing
// does not change the stored bits.
//
// Cells of even and odd columns have separate row selects and bit lines: column n sits on
// bit line n/2 of its parity. Selecting a half row for write stores the bit-line values; a read
// (sense) restores the half row and shows its bits. The paper names two error sources that the
// reference chip cancels; they are modelled here with made-up magnitudes, both off by default:
//   feedthrough: +1 count per FT_DIV active input lines (FT_DIV = 0: none);
//   leakage:     +1 count per LEAK_PERIOD cycles since each half row was last written or
//                restored (LEAK_PERIOD = 0: none).
// Timing: sum is registered on the clock edge where x_en is high and holds until the next
// compute. Writes take effect at the clock edge; rd_even/rd_odd are combinational.
module cid_dram_row #(
  parameter int unsigned COLS        = vmm_pkg::COLS_D,
  parameter int unsigned SUM_W       = $clog2(COLS + 1) + 1,
  parameter int unsigned FT_DIV      = 0,
  parameter int unsigned LEAK_PERIOD = 0
) (
  input  logic                  clk,
  input  logic                  rs_even,    // row select, even-column cells
  input  logic                  rs_odd,     // row select, odd-column cells
  input  logic [COLS/2-1:0]     bl_even,    // bit lines of even columns (write data)
  input  logic [COLS/2-1:0]     bl_odd,     // bit lines of odd columns (write data)
  input  logic                  sense_even, // restore/sense the even half row
  input  logic                  sense_odd,  // restore/sense the odd half row
  output logic [COLS/2-1:0]     rd_even,    // stored bits of even columns
  output logic [COLS/2-1:0]     rd_odd,     // stored bits of odd columns
  input  logic                  x_en,       // input lines active (compute phase)
  input  logic [COLS-1:0]       x,          // input bit-plane, one bit per column
  output logic [SUM_W-1:0]      sum         // charge packets on the output line
);
  localparam int unsigned SUM_MAX = (1 << SUM_W) - 1;

  logic [COLS/2-1:0] w_even, w_odd;  // stored charge of the cells
  int unsigned age_even, age_odd;    // cycles since last write or restore

  assign rd_even = w_even;
  assign rd_odd  = w_odd;

  always_ff @(posedge clk) begin
    if (rs_even) w_even <= bl_even;
    if (rs_odd)  w_odd  <= bl_odd;
    age_even <= (rs_even || sense_even) ? 0 : (age_even == '1 ? age_even : age_even + 1);
    age_odd  <= (rs_odd  || sense_odd)  ? 0 : (age_odd  == '1 ? age_odd  : age_odd  + 1);
  end

  // Charge moved onto the summing line during a compute.
  function automatic int unsigned line_level(input logic [COLS/2-1:0] we, input logic [COLS/2-1:0] wo,
                                             input logic [COLS-1:0] xv, input int unsigned ae,
                                             input int unsigned ao);
    int unsigned n_act, n_x, lvl;
    n_act = 0;
    n_x   = 0;
    for (int unsigned k = 0; k < COLS / 2; k++) begin
      if (we[k] && xv[2*k])   n_act++;
      if (wo[k] && xv[2*k+1]) n_act++;
      if (xv[2*k])            n_x++;
      if (xv[2*k+1])          n_x++;
    end
    lvl = n_act;
    if (FT_DIV != 0)      lvl += n_x / FT_DIV;
    if (LEAK_PERIOD != 0) lvl += ae / LEAK_PERIOD + ao / LEAK_PERIOD;
    return (lvl > SUM_MAX) ? SUM_MAX : lvl;
  endfunction

  always_ff @(posedge clk) begin
    if (x_en) sum <= SUM_W'(line_level(w_even, w_odd, x, age_even, age_odd));
  end
endmodule
