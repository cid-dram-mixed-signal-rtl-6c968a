// cid_dram_array: behavioural model of the CID/DRAM cell array with its bit lines and its two
// rows of sense amplifiers. This is a model of an analog circuit, not synthesizable logic.
//
// ROWS binary rows (M outputs times I matrix bits) of COLS cells each. Each row has separate
// selects for its even-column and odd-column cells, and the vertical bit lines of one parity
// are shared by all rows. A write stores the even and/or odd bit-line words into the cells of
// row wr_row. A sense operation reads and restores the chosen half rows of rd_row; the even
// half is taken by the sense amplifiers at one edge of the array and the odd half by those at
// the other edge, and the sensed words are latched in sa_even/sa_odd on the same clock edge.
// Refresh is a sense operation whose result nobody uses. During compute all rows see the same
// input bit-plane and every row's summing-line level is registered in sum[r] (one cycle).
// A row count of 128 and 512 columns follow the prototype; the parity split of the sense
// amplifiers (even on one side, odd on the other) and the single-cycle operations are this
// design's choice.
module cid_dram_array #(
  parameter int unsigned ROWS        = vmm_pkg::ROWS_D,
  parameter int unsigned COLS        = vmm_pkg::COLS_D,
  parameter int unsigned SUM_W       = $clog2(COLS + 1) + 1,
  parameter int unsigned FT_DIV      = 0,
  parameter int unsigned LEAK_PERIOD = 0,
  localparam int unsigned RW         = $clog2(ROWS)
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [RW-1:0]          wr_row,
  input  logic [1:0]             wr_par,    // bit 0: even half, bit 1: odd half
  input  logic [COLS/2-1:0]      bl_even,
  input  logic [COLS/2-1:0]      bl_odd,
  input  logic                   rd_en,
  input  logic [RW-1:0]          rd_row,
  input  logic [1:0]             rd_par,
  output logic [COLS/2-1:0]      sa_even,   // even sense-amplifier latches
  output logic [COLS/2-1:0]      sa_odd,    // odd sense-amplifier latches
  input  logic                   x_en,
  input  logic [COLS-1:0]        x,
  output logic [ROWS-1:0][SUM_W-1:0] sum
);
  logic [ROWS-1:0][COLS/2-1:0] rd_even, rd_odd;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    cid_dram_row #(.COLS(COLS), .SUM_W(SUM_W), .FT_DIV(FT_DIV), .LEAK_PERIOD(LEAK_PERIOD)) u_row (
      .clk,
      .rs_even   (wr_en && wr_row == RW'(r) && wr_par[0]),
      .rs_odd    (wr_en && wr_row == RW'(r) && wr_par[1]),
      .bl_even, .bl_odd,
      .sense_even(rd_en && rd_row == RW'(r) && rd_par[0]),
      .sense_odd (rd_en && rd_row == RW'(r) && rd_par[1]),
      .rd_even   (rd_even[r]),
      .rd_odd    (rd_odd[r]),
      .x_en, .x,
      .sum       (sum[r])
    );
  end

  always_ff @(posedge clk) begin
    if (rd_en && rd_par[0]) sa_even <= rd_even[rd_row];
    if (rd_en && rd_par[1]) sa_odd  <= rd_odd[rd_row];
  end

  // Writing and computing share no phase: input lines are held inactive during a write.
  a_no_write_in_compute: assert property (@(posedge clk) !(x_en && (wr_en || rd_en)));
endmodule
