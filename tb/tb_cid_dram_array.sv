// tb_cid_dram_array: an 8 x 32 array. Writes random rows (sometimes one half only), checks
// every row's summing-line level against a count computed from a copy of the matrix, checks
// that a sense of both halves latches the row's bits in the even and odd sense latches, and
// that a one-half sense (refresh) changes only that half's latch.
module tb_cid_dram_array;
  localparam int unsigned ROWS = 8, COLS = 32, H = 16, RW = 3, SUM_W = 7;
  logic clk = 1'b0;
  logic wr_en = 0, rd_en = 0, x_en = 0;
  logic [RW-1:0] wr_row = '0, rd_row = '0;
  logic [1:0] wr_par = '0, rd_par = '0;
  logic [H-1:0] bl_even = '0, bl_odd = '0, sa_even, sa_odd;
  logic [COLS-1:0] x = '0;
  logic [ROWS-1:0][SUM_W-1:0] sum;
  logic [H-1:0] me [ROWS], mo [ROWS];
  int checks = 0, failures = 0;

  cid_dram_array #(.ROWS(ROWS), .COLS(COLS), .SUM_W(SUM_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic write_row(int r, logic [1:0] p, logic [H-1:0] e, logic [H-1:0] o);
    wr_en = 1'b1; wr_row = RW'(r); wr_par = p; bl_even = e; bl_odd = o;
    if (p[0]) me[r] = e;
    if (p[1]) mo[r] = o;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int r = 0; r < ROWS; r++) write_row(r, 2'b11, H'($urandom), H'($urandom));
    for (int t = 0; t < 30; t++) begin
      write_row($urandom_range(ROWS - 1), 2'($urandom_range(1, 3)), H'($urandom), H'($urandom));
      x = $urandom; x_en = 1'b1;
      @(negedge clk);
      x_en = 1'b0;
      for (int r = 0; r < ROWS; r++) begin
        int s;
        s = 0;
        for (int n = 0; n < COLS; n++) s += int'((n % 2 ? mo[r][n/2] : me[r][n/2]) & x[n]);
        check(int'(sum[r]) == s, $sformatf("row %0d level %0d expected %0d", r, sum[r], s));
      end
      rd_row = RW'($urandom_range(ROWS - 1)); rd_par = 2'b11; rd_en = 1'b1;
      @(negedge clk);
      rd_en = 1'b0;
      check(sa_even == me[rd_row] && sa_odd == mo[rd_row], "sense both halves");
      begin
        logic [H-1:0] keep;
        int r2;
        keep = sa_even;
        r2 = (int'(rd_row) + 1) % ROWS;
        rd_row = RW'(r2); rd_par = 2'b10; rd_en = 1'b1;
        @(negedge clk);
        rd_en = 1'b0;
        check(sa_odd == mo[r2] && sa_even == keep, "sense odd half only");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
