// tb_vmm_chip: one chip with 8 rows of 64 cells and the default full scale (one ADC step per
// cell, so 64 transferring cells clip to code 63). Loads random rows through the even/odd
// registers, reads one row back serially, then for random input planes (and the all-ones
// plane, which saturates rows of all-ones) checks every gray-coded ADC output against
// min(63, number of columns with stored bit and input bit both 1). Checks the compute latency:
// adc_valid is high exactly two cycles after the edge that takes the compute. Counts refresh
// stalls (the refresh interval is 8 cycles here) and fails if none happened.
module tb_vmm_chip;
  import vmm_pkg::*;
  localparam int unsigned ROWS = 8, COLS = 64, B = 6, RW = 3, LEN = COLS / 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic w_shift = 0, w_in_even = 0, w_in_odd = 0, w_out_even, w_out_odd;
  logic x_shift = 0, x_in = 0, x_clr = 0, op_valid = 0, op_ready, adc_valid, ref_busy;
  op_e op = OP_WRITE;
  logic [RW-1:0] op_row = '0;
  logic [ROWS-1:0][B-1:0] adc_gray;
  logic [COLS-1:0] Wm [ROWS];
  logic [COLS-1:0] X;
  int checks = 0, failures = 0, n_stall = 0;

  vmm_chip #(.ROWS(ROWS), .COLS(COLS), .ADC_BITS(B), .REFRESH_INTERVAL(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic do_op(op_e o, int unsigned row);
    bit ok;
    @(negedge clk);
    op_valid = 1'b1; op = o; op_row = RW'(row);
    forever begin
      #1;
      ok = op_ready;
      if (!ok) n_stall++;
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
    @(negedge clk);
    op_valid = 1'b0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ROWS; r++) begin
      Wm[r] = {$urandom, $urandom};
      if (r == 7) Wm[r] = '1;
      for (int s = LEN - 1; s >= 0; s--) begin
        @(negedge clk);
        w_shift = 1'b1; w_in_even = Wm[r][2*s]; w_in_odd = Wm[r][2*s+1];
      end
      @(negedge clk);
      w_shift = 1'b0;
      do_op(OP_WRITE, r);
    end
    // serial readout of row 3 (one cycle for the sense latches to reach the registers)
    do_op(OP_READ, 3);
    @(negedge clk);
    for (int s = LEN - 1; s >= 0; s--) begin
      check(w_out_even == Wm[3][2*s] && w_out_odd == Wm[3][2*s+1], $sformatf("readout pair %0d", s));
      w_shift = 1'b1;
      @(negedge clk);
    end
    w_shift = 1'b0;
    for (int t = 0; t < 40; t++) begin
      int lat;
      X = {$urandom, $urandom};
      if (t == 0) X = '1;
      if (t == 1) X = '0;
      x_clr = (t == 1);
      @(negedge clk);
      x_clr = 1'b0;
      if (t != 1)
        for (int n = COLS - 1; n >= 0; n--) begin
          x_shift = 1'b1; x_in = X[n];
          @(negedge clk);
        end
      x_shift = 1'b0;
      // offer the compute; count the cycles from the taking edge to adc_valid
      op_valid = 1'b1; op = OP_COMPUTE;
      #1;
      while (!op_ready) begin n_stall++; @(negedge clk); #1; end
      @(negedge clk);
      op_valid = 1'b0;
      lat = 0;
      while (!adc_valid && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 1, $sformatf("compute latency %0d", lat + 1));
      for (int r = 0; r < ROWS; r++) begin
        int c;
        c = $countones(Wm[r] & X);
        if (c > 63) c = 63;
        check(adc_gray[r] == B'(c ^ (c >> 1)), $sformatf("plane %0d row %0d gray %b expected code %0d", t, r, adc_gray[r], c));
      end
      @(negedge clk);
      check(!adc_valid, "adc_valid lasts one cycle");
    end
    check(n_stall > 0, "refresh stalled an operation");
    $display("refresh stalls: %0d", n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
