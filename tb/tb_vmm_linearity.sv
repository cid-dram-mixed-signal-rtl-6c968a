// tb_vmm_linearity: the linearity measurement on one chip at its default size (128 rows of 512
// cells). Every cell is written with a 1; the input register starts empty and an all-ones
// stream is shifted in 64 positions at a time, with a compute after every 64 shifts, so the
// number of transferring cells on each row steps 0, 64, ..., 512. With a full scale of 512
// cells the ADC code must step by 8 (64 * 64 / 512) on every row: 0, 8, ..., 56, and 63 (clipped)
// at 512. Also checks the two-cycle compute latency each time.
module tb_vmm_linearity;
  import vmm_pkg::*;
  localparam int unsigned ROWS = ROWS_D, COLS = COLS_D, B = ADC_BITS_D, RW = $clog2(ROWS), LEN = COLS / 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic w_shift = 0, w_in_even = 0, w_in_odd = 0, w_out_even, w_out_odd;
  logic x_shift = 0, x_in = 0, x_clr = 0, op_valid = 0, op_ready, adc_valid, ref_busy;
  op_e op = OP_WRITE;
  logic [RW-1:0] op_row = '0;
  logic [ROWS-1:0][B-1:0] adc_gray;
  int checks = 0, failures = 0;

  vmm_chip dut (.*);

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
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
    @(negedge clk);
    op_valid = 1'b0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    w_shift = 1'b1; w_in_even = 1'b1; w_in_odd = 1'b1;
    repeat (LEN) @(negedge clk);
    w_shift = 1'b0;
    for (int r = 0; r < ROWS; r++) do_op(OP_WRITE, r);
    x_clr = 1'b1;
    @(negedge clk);
    x_clr = 1'b0;
    for (int k = 0; k <= COLS / 64; k++) begin
      int code, lat;
      if (k > 0) begin
        x_shift = 1'b1; x_in = 1'b1;
        repeat (64) @(negedge clk);
        x_shift = 1'b0;
      end
      do_op(OP_COMPUTE, 0);
      lat = 1;   // do_op returns in the cycle after the one that took the compute
      while (!adc_valid && lat < 10) begin @(negedge clk); lat++; end
      check(lat == 2, $sformatf("compute latency %0d", lat));
      code = (64 * k) * 64 / COLS;
      if (code > 63) code = 63;
      for (int r = 0; r < ROWS; r++)
        check(adc_gray[r] == B'(code ^ (code >> 1)), $sformatf("%0d active cells, row %0d: gray %b expected code %0d", 64 * k, r, adc_gray[r], code));
      $display("active cells %0d: code %0d", 64 * k, code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
