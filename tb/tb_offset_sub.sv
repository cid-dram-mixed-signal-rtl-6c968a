// tb_offset_sub: random gray-coded main and reference outputs for 16 rows; checks that each
// row's difference equals the difference of the underlying binary values and that out_valid
// follows in_valid by one cycle.
module tb_offset_sub;
  localparam int unsigned ROWS = 16, B = 6;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, out_valid;
  logic [ROWS-1:0][B-1:0] main_gray, ref_gray;
  logic signed [ROWS-1:0][B:0] diff;
  int mv [ROWS], rv [ROWS];
  int checks = 0, failures = 0;

  offset_sub #(.ROWS(ROWS), .B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 50; t++) begin
      for (int r = 0; r < ROWS; r++) begin
        mv[r] = $urandom_range(63);
        rv[r] = (t % 3 == 0) ? 0 : $urandom_range(63);
        main_gray[r] = B'(mv[r] ^ (mv[r] >> 1));
        ref_gray[r]  = B'(rv[r] ^ (rv[r] >> 1));
      end
      in_valid = 1'b1;
      @(negedge clk);
      in_valid = 1'b0;
      check(out_valid, "out_valid after one cycle");
      for (int r = 0; r < ROWS; r++)
        check(int'(signed'(diff[r])) == mv[r] - rv[r], $sformatf("row %0d diff %0d expected %0d", r, signed'(diff[r]), mv[r] - rv[r]));
      @(negedge clk);
      check(!out_valid, "out_valid is one cycle");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
