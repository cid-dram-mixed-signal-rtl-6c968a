// tb_cid_dram_row: one row of 64 cells. Writes random halves, checks the readback, computes
// with random input planes and checks the level against the count of columns where both the
// stored bit and the input bit are 1; computes twice to check the stored bits are not
// disturbed; writes one half alone. A second row with the offset models on checks the
// feedthrough term (+1 per 4 active inputs) and the leakage term (+1 per 10 cycles since each
// half was written, restored by a sense).
module tb_cid_dram_row;
  localparam int unsigned COLS = 64, H = 32, SUM_W = 8;
  logic clk = 1'b0;
  logic rs_even = 0, rs_odd = 0, sense_even = 0, sense_odd = 0, x_en = 0;
  logic [H-1:0] bl_even = '0, bl_odd = '0, rd_even, rd_odd, rd_even2, rd_odd2;
  logic [COLS-1:0] x = '0;
  logic [SUM_W-1:0] sum, sum2;
  logic [H-1:0] we, wo;
  int checks = 0, failures = 0;

  cid_dram_row #(.COLS(COLS), .SUM_W(SUM_W)) dut (.*);
  cid_dram_row #(.COLS(COLS), .SUM_W(SUM_W), .FT_DIV(4), .LEAK_PERIOD(10)) dut_off (
    .clk, .rs_even, .rs_odd, .bl_even, .bl_odd, .sense_even, .sense_odd,
    .rd_even(rd_even2), .rd_odd(rd_odd2), .x_en, .x, .sum(sum2));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected(logic [COLS-1:0] xv);
    int s = 0;
    for (int n = 0; n < COLS; n++) s += int'((n % 2 ? wo[n/2] : we[n/2]) & xv[n]);
    return s;
  endfunction

  task automatic compute(logic [COLS-1:0] xv);
    x = xv; x_en = 1'b1;
    @(negedge clk);
    x_en = 1'b0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int t = 0; t < 20; t++) begin
      logic [COLS-1:0] xv;
      we = $urandom; wo = $urandom;
      bl_even = we; bl_odd = wo;
      if (t == 5) begin
        rs_even = 1'b1; bl_odd = ~wo;     // odd half not selected: keeps old bits
        @(negedge clk);
        rs_even = 1'b0;
        wo = rd_odd;
        check(rd_even == we, "even half written alone");
      end else begin
        rs_even = 1'b1; rs_odd = 1'b1;
        @(negedge clk);
        rs_even = 1'b0; rs_odd = 1'b0;
      end
      check(rd_even == we && rd_odd == wo, "readback");
      xv = {$urandom, $urandom};
      compute(xv);
      check(int'(sum) == expected(xv), $sformatf("level %0d expected %0d", sum, expected(xv)));
      compute(xv);
      check(int'(sum) == expected(xv) && rd_even == we && rd_odd == wo, "non-destructive compute");
    end
    // offsets: all inputs on, write both halves, compute 36 cycles after the write
    we = $urandom; wo = $urandom;
    bl_even = we; bl_odd = wo; rs_even = 1'b1; rs_odd = 1'b1;
    @(negedge clk);
    rs_even = 1'b0; rs_odd = 1'b0;
    repeat (35) @(negedge clk);
    compute('1);
    check(int'(sum2) == expected('1) + COLS / 4 + 2 * (35 / 10),
          $sformatf("feedthrough and leakage: %0d expected %0d", sum2, expected('1) + COLS / 4 + 2 * (35 / 10)));
    sense_even = 1'b1;   // restore the even half only
    @(negedge clk);
    sense_even = 1'b0;
    compute({COLS{1'b0}});
    check(int'(sum2) == (36 + 1) / 10, $sformatf("leakage after restoring one half: %0d", sum2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
