// tb_input_sreg: checks that the 512-bit input register starts empty after reset, that it
// follows the Fig.-4-style experiment (an all-ones stream shifted in from all zeros gives
// exactly k ones at columns 0..k-1 after k shifts), that a random plane lands with its first
// bit at column 511, and that clr empties it.
module tb_input_sreg;
  localparam int unsigned COLS = 512;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, shift = 1'b0, x_in = 1'b0;
  logic [COLS-1:0] x, plane;
  int checks = 0, failures = 0;

  input_sreg #(.COLS(COLS)) dut (.clk, .rst_n, .clr, .shift, .x_in, .x);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(x == '0, "empty after reset");
    rst_n = 1'b1;
    for (int k = 1; k <= COLS; k++) begin
      shift = 1'b1; x_in = 1'b1;
      @(negedge clk);
      if (k % 64 == 0) check(x == {COLS{1'b1}} >> (COLS - k), $sformatf("%0d ones", k));
    end
    for (int k = 0; k < COLS / 32; k++) plane[k*32 +: 32] = $urandom;
    for (int n = COLS - 1; n >= 0; n--) begin
      x_in = plane[n];
      @(negedge clk);
    end
    shift = 1'b0;
    check(x == plane, "random plane");
    @(negedge clk);
    check(x == plane, "holds without shift");
    clr = 1'b1; shift = 1'b1;
    @(negedge clk);
    clr = 1'b0; shift = 1'b0;
    check(x == '0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
