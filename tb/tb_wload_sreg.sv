// tb_wload_sreg: shifts a random word into a 256-bit load register and checks the parallel
// output (first bit in ends at the top), then parallel-loads another random word and shifts it
// out, checking the serial order (top bit first), and checks that load wins over shift.
module tb_wload_sreg;
  localparam int unsigned LEN = 256;
  logic clk = 1'b0, shift = 1'b0, sin = 1'b0, load = 1'b0, sout;
  logic [LEN-1:0] d = '0, q, word;
  int checks = 0, failures = 0;

  wload_sreg #(.LEN(LEN)) dut (.clk, .shift, .sin, .load, .d, .q, .sout);

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
    for (int k = 0; k < LEN / 32; k++) word[k*32 +: 32] = $urandom;
    for (int s = LEN - 1; s >= 0; s--) begin
      @(negedge clk);
      shift = 1'b1; sin = word[s];
    end
    @(negedge clk);
    shift = 1'b0;
    check(q == word, "serial load");
    for (int k = 0; k < LEN / 32; k++) word[k*32 +: 32] = $urandom;
    d = word; load = 1'b1; shift = 1'b1; sin = 1'b0;
    @(negedge clk);
    load = 1'b0;
    check(q == word, "parallel load wins over shift");
    for (int s = LEN - 1; s >= 0; s--) begin
      check(sout == word[s], $sformatf("readout bit %0d", s));
      @(negedge clk);
    end
    shift = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
