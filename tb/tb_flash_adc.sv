// tb_flash_adc: sweeps the input level of a 6-bit flash ADC with the default full scale of 512
// cells over 0..600 and checks the registered gray output against
// min(63, floor(level * 64 / 512)) encoded as gray; also checks that the code holds while
// sample is low.
module tb_flash_adc;
  localparam int unsigned B = 6, IN_W = 11, FS = 512;
  logic clk = 1'b0, sample = 1'b0;
  logic [IN_W-1:0] level = '0;
  logic [B-1:0] gray;
  int checks = 0, failures = 0;

  flash_adc #(.B(B), .IN_W(IN_W), .FULL_SCALE(FS)) dut (.clk, .sample, .level, .gray);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [B-1:0] expect_gray(int unsigned lvl);
    int unsigned c;
    c = lvl * 64 / FS;
    if (c > 63) c = 63;
    return B'(c ^ (c >> 1));
  endfunction

  initial begin
    for (int unsigned lvl = 0; lvl <= 600; lvl++) begin
      @(negedge clk);
      level = IN_W'(lvl); sample = 1'b1;
      @(negedge clk);
      sample = 1'b0;
      checks++;
      if (gray != expect_gray(lvl)) begin
        failures++;
        $display("FAIL: level %0d gray %b expected %b", lvl, gray, expect_gray(lvl));
      end
      level = IN_W'(0);
      @(negedge clk);
      checks++;
      if (gray != expect_gray(lvl)) begin
        failures++;
        $display("FAIL: code did not hold at level %0d", lvl);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
