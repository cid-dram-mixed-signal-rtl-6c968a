// tb_therm2gray: drives every valid thermometer code of a 6-bit flash converter (levels 0..63)
// and checks the encoder output against the gray code of the level, level ^ (level >> 1).
module tb_therm2gray;
  localparam int unsigned B = 6;
  logic [(1<<B)-2:0] therm;
  logic [B-1:0] gray;
  int checks = 0, failures = 0;

  therm2gray #(.B(B)) dut (.therm, .gray);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned lvl = 0; lvl < (1 << B); lvl++) begin
      for (int unsigned c = 1; c < (1 << B); c++) therm[c-1] = (lvl >= c);
      #1;
      checks++;
      if (gray != B'(lvl ^ (lvl >> 1))) begin
        failures++;
        $display("FAIL: level %0d gray %b", lvl, gray);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
