// tb_gray2bin: feeds the gray code of every 6-bit value and checks that the value comes back.
module tb_gray2bin;
  localparam int unsigned B = 6;
  logic [B-1:0] gray, bin;
  int checks = 0, failures = 0;

  gray2bin #(.B(B)) dut (.gray, .bin);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned v = 0; v < (1 << B); v++) begin
      gray = B'(v ^ (v >> 1));
      #1;
      checks++;
      if (bin != B'(v)) begin
        failures++;
        $display("FAIL: value %0d decoded %0d", v, bin);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
