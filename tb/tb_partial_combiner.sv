// tb_partial_combiner: I = J = 4, signed 7-bit inputs. For random partials Q(i,j), presented
// one plane per in_valid with j = 3 first and random gaps, checks the result against
// sum Q(i,j) * 2^((3-i)+(3-j)), that busy is high for the I-1 drain steps, and that q_valid
// comes I-1 cycles after the edge that takes the last plane (latency check). Also runs
// vectors back to back (as soon as busy drops).
module tb_partial_combiner;
  localparam int unsigned I = 4, J = 4, IN_W = 7, QW = IN_W + I + J;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, busy, q_valid;
  logic signed [I-1:0][IN_W-1:0] d = '0;
  logic signed [QW-1:0] q;
  int checks = 0, failures = 0;
  int Q [I][J];

  partial_combiner #(.I_BITS(I), .J_BITS(J), .IN_W(IN_W), .QW(QW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 60; t++) begin
      int e, lat;
      e = 0;
      for (int i = 0; i < I; i++)
        for (int j = 0; j < J; j++) begin
          Q[i][j] = (t < 20) ? $urandom_range(63) : int'($urandom_range(126)) - 63;
          if (t == 0) Q[i][j] = 63;
          e += Q[i][j] * (1 << ((I - 1 - i) + (J - 1 - j)));
        end
      for (int j = J - 1; j >= 0; j--) begin
        if (t % 2 == 1) repeat ($urandom_range(3)) @(negedge clk);
        for (int i = 0; i < I; i++) d[i] = IN_W'(Q[i][j]);
        in_valid = 1'b1;
        @(negedge clk);
        in_valid = 1'b0;
      end
      lat = 1;
      while (!q_valid && lat < 20) begin
        check(busy, "busy while draining");
        @(negedge clk);
        lat++;
      end
      check(lat == I, $sformatf("latency %0d cycles", lat));
      check(int'(q) == e, $sformatf("vector %0d: q %0d expected %0d", t, q, e));
      check(!busy, "not busy after result");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
