// tb_refresh_ctrl: with the acknowledge tied to the request, checks that a request comes
// exactly every INTERVAL cycles and that the half rows are visited as (0,even), (0,odd),
// (1,even) ... wrapping after the last row. Then delays the acknowledge by a random number of
// cycles and checks that the request and its row/parity hold until acknowledged.
module tb_refresh_ctrl;
  import vmm_pkg::*;
  localparam int unsigned ROWS = 4, INTERVAL = 8, RW = 2;
  logic clk = 1'b0, rst_n = 1'b0, req, ack = 1'b0;
  logic [RW-1:0] row;
  par_e par;
  int checks = 0, failures = 0;

  refresh_ctrl #(.ROWS(ROWS), .INTERVAL(INTERVAL)) dut (.clk, .rst_n, .req, .ack, .row, .par);

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
    int last, cyc, k;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0; last = 0; k = 0;
    // immediate acknowledge
    while (k < 3 * ROWS * 2) begin
      @(negedge clk);
      cyc++;
      ack = req;
      if (req) begin
        check(cyc - last == INTERVAL, $sformatf("request spacing %0d", cyc - last));
        check(row == RW'((k / 2) % ROWS) && par == ((k % 2) ? PAR_ODD : PAR_EVEN),
              $sformatf("order: request %0d row %0d par %0d", k, row, par));
        last = cyc;
        k++;
      end
    end
    // late acknowledge
    for (int t = 0; t < 6; t++) begin
      logic [RW-1:0] r0;
      par_e p0;
      @(negedge clk);
      ack = 1'b0;
      while (!req) @(negedge clk);
      r0 = row; p0 = par;
      repeat ($urandom_range(1, 12)) begin
        @(negedge clk);
        check(req && row == r0 && par == p0, "request held until acknowledged");
      end
      ack = 1'b1;
      @(negedge clk);
      ack = 1'b0;
      check(row != r0 || par != p0, "advances after acknowledge");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
