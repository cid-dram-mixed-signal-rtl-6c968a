// tb_chip_ctrl: random operations and refresh requests; checks every cycle that refresh wins
// and stalls the host, that each taken operation raises exactly the right array control with
// the right row and halves, and that sreg_load, adc_sample and adc_valid follow a read or a
// compute by exactly one, one and two cycles.
module tb_chip_ctrl;
  import vmm_pkg::*;
  localparam int unsigned ROWS = 16, RW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic op_valid = 1'b0, op_ready, ref_req = 1'b0, ref_ack;
  op_e op = OP_WRITE;
  logic [RW-1:0] op_row = '0, ref_row = '0, wr_row, rd_row;
  par_e ref_par = PAR_EVEN;
  logic wr_en, rd_en, x_en, sreg_load, adc_sample, adc_valid;
  logic [1:0] wr_par, rd_par;
  int checks = 0, failures = 0;
  logic exp_load1 = 1'b0, exp_cmp1 = 1'b0, exp_cmp2 = 1'b0;
  int n_stall = 0, n_w = 0, n_r = 0, n_c = 0;

  chip_ctrl #(.ROWS(ROWS)) dut (.*);

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
    for (int t = 0; t < 3000; t++) begin
      bit take;
      @(negedge clk);
      op_valid = $urandom_range(1);
      op       = op_e'($urandom_range(2));
      op_row   = RW'($urandom);
      ref_req  = ($urandom_range(3) == 0);
      ref_row  = RW'($urandom);
      ref_par  = par_e'($urandom_range(1));
      #1;
      take = op_valid && !ref_req;
      if (op_valid && ref_req) n_stall++;
      check(op_ready == !ref_req && ref_ack == ref_req, "refresh has priority");
      check(wr_en == (take && op == OP_WRITE) && x_en == (take && op == OP_COMPUTE), "write/compute enables");
      if (wr_en) begin check(wr_row == op_row && wr_par == 2'b11, "write row and halves"); n_w++; end
      check(rd_en == (ref_req || (take && op == OP_READ)), "read enable");
      if (ref_req) check(rd_row == ref_row && rd_par == (ref_par == PAR_EVEN ? 2'b01 : 2'b10), "refresh row and half");
      else if (rd_en) begin check(rd_row == op_row && rd_par == 2'b11, "read row and halves"); n_r++; end
      if (x_en) n_c++;
      check(sreg_load == exp_load1 && adc_sample == exp_cmp1 && adc_valid == exp_cmp2, "pipeline timing");
      exp_cmp2  = exp_cmp1;
      exp_cmp1  = take && op == OP_COMPUTE;
      exp_load1 = take && op == OP_READ;
    end
    check(n_stall > 0 && n_w > 0 && n_r > 0 && n_c > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
