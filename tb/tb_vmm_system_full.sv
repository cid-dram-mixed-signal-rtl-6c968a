// tb_vmm_system_full: the two-chip system at its default size (128 binary rows = 32 outputs of
// 4-bit matrix elements, 512 columns, 6-bit ADCs with a full scale of 512 cells, 4-bit inputs)
// running complete vector-matrix products. The offset models are off at the defaults, so the
// reference chip reads zero and each output must equal
//     sum_{i,j} min(63, floor(Y(i,j) * 64 / 512)) * 2^((3-i)+(3-j)),
// where Y(i,j) is the number of columns whose matrix bit i and input bit j are both 1, worked
// out here from the random matrix and inputs. One vector uses all-ones inputs and a matrix
// row of all-ones elements, so the saturating ADC code is reached.
module tb_vmm_system_full;
  import vmm_pkg::*;
  localparam int unsigned ROWS = ROWS_D, COLS = COLS_D, I = I_BITS_D, J = J_BITS_D, B = ADC_BITS_D;
  localparam int unsigned M = ROWS / I, RW = $clog2(ROWS), QW = B + 1 + I + J, LEN = COLS / 2;
  localparam int unsigned NVEC = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic w_shift = 0, w_in_even = 0, w_in_odd = 0, w_out_even, w_out_odd;
  logic x_shift = 0, x_in = 0, x_clr = 0;
  logic op_valid = 0;
  op_e  op = OP_WRITE;
  logic [RW-1:0] op_row = '0;
  logic op_ready, hold, ref_busy, q_valid;
  logic signed [M-1:0][QW-1:0] q;

  vmm_system dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_results = 0;
  int unsigned W [M][COLS];
  int unsigned X [COLS];
  int expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit wbit(int unsigned r, int unsigned n);
    return 1'((W[r / I][n] >> (I - 1 - (r % I))) & 1);
  endfunction

  task automatic do_op(op_e o, int unsigned row);
    bit ok;
    @(negedge clk);
    op_valid = 1'b1; op = o; op_row = RW'(row);
    forever begin
      #1;
      ok = op_ready;
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
  endtask

  task automatic load_row(int unsigned r);
    for (int s = LEN - 1; s >= 0; s--) begin
      @(negedge clk);
      op_valid = 1'b0;
      w_shift = 1'b1; w_in_even = wbit(r, 2 * s); w_in_odd = wbit(r, 2 * s + 1);
    end
    @(negedge clk);
    w_shift = 1'b0;
    do_op(OP_WRITE, r);
  endtask

  task automatic load_plane(int unsigned j);
    for (int n = COLS - 1; n >= 0; n--) begin
      @(negedge clk);
      op_valid = 1'b0;
      x_shift = 1'b1; x_in = 1'((X[n] >> (J - 1 - j)) & 1);
    end
    @(negedge clk);
    x_shift = 1'b0;
  endtask

  task automatic push_expected();
    for (int unsigned m = 0; m < M; m++) begin
      int s;
      s = 0;
      for (int unsigned i = 0; i < I; i++)
        for (int unsigned j = 0; j < J; j++) begin
          int y, c;
          y = 0;
          for (int unsigned n = 0; n < COLS; n++)
            y += int'(((W[m][n] >> (I - 1 - i)) & 1) & ((X[n] >> (J - 1 - j)) & 1));
          c = y * 64 / int'(COLS);
          if (c > 63) c = 63;
          s += c << ((I - 1 - i) + (J - 1 - j));
        end
      expq.push_back(s);
    end
  endtask

  always @(posedge clk) if (rst_n && q_valid) begin
    n_results++;
    for (int unsigned m = 0; m < M; m++) begin
      int e;
      e = (expq.size() > 0) ? expq.pop_front() : -1;
      check(int'(q[m]) == e, $sformatf("vector %0d output %0d: got %0d expected %0d", n_results, m, int'(q[m]), e));
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned m = 0; m < M; m++)
      for (int unsigned n = 0; n < COLS; n++) W[m][n] = (m == 0) ? 15 : $urandom_range(15);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned r = 0; r < ROWS; r++) load_row(r);
    for (int unsigned v = 0; v < NVEC; v++) begin
      for (int unsigned n = 0; n < COLS; n++) X[n] = (v == 0) ? 15 : $urandom_range(15);
      push_expected();
      for (int j = J - 1; j >= 0; j--) begin
        load_plane(j);
        do_op(OP_COMPUTE, 0);
      end
    end
    @(negedge clk);
    op_valid = 1'b0;
    repeat (40) @(negedge clk);
    check(n_results == NVEC, $sformatf("result count %0d", n_results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
