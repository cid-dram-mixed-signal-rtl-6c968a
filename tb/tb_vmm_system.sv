// tb_vmm_system: end-to-end test of the two-chip vector-matrix multiplier at a reduced size
// (8 binary rows = 2 outputs, 40 columns) with the feedthrough and leakage offset models on.
// The ADC full scale is set to 64 cells so one code step is one cell; the row levels (products
// plus offsets) stay below saturation, so after the reference-chip subtraction every
// recombined output must equal the exact integer product sum_n W(m,n) X(n), computed here
// directly from the random matrix and inputs. The test also reads a row back through the
// serial readout, and counts the mechanisms the design has: refresh stalls, refresh of both
// column halves, the hold between vectors, the combiner drain, nonzero reference offsets.
module tb_vmm_system;
  import vmm_pkg::*;
  localparam int unsigned ROWS = 8, COLS = 40, I = 4, J = 4, B = 6;
  localparam int unsigned M = ROWS / I, RW = $clog2(ROWS), QW = B + 1 + I + J, LEN = COLS / 2;
  localparam int unsigned NVEC = 6;

  logic clk = 1'b0, rst_n = 1'b0;
  logic w_shift = 0, w_in_even = 0, w_in_odd = 0, w_out_even, w_out_odd;
  logic x_shift = 0, x_in = 0, x_clr = 0;
  logic op_valid = 0;
  op_e  op = OP_WRITE;
  logic [RW-1:0] op_row = '0;
  logic op_ready, hold, ref_busy, q_valid;
  logic signed [M-1:0][QW-1:0] q;

  vmm_system #(.ROWS(ROWS), .COLS(COLS), .I_BITS(I), .J_BITS(J), .ADC_BITS(B), .FULL_SCALE(64),
               .REFRESH_INTERVAL(16), .FT_DIV(8), .LEAK_PERIOD(64)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned W [M][COLS];
  int unsigned X [COLS];
  int expq [$];
  int n_refresh_stall = 0, n_hold_stall = 0, n_drain = 0, n_offset = 0, n_ref_even = 0, n_ref_odd = 0;
  int n_results = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit wbit(int unsigned r, int unsigned n);
    return 1'((W[r / I][n] >> (I - 1 - (r % I))) & 1);
  endfunction

  // All inputs change at the falling edge. do_op offers one operation and returns right after
  // the rising edge that takes it, leaving op_valid high; the next task drives it again.
  task automatic do_op(op_e o, int unsigned row);
    bit ok;
    @(negedge clk);
    op_valid = 1'b1; op = o; op_row = RW'(row);
    forever begin
      #1;
      ok = op_ready;
      if (!ok && ref_busy) n_refresh_stall++;
      else if (!ok && hold) n_hold_stall++;
      @(posedge clk);
      if (ok) break;
      @(negedge clk);
    end
  endtask

  task automatic idle(int unsigned n);
    repeat (n) begin
      @(negedge clk);
      op_valid = 1'b0; w_shift = 1'b0; x_shift = 1'b0;
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
      int s = 0;
      for (int unsigned n = 0; n < COLS; n++) s += int'(W[m][n] * X[n]);
      expq.push_back(s);
    end
  endtask

  // Result checker.
  always @(posedge clk) if (rst_n && q_valid) begin
    n_results++;
    for (int unsigned m = 0; m < M; m++) begin
      int e;
      e = (expq.size() > 0) ? expq.pop_front() : -1;
      check(int'(q[m]) == e, $sformatf("vector %0d output %0d: got %0d expected %0d", n_results, m, int'(q[m]), e));
    end
  end

  // Mechanism counters.
  always @(posedge clk) if (rst_n) begin
    if (dut.pc_busy[0]) n_drain++;
    if (dut.u_ref.u_ctrl.ref_ack && dut.u_ref.u_ctrl.ref_req)
      if (dut.u_ref.ref_par == PAR_EVEN) n_ref_even++; else n_ref_odd++;
    if (dut.main_adc_valid && dut.ref_gray != '0) n_offset++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned m = 0; m < M; m++)
      for (int unsigned n = 0; n < COLS; n++) W[m][n] = $urandom_range(15);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int unsigned r = 0; r < ROWS; r++) load_row(r);

    // Serial readout of one row.
    do_op(OP_READ, 5);
    idle(2);
    for (int s = LEN - 1; s >= 0; s--) begin
      check(w_out_even == wbit(5, 2 * s) && w_out_odd == wbit(5, 2 * s + 1),
            $sformatf("readout bit pair %0d", s));
      w_shift = 1'b1;
      @(negedge clk);
    end
    w_shift = 1'b0;

    for (int unsigned v = 0; v < NVEC; v++) begin
      bit same_planes;
      same_planes = (v == 2 || v == 3);   // inputs of 0 or 15 only: all planes equal
      // vector 3 reuses the input register of vector 2, so its computes meet the hold
      if (v != 3)
        for (int unsigned n = 0; n < COLS; n++) X[n] = same_planes ? 15 * $urandom_range(1) : $urandom_range(15);
      if (v == 5) for (int unsigned n = 0; n < COLS; n++) X[n] = 15;   // largest levels
      push_expected();
      for (int j = J - 1; j >= 0; j--) begin
        if (!same_planes || (v == 2 && j == J - 1)) load_plane(j);
        do_op(OP_COMPUTE, 0);
      end
    end
    idle(40);

    check(n_results == NVEC, $sformatf("result count %0d", n_results));
    check(expq.size() == 0, "all expected results consumed");
    $display("mechanisms: refresh_stall=%0d hold_stall=%0d drain_cycles=%0d offset_nonzero=%0d refresh_even=%0d refresh_odd=%0d",
             n_refresh_stall, n_hold_stall, n_drain, n_offset, n_ref_even, n_ref_odd);
    check(n_refresh_stall > 0, "refresh stall happened");
    check(n_hold_stall > 0, "hold between vectors happened");
    check(n_drain > 0, "combiner drain happened");
    check(n_offset > 0, "reference offsets were nonzero");
    check(n_ref_even > 0 && n_ref_odd > 0, "refresh of both column halves");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
