// tb_toeplitz_solver: end-to-end test of the systolic Toeplitz solver at its
// default size (N = 4, a 5 x 5 system).
//
// The testbench builds random Toeplitz systems T x = b, streams them into the
// array as words {t_k, t_-k, b_(N-k)}, collects x_0..x_N from the output
// stream and compares each component with a solution computed here in
// double precision by Gaussian elimination with partial pivoting (on the
// same fixed-point-rounded inputs). The diagonal is large enough for the
// elimination without pivoting that the array performs to be stable, small
// enough for the multipliers to matter; the tolerance covers the fixed-point
// rounding. Every fourth system is symmetric. It also checks the schedule:
// exactly 4N step cycles per solve, x_0 appearing 4N+2 cycles after the last
// input word, and the number of active processor-steps in each phase
// (N(N+1)/2 in Phase 1, (N+1)(N+2)/2 in Phase 2). It counts the mechanisms the array
// uses (input load, multiplier formation by division in S_0, multiplier
// hand-off to the right, Phase 1 and Phase 2 steps, result unload, input
// stalls from in_valid gaps) and fails any that never happened.
module tb_toeplitz_solver;
  import toeplitz_pkg::*;

  localparam int N        = 4;
  localparam int NUM_SYS  = 20;
  localparam real TOL     = 0.002;
  // Diagonal t_0 in [DIAG, DIAG+1], other t_j in [-1, 1]: the matrix is
  // diagonally dominant only in a weak sense, so the multipliers are large
  // enough that every term of the recurrences matters.
  localparam real DIAG    = 0.5 * real'(N) + 1.5;
  localparam int WATCHDOG = 100000;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  load_word_t in_word;
  logic       in_valid;
  logic       in_ready;
  data_t      x_data;
  logic       x_valid, x_last, busy;

  int checks = 0;
  int failures = 0;

  toeplitz_solver dut (
    .clk, .rst_n, .in_word, .in_valid, .in_ready,
    .x_data, .x_valid, .x_last, .busy
  );

  always #5 clk = ~clk;

  function automatic real to_real(data_t v);
    return real'(v) / real'(1 << FRAC_W);
  endfunction

  function automatic data_t to_fx(real r);
    return data_t'($rtoi(r * real'(1 << FRAC_W)));
  endfunction

  // ---- mechanism counters -------------------------------------------------
  int n_load = 0, n_div = 0, n_handoff = 0, n_p1 = 0, n_p2 = 0, n_unload = 0;
  int n_stall = 0, n_step_cycles = 0;
  real max_err = 0.0;

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) n_load++;
    if (!in_valid && in_ready && busy) n_stall++;
    if (dut.step_en) n_step_cycles++;
    if (x_valid) n_unload++;
    if (dut.g_cell[0].u_cell.p1_active) n_div += 2;
    if (dut.g_cell[0].u_cell.p2_active) n_div += 1;
    for (int k = 0; k <= N; k++) begin
      if (dut.p1_active[k]) n_p1++;
      if (dut.p2_active[k]) n_p2++;
      if (k > 0 && dut.p1_active[k]) n_handoff++;
    end
  end

  // ---- reference solver ---------------------------------------------------
  real A [N+1][N+2];

  task automatic ref_solve(output real xr [N+1]);
    for (int c = 0; c <= N; c++) begin
      int p = c;
      for (int r = c + 1; r <= N; r++)
        if ((A[r][c] < 0 ? -A[r][c] : A[r][c]) > (A[p][c] < 0 ? -A[p][c] : A[p][c])) p = r;
      for (int j = 0; j <= N + 1; j++) begin
        real tmp = A[c][j]; A[c][j] = A[p][j]; A[p][j] = tmp;
      end
      for (int r = c + 1; r <= N; r++) begin
        real f = A[r][c] / A[c][c];
        for (int j = c; j <= N + 1; j++) A[r][j] -= f * A[c][j];
      end
    end
    for (int r = N; r >= 0; r--) begin
      real s = A[r][N+1];
      for (int j = r + 1; j <= N; j++) s -= A[r][j] * xr[j];
      xr[r] = s / A[r][r];
    end
  endtask

  // ---- one solve ------------------------------------------------------------
  data_t tp [N+1];   // t_0 .. t_N   (first row)
  data_t tn [N+1];   // t_0 .. t_-N  (first column), tn[0] unused
  data_t bv [N+1];

  task automatic run_system(input int idx, input bit symmetric, input bit gaps);
    real xr [N+1];
    int  t_last_in, t_first_out, steps_before, cyc;
    data_t got [N+1];
    int  got_n;

    // Random Toeplitz matrix and right-hand side.
    tp[0] = to_fx(DIAG + real'($urandom_range(0, 1000)) / 1000.0);
    tn[0] = tp[0];
    for (int j = 1; j <= N; j++) begin
      tp[j] = to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
      tn[j] = symmetric ? tp[j] : to_fx((real'($urandom_range(0, 2000)) - 1000.0) / 1000.0);
    end
    for (int j = 0; j <= N; j++)
      bv[j] = to_fx((real'($urandom_range(0, 8000)) - 4000.0) / 1000.0);

    for (int r = 0; r <= N; r++) begin
      for (int c = 0; c <= N; c++)
        A[r][c] = (c >= r) ? to_real(tp[c-r]) : to_real(tn[r-c]);
      A[r][N+1] = to_real(bv[r]);
    end
    ref_solve(xr);

    steps_before = n_step_cycles;
    cyc = 0;
    // Stream the N+1 words, word k = {t_k, t_-k, b_(N-k)}.
    for (int k = 0; k <= N; k++) begin
      if (gaps && k == 1) begin
        in_valid <= 1'b0;
        repeat (2) @(posedge clk);
      end
      in_word  <= '{t_pos: tp[k], t_neg: tn[k], b: bv[N-k]};
      in_valid <= 1'b1;
      do @(posedge clk); while (!in_ready);
    end
    in_valid <= 1'b0;
    t_last_in = 0;

    // Collect the solution stream.
    got_n = 0;
    t_first_out = -1;
    while (got_n <= N) begin
      @(posedge clk);
      t_last_in++;
      if (x_valid) begin
        if (t_first_out < 0) t_first_out = t_last_in;
        got[got_n] = x_data;
        checks++;
        if (x_last != (got_n == N)) begin
          failures++;
          $display("FAIL sys %0d: x_last wrong at element %0d", idx, got_n);
        end
        got_n++;
      end
    end

    for (int k = 0; k <= N; k++) begin
      real d = to_real(got[k]) - xr[k];
      checks++;
      if (d > max_err) max_err = d;
      if (-d > max_err) max_err = -d;
      if (d > TOL || d < -TOL) begin
        failures++;
        $display("FAIL sys %0d: x_%0d = %f, expected %f", idx, k, to_real(got[k]), xr[k]);
      end
    end

    // Schedule: 4N time steps, and x_0 4N+2 cycles after the last word
    // (1 init cycle + 4N steps + first unload cycle).
    checks++;
    if (n_step_cycles - steps_before != 4 * N) begin
      failures++;
      $display("FAIL sys %0d: %0d step cycles, expected %0d", idx, n_step_cycles - steps_before, 4 * N);
    end
    checks++;
    if (t_first_out != 4 * N + 2) begin
      failures++;
      $display("FAIL sys %0d: x_0 after %0d cycles, expected %0d", idx, t_first_out, 4 * N + 2);
    end
  endtask

  initial begin
    int p1_before, p2_before;
    in_word  = '0;
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    for (int s = 0; s < NUM_SYS; s++) begin
      p1_before = n_p1;
      p2_before = n_p2;
      run_system(s, (s % 4) == 3, (s % 5) == 2);
      // Processor activity per solve: Phase 1 gives S_k the N-k steps
      // tau = k+1, k+3, ..., 2N-k-1; Phase 2 gives it N+1-k steps.
      checks++;
      if (n_p1 - p1_before != N * (N + 1) / 2) begin
        failures++;
        $display("FAIL sys %0d: %0d Phase 1 processor-steps, expected %0d", s, n_p1 - p1_before, N * (N + 1) / 2);
      end
      checks++;
      if (n_p2 - p2_before != (N + 1) * (N + 2) / 2) begin
        failures++;
        $display("FAIL sys %0d: %0d Phase 2 processor-steps, expected %0d", s, n_p2 - p2_before, (N + 1) * (N + 2) / 2);
      end
    end

    $display("largest |x - x_ref| = %g", max_err);
    $display("mechanisms: load=%0d div_S0=%0d multiplier_handoff=%0d phase1=%0d phase2=%0d unload=%0d stall=%0d",
             n_load, n_div, n_handoff, n_p1, n_p2, n_unload, n_stall);
    if (n_load == 0)    begin failures++; $display("FAIL: no input load");         end
    if (n_div == 0)     begin failures++; $display("FAIL: no division in S_0");     end
    if (n_handoff == 0) begin failures++; $display("FAIL: no multiplier hand-off"); end
    if (n_p1 == 0)      begin failures++; $display("FAIL: no Phase 1 step");        end
    if (n_p2 == 0)      begin failures++; $display("FAIL: no Phase 2 step");        end
    if (n_unload == 0)  begin failures++; $display("FAIL: no result unload");       end
    if (n_stall == 0)   begin failures++; $display("FAIL: no input stall");         end
    checks += 7;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
