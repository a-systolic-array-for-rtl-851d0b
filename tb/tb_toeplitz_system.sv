// tb_toeplitz_system: end-to-end test of the whole design at its default
// parameters (all three arrays N = 4, 5 x 5 systems), with no parameter
// override.
//
// Each round builds one random symmetric Toeplitz system and one random
// unsymmetric one. The general array solves the unsymmetric system while the
// symmetric array solves the symmetric one, concurrently; a second pass
// gives the same symmetric system to the general array, so both arrays'
// answers to one problem are also compared with each other. All results are
// checked against a double-precision Gaussian elimination with pivoting on
// the same fixed-point inputs. The testbench also checks that each solve
// takes exactly 4N step cycles and counts how often each mechanism happened
// (Phase 1 and Phase 2 steps of each array, S_0 divisions, the symmetric
// array's 1 - lambda^2 divisions, multiplier hand-offs, input stalls from a
// gap in in_valid, result unloads), failing any that never did.
// Alongside, the regeneration array rebuilds a triangular factor each round:
// in the first round the one of the worked example T = 120 * toeplitz(1, 2,
// 3, 4, 5), checked against its known rows, then random columns and
// multipliers checked against a real-valued model of its steps. Its
// iterations and its waits for a late multiplier pair are counted too.
module tb_toeplitz_system;
  import toeplitz_pkg::*;

  localparam int N        = 4;
  localparam int ROUNDS   = 8;
  localparam real TOL     = 0.002;
  localparam real DIAG    = 0.5 * real'(N) + 1.5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  load_word_t     gen_in_word;
  logic           gen_in_valid, gen_in_ready, gen_x_valid, gen_x_last, gen_busy;
  data_t          gen_x_data;
  sym_load_word_t sym_in_word;
  logic           sym_in_valid, sym_in_ready, sym_x_valid, sym_x_last, sym_busy;
  data_t          sym_x_data;
  data_t          regen_col_in;
  logic           regen_col_valid, regen_col_ready;
  mult_pair_t     regen_mult_in;
  logic           regen_mult_valid, regen_mult_ready;
  data_t          regen_d_data [N];
  logic           regen_d_valid, regen_d_last, regen_busy;
  logic [$clog2(N+1)-1:0] regen_d_count;

  int checks = 0;
  int failures = 0;

  toeplitz_system dut (
    .clk, .rst_n,
    .gen_in_word, .gen_in_valid, .gen_in_ready,
    .gen_x_data, .gen_x_valid, .gen_x_last, .gen_busy,
    .sym_in_word, .sym_in_valid, .sym_in_ready,
    .sym_x_data, .sym_x_valid, .sym_x_last, .sym_busy,
    .regen_col_in, .regen_col_valid, .regen_col_ready,
    .regen_mult_in, .regen_mult_valid, .regen_mult_ready,
    .regen_d_data, .regen_d_valid, .regen_d_count, .regen_d_last, .regen_busy
  );

  always #5 clk = ~clk;

  function automatic real to_real(data_t v);
    return real'(v) / real'(1 << FRAC_W);
  endfunction

  function automatic data_t to_fx(real r);
    return data_t'($rtoi(r * real'(1 << FRAC_W)));
  endfunction

  function automatic data_t urand(real lo, real hi);
    return to_fx(lo + (hi - lo) * real'($urandom_range(0, 10000)) / 10000.0);
  endfunction

  typedef data_t vec_t [N+1];
  typedef real   rvec_t [N+1];

  // Solve the Toeplitz system with first row tp, first column tn, rhs bv.
  function automatic rvec_t ref_solve(vec_t tp, vec_t tn, vec_t bv);
    real A [N+1][N+2];
    rvec_t xr;
    for (int r = 0; r <= N; r++) begin
      for (int c = 0; c <= N; c++)
        A[r][c] = (c >= r) ? to_real(tp[c-r]) : to_real(tn[r-c]);
      A[r][N+1] = to_real(bv[r]);
    end
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
    return xr;
  endfunction

  task automatic compare(input string who, input vec_t got, input rvec_t exp);
    for (int k = 0; k <= N; k++) begin
      real d = to_real(got[k]) - exp[k];
      checks++;
      if (d > TOL || d < -TOL) begin
        failures++;
        $display("FAIL %s: x_%0d = %f, expected %f", who, k, to_real(got[k]), exp[k]);
      end
    end
  endtask

  task automatic gen_solve(input vec_t tp, input vec_t tn, input vec_t bv, output vec_t x);
    int n_out = 0;
    for (int k = 0; k <= N; k++) begin
      if (k == 2) begin
        gen_in_valid <= 1'b0;   // one-cycle gap: the array waits
        @(posedge clk);
      end
      gen_in_word  <= '{t_pos: tp[k], t_neg: tn[k], b: bv[N-k]};
      gen_in_valid <= 1'b1;
      do @(posedge clk); while (!gen_in_ready);
    end
    gen_in_valid <= 1'b0;
    while (n_out <= N) begin
      @(posedge clk);
      if (gen_x_valid) begin x[n_out] = gen_x_data; n_out++; end
    end
  endtask

  task automatic sym_solve(input vec_t tp, input vec_t bv, output vec_t x);
    int n_out = 0;
    for (int k = 0; k <= N; k++) begin
      sym_in_word  <= '{t: tp[k], b: bv[N-k]};
      sym_in_valid <= 1'b1;
      do @(posedge clk); while (!sym_in_ready);
    end
    sym_in_valid <= 1'b0;
    while (n_out <= N) begin
      @(posedge clk);
      if (sym_x_valid) begin x[n_out] = sym_x_data; n_out++; end
    end
  endtask

  typedef data_t rcol_t [N];
  typedef real   rrows_t [N+1][N];   // [iteration][processor]

  // Regeneration reference: U := U + m_k D, D := D + m_-k U, shift U right.
  function automatic rrows_t regen_model(rcol_t col, rcol_t mp, rcol_t mn);
    real u [N];
    real d [N];
    rrows_t out;
    for (int j = 0; j < N; j++) begin u[j] = 0.0; d[j] = to_real(col[j]); end
    for (int i = 1; i <= N; i++) begin
      for (int j = 0; j < i; j++) u[j] = u[j] + to_real(mp[i-1]) * d[j];
      for (int j = 0; j < i; j++) begin
        d[j] = d[j] + to_real(mn[i-1]) * u[j];
        out[i][j] = d[j];
      end
      for (int j = N - 1; j > 0; j--) u[j] = u[j-1];
      u[0] = 0.0;
    end
    return out;
  endfunction

  task automatic regen_run(input rcol_t col, input rcol_t mp, input rcol_t mn,
                           input rrows_t exp, input real tol);
    int iters = 0;
    fork
      begin
        for (int j = 0; j < N; j++) begin
          regen_col_in    <= col[j];
          regen_col_valid <= 1'b1;
          do @(posedge clk); while (!regen_col_ready);
        end
        regen_col_valid <= 1'b0;
        for (int i = 0; i < N; i++) begin
          if (i == 1) begin
            regen_mult_valid <= 1'b0;   // a late pair: the array waits
            repeat (4) @(posedge clk);
          end
          regen_mult_in    <= '{m_pos: mp[i], m_neg: mn[i]};
          regen_mult_valid <= 1'b1;
          do @(posedge clk); while (!regen_mult_ready);
        end
        regen_mult_valid <= 1'b0;
      end
      while (iters < N) begin
        @(posedge clk);
        if (regen_d_valid) begin
          iters++;
          checks += 2;
          if (int'(regen_d_count) != iters) begin
            failures++; $display("FAIL regeneration: d_count %0d on iteration %0d", regen_d_count, iters);
          end
          if (regen_d_last != (iters == N)) begin
            failures++; $display("FAIL regeneration: d_last %b on iteration %0d", regen_d_last, iters);
          end
          for (int j = 0; j < iters; j++) begin
            real d;
            d = to_real(regen_d_data[j]) - exp[iters][j];
            checks++;
            if (d > tol || d < -tol) begin
              failures++;
              $display("FAIL regeneration: iteration %0d, d_%0d = %f, expected %f", iters, j,
                       to_real(regen_d_data[j]), exp[iters][j]);
            end
          end
        end
      end
    join
  endtask

  // Step-cycle and phase counters per array.
  int gen_steps = 0, sym_steps = 0;
  int gen_p1 = 0, gen_p2 = 0, sym_p1 = 0, sym_p2 = 0;
  int div_s0 = 0, div_lambda = 0, handoff = 0, stall = 0, unload = 0;
  int regen_iters = 0, regen_wait = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_gen.p1_active[0] || dut.u_gen.p2_active[0] ||
        dut.u_sym.p1_active[0] || dut.u_sym.p2_active[0]) div_s0++;
    if (gen_in_ready && !gen_in_valid && gen_busy) stall++;
    if (gen_x_valid || sym_x_valid) unload++;
    for (int k = 1; k <= N; k++) begin
      if (dut.u_gen.p1_active[k] || dut.u_sym.p1_active[k]) handoff++;
      if (dut.u_sym.p2_active[k]) div_lambda++;
    end
    if (regen_d_valid) regen_iters++;
    if (regen_mult_ready && !regen_mult_valid) regen_wait++;
    if (dut.u_gen.step_en) gen_steps++;
    if (dut.u_sym.step_en) sym_steps++;
    for (int k = 0; k <= N; k++) begin
      if (dut.u_gen.p1_active[k]) gen_p1++;
      if (dut.u_gen.p2_active[k]) gen_p2++;
      if (dut.u_sym.p1_active[k]) sym_p1++;
      if (dut.u_sym.p2_active[k]) sym_p2++;
    end
  end

  initial begin
    vec_t ut_p, ut_n, ub, st, sb, xg, xs, xgs;
    rvec_t ru, rs;
    int g0, s0;
    rcol_t rc, rmp, rmn;
    rrows_t rexp;
    gen_in_word = '0; gen_in_valid = 1'b0;
    regen_col_in = '0; regen_col_valid = 1'b0;
    regen_mult_in = '0; regen_mult_valid = 1'b0;
    sym_in_word = '0; sym_in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    for (int r = 0; r < ROUNDS; r++) begin
      ut_p[0] = urand(DIAG, DIAG + 1.0);
      ut_n[0] = ut_p[0];
      st[0]   = urand(DIAG, DIAG + 1.0);
      for (int j = 1; j <= N; j++) begin
        ut_p[j] = urand(-1.0, 1.0);
        ut_n[j] = urand(-1.0, 1.0);
        st[j]   = urand(-1.0, 1.0);
      end
      for (int j = 0; j <= N; j++) begin
        ub[j] = urand(-4.0, 4.0);
        sb[j] = urand(-4.0, 4.0);
      end
      if (r == 0) begin
        // Worked example: last column of the factor from t_44 up to t_14,
        // multipliers m_4 .. m_1 and m_-4 .. m_-1, and the rows it yields.
        rc  = '{to_fx(-288.0), to_fx(-360.0), to_fx(-480.0), to_fx(-720.0)};
        rmp = '{to_fx(-1.0/12.0), to_fx(-1.0/10.0), to_fx(-1.0/8.0), to_fx(-2.0/3.0)};
        rmn = '{to_fx(-0.5), to_fx(-2.0/3.0), to_fx(-1.0), to_fx(2.0)};
        rexp[1][0] = -300.0;
        rexp[2][0] = -320.0; rexp[2][1] = -400.0;
        rexp[3][0] = -360.0; rexp[3][1] = -480.0; rexp[3][2] = -600.0;
        rexp[4][0] =  120.0; rexp[4][1] =  240.0; rexp[4][2] =  360.0; rexp[4][3] = 480.0;
      end else begin
        for (int j = 0; j < N; j++) begin
          rc[j]  = urand(-4.0, 4.0);
          rmp[j] = urand(-1.0, 1.0);
          rmn[j] = urand(-1.0, 1.0);
        end
        rexp = regen_model(rc, rmp, rmn);
      end
      ru = ref_solve(ut_p, ut_n, ub);
      rs = ref_solve(st, st, sb);

      g0 = gen_steps;
      s0 = sym_steps;
      fork
        gen_solve(ut_p, ut_n, ub, xg);
        sym_solve(st, sb, xs);
        regen_run(rc, rmp, rmn, rexp, (r == 0) ? 0.05 : TOL);
      join
      checks += 2;
      if (gen_steps - g0 != 4 * N) begin failures++; $display("FAIL general array: %0d steps", gen_steps - g0); end
      if (sym_steps - s0 != 4 * N) begin failures++; $display("FAIL symmetric array: %0d steps", sym_steps - s0); end
      compare("general array, unsymmetric system", xg, ru);
      compare("symmetric array", xs, rs);

      // The same symmetric system on the general array.
      gen_solve(st, st, sb, xgs);
      compare("general array, symmetric system", xgs, rs);
      for (int k = 0; k <= N; k++) begin
        real d;
        d = to_real(xgs[k]) - to_real(xs[k]);
        checks++;
        if (d > TOL || d < -TOL) begin
          failures++;
          $display("FAIL arrays disagree on x_%0d: %f vs %f", k, to_real(xgs[k]), to_real(xs[k]));
        end
      end
    end

    $display("phases: general p1=%0d p2=%0d, symmetric p1=%0d p2=%0d", gen_p1, gen_p2, sym_p1, sym_p2);
    $display("mechanisms: div_S0=%0d div_1_minus_lambda2=%0d multiplier_handoff=%0d stall=%0d unload=%0d",
             div_s0, div_lambda, handoff, stall, unload);
    $display("regeneration: iterations=%0d multiplier_waits=%0d", regen_iters, regen_wait);
    checks += 11;
    if (regen_iters == 0) begin failures++; $display("FAIL: no regeneration iteration"); end
    if (regen_wait == 0)  begin failures++; $display("FAIL: regeneration never waited for a multiplier"); end
    if (div_s0 == 0)     begin failures++; $display("FAIL: no S_0 division"); end
    if (div_lambda == 0) begin failures++; $display("FAIL: no 1 - lambda^2 division"); end
    if (handoff == 0)    begin failures++; $display("FAIL: no multiplier hand-off"); end
    if (stall == 0)      begin failures++; $display("FAIL: no input stall"); end
    if (unload == 0)     begin failures++; $display("FAIL: no result unload"); end
    if (gen_p1 == 0) begin failures++; $display("FAIL: general array never ran Phase 1"); end
    if (gen_p2 == 0) begin failures++; $display("FAIL: general array never ran Phase 2"); end
    if (sym_p1 == 0) begin failures++; $display("FAIL: symmetric array never ran Phase 1"); end
    if (sym_p2 == 0) begin failures++; $display("FAIL: symmetric array never ran Phase 2"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
