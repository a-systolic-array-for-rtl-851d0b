// tb_bareiss_example: the classic 5 x 5 worked example of the Bareiss
// algorithm, run on both arrays of the design at default size (N = 4).
//
//   T = 120 * toeplitz(1, 2, 3, 4, 5)   (symmetric, t_k = t_-k = 120(k+1))
//   b = 120 * (30, 22, 18, 20, 30)      solution x = (1, 2, 3, 4, 0)
//
// In the general array the testbench follows the elimination step by step:
// S_0 must form the multipliers
//   lambda = m_-1..m_-4 = 2, -1, -2/3, -1/2
//   mu     = m_1 ..m_4  = -2/3, -1/8, -1/10, -1/12
// at its four Phase 1 steps, and when Phase 1 ends beta_k must hold the
// last column of the upper triangular factor, t^(-4)_(4-k,4) = -288, -360,
// -480, -720, 600 for k = 0..4, and eta_k the transformed right-hand side
// b^(-4)_(4-k) = 0, -1200, -2560, -4560, 3600, the values the exact
// elimination gives in rational arithmetic. The symmetric array must reach
// the same x. Fixed-point results are compared
// within a tolerance proportional to their size.
module tb_bareiss_example;
  import toeplitz_pkg::*;

  localparam int N = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  load_word_t     gen_in_word;
  logic           gen_in_valid, gen_in_ready, gen_x_valid, gen_x_last, gen_busy;
  data_t          gen_x_data;
  sym_load_word_t sym_in_word;
  logic           sym_in_valid, sym_in_ready, sym_x_valid, sym_x_last, sym_busy;
  data_t          sym_x_data;

  int checks = 0;
  int failures = 0;

  toeplitz_system dut (
    .clk, .rst_n,
    .gen_in_word, .gen_in_valid, .gen_in_ready,
    .gen_x_data, .gen_x_valid, .gen_x_last, .gen_busy,
    .sym_in_word, .sym_in_valid, .sym_in_ready,
    .sym_x_data, .sym_x_valid, .sym_x_last, .sym_busy
  );

  always #5 clk = ~clk;

  function automatic real to_real(data_t v);
    return real'(v) / real'(1 << FRAC_W);
  endfunction

  function automatic data_t to_fx(real r);
    return data_t'($rtoi(r * real'(1 << FRAC_W)));
  endfunction

  task automatic check(input string what, input real got, input real exp);
    real tol = 0.05 + 0.0005 * (exp < 0 ? -exp : exp);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %f expected %f", what, got, exp);
    end
  endtask

  localparam real M_NEG [4] = '{2.0, -1.0, -2.0/3.0, -0.5};
  localparam real M_POS [4] = '{-2.0/3.0, -1.0/8.0, -1.0/10.0, -1.0/12.0};
  localparam real LAST_COL [5] = '{-288.0, -360.0, -480.0, -720.0, 600.0};
  localparam real B_MINUS  [5] = '{0.0, -1200.0, -2560.0, -4560.0, 3600.0};
  localparam real B_VEC    [5] = '{30.0, 22.0, 18.0, 20.0, 30.0};
  localparam real X_EXP    [5] = '{1.0, 2.0, 3.0, 4.0, 0.0};

  // Observe S_0's multipliers and the state at the end of Phase 1.
  int n_mult = 0;
  int n_p1_end = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_gen.p1_active[0]) begin
      if (n_mult < 4) begin
        check($sformatf("lambda = m_-%0d", n_mult + 1),
              to_real(dut.u_gen.g_cell[0].u_cell.lambda_d), M_NEG[n_mult]);
        check($sformatf("mu = m_%0d", n_mult + 1),
              to_real(dut.u_gen.g_cell[0].u_cell.mu_d), M_POS[n_mult]);
      end
      n_mult++;
    end
    if (dut.u_gen.step_en && int'(dut.u_gen.tau) == 2 * N) begin
      n_p1_end++;
      check("beta_0 = t(-4)_4,4", to_real(dut.u_gen.g_cell[0].u_cell.beta_q), LAST_COL[0]);
      check("beta_1 = t(-4)_3,4", to_real(dut.u_gen.g_cell[1].u_cell.beta_q), LAST_COL[1]);
      check("beta_2 = t(-4)_2,4", to_real(dut.u_gen.g_cell[2].u_cell.beta_q), LAST_COL[2]);
      check("beta_3 = t(-4)_1,4", to_real(dut.u_gen.g_cell[3].u_cell.beta_q), LAST_COL[3]);
      check("beta_4 = t(-4)_0,4", to_real(dut.u_gen.g_cell[4].u_cell.beta_q), LAST_COL[4]);
      check("eta_0 = b(-4)_4", to_real(dut.u_gen.g_cell[0].u_cell.eta_q), B_MINUS[0]);
      check("eta_1 = b(-4)_3", to_real(dut.u_gen.g_cell[1].u_cell.eta_q), B_MINUS[1]);
      check("eta_2 = b(-4)_2", to_real(dut.u_gen.g_cell[2].u_cell.eta_q), B_MINUS[2]);
      check("eta_3 = b(-4)_1", to_real(dut.u_gen.g_cell[3].u_cell.eta_q), B_MINUS[3]);
      check("eta_4 = b(-4)_0", to_real(dut.u_gen.g_cell[4].u_cell.eta_q), B_MINUS[4]);
    end
  end

  initial begin
    int ng, ns;
    gen_in_word = '0; gen_in_valid = 1'b0;
    sym_in_word = '0; sym_in_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // Feed both arrays the same system, word k = t_k, (t_-k), b_(N-k).
    for (int k = 0; k <= N; k++) begin
      gen_in_word  <= '{t_pos: to_fx(120.0 * (k + 1)), t_neg: to_fx(120.0 * (k + 1)),
                        b: to_fx(120.0 * B_VEC[N-k])};
      sym_in_word  <= '{t: to_fx(120.0 * (k + 1)), b: to_fx(120.0 * B_VEC[N-k])};
      gen_in_valid <= 1'b1;
      sym_in_valid <= 1'b1;
      @(posedge clk);
    end
    gen_in_valid <= 1'b0;
    sym_in_valid <= 1'b0;

    ng = 0;
    ns = 0;
    while (ng <= N || ns <= N) begin
      @(posedge clk);
      if (gen_x_valid) begin
        check($sformatf("general array x_%0d", ng), to_real(gen_x_data), X_EXP[ng]);
        ng++;
      end
      if (sym_x_valid) begin
        check($sformatf("symmetric array x_%0d", ns), to_real(sym_x_data), X_EXP[ns]);
        ns++;
      end
    end

    checks += 2;
    if (n_mult != 4) begin failures++; $display("FAIL: %0d multiplier steps in S_0, expected 4", n_mult); end
    if (n_p1_end != 1) begin failures++; $display("FAIL: end of Phase 1 seen %0d times", n_p1_end); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
