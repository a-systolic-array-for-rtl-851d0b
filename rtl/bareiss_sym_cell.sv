// bareiss_sym_cell: processor S_K of the systolic solver for symmetric
// Toeplitz matrices (symmetric Bareiss variant).
//
// For symmetric T the four Toeplitz matrices of the general algorithm pair
// up (alpha = delta, beta = gamma) and the two multipliers coincide
// (lambda = mu), so the processor keeps only alpha, beta, lambda, xi and eta
// and has two lines in each direction. On every clock with step_en high it
// executes one time step tau of its program:
//
//   Phase 1, when tau+K is odd and K < tau <= 2N-K. From tau = K+2 on it
//   takes alpha and xi from the right (inR1, inR2). S_0 forms
//   lambda = alpha/beta and updates beta -= lambda*alpha, eta -= lambda*xi.
//   Every other cell takes lambda from the left (inL1) and applies the
//   paired update to (alpha, beta) and to (eta, xi) using the old values of
//   both members of each pair. It sends {alpha, xi} left and lambda right.
//
//   Phase 2, when tau+K is even and 2N+K <= tau <= 4N-K. From tau = 2N+K+1
//   on it takes lambda and eta from the right. S_0 forms x = eta/beta and
//   starts alpha at 0; every other cell takes xi and alpha from the left and
//   subtracts beta*xi from eta. Then
//   alpha := (alpha + lambda*beta) / ((1-lambda)(1+lambda)) and
//   beta  := beta + lambda*alpha. It sends {lambda, eta} left and
//   {xi, alpha} right.
//
// Unlike the general processor, every cell divides (by 1 - lambda^2) in
// Phase 2. One time step is one clock cycle with combinational arithmetic;
// output lines are registers holding the last active step's values.
//
// Loading and unloading are this design's: load_en shifts {beta, eta} :=
// load_in = {t_K, b_(N-K)} in from the right; init_en sets alpha := t_(K+1)
// and xi := b_(N-K-1) from the right neighbour's {beta, eta} (zeros beyond
// S_N), clears lambda and the lines; unload_en shifts xi left.
module bareiss_sym_cell
  import toeplitz_pkg::*;
#(
  parameter int unsigned K     = 0,
  parameter int unsigned N     = 4,
  parameter int unsigned TAU_W = $clog2(4*N+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             step_en,
  input  logic [TAU_W-1:0] tau,
  input  logic             load_en,
  input  logic             init_en,
  input  logic             unload_en,
  input  bus2_t            in_r,      // inR1..inR2 from S_(K+1)
  input  bus2_t            in_l,      // inL1..inL2 from S_(K-1)
  output bus2_t            out_l,     // outL1..outL2 to S_(K-1)
  output bus2_t            out_r,     // outR1..outR2 to S_(K+1)
  input  sym_load_word_t   load_in,
  output sym_load_word_t   load_out,
  input  data_t            xi_in,
  output data_t            x,
  output logic             p1_active,
  output logic             p2_active
);

  data_t alpha_q, beta_q, lambda_q, xi_q, eta_q;
  data_t alpha_d, beta_d, lambda_d, xi_d, eta_d;
  localparam data_t ONE = data_t'(1) <<< FRAC_W;

  data_t pi;
  bus2_t out_l_d, out_r_d;

  int t;
  assign t = int'(tau);

  always_comb begin
    p1_active = step_en && (((t + int'(K)) % 2) == 1) &&
                (t > int'(K)) && (t <= 2*int'(N) - int'(K));
    p2_active = step_en && (((t + int'(K)) % 2) == 0) &&
                (t >= 2*int'(N) + int'(K)) && (t <= 4*int'(N) - int'(K));
  end

  always_comb begin
    alpha_d  = alpha_q;
    beta_d   = beta_q;
    lambda_d = lambda_q;
    xi_d     = xi_q;
    eta_d    = eta_q;
    pi       = '0;
    out_l_d  = out_l;
    out_r_d  = out_r;

    if (p1_active) begin
      if (t > int'(K) + 1) begin
        alpha_d = in_r.w1;
        xi_d    = in_r.w2;
      end
      if (K == 0) begin
        lambda_d = fx_div(alpha_d, beta_d);
        beta_d   = fx_sub(beta_d, fx_mul(lambda_d, alpha_d));
        eta_d    = fx_sub(eta_d, fx_mul(lambda_d, xi_d));
      end else begin
        lambda_d = in_l.w1;
        pi       = alpha_d;
        alpha_d  = fx_sub(alpha_d, fx_mul(lambda_d, beta_d));
        beta_d   = fx_sub(beta_d, fx_mul(lambda_d, pi));
        pi       = eta_d;
        eta_d    = fx_sub(eta_d, fx_mul(lambda_d, xi_d));
        xi_d     = fx_sub(xi_d, fx_mul(lambda_d, pi));
      end
      out_l_d = '{w1: alpha_d, w2: xi_d};
      out_r_d = '{w1: lambda_d, w2: out_r.w2};
    end else if (p2_active) begin
      if (t > 2*int'(N) + int'(K)) begin
        lambda_d = in_r.w1;
        eta_d    = in_r.w2;
      end
      if (K == 0) begin
        xi_d    = fx_div(eta_d, beta_d);
        alpha_d = '0;
      end else begin
        xi_d    = in_l.w1;
        alpha_d = in_l.w2;
        eta_d   = fx_sub(eta_d, fx_mul(beta_d, xi_d));
      end
      alpha_d = fx_div(fx_add(alpha_d, fx_mul(lambda_d, beta_d)),
                       fx_mul(fx_sub(ONE, lambda_d), fx_add(ONE, lambda_d)));
      beta_d  = fx_add(beta_d, fx_mul(lambda_d, alpha_d));
      out_l_d = '{w1: lambda_d, w2: eta_d};
      out_r_d = '{w1: xi_d, w2: alpha_d};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alpha_q  <= '0;
      beta_q   <= '0;
      lambda_q <= '0;
      xi_q     <= '0;
      eta_q    <= '0;
      out_l    <= '0;
      out_r    <= '0;
    end else if (load_en) begin
      beta_q <= load_in.t;
      eta_q  <= load_in.b;
    end else if (init_en) begin
      alpha_q  <= load_in.t;
      xi_q     <= load_in.b;
      lambda_q <= '0;
      out_l    <= '0;
      out_r    <= '0;
    end else if (unload_en) begin
      xi_q <= xi_in;
    end else begin
      alpha_q  <= alpha_d;
      beta_q   <= beta_d;
      lambda_q <= lambda_d;
      xi_q     <= xi_d;
      eta_q    <= eta_d;
      out_l    <= out_l_d;
      out_r    <= out_r_d;
    end
  end

  assign load_out = '{t: beta_q, b: eta_q};
  assign x        = xi_q;

  always_comb begin
    assert (!(p1_active && p2_active));
  end
  a_one_mode: assert property (@(posedge clk) disable iff (!rst_n)
    !(step_en && (load_en || init_en || unload_en)));

endmodule
