// bareiss_cell: super-processor S_K of the systolic Toeplitz solver.
//
// The cell holds the eight registers of the processor: alpha, beta, gamma,
// delta (one element each of the four triangular Toeplitz matrices the
// Bareiss elimination updates), lambda and mu (the two multipliers m_-j and
// m_+j), and xi and eta (right-hand side / solution). On every clock with
// step_en high it executes one time step tau of the processor program:
//
//   Phase 1, LU factorisation by the Bareiss recurrences, when tau+K is odd
//   and K < tau < 2N-K. From tau = K+2 on the cell first takes alpha, delta
//   and xi from its right neighbour (inR1..3). S_0 forms the multipliers
//   lambda = alpha/gamma and mu = delta/beta; every other cell receives them
//   from its left neighbour (inL1..2). The cell updates alpha, beta, eta with
//   lambda and then gamma, delta, xi with mu using the new alpha/beta/eta, and
//   sends {alpha, delta, xi} left and {lambda, mu} right.
//
//   Phase 2, regeneration of the upper triangular factor and back
//   substitution, when tau+K is even and 2N+K <= tau <= 4N-K. From
//   tau = 2N+K+1 on the cell takes lambda, mu, eta from the right. S_0
//   forms x = eta/beta and delta = mu*beta; every other cell takes xi and
//   delta from the left, subtracts beta*xi from eta and adds mu*beta to
//   delta. Then beta += lambda*delta regenerates the next row element. The
//   cell sends {lambda, mu, eta} left and {xi, delta} right.
//
// The arithmetic of one time step is combinational and the register update
// happens at the clock edge, so one time step is one clock cycle. Output
// lines are registers that keep the value of the cell's last active step; a
// neighbour reads them one step later, when its own parity makes it active.
// Only S_0 (K == 0) contains dividers.
//
// Loading and unloading (this design's own mechanism; the algorithm only
// states that initial values reach the cells in O(n) time from one end):
//   load_en   : {beta, gamma, eta} := load_in = {t_k, t_-k, b_(n-k)} from
//               the right neighbour, so the words shift leftwards; load_out
//               presents this cell's {beta, gamma, eta}.
//   init_en   : alpha := gamma_(K+1) = t_-(K+1), delta := beta_(K+1) =
//               t_(K+1), xi := eta_(K+1) = b_(N-K-1), all read from load_in;
//               lambda, mu and the output lines are cleared. The array feeds
//               zeros into S_N's load_in here, covering t_+-(N+1) = b_-1 = 0.
//   unload_en : xi := xi_in (xi of the right neighbour); x shows xi, so the
//               solution x_0..x_N leaves S_0 one element per clock.
module bareiss_cell
  import toeplitz_pkg::*;
#(
  parameter int unsigned K     = 0,
  parameter int unsigned N     = 4,
  parameter int unsigned TAU_W = $clog2(4*N+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // control, shared by all cells
  input  logic             step_en,
  input  logic [TAU_W-1:0] tau,
  input  logic             load_en,
  input  logic             init_en,
  input  logic             unload_en,
  // systolic lines
  input  lbus_t            in_r,     // inR1..inR3 from S_(K+1)
  input  rbus_t            in_l,     // inL1..inL2 from S_(K-1)
  output lbus_t            out_l,    // outL1..outL3 to S_(K-1)
  output rbus_t            out_r,    // outR1..outR2 to S_(K+1)
  // load / unload chain
  input  load_word_t       load_in,
  output load_word_t       load_out,
  input  data_t            xi_in,
  output data_t            x,
  // activity, for observation
  output logic             p1_active,
  output logic             p2_active
);

  data_t alpha_q, beta_q, gamma_q, delta_q, lambda_q, mu_q, xi_q, eta_q;
  data_t alpha_d, beta_d, gamma_d, delta_d, lambda_d, mu_d, xi_d, eta_d;
  lbus_t out_l_d;
  rbus_t out_r_d;

  int t;
  assign t = int'(tau);

  always_comb begin
    p1_active = step_en && (((t + int'(K)) % 2) == 1) &&
                (t > int'(K)) && (t < 2*int'(N) - int'(K));
    p2_active = step_en && (((t + int'(K)) % 2) == 0) &&
                (t >= 2*int'(N) + int'(K)) && (t <= 4*int'(N) - int'(K));
  end

  // One time step of the processor program.
  always_comb begin
    alpha_d  = alpha_q;
    beta_d   = beta_q;
    gamma_d  = gamma_q;
    delta_d  = delta_q;
    lambda_d = lambda_q;
    mu_d     = mu_q;
    xi_d     = xi_q;
    eta_d    = eta_q;
    out_l_d  = out_l;
    out_r_d  = out_r;

    if (p1_active) begin
      if (t > int'(K) + 1) begin
        alpha_d = in_r.w1;
        delta_d = in_r.w2;
        xi_d    = in_r.w3;
      end
      if (K == 0) begin
        lambda_d = fx_div(alpha_d, gamma_d);
      end else begin
        lambda_d = in_l.w1;
        mu_d     = in_l.w2;
        alpha_d  = fx_sub(alpha_d, fx_mul(lambda_d, gamma_d));
      end
      beta_d = fx_sub(beta_d, fx_mul(lambda_d, delta_d));
      eta_d  = fx_sub(eta_d,  fx_mul(lambda_d, xi_d));
      if (K == 0) begin
        mu_d = fx_div(delta_d, beta_d);
      end else begin
        gamma_d = fx_sub(gamma_d, fx_mul(mu_d, alpha_d));
        delta_d = fx_sub(delta_d, fx_mul(mu_d, beta_d));
        xi_d    = fx_sub(xi_d,    fx_mul(mu_d, eta_d));
      end
      out_l_d = '{w1: alpha_d, w2: delta_d, w3: xi_d};
      out_r_d = '{w1: lambda_d, w2: mu_d};
    end else if (p2_active) begin
      if (t > 2*int'(N) + int'(K)) begin
        lambda_d = in_r.w1;
        mu_d     = in_r.w2;
        eta_d    = in_r.w3;
      end
      if (K == 0) begin
        xi_d    = fx_div(eta_d, beta_d);
        delta_d = fx_mul(mu_d, beta_d);
      end else begin
        xi_d    = in_l.w1;
        delta_d = in_l.w2;
        eta_d   = fx_sub(eta_d, fx_mul(beta_d, xi_d));
        delta_d = fx_add(delta_d, fx_mul(mu_d, beta_d));
      end
      beta_d  = fx_add(beta_d, fx_mul(lambda_d, delta_d));
      out_l_d = '{w1: lambda_d, w2: mu_d, w3: eta_d};
      out_r_d = '{w1: xi_d, w2: delta_d};
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      alpha_q  <= '0;
      beta_q   <= '0;
      gamma_q  <= '0;
      delta_q  <= '0;
      lambda_q <= '0;
      mu_q     <= '0;
      xi_q     <= '0;
      eta_q    <= '0;
      out_l    <= '0;
      out_r    <= '0;
    end else if (load_en) begin
      beta_q  <= load_in.t_pos;
      gamma_q <= load_in.t_neg;
      eta_q   <= load_in.b;
    end else if (init_en) begin
      alpha_q  <= load_in.t_neg;
      delta_q  <= load_in.t_pos;
      xi_q     <= load_in.b;
      lambda_q <= '0;
      mu_q     <= '0;
      out_l    <= '0;
      out_r    <= '0;
    end else if (unload_en) begin
      xi_q <= xi_in;
    end else begin
      alpha_q  <= alpha_d;
      beta_q   <= beta_d;
      gamma_q  <= gamma_d;
      delta_q  <= delta_d;
      lambda_q <= lambda_d;
      mu_q     <= mu_d;
      xi_q     <= xi_d;
      eta_q    <= eta_d;
      out_l    <= out_l_d;
      out_r    <= out_r_d;
    end
  end

  assign load_out = '{t_pos: beta_q, t_neg: gamma_q, b: eta_q};
  assign x        = xi_q;

  // At most one phase per step, and never while loading or unloading.
  always_comb begin
    assert (!(p1_active && p2_active));
  end
  a_one_mode: assert property (@(posedge clk) disable iff (!rst_n)
    !(step_en && (load_en || init_en || unload_en)));

endmodule
