// tb_bareiss_sym_cell: unit test of one processor of the symmetric-matrix
// array.
//
// Cells S_0 and S_2 of an N = 4 array are loaded with random contents and
// stepped with random tau and random neighbour lines. Before each step the
// testbench reads the registers and computes in double precision what the
// symmetric program must do at that tau (idle, Phase 1 with or without inR,
// Phase 2 with or without inR, S_0's divisions, the paired updates that use
// the old value of the partner register, the division by 1 - lambda^2);
// after the clock edge it compares the five registers and four output lines.
module tb_bareiss_sym_cell;
  import toeplitz_pkg::*;

  localparam int N      = 4;
  localparam int TAU_W  = $clog2(4*N+1);
  localparam int TRIALS = 300;
  localparam real TOL   = 0.002;

  logic clk = 1'b0;
  logic rst_n;
  logic step_en, load_en, init_en, unload_en;
  logic [TAU_W-1:0] tau;
  bus2_t in_r, in_l;
  sym_load_word_t load_in;
  data_t xi_in;

  bus2_t out_l0, out_l2, out_r0, out_r2;
  sym_load_word_t load_out0, load_out2;
  data_t x0, x2;
  logic p1_0, p2_0, p1_2, p2_2;

  int checks = 0;
  int failures = 0;

  bareiss_sym_cell #(.K(0), .N(N)) dut0 (
    .clk, .rst_n, .step_en, .tau, .load_en, .init_en, .unload_en,
    .in_r, .in_l, .out_l(out_l0), .out_r(out_r0),
    .load_in, .load_out(load_out0), .xi_in, .x(x0),
    .p1_active(p1_0), .p2_active(p2_0)
  );

  bareiss_sym_cell #(.K(2), .N(N)) dut2 (
    .clk, .rst_n, .step_en, .tau, .load_en, .init_en, .unload_en,
    .in_r, .in_l, .out_l(out_l2), .out_r(out_r2),
    .load_in, .load_out(load_out2), .xi_in, .x(x2),
    .p1_active(p1_2), .p2_active(p2_2)
  );

  always #5 clk = ~clk;

  function automatic real r_(data_t v);
    return real'(v) / real'(1 << FRAC_W);
  endfunction

  function automatic data_t fx_(real r);
    return data_t'($rtoi(r * real'(1 << FRAC_W)));
  endfunction

  function automatic data_t rnd(real lo, real hi);
    return fx_(lo + (hi - lo) * real'($urandom_range(0, 10000)) / 10000.0);
  endfunction

  // alpha, beta, lambda, xi, eta, outL1, outL2, outR1, outR2
  typedef real st_t [9];

  localparam string NAMES [9] = '{"alpha", "beta", "lambda", "xi", "eta",
                                  "outL1", "outL2", "outR1", "outR2"};

  task automatic check(input string what, input real got, input real exp);
    checks++;
    if (got - exp > TOL || exp - got > TOL) begin
      failures++;
      $display("FAIL %s: got %f expected %f (tau=%0d)", what, got, exp, tau);
    end
  endtask

  function automatic st_t model(input int k, input int t, input st_t s,
                                input real r1, input real r2, input real l1, input real l2);
    st_t o = s;
    real a = s[0], b = s[1], l = s[2], xi = s[3], e = s[4], p;
    bit odd = ((t + k) % 2) == 1;
    if (odd && t > k && t <= 2*N - k) begin
      if (t > k + 1) begin a = r1; xi = r2; end
      if (k == 0) begin
        l = a / b; b = b - l * a; e = e - l * xi;
      end else begin
        l = l1;
        p = a;  a = a - l * b;  b = b - l * p;
        p = e;  e = e - l * xi; xi = xi - l * p;
      end
      o = '{a, b, l, xi, e, a, xi, l, s[8]};
    end else if (!odd && t >= 2*N + k && t <= 4*N - k) begin
      if (t > 2*N + k) begin l = r1; e = r2; end
      if (k == 0) begin xi = e / b; a = 0.0; end
      else begin xi = l1; a = l2; e = e - b * xi; end
      a = (a + l * b) / ((1.0 - l) * (1.0 + l));
      b = b + l * a;
      o = '{a, b, l, xi, e, l, e, xi, a};
    end
    return o;
  endfunction

  function automatic st_t snap0();
    return '{r_(dut0.alpha_q), r_(dut0.beta_q), r_(dut0.lambda_q), r_(dut0.xi_q), r_(dut0.eta_q),
             r_(out_l0.w1), r_(out_l0.w2), r_(out_r0.w1), r_(out_r0.w2)};
  endfunction

  function automatic st_t snap2();
    return '{r_(dut2.alpha_q), r_(dut2.beta_q), r_(dut2.lambda_q), r_(dut2.xi_q), r_(dut2.eta_q),
             r_(out_l2.w1), r_(out_l2.w2), r_(out_r2.w1), r_(out_r2.w2)};
  endfunction

  int n_p1 = 0, n_p2 = 0, n_idle = 0;

  initial begin
    st_t s0, s2, e0, e2;
    int t;
    rst_n = 1'b0;
    step_en = 0; load_en = 0; init_en = 0; unload_en = 0;
    tau = '0; in_r = '0; in_l = '0; load_in = '0; xi_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    for (int trial = 0; trial < TRIALS; trial++) begin
      @(negedge clk);
      load_en = 1;
      load_in = '{t: rnd(2.0, 4.0), b: rnd(-2.0, 2.0)};
      @(negedge clk);
      load_en = 0;
      init_en = 1;
      load_in = '{t: rnd(-1.0, 1.0), b: rnd(-2.0, 2.0)};
      @(negedge clk);
      init_en = 0;
      checks++;
      if (r_(dut2.alpha_q) != r_(load_in.t) || dut2.lambda_q != 0 || out_l2 != '0) begin
        failures++;
        $display("FAIL init");
      end

      for (int step = 0; step < 3; step++) begin
        t = $urandom_range(1, 4*N);
        tau = TAU_W'(t);
        in_r = '{w1: rnd(-0.5, 0.5), w2: rnd(-2.0, 2.0)};
        in_l = '{w1: rnd(-0.5, 0.5), w2: rnd(-1.0, 1.0)};
        step_en = 1;
        s0 = snap0();
        s2 = snap2();
        e0 = model(0, t, s0, r_(in_r.w1), r_(in_r.w2), r_(in_l.w1), r_(in_l.w2));
        e2 = model(2, t, s2, r_(in_r.w1), r_(in_r.w2), r_(in_l.w1), r_(in_l.w2));
        #1;
        checks += 2;
        if (p1_0 != ((t % 2) == 1 && t < 2*N) || p2_0 != ((t % 2) == 0 && t >= 2*N)) begin
          failures++; $display("FAIL S_0 activity at tau=%0d", t);
        end
        if (p1_2 != ((t % 2) == 1 && t > 2 && t <= 2*N-2) ||
            p2_2 != ((t % 2) == 0 && t >= 2*N+2 && t <= 4*N-2)) begin
          failures++; $display("FAIL S_2 activity at tau=%0d", t);
        end
        if (p1_2) n_p1++; else if (p2_2) n_p2++; else n_idle++;
        @(negedge clk);
        step_en = 0;
        s0 = snap0();
        s2 = snap2();
        for (int i = 0; i < 9; i++) begin
          if (e0[i] < 30000.0 && e0[i] > -30000.0) check({"S_0 ", NAMES[i]}, s0[i], e0[i]);
          if (e2[i] < 30000.0 && e2[i] > -30000.0) check({"S_2 ", NAMES[i]}, s2[i], e2[i]);
        end
      end

      xi_in = rnd(-5.0, 5.0);
      unload_en = 1;
      @(negedge clk);
      unload_en = 0;
      checks++;
      if (x0 != xi_in || x2 != xi_in) begin
        failures++; $display("FAIL unload shift");
      end
    end

    checks++;
    if (n_p1 == 0 || n_p2 == 0 || n_idle == 0) begin
      failures++; $display("FAIL coverage: p1=%0d p2=%0d idle=%0d", n_p1, n_p2, n_idle);
    end
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
