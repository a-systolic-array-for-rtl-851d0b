// tb_regen_array: self-checking test of the regeneration array at N = 4.
//
// First it rebuilds the 5 x 5 triangular factor of the worked example
// T = 120 * toeplitz(1, 2, 3, 4, 5): from the factor's last column (t_44 up
// to t_14 = -288, -360, -480, -720) and the multipliers m_4 .. m_1 =
// -1/12, -1/10, -1/8, -2/3 and m_-4 .. m_-1 = -1/2, -2/3, -1, 2, the rows
// must come out as -300; -320 -400; -360 -480 -600; 120 240 360 480.
// Then it runs random columns and multipliers against a real-valued model of
// the two update steps and the shift, with random gaps in mult_valid. It
// checks every output word, d_count and d_last on each iteration, and that
// iterations without a gap follow each other every 3 cycles.
module tb_regen_array;
  import toeplitz_pkg::*;

  localparam int  N      = 4;
  localparam int  ROUNDS = 30;
  localparam real TOL    = 0.002;

  logic clk = 1'b0;
  logic rst_n = 1'b0;

  data_t      col_in;
  logic       col_valid, col_ready;
  mult_pair_t mult_in;
  logic       mult_valid, mult_ready;
  data_t      d_data [N];
  logic       d_valid, d_last, busy;
  logic [$clog2(N+1)-1:0] d_count;

  int checks = 0;
  int failures = 0;

  regen_array #(.N(N)) dut (
    .clk, .rst_n,
    .col_in, .col_valid, .col_ready,
    .mult_in, .mult_valid, .mult_ready,
    .d_data, .d_valid, .d_count, .d_last, .busy
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

  typedef data_t vec_t [N];
  typedef real   rmat_t [N+1][N];   // [iteration][processor]

  // Reference: run the iterations on reals. col[j] is the j-th load word
  // (t_(N-j,N)); mp[i], mn[i] are the pair taken in iteration i (1-based).
  function automatic rmat_t model(vec_t col, vec_t mp, vec_t mn);
    real u [N];
    real d [N];
    rmat_t out;
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

  int last_valid_cycle;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // Feed one problem; collect and check the N result pulses. gaps: maximum
  // idle cycles before each multiplier pair (0 = back to back).
  task automatic run(input string who, input vec_t col, input vec_t mp, input vec_t mn,
                     input int gaps, input real tol);
    rmat_t exp;
    int got_iters = 0;
    exp = model(col, mp, mn);
    fork
      begin
        for (int j = 0; j < N; j++) begin
          col_in    <= col[j];
          col_valid <= 1'b1;
          do @(posedge clk); while (!col_ready);
        end
        col_valid <= 1'b0;
        for (int i = 0; i < N; i++) begin
          if (gaps > 0) begin
            mult_valid <= 1'b0;
            repeat ($urandom_range(0, gaps)) @(posedge clk);
          end
          mult_in    <= '{m_pos: mp[i], m_neg: mn[i]};
          mult_valid <= 1'b1;
          do @(posedge clk); while (!mult_ready);
        end
        mult_valid <= 1'b0;
      end
      begin
        while (got_iters < N) begin
          @(posedge clk);
          if (d_valid) begin
            got_iters++;
            checks += 2;
            if (int'(d_count) != got_iters) begin
              failures++;
              $display("FAIL %s: d_count %0d on iteration %0d", who, d_count, got_iters);
            end
            if (d_last != (got_iters == N)) begin
              failures++;
              $display("FAIL %s: d_last %b on iteration %0d", who, d_last, got_iters);
            end
            if (gaps == 0 && got_iters > 1) begin
              checks++;
              if (cycle - last_valid_cycle != 3) begin
                failures++;
                $display("FAIL %s: iteration %0d took %0d cycles", who, got_iters,
                         cycle - last_valid_cycle);
              end
            end
            last_valid_cycle = cycle;
            for (int j = 0; j < got_iters; j++) begin
              real diff = to_real(d_data[j]) - exp[got_iters][j];
              checks++;
              if (diff > tol || diff < -tol) begin
                failures++;
                $display("FAIL %s: iteration %0d, d_%0d = %f, expected %f", who, got_iters, j,
                         to_real(d_data[j]), exp[got_iters][j]);
              end
            end
          end
        end
      end
    join
  endtask

  initial begin
    vec_t col, mp, mn;
    real ex [N+1][N];
    col_in = '0; col_valid = 1'b0;
    mult_in = '0; mult_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    // The worked example; expected rows written out, not taken from model().
    col = '{to_fx(-288.0), to_fx(-360.0), to_fx(-480.0), to_fx(-720.0)};
    mp  = '{to_fx(-1.0/12.0), to_fx(-1.0/10.0), to_fx(-1.0/8.0), to_fx(-2.0/3.0)};
    mn  = '{to_fx(-0.5), to_fx(-2.0/3.0), to_fx(-1.0), to_fx(2.0)};
    ex[1][0] = -300.0;
    ex[2][0] = -320.0; ex[2][1] = -400.0;
    ex[3][0] = -360.0; ex[3][1] = -480.0; ex[3][2] = -600.0;
    ex[4][0] =  120.0; ex[4][1] =  240.0; ex[4][2] =  360.0; ex[4][3] = 480.0;
    begin
      rmat_t m;
      m = model(col, mp, mn);
      for (int i = 1; i <= N; i++)
        for (int j = 0; j < i; j++) begin
          checks++;
          if (m[i][j] - ex[i][j] > 0.05 || m[i][j] - ex[i][j] < -0.05) begin
            failures++;
            $display("FAIL reference model disagrees with the example at %0d,%0d", i, j);
          end
        end
    end
    run("worked example", col, mp, mn, 0, 0.05);

    for (int r = 0; r < ROUNDS; r++) begin
      for (int j = 0; j < N; j++) begin
        col[j] = urand(-4.0, 4.0);
        mp[j]  = urand(-1.0, 1.0);
        mn[j]  = urand(-1.0, 1.0);
      end
      run($sformatf("random %0d", r), col, mp, mn, (r % 2) * 3, TOL);
    end

    @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: still busy at the end"); end

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
