// tb_toeplitz_ctrl: unit test of the time-step sequencer (N = 3 here).
//
// The testbench offers input words with random gaps in in_valid and records
// every cycle's control outputs. For each of several solves it checks that
// exactly N+1 words are accepted (load_en only with in_valid && in_ready),
// that one init cycle follows, that tau then counts 1, 2, ..., 4N on 4N
// consecutive step cycles, and that N+1 unload cycles follow with x_valid
// and x_last on the last one, after which the sequencer accepts words again.
module tb_toeplitz_ctrl;

  localparam int N     = 3;
  localparam int TAU_W = $clog2(4*N+1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid;
  logic in_ready, load_en, init_en, step_en, unload_en, x_valid, x_last, busy;
  logic [TAU_W-1:0] tau;

  int checks = 0;
  int failures = 0;

  toeplitz_ctrl #(.N(N)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .load_en, .init_en, .step_en,
    .tau, .unload_en, .x_valid, .x_last, .busy
  );

  always #5 clk = ~clk;

  task automatic expect_true(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    int accepted;
    in_valid = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    for (int run = 0; run < 5; run++) begin
      // Load phase with random gaps.
      accepted = 0;
      while (accepted < N + 1) begin
        in_valid = ($urandom_range(0, 2) != 0);
        #1;
        expect_true(in_ready, "in_ready while loading");
        expect_true(load_en == in_valid, "load_en follows in_valid");
        expect_true(!init_en && !step_en && !unload_en, "no other mode while loading");
        if (in_valid) accepted++;
        @(negedge clk);
      end
      in_valid = 1'b1;  // offered but must be refused until the solve ends
      #1;
      expect_true(init_en && !in_ready && !load_en, "single init cycle after N+1 words");
      expect_true(busy, "busy during init");
      @(negedge clk);
      for (int t = 1; t <= 4 * N; t++) begin
        expect_true(step_en && int'(tau) == t, $sformatf("step %0d has tau=%0d", t, tau));
        expect_true(!in_ready && !load_en && !x_valid, "no load or output while stepping");
        @(negedge clk);
      end
      for (int i = 0; i <= N; i++) begin
        expect_true(unload_en && x_valid && !step_en, "unload cycle");
        expect_true(x_last == (i == N), "x_last only on the last element");
        @(negedge clk);
      end
      in_valid = 1'b0;
      #1;
      expect_true(in_ready && !x_valid && !busy, "back to loading, idle");
      @(negedge clk);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
