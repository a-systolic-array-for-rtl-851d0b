// toeplitz_solver: linear systolic array that solves T x = b for an
// (N+1) x (N+1) Toeplitz matrix T in 4N time steps.
//
// The array is N+1 identical super-processors S_0 .. S_N (bareiss_cell),
// S_0 at the left end, plus the time-step sequencer (toeplitz_ctrl). Between
// neighbours, three lines run leftwards (outL1..3 of S_k into inR1..3 of
// S_(k-1)) and two run rightwards (outR1..2 of S_k into inL1..2 of
// S_(k+1)). In Phase 1 (tau = 1 .. 2N-1) matrix data flows left and the
// multipliers flow right, S_0 forming them by division; in Phase 2
// (tau = 2N .. 4N) multipliers and right-hand-side data flow left while
// solution components flow right. The solution x_k ends in register xi of
// S_k. All processors see the same tau and work out their own activity.
//
// Interface (valid/ready on the input, no back-pressure on the output):
//   in_word / in_valid / in_ready : N+1 words, word k = {t_k, t_-k, b_(N-k)}
//       for k = 0, 1, ..., N in that order. They enter at S_N and shift
//       left, so the word sent first ends in S_0.
//   x_data / x_valid / x_last     : x_0, x_1, ..., x_N on N+1 consecutive
//       cycles, shifted out of S_0.
//   busy                          : a solve is under way.
// Timing: N+1 load cycles (at full input rate), 1 initialisation cycle, 4N
// step cycles, N+1 output cycles. Numbers are toeplitz_pkg::data_t fixed
// point.
//
// The processor program, its initial values and the array wiring follow the
// algorithm; the load/unload chains, the fixed-point format and the shared
// tau counter (instead of 1-bit systolic control paths) are this design's.
module toeplitz_solver
  import toeplitz_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  load_word_t in_word,
  input  logic       in_valid,
  output logic       in_ready,
  output data_t      x_data,
  output logic       x_valid,
  output logic       x_last,
  output logic       busy
);

  localparam int unsigned TAU_W = $clog2(4*N+1);

  logic             load_en, init_en, step_en, unload_en;
  logic [TAU_W-1:0] tau;

  toeplitz_ctrl #(.N(N), .TAU_W(TAU_W)) u_ctrl (
    .clk, .rst_n,
    .in_valid, .in_ready,
    .load_en, .init_en, .step_en, .tau, .unload_en,
    .x_valid, .x_last, .busy
  );

  // Per-cell line bundles; index N+1 / -1 are the array's open ends.
  lbus_t      out_l [N+1];
  rbus_t      out_r [N+1];
  load_word_t load_out [N+1];
  data_t      x_cell [N+1];
  logic       p1_active [N+1];
  logic       p2_active [N+1];

  for (genvar k = 0; k <= N; k++) begin : g_cell
    lbus_t      in_r;
    rbus_t      in_l;
    load_word_t load_in;
    data_t      xi_in;

    if (k == N) begin : g_right_end
      // Beyond S_N: zeros (t_+-(N+1) = b_-1 = 0); the host feeds the load chain.
      assign in_r    = '0;
      assign load_in = load_en ? in_word : '0;
      assign xi_in   = '0;
    end else begin : g_right
      assign in_r    = out_l[k+1];
      assign load_in = load_out[k+1];
      assign xi_in   = x_cell[k+1];
    end

    if (k == 0) begin : g_left_end
      assign in_l = '0;
    end else begin : g_left
      assign in_l = out_r[k-1];
    end

    bareiss_cell #(.K(k), .N(N), .TAU_W(TAU_W)) u_cell (
      .clk, .rst_n,
      .step_en, .tau, .load_en, .init_en, .unload_en,
      .in_r, .in_l,
      .out_l (out_l[k]),
      .out_r (out_r[k]),
      .load_in,
      .load_out (load_out[k]),
      .xi_in,
      .x (x_cell[k]),
      .p1_active (p1_active[k]),
      .p2_active (p2_active[k])
    );
  end

  assign x_data = x_cell[0];

  // Adjacent processors are never active in the same step (the program's
  // parity rule), which is what lets each line carry one value per step.
  for (genvar k = 0; k < N; k++) begin : g_parity_check
    a_parity: assert property (@(posedge clk) disable iff (!rst_n)
      !((p1_active[k] || p2_active[k]) && (p1_active[k+1] || p2_active[k+1])));
  end

endmodule
