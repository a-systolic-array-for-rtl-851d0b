// toeplitz_sym_solver: linear systolic array that solves T x = b for a
// symmetric (N+1) x (N+1) Toeplitz matrix T in 4N time steps, using the
// symmetric variant of the Bareiss algorithm.
//
// Same organisation as the general array: N+1 processors S_0 .. S_N
// (bareiss_sym_cell), S_0 at the left, driven by a shared time-step counter
// (toeplitz_ctrl). Because T is symmetric only one multiplier and two data
// values need to move per step, so each neighbour pair is joined by two
// lines leftwards (outL1..2 into inR1..2) and two rightwards (outR1..2 into
// inL1..2), and each processor holds five values instead of eight. The price
// is a division by 1 - lambda^2 in every processor during Phase 2.
//
// Interface (valid/ready on the input, no back-pressure on the output):
//   in_word / in_valid / in_ready : N+1 words, word k = {t_k, b_(N-k)} for
//       k = 0, 1, ..., N in that order (t_k = t_-k for a symmetric T).
//   x_data / x_valid / x_last     : x_0, x_1, ..., x_N on N+1 cycles.
//   busy                          : a solve is under way.
// Timing: N+1 load cycles, 1 init cycle, 4N step cycles, N+1 output cycles.
//
// Processor program, initial values and wiring follow the symmetric
// algorithm; load/unload, fixed-point numbers and the broadcast tau are this
// design's choices, shared with the general array.
module toeplitz_sym_solver
  import toeplitz_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  sym_load_word_t in_word,
  input  logic           in_valid,
  output logic           in_ready,
  output data_t          x_data,
  output logic           x_valid,
  output logic           x_last,
  output logic           busy
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

  bus2_t          out_l [N+1];
  bus2_t          out_r [N+1];
  sym_load_word_t load_out [N+1];
  data_t          x_cell [N+1];
  logic           p1_active [N+1];
  logic           p2_active [N+1];

  for (genvar k = 0; k <= N; k++) begin : g_cell
    bus2_t          in_r;
    bus2_t          in_l;
    sym_load_word_t load_in;
    data_t          xi_in;

    if (k == N) begin : g_right_end
      // Beyond S_N: alpha_N = xi_N = 0; the host feeds the load chain.
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

    bareiss_sym_cell #(.K(k), .N(N), .TAU_W(TAU_W)) u_cell (
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

  for (genvar k = 0; k < N; k++) begin : g_parity_check
    a_parity: assert property (@(posedge clk) disable iff (!rst_n)
      !((p1_active[k] || p2_active[k]) && (p1_active[k+1] || p2_active[k+1])));
  end

endmodule
