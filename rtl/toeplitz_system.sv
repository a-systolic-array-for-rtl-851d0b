// toeplitz_system: the two systolic Toeplitz solvers and the factor
// regeneration array, side by side.
//
// gen_* : toeplitz_solver, the general array for any Toeplitz matrix whose
//         leading principal submatrices are nonsingular (unsymmetric Bareiss
//         algorithm, N_GEN+1 processors with eight registers each).
// sym_* : toeplitz_sym_solver, the array for symmetric Toeplitz matrices
//         (symmetric Bareiss variant, N_SYM+1 smaller processors).
// regen_*: regen_array, the N_REGEN-processor array that rebuilds the upper
//         triangular factor of T, row by row from the bottom, out of its last
//         column and the multipliers, by running the elimination backwards.
//         It lets the factor be used again (for a back substitution) without
//         storing the whole triangle.
// The three arrays share nothing but the clock and reset; each keeps its own
// input and result streams, described in its own module. A system that is
// symmetric may be sent to either solver; the general array is the
// better-behaved numerically, since the symmetric one divides by
// 1 - lambda^2.
module toeplitz_system
  import toeplitz_pkg::*;
#(
  parameter int unsigned N_GEN   = 4,
  parameter int unsigned N_SYM   = 4,
  parameter int unsigned N_REGEN = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  // general array
  input  load_word_t     gen_in_word,
  input  logic           gen_in_valid,
  output logic           gen_in_ready,
  output data_t          gen_x_data,
  output logic           gen_x_valid,
  output logic           gen_x_last,
  output logic           gen_busy,
  // symmetric array
  input  sym_load_word_t sym_in_word,
  input  logic           sym_in_valid,
  output logic           sym_in_ready,
  output data_t          sym_x_data,
  output logic           sym_x_valid,
  output logic           sym_x_last,
  output logic           sym_busy,
  // factor regeneration array
  input  data_t          regen_col_in,
  input  logic           regen_col_valid,
  output logic           regen_col_ready,
  input  mult_pair_t     regen_mult_in,
  input  logic           regen_mult_valid,
  output logic           regen_mult_ready,
  output data_t          regen_d_data [N_REGEN],
  output logic           regen_d_valid,
  output logic [$clog2(N_REGEN+1)-1:0] regen_d_count,
  output logic           regen_d_last,
  output logic           regen_busy
);

  toeplitz_solver #(.N(N_GEN)) u_gen (
    .clk, .rst_n,
    .in_word  (gen_in_word),
    .in_valid (gen_in_valid),
    .in_ready (gen_in_ready),
    .x_data   (gen_x_data),
    .x_valid  (gen_x_valid),
    .x_last   (gen_x_last),
    .busy     (gen_busy)
  );

  toeplitz_sym_solver #(.N(N_SYM)) u_sym (
    .clk, .rst_n,
    .in_word  (sym_in_word),
    .in_valid (sym_in_valid),
    .in_ready (sym_in_ready),
    .x_data   (sym_x_data),
    .x_valid  (sym_x_valid),
    .x_last   (sym_x_last),
    .busy     (sym_busy)
  );

  regen_array #(.N(N_REGEN)) u_regen (
    .clk, .rst_n,
    .col_in     (regen_col_in),
    .col_valid  (regen_col_valid),
    .col_ready  (regen_col_ready),
    .mult_in    (regen_mult_in),
    .mult_valid (regen_mult_valid),
    .mult_ready (regen_mult_ready),
    .d_data     (regen_d_data),
    .d_valid    (regen_d_valid),
    .d_count    (regen_d_count),
    .d_last     (regen_d_last),
    .busy       (regen_busy)
  );

endmodule
