// regen_array: linear array of N processors B_0 .. B_(N-1) (regen_cell)
// that rebuilds the upper triangular matrix T^(-n) (n = N) produced by the
// Toeplitz elimination, from only its last column and the multipliers
// m_(+-1) .. m_(+-n). It runs the elimination backwards, so O(n) numbers
// are stored instead of the whole triangle.
//
// Iteration i (i = 1 .. N) uses the pair (m_k, m_-k) with k = N+1-i and
// activates B_0 .. B_(i-1). It takes three clock cycles:
//   1. m_k is broadcast and every active B_j does U_j := U_j + m_k D_j;
//   2. m_-k is broadcast and every active B_j does D_j := D_j + m_-k U_j,
//      putting the new D_j on its output line outd_j;
//   3. every U moves one processor right (outu_j -> inu_(j+1)), U_0 := 0.
// The outputs of iteration i are row N-i of T^(-n), columns N-i .. N-1:
// d_data[j] is the element in column N-i+j. Column N is not produced: it is
// the input column (and, for row 0, which the elimination leaves unchanged,
// element N of the first row of T). The rows come out bottom to top, the
// order a back-substitution array consumes them in.
//
// Interface:
//   col_in / col_valid / col_ready   : N words, the last column of T^(-n)
//       from the bottom up without its top element: t_(N,N) first,
//       t_(1,N) last. They shift into D from the right end, so B_K starts
//       with D = t_(N-K,N).
//   mult_in / mult_valid / mult_ready : N multiplier pairs, (m_N, m_-N)
//       first and (m_1, m_-1) last. A pair is taken at the start of each
//       iteration; the array waits while mult_valid is low.
//   d_data / d_valid / d_count / d_last : one pulse of d_valid per
//       iteration; d_data[0 .. d_count-1] is valid, d_count = i; d_last
//       marks iteration N (the top row).
// Timing: N load cycles, then 3 cycles per iteration when multipliers are
// ready; d_valid is high in the third cycle of each iteration.
//
// Registers, steps and the broadcast multiplier line follow the algorithm;
// the multiplier is broadcast rather than passed along the array, as the
// algorithm is first stated. Handshakes, the load order and fixed-point
// numbers are this design's choices.
module regen_array
  import toeplitz_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  data_t                 col_in,
  input  logic                  col_valid,
  output logic                  col_ready,
  input  mult_pair_t            mult_in,
  input  logic                  mult_valid,
  output logic                  mult_ready,
  output data_t                 d_data [N],
  output logic                  d_valid,
  output logic [$clog2(N+1)-1:0] d_count,
  output logic                  d_last,
  output logic                  busy
);

  localparam int unsigned IT_W = $clog2(N+1);

  typedef enum logic [1:0] {S_LOAD, S_STEP1, S_STEP2, S_SHIFT} state_t;

  state_t          state;
  logic [IT_W-1:0] cnt;
  logic [IT_W-1:0] iter;
  data_t           m_neg_q;
  logic            d_valid_q;

  logic  load_en, step1_en, step2_en, shift_en;
  data_t multiplier;

  assign col_ready  = (state == S_LOAD);
  assign mult_ready = (state == S_STEP1);
  assign load_en    = col_ready && col_valid;
  assign step1_en   = mult_ready && mult_valid;
  assign step2_en   = (state == S_STEP2);
  assign shift_en   = (state == S_SHIFT);
  assign multiplier = (state == S_STEP1) ? mult_in.m_pos : m_neg_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_LOAD;
      cnt       <= '0;
      iter      <= '0;
      m_neg_q   <= '0;
      d_valid_q <= 1'b0;
    end else begin
      d_valid_q <= step2_en;
      unique case (state)
        S_LOAD: if (col_valid) begin
          if (cnt == IT_W'(N - 1)) begin
            cnt   <= '0;
            iter  <= IT_W'(1);
            state <= S_STEP1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STEP1: if (mult_valid) begin
          m_neg_q <= mult_in.m_neg;
          state   <= S_STEP2;
        end
        S_STEP2: state <= S_SHIFT;
        S_SHIFT: begin
          if (iter == IT_W'(N)) begin
            iter  <= '0;
            state <= S_LOAD;
          end else begin
            iter  <= iter + 1'b1;
            state <= S_STEP1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  data_t outu     [N];
  data_t load_out [N];
  logic  active   [N];

  for (genvar k = 0; k < N; k++) begin : g_cell
    data_t inu;
    data_t load_in;

    if (k == 0) begin : g_left_end
      assign inu = '0;
    end else begin : g_left
      assign inu = outu[k-1];
    end

    if (k == N - 1) begin : g_right_end
      assign load_in = col_in;
    end else begin : g_right
      assign load_in = load_out[k+1];
    end

    regen_cell #(.K(k), .N(N), .IT_W(IT_W)) u_cell (
      .clk, .rst_n,
      .load_en, .load_in,
      .load_out (load_out[k]),
      .step1_en, .step2_en, .shift_en,
      .iter, .multiplier, .inu,
      .outu     (outu[k]),
      .outd     (d_data[k]),
      .active   (active[k])
    );
  end

  assign d_valid = d_valid_q;
  assign d_count = iter;
  assign d_last  = d_valid_q && (iter == IT_W'(N));
  assign busy    = (state != S_LOAD) || (cnt != '0);

  // The active processors always form a prefix B_0 .. B_(i-1).
  for (genvar k = 1; k < N; k++) begin : g_prefix_check
    a_prefix: assert property (@(posedge clk) disable iff (!rst_n)
      active[k] |-> active[k-1]);
  end

endmodule
