// regen_cell: processor B_K of the array that regenerates the upper
// triangular factor T^(-n) from its last column and the 2n multipliers.
//
// The processor holds two registers, U and D. While the array is loading,
// D shifts in from the right (load_in -> D -> load_out) and U is cleared, so
// that B_K starts with U = 0 and D = t^(-n)_(n-K, n). Once running, it is
// active in iteration i when K < i, and each iteration is three clock
// cycles driven by the array's sequencer:
//   step1_en : U := U + m * D       (m = m_k on the broadcast line)
//   step2_en : D := D + m * U       (m = m_-k), and outd := the new D
//   shift_en : U := inu             (outu of B_(K-1); zero into B_0)
// The shift moves every U one place right whether or not B_K is active, so
// that a processor that becomes active next iteration already holds the
// value it needs. outd is a register: it keeps the value of the last step 2
// in which this processor was active.
//
// The registers, the three steps and the outu -> inu wiring follow the
// algorithm; the load chain, the fixed-point numbers and one step per clock
// are this design's choices.
module regen_cell
  import toeplitz_pkg::*;
#(
  parameter int unsigned K    = 0,
  parameter int unsigned N    = 4,
  parameter int unsigned IT_W = $clog2(N+1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load_en,
  input  data_t           load_in,
  output data_t           load_out,
  input  logic            step1_en,
  input  logic            step2_en,
  input  logic            shift_en,
  input  logic [IT_W-1:0] iter,        // current iteration i, 1 .. N
  input  data_t           multiplier,  // broadcast multiplier line
  input  data_t           inu,
  output data_t           outu,
  output data_t           outd,
  output logic            active
);

  data_t u_q, d_q;

  assign active = int'(iter) > int'(K);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      u_q  <= '0;
      d_q  <= '0;
      outd <= '0;
    end else if (load_en) begin
      u_q <= '0;
      d_q <= load_in;
    end else if (step1_en && active) begin
      u_q <= fx_add(u_q, fx_mul(multiplier, d_q));
    end else if (step2_en && active) begin
      d_q  <= fx_add(d_q, fx_mul(multiplier, u_q));
      outd <= fx_add(d_q, fx_mul(multiplier, u_q));
    end else if (shift_en) begin
      u_q <= inu;
    end
  end

  assign load_out = d_q;
  assign outu     = u_q;

  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({load_en, step1_en, step2_en, shift_en}));

endmodule
