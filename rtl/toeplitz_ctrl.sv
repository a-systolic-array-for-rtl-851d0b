// toeplitz_ctrl: time-step sequencer of the systolic Toeplitz solver.
//
// Every processor decides from its own index k and the global time step tau
// whether it is active and in which phase; this block supplies tau and the
// surrounding load / start / unload sequence. It is a plain counter-driven
// state machine:
//
//   LOAD   in_ready = 1. Each accepted word (in_valid && in_ready) pulses
//          load_en, shifting one initialisation word into the array. After
//          N+1 words it moves on.
//   INIT   one cycle, init_en = 1: each processor copies its right
//          neighbour's values into alpha, delta, xi and clears lambda, mu.
//   RUN    4N cycles, step_en = 1, tau = 1, 2, ..., 4N (one time step per
//          clock).
//   UNLOAD N+1 cycles, x_valid = 1 and unload_en = 1: the array shifts the
//          solution out of S_0, x_0 first; x_last marks x_N. Then back to
//          LOAD.
//
// The 4N-step schedule is the algorithm's; the load/unload protocol and the
// absence of back-pressure on the x stream are this design's choices. From
// the last accepted input word to x_0 the latency is 1 + 4N + 1 cycles.
module toeplitz_ctrl #(
  parameter int unsigned N     = 4,
  parameter int unsigned TAU_W = $clog2(4*N+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  output logic             load_en,
  output logic             init_en,
  output logic             step_en,
  output logic [TAU_W-1:0] tau,
  output logic             unload_en,
  output logic             x_valid,
  output logic             x_last,
  output logic             busy
);

  typedef enum logic [1:0] {S_LOAD, S_INIT, S_RUN, S_UNLOAD} state_t;

  localparam int unsigned CNT_W = $clog2(N+2);

  state_t           state;
  logic [CNT_W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_LOAD;
      cnt   <= '0;
      tau   <= '0;
    end else begin
      unique case (state)
        S_LOAD: if (in_valid) begin
          if (cnt == CNT_W'(N)) begin
            cnt   <= '0;
            state <= S_INIT;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_INIT: begin
          tau   <= TAU_W'(1);
          state <= S_RUN;
        end
        S_RUN: begin
          if (tau == TAU_W'(4*N)) begin
            tau   <= '0;
            state <= S_UNLOAD;
          end else begin
            tau <= tau + 1'b1;
          end
        end
        S_UNLOAD: begin
          if (cnt == CNT_W'(N)) begin
            cnt   <= '0;
            state <= S_LOAD;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_LOAD;
      endcase
    end
  end

  always_comb begin
    in_ready  = (state == S_LOAD);
    load_en   = in_ready && in_valid;
    init_en   = (state == S_INIT);
    step_en   = (state == S_RUN);
    unload_en = (state == S_UNLOAD);
    x_valid   = unload_en;
    x_last    = unload_en && (cnt == CNT_W'(N));
    busy      = (state != S_LOAD) || (cnt != '0);
  end

  // tau stays inside the program's range 1..4N while the array runs.
  a_tau_range: assert property (@(posedge clk) disable iff (!rst_n)
    step_en |-> (tau >= TAU_W'(1) && tau <= TAU_W'(4*N)));

endmodule
