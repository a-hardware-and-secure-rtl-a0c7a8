// gciprng_core: the chaotic-iteration pseudorandom generator (GCIPRNG).
//
// The N-bit internal state x is split into N/8 lanes of 8 bits. On every step
// each lane is updated by one generalized chaotic iteration (gci_block) under
// the matching 8 bits of the strategy word s; the lanes are concatenated back
// into the new state, and the output is the permutation (gci_permutation) of
// the state. This follows the generator's Fig. 1: seed, split into lanes A..D,
// per-lane strategy, GCI function, concatenation, feedback, permutation.
// N is 32 by default; 64 is the other evaluated width, and any power of two
// from 8 to 128 builds (one lane per byte).
//
// Timing: when step_i is high at a clock edge the state advances, and rnd_o
// (combinational from the state) shows the new output in the following
// cycle, flagged by valid_o: one output per cycle, latency one cycle. load_i
// writes seed_i into the state (it wins over step_i) and produces no output.
//
// The generator is also described in a lighter form without the permutation,
// delivering one N-bit word every five iterations instead. PERMUTE = 0 drops
// the permutation (rnd_o is then the state itself) and OUT_EVERY = 5 makes
// valid_o rise only on every fifth step; the defaults (1, 1) give the main
// form. That the five iterations are consecutive steps of the same state is
// this design's reading. Lane l occupies bits 8l+7..8l of the
// state and of the strategy (lane A is the least significant; the bit order
// is this design's choice).
module gciprng_core #(
  parameter int unsigned N         = 32,
  parameter bit          PERMUTE   = 1'b1,
  parameter int unsigned OUT_EVERY = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load_i,
  input  logic [N-1:0] seed_i,
  input  logic         step_i,
  input  logic [N-1:0] s_i,
  output logic [N-1:0] rnd_o,
  output logic         valid_o,
  output logic [N-1:0] state_o
);
  import gci_pkg::*;

  localparam int unsigned LANES = N / LANE_W;

  localparam int unsigned CW = (OUT_EVERY > 1) ? $clog2(OUT_EVERY) : 1;

  logic [N-1:0]  x_q, x_next, y_perm;
  logic [CW-1:0] phase_q;   // steps since the last output, OUT_EVERY > 1 only
  logic          out_step;

  for (genvar l = 0; l < int'(LANES); l++) begin : g_lane
    gci_block #(.W(LANE_W)) u_lane (
      .x_i (x_q[l*LANE_W +: LANE_W]),
      .s_i (s_i[l*LANE_W +: LANE_W]),
      .x_o (x_next[l*LANE_W +: LANE_W])
    );
  end

  assign out_step = step_i && !load_i &&
                    (OUT_EVERY <= 1 || phase_q == CW'(OUT_EVERY - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      phase_q <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= out_step;
      if (load_i) begin
        x_q     <= seed_i;
        phase_q <= '0;
      end else if (step_i) begin
        x_q     <= x_next;
        phase_q <= out_step ? '0 : phase_q + 1'b1;
      end
    end
  end

  gci_permutation #(.N(N)) u_perm (
    .x_i (x_q),
    .y_o (y_perm)
  );

  assign rnd_o = PERMUTE ? y_perm : x_q;

  assign state_o = x_q;

  initial begin
    assert (N == 8 || N == 16 || N == 32 || N == 64 || N == 128)
      else $error("gciprng_core: N must be 8, 16, 32, 64 or 128");
    assert (OUT_EVERY >= 1) else $error("gciprng_core: OUT_EVERY must be at least 1");
  end

endmodule
