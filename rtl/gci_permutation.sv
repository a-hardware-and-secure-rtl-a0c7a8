// gci_permutation: the bijective output scrambler applied to the state.
//
// Three steps, in the style of the PCG "RXS M XS" output function:
//   1. random xorshift: w = x ^ (x >> (x[N-1 -: OPB] + OPB)), whose shift is
//      taken from the OPB top bits of the state itself (OPB = 4 for N = 32,
//      so the low 13..28 bits are mixed);
//   2. multiplication modulo 2^N by the odd constant MULT;
//   3. fixed xorshift: y = w ^ (w >> ((2N+2)/3)).
// Each step is invertible, so the whole map is a permutation of N-bit words.
// The three-step structure and the multipliers (811 for 32-bit, 995 for
// 64-bit generators) follow the generator's description; the shift amounts
// are taken from the PCG family it builds on and are this design's choice.
//
// N may be any power of two from 8 to 128. Only the 32- and 64-bit
// multipliers are known to give good statistics; other widths reuse the
// nearer of the two (taken modulo 2^N, and still odd), which is this design's
// choice and should be re-tuned before use.
//
// Interface: x_i internal state, y_o output word. Combinational.
module gci_permutation #(
  parameter int unsigned N    = 32,
  parameter int unsigned MULT = (N >= 64) ? gci_pkg::MULT64 : gci_pkg::MULT32
) (
  input  logic [N-1:0] x_i,
  output logic [N-1:0] y_o
);

  localparam int unsigned OPB = $clog2(N) - 1;      // 4 for N = 32, 5 for N = 64
  localparam int unsigned FSH = (2 * N + 2) / 3;    // 22 for N = 32, 43 for N = 64

  logic [OPB-1:0] rsh;
  logic [N-1:0]   w1, w2;

  always_comb begin
    rsh = x_i[N-1 -: OPB];
    w1  = x_i ^ (x_i >> (N'(rsh) + N'(OPB)));
    w2  = w1 * N'(MULT);
    y_o = w2 ^ (w2 >> FSH);
  end

endmodule
