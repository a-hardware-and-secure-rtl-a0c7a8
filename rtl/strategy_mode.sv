// strategy_mode: turns the raw strategy word into the set of components that
// the chaotic iterations update in each 8-bit lane.
//
// Three kinds of iteration are offered, as listed for the test platform:
//   generalized - the strategy word is used as is, each bit selecting one
//                 component (the generator's main scheme);
//   unary       - exactly one component per lane is updated, its index being
//                 the lane's three low strategy bits;
//   parallel    - every component of every lane is updated.
// How unary and parallel iterations draw on the strategy word is this
// design's choice; an unused mode code behaves as generalized.
//
// Interface: mode_i, raw strategy s_i, shaped strategy s_o. Combinational.
module strategy_mode #(
  parameter int unsigned N = 32
) (
  input  gci_pkg::gci_mode_e mode_i,
  input  logic [N-1:0]       s_i,
  output logic [N-1:0]       s_o
);
  import gci_pkg::*;

  localparam int unsigned LANES = N / LANE_W;

  always_comb begin
    unique case (mode_i)
      MODE_UNARY: begin
        s_o = '0;
        for (int l = 0; l < int'(LANES); l++) begin
          s_o[l*LANE_W + int'(s_i[l*LANE_W +: 3])] = 1'b1;
        end
      end
      MODE_PARALLEL: s_o = '1;
      default:       s_o = s_i;
    endcase
  end

endmodule
