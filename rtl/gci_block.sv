// gci_block: one 8-bit lane of generalized chaotic iterations.
//
// Component i of the next lane state is f_i(x) when bit i of the lane's
// strategy word is set and x_i otherwise; only the components named by the
// strategy change. The iterated function f is the vectorial negation NG,
// f_i(x) = not x_i, so a selected component is inverted. This is the lane of
// the generator's Fig. 1. The other iterated functions the generator can
// embed (F1..F4, built by removing a Hamiltonian cycle from the 8-cube) are
// not defined in enough detail to be built and are not offered.
//
// Interface: x_i is the current lane state, s_i the lane strategy, x_o the
// next lane state. Purely combinational; the state register lives in
// gciprng_core.
module gci_block #(
  parameter int unsigned W = gci_pkg::LANE_W
) (
  input  logic [W-1:0] x_i,
  input  logic [W-1:0] s_i,
  output logic [W-1:0] x_o
);

  logic [W-1:0] f_x;  // image of the whole lane state under f

  always_comb begin
    f_x = ~x_i;  // NG: f_i(x) = not x_i
    for (int i = 0; i < int'(W); i++) begin
      x_o[i] = s_i[i] ? f_x[i] : x_i[i];
    end
  end

endmodule
