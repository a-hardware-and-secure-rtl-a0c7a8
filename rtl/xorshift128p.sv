// xorshift128p: the xorshift128+ generator (Vigna), the 64-bit strategy the
// chaotic-iteration generator can embed.
//
// Two 64-bit words a, b hold the state. One step computes
//   t = a ^ (a << 23);  a' = b;  b' = t ^ b ^ (t >> 18) ^ (b >> 5)
// and returns b' + b. The generator is named as a strategy by the design; the
// shift triple (23, 18, 5) is the published one. rnd_o shows the value the
// next step produces. The seed expansion from 32 bits (bit 63 of each word
// forced to one so the state is never all zero) is this design's choice.
//
// Interface: load_i (with seed_i) reseeds, step_i advances; load_i wins.
// One 64-bit output per clock cycle when stepped; the 64-bit adder is the
// critical path.
module xorshift128p (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,
  input  logic [31:0] seed_i,
  input  logic        step_i,
  output logic [63:0] rnd_o
);

  localparam logic [63:0] KA = 64'h9E37_79B9_7F4A_7C15;
  localparam logic [63:0] KB = 64'hBF58_476D_1CE4_E5B9;
  localparam logic [63:0] MSB = 64'h8000_0000_0000_0000;

  logic [63:0] a, b;
  logic [63:0] t, bn;

  always_comb begin
    t     = a ^ (a << 23);
    bn    = t ^ b ^ (t >> 18) ^ (b >> 5);
    rnd_o = bn + b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= KA | MSB;
      b <= (KB ^ {32'hFFFF_FFFF, 32'h0}) | MSB;   // same as seeding with 0
    end else if (load_i) begin
      a <= (KA ^ {seed_i, seed_i}) | MSB;
      b <= (KB ^ {~seed_i, seed_i}) | MSB;
    end else if (step_i) begin
      a <= b;
      b <= bn;
    end
  end

endmodule
