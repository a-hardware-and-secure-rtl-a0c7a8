// lfsr113: the LFSR113 combined Tausworthe generator (L'Ecuyer), used as the
// strategy (the embedded input generator) of the chaotic-iteration generator.
//
// Four 32-bit Tausworthe components z1..z4 are stepped in parallel and their
// XOR is the output. The generator is named as a strategy by the design; its
// recurrences are the published LFSR113 ones. rnd_o always shows the value the
// next step produces (it is computed from the next state), so a consumer reads
// rnd_o and pulses step_i in the same cycle. The seed expansion from one
// 32-bit word (XOR with fixed constants, bit 31 forced to one so every
// component meets its minimum-seed rule) is this design's choice.
//
// Interface: load_i (with seed_i) reseeds, step_i advances one output; load_i
// wins over step_i. One 32-bit output per clock cycle when stepped.
module lfsr113 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,
  input  logic [31:0] seed_i,
  input  logic        step_i,
  output logic [31:0] rnd_o
);

  localparam logic [31:0] K1 = 32'h1234_5678;
  localparam logic [31:0] K2 = 32'h9ABC_DEF1;
  localparam logic [31:0] K3 = 32'h2468_ACE0;
  localparam logic [31:0] K4 = 32'h1357_9BDF;

  logic [31:0] z1, z2, z3, z4;
  logic [31:0] z1n, z2n, z3n, z4n;

  always_comb begin
    z1n = ((z1 & 32'hFFFF_FFFE) << 18) ^ (((z1 << 6)  ^ z1) >> 13);
    z2n = ((z2 & 32'hFFFF_FFF8) << 2)  ^ (((z2 << 2)  ^ z2) >> 27);
    z3n = ((z3 & 32'hFFFF_FFF0) << 7)  ^ (((z3 << 13) ^ z3) >> 21);
    z4n = ((z4 & 32'hFFFF_FF80) << 13) ^ (((z4 << 3)  ^ z4) >> 12);
    rnd_o = z1n ^ z2n ^ z3n ^ z4n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      z1 <= K1 | 32'h8000_0000;
      z2 <= K2 | 32'h8000_0000;
      z3 <= K3 | 32'h8000_0000;
      z4 <= K4 | 32'h8000_0000;
    end else if (load_i) begin
      z1 <= (seed_i ^ K1) | 32'h8000_0000;
      z2 <= (seed_i ^ K2) | 32'h8000_0000;
      z3 <= (seed_i ^ K3) | 32'h8000_0000;
      z4 <= (seed_i ^ K4) | 32'h8000_0000;
    end else if (step_i) begin
      z1 <= z1n;
      z2 <= z2n;
      z3 <= z3n;
      z4 <= z4n;
    end
  end

endmodule
