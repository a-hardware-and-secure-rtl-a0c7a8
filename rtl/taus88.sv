// taus88: the Taus88 combined Tausworthe generator (L'Ecuyer), one of the
// strategies the chaotic-iteration generator can embed.
//
// Three 32-bit Tausworthe components s1..s3 are stepped in parallel and their
// XOR is the output. The generator is named as a strategy by the design; its
// recurrences are the published Taus88 ones. rnd_o shows the value the next
// step produces, so a consumer reads it and pulses step_i in the same cycle.
// The seed expansion (XOR with constants, bit 31 forced to one to meet the
// minimum-seed rules) is this design's choice.
//
// Interface: load_i (with seed_i) reseeds, step_i advances; load_i wins.
// One 32-bit output per clock cycle when stepped.
module taus88 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load_i,
  input  logic [31:0] seed_i,
  input  logic        step_i,
  output logic [31:0] rnd_o
);

  localparam logic [31:0] K1 = 32'hC0FF_EE11;
  localparam logic [31:0] K2 = 32'h0BAD_F00D;
  localparam logic [31:0] K3 = 32'h7654_3210;

  logic [31:0] s1, s2, s3;
  logic [31:0] s1n, s2n, s3n;

  always_comb begin
    s1n = ((s1 & 32'hFFFF_FFFE) << 12) ^ (((s1 << 13) ^ s1) >> 19);
    s2n = ((s2 & 32'hFFFF_FFF8) << 4)  ^ (((s2 << 2)  ^ s2) >> 25);
    s3n = ((s3 & 32'hFFFF_FFF0) << 17) ^ (((s3 << 3)  ^ s3) >> 11);
    rnd_o = s1n ^ s2n ^ s3n;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= K1 | 32'h8000_0000;
      s2 <= K2 | 32'h8000_0000;
      s3 <= K3 | 32'h8000_0000;
    end else if (load_i) begin
      s1 <= (seed_i ^ K1) | 32'h8000_0000;
      s2 <= (seed_i ^ K2) | 32'h8000_0000;
      s3 <= (seed_i ^ K3) | 32'h8000_0000;
    end else if (step_i) begin
      s1 <= s1n;
      s2 <= s2n;
      s3 <= s3n;
    end
  end

endmodule
