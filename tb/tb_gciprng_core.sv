// tb_gciprng_core: runs the 32-bit and the 64-bit generator core with random
// strategy words and random stepping, and compares every output with a model
// (negation iteration per bit, then the permutation). Checks the one-cycle
// output latency through valid_o, that one output is produced per stepped
// cycle, and that loading a seed restarts the sequence. A third instance in
// the lighter form (no permutation, an output every fifth step) is checked
// for its output value and its valid pattern, and 8-, 16- and 128-bit
// instances against a width-generic model.
module tb_gciprng_core;
  import gci_ref_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [63:0] seed = 0, s = 0;
  logic [31:0] rnd32, st32;
  logic [63:0] rnd64, st64;
  logic        v32, v64;
  logic [63:0] x_ref;
  int checks = 0, failures = 0, outputs = 0, steps = 0;

  gciprng_core #(.N(32)) dut32 (.clk, .rst_n, .load_i(load), .seed_i(seed[31:0]), .step_i(step),
                                .s_i(s[31:0]), .rnd_o(rnd32), .valid_o(v32), .state_o(st32));
  gciprng_core #(.N(64)) dut64 (.clk, .rst_n, .load_i(load), .seed_i(seed), .step_i(step),
                                .s_i(s), .rnd_o(rnd64), .valid_o(v64), .state_o(st64));

  // lighter form: no permutation, one output every five iterations
  logic [31:0] rnd5, st5;
  logic        v5;
  gciprng_core #(.N(32), .PERMUTE(1'b0), .OUT_EVERY(5)) dut5 (
    .clk, .rst_n, .load_i(load), .seed_i(seed[31:0]), .step_i(step),
    .s_i(s[31:0]), .rnd_o(rnd5), .valid_o(v5), .state_o(st5));
  int phase5 = 0, outputs5 = 0;

  // other widths: 8, 16 and 128 bits
  logic [127:0] seed128, s128, x128_ref;
  logic [7:0]   rnd8, st8;
  logic [15:0]  rnd16, st16;
  logic [127:0] rnd128, st128;
  logic         v8, v16, v128;
  gciprng_core #(.N(8))   dut8   (.clk, .rst_n, .load_i(load), .seed_i(seed128[7:0]), .step_i(step),
                                  .s_i(s128[7:0]), .rnd_o(rnd8), .valid_o(v8), .state_o(st8));
  gciprng_core #(.N(16))  dut16  (.clk, .rst_n, .load_i(load), .seed_i(seed128[15:0]), .step_i(step),
                                  .s_i(s128[15:0]), .rnd_o(rnd16), .valid_o(v16), .state_o(st16));
  gciprng_core #(.N(128)) dut128 (.clk, .rst_n, .load_i(load), .seed_i(seed128), .step_i(step),
                                  .s_i(s128), .rnd_o(rnd128), .valid_o(v128), .state_o(st128));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [63:0] x32_ref, x64_ref;
  logic        exp_valid;
  int          exp_out5 = 0;

  initial begin
    x32_ref = 0; x64_ref = 0; x128_ref = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = (i % 700 == 0);
      seed = {$urandom, $urandom};
      step = (i % 700 == 1) ? 1'b1 : (($urandom % 3) != 0);
      s    = {$urandom, $urandom};
      seed128 = {seed, $urandom, $urandom};
      s128    = {s, $urandom, $urandom};
      @(posedge clk);
      #1;
      exp_valid = step && !load;
      chk(v5 === (exp_valid && phase5 == 4), "valid every fifth step");
      if (v5) outputs5++;
      if (exp_valid && phase5 == 4) exp_out5++;
      if (load) phase5 = 0;
      else if (step) phase5 = (phase5 + 1) % 5;
      if (load) begin
        x32_ref = {32'd0, seed[31:0]};
        x64_ref = seed;
        x128_ref = seed128;
      end else if (step) begin
        x128_ref = x128_ref ^ s128;
        x32_ref = gci_ng(x32_ref, {32'd0, s[31:0]});
        x64_ref = gci_ng(x64_ref, s);
        steps++;
      end
      chk(v32 === exp_valid && v64 === exp_valid, "valid latency");
      if (v32) outputs++;
      chk(st32 === x32_ref[31:0] && st64 === x64_ref, "state");
      chk(rnd32 === perm32(x32_ref[31:0]), "rnd32");
      chk(rnd64 === perm64(x64_ref), "rnd64");
      chk(rnd5 === x32_ref[31:0], "unpermuted output is the state");
      chk(v8 === exp_valid && v16 === exp_valid && v128 === exp_valid, "valid, other widths");
      chk(st128 === x128_ref && st8 === x128_ref[7:0] && st16 === x128_ref[15:0], "state, other widths");
      chk(128'(rnd8)  === perm_n(128'(x128_ref[7:0]), 8, 811), "rnd8");
      chk(128'(rnd16) === perm_n(128'(x128_ref[15:0]), 16, 811), "rnd16");
      chk(rnd128 === perm_n(x128_ref, 128, 995), "rnd128");
      chk(128'(rnd32) === perm_n(128'(x32_ref[31:0]), 32, 811) && 128'(rnd64) === perm_n(128'(x64_ref), 64, 995),
          "generic model agrees at 32 and 64 bits");
    end
    // full rate: 100 consecutive steps give 100 outputs
    @(negedge clk); load = 0; step = 1;
    begin
      int n;
      n = 0;
      repeat (100) begin
        @(posedge clk); #1;
        if (v32) n++;
      end
      @(negedge clk); step = 0;
      chk(n == 100, "one output per cycle");
    end
    chk(outputs == steps, "outputs equal steps");
    // each load restarts the count of five, so a few steps are lost per load
    chk(outputs5 > 0 && outputs5 == exp_out5 && outputs5 >= steps / 5 - 5 && outputs5 <= steps / 5,
        "one output per five steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
