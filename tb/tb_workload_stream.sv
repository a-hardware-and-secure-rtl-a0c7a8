// tb_workload_stream: the evaluation workloads as far as they can be
// simulated. Each run seeds a DUT controller over AXI4-Lite, sets it
// free-running, and takes 10^6 consecutive output bits (the sequence length
// of a NIST SP800-22 run) from its rnd_o/valid_o port:
//   * 32-bit generator with the LFSR113 strategy and with the Taus88 strategy;
//   * 64-bit generator with {Taus88, LFSR113} and with xorshift128+;
//   * the lighter form without permutation (one word per five iterations).
// Every word is compared with the reference model, and the valid pattern with
// the expected rate (one word per clock, or one per five clocks). The bit
// stream, most significant bit of each word first, then goes through three
// quick statistical tests at the 1% level: the SP800-22 frequency (monobit)
// and runs tests, and a chi-square test on the byte values (255 degrees of
// freedom). The thresholds are the inverse of those tests' p-value formulas.
// These are sanity checks only, not a substitute for the full batteries.
// As a control, the parallel iteration mode (which only alternates between two
// states) is streamed as well and must fail the byte test.
module tb_workload_stream;
  import gci_pkg::*;
  import gci_ref_pkg::*;

  localparam int unsigned NBITS = 1_000_000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_if bus32 (.clk, .rst_n);
  axil_if bus64 (.clk, .rst_n);
  axil_if bus5  (.clk, .rst_n);
  axil_bfm m32 (.bus(bus32));
  axil_bfm m64 (.bus(bus64));
  axil_bfm m5  (.bus(bus5));

  logic [31:0] rnd32, rnd5;
  logic [63:0] rnd64;
  logic        v32, v64, v5;
  dut_controller #(.N(32)) dut32 (.clk, .rst_n, .bus(bus32), .rnd_o(rnd32), .valid_o(v32));
  dut_controller #(.N(64)) dut64 (.clk, .rst_n, .bus(bus64), .rnd_o(rnd64), .valid_o(v64));
  dut_controller #(.N(32), .PERMUTE(1'b0), .OUT_EVERY(5)) dut5 (
    .clk, .rst_n, .bus(bus5), .rnd_o(rnd5), .valid_o(v5));

  int checks = 0, failures = 0;

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- model
  typedef struct {
    logic [63:0] x;
    lfsr113_t    l;
    taus88_t     t;
    xs128_t      xs;
  } model_t;

  function automatic void model_iter(ref model_t m, input int mode, input int sel, input int n);
    logic [31:0] a, b;
    logic [63:0] raw;
    unique case (sel)
      0: begin a = lfsr113_next(m.l); raw = {a, a}; end
      1: begin b = taus88_next(m.t);  raw = {b, b}; end
      2: begin a = lfsr113_next(m.l); b = taus88_next(m.t); raw = {b, a}; end
      default: raw = xs128_next(m.xs);
    endcase
    if (n == 32) raw[63:32] = 0;
    m.x = gci_ng(m.x, shape(mode, raw, n));
  endfunction

  // ---------------------------------------------------------------- statistics
  longint ones, runs, nbits;
  int     bytecnt [256];
  logic   last_bit;

  function automatic void stats_clear();
    ones = 0; runs = 0; nbits = 0; last_bit = 0;
    foreach (bytecnt[i]) bytecnt[i] = 0;
  endfunction

  function automatic void stats_add(logic [63:0] w, int n);
    for (int i = n - 1; i >= 0; i--) begin
      if (nbits == 0 || w[i] != last_bit) runs++;
      last_bit = w[i];
      ones += longint'(w[i]);
      nbits++;
    end
    for (int i = 0; i < n / 8; i++) bytecnt[w[8*i +: 8]]++;
  endfunction

  // frequency test: p >= 0.01  <=>  |#1 - #0| / sqrt(n) <= 2.5758
  function automatic real monobit_stat();
    return ((2.0 * real'(ones) - real'(nbits)) < 0.0 ? -(2.0 * real'(ones) - real'(nbits))
                                                     :  (2.0 * real'(ones) - real'(nbits)))
           / $sqrt(real'(nbits));
  endfunction

  // runs test: p >= 0.01  <=>  |V - 2n pi (1-pi)| / (2 sqrt(2n) pi (1-pi)) <= 1.8214
  function automatic real runs_stat();
    real pi, e, d;
    pi = real'(ones) / real'(nbits);
    e  = 2.0 * real'(nbits) * pi * (1.0 - pi);
    d  = real'(runs) - e;
    if (d < 0.0) d = -d;
    return d / (2.0 * $sqrt(2.0 * real'(nbits)) * pi * (1.0 - pi));
  endfunction

  // byte test: chi-square with 255 degrees of freedom, 1% point 310.46
  function automatic real byte_chi2();
    real total, e, c;
    total = 0.0;
    foreach (bytecnt[i]) total += real'(bytecnt[i]);
    e = total / 256.0;
    c = 0.0;
    foreach (bytecnt[i]) c += (real'(bytecnt[i]) - e) * (real'(bytecnt[i]) - e) / e;
    return c;
  endfunction

  // ---------------------------------------------------------------- runs
  // which controller a run uses: 0 = 32-bit, 1 = 64-bit, 2 = lighter form
  task automatic bus_write(int which, logic [15:0] a, logic [31:0] d);
    logic [1:0] r;
    unique case (which)
      0: m32.write(a, d, r);
      1: m64.write(a, d, r);
      default: m5.write(a, d, r);
    endcase
    chk(r == RESP_OKAY, "register write");
  endtask

  task automatic sample(int which, output logic v, output logic [63:0] w);
    @(posedge clk);
    #1;
    unique case (which)
      0: begin v = v32; w = {32'd0, rnd32}; end
      1: begin v = v64; w = rnd64; end
      default: begin v = v5; w = {32'd0, rnd5}; end
    endcase
  endtask

  task automatic stream(string name, int which, int mode, int sel, logic [63:0] sd, logic [31:0] ss,
                        bit expect_random);
    model_t m;
    int     n, every, words, got, gap, bad;
    logic   v;
    logic [63:0] w, exp_w;
    real    f, rs, c2;

    n     = (which == 1) ? 64 : 32;
    every = (which == 2) ? 5 : 1;
    words = NBITS / n;
    bus_write(which, DUT_BASE | 16'(DUT_REG_CTRL), 32'(mode | (sel << 2)));
    bus_write(which, DUT_BASE | 16'(DUT_REG_SEED_LO), sd[31:0]);
    if (n == 64) bus_write(which, DUT_BASE | 16'(DUT_REG_SEED_HI), sd[63:32]);
    bus_write(which, DUT_BASE | 16'(DUT_REG_SSEED), ss);
    bus_write(which, DUT_BASE | 16'(DUT_REG_CMD), 32'h3);
    m.x  = (n == 32) ? {32'd0, sd[31:0]} : sd;
    m.l  = lfsr113_seed(ss);
    m.t  = taus88_seed(ss);
    m.xs = xs128_seed(ss);
    stats_clear();
    got = 0; gap = 0; bad = 0;
    fork
      bus_write(which, DUT_BASE | 16'(DUT_REG_CTRL), 32'(mode | (sel << 2) | 32'h10));
      while (got < words) begin
        sample(which, v, w);
        gap++;
        if (v) begin
          repeat (every) model_iter(m, mode, sel, n);
          if (every > 1)   exp_w = m.x;
          else if (n == 32) exp_w = {32'd0, perm32(m.x[31:0])};
          else              exp_w = perm64(m.x);
          if (w !== exp_w) bad++;
          // after the first word, words arrive at the fixed rate
          if (got > 0 && gap != every) bad++;
          stats_add(w, n);
          got++;
          gap = 0;
        end
      end
    join
    bus_write(which, DUT_BASE | 16'(DUT_REG_CTRL), 32'(mode | (sel << 2)));
    chk(bad == 0, $sformatf("%s: %0d words or gaps differ from the model", name, bad));
    chk(nbits == longint'(NBITS), $sformatf("%s: %0d bits", name, nbits));
    f  = monobit_stat();
    rs = runs_stat();
    c2 = byte_chi2();
    $display("%s: %0d words, monobit %.3f (<= 2.576), runs %.3f (<= 1.821), byte chi2 %.1f (<= 310.5)",
             name, got, f, rs, c2);
    if (expect_random) begin
      chk(f <= 2.5758, {name, ": frequency test"});
      chk(rs <= 1.8214, {name, ": runs test"});
      chk(c2 <= 310.46, {name, ": byte chi-square test"});
    end else begin
      chk(c2 > 310.46, {name, ": control must fail the byte chi-square test"});
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    stream("32-bit, LFSR113",          0, MODE_GENERALIZED, STRAT_LFSR113, 64'h1234_5678, 32'h0BAD_5EED, 1);
    stream("32-bit, Taus88",           0, MODE_GENERALIZED, STRAT_TAUS88,  64'h9E37_79B9, 32'h2545_F491, 1);
    stream("64-bit, {Taus88,LFSR113}", 1, MODE_GENERALIZED, STRAT_TAUS_LFSR, 64'h0123_4567_89AB_CDEF, 32'h6A09_E667, 1);
    stream("64-bit, xorshift128+",     1, MODE_GENERALIZED, STRAT_XORSHIFT128, 64'hFEDC_BA98_7654_3210, 32'hBB67_AE85, 1);
    stream("32-bit lighter form",      2, MODE_GENERALIZED, STRAT_LFSR113, 64'h3C6E_F372, 32'hA54F_F53A, 1);
    stream("control: parallel mode",   0, MODE_PARALLEL,    STRAT_LFSR113, 64'h510E_527F, 32'h9B05_688C, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
