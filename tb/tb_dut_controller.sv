// tb_dut_controller: drives the DUT controller over AXI4-Lite and checks its
// registers and its output stream against the reference models: identifier
// read and rewrite, seed load, the three iteration modes, the four strategy
// sources, strategy reseeding, step-on-read sequences, the free-running mode
// (one output per clock, counted by COUNT and seen on valid_o), the 64-bit
// core through OUT_LO/OUT_HI, the error answer to an unknown register, and
// the lighter form without permutation that delivers one word per five
// iterations.
module tb_dut_controller;
  import gci_pkg::*;
  import gci_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_if bus32 (.clk, .rst_n);
  axil_if bus64 (.clk, .rst_n);
  axil_bfm m32 (.bus(bus32));
  axil_bfm m64 (.bus(bus64));

  logic [31:0] rnd32;
  logic [63:0] rnd64;
  logic        v32, v64;
  dut_controller #(.N(32)) dut32 (.clk, .rst_n, .bus(bus32), .rnd_o(rnd32), .valid_o(v32));
  dut_controller #(.N(64)) dut64 (.clk, .rst_n, .bus(bus64), .rnd_o(rnd64), .valid_o(v64));

  // lighter form: no permutation, one output per five iterations
  axil_if bus5 (.clk, .rst_n);
  axil_bfm m5 (.bus(bus5));
  logic [31:0] rnd5;
  logic        v5;
  dut_controller #(.N(32), .PERMUTE(1'b0), .OUT_EVERY(5)) dut5 (.clk, .rst_n, .bus(bus5), .rnd_o(rnd5), .valid_o(v5));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // software model of one controller
  typedef struct {
    logic [63:0] x;
    lfsr113_t    l;
    taus88_t     t;
    xs128_t      xs;
  } model_t;

  function automatic logic [63:0] model_step(ref model_t m, input int mode, input int sel, input int n);
    logic [31:0] a, b;
    logic [63:0] raw, c;
    unique case (sel)
      0: begin a = lfsr113_next(m.l); raw = {a, a}; end
      1: begin b = taus88_next(m.t);  raw = {b, b}; end
      2: begin a = lfsr113_next(m.l); b = taus88_next(m.t); raw = {b, a}; end
      default: raw = xs128_next(m.xs);
    endcase
    if (n == 32) raw[63:32] = 0;
    m.x = gci_ng(m.x, shape(mode, raw, n));
    if (n == 32) return {32'd0, perm32(m.x[31:0])};
    return perm64(m.x);
  endfunction

  model_t mm;
  logic [31:0] d;
  logic [1:0]  r;
  logic [63:0] cur;

  initial begin
    mm.x = 0;
    mm.l = lfsr113_seed(RESET_SEED);
    mm.t = taus88_seed(RESET_SEED);
    mm.xs = xs128_seed(RESET_SEED);
    repeat (3) @(posedge clk);
    rst_n = 1;

    // identifier: reset value, rewrite
    m32.read(DUT_BASE | 16'(DUT_REG_ID), d, r);
    chk(d == DUT_ID_RESET && r == RESP_OKAY, "id reset");
    chk(m32.last_cycles == 2, "read latency");
    m32.write(DUT_BASE | 16'(DUT_REG_ID), 32'hCAFE_0001, r);
    m32.read(DUT_BASE | 16'(DUT_REG_ID), d, r);
    chk(d == 32'hCAFE_0001, "id rewrite");
    // unknown register
    m32.read(DUT_BASE | 16'h3C, d, r);
    chk(r == RESP_SLVERR, "unknown read slverr");
    m32.write(DUT_BASE | 16'h3C, 0, r);
    chk(r == RESP_SLVERR, "unknown write slverr");

    // every mode with every strategy source, 32-bit
    for (int sel = 0; sel < 4; sel++) begin
      for (int mode = 0; mode < 3; mode++) begin
        logic [31:0] sd, ss;
        sd = $urandom; ss = $urandom;
        m32.write(DUT_BASE | 16'(DUT_REG_CTRL), 32'(mode | (sel << 2)), r);
        m32.write(DUT_BASE | 16'(DUT_REG_SEED_LO), sd, r);
        m32.write(DUT_BASE | 16'(DUT_REG_SSEED), ss, r);
        m32.write(DUT_BASE | 16'(DUT_REG_CMD), 32'h3, r);
        mm.x = {32'd0, sd};
        mm.l = lfsr113_seed(ss); mm.t = taus88_seed(ss); mm.xs = xs128_seed(ss);
        cur = {32'd0, perm32(sd)};
        for (int k = 0; k < 20; k++) begin
          m32.read(DUT_BASE | 16'(DUT_REG_OUT_LO), d, r);
          chk(d == cur[31:0], $sformatf("out sel=%0d mode=%0d k=%0d", sel, mode, k));
          cur = model_step(mm, mode, sel, 32);
        end
      end
    end

    // free-running: one output per cycle
    begin
      logic [31:0] c0, c1;
      int vcount;
      m32.read(DUT_BASE | 16'(DUT_REG_COUNT), c0, r);
      m32.write(DUT_BASE | 16'(DUT_REG_CTRL), 32'h10, r);
      vcount = 0;
      repeat (50) begin @(posedge clk); #1; if (v32) vcount++; end
      m32.write(DUT_BASE | 16'(DUT_REG_CTRL), 32'h00, r);
      m32.read(DUT_BASE | 16'(DUT_REG_COUNT), c1, r);
      chk(vcount == 50, "valid every cycle while running");
      // 50 sampled cycles plus the cycles of the two writes around them
      chk(c1 - c0 >= 50 && c1 - c0 <= 60, $sformatf("count advanced %0d", c1 - c0));
    end

    // 64-bit controller, {Taus88, LFSR113} and xorshift128+ in generalized mode
    for (int sel = 2; sel < 4; sel++) begin
      logic [31:0] lo, hi, ss;
      logic [63:0] sd;
      sd = {$urandom, $urandom}; ss = $urandom;
      m64.write(DUT_BASE | 16'(DUT_REG_CTRL), 32'(sel << 2), r);
      m64.write(DUT_BASE | 16'(DUT_REG_SEED_LO), sd[31:0], r);
      m64.write(DUT_BASE | 16'(DUT_REG_SEED_HI), sd[63:32], r);
      m64.write(DUT_BASE | 16'(DUT_REG_SSEED), ss, r);
      m64.write(DUT_BASE | 16'(DUT_REG_CMD), 32'h3, r);
      mm.x = sd;
      mm.l = lfsr113_seed(ss); mm.t = taus88_seed(ss); mm.xs = xs128_seed(ss);
      cur = perm64(sd);
      for (int k = 0; k < 20; k++) begin
        m64.read(DUT_BASE | 16'(DUT_REG_OUT_LO), lo, r);
        m64.read(DUT_BASE | 16'(DUT_REG_OUT_HI), hi, r);
        chk({hi, lo} == cur, $sformatf("out64 sel=%0d k=%0d", sel, k));
        cur = model_step(mm, 0, sel, 64);
      end
    end

    // lighter form: each OUT_LO read is followed by five iterations
    begin
      logic [31:0] sd, ss, c0, c1;
      sd = $urandom; ss = $urandom;
      m5.write(DUT_BASE | 16'(DUT_REG_SEED_LO), sd, r);
      m5.write(DUT_BASE | 16'(DUT_REG_SSEED), ss, r);
      m5.write(DUT_BASE | 16'(DUT_REG_CMD), 32'h3, r);
      m5.read(DUT_BASE | 16'(DUT_REG_COUNT), c0, r);
      mm.x = {32'd0, sd};
      mm.l = lfsr113_seed(ss);
      for (int k = 0; k < 20; k++) begin
        m5.read(DUT_BASE | 16'(DUT_REG_OUT_LO), d, r);
        chk(d == mm.x[31:0], $sformatf("unpermuted out k=%0d", k));
        repeat (5) void'(model_step(mm, 0, 0, 32));
      end
      repeat (10) @(posedge clk);
      m5.read(DUT_BASE | 16'(DUT_REG_COUNT), c1, r);
      chk(c1 - c0 == 20, $sformatf("one output per five iterations (%0d)", c1 - c0));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
