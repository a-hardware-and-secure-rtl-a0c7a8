// tb_gci_test_platform: end-to-end run of the whole test platform at its
// default sizes (32-bit generator, 125 MHz / 115200 baud divisor). A host
// model talks to it over the serial line only, as the test software would:
// it rewrites unit identifiers, configures every combination of iteration
// mode (generalized, unary, parallel) and strategy source (LFSR113, Taus88,
// both, xorshift128+), loads the seed and reseeds the strategies, streams
// outputs and compares each word with a reference model, provokes an error
// answer and an unknown-command answer, and runs the generator free at one
// output per clock on the direct output port. Each of these mechanisms is
// counted, and one that never happened counts as a failure.
module tb_gci_test_platform;
  import gci_pkg::*;
  import gci_ref_pkg::*;

  localparam int DIV = 1085;   // the platform's default divisor
  logic clk = 0, rst_n = 0;
  always #4 clk = ~clk;        // 125 MHz

  logic        rxd, txd, valid, busy;
  logic [31:0] rnd;

  gci_test_platform dut (
    .clk, .rst_n, .uart_rxd(rxd), .uart_txd(txd),
    .rnd_o(rnd), .rnd_valid_o(valid), .cmd_busy_o(busy)
  );
  uart_host #(.DIV(DIV)) host (.clk, .to_dut(rxd), .from_dut(txd));

  int checks = 0, failures = 0;
  int n_mode[3], n_sel[4], n_seed = 0, n_reseed = 0, n_stream_words = 0;
  int n_err = 0, n_unknown = 0, n_id = 0, n_freerun = 0;

  initial begin
    repeat (40_000_000) @(posedge clk);
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
      if (failures >= 5) begin
        $display("too many failures, stopping");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  endtask

  task automatic cmd_write(logic [15:0] a, logic [31:0] d, output logic [7:0] rsp);
    bit ok;
    host.send(CMD_WRITE);
    host.send(a[15:8]); host.send(a[7:0]);
    host.send(d[31:24]); host.send(d[23:16]); host.send(d[15:8]); host.send(d[7:0]);
    host.recv(rsp, ok);
    chk(ok, "write reply arrived");
  endtask

  task automatic cmd_write_ok(logic [15:0] a, logic [31:0] d);
    logic [7:0] rsp;
    cmd_write(a, d, rsp);
    chk(rsp == RSP_OK, $sformatf("write %h acknowledged", a));
  endtask

  task automatic recv_word(output logic [31:0] d);
    logic [7:0] b;
    bit ok;
    d = 0;
    for (int i = 0; i < 4; i++) begin
      host.recv(b, ok);
      chk(ok, "data byte arrived");
      d = {d[23:0], b};
    end
  endtask

  task automatic cmd_read(logic [15:0] a, output logic [31:0] d);
    host.send(CMD_READ);
    host.send(a[15:8]); host.send(a[7:0]);
    recv_word(d);
  endtask

  // generator model
  logic [31:0] mx;
  lfsr113_t ml; taus88_t mt; xs128_t mxs;

  function automatic logic [31:0] model_step(int mode, int sel);
    logic [31:0] a, b;
    logic [63:0] raw;
    unique case (sel)
      0: begin a = lfsr113_next(ml); raw = {32'd0, a}; end
      1: begin b = taus88_next(mt);  raw = {32'd0, b}; end
      2: begin a = lfsr113_next(ml); b = taus88_next(mt); raw = {32'd0, a}; end
      default: begin raw = xs128_next(mxs); raw[63:32] = 0; end
    endcase
    mx = 32'(gci_ng(64'(mx), shape(mode, raw, 32)));
    return perm32(mx);
  endfunction

  logic [31:0] d;
  logic [7:0]  b;
  bit          ok;

  initial begin
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);

    // identifiers, readable and rewritable
    cmd_read(DUT_BASE | 16'(DUT_REG_ID), d);
    chk(d == DUT_ID_RESET, "dut id");
    cmd_read(UART_BASE | 16'(UART_REG_ID), d);
    chk(d == UART_ID_RESET, "uart id");
    cmd_write_ok(DUT_BASE | 16'(DUT_REG_ID), 32'h4743_4931);
    cmd_read(DUT_BASE | 16'(DUT_REG_ID), d);
    chk(d == 32'h4743_4931, "dut id rewritten");
    cmd_read(DCCU_BASE, d);
    chk(d == DCCU_ID_RESET, "dccu id");
    cmd_write_ok(DCCU_BASE, 32'h4443_4331);
    cmd_read(DCCU_BASE, d);
    chk(d == 32'h4443_4331, "dccu id rewritten");
    n_id++;

    // every mode with every strategy source; seed, reseed, stream
    for (int sel = 0; sel < 4; sel++) begin
      for (int mode = 0; mode < 3; mode++) begin
        logic [31:0] sd, ss, e;
        int nw;
        sd = $urandom; ss = $urandom;
        nw = 3;
        cmd_write_ok(DUT_BASE | 16'(DUT_REG_CTRL), 32'(mode | (sel << 2)));
        cmd_write_ok(DUT_BASE | 16'(DUT_REG_SEED_LO), sd);
        cmd_write_ok(DUT_BASE | 16'(DUT_REG_SSEED), ss);
        cmd_write_ok(DUT_BASE | 16'(DUT_REG_CMD), 32'h3);
        n_seed++; n_reseed++;
        mx = sd; ml = lfsr113_seed(ss); mt = taus88_seed(ss); mxs = xs128_seed(ss);
        e = perm32(sd);
        host.send(CMD_STREAM); host.send(8'h00); host.send(8'(nw));
        for (int k = 0; k < nw; k++) begin
          recv_word(d);
          chk(d == e, $sformatf("stream word sel=%0d mode=%0d k=%0d got %h exp %h", sel, mode, k, d, e));
          e = model_step(mode, sel);
          n_stream_words++;
        end
        n_mode[mode]++; n_sel[sel]++;
        // single read continues the same sequence
        cmd_read(DUT_BASE | 16'(DUT_REG_OUT_LO), d);
        chk(d == e, "read continues the stream");
        void'(model_step(mode, sel));
      end
    end

    // error answer: unknown register of the DUT controller
    cmd_write(DUT_BASE | 16'h003C, 32'h0, b);
    chk(b == RSP_ERR, "error answer");
    if (b == RSP_ERR) n_err++;
    // unknown command
    host.send(8'h7A);
    host.recv(b, ok);
    chk(ok && b == RSP_UNKNOWN, "unknown command answer");
    if (ok && b == RSP_UNKNOWN) n_unknown++;

    // free-running at full rate, seen on the direct output
    begin
      logic [31:0] c0, c1;
      int streak, best;
      cmd_read(DUT_BASE | 16'(DUT_REG_COUNT), c0);
      cmd_write_ok(DUT_BASE | 16'(DUT_REG_CTRL), 32'h10);   // run, generalized, LFSR113
      streak = 0; best = 0;
      repeat (2000) begin
        @(posedge clk); #1;
        if (valid) begin streak++; if (streak > best) best = streak; end
        else streak = 0;
      end
      chk(best == 2000, $sformatf("one output per clock while running (%0d)", best));
      cmd_write_ok(DUT_BASE | 16'(DUT_REG_CTRL), 32'h00);
      cmd_read(DUT_BASE | 16'(DUT_REG_COUNT), c1);
      chk(c1 - c0 > 2000, "COUNT followed the free run");
      if (best == 2000) n_freerun++;
    end

    chk(host.frame_errors == 0, "clean serial frames");
    for (int i = 0; i < 3; i++) chk(n_mode[i] > 0, $sformatf("mode %0d used", i));
    for (int i = 0; i < 4; i++) chk(n_sel[i] > 0, $sformatf("strategy %0d used", i));
    chk(n_seed > 0 && n_reseed > 0, "seed and reseed happened");
    chk(n_stream_words > 0, "stream happened");
    chk(n_err > 0 && n_unknown > 0, "error answers happened");
    chk(n_id > 0 && n_freerun > 0, "id rewrite and free run happened");
    $display("modes %0d/%0d/%0d strategies %0d/%0d/%0d/%0d seeds %0d reseeds %0d words %0d errors %0d unknown %0d free runs %0d",
             n_mode[0], n_mode[1], n_mode[2], n_sel[0], n_sel[1], n_sel[2], n_sel[3],
             n_seed, n_reseed, n_stream_words, n_err, n_unknown, n_freerun);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
