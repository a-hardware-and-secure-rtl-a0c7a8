// tb_dccu: the decoder command controller with the units it drives (the
// interconnect, the DUT controller and the UART) at a small baud divisor, so
// long command sequences run quickly. Checks every command: writes with
// 'K' and 'E' answers, reads of both slaves, a stream longer than 255 words
// (the count's high byte in use) against the reference model, an empty
// stream that answers nothing, the controller's own identifier register, an
// unknown command, and that busy_o is raised
// while a command is handled and dropped afterwards.
module tb_dccu;
  import gci_pkg::*;
  import gci_ref_pkg::*;

  localparam int DIV = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_if m_bus (.clk, .rst_n);
  axil_if s0 (.clk, .rst_n);
  axil_if s1 (.clk, .rst_n);
  logic rxd, txd, busy, v;
  logic [31:0] rnd;

  dccu dut (.clk, .rst_n, .bus(m_bus), .busy_o(busy));
  axil_interconnect u_x (.m(m_bus), .s0(s0), .s1(s1));
  dut_controller #(.N(32)) u_d (.clk, .rst_n, .bus(s0), .rnd_o(rnd), .valid_o(v));
  axil_uart #(.DIV(DIV)) u_u (.clk, .rst_n, .bus(s1), .rxd_i(rxd), .txd_o(txd));
  uart_host #(.DIV(DIV)) host (.clk, .to_dut(rxd), .from_dut(txd));

  int checks = 0, failures = 0, busy_seen = 0;
  always @(posedge clk) if (rst_n && busy) busy_seen++;

  initial begin
    repeat (3_000_000) @(posedge clk);
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

  task automatic send_write(logic [15:0] a, logic [31:0] d);
    host.send(CMD_WRITE);
    host.send(a[15:8]); host.send(a[7:0]);
    host.send(d[31:24]); host.send(d[23:16]); host.send(d[15:8]); host.send(d[7:0]);
  endtask

  task automatic recv_word(output logic [31:0] d);
    logic [7:0] b;
    bit ok;
    d = 0;
    for (int i = 0; i < 4; i++) begin
      host.recv(b, ok);
      chk(ok, "byte arrived");
      d = {d[23:0], b};
    end
  endtask

  logic [31:0] d, mx, e;
  logic [7:0]  b;
  bit          ok;
  lfsr113_t    ml;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    chk(!busy, "idle after reset");

    // writes: good and bad
    send_write(UART_BASE | 16'(UART_REG_ID), 32'hA1B2_C3D4);
    host.recv(b, ok); chk(ok && b == RSP_OK, "write K");
    send_write(DUT_BASE | 16'h0044, 32'h0);
    host.recv(b, ok); chk(ok && b == RSP_ERR, "write E");
    // reads of both slaves
    host.send(CMD_READ); host.send(8'h10); host.send(8'h00);
    recv_word(d); chk(d == 32'hA1B2_C3D4, "read uart id");
    host.send(CMD_READ); host.send(8'h00); host.send(8'h00);
    recv_word(d); chk(d == DUT_ID_RESET, "read dut id");

    // seed and a 258-word stream with LFSR113, generalized iterations
    send_write(DUT_BASE | 16'(DUT_REG_SEED_LO), 32'h0BAD_CAFE);
    host.recv(b, ok); chk(ok && b == RSP_OK, "seed K");
    send_write(DUT_BASE | 16'(DUT_REG_SSEED), 32'h1357_2468);
    host.recv(b, ok);
    send_write(DUT_BASE | 16'(DUT_REG_CMD), 32'h3);
    host.recv(b, ok); chk(ok && b == RSP_OK, "load K");
    mx = 32'h0BAD_CAFE; ml = lfsr113_seed(32'h1357_2468);
    e = perm32(mx);
    host.send(CMD_STREAM); host.send(8'h01); host.send(8'h02);
    for (int k = 0; k < 258; k++) begin
      recv_word(d);
      chk(d == e, $sformatf("stream word %0d", k));
      mx = 32'(gci_ng(64'(mx), 64'(lfsr113_next(ml))));
      e = perm32(mx);
    end
    host.recv(b, ok, 5); chk(!ok, "nothing after the stream");

    // empty stream: no answer, next command still served
    host.send(CMD_STREAM); host.send(8'h00); host.send(8'h00);
    host.recv(b, ok, 5); chk(!ok, "empty stream silent");
    host.send(CMD_READ); host.send(8'h00); host.send(DUT_REG_OUT_LO);
    recv_word(d); chk(d == e, "read after empty stream");

    // the controller's own identifier, read and rewritten without a bus access
    host.send(CMD_READ); host.send(8'h20); host.send(8'h00);
    recv_word(d); chk(d == DCCU_ID_RESET, "dccu id");
    send_write(DCCU_BASE, 32'h0102_0304);
    host.recv(b, ok); chk(ok && b == RSP_OK, "dccu id write K");
    host.send(CMD_READ); host.send(8'h20); host.send(8'h00);
    recv_word(d); chk(d == 32'h0102_0304, "dccu id rewritten");
    send_write(DCCU_BASE | 16'h0004, 32'h0);
    host.recv(b, ok); chk(ok && b == RSP_ERR, "dccu unknown register E");

    // unknown command
    host.send(8'h00);
    host.recv(b, ok); chk(ok && b == RSP_UNKNOWN, "unknown command");

    repeat (100) @(posedge clk);
    chk(!busy, "idle at the end");
    chk(busy_seen > 0, "busy seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
