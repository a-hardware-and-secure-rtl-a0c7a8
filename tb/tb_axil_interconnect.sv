// tb_axil_interconnect: one master and two slaves (the DUT controller at
// 0x0000 and the UART at 0x1000) joined by the interconnect. Checks that
// reads and writes reach the slave named by the address and not the other,
// and that error responses come back through the right path.
module tb_axil_interconnect;
  import gci_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_if mb (.clk, .rst_n);
  axil_if s0 (.clk, .rst_n);
  axil_if s1 (.clk, .rst_n);
  axil_bfm m (.bus(mb));
  axil_interconnect dut (.m(mb), .s0(s0), .s1(s1));

  logic [31:0] rnd;
  logic        rv, line;
  dut_controller #(.N(32)) u_s0 (.clk, .rst_n, .bus(s0), .rnd_o(rnd), .valid_o(rv));
  axil_uart #(.DIV(8)) u_s1 (.clk, .rst_n, .bus(s1), .rxd_i(line), .txd_o(line));

  int checks = 0, failures = 0;

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
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [31:0] d;
  logic [1:0]  r;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    m.read(DUT_BASE | 16'(DUT_REG_ID), d, r);
    chk(d == DUT_ID_RESET && r == RESP_OKAY, "slave 0 id");
    m.read(UART_BASE | 16'(UART_REG_ID), d, r);
    chk(d == UART_ID_RESET && r == RESP_OKAY, "slave 1 id");
    for (int i = 0; i < 20; i++) begin
      logic [31:0] a, b;
      a = $urandom; b = $urandom;
      m.write(DUT_BASE | 16'(DUT_REG_ID), a, r);
      chk(r == RESP_OKAY, "write 0");
      m.write(UART_BASE | 16'(UART_REG_ID), b, r);
      chk(r == RESP_OKAY, "write 1");
      m.read(DUT_BASE | 16'(DUT_REG_ID), d, r);
      chk(d == a, "slave 0 kept its own value");
      m.read(UART_BASE | 16'(UART_REG_ID), d, r);
      chk(d == b, "slave 1 kept its own value");
    end
    // 0x0020 is COUNT in slave 0 but unknown in slave 1
    m.read(DUT_BASE | 16'h0020, d, r);
    chk(r == RESP_OKAY, "count readable in slave 0");
    m.read(UART_BASE | 16'h0020, d, r);
    chk(r == RESP_SLVERR, "error from slave 1");
    m.write(UART_BASE | 16'h0020, 0, r);
    chk(r == RESP_SLVERR, "write error from slave 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
