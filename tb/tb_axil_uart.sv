// tb_axil_uart: the UART unit with its serial output looped back to its
// input, driven over AXI4-Lite at a small baud divisor. Checks the
// identifier register, byte round trips through TXDATA/RXDATA with the
// status flags, the error answer when the transmit buffer is full, the
// overrun flag when a byte arrives before the previous one was read, and the
// error answer for an unknown register.
module tb_axil_uart;
  import gci_pkg::*;

  localparam int DIV = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  axil_if bus (.clk, .rst_n);
  axil_bfm m (.bus(bus));
  logic line;
  axil_uart #(.DIV(DIV)) dut (.clk, .rst_n, .bus(bus), .rxd_i(line), .txd_o(line));

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

  logic [31:0] d;
  logic [1:0]  r;

  task automatic wait_rx();
    int n;
    n = 0;
    do begin
      m.read(UART_BASE | 16'(UART_REG_STATUS), d, r);
      n++;
    end while (!d[0] && n < 1000);
    chk(d[0], "rx flag");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    m.read(UART_BASE | 16'(UART_REG_ID), d, r);
    chk(d == UART_ID_RESET && r == RESP_OKAY, "id reset");
    m.write(UART_BASE | 16'(UART_REG_ID), 32'h1234_5678, r);
    m.read(UART_BASE | 16'(UART_REG_ID), d, r);
    chk(d == 32'h1234_5678, "id rewrite");
    m.read(UART_BASE | 16'(UART_REG_STATUS), d, r);
    chk(d[2:0] == 3'b010, "idle status");
    m.read(UART_BASE | 16'h20, d, r);
    chk(r == RESP_SLVERR, "unknown register");

    // round trips
    for (int i = 0; i < 20; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      m.write(UART_BASE | 16'(UART_REG_TXDATA), 32'(b), r);
      chk(r == RESP_OKAY, "tx accepted");
      wait_rx();
      m.read(UART_BASE | 16'(UART_REG_RXDATA), d, r);
      chk(d[7:0] == b, $sformatf("loopback byte %h got %h", b, d[7:0]));
      m.read(UART_BASE | 16'(UART_REG_STATUS), d, r);
      chk(d[0] == 1'b0, "rx flag cleared");
    end

    // three bytes at once: the third finds both the transmitter and the buffer busy
    m.write(UART_BASE | 16'(UART_REG_TXDATA), 32'h11, r);
    chk(r == RESP_OKAY, "first byte");
    m.write(UART_BASE | 16'(UART_REG_TXDATA), 32'h22, r);
    chk(r == RESP_OKAY, "second byte buffered");
    m.read(UART_BASE | 16'(UART_REG_STATUS), d, r);
    chk(d[1] == 1'b0, "tx buffer full flag");
    m.write(UART_BASE | 16'(UART_REG_TXDATA), 32'h33, r);
    chk(r == RESP_SLVERR, "third byte refused");
    // both arrive unread: overrun
    repeat (25 * DIV) @(posedge clk);
    m.read(UART_BASE | 16'(UART_REG_STATUS), d, r);
    chk(d[0] && d[2], "overrun flagged");
    m.read(UART_BASE | 16'(UART_REG_RXDATA), d, r);
    chk(d[7:0] == 8'h22, "latest byte kept");
    m.read(UART_BASE | 16'(UART_REG_STATUS), d, r);
    chk(d[2:0] == 3'b010, "flags cleared");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
