// gci_test_platform: the FPGA test platform around the chaotic-iteration
// pseudorandom generator (GCIPRNG).
//
// Three units share one AXI4-Lite bus: the decoder command controller (the
// bus master), the DUT controller (the generator, its strategy generators
// and its registers, at 0x0000) and the UART (at 0x1000); the command
// controller answers itself for its own identifier at 0x2000. A host on the
// serial line configures the generator (iteration mode, strategy, seeds),
// reads its registers and streams its output through the command
// controller. The generator's output word and its valid flag are also
// brought out directly, for use at the full rate of one N-bit word per clock
// while CTRL.run is set. N is 32 or 64. The three units and the bus follow the platform's
// description; the register map, the serial protocol and the baud-rate
// divisor (DIV clocks per bit) are this design's choices.
module gci_test_platform #(
  parameter int unsigned N         = 32,
  parameter bit          PERMUTE   = 1'b1,   // 0 with OUT_EVERY = 5: the lighter form
  parameter int unsigned OUT_EVERY = 1,
  parameter int unsigned DIV       = 1085
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         uart_rxd,
  output logic         uart_txd,
  output logic [N-1:0] rnd_o,
  output logic         rnd_valid_o,
  output logic         cmd_busy_o
);

  axil_if m_bus   (.clk, .rst_n);
  axil_if dut_bus (.clk, .rst_n);
  axil_if uart_bus(.clk, .rst_n);

  dccu u_dccu (.clk, .rst_n, .bus(m_bus), .busy_o(cmd_busy_o));

  axil_interconnect u_xbar (.m(m_bus), .s0(dut_bus), .s1(uart_bus));

  dut_controller #(.N(N), .PERMUTE(PERMUTE), .OUT_EVERY(OUT_EVERY)) u_dut (
    .clk, .rst_n, .bus(dut_bus), .rnd_o, .valid_o(rnd_valid_o)
  );

  axil_uart #(.DIV(DIV)) u_uart (
    .clk, .rst_n, .bus(uart_bus), .rxd_i(uart_rxd), .txd_o(uart_txd)
  );

endmodule
