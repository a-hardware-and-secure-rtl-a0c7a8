// axil_uart: the platform's UART as an AXI4-Lite slave.
//
// Wraps uart_rx and uart_tx behind four word registers (byte offsets):
//   0x00 ID      read/write identifier of the unit
//   0x04 STATUS  [0] a received byte waits, [1] the transmit buffer is free,
//                [2] a byte arrived while the previous one was unread
//   0x08 RXDATA  the received byte; reading it frees the receive buffer and
//                clears the overrun flag
//   0x0C TXDATA  writing queues one byte for transmission
// Each direction has a one-byte buffer. A write is accepted when its address
// and data are both valid; the response follows one cycle later. A read is
// answered one cycle after its address. Unknown offsets answer SLVERR. That
// every unit has an identifier that can be read and rewritten follows the
// platform's description; the register map is this design's choice.
module axil_uart #(
  parameter int unsigned DIV      = 1085,
  parameter logic [31:0] ID_RESET = gci_pkg::UART_ID_RESET
) (
  input  logic   clk,
  input  logic   rst_n,
  axil_if.slave  bus,
  input  logic   rxd_i,
  output logic   txd_o
);
  import gci_pkg::*;

  logic [31:0] id_q;
  logic [7:0]  rx_byte, rx_data_q;
  logic        rx_strobe, rx_ferr, rx_full_q, overrun_q;
  logic [7:0]  tx_data_q;
  logic        tx_pend_q, tx_ready;

  uart_rx #(.DIV(DIV)) u_rx (
    .clk, .rst_n, .rxd_i,
    .data_o (rx_byte), .valid_o (rx_strobe), .frame_err_o (rx_ferr)
  );

  uart_tx #(.DIV(DIV)) u_tx (
    .clk, .rst_n,
    .data_i (tx_data_q), .valid_i (tx_pend_q), .ready_o (tx_ready), .txd_o
  );

  logic wr_go, rd_go;
  logic [7:0] waddr, raddr;
  assign wr_go = bus.awvalid && bus.wvalid && !bus.bvalid;
  assign rd_go = bus.arvalid && !bus.rvalid;
  assign waddr = bus.awaddr[7:0];
  assign raddr = bus.araddr[7:0];

  assign bus.awready = wr_go;
  assign bus.wready  = wr_go;
  assign bus.arready = rd_go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q      <= ID_RESET;
      rx_data_q <= '0;
      rx_full_q <= 1'b0;
      overrun_q <= 1'b0;
      tx_data_q <= '0;
      tx_pend_q <= 1'b0;
      bus.bvalid <= 1'b0;
      bus.bresp  <= RESP_OKAY;
      bus.rvalid <= 1'b0;
      bus.rresp  <= RESP_OKAY;
      bus.rdata  <= '0;
    end else begin
      // transmit buffer drains into the transmitter
      if (tx_pend_q && tx_ready) tx_pend_q <= 1'b0;

      // write channel
      if (bus.bvalid && bus.bready) bus.bvalid <= 1'b0;
      if (wr_go) begin
        bus.bvalid <= 1'b1;
        bus.bresp  <= RESP_OKAY;
        unique case (waddr)
          UART_REG_ID: id_q <= bus.wdata;
          UART_REG_TXDATA: begin
            if (!tx_pend_q || tx_ready) begin
              tx_data_q <= bus.wdata[7:0];
              tx_pend_q <= 1'b1;
            end else begin
              bus.bresp <= RESP_SLVERR;   // buffer full, byte dropped
            end
          end
          default: bus.bresp <= RESP_SLVERR;
        endcase
      end

      // read channel
      if (bus.rvalid && bus.rready) bus.rvalid <= 1'b0;
      if (rd_go) begin
        bus.rvalid <= 1'b1;
        bus.rresp  <= RESP_OKAY;
        bus.rdata  <= '0;
        unique case (raddr)
          UART_REG_ID:     bus.rdata <= id_q;
          UART_REG_STATUS: bus.rdata <= {29'd0, overrun_q, !tx_pend_q, rx_full_q};
          UART_REG_RXDATA: bus.rdata <= {24'd0, rx_data_q};
          default:         bus.rresp <= RESP_SLVERR;
        endcase
      end

      // receive buffer; a new byte wins over a simultaneous read
      if (rd_go && raddr == UART_REG_RXDATA) begin
        rx_full_q <= 1'b0;
        overrun_q <= 1'b0;
      end
      if (rx_strobe) begin
        rx_data_q <= rx_byte;
        rx_full_q <= 1'b1;
        if (rx_full_q && !(rd_go && raddr == UART_REG_RXDATA)) overrun_q <= 1'b1;
      end
    end
  end

  // frame errors are dropped silently by the receiver
  logic unused_ferr;
  assign unused_ferr = rx_ferr;

endmodule
