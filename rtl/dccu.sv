// dccu: the decoder command controller of the test platform.
//
// The only AXI4-Lite master of the platform. Its receiver side polls the
// UART status register and pulls received bytes out of it; its command
// decoder gathers them into commands; its AXI side performs the register
// access each command asks for; its transmitter side pushes the reply back
// through the UART, waiting for the transmit buffer before each byte.
// Commands (addresses and data big-endian):
//   'W' a1 a0 d3 d2 d1 d0   write the word d to address a; reply 'K', or 'E'
//                           when the slave answers an error
//   'R' a1 a0               read address a; reply the four data bytes
//   'S' n1 n0               stream n outputs of the generator: n reads of the
//                           DUT controller's OUT_LO register, 4 bytes each
//   anything else           reply '?'
// Addresses with bit 13 set (0x2000 up) are the controller's own: offset 0
// is its identifier register, read and rewritten by 'R' and 'W' without a
// bus access; other offsets there answer 'E' to a write and zeros to a read.
// Decoding host commands, reading and writing the units' registers and
// streaming generator output to the host follow the platform's description;
// the command bytes and the polling scheme are this design's choices.
// One AXI transaction is in flight at a time.
module dccu #(
  parameter logic [15:0] UART_BASE = gci_pkg::UART_BASE,
  parameter logic [15:0] DUT_BASE  = gci_pkg::DUT_BASE,
  parameter logic [31:0] ID_RESET  = gci_pkg::DCCU_ID_RESET
) (
  input  logic  clk,
  input  logic  rst_n,
  axil_if.master bus,
  output logic  busy_o       // a command is being decoded or answered
);
  import gci_pkg::*;

  // ------------------------------------------------------------ AXI master
  typedef enum logic [2:0] {A_IDLE, A_WADDR, A_WRESP, A_RADDR, A_RDATA} axi_state_e;
  axi_state_e  a_state;
  logic        op_start, op_we, op_done;
  logic [15:0] op_addr;
  logic [31:0] op_wdata, op_rdata;
  logic [1:0]  op_resp;
  logic        aw_done, w_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_state     <= A_IDLE;
      bus.awvalid <= 1'b0;
      bus.wvalid  <= 1'b0;
      bus.arvalid <= 1'b0;
      bus.bready  <= 1'b0;
      bus.rready  <= 1'b0;
      bus.awaddr  <= '0;
      bus.araddr  <= '0;
      bus.wdata   <= '0;
      aw_done     <= 1'b0;
      w_done      <= 1'b0;
      op_done     <= 1'b0;
      op_rdata    <= '0;
      op_resp     <= RESP_OKAY;
    end else begin
      op_done <= 1'b0;
      unique case (a_state)
        A_IDLE: if (op_start) begin
          if (op_we) begin
            bus.awaddr  <= op_addr;
            bus.wdata   <= op_wdata;
            bus.awvalid <= 1'b1;
            bus.wvalid  <= 1'b1;
            aw_done     <= 1'b0;
            w_done      <= 1'b0;
            a_state     <= A_WADDR;
          end else begin
            bus.araddr  <= op_addr;
            bus.arvalid <= 1'b1;
            a_state     <= A_RADDR;
          end
        end
        A_WADDR: begin
          if (bus.awvalid && bus.awready) begin bus.awvalid <= 1'b0; aw_done <= 1'b1; end
          if (bus.wvalid  && bus.wready)  begin bus.wvalid  <= 1'b0; w_done  <= 1'b1; end
          if ((aw_done || (bus.awvalid && bus.awready)) &&
              (w_done  || (bus.wvalid  && bus.wready))) begin
            bus.bready <= 1'b1;
            a_state    <= A_WRESP;
          end
        end
        A_WRESP: if (bus.bvalid) begin
          bus.bready <= 1'b0;
          op_resp    <= bus.bresp;
          op_rdata   <= '0;
          op_done    <= 1'b1;
          a_state    <= A_IDLE;
        end
        A_RADDR: if (bus.arready) begin
          bus.arvalid <= 1'b0;
          bus.rready  <= 1'b1;
          a_state     <= A_RDATA;
        end
        A_RDATA: if (bus.rvalid) begin
          bus.rready <= 1'b0;
          op_resp    <= bus.rresp;
          op_rdata   <= bus.rdata;
          op_done    <= 1'b1;
          a_state    <= A_IDLE;
        end
        default: a_state <= A_IDLE;
      endcase
    end
  end

  // ------------------------------------------------------------ command FSM
  typedef enum logic [3:0] {
    C_POLL_RX,   // read UART status, look for a received byte
    C_WAIT_RXST,
    C_WAIT_RXD,  // read of the received byte in flight
    C_EXEC,      // start the access the command asks for
    C_WAIT_EXEC,
    C_POLL_TX,   // read UART status, wait for a free transmit buffer
    C_WAIT_TXST,
    C_WAIT_TXD   // write of one reply byte in flight
  } cmd_state_e;

  cmd_state_e  c_state;
  logic [7:0]  cmd_q;
  logic [2:0]  nargs_q;     // argument bytes still expected
  logic [47:0] args_q;
  logic [31:0] reply_q;     // reply bytes, most significant first
  logic [2:0]  reply_len_q; // reply bytes still to send
  logic [15:0] stream_q;    // stream words still to send
  logic [31:0] id_q;        // this unit's identifier

  // the address a write or read command names
  logic [15:0] cmd_addr;
  logic        cmd_local;
  assign cmd_addr  = (cmd_q == CMD_WRITE) ? args_q[47:32] : args_q[15:0];
  assign cmd_local = cmd_q != CMD_STREAM && cmd_addr[DCCU_SEL_BIT];

  logic [7:0] rx_byte;
  assign rx_byte = op_rdata[7:0];

  function automatic logic [2:0] arg_count(logic [7:0] c);
    unique case (c)
      CMD_WRITE:  return 3'd6;
      CMD_READ:   return 3'd2;
      CMD_STREAM: return 3'd2;
      default:    return 3'd0;
    endcase
  endfunction

  assign busy_o = (c_state != C_POLL_RX && c_state != C_WAIT_RXST) || nargs_q != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_state     <= C_POLL_RX;
      cmd_q       <= '0;
      nargs_q     <= '0;
      args_q      <= '0;
      reply_q     <= '0;
      reply_len_q <= '0;
      stream_q    <= '0;
      id_q        <= ID_RESET;
      op_start    <= 1'b0;
      op_we       <= 1'b0;
      op_addr     <= '0;
      op_wdata    <= '0;
    end else begin
      op_start <= 1'b0;
      unique case (c_state)
        C_POLL_RX: begin
          op_start <= 1'b1;
          op_we    <= 1'b0;
          op_addr  <= UART_BASE | 16'(UART_REG_STATUS);
          c_state  <= C_WAIT_RXST;
        end
        C_WAIT_RXST: if (op_done) begin
          if (op_rdata[0]) begin
            op_start <= 1'b1;
            op_we    <= 1'b0;
            op_addr  <= UART_BASE | 16'(UART_REG_RXDATA);
            c_state  <= C_WAIT_RXD;
          end else begin
            c_state <= C_POLL_RX;
          end
        end
        C_WAIT_RXD: if (op_done) begin
          if (nargs_q == 0) begin
            // first byte of a command
            cmd_q   <= rx_byte;
            nargs_q <= arg_count(rx_byte);
            if (arg_count(rx_byte) == 0) begin
              reply_q     <= {RSP_UNKNOWN, 24'd0};
              reply_len_q <= 3'd1;
              c_state     <= C_POLL_TX;
            end else begin
              c_state <= C_POLL_RX;
            end
          end else begin
            args_q  <= {args_q[39:0], rx_byte};
            nargs_q <= nargs_q - 1'b1;
            c_state <= (nargs_q == 1) ? C_EXEC : C_POLL_RX;
            if (nargs_q == 1 && cmd_q == CMD_STREAM) stream_q <= {args_q[7:0], rx_byte};
          end
        end
        C_EXEC: begin
          if (cmd_q == CMD_STREAM && stream_q == 0) begin
            c_state <= C_POLL_RX;         // empty or finished stream
          end else if (cmd_local) begin   // own register, no bus access
            if (cmd_q == CMD_WRITE) begin
              if (cmd_addr[7:0] == 8'h00) id_q <= args_q[31:0];
              reply_q     <= {(cmd_addr[7:0] == 8'h00) ? RSP_OK : RSP_ERR, 24'd0};
              reply_len_q <= 3'd1;
            end else begin
              reply_q     <= (cmd_addr[7:0] == 8'h00) ? id_q : 32'd0;
              reply_len_q <= 3'd4;
            end
            c_state <= C_POLL_TX;
          end else begin
            op_start <= 1'b1;
            unique case (cmd_q)
              CMD_WRITE: begin
                op_we    <= 1'b1;
                op_addr  <= args_q[47:32];
                op_wdata <= args_q[31:0];
              end
              CMD_READ: begin
                op_we   <= 1'b0;
                op_addr <= args_q[15:0];
              end
              default: begin              // stream
                op_we   <= 1'b0;
                op_addr <= DUT_BASE | 16'(DUT_REG_OUT_LO);
              end
            endcase
            c_state <= C_WAIT_EXEC;
          end
        end
        C_WAIT_EXEC: if (op_done) begin
          if (cmd_q == CMD_WRITE) begin
            reply_q     <= {(op_resp == RESP_OKAY) ? RSP_OK : RSP_ERR, 24'd0};
            reply_len_q <= 3'd1;
          end else begin
            reply_q     <= op_rdata;
            reply_len_q <= 3'd4;
          end
          if (cmd_q == CMD_STREAM) stream_q <= stream_q - 1'b1;
          c_state <= C_POLL_TX;
        end
        C_POLL_TX: begin
          op_start <= 1'b1;
          op_we    <= 1'b0;
          op_addr  <= UART_BASE | 16'(UART_REG_STATUS);
          c_state  <= C_WAIT_TXST;
        end
        C_WAIT_TXST: if (op_done) begin
          if (op_rdata[1]) begin
            op_start <= 1'b1;
            op_we    <= 1'b1;
            op_addr  <= UART_BASE | 16'(UART_REG_TXDATA);
            op_wdata <= {24'd0, reply_q[31:24]};
            c_state  <= C_WAIT_TXD;
          end else begin
            c_state <= C_POLL_TX;
          end
        end
        C_WAIT_TXD: if (op_done) begin
          reply_q     <= {reply_q[23:0], 8'd0};
          reply_len_q <= reply_len_q - 1'b1;
          if (reply_len_q != 1)          c_state <= C_POLL_TX;
          else if (cmd_q == CMD_STREAM)  c_state <= C_EXEC;
          else                           c_state <= C_POLL_RX;
        end
        default: c_state <= C_POLL_RX;
      endcase
    end
  end

endmodule
