// uart_tx: serial transmitter of the test platform's UART, 8 data bits, no
// parity, one stop bit, least significant bit first.
//
// A byte offered with valid_i while ready_o is high is accepted; the start
// bit goes out on the next clock edge, followed by the eight data bits and
// the stop bit, each held for DIV clocks, so a byte takes 10*DIV cycles.
// ready_o returns high when the stop bit has been held its full time. The
// line idles high. Frame format and divisor (125 MHz / 115200 baud) are this
// design's choice.
module uart_tx #(
  parameter int unsigned DIV = 1085
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] data_i,
  input  logic       valid_i,
  output logic       ready_o,
  output logic       txd_o
);

  logic                   busy;
  logic [8:0]             shreg;      // data bits then the stop bit
  logic [3:0]             bits_left;  // bits still to put on the line
  logic [$clog2(DIV)-1:0] cnt;

  assign ready_o = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      shreg     <= '1;
      bits_left <= '0;
      cnt       <= '0;
      txd_o     <= 1'b1;
    end else if (!busy) begin
      if (valid_i) begin
        busy      <= 1'b1;
        shreg     <= {1'b1, data_i};
        bits_left <= 4'd9;
        cnt       <= ($clog2(DIV))'(DIV - 1);
        txd_o     <= 1'b0;                      // start bit
      end
    end else if (cnt != 0) begin
      cnt <= cnt - 1'b1;
    end else if (bits_left == 0) begin
      busy <= 1'b0;                             // stop bit done
    end else begin
      txd_o     <= shreg[0];
      shreg     <= {1'b1, shreg[8:1]};
      bits_left <= bits_left - 1'b1;
      cnt       <= ($clog2(DIV))'(DIV - 1);
    end
  end

endmodule
