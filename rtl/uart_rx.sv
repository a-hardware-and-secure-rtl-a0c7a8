// uart_rx: serial receiver of the test platform's UART, 8 data bits, no
// parity, one stop bit, least significant bit first.
//
// The line is sampled once per clock. A falling edge starts a frame; the
// receiver waits half a bit time to the middle of the start bit, checks it is
// still low, then samples the eight data bits and the stop bit one bit time
// (DIV clocks) apart. A good frame raises valid_o for one cycle with the byte
// on data_o; a frame whose stop bit is low is dropped and flags frame_err_o.
// The input is passed through two flip-flops first. The frame format and the
// divisor (125 MHz / 115200 baud) are this design's choice.
module uart_rx #(
  parameter int unsigned DIV = 1085
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rxd_i,
  output logic [7:0] data_o,
  output logic       valid_o,
  output logic       frame_err_o
);

  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_e;

  state_e                 state;
  logic [1:0]             sync;
  logic [$clog2(DIV)-1:0] cnt;
  logic [2:0]             bit_idx;
  logic [7:0]             shreg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      sync        <= 2'b11;
      cnt         <= '0;
      bit_idx     <= '0;
      shreg       <= '0;
      data_o      <= '0;
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
    end else begin
      sync        <= {sync[0], rxd_i};
      valid_o     <= 1'b0;
      frame_err_o <= 1'b0;
      unique case (state)
        S_IDLE: if (!sync[1]) begin
          state <= S_START;
          cnt   <= ($clog2(DIV))'(DIV / 2 - 1);
        end
        S_START: if (cnt == 0) begin
          if (!sync[1]) begin
            state   <= S_DATA;
            cnt     <= ($clog2(DIV))'(DIV - 1);
            bit_idx <= '0;
          end else begin
            state <= S_IDLE;   // glitch, not a start bit
          end
        end else cnt <= cnt - 1'b1;
        S_DATA: if (cnt == 0) begin
          shreg <= {sync[1], shreg[7:1]};
          cnt   <= ($clog2(DIV))'(DIV - 1);
          if (bit_idx == 3'd7) state <= S_STOP;
          bit_idx <= bit_idx + 1'b1;
        end else cnt <= cnt - 1'b1;
        S_STOP: if (cnt == 0) begin
          state <= S_IDLE;
          if (sync[1]) begin
            data_o  <= shreg;
            valid_o <= 1'b1;
          end else begin
            frame_err_o <= 1'b1;
          end
        end else cnt <= cnt - 1'b1;
      endcase
    end
  end

endmodule
