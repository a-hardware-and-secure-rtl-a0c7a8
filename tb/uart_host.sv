// uart_host: serial-line model of the host computer for testbenches.
// send() puts one 8N1 frame on to_dut; a receiver process decodes frames
// from from_dut (sampling mid-bit) into a queue that recv() pops, waiting up
// to a timeout. Commands of the platform are built from these two tasks.
module uart_host #(
  parameter int DIV = 1085
) (
  input  logic clk,
  output logic to_dut,
  input  logic from_dut
);
  logic [7:0] rxq[$];
  int frame_errors = 0;

  initial to_dut = 1'b1;

  task automatic send(input logic [7:0] b);
    @(negedge clk);
    to_dut = 1'b0;
    repeat (DIV) @(negedge clk);
    for (int i = 0; i < 8; i++) begin
      to_dut = b[i];
      repeat (DIV) @(negedge clk);
    end
    to_dut = 1'b1;
    repeat (DIV) @(negedge clk);
  endtask

  // returns 1 and the byte, or 0 after timeout_bytes byte times with nothing
  task automatic recv(output logic [7:0] b, output bit ok, input int timeout_bytes = 40);
    int waited;
    waited = 0;
    while (rxq.size() == 0 && waited < timeout_bytes * 10 * DIV) begin
      @(posedge clk);
      waited++;
    end
    ok = rxq.size() != 0;
    b  = ok ? rxq.pop_front() : 8'h00;
  endtask

  initial begin
    logic [7:0] b;
    @(posedge clk);
    forever begin
      @(negedge from_dut);
      repeat (DIV / 2) @(posedge clk);
      if (from_dut == 1'b0) begin
        for (int i = 0; i < 8; i++) begin
          repeat (DIV) @(posedge clk);
          b[i] = from_dut;
        end
        repeat (DIV) @(posedge clk);
        if (from_dut == 1'b1) rxq.push_back(b);
        else frame_errors++;
      end
    end
  end
endmodule
