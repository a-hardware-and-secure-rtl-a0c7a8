// tb_uart_rx: sends random bytes at a small divisor, with varying idle gaps,
// and checks each received byte and its count; also sends one frame with a
// low stop bit and checks it is flagged and dropped.
module tb_uart_rx;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, rxd = 1;
  logic [7:0] data;
  logic valid, ferr;
  int checks = 0, failures = 0, got = 0, errs = 0;
  logic [7:0] q[$];

  uart_rx #(.DIV(DIV)) dut (.clk, .rst_n, .rxd_i(rxd), .data_o(data), .valid_o(valid), .frame_err_o(ferr));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(logic [7:0] b, logic stop);
    rxd = 0; repeat (DIV) @(posedge clk);
    for (int i = 0; i < 8; i++) begin rxd = b[i]; repeat (DIV) @(posedge clk); end
    rxd = stop; repeat (DIV) @(posedge clk);
    rxd = 1;
  endtask

  always @(posedge clk) begin
    if (rst_n && valid) begin
      logic [7:0] e;
      e = q.pop_front();
      checks++; got++;
      if (data !== e) begin failures++; $display("FAIL got %h exp %h n=%0d t=%0t", data, e, got, $time); end
    end
    if (rst_n && ferr) errs++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(posedge clk);
    for (int i = 0; i < 200; i++) begin
      logic [7:0] b;
      b = 8'($urandom);
      q.push_back(b);
      send(b, 1'b1);
      repeat ($urandom % 20) @(posedge clk);
    end
    send(8'hA5, 1'b0);
    repeat (3 * DIV) @(posedge clk);
    checks++; if (got != 200) failures++;
    checks++; if (errs != 1) begin failures++; $display("FAIL frame errors %0d", errs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
