// tb_uart_tx: offers random bytes to the transmitter, samples the line in
// the middle of every bit, and checks start bit, data, stop bit, and that
// each byte occupies exactly 10*DIV clock cycles.
module tb_uart_tx;
  localparam int DIV = 16;
  logic clk = 0, rst_n = 0, valid = 0, ready, txd;
  logic [7:0] data = 0;
  int checks = 0, failures = 0;

  uart_tx #(.DIV(DIV)) dut (.clk, .rst_n, .data_i(data), .valid_i(valid), .ready_o(ready), .txd_o(txd));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (txd !== 1'b1 || ready !== 1'b1) failures++;
    for (int n = 0; n < 100; n++) begin
      logic [7:0] b, r;
      int cyc;
      b = 8'($urandom);
      @(negedge clk);
      while (!ready) @(negedge clk);
      data = b; valid = 1;
      @(negedge clk);
      valid = 0;
      // line went low at the accepting edge; sample mid-bit
      repeat (DIV / 2 - 1) @(negedge clk);
      checks++; if (txd !== 1'b0) begin failures++; $display("FAIL start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (DIV) @(negedge clk);
        r[i] = txd;
      end
      repeat (DIV) @(negedge clk);
      checks++; if (txd !== 1'b1) begin failures++; $display("FAIL stop bit"); end
      checks++; if (r !== b) begin failures++; $display("FAIL data %h exp %h", r, b); end
      cyc = DIV / 2 - 1 + 9 * DIV;
      while (!ready) begin @(negedge clk); cyc++; end
      checks++; if (cyc != 10 * DIV) begin failures++; $display("FAIL frame length %0d", cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
