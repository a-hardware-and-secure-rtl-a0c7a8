// tb_gci_block: checks one 8-bit negation lane against a bit-by-bit model,
// exhaustively over all 65536 (state, strategy) pairs.
module tb_gci_block;
  import gci_ref_pkg::*;

  logic [7:0] x, s, y;
  int checks = 0, failures = 0;

  gci_block dut (.x_i(x), .s_i(s), .x_o(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        logic [63:0] exp64;
        x = 8'(a);
        s = 8'(b);
        #1;
        exp64 = gci_ng(64'(x), 64'(s));
        checks++;
        if (y !== exp64[7:0]) begin
          failures++;
          if (failures < 10) $display("FAIL x=%h s=%h got %h exp %h", x, s, y, exp64[7:0]);
        end
      end
    end
    // s = 0 keeps the lane, s = ff negates it
    x = 8'h5A; s = 8'h00; #1; checks++; if (y !== 8'h5A) failures++;
    x = 8'h05; s = 8'hFF; #1; checks++; if (y !== 8'hFA) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
