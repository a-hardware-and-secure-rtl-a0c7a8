// tb_strategy_mode: checks the generalized, unary and parallel shaping of
// the strategy word for a 32-bit and a 64-bit generator on random words.
module tb_strategy_mode;
  import gci_ref_pkg::*;
  import gci_pkg::*;

  gci_mode_e   mode;
  logic [31:0] s32, o32;
  logic [63:0] s64, o64;
  int checks = 0, failures = 0;

  strategy_mode #(.N(32)) dut32 (.mode_i(mode), .s_i(s32), .s_o(o32));
  strategy_mode #(.N(64)) dut64 (.mode_i(mode), .s_i(s64), .s_o(o64));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [63:0] e32, e64;
      mode = gci_mode_e'(i % 3);
      s32  = $urandom;
      s64  = {$urandom, $urandom};
      #1;
      e32 = shape(i % 3, 64'(s32), 32);
      e64 = shape(i % 3, s64, 64);
      checks += 2;
      if (o32 !== e32[31:0]) begin
        failures++;
        if (failures < 10) $display("FAIL32 mode=%0d s=%h got %h exp %h", i % 3, s32, o32, e32[31:0]);
      end
      if (o64 !== e64) begin
        failures++;
        if (failures < 10) $display("FAIL64 mode=%0d s=%h got %h exp %h", i % 3, s64, o64, e64);
      end
      // unary mode: exactly one updated component per lane
      if (i % 3 == 1) begin
        for (int l = 0; l < 4; l++) begin
          checks++;
          if ($countones(o32[8*l +: 8]) != 1) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
