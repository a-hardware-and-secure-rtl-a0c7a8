// tb_gci_permutation: checks the 32-bit and the 64-bit output permutation
// against reference models with the shift amounts and multipliers written
// out, on edge values and random words; also checks that 32-bit outputs of
// distinct inputs differ over a small input range (injectivity sample).
module tb_gci_permutation;
  import gci_ref_pkg::*;

  logic [31:0] x32, y32;
  logic [63:0] x64, y64;
  int checks = 0, failures = 0;

  gci_permutation #(.N(32)) dut32 (.x_i(x32), .y_o(y32));
  gci_permutation #(.N(64)) dut64 (.x_i(x64), .y_o(y64));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(logic [31:0] v);
    x32 = v; #1;
    checks++;
    if (y32 !== perm32(v)) begin
      failures++;
      if (failures < 10) $display("FAIL32 x=%h got %h exp %h", v, y32, perm32(v));
    end
  endtask

  task automatic check64(logic [63:0] v);
    x64 = v; #1;
    checks++;
    if (y64 !== perm64(v)) begin
      failures++;
      if (failures < 10) $display("FAIL64 x=%h got %h exp %h", v, y64, perm64(v));
    end
  endtask

  logic [31:0] seen [logic [31:0]];

  initial begin
    check32(32'h0); check32(32'hFFFF_FFFF); check32(32'h8000_0000); check32(32'h0000_0001);
    check32(32'hF000_0000); check32(32'h0FFF_FFFF);
    check64(64'h0); check64('1); check64(64'h8000_0000_0000_0000); check64(64'h1);
    for (int i = 0; i < 16; i++) begin
      check32({4'(i), 28'h5A5_A5A5});
    end
    for (int i = 0; i < 20000; i++) begin
      check32($urandom);
      check64({$urandom, $urandom});
    end
    // no two of 4096 consecutive inputs map to the same output
    for (int i = 0; i < 4096; i++) begin
      x32 = 32'h1234_0000 + 32'(i); #1;
      checks++;
      if (seen.exists(y32)) failures++;
      seen[y32] = x32;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
