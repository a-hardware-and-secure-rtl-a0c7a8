// tb_xorshift128p: checks the xorshift128+ strategy generator cycle by cycle
// against the published recurrence: reset state, reseeding, stepping and
// holding its output while not stepped.
module tb_xorshift128p;
  import gci_ref_pkg::*;

  logic        clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] seed = 0;
  logic [63:0] rnd;
  int checks = 0, failures = 0;
  xs128_t ref_st, peek;

  xorshift128p dut (.clk, .rst_n, .load_i(load), .seed_i(seed), .step_i(step), .rnd_o(rnd));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [63:0] e;
    peek = ref_st;
    e = xs128_next(peek);
    checks++;
    if (rnd !== e) begin
      failures++;
      if (failures < 10) $display("FAIL t=%0t got %h exp %h", $time, rnd, e);
    end
  endtask

  initial begin
    ref_st = xs128_seed(RESET_SEED);
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    compare();
    for (int i = 0; i < 2000; i++) begin
      step = ($urandom % 4) != 0;
      if (i % 500 == 250) begin
        load = 1; seed = $urandom;
      end else load = 0;
      @(posedge clk);
      #1;
      if (load)      ref_st = xs128_seed(seed);
      else if (step) void'(xs128_next(ref_st));
      @(negedge clk);
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
