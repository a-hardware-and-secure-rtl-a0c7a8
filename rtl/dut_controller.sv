// dut_controller: the device under test of the platform, the chaotic-iteration
// generator with its strategy generators, behind an AXI4-Lite slave port.
//
// Holds the strategy generators (LFSR113, Taus88, xorshift128+), the
// strategy shaper (generalized, unary or parallel iterations) and the
// generator core. One step of the core consumes one strategy word from the
// selected generator(s), which step in the same cycle. Steps happen every
// clock while CTRL.run is set (one N-bit output per cycle), and otherwise
// once per read of OUT_LO, so consecutive reads return consecutive outputs.
//
// Registers (byte offsets):
//   0x00 ID       read/write identifier
//   0x04 CTRL     [1:0] iteration mode, [3:2] strategy source, [4] run
//   0x08 SEED_LO  seed x^0 bits 31:0;  0x0C SEED_HI bits 63:32 (N = 64)
//   0x10 SSEED    seed for the strategy generators
//   0x14 CMD      write-only: [0] load x^0 into the core, [1] reseed strategies
//   0x18 OUT_LO   current output bits 31:0; the read also steps the core
//   0x1C OUT_HI   bits 63:32 of the output returned by the last OUT_LO read
//   0x20 COUNT    outputs produced since reset (wraps)
// Strategy sources: 0 LFSR113, 1 Taus88, 2 {Taus88, LFSR113}, 3 xorshift128+;
// the word is cut to N bits, and a 32-bit source feeding a 64-bit core is
// repeated in both halves. The units, their roles and the strategy generators
// follow the platform's description; the register map, these encodings and
// the step-on-read rule are this design's choices. The unit answers one cycle
// after an address is accepted; unknown offsets answer SLVERR.
//
// PERMUTE and OUT_EVERY select the lighter generator form (no permutation,
// one output per OUT_EVERY iterations, see gciprng_core). A read of OUT_LO
// then starts OUT_EVERY steps, and further reads wait until they are done.
module dut_controller #(
  parameter int unsigned N         = 32,
  parameter bit          PERMUTE   = 1'b1,
  parameter int unsigned OUT_EVERY = 1,
  parameter logic [31:0] ID_RESET  = gci_pkg::DUT_ID_RESET
) (
  input  logic         clk,
  input  logic         rst_n,
  axil_if.slave        bus,
  output logic [N-1:0] rnd_o,     // generator output, as on the "chaotic output"
  output logic         valid_o    // rnd_o is a fresh output this cycle
);
  import gci_pkg::*;

  logic [31:0] id_q, sseed_q, count_q, out_hi_q;
  logic [63:0] seed_q;
  gci_mode_e   mode_q;
  strat_sel_e  sel_q;
  logic        run_q;
  logic        load_core, load_strat;
  logic [7:0]  pend_q;      // steps still owed to the last OUT_LO read

  // ------------------------------------------------------------ strategies
  logic [31:0] r_lfsr, r_taus;
  logic [63:0] r_xs;
  logic        step, st_lfsr, st_taus, st_xs;
  logic [63:0] s_raw64;
  logic [N-1:0] s_raw, s_shaped;

  always_comb begin
    st_lfsr = step && (sel_q == STRAT_LFSR113 || sel_q == STRAT_TAUS_LFSR);
    st_taus = step && (sel_q == STRAT_TAUS88  || sel_q == STRAT_TAUS_LFSR);
    st_xs   = step && (sel_q == STRAT_XORSHIFT128);
    unique case (sel_q)
      STRAT_LFSR113:   s_raw64 = {r_lfsr, r_lfsr};
      STRAT_TAUS88:    s_raw64 = {r_taus, r_taus};
      STRAT_TAUS_LFSR: s_raw64 = {r_taus, r_lfsr};
      default:         s_raw64 = r_xs;
    endcase
    s_raw = s_raw64[N-1:0];
  end

  lfsr113 u_lfsr113 (.clk, .rst_n, .load_i(load_strat), .seed_i(sseed_q),
                     .step_i(st_lfsr), .rnd_o(r_lfsr));
  taus88  u_taus88  (.clk, .rst_n, .load_i(load_strat), .seed_i(sseed_q),
                     .step_i(st_taus), .rnd_o(r_taus));
  xorshift128p u_xs (.clk, .rst_n, .load_i(load_strat), .seed_i(sseed_q),
                     .step_i(st_xs), .rnd_o(r_xs));

  strategy_mode #(.N(N)) u_mode (.mode_i(mode_q), .s_i(s_raw), .s_o(s_shaped));

  // ------------------------------------------------------------ generator
  logic [N-1:0] state_unused;
  gciprng_core #(.N(N), .PERMUTE(PERMUTE), .OUT_EVERY(OUT_EVERY)) u_core (
    .clk, .rst_n,
    .load_i  (load_core),
    .seed_i  (seed_q[N-1:0]),
    .step_i  (step),
    .s_i     (s_shaped),
    .rnd_o,
    .valid_o,
    .state_o (state_unused)
  );

  // ------------------------------------------------------------ AXI slave
  logic       wr_go, rd_go, rd_out;
  logic [7:0] waddr, raddr;
  assign wr_go  = bus.awvalid && bus.wvalid && !bus.bvalid;
  assign rd_go  = bus.arvalid && !bus.rvalid && pend_q == 0;
  assign waddr  = bus.awaddr[7:0];
  assign raddr  = bus.araddr[7:0];
  assign rd_out = rd_go && raddr == DUT_REG_OUT_LO;

  assign bus.awready = wr_go;
  assign bus.wready  = wr_go;
  assign bus.arready = rd_go;

  assign load_core  = wr_go && waddr == DUT_REG_CMD && bus.wdata[0];
  assign load_strat = wr_go && waddr == DUT_REG_CMD && bus.wdata[1];
  assign step       = (run_q || rd_out || pend_q != 0) && !load_core;

  logic [63:0] rnd64;
  assign rnd64 = 64'(rnd_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_q     <= ID_RESET;
      mode_q   <= MODE_GENERALIZED;
      sel_q    <= STRAT_LFSR113;
      run_q    <= 1'b0;
      seed_q   <= '0;
      sseed_q  <= '0;
      count_q  <= '0;
      out_hi_q <= '0;
      pend_q   <= '0;
      bus.bvalid <= 1'b0;
      bus.bresp  <= RESP_OKAY;
      bus.rvalid <= 1'b0;
      bus.rresp  <= RESP_OKAY;
      bus.rdata  <= '0;
    end else begin
      if (valid_o) count_q <= count_q + 1'b1;
      if (rd_out)                    pend_q <= 8'(OUT_EVERY - 1);
      else if (step && pend_q != 0)  pend_q <= pend_q - 1'b1;

      if (bus.bvalid && bus.bready) bus.bvalid <= 1'b0;
      if (wr_go) begin
        bus.bvalid <= 1'b1;
        bus.bresp  <= RESP_OKAY;
        unique case (waddr)
          DUT_REG_ID:      id_q <= bus.wdata;
          DUT_REG_CTRL: begin
            mode_q <= gci_mode_e'(bus.wdata[1:0]);
            sel_q  <= strat_sel_e'(bus.wdata[3:2]);
            run_q  <= bus.wdata[4];
          end
          DUT_REG_SEED_LO: seed_q[31:0]  <= bus.wdata;
          DUT_REG_SEED_HI: seed_q[63:32] <= bus.wdata;
          DUT_REG_SSEED:   sseed_q <= bus.wdata;
          DUT_REG_CMD:     ;
          default:         bus.bresp <= RESP_SLVERR;
        endcase
      end

      if (bus.rvalid && bus.rready) bus.rvalid <= 1'b0;
      if (rd_go) begin
        bus.rvalid <= 1'b1;
        bus.rresp  <= RESP_OKAY;
        bus.rdata  <= '0;
        unique case (raddr)
          DUT_REG_ID:      bus.rdata <= id_q;
          DUT_REG_CTRL:    bus.rdata <= {27'd0, run_q, sel_q, mode_q};
          DUT_REG_SEED_LO: bus.rdata <= seed_q[31:0];
          DUT_REG_SEED_HI: bus.rdata <= seed_q[63:32];
          DUT_REG_SSEED:   bus.rdata <= sseed_q;
          DUT_REG_OUT_LO: begin
            bus.rdata <= rnd64[31:0];
            out_hi_q  <= rnd64[63:32];
          end
          DUT_REG_OUT_HI:  bus.rdata <= out_hi_q;
          DUT_REG_COUNT:   bus.rdata <= count_q;
          default:         bus.rresp <= RESP_SLVERR;
        endcase
      end
    end
  end

  initial begin
    assert (N == 32 || N == 64) else $error("dut_controller: N must be 32 or 64");
  end

endmodule
