// axil_interconnect: joins the platform's single AXI4-Lite master (the
// decoder command controller) to its two slaves (the DUT controller and the
// UART).
//
// Address bit SEL_BIT picks the slave: 0 selects slave 0 (DUT controller at
// 0x0000), 1 selects slave 1 (UART at 0x1000). Write address and data go to
// the selected slave only; responses are merged back to the master. The
// master keeps at most one transaction in flight per direction, which is
// what lets the response paths be merged without tracking an identifier; an
// assertion checks that two slaves never answer at once. Purely
// combinational. The address map is this design's choice.
module axil_interconnect #(
  parameter int unsigned SEL_BIT = gci_pkg::SLAVE_SEL_BIT
) (
  axil_if.slave  m,
  axil_if.master s0,
  axil_if.master s1
);

  logic wsel, rsel;
  assign wsel = m.awaddr[SEL_BIT];
  assign rsel = m.araddr[SEL_BIT];

  always_comb begin
    // write address and data
    s0.awaddr  = m.awaddr;
    s1.awaddr  = m.awaddr;
    s0.wdata   = m.wdata;
    s1.wdata   = m.wdata;
    s0.awvalid = m.awvalid && !wsel;
    s1.awvalid = m.awvalid &&  wsel;
    s0.wvalid  = m.wvalid  && !wsel;
    s1.wvalid  = m.wvalid  &&  wsel;
    m.awready  = wsel ? s1.awready : s0.awready;
    m.wready   = wsel ? s1.wready  : s0.wready;
    // write response
    m.bvalid   = s0.bvalid || s1.bvalid;
    m.bresp    = s1.bvalid ? s1.bresp : s0.bresp;
    s0.bready  = m.bready;
    s1.bready  = m.bready;
    // read address
    s0.araddr  = m.araddr;
    s1.araddr  = m.araddr;
    s0.arvalid = m.arvalid && !rsel;
    s1.arvalid = m.arvalid &&  rsel;
    m.arready  = rsel ? s1.arready : s0.arready;
    // read data
    m.rvalid   = s0.rvalid || s1.rvalid;
    m.rdata    = s1.rvalid ? s1.rdata : s0.rdata;
    m.rresp    = s1.rvalid ? s1.rresp : s0.rresp;
    s0.rready  = m.rready;
    s1.rready  = m.rready;
  end

  a_one_b: assert property (@(posedge m.clk) disable iff (!m.rst_n) !(s0.bvalid && s1.bvalid));
  a_one_r: assert property (@(posedge m.clk) disable iff (!m.rst_n) !(s0.rvalid && s1.rvalid));

endmodule
