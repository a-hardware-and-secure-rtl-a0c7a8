// axil_if: AXI4-Lite bundle joining the units of the test platform.
//
// Five channels (write address, write data, write response, read address,
// read data) with the usual valid/ready handshakes. The master modport drives
// addresses, write data and the ready of the response channels; the slave
// modport the reverse. Strobes and protection bits are left out: every access
// is a full 32-bit word. The assertions check the AXI rule that a valid,
// once raised, stays high with its payload stable until the handshake.
interface axil_if #(
  parameter int unsigned AW = gci_pkg::AXI_AW,
  parameter int unsigned DW = gci_pkg::AXI_DW
) (
  input logic clk,
  input logic rst_n
);
  logic [AW-1:0] awaddr;
  logic          awvalid, awready;
  logic [DW-1:0] wdata;
  logic          wvalid, wready;
  logic [1:0]    bresp;
  logic          bvalid, bready;
  logic [AW-1:0] araddr;
  logic          arvalid, arready;
  logic [DW-1:0] rdata;
  logic [1:0]    rresp;
  logic          rvalid, rready;

  modport master (
    input  clk, rst_n,
    output awaddr, awvalid, wdata, wvalid, bready, araddr, arvalid, rready,
    input  awready, wready, bresp, bvalid, arready, rdata, rresp, rvalid
  );
  modport slave (
    input  clk, rst_n,
    input  awaddr, awvalid, wdata, wvalid, bready, araddr, arvalid, rready,
    output awready, wready, bresp, bvalid, arready, rdata, rresp, rvalid
  );

  // Handshake rules: valid holds, with a stable payload, until ready.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    awvalid && !awready |=> awvalid && $stable(awaddr));
  a_w_hold:  assert property (@(posedge clk) disable iff (!rst_n)
    wvalid && !wready |=> wvalid && $stable(wdata));
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    arvalid && !arready |=> arvalid && $stable(araddr));
  a_b_hold:  assert property (@(posedge clk) disable iff (!rst_n)
    bvalid && !bready |=> bvalid && $stable(bresp));
  a_r_hold:  assert property (@(posedge clk) disable iff (!rst_n)
    rvalid && !rready |=> rvalid && $stable(rdata));

endinterface
