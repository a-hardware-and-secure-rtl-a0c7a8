// axil_bfm: AXI4-Lite master for testbenches. write() and read() each run
// one complete transaction (address and data offered together, then the
// response) and return the response code; they count the clock cycles the
// transaction took in last_cycles.
module axil_bfm (
  axil_if.master bus
);
  int last_cycles;

  initial begin
    bus.awvalid = 0; bus.wvalid = 0; bus.bready = 0;
    bus.arvalid = 0; bus.rready = 0;
    bus.awaddr = 0; bus.wdata = 0; bus.araddr = 0;
  end

  task automatic write(input logic [15:0] addr, input logic [31:0] data, output logic [1:0] resp);
    bit aw_ok, w_ok;
    aw_ok = 0; w_ok = 0; last_cycles = 0;
    @(negedge bus.clk);
    bus.awaddr = addr; bus.awvalid = 1;
    bus.wdata = data;  bus.wvalid = 1;
    while (!(aw_ok && w_ok)) begin
      @(posedge bus.clk);
      last_cycles++;
      if (bus.awready) aw_ok = 1;
      if (bus.wready)  w_ok = 1;
      @(negedge bus.clk);
      if (aw_ok) bus.awvalid = 0;
      if (w_ok)  bus.wvalid = 0;
    end
    bus.bready = 1;
    do begin
      @(posedge bus.clk);
      last_cycles++;
    end while (!bus.bvalid);
    resp = bus.bresp;
    @(negedge bus.clk);
    bus.bready = 0;
  endtask

  task automatic read(input logic [15:0] addr, output logic [31:0] data, output logic [1:0] resp);
    bit ar_ok;
    ar_ok = 0; last_cycles = 0;
    @(negedge bus.clk);
    bus.araddr = addr; bus.arvalid = 1;
    while (!ar_ok) begin
      @(posedge bus.clk);
      last_cycles++;
      if (bus.arready) ar_ok = 1;
      @(negedge bus.clk);
      if (ar_ok) bus.arvalid = 0;
    end
    bus.rready = 1;
    do begin
      @(posedge bus.clk);
      last_cycles++;
    end while (!bus.rvalid);
    data = bus.rdata;
    resp = bus.rresp;
    @(negedge bus.clk);
    bus.rready = 0;
  endtask
endmodule
