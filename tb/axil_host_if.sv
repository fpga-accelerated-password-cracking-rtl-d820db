// axil_host_if: the AXI4-Lite signals between a testbench's host model and
// the kernel's control port, with blocking write/read tasks that play the
// host processor. The write task presents the address and data channels in
// either order or together (chosen by `order`) to exercise the slave.
`timescale 1ns/1ps
interface axil_host_if (input logic clk);
  logic [5:0]  awaddr;
  logic        awvalid = 1'b0;
  logic        awready;
  logic [31:0] wdata;
  logic [3:0]  wstrb;
  logic        wvalid = 1'b0;
  logic        wready;
  logic [1:0]  bresp;
  logic        bvalid;
  logic        bready = 1'b0;
  logic [5:0]  araddr;
  logic        arvalid = 1'b0;
  logic        arready;
  logic [31:0] rdata;
  logic [1:0]  rresp;
  logic        rvalid;
  logic        rready = 1'b0;

  task automatic write(logic [5:0] a, logic [31:0] d, logic [3:0] s = 4'hF, int order = 0);
    bit aw_done, w_done;
    aw_done = 0; w_done = 0;
    @(negedge clk);
    awaddr = a; wdata = d; wstrb = s;
    if (order != 2) awvalid = 1'b1;
    if (order != 1) wvalid = 1'b1;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready) w_done = 1;
      @(negedge clk);
      if (aw_done) awvalid = 1'b0;
      if (w_done) wvalid = 1'b0;
      if (order == 1 && aw_done && !w_done) wvalid = 1'b1;
      if (order == 2 && w_done && !aw_done) awvalid = 1'b1;
    end
    bready = 1'b1;
    do @(posedge clk); while (!bvalid);
    @(negedge clk) bready = 1'b0;
  endtask

  task automatic read(logic [5:0] a, output logic [31:0] d);
    @(negedge clk);
    araddr = a; arvalid = 1'b1;
    do @(posedge clk); while (!arready);
    @(negedge clk) arvalid = 1'b0; rready = 1'b1;
    while (!rvalid) @(negedge clk);
    d = rdata;
    @(posedge clk);
    @(negedge clk) rready = 1'b0;
  endtask
endinterface
