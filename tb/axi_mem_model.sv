// axi_mem_model: behavioural AXI4 slave standing in for the shared DDR
// memory behind the processor's slave port, for the testbenches only.
// 32-bit data, INCR bursts, one transaction per direction at a time, random
// ready/valid gaps. WORDS words of storage, reachable from the testbench as
// `mem`. Bursts touching words at or above ERR_FROM get a SLVERR response.
// It counts bursts and checks WLAST against AWLEN (`protocol_errors`).
`timescale 1ns/1ps
module axi_mem_model #(
  parameter int WORDS    = 4096,
  parameter int ERR_FROM = 1 << 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic        awvalid,
  output logic        awready,
  input  logic [31:0] wdata,
  input  logic [3:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic [31:0] araddr,
  input  logic [7:0]  arlen,
  input  logic [2:0]  arsize,
  input  logic [1:0]  arburst,
  input  logic        arvalid,
  output logic        arready,
  output logic [31:0] rdata,
  output logic [1:0]  rresp,
  output logic        rlast,
  output logic        rvalid,
  input  logic        rready
);
  logic [31:0] mem [WORDS];
  int read_bursts = 0, write_bursts = 0, protocol_errors = 0;

  // read side
  int  r_left, r_addr;
  bit  r_active = 0, r_err;
  // write side
  int  w_left, w_addr;
  bit  w_active = 0, w_err, b_pending = 0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      arready <= 1'b0; rvalid <= 1'b0; rlast <= 1'b0; rdata <= '0; rresp <= '0;
      awready <= 1'b0; wready <= 1'b0; bvalid <= 1'b0; bresp <= '0;
      r_active <= 0; w_active <= 0; b_pending <= 0;
    end else begin
      // ---- read address
      arready <= !r_active && ($urandom_range(3) != 0);
      if (arvalid && arready && !r_active) begin
        r_active <= 1; r_addr = int'(araddr >> 2); r_left = int'(arlen) + 1;
        r_err = (r_addr + r_left > ERR_FROM);
        arready <= 1'b0;
        read_bursts++;
        if (arsize != 3'b010 || arburst != 2'b01) protocol_errors++;
      end
      // ---- read data
      if (rvalid && rready) begin
        rvalid <= 1'b0;
        if (rlast) r_active <= 0;
      end
      if (r_active && (!rvalid || rready) && !(rvalid && rready && rlast) && $urandom_range(3) != 0) begin
        rvalid <= 1'b1;
        rdata  <= mem[r_addr % WORDS];
        rresp  <= r_err ? 2'b10 : 2'b00;
        rlast  <= (r_left == 1);
        r_addr++; r_left--;
        if (r_left < 0) protocol_errors++;
      end
      // ---- write address
      awready <= !w_active && !b_pending && ($urandom_range(3) != 0);
      if (awvalid && awready && !w_active && !b_pending) begin
        w_active <= 1; w_addr = int'(awaddr >> 2); w_left = int'(awlen) + 1;
        w_err = (w_addr + w_left > ERR_FROM);
        awready <= 1'b0;
        write_bursts++;
        if (awsize != 3'b010 || awburst != 2'b01) protocol_errors++;
      end
      // ---- write data
      wready <= w_active && ($urandom_range(3) != 0);
      if (wvalid && wready && w_active) begin
        for (int b = 0; b < 4; b++)
          if (wstrb[b]) mem[w_addr % WORDS][8*b +: 8] <= wdata[8*b +: 8];
        w_addr++; w_left--;
        if (wlast != (w_left == 0)) protocol_errors++;
        if (w_left == 0) begin
          w_active <= 0; b_pending <= 1; wready <= 1'b0;
        end
      end
      // ---- write response
      if (bvalid && bready) begin
        bvalid <= 1'b0;
        b_pending <= 0;
      end else if (b_pending && !bvalid && $urandom_range(1) != 0) begin
        bvalid <= 1'b1;
        bresp  <= w_err ? 2'b10 : 2'b00;
      end
    end
  end
endmodule
