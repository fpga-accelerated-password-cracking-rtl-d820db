// tb_axil_ctrl_regs: checks the control-register slave on its own. Covers
// reset values (ROUNDS = 5000), write/read-back of the address and round
// registers with all three channel orders and with byte strobes, ap_start
// being set by the host and cleared by ap_ready, the done bit being set by
// ap_done and cleared by a read, the ISR/GIE/IER interrupt logic with
// write-1-to-clear, ap_idle read-back, and the sticky bus-error bit.
`timescale 1ns/1ps
module tb_axil_ctrl_regs;
  import kernel_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic ap_start, ap_ready = 1'b0, ap_done = 1'b0, ap_idle = 1'b1, bus_err = 1'b0;
  logic [31:0] in_addr, out_addr, rounds;
  logic interrupt;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  axil_host_if host (clk);

  axil_ctrl_regs dut (
    .clk, .rst_n,
    .s_axi_awaddr(host.awaddr), .s_axi_awvalid(host.awvalid), .s_axi_awready(host.awready),
    .s_axi_wdata(host.wdata), .s_axi_wstrb(host.wstrb), .s_axi_wvalid(host.wvalid),
    .s_axi_wready(host.wready), .s_axi_bresp(host.bresp), .s_axi_bvalid(host.bvalid),
    .s_axi_bready(host.bready), .s_axi_araddr(host.araddr), .s_axi_arvalid(host.arvalid),
    .s_axi_arready(host.arready), .s_axi_rdata(host.rdata), .s_axi_rresp(host.rresp),
    .s_axi_rvalid(host.rvalid), .s_axi_rready(host.rready),
    .ap_start, .ap_ready, .ap_done, .ap_idle, .bus_err, .in_addr, .out_addr, .rounds,
    .interrupt);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic pulse(ref logic sig);
    @(negedge clk) sig = 1'b1;
    @(negedge clk) sig = 1'b0;
  endtask

  initial begin
    logic [31:0] d, v;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    host.read(REG_ROUNDS, d);   expect_eq("rounds reset", d, 32'd5000);
    expect_eq("rounds port reset", rounds, 32'd5000);
    host.read(REG_AP_CTRL, d);  expect_eq("ap_ctrl reset", d, 32'h4);
    for (int k = 0; k < 9; k++) begin
      v = $urandom;
      host.write(REG_IN_ADDR, v, 4'hF, k % 3);
      host.read(REG_IN_ADDR, d); expect_eq("in_addr", d, v);
      expect_eq("in_addr port", in_addr, v);
      host.write(REG_OUT_ADDR, ~v, 4'hF, (k + 1) % 3);
      host.read(REG_OUT_ADDR, d); expect_eq("out_addr", d, ~v);
      expect_eq("out_addr port", out_addr, ~v);
    end
    host.write(REG_ROUNDS, 32'h1234_5678);
    host.write(REG_ROUNDS, 32'hAABB_CCDD, 4'b0101);
    host.read(REG_ROUNDS, d); expect_eq("rounds strobes", d, 32'h12BB_56DD);
    host.read(6'h3C, d); expect_eq("unmapped", d, 32'h0);
    // start handshake
    host.write(REG_AP_CTRL, 32'h1);
    expect_eq("ap_start set", 32'(ap_start), 32'd1);
    ap_idle = 1'b0;
    pulse(ap_ready);
    expect_eq("ap_start cleared", 32'(ap_start), 32'd0);
    host.read(REG_AP_CTRL, d); expect_eq("busy status", d, 32'h0);
    // done without interrupt enabled
    pulse(ap_done);
    ap_idle = 1'b1;
    expect_eq("no irq without enable", 32'(interrupt), 32'd0);
    host.read(REG_AP_CTRL, d); expect_eq("done set", d, 32'h6);
    host.read(REG_AP_CTRL, d); expect_eq("done cleared on read", d, 32'h4);
    host.read(REG_ISR, d); expect_eq("isr stays clear", d, 32'h0);
    // with interrupts
    host.write(REG_GIE, 32'h1);
    host.write(REG_IER, 32'h1);
    pulse(ap_done);
    @(negedge clk);
    expect_eq("irq raised", 32'(interrupt), 32'd1);
    host.read(REG_ISR, d); expect_eq("isr set", d, 32'h1);
    host.write(REG_GIE, 32'h0);
    expect_eq("irq masked by gie", 32'(interrupt), 32'd0);
    host.write(REG_GIE, 32'h1);
    expect_eq("irq back", 32'(interrupt), 32'd1);
    host.write(REG_ISR, 32'h1);
    expect_eq("irq cleared", 32'(interrupt), 32'd0);
    host.read(REG_ISR, d); expect_eq("isr cleared", d, 32'h0);
    // bus error bit
    host.read(REG_STATUS, d); expect_eq("status clear", d, 32'h0);
    pulse(bus_err);
    host.read(REG_STATUS, d); expect_eq("status error", d, 32'h1);
    host.read(REG_STATUS, d); expect_eq("status sticky", d, 32'h1);
    host.write(REG_STATUS, 32'h1);
    host.read(REG_STATUS, d); expect_eq("status w1c", d, 32'h0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
