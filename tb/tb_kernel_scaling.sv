// tb_kernel_scaling: the kernel built with 8 cores, the core count at which
// the original work projected that the FPGA overtakes both reference CPUs
// on 10-character passwords (8 x 45 = 360 passwords/s at 70 MHz). One call
// hashes eight 10-character passwords with 16-byte salts at 5000 rounds.
// Checks: all eight hashes against the reference model; all eight cores
// busy at the same time; the call taking no more than the slowest core's
// busy time plus 3000 cycles of memory transfers (so throughput grows
// linearly with the core count); and at least 360 passwords/s at 70 MHz.
`timescale 1ns/1ps
module tb_kernel_scaling;
  import kernel_pkg::*;
  import sha512_ref_pkg::*;

  localparam int N = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic interrupt;
  int checks = 0, failures = 0;
  int all_busy = 0, max_busy = 0;
  int busy_len [N];

  always #5 clk = ~clk;

  axil_host_if host (clk);

  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0] wstrb;

  kernel_sha512crypt_dual #(.N_CORES(N)) dut (
    .ap_clk(clk), .ap_rst_n(rst_n),
    .s_axi_control_awaddr(host.awaddr), .s_axi_control_awvalid(host.awvalid),
    .s_axi_control_awready(host.awready), .s_axi_control_wdata(host.wdata),
    .s_axi_control_wstrb(host.wstrb), .s_axi_control_wvalid(host.wvalid),
    .s_axi_control_wready(host.wready), .s_axi_control_bresp(host.bresp),
    .s_axi_control_bvalid(host.bvalid), .s_axi_control_bready(host.bready),
    .s_axi_control_araddr(host.araddr), .s_axi_control_arvalid(host.arvalid),
    .s_axi_control_arready(host.arready), .s_axi_control_rdata(host.rdata),
    .s_axi_control_rresp(host.rresp), .s_axi_control_rvalid(host.rvalid),
    .s_axi_control_rready(host.rready),
    .m_axi_gmem_awaddr(awaddr), .m_axi_gmem_awlen(awlen), .m_axi_gmem_awsize(awsize),
    .m_axi_gmem_awburst(awburst), .m_axi_gmem_awvalid(awvalid), .m_axi_gmem_awready(awready),
    .m_axi_gmem_wdata(wdata), .m_axi_gmem_wstrb(wstrb), .m_axi_gmem_wlast(wlast),
    .m_axi_gmem_wvalid(wvalid), .m_axi_gmem_wready(wready), .m_axi_gmem_bresp(bresp),
    .m_axi_gmem_bvalid(bvalid), .m_axi_gmem_bready(bready), .m_axi_gmem_araddr(araddr),
    .m_axi_gmem_arlen(arlen), .m_axi_gmem_arsize(arsize), .m_axi_gmem_arburst(arburst),
    .m_axi_gmem_arvalid(arvalid), .m_axi_gmem_arready(arready), .m_axi_gmem_rdata(rdata),
    .m_axi_gmem_rresp(rresp), .m_axi_gmem_rlast(rlast), .m_axi_gmem_rvalid(rvalid),
    .m_axi_gmem_rready(rready),
    .interrupt(interrupt));

  axi_mem_model #(.WORDS(4096)) mem (
    .clk, .rst_n, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready,
    .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready);

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.core_busy == '1) all_busy <= all_busy + 1;
    for (int c = 0; c < N; c++)
      if (dut.core_busy[c]) busy_len[c] <= busy_len[c] + 1;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bq_t p [N];
    bq_t s [N];
    int cyc;
    real rate;
    for (int c = 0; c < N; c++) begin
      busy_len[c] = 0;
      for (int i = 0; i < 10; i++) p[c].push_back(8'($urandom_range(126, 33)));
      for (int i = 0; i < 16; i++) s[c].push_back(8'($urandom_range(126, 33)));
      mem.mem[c * 32] = 10;
      mem.mem[c * 32 + 1] = 16;
      for (int k = 0; k < 64; k++)
        mem.mem[c * 32 + 2 + k / 4][8 * (k % 4) +: 8] = (k < 10) ? p[c][k] : 8'd0;
      for (int k = 0; k < 16; k++)
        mem.mem[c * 32 + 18 + k / 4][8 * (k % 4) +: 8] = s[c][k];
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    host.write(REG_GIE, 32'h1);
    host.write(REG_IER, 32'h1);
    host.write(REG_IN_ADDR, 32'd0);
    host.write(REG_OUT_ADDR, 32'd8192);
    host.write(REG_AP_CTRL, 32'h1);
    cyc = 0;
    while (!interrupt) begin @(negedge clk); cyc++; end
    for (int c = 0; c < N; c++) begin
      logic [511:0] h;
      for (int k = 0; k < 64; k++)
        h[511 - 8 * k -: 8] = mem.mem[2048 + c * 16 + k / 4][8 * (k % 4) +: 8];
      check($sformatf("core %0d hash", c), h === sha512crypt_ref(p[c], s[c], 5000));
      if (busy_len[c] > max_busy) max_busy = busy_len[c];
    end
    rate = real'(N) * 70.0e6 / real'(cyc);
    $display("%0d cores: %0d cycles per call (slowest core busy %0d), %0.1f passwords/s at 70 MHz",
             N, cyc, max_busy, rate);
    check("all cores ran in parallel", all_busy > 0);
    check("call time = slowest core + transfers", cyc - max_busy < 3000);
    check("rate >= 360 passwords/s", rate >= 360.0);
    check("memory protocol", mem.protocol_errors == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
