// kernel_tb_env: the kernel with its surroundings for system-level tests:
// the host's AXI4-Lite port (axil_host_if) and a memory model on the
// kernel's AXI4 master port. Holds the host-side helpers that lay out job
// records in memory and read results back, plus event counters. The kernel
// keeps its default parameters.
`timescale 1ns/1ps
module kernel_tb_env #(
  parameter int MEM_WORDS = 4096,
  parameter int ERR_FROM  = 1 << 30
) (
  input  logic clk,
  input  logic rst_n,
  output logic interrupt,
  output logic [1:0] busy_cores
);
  import kernel_pkg::*;
  import sha512_ref_pkg::*;

  axil_host_if host (clk);

  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0] wstrb;

  kernel_sha512crypt_dual dut (
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

  axi_mem_model #(.WORDS(MEM_WORDS), .ERR_FROM(ERR_FROM)) mem (
    .clk, .rst_n, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready,
    .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready);

  assign busy_cores = {dut.core_busy[1], dut.core_busy[0]};

  // Lay out one job record at byte address `base` (lengths as given, so
  // over-long values can be tried; bytes beyond the queues are random).
  task automatic put_record(int base, bq_t p, bq_t s, int plen, int slen);
    int w;
    w = base / 4;
    mem.mem[w] = plen;
    mem.mem[w + 1] = slen;
    for (int k = 0; k < 64; k++)
      mem.mem[w + 2 + k / 4][8 * (k % 4) +: 8] = (k < p.size()) ? p[k] : 8'($urandom);
    for (int k = 0; k < 16; k++)
      mem.mem[w + 18 + k / 4][8 * (k % 4) +: 8] = (k < s.size()) ? s[k] : 8'($urandom);
  endtask

  function automatic logic [511:0] get_result(int base);
    logic [511:0] r;
    for (int k = 0; k < 64; k++)
      r[511 - 8 * k -: 8] = mem.mem[base / 4 + k / 4][8 * (k % 4) +: 8];
    return r;
  endfunction
endmodule
