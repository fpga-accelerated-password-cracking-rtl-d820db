// tb_axi_burst_master: drives read and write burst commands of random
// lengths through the AXI4 master into the memory model (which inserts
// random stalls), and checks the read beats (data and index), the words
// written, the done pulse, and the error flag for a burst that the memory
// answers with SLVERR.
`timescale 1ns/1ps
module tb_axi_burst_master;
  logic clk = 1'b0, rst_n = 1'b0;
  logic cmd_valid = 1'b0, cmd_ready, cmd_write = 1'b0;
  logic [31:0] cmd_addr = '0;
  logic [7:0] cmd_len = '0, beat;
  logic rd_valid, done, err;
  logic [31:0] rd_data, wr_data;
  logic [31:0] awaddr, wdata, araddr, rdata;
  logic [7:0] awlen, arlen;
  logic [2:0] awsize, arsize;
  logic [1:0] awburst, arburst, bresp, rresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic arvalid, arready, rlast, rvalid, rready;
  logic [3:0] wstrb;
  int checks = 0, failures = 0;
  logic [31:0] wpat;

  always #5 clk = ~clk;

  assign wr_data = wpat ^ {24'd0, beat};

  axi_burst_master dut (
    .clk, .rst_n, .cmd_valid, .cmd_ready, .cmd_write, .cmd_addr, .cmd_len,
    .beat, .rd_valid, .rd_data, .wr_data, .done, .err,
    .m_axi_awaddr(awaddr), .m_axi_awlen(awlen), .m_axi_awsize(awsize),
    .m_axi_awburst(awburst), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wlast(wlast),
    .m_axi_wvalid(wvalid), .m_axi_wready(wready), .m_axi_bresp(bresp),
    .m_axi_bvalid(bvalid), .m_axi_bready(bready), .m_axi_araddr(araddr),
    .m_axi_arlen(arlen), .m_axi_arsize(arsize), .m_axi_arburst(arburst),
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_rdata(rdata),
    .m_axi_rresp(rresp), .m_axi_rlast(rlast), .m_axi_rvalid(rvalid),
    .m_axi_rready(rready));

  axi_mem_model #(.WORDS(1024), .ERR_FROM(1000)) mem (
    .clk, .rst_n, .awaddr, .awlen, .awsize, .awburst, .awvalid, .awready,
    .wdata, .wstrb, .wlast, .wvalid, .wready, .bresp, .bvalid, .bready,
    .araddr, .arlen, .arsize, .arburst, .arvalid, .arready, .rdata, .rresp,
    .rlast, .rvalid, .rready);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic command(bit wr, int word_addr, int len, output int nbeats, output bit e);
    int next_beat;
    @(negedge clk);
    cmd_valid = 1'b1; cmd_write = wr; cmd_addr = 32'(word_addr * 4); cmd_len = 8'(len - 1);
    while (!cmd_ready) @(negedge clk);
    @(negedge clk) cmd_valid = 1'b0;
    nbeats = 0; next_beat = 0;
    while (!done) begin
      if (rd_valid) begin
        checks++;
        if (rd_data !== mem.mem[word_addr + next_beat] || beat != 8'(next_beat)) begin
          failures++;
          $display("FAIL read beat %0d data %h exp %h", beat, rd_data, mem.mem[word_addr + next_beat]);
        end
        next_beat++;
      end
      @(negedge clk);
    end
    nbeats = next_beat;
    e = err;
  endtask

  initial begin
    int n, a, len;
    bit e;
    for (int i = 0; i < 1024; i++) mem.mem[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      len = $urandom_range(32, 1);
      a = $urandom_range(900);
      if (k % 2 == 0) begin
        command(1'b0, a, len, n, e);
        checks++;
        if (n != len || e) begin failures++; $display("FAIL read burst beats %0d/%0d err %0b", n, len, e); end
      end else begin
        wpat = $urandom;
        command(1'b1, a, len, n, e);
        checks++;
        if (e) begin failures++; $display("FAIL write error"); end
        for (int i = 0; i < len; i++) begin
          checks++;
          if (mem.mem[a + i] !== (wpat ^ 32'(i))) begin
            failures++; $display("FAIL write word %0d", i);
          end
        end
      end
    end
    // error responses
    command(1'b0, 995, 8, n, e);
    checks++; if (!e) begin failures++; $display("FAIL read error not flagged"); end
    command(1'b1, 995, 8, n, e);
    checks++; if (!e) begin failures++; $display("FAIL write error not flagged"); end
    checks++;
    if (mem.protocol_errors != 0) begin failures++; $display("FAIL protocol errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
