// tb_sha512_hasher: loads messages into a message buffer, hashes them with
// the hasher and compares the digest with the reference model. Lengths cover
// the padding corner cases (0, 111, 112, 127, 128, 239, 240) and the
// 4336-byte maximum, plus random lengths. The cycle count from start to done
// must be 100 per block plus 2.
`timescale 1ns/1ps
module tb_sha512_hasher;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic we = 1'b0;
  logic [12:0] waddr = '0, msg_len = '0;
  logic [7:0] wdata = '0;
  logic [9:0] raddr;
  logic [63:0] rdata;
  logic busy, done;
  logic [511:0] digest;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha512_msg_buffer u_buf (.clk, .we, .waddr, .wdata, .raddr, .rdata);
  sha512_hasher dut (.clk, .rst_n, .start, .msg_len, .busy, .done, .digest,
                     .buf_raddr(raddr), .buf_rdata(rdata));

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_len(int n);
    bq_t msg;
    int cyc, nblk;
    for (int i = 0; i < n; i++) msg.push_back(8'($urandom));
    for (int i = 0; i < n; i++) begin
      @(negedge clk); we = 1'b1; waddr = 13'(i); wdata = msg[i];
    end
    @(negedge clk); we = 1'b0; msg_len = 13'(n); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    nblk = (n + 17 + 127) / 128;
    checks++;
    if (digest !== sha512_ref(msg)) begin
      failures++;
      $display("FAIL len=%0d got %h", n, digest);
    end
    checks++;
    if (cyc != 100 * nblk + 2) begin
      failures++;
      $display("FAIL len=%0d cycles %0d expected %0d", n, cyc, 100 * nblk + 2);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_len(0); run_len(1); run_len(111); run_len(112); run_len(127);
    run_len(128); run_len(239); run_len(240); run_len(4336);
    for (int k = 0; k < 12; k++) run_len($urandom_range(600));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
