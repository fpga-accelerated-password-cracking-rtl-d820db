// tb_sha512_compress: checks the SHA-512 compression engine on single-block
// messages. Each message (the FIPS "abc" example, then random messages of
// 0..111 bytes) is padded here into one 1024-bit block, compressed from the
// standard initial value, and the result compared with the reference model's
// digest; the "abc" digest is also compared with its published value. The
// start-to-done latency must be 82 cycles, counting the start cycle.
`timescale 1ns/1ps
module tb_sha512_compress;
  import sha512_pkg::*;
  import sha512_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  block_t blk;
  state_t st_in, st_out;
  logic busy, done;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha512_compress dut (.clk, .rst_n, .start, .block_i(blk), .state_i(st_in),
                       .busy, .done, .state_o(st_out));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_msg(bq_t msg, logic [511:0] expect_dig);
    bq_t m;
    logic [511:0] got;
    int cyc;
    m = msg;
    m.push_back(8'h80);
    while (m.size() < 120) m.push_back(8'h00);
    for (int i = 7; i >= 0; i--) m.push_back(8'((64'(msg.size()) * 8) >> (8 * i)));
    for (int t = 0; t < 16; t++)
      for (int b = 0; b < 8; b++) blk[t][63 - 8*b -: 8] = m[t*8 + b];
    st_in = IV;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    for (int i = 0; i < 8; i++) got[511 - 64*i -: 64] = st_out[i];
    checks++;
    if (got !== expect_dig) begin
      failures++;
      $display("FAIL len=%0d got=%h exp=%h", msg.size(), got, expect_dig);
    end
    checks++;
    if (cyc != 82) begin
      failures++;
      $display("FAIL latency %0d, expected 82", cyc);
    end
  endtask

  initial begin
    bq_t msg;
    logic [511:0] abc_known;
    abc_known = 512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // the reference model itself against the published digest
    checks++;
    if (sha512_ref(str_bytes("abc")) !== abc_known) begin
      failures++; $display("FAIL reference model");
    end
    run_msg(str_bytes("abc"), abc_known);
    for (int n = 0; n < 40; n++) begin
      msg = {};
      for (int i = 0; i < ((n == 0) ? 0 : (n == 1) ? 111 : $urandom_range(111)); i++)
        msg.push_back(8'($urandom));
      run_msg(msg, sha512_ref(msg));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
