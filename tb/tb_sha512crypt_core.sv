// tb_sha512crypt_core: runs the sha512crypt core on password/salt/round-count
// cases and compares the raw 64-byte result with the reference model and,
// for the standard "Hello world!" / "saltstring" example at 5000 rounds, with
// the known result (its crypt text is $6$saltstring$svn8UoSVapNt...). Cases
// cover empty password and salt, the 64-byte password and 16-byte salt
// maxima, and random ones. For cases with a non-empty password and salt the
// cycle count is compared with the sequencer's timing model: per SHA-512,
// one cycle per message byte and per empty segment, plus 100 per block, plus 4.
`timescale 1ns/1ps
module tb_sha512crypt_core;
  import sha512_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] pw [64];
  logic [7:0] salt [16];
  logic [6:0] pw_len;
  logic [4:0] salt_len;
  logic [31:0] rounds;
  logic busy, done;
  logic [511:0] hash;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha512crypt_core dut (.clk, .rst_n, .start, .pw, .pw_len, .salt, .salt_len,
                        .rounds, .busy, .done, .hash);

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(bq_t p, bq_t s, int r, logic [511:0] expect_hash, bit check_time);
    int cyc, a0;
    logic [511:0] b, a;
    for (int i = 0; i < 64; i++) pw[i] = (i < p.size()) ? p[i] : 8'($urandom);
    for (int i = 0; i < 16; i++) salt[i] = (i < s.size()) ? s[i] : 8'($urandom);
    pw_len = 7'(p.size());
    salt_len = 5'(s.size());
    rounds = r;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (hash !== expect_hash) begin
      failures++;
      $display("FAIL plen=%0d slen=%0d rounds=%0d got %h exp %h", p.size(), s.size(), r, hash, expect_hash);
    end
    if (check_time) begin
      // A[0] decides the DS message length
      b = sha512_ref({p, s, p});
      a = sha512crypt_ref(p, s, 0);
      a0 = int'(a[511:504]);
      checks++;
      if (cyc != sha512crypt_cycles(p.size(), s.size(), a0, r)) begin
        failures++;
        $display("FAIL cycles %0d expected %0d", cyc, sha512crypt_cycles(p.size(), s.size(), a0, r));
      end
    end
  endtask

  initial begin
    bq_t p, s;
    logic [511:0] hello;
    hello = 512'h2b209d0f3abe5abc1b24521555baa2b94d0943dae13e85666e7946e24de2323733cc538877a227437ac5f8ede5986c71a987079aa165ef8a1bda94a5916aceff;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // reference model against known results
    checks++;
    if (sha512crypt_ref(str_bytes("x"), str_bytes("y"), 2) !==
        512'h524602ae583f3907e6192041124f18aef4a87ff5e03d731cef264a11915ba8299673406506068508db77d70005c2162586000655d5bee1ffa6b49241ba39b134) begin
      failures++; $display("FAIL reference model");
    end
    run_case(str_bytes("x"), str_bytes("y"), 2,
             512'h524602ae583f3907e6192041124f18aef4a87ff5e03d731cef264a11915ba8299673406506068508db77d70005c2162586000655d5bee1ffa6b49241ba39b134, 1'b1);
    p = {}; s = {};
    run_case(p, s, 3,
             512'hc9e36370a03f31ba7f9d3bac635e9bc1d3ffe4f6ded980d4a201b7db6a4eb46ff1e715c2413a52ab183eac5f73834e91714d637df1a1ef47ed3156fef61ad8c9, 1'b0);
    run_case(str_bytes("aaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaaa"),
             str_bytes("0123456789abcdef"), 10,
             512'heca73fde2cb9cc9ea96a3e5fc263e2f3d2d1e3cbfe7acc7e4af43875511b9cbc522cc2fb6875fcf09914210a43f49ae02ae270e75b3a0f7bb7e904f13f6adab1, 1'b1);
    for (int n = 0; n < 12; n++) begin
      int r;
      p = {}; s = {};
      for (int i = 0; i < $urandom_range(64, 1); i++) p.push_back(8'($urandom_range(126, 33)));
      for (int i = 0; i < $urandom_range(16, 1); i++) s.push_back(8'($urandom_range(126, 33)));
      r = $urandom_range(22);
      run_case(p, s, r, sha512crypt_ref(p, s, r), 1'b1);
    end
    run_case(str_bytes("Hello world!"), str_bytes("saltstring"), 5000, hello, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
