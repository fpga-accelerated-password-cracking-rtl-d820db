// tb_length_sweep: the password-length experiment on one sha512crypt core:
// a random password of every length from 1 to 64 characters, each with a
// random 16-byte salt, hashed at 5000 rounds. Every hash is compared with
// the reference model and every cycle count with the sequencer's timing
// model. The speed at a 70 MHz clock is printed per length for one core and
// for two. Checks on the shape of the curve: speed never rises by more than
// the 0.3 % that A[0] can cause as the password grows, and the largest single
// drop is between 15 and 16 characters, where the round messages first need
// two SHA-512 blocks.
`timescale 1ns/1ps
module tb_length_sweep;
  import sha512_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] pw [64];
  logic [7:0] salt [16];
  logic [6:0] pw_len = '0;
  logic [4:0] salt_len = '0;
  logic [31:0] rounds = 32'd5000;
  logic busy, done;
  logic [511:0] hash;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha512crypt_core dut (.clk, .rst_n, .start, .pw, .pw_len, .salt, .salt_len,
                        .rounds, .busy, .done, .hash);

  initial begin
    repeat (120000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bq_t p, s;
    int cyc, a0, biggest_drop_at;
    real rate, prev_rate, drop, biggest_drop;
    logic [511:0] a;
    biggest_drop = 0.0; biggest_drop_at = 0; prev_rate = 0.0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int len = 1; len <= 64; len++) begin
      p = {}; s = {};
      for (int i = 0; i < 64; i++) begin
        pw[i] = 8'($urandom_range(126, 33));
        if (i < len) p.push_back(pw[i]);
      end
      for (int i = 0; i < 16; i++) begin
        salt[i] = 8'($urandom_range(126, 33));
        s.push_back(salt[i]);
      end
      pw_len = 7'(len);
      salt_len = 5'd16;
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (hash !== sha512crypt_ref(p, s, 5000)) begin
        failures++; $display("FAIL hash at length %0d", len);
      end
      a = sha512crypt_ref(p, s, 0);
      a0 = int'(a[511:504]);
      checks++;
      if (cyc != sha512crypt_cycles(len, 16, a0, 5000)) begin
        failures++; $display("FAIL cycles at length %0d: %0d", len, cyc);
      end
      rate = 70.0e6 / real'(cyc);
      $display("length %2d: %0d cycles, %0.1f passwords/s (one core), %0.1f (two cores) at 70 MHz",
               len, cyc, rate, 2.0 * rate);
      if (len > 1) begin
        checks++;
        if (rate > prev_rate * 1.003) begin
          failures++; $display("FAIL speed rises at length %0d", len);
        end
        drop = prev_rate - rate;
        if (drop > biggest_drop) begin biggest_drop = drop; biggest_drop_at = len; end
      end
      prev_rate = rate;
    end
    checks++;
    if (biggest_drop_at != 16) begin
      failures++; $display("FAIL largest drop at length %0d", biggest_drop_at);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
