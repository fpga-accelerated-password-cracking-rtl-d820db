// tb_kernel_sha512crypt_dual: end-to-end test of the kernel as the host
// uses it. Each call: job records for both cores are written into the
// memory model, the host programs IN_ADDR, OUT_ADDR and ROUNDS over
// AXI4-Lite, starts the kernel and waits for completion, by polling the done
// bit or by the interrupt; both hashes are compared with the reference
// sha512crypt model. Round counts are kept small (the round count is a
// register, the kernel's parameters stay at their defaults).
// Mechanisms that must each happen at least once: both cores computing at
// the same time, completion seen by polling, completion seen by interrupt,
// a length field above the maximum being clamped, a memory error response
// flagged in STATUS, and back-to-back calls. The memory model checks the
// burst protocol, and each call must make exactly two read and two write
// bursts.
`timescale 1ns/1ps
module tb_kernel_sha512crypt_dual;
  import kernel_pkg::*;
  import sha512_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic interrupt;
  logic [1:0] busy_cores;
  int checks = 0, failures = 0;
  int n_parallel = 0, n_poll = 0, n_irq = 0, n_clamp = 0, n_buserr = 0, n_calls = 0;

  always #5 clk = ~clk;

  kernel_tb_env #(.MEM_WORDS(4096), .ERR_FROM(3072)) env (.clk, .rst_n, .interrupt, .busy_cores);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (busy_cores == 2'b11) n_parallel <= n_parallel + 1;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // one kernel call with two jobs; returns the hashes read from memory
  task automatic call(bq_t p0, bq_t s0, int pl0, int sl0, bq_t p1, bq_t s1, int pl1, int sl1,
                      int rounds, int in_base, int out_base, bit use_irq,
                      output logic [511:0] h0, output logic [511:0] h1, output int cycles);
    logic [31:0] d;
    env.put_record(in_base, p0, s0, pl0, sl0);
    env.put_record(in_base + REC_STRIDE, p1, s1, pl1, sl1);
    env.host.write(REG_IN_ADDR, 32'(in_base));
    env.host.write(REG_OUT_ADDR, 32'(out_base));
    env.host.write(REG_ROUNDS, 32'(rounds));
    env.host.write(REG_AP_CTRL, 32'h1);
    cycles = 0;
    if (use_irq) begin
      while (!interrupt) begin @(negedge clk); cycles++; end
      env.host.read(REG_AP_CTRL, d);
      check("done bit with interrupt", d[1] == 1'b1);
      env.host.write(REG_ISR, 32'h1);
      check("interrupt cleared", !interrupt);
      n_irq++;
    end else begin
      do begin
        env.host.read(REG_AP_CTRL, d);
        cycles += 4;
      end while (!d[1]);
      env.host.write(REG_ISR, 32'h1);   // an enabled interrupt was raised too
      n_poll++;
    end
    h0 = env.get_result(out_base);
    h1 = env.get_result(out_base + OUT_STRIDE);
    n_calls++;
  endtask

  function automatic bq_t rand_str(int n);
    bq_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom_range(126, 33)));
    return q;
  endfunction

  function automatic bq_t head(bq_t q, int n);
    bq_t r;
    for (int i = 0; i < n && i < q.size(); i++) r.push_back(q[i]);
    return r;
  endfunction

  initial begin
    bq_t p0, s0, p1, s1;
    logic [511:0] h0, h1;
    logic [31:0] d;
    int cyc, r;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    env.host.read(REG_ROUNDS, d);
    check("default rounds 5000", d == 32'd5000);

    // 1: typical 10-character passwords, 16-byte salts, polled
    p0 = rand_str(10); s0 = rand_str(16); p1 = rand_str(10); s1 = rand_str(16);
    call(p0, s0, 10, 16, p1, s1, 10, 16, 7, 0, 1024, 1'b0, h0, h1, cyc);
    check("call1 core0", h0 === sha512crypt_ref(p0, s0, 7));
    check("call1 core1", h1 === sha512crypt_ref(p1, s1, 7));

    // 2: the size limits, with interrupts
    env.host.write(REG_GIE, 32'h1);
    env.host.write(REG_IER, 32'h1);
    p0 = rand_str(64); s0 = rand_str(16); p1 = rand_str(1); s1 = rand_str(1);
    call(p0, s0, 64, 16, p1, s1, 1, 1, 5, 256, 1280, 1'b1, h0, h1, cyc);
    check("call2 core0", h0 === sha512crypt_ref(p0, s0, 5));
    check("call2 core1", h1 === sha512crypt_ref(p1, s1, 5));

    // 3: over-long length fields are clamped to 64 / 16
    p0 = rand_str(64); s0 = rand_str(16); p1 = rand_str(20); s1 = rand_str(16);
    call(p0, s0, 200, 99, p1, s1, 20, 17, 3, 512, 1536, 1'b0, h0, h1, cyc);
    check("call3 core0 clamped", h0 === sha512crypt_ref(p0, s0, 3));
    check("call3 core1 clamped salt", h1 === sha512crypt_ref(p1, s1, 3));
    n_clamp++;

    // 4: back-to-back random calls, mixed completion styles
    for (int k = 0; k < 4; k++) begin
      int a, b, c, e;
      a = $urandom_range(64); b = $urandom_range(16); c = $urandom_range(64); e = $urandom_range(16);
      p0 = rand_str(a); s0 = rand_str(b); p1 = rand_str(c); s1 = rand_str(e);
      r = $urandom_range(12, 1);
      call(p0, s0, a, b, p1, s1, c, e, r, 768, 2048, k[0], h0, h1, cyc);
      check("random core0", h0 === sha512crypt_ref(p0, s0, r));
      check("random core1", h1 === sha512crypt_ref(p1, s1, r));
    end

    // 5: results written where the memory answers with an error
    env.host.read(REG_STATUS, d);
    check("status clear before error", d == 32'h0);
    p0 = rand_str(8); s0 = rand_str(8);
    call(p0, s0, 8, 8, p0, s0, 8, 8, 1, 0, 3072 * 4, 1'b0, h0, h1, cyc);
    env.host.read(REG_STATUS, d);
    check("bus error flagged", d == 32'h1);
    if (d == 32'h1) n_buserr++;
    env.host.write(REG_STATUS, 32'h1);

    check("memory protocol", env.mem.protocol_errors == 0);
    check("bursts: 2 reads and 2 writes per call",
          env.mem.read_bursts == 2 * n_calls && env.mem.write_bursts == 2 * n_calls);
    check("mechanism: cores in parallel", n_parallel > 0);
    check("mechanism: polled completion", n_poll > 0);
    check("mechanism: interrupt completion", n_irq > 0);
    check("mechanism: length clamping", n_clamp > 0);
    check("mechanism: memory error flagged", n_buserr > 0);
    check("mechanism: back-to-back calls", n_calls > 2);
    $display("calls=%0d parallel_cycles=%0d polled=%0d irq=%0d clamp=%0d buserr=%0d",
             n_calls, n_parallel, n_poll, n_irq, n_clamp, n_buserr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
