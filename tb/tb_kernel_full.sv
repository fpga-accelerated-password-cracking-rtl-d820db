// tb_kernel_full: the kernel at its default configuration (two cores,
// 5000 rounds from the ROUNDS register's reset value) hashing full-size jobs
// as the host would issue them:
//   call 1: two 10-character passwords with 16-byte salts,
//   call 2: two 60-character passwords with 16-byte salts,
//   call 3: the standard "Hello world!" / "saltstring" example on both
//           cores, checked against its known result.
// Every hash is compared with the reference sha512crypt model. The cycle
// count of each call is converted to passwords per second at a 70 MHz clock
// and must at least reach the rate of the published two-core prototype at
// that clock: 90 passwords/s for 10 characters and 55 for 60 characters.
`timescale 1ns/1ps
module tb_kernel_full;
  import kernel_pkg::*;
  import sha512_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic interrupt;
  logic [1:0] busy_cores;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  kernel_tb_env env (.clk, .rst_n, .interrupt, .busy_cores);

  initial begin
    repeat (12000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic bq_t rand_str(int n);
    bq_t q;
    for (int i = 0; i < n; i++) q.push_back(8'($urandom_range(126, 33)));
    return q;
  endfunction

  task automatic call(bq_t p0, bq_t s0, bq_t p1, bq_t s1,
                      output logic [511:0] h0, output logic [511:0] h1, output int cycles);
    env.put_record(0, p0, s0, p0.size(), s0.size());
    env.put_record(REC_STRIDE, p1, s1, p1.size(), s1.size());
    env.host.write(REG_IN_ADDR, 32'd0);
    env.host.write(REG_OUT_ADDR, 32'd1024);
    env.host.write(REG_AP_CTRL, 32'h1);
    cycles = 0;
    while (!interrupt) begin @(negedge clk); cycles++; end
    env.host.write(REG_ISR, 32'h1);
    h0 = env.get_result(1024);
    h1 = env.get_result(1024 + OUT_STRIDE);
  endtask

  initial begin
    bq_t p0, s0, p1, s1;
    logic [511:0] h0, h1, hello;
    int cyc;
    real rate;
    hello = 512'h2b209d0f3abe5abc1b24521555baa2b94d0943dae13e85666e7946e24de2323733cc538877a227437ac5f8ede5986c71a987079aa165ef8a1bda94a5916aceff;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    env.host.write(REG_GIE, 32'h1);
    env.host.write(REG_IER, 32'h1);

    p0 = rand_str(10); s0 = rand_str(16); p1 = rand_str(10); s1 = rand_str(16);
    call(p0, s0, p1, s1, h0, h1, cyc);
    check("10-char core0", h0 === sha512crypt_ref(p0, s0, 5000));
    check("10-char core1", h1 === sha512crypt_ref(p1, s1, 5000));
    rate = 2.0 * 70.0e6 / real'(cyc);
    $display("10-character passwords: %0d cycles per call, %0.1f passwords/s at 70 MHz", cyc, rate);
    check("10-char rate >= 90/s", rate >= 90.0);

    p0 = rand_str(60); s0 = rand_str(16); p1 = rand_str(60); s1 = rand_str(16);
    call(p0, s0, p1, s1, h0, h1, cyc);
    check("60-char core0", h0 === sha512crypt_ref(p0, s0, 5000));
    check("60-char core1", h1 === sha512crypt_ref(p1, s1, 5000));
    rate = 2.0 * 70.0e6 / real'(cyc);
    $display("60-character passwords: %0d cycles per call, %0.1f passwords/s at 70 MHz", cyc, rate);
    check("60-char rate >= 55/s", rate >= 55.0);

    p0 = str_bytes("Hello world!"); s0 = str_bytes("saltstring");
    call(p0, s0, p0, s0, h0, h1, cyc);
    check("known example core0", h0 === hello);
    check("known example core1", h1 === hello);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
