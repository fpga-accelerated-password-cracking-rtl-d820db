// tb_sha512_msg_buffer: writes random bytes at random and boundary byte
// addresses of the 4336-byte message buffer, keeping a byte-array model, then
// reads every word back and compares it (big-endian byte order within the
// word, data one cycle after the address). Words past the end must read 0
// and writes past the end must be ignored.
`timescale 1ns/1ps
module tb_sha512_msg_buffer;
  localparam int BYTES = 4336;
  logic clk = 1'b0, we = 1'b0;
  logic [12:0] waddr = '0;
  logic [7:0]  wdata = '0;
  logic [9:0]  raddr = '0;
  logic [63:0] rdata;
  byte unsigned model [BYTES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  sha512_msg_buffer dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(int a, byte unsigned d);
    @(negedge clk);
    we = 1'b1; waddr = 13'(a); wdata = d;
    if (a < BYTES) model[a] = d;
    @(negedge clk) we = 1'b0;
  endtask

  initial begin
    logic [63:0] exp_w;
    // fill everything first so every word has a known value
    for (int a = 0; a < BYTES; a++) wr(a, 8'($urandom));
    for (int n = 0; n < 2000; n++) wr($urandom_range(BYTES - 1), 8'($urandom));
    wr(0, 8'hA5); wr(BYTES - 1, 8'h5A); wr(BYTES, 8'hFF); wr(8191, 8'hEE);
    for (int wa = 0; wa < 560; wa++) begin
      @(negedge clk) raddr = 10'(wa);
      @(negedge clk);
      exp_w = '0;
      if (wa < BYTES / 8)
        for (int b = 0; b < 8; b++) exp_w[63 - 8*b -: 8] = model[wa*8 + b];
      checks++;
      if (rdata !== exp_w) begin
        failures++;
        $display("FAIL word %0d got %h exp %h", wa, rdata, exp_w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
