// kernel_pkg: register map and memory layout of the sha512crypt kernel,
// shared by the control-register slave, the kernel top and its testbench.
// The layout is this design's own choice (the published design generated
// its interface with a high-level-synthesis tool and does not list it).
//
// Control registers (32-bit, AXI4-Lite, byte offsets):
//   0x00 AP_CTRL  bit0 ap_start (write 1 to start, cleared when accepted)
//                 bit1 ap_done  (set at completion, cleared when read)
//                 bit2 ap_idle, bit3 ap_ready (pulse, reads as last value)
//   0x04 GIE      bit0 global interrupt enable
//   0x08 IER      bit0 enable the "done" interrupt
//   0x0C ISR      bit0 "done" interrupt status, write 1 to clear
//   0x10 IN_ADDR  byte address of the job records in memory
//   0x14 OUT_ADDR byte address of the result area
//   0x18 ROUNDS   sha512crypt round count (reset value ROUNDS_DEFAULT)
//   0x1C STATUS   bit0 memory error: a burst got a non-OKAY response
//                 (sticky, write 1 to clear)
//
// Memory (32-bit little-endian words). Job record of core c at
// IN_ADDR + c * 128: word 0 password length, word 1 salt length,
// words 2..17 the 64 password bytes, words 18..21 the 16 salt bytes
// (byte k of a field in bits 8*(k%4) of word k/4). Result of core c at
// OUT_ADDR + c * 64: the 64 raw hash bytes in order. Both addresses must be
// 128-byte aligned so that no burst crosses a 4 KB boundary.
package kernel_pkg;

  localparam int unsigned CTRL_AW = 6;

  localparam logic [CTRL_AW-1:0] REG_AP_CTRL  = 6'h00;
  localparam logic [CTRL_AW-1:0] REG_GIE      = 6'h04;
  localparam logic [CTRL_AW-1:0] REG_IER      = 6'h08;
  localparam logic [CTRL_AW-1:0] REG_ISR      = 6'h0C;
  localparam logic [CTRL_AW-1:0] REG_IN_ADDR  = 6'h10;
  localparam logic [CTRL_AW-1:0] REG_OUT_ADDR = 6'h14;
  localparam logic [CTRL_AW-1:0] REG_ROUNDS   = 6'h18;
  localparam logic [CTRL_AW-1:0] REG_STATUS   = 6'h1C;

  localparam int unsigned REC_STRIDE = 128;   // bytes per job record
  localparam int unsigned REC_WORDS  = 22;    // words read per record
  localparam int unsigned OUT_STRIDE = 64;    // bytes per result
  localparam int unsigned OUT_WORDS  = 16;

  localparam logic [1:0] AXI_BURST_INCR = 2'b01;
  localparam logic [2:0] AXI_SIZE_4B    = 3'b010;
  localparam logic [1:0] AXI_RESP_OKAY  = 2'b00;

endpackage
