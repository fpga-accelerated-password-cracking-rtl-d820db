// sha512_msg_buffer: the message buffer of the SHA-512 unit, sized for the
// longest message sha512crypt hashes with a 64-character password and a
// 16-byte salt: the salt repeated 16 + 255 times, 16 * 271 = 4336 bytes
// (the buffer size of the original design).
//
// Storage is an array of 64-bit words. Byte k of the message lives in word
// k/8, most significant byte first, so a word read returns the big-endian
// SHA-512 message word directly. Write port: one byte per cycle (`we`,
// byte address `waddr`, `wdata`). Read port: one 64-bit word per cycle,
// registered, data valid the cycle after `raddr` is presented. Word addresses
// past the end read as zero (the hasher masks those bytes anyway).
// The byte/word organisation and the one-cycle read are this design's choice.
module sha512_msg_buffer #(
  parameter int unsigned BYTES = 4336,
  parameter int unsigned AW    = 13        // byte address width
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata,
  input  logic [AW-4:0] raddr,             // word address
  output logic [63:0]   rdata
);

  localparam int unsigned WORDS = (BYTES + 7) / 8;

  logic [63:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < BYTES))
      mem[waddr[AW-1:3]][(7 - waddr[2:0]) * 8 +: 8] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (32'(raddr) < WORDS) rdata <= mem[raddr];
    else                    rdata <= '0;
  end

endmodule
