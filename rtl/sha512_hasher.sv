// sha512_hasher: SHA-512 of a message of `msg_len` bytes (0..4336) that sits
// in the message buffer (sha512_msg_buffer), returning the 64-byte digest.
//
// The message is not copied or padded in the buffer. For each 1024-bit block
// the hasher reads its 16 words from the buffer, one per cycle, and applies
// the FIPS 180-4 padding on the fly while loading them: bytes at positions
// >= msg_len are replaced by 0x80 (at position msg_len) or zero, and the last
// word of the last block carries the message length in bits. The block count
// is ceil((msg_len + 17) / 128). Each block is then handed to
// sha512_compress and the chaining value is updated.
//
// Interface: `start` is accepted while idle (`busy` low); `msg_len` must stay
// stable until `done`. `done` pulses for one cycle with `digest` valid; digest
// byte 0 (the first byte of the standard's output) is digest[511:504]. The
// digest holds until the next start.
// Timing: 17 cycles to load a block, 1 to start the compression engine and
// 82 until it is done, so 100 cycles per block; counting the `start` cycle as
// cycle 1, `done` is high in cycle 100 * blocks + 2. Synchronous reset.
// The 4336-byte message limit follows the original design, which enlarged
// the buffer of its library SHA-512 routine to that size; the on-the-fly
// padding is this design's choice.
module sha512_hasher
  import sha512_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [LEN_W-1:0] msg_len,
  output logic             busy,
  output logic             done,
  output logic [511:0]     digest,
  // read port of the message buffer (word address, data one cycle later)
  output logic [LEN_W-4:0] buf_raddr,
  input  logic [63:0]      buf_rdata
);

  typedef enum logic [2:0] {H_IDLE, H_LOAD, H_START, H_WAIT, H_DONE} hstate_e;

  hstate_e            hs;
  logic [5:0]         blk;        // current block
  logic [5:0]         nblk;       // number of blocks of the padded message
  logic [4:0]         k;          // load cycle 0..16
  block_t             blk_words;
  state_t             chain;
  logic               c_start, c_busy, c_done;
  state_t             c_state;

  // ceil((msg_len + 17) / 128)
  logic [LEN_W+1:0]   padded_len;
  assign padded_len = {2'b00, msg_len} + (LEN_W+2)'(17 + 127);

  // global word index of the word arriving this cycle (issued last cycle)
  logic [3:0]         widx_in;
  logic [LEN_W+1:0]   base_pos;
  word_t              padded_word;
  assign widx_in  = 4'(k - 5'd1);
  assign base_pos = (LEN_W+2)'({blk, widx_in, 3'b000});

  always_comb begin
    logic [LEN_W+1:0] pos;
    padded_word = '0;
    for (int b = 0; b < 8; b++) begin
      pos = base_pos + (LEN_W+2)'(b);
      if (pos < (LEN_W+2)'(msg_len))
        padded_word[63 - 8*b -: 8] = buf_rdata[63 - 8*b -: 8];
      else if (pos == (LEN_W+2)'(msg_len))
        padded_word[63 - 8*b -: 8] = 8'h80;
    end
    if ((blk == nblk - 6'd1) && (widx_in == 4'd15))
      padded_word = padded_word | {48'd0, msg_len, 3'b000};
  end

  // Issue address: k counts 0..15 for the addresses.
  assign buf_raddr = (LEN_W-3)'({blk, k[3:0]});

  assign busy = (hs != H_IDLE);

  sha512_compress u_compress (
    .clk     (clk),
    .rst_n   (rst_n),
    .start   (c_start),
    .block_i (blk_words),
    .state_i (chain),
    .busy    (c_busy),
    .done    (c_done),
    .state_o (c_state)
  );

  assign c_start = (hs == H_START);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hs     <= H_IDLE;
      blk    <= '0;
      nblk   <= '0;
      k      <= '0;
      done   <= 1'b0;
      digest <= '0;
      for (int i = 0; i < 16; i++) blk_words[i] <= '0;
      for (int i = 0; i < 8; i++) chain[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (hs)
        H_IDLE: begin
          if (start) begin
            nblk <= 6'(padded_len[LEN_W+1:7]);
            blk  <= '0;
            k    <= '0;
            for (int i = 0; i < 8; i++) chain[i] <= IV[i];
            hs   <= H_LOAD;
          end
        end
        H_LOAD: begin
          if (k != 5'd0) blk_words[widx_in] <= padded_word;
          if (k == 5'd16) hs <= H_START;
          k <= k + 5'd1;
        end
        H_START: hs <= H_WAIT;
        H_WAIT: begin
          if (c_done) begin
            chain <= c_state;
            k     <= '0;
            if (blk == nblk - 6'd1) hs <= H_DONE;
            else begin
              blk <= blk + 6'd1;
              hs  <= H_LOAD;
            end
          end
        end
        H_DONE: begin
          for (int i = 0; i < 8; i++) digest[511 - 64*i -: 64] <= chain[i];
          done <= 1'b1;
          hs   <= H_IDLE;
        end
        default: hs <= H_IDLE;
      endcase
    end
  end

  // The compression engine must be idle whenever a block is handed over.
  a_compress_idle: assert property (@(posedge clk) disable iff (!rst_n)
    c_start |-> !c_busy);

endmodule
