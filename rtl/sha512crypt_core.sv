// sha512crypt_core: one sha512crypt hashing core (the "$6$" password hash of
// glibc), for passwords of up to PW_MAX = 64 bytes and salts of up to
// SALT_MAX = 16 bytes, with a run-time round count (5000 is the usual one).
//
// The core is a controller around one SHA-512 unit (sha512_hasher with its
// 4336-byte sha512_msg_buffer). For every SHA-512 it has to compute, the
// controller first writes the message into the buffer, one byte per cycle,
// as a list of segments (a source register and a byte count), then starts
// the hasher on the message length and stores the digest. The messages are
// those of the sha512crypt algorithm, in this order:
//   B    = SHA512(P . S . P)
//   A    = SHA512(P . S . B[0..|P|-1] . for each bit of |P| from the LSB
//                 while bits remain: bit=1 -> B, bit=0 -> P)
//   DP   = SHA512(P repeated |P| times)          p-seq = DP[0..|P|-1]
//   DS   = SHA512(S repeated 16 + A[0] times)    s-seq = DS[0..|S|-1]
//   C    = A, then for i = 0 .. rounds-1:
//          C = SHA512((i odd ? p-seq : C) . (i%3 ? s-seq : -) .
//                     (i%7 ? p-seq : -) . (i odd ? C : p-seq))
// The result is the raw 64-byte C; the crypt base-64 text encoding is left
// to the host, which compares hashes. i%3 and i%7 are kept as small wrapping
// counters rather than divided.
//
// Interface: `start` is accepted while idle. pw/pw_len, salt/salt_len and
// rounds must stay stable until `done`, which pulses for one cycle with
// `hash` valid (byte 0 in hash[511:504]). Lengths above the maxima are
// clamped to them. Reset is synchronous and active low.
// Timing: each SHA-512 takes one cycle per message byte, one per empty
// segment, 100 per 128-byte block and 4 of hand-over; counting the `start`
// cycle as cycle 1, `done` is high one cycle after the last SHA-512. With a
// 12-byte password, a 10-byte salt and 5000 rounds that is 992,083 cycles.
// The sha512crypt steps are the algorithm's; the byte-serial message
// assembly and the segment sequencer are this design's choices.
module sha512crypt_core
  import sha512_pkg::*;
#(
  parameter int unsigned PW_MAX   = 64,
  parameter int unsigned SALT_MAX = 16,
  parameter int unsigned BUF_BYTES = 4336
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [7:0]  pw [PW_MAX],
  input  logic [6:0]  pw_len,
  input  logic [7:0]  salt [SALT_MAX],
  input  logic [4:0]  salt_len,
  input  logic [31:0] rounds,
  output logic        busy,
  output logic        done,
  output logic [511:0] hash
);

  typedef enum logic [2:0] {ST_B, ST_A, ST_DP, ST_DS, ST_RND} step_e;
  typedef enum logic [2:0] {SRC_P, SRC_S, SRC_B, SRC_DP, SRC_DS, SRC_C} src_e;
  typedef enum logic [1:0] {K_IDLE, K_FILL, K_HASH, K_WAIT} kstate_e;

  typedef struct packed {
    logic       last;    // past the end of the message
    src_e       src;
    logic [6:0] len;
  } seg_t;

  kstate_e          ks;
  step_e            step;
  logic [8:0]       seg;
  logic [6:0]       j;
  logic [LEN_W-1:0] wptr;
  logic [31:0]      rnd;
  logic             odd;
  logic [1:0]       mod3;
  logic [2:0]       mod7;
  logic [511:0]     dig_b, dig_dp, dig_ds, dig_c;
  logic [7:0]       a0;

  logic [6:0]       plen;
  logic [6:0]       slen;
  assign plen = (pw_len > 7'(PW_MAX)) ? 7'(PW_MAX) : pw_len;
  assign slen = (salt_len > 5'(SALT_MAX)) ? 7'(SALT_MAX) : 7'(salt_len);

  // Segment list of the message being built.
  function automatic seg_t seg_decode(step_e st, logic [8:0] k, logic [6:0] pl,
                                      logic [6:0] sl, logic [7:0] a_0,
                                      logic is_odd, logic [1:0] m3, logic [2:0] m7);
    seg_t s;
    logic [6:0] cnt;
    s = '{last: 1'b0, src: SRC_P, len: pl};
    unique case (st)
      ST_B: begin
        unique case (k)
          9'd0: s = '{last: 1'b0, src: SRC_P, len: pl};
          9'd1: s = '{last: 1'b0, src: SRC_S, len: sl};
          9'd2: s = '{last: 1'b0, src: SRC_P, len: pl};
          default: s.last = 1'b1;
        endcase
      end
      ST_A: begin
        if (k == 9'd0)      s = '{last: 1'b0, src: SRC_P, len: pl};
        else if (k == 9'd1) s = '{last: 1'b0, src: SRC_S, len: sl};
        else if (k == 9'd2) s = '{last: 1'b0, src: SRC_B, len: pl};
        else if (k > 9'd10) s.last = 1'b1;
        else begin
          cnt = pl >> (k - 9'd3);
          if (cnt == 7'd0)  s.last = 1'b1;
          else if (cnt[0])  s = '{last: 1'b0, src: SRC_B, len: 7'd64};
          else              s = '{last: 1'b0, src: SRC_P, len: pl};
        end
      end
      ST_DP: begin
        if (k < 9'(pl)) s = '{last: 1'b0, src: SRC_P, len: pl};
        else            s.last = 1'b1;
      end
      ST_DS: begin
        if (k < 9'd16 + 9'(a_0)) s = '{last: 1'b0, src: SRC_S, len: sl};
        else                     s.last = 1'b1;
      end
      ST_RND: begin
        unique case (k)
          9'd0: s = is_odd ? '{last: 1'b0, src: SRC_DP, len: pl}
                           : '{last: 1'b0, src: SRC_C,  len: 7'd64};
          9'd1: s = '{last: 1'b0, src: SRC_DS, len: (m3 != 2'd0) ? sl : 7'd0};
          9'd2: s = '{last: 1'b0, src: SRC_DP, len: (m7 != 3'd0) ? pl : 7'd0};
          9'd3: s = is_odd ? '{last: 1'b0, src: SRC_C,  len: 7'd64}
                           : '{last: 1'b0, src: SRC_DP, len: pl};
          default: s.last = 1'b1;
        endcase
      end
      default: s.last = 1'b1;
    endcase
    return s;
  endfunction

  seg_t       cur;
  logic [7:0] src_byte;
  assign cur = seg_decode(step, seg, plen, slen, a0, odd, mod3, mod7);

  always_comb begin
    unique case (cur.src)
      SRC_P:   src_byte = pw[j[5:0]];
      SRC_S:   src_byte = salt[j[3:0]];
      SRC_B:   src_byte = dig_b [511 - 8*j[5:0] -: 8];
      SRC_DP:  src_byte = dig_dp[511 - 8*j[5:0] -: 8];
      SRC_DS:  src_byte = dig_ds[511 - 8*j[5:0] -: 8];
      default: src_byte = dig_c [511 - 8*j[5:0] -: 8];
    endcase
  end

  // SHA-512 unit: message buffer and hasher
  logic              buf_we;
  logic [LEN_W-4:0]  buf_raddr;
  logic [63:0]       buf_rdata;
  logic              h_start, h_busy, h_done;
  logic [511:0]      h_digest;

  assign buf_we  = (ks == K_FILL) && !cur.last && (cur.len != 7'd0);
  assign h_start = (ks == K_HASH);

  sha512_msg_buffer #(.BYTES(BUF_BYTES), .AW(LEN_W)) u_buf (
    .clk   (clk),
    .we    (buf_we),
    .waddr (wptr),
    .wdata (src_byte),
    .raddr (buf_raddr),
    .rdata (buf_rdata)
  );

  sha512_hasher u_hasher (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (h_start),
    .msg_len   (wptr),
    .busy      (h_busy),
    .done      (h_done),
    .digest    (h_digest),
    .buf_raddr (buf_raddr),
    .buf_rdata (buf_rdata)
  );

  assign busy = (ks != K_IDLE);
  assign hash = dig_c;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ks     <= K_IDLE;
      step   <= ST_B;
      seg    <= '0;
      j      <= '0;
      wptr   <= '0;
      rnd    <= '0;
      odd    <= 1'b0;
      mod3   <= '0;
      mod7   <= '0;
      dig_b  <= '0;
      dig_dp <= '0;
      dig_ds <= '0;
      dig_c  <= '0;
      a0     <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (ks)
        K_IDLE: begin
          if (start) begin
            step <= ST_B;
            seg  <= '0;
            j    <= '0;
            wptr <= '0;
            ks   <= K_FILL;
          end
        end
        K_FILL: begin
          if (cur.last) begin
            ks <= K_HASH;
          end else if (cur.len == 7'd0 || j == cur.len - 7'd1) begin
            seg <= seg + 9'd1;
            j   <= '0;
            if (cur.len != 7'd0) wptr <= wptr + LEN_W'(1);
          end else begin
            j    <= j + 7'd1;
            wptr <= wptr + LEN_W'(1);
          end
        end
        K_HASH: ks <= K_WAIT;
        K_WAIT: begin
          if (h_done) begin
            seg  <= '0;
            j    <= '0;
            wptr <= '0;
            ks   <= K_FILL;
            unique case (step)
              ST_B:  begin dig_b <= h_digest; step <= ST_A; end
              ST_A:  begin dig_c <= h_digest; a0 <= h_digest[511:504]; step <= ST_DP; end
              ST_DP: begin dig_dp <= h_digest; step <= ST_DS; end
              ST_DS: begin
                dig_ds <= h_digest;
                step   <= ST_RND;
                rnd    <= '0;
                odd    <= 1'b0;
                mod3   <= '0;
                mod7   <= '0;
                if (rounds == 32'd0) begin
                  ks   <= K_IDLE;
                  done <= 1'b1;
                end
              end
              default: begin
                dig_c <= h_digest;
                rnd   <= rnd + 32'd1;
                odd   <= ~odd;
                mod3  <= (mod3 == 2'd2) ? 2'd0 : mod3 + 2'd1;
                mod7  <= (mod7 == 3'd6) ? 3'd0 : mod7 + 3'd1;
                if (rnd + 32'd1 == rounds) begin
                  ks   <= K_IDLE;
                  done <= 1'b1;
                end
              end
            endcase
          end
        end
        default: ks <= K_IDLE;
      endcase
    end
  end

  // The hasher is only started when idle.
  a_hasher_idle: assert property (@(posedge clk) disable iff (!rst_n)
    h_start |-> !h_busy);

  // A message never outgrows the buffer.
  a_fits: assert property (@(posedge clk) disable iff (!rst_n)
    buf_we |-> (32'(wptr) < BUF_BYTES));

endmodule
