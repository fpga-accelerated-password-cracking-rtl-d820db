// sha512_compress: SHA-512 compression function (FIPS 180-4) of one
// 1024-bit block, iterative, one of the 80 rounds per clock cycle.
//
// On `start` (accepted only while not busy) the block and the chaining state
// are captured. The message schedule is kept as a 16-word sliding window, so
// W[t] is always window[0] and W[t+16] is computed from the window each cycle.
// After round 79 one more cycle adds the working variables to the chaining
// state (feed-forward), `state_o` takes the new value and `done` pulses for one
// cycle. `state_o` then holds until the next block finishes.
//
// Timing: counting the cycle in which `start` is high as cycle 1, `done` is
// high in cycle 82 (the capture, 80 rounds and the feed-forward).
// Reset is synchronous and active low.
// The round logic is the standard's; the one-round-per-cycle structure is
// this design's choice; the original design took its SHA-512 from a library.
module sha512_compress
  import sha512_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t block_i,
  input  state_t state_i,
  output logic   busy,
  output logic   done,
  output state_t state_o
);

  typedef enum logic [1:0] {C_IDLE, C_ROUND, C_FINAL} cstate_e;

  cstate_e    cs;
  logic [6:0] t;
  word_t      w [16];
  word_t      v [8];      // working variables a..h
  state_t     h_in;       // chaining value of this block

  word_t t1, t2, w_next;

  always_comb begin
    t1     = v[7] + big_sigma1(v[4]) + ch(v[4], v[5], v[6]) + K[t] + w[0];
    t2     = big_sigma0(v[0]) + maj(v[0], v[1], v[2]);
    w_next = small_sigma1(w[14]) + w[9] + small_sigma0(w[1]) + w[0];
  end

  assign busy = (cs != C_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs   <= C_IDLE;
      t    <= '0;
      done <= 1'b0;
      for (int i = 0; i < 8; i++) begin
        v[i]       <= '0;
        h_in[i]    <= '0;
        state_o[i] <= '0;
      end
      for (int i = 0; i < 16; i++) w[i] <= '0;
    end else begin
      done <= 1'b0;
      unique case (cs)
        C_IDLE: begin
          if (start) begin
            for (int i = 0; i < 16; i++) w[i] <= block_i[i];
            for (int i = 0; i < 8; i++) begin
              v[i]    <= state_i[i];
              h_in[i] <= state_i[i];
            end
            t  <= '0;
            cs <= C_ROUND;
          end
        end
        C_ROUND: begin
          v[0] <= t1 + t2;
          v[1] <= v[0];
          v[2] <= v[1];
          v[3] <= v[2];
          v[4] <= v[3] + t1;
          v[5] <= v[4];
          v[6] <= v[5];
          v[7] <= v[6];
          for (int i = 0; i < 15; i++) w[i] <= w[i+1];
          w[15] <= w_next;
          if (t == 7'd79) cs <= C_FINAL;
          t <= t + 7'd1;
        end
        C_FINAL: begin
          for (int i = 0; i < 8; i++) state_o[i] <= h_in[i] + v[i];
          done <= 1'b1;
          cs   <= C_IDLE;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

endmodule
