// kernel_sha512crypt_dual: the accelerator kernel. N_CORES sha512crypt cores
// (two by default, the number that fitted the published prototype's FPGA)
// hash one password each, in parallel, behind an AXI4-Lite control port and
// an AXI4 master port into memory shared with the host processor.
//
// One kernel call: the host writes N_CORES job records (password, salt and
// their lengths) into shared memory, sets IN_ADDR, OUT_ADDR and ROUNDS and
// writes ap_start. The kernel then
//   1. reads the record of each core in turn (one 22-beat burst each) into
//      that core's input buffer,
//   2. starts all cores in the same cycle and waits until every one is done,
//   3. writes each core's 64-byte hash back (one 16-beat burst each),
//   4. pulses ap_done, which sets the done bit and, if enabled, the
//      interrupt.
// The host compares the hashes with its target; candidate generation and
// comparison are software. Register map and record layout: kernel_pkg.
//
// Ports: ap_clk/ap_rst_n (synchronous active-low reset), s_axi_control
// (AXI4-Lite, 32-bit), m_axi_gmem (AXI4, 32-bit data, INCR bursts),
// interrupt. Timing: roughly 2 x (22 + 16) + a few beats of memory traffic
// per call plus one sha512crypt computation (the longest of the N_CORES
// jobs, about 1 M cycles for short passwords at 5000 rounds).
// The copy-start-wait-return sequence and the core count follow the
// published design; the record layout, the register map and the
// sequential memory transfers are this design's choices.
module kernel_sha512crypt_dual
  import kernel_pkg::*;
#(
  parameter int unsigned N_CORES        = 2,
  parameter logic [31:0] ROUNDS_DEFAULT = 32'd5000
) (
  input  logic               ap_clk,
  input  logic               ap_rst_n,
  // s_axi_control
  input  logic [CTRL_AW-1:0] s_axi_control_awaddr,
  input  logic               s_axi_control_awvalid,
  output logic               s_axi_control_awready,
  input  logic [31:0]        s_axi_control_wdata,
  input  logic [3:0]         s_axi_control_wstrb,
  input  logic               s_axi_control_wvalid,
  output logic               s_axi_control_wready,
  output logic [1:0]         s_axi_control_bresp,
  output logic               s_axi_control_bvalid,
  input  logic               s_axi_control_bready,
  input  logic [CTRL_AW-1:0] s_axi_control_araddr,
  input  logic               s_axi_control_arvalid,
  output logic               s_axi_control_arready,
  output logic [31:0]        s_axi_control_rdata,
  output logic [1:0]         s_axi_control_rresp,
  output logic               s_axi_control_rvalid,
  input  logic               s_axi_control_rready,
  // m_axi_gmem
  output logic [31:0]        m_axi_gmem_awaddr,
  output logic [7:0]         m_axi_gmem_awlen,
  output logic [2:0]         m_axi_gmem_awsize,
  output logic [1:0]         m_axi_gmem_awburst,
  output logic               m_axi_gmem_awvalid,
  input  logic               m_axi_gmem_awready,
  output logic [31:0]        m_axi_gmem_wdata,
  output logic [3:0]         m_axi_gmem_wstrb,
  output logic               m_axi_gmem_wlast,
  output logic               m_axi_gmem_wvalid,
  input  logic               m_axi_gmem_wready,
  input  logic [1:0]         m_axi_gmem_bresp,
  input  logic               m_axi_gmem_bvalid,
  output logic               m_axi_gmem_bready,
  output logic [31:0]        m_axi_gmem_araddr,
  output logic [7:0]         m_axi_gmem_arlen,
  output logic [2:0]         m_axi_gmem_arsize,
  output logic [1:0]         m_axi_gmem_arburst,
  output logic               m_axi_gmem_arvalid,
  input  logic               m_axi_gmem_arready,
  input  logic [31:0]        m_axi_gmem_rdata,
  input  logic [1:0]         m_axi_gmem_rresp,
  input  logic               m_axi_gmem_rlast,
  input  logic               m_axi_gmem_rvalid,
  output logic               m_axi_gmem_rready,
  output logic               interrupt
);

  localparam int unsigned CW = (N_CORES > 1) ? $clog2(N_CORES) : 1;

  typedef enum logic [2:0] {
    K_IDLE, K_RD_CMD, K_RD_DATA, K_START, K_WAIT, K_WR_CMD, K_WR_DATA, K_DONE
  } kstate_e;

  // ---------------------------------------------------------------- control
  logic        ap_start, ap_ready, ap_done, ap_idle;
  logic [31:0] in_addr, out_addr, rounds_reg;
  logic        cmd_valid, cmd_ready, cmd_write, m_done, m_err;
  logic [31:0] cmd_addr, rd_data, wr_data;
  logic [7:0]  cmd_len, beat;
  logic        rd_valid;

  axil_ctrl_regs #(.ROUNDS_DEFAULT(ROUNDS_DEFAULT)) u_ctrl (
    .clk           (ap_clk),
    .rst_n         (ap_rst_n),
    .s_axi_awaddr  (s_axi_control_awaddr),
    .s_axi_awvalid (s_axi_control_awvalid),
    .s_axi_awready (s_axi_control_awready),
    .s_axi_wdata   (s_axi_control_wdata),
    .s_axi_wstrb   (s_axi_control_wstrb),
    .s_axi_wvalid  (s_axi_control_wvalid),
    .s_axi_wready  (s_axi_control_wready),
    .s_axi_bresp   (s_axi_control_bresp),
    .s_axi_bvalid  (s_axi_control_bvalid),
    .s_axi_bready  (s_axi_control_bready),
    .s_axi_araddr  (s_axi_control_araddr),
    .s_axi_arvalid (s_axi_control_arvalid),
    .s_axi_arready (s_axi_control_arready),
    .s_axi_rdata   (s_axi_control_rdata),
    .s_axi_rresp   (s_axi_control_rresp),
    .s_axi_rvalid  (s_axi_control_rvalid),
    .s_axi_rready  (s_axi_control_rready),
    .ap_start      (ap_start),
    .ap_ready      (ap_ready),
    .ap_done       (ap_done),
    .ap_idle       (ap_idle),
    .bus_err       (m_err),
    .in_addr       (in_addr),
    .out_addr      (out_addr),
    .rounds        (rounds_reg),
    .interrupt     (interrupt)
  );

  // ------------------------------------------------------------ memory port

  axi_burst_master u_gmem (
    .clk           (ap_clk),
    .rst_n         (ap_rst_n),
    .cmd_valid     (cmd_valid),
    .cmd_ready     (cmd_ready),
    .cmd_write     (cmd_write),
    .cmd_addr      (cmd_addr),
    .cmd_len       (cmd_len),
    .beat          (beat),
    .rd_valid      (rd_valid),
    .rd_data       (rd_data),
    .wr_data       (wr_data),
    .done          (m_done),
    .err           (m_err),
    .m_axi_awaddr  (m_axi_gmem_awaddr),
    .m_axi_awlen   (m_axi_gmem_awlen),
    .m_axi_awsize  (m_axi_gmem_awsize),
    .m_axi_awburst (m_axi_gmem_awburst),
    .m_axi_awvalid (m_axi_gmem_awvalid),
    .m_axi_awready (m_axi_gmem_awready),
    .m_axi_wdata   (m_axi_gmem_wdata),
    .m_axi_wstrb   (m_axi_gmem_wstrb),
    .m_axi_wlast   (m_axi_gmem_wlast),
    .m_axi_wvalid  (m_axi_gmem_wvalid),
    .m_axi_wready  (m_axi_gmem_wready),
    .m_axi_bresp   (m_axi_gmem_bresp),
    .m_axi_bvalid  (m_axi_gmem_bvalid),
    .m_axi_bready  (m_axi_gmem_bready),
    .m_axi_araddr  (m_axi_gmem_araddr),
    .m_axi_arlen   (m_axi_gmem_arlen),
    .m_axi_arsize  (m_axi_gmem_arsize),
    .m_axi_arburst (m_axi_gmem_arburst),
    .m_axi_arvalid (m_axi_gmem_arvalid),
    .m_axi_arready (m_axi_gmem_arready),
    .m_axi_rdata   (m_axi_gmem_rdata),
    .m_axi_rresp   (m_axi_gmem_rresp),
    .m_axi_rlast   (m_axi_gmem_rlast),
    .m_axi_rvalid  (m_axi_gmem_rvalid),
    .m_axi_rready  (m_axi_gmem_rready)
  );

  // ------------------------------------------------- per-core input buffers
  logic [7:0]   pw_buf   [N_CORES][64];
  logic [7:0]   salt_buf [N_CORES][16];
  logic [6:0]   pw_len   [N_CORES];
  logic [4:0]   salt_len [N_CORES];
  logic [31:0]  rounds_run;
  logic         core_start;
  logic [N_CORES-1:0] core_busy, core_done, finished;
  logic [511:0] core_hash [N_CORES];

  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    sha512crypt_core u_core (
      .clk      (ap_clk),
      .rst_n    (ap_rst_n),
      .start    (core_start),
      .pw       (pw_buf[c]),
      .pw_len   (pw_len[c]),
      .salt     (salt_buf[c]),
      .salt_len (salt_len[c]),
      .rounds   (rounds_run),
      .busy     (core_busy[c]),
      .done     (core_done[c]),
      .hash     (core_hash[c])
    );
  end

  // ------------------------------------------------------------- sequencer
  kstate_e      ks;
  logic [CW-1:0] cur;

  assign ap_idle    = (ks == K_IDLE);
  assign ap_ready   = (ks == K_IDLE) && ap_start;
  assign ap_done    = (ks == K_DONE);
  assign core_start = (ks == K_START);
  assign cmd_valid  = (ks == K_RD_CMD) || (ks == K_WR_CMD);
  assign cmd_write  = (ks == K_WR_CMD);
  assign cmd_addr   = (ks == K_WR_CMD) ? out_addr + 32'(cur) * OUT_STRIDE
                                       : in_addr  + 32'(cur) * REC_STRIDE;
  assign cmd_len    = (ks == K_WR_CMD) ? 8'(OUT_WORDS - 1) : 8'(REC_WORDS - 1);

  // write data: hash bytes 4w..4w+3 of the current core, little-endian word
  always_comb begin
    wr_data = '0;
    for (int b = 0; b < 4; b++)
      wr_data[8*b +: 8] = core_hash[cur][511 - 8*(4*int'(beat[3:0]) + b) -: 8];
  end

  always_ff @(posedge ap_clk) begin
    if (!ap_rst_n) begin
      ks         <= K_IDLE;
      cur        <= '0;
      finished   <= '0;
      rounds_run <= ROUNDS_DEFAULT;
      for (int c = 0; c < N_CORES; c++) begin
        pw_len[c]   <= '0;
        salt_len[c] <= '0;
        for (int k = 0; k < 64; k++) pw_buf[c][k] <= '0;
        for (int k = 0; k < 16; k++) salt_buf[c][k] <= '0;
      end
    end else begin
      unique case (ks)
        K_IDLE: if (ap_start) begin
          rounds_run <= rounds_reg;
          cur        <= '0;
          ks         <= K_RD_CMD;
        end
        K_RD_CMD: if (cmd_ready) ks <= K_RD_DATA;
        K_RD_DATA: begin
          if (rd_valid) begin
            if (beat == 8'd0)
              pw_len[cur] <= (rd_data > 32'd64) ? 7'd64 : 7'(rd_data);
            else if (beat == 8'd1)
              salt_len[cur] <= (rd_data > 32'd16) ? 5'd16 : 5'(rd_data);
            else if (beat < 8'd18)
              for (int b = 0; b < 4; b++)
                pw_buf[cur][4*(int'(beat) - 2) + b] <= rd_data[8*b +: 8];
            else if (beat < 8'd22)
              for (int b = 0; b < 4; b++)
                salt_buf[cur][4*(int'(beat) - 18) + b] <= rd_data[8*b +: 8];
          end
          if (m_done) begin
            if (32'(cur) == N_CORES - 1) ks <= K_START;
            else begin
              cur <= cur + 1'b1;
              ks  <= K_RD_CMD;
            end
          end
        end
        K_START: begin
          finished <= '0;
          ks       <= K_WAIT;
        end
        K_WAIT: begin
          if ((finished | core_done) == '1) begin
            cur <= '0;
            ks  <= K_WR_CMD;
          end
          finished <= finished | core_done;
        end
        K_WR_CMD: if (cmd_ready) ks <= K_WR_DATA;
        K_WR_DATA: if (m_done) begin
          if (32'(cur) == N_CORES - 1) ks <= K_DONE;
          else begin
            cur <= cur + 1'b1;
            ks  <= K_WR_CMD;
          end
        end
        K_DONE: ks <= K_IDLE;
        default: ks <= K_IDLE;
      endcase
    end
  end

  // All cores are started together and must all be idle then.
  a_cores_idle: assert property (@(posedge ap_clk) disable iff (!ap_rst_n)
    core_start |-> (core_busy == '0));

endmodule
