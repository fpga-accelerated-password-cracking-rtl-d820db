// axi_burst_master: AXI4 memory master of the kernel (its m_axi_gmem port)
// that performs one INCR burst of 32-bit words per command.
//
// Command side: `cmd_valid`/`cmd_ready` handshake with `cmd_write`,
// `cmd_addr` (byte address, word aligned, the burst must not cross a 4 KB
// boundary) and `cmd_len` (beats - 1, as AXI's AxLEN). A read delivers each
// beat on `rd_valid` with `rd_data` and its index `beat`; the master always
// accepts read data (RREADY high during the burst). A write takes its data
// combinationally from `wr_data` for the beat index `beat`. `done` pulses
// for one cycle after the last read beat or the write response, and `err`
// is high with it if any response was not OKAY.
// One transaction at a time: AR then R, or AW then W then B; AWVALID and
// WVALID are not overlapped. Synchronous active-low reset.
// The port's existence and its use for the shared DDR buffers follow the
// published design; the burst engine itself is this design's choice.
module axi_burst_master
  import kernel_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // command
  input  logic        cmd_valid,
  output logic        cmd_ready,
  input  logic        cmd_write,
  input  logic [31:0] cmd_addr,
  input  logic [7:0]  cmd_len,
  output logic [7:0]  beat,
  output logic        rd_valid,
  output logic [31:0] rd_data,
  input  logic [31:0] wr_data,
  output logic        done,
  output logic        err,
  // AXI4 master
  output logic [31:0] m_axi_awaddr,
  output logic [7:0]  m_axi_awlen,
  output logic [2:0]  m_axi_awsize,
  output logic [1:0]  m_axi_awburst,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wlast,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready,
  output logic [31:0] m_axi_araddr,
  output logic [7:0]  m_axi_arlen,
  output logic [2:0]  m_axi_arsize,
  output logic [1:0]  m_axi_arburst,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rlast,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready
);

  typedef enum logic [2:0] {M_IDLE, M_AR, M_R, M_AW, M_W, M_B} mstate_e;

  mstate_e     ms;
  logic [31:0] addr;
  logic [7:0]  len;
  logic        err_acc;

  assign cmd_ready     = (ms == M_IDLE);
  assign m_axi_araddr  = addr;
  assign m_axi_arlen   = len;
  assign m_axi_arsize  = AXI_SIZE_4B;
  assign m_axi_arburst = AXI_BURST_INCR;
  assign m_axi_arvalid = (ms == M_AR);
  assign m_axi_rready  = (ms == M_R);
  assign m_axi_awaddr  = addr;
  assign m_axi_awlen   = len;
  assign m_axi_awsize  = AXI_SIZE_4B;
  assign m_axi_awburst = AXI_BURST_INCR;
  assign m_axi_awvalid = (ms == M_AW);
  assign m_axi_wvalid  = (ms == M_W);
  assign m_axi_wdata   = wr_data;
  assign m_axi_wstrb   = 4'hF;
  assign m_axi_wlast   = (ms == M_W) && (beat == len);
  assign m_axi_bready  = (ms == M_B);
  assign rd_valid      = (ms == M_R) && m_axi_rvalid;
  assign rd_data       = m_axi_rdata;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ms      <= M_IDLE;
      addr    <= '0;
      len     <= '0;
      beat    <= '0;
      done    <= 1'b0;
      err     <= 1'b0;
      err_acc <= 1'b0;
    end else begin
      done <= 1'b0;
      err  <= 1'b0;
      unique case (ms)
        M_IDLE: if (cmd_valid) begin
          addr    <= cmd_addr;
          len     <= cmd_len;
          beat    <= '0;
          err_acc <= 1'b0;
          ms      <= cmd_write ? M_AW : M_AR;
        end
        M_AR: if (m_axi_arready) ms <= M_R;
        M_R: if (m_axi_rvalid) begin
          beat <= beat + 8'd1;
          if (m_axi_rresp != AXI_RESP_OKAY) err_acc <= 1'b1;
          if (m_axi_rlast) begin
            done <= 1'b1;
            err  <= err_acc || (m_axi_rresp != AXI_RESP_OKAY);
            ms   <= M_IDLE;
          end
        end
        M_AW: if (m_axi_awready) ms <= M_W;
        M_W: if (m_axi_wready) begin
          beat <= beat + 8'd1;
          if (beat == len) ms <= M_B;
        end
        M_B: if (m_axi_bvalid) begin
          done <= 1'b1;
          err  <= (m_axi_bresp != AXI_RESP_OKAY);
          ms   <= M_IDLE;
        end
        default: ms <= M_IDLE;
      endcase
    end
  end

  // AXI rules for the master's own outputs
  a_ar_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_arvalid && !m_axi_arready |=> m_axi_arvalid && $stable(m_axi_araddr));
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_awvalid && !m_axi_awready |=> m_axi_awvalid && $stable(m_axi_awaddr));
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_axi_wvalid && !m_axi_wready |=> m_axi_wvalid);
  a_no_4k_cross: assert property (@(posedge clk) disable iff (!rst_n)
    cmd_valid && cmd_ready |-> ((cmd_addr[11:0] + 13'({cmd_len, 2'b00})) < 13'd4096));

endmodule
