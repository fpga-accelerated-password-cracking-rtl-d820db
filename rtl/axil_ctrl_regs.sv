// axil_ctrl_regs: AXI4-Lite slave holding the kernel's control registers
// (the s_axi_control port of the kernel) and driving its interrupt line.
// Register map: see kernel_pkg.
//
// Writes: the address and data channels are accepted independently, one of
// each is held, and the register is written once both are present; the
// write response follows in the next cycle. Reads answer one cycle after the
// address is accepted. Only one transaction per direction is outstanding.
// Byte strobes are honoured for the address and round registers.
// Kernel side: `ap_start` is a level that the kernel acknowledges with a
// one-cycle `ap_ready`; `ap_done` is a one-cycle pulse that sets the done
// bit and the interrupt status; `ap_idle` is read back as is.
// `bus_err` pulses set the sticky STATUS error bit.
// `interrupt` = GIE & IER[0] & ISR[0]. Synchronous active-low reset.
// The start/done/idle/ready handshake mirrors the control protocol of the
// high-level-synthesis kernel of the published design; the exact register
// behaviour is this design's choice.
module axil_ctrl_regs
  import kernel_pkg::*;
#(
  parameter logic [31:0] ROUNDS_DEFAULT = 32'd5000
) (
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [CTRL_AW-1:0] s_axi_awaddr,
  input  logic               s_axi_awvalid,
  output logic               s_axi_awready,
  input  logic [31:0]        s_axi_wdata,
  input  logic [3:0]         s_axi_wstrb,
  input  logic               s_axi_wvalid,
  output logic               s_axi_wready,
  output logic [1:0]         s_axi_bresp,
  output logic               s_axi_bvalid,
  input  logic               s_axi_bready,
  input  logic [CTRL_AW-1:0] s_axi_araddr,
  input  logic               s_axi_arvalid,
  output logic               s_axi_arready,
  output logic [31:0]        s_axi_rdata,
  output logic [1:0]         s_axi_rresp,
  output logic               s_axi_rvalid,
  input  logic               s_axi_rready,
  // kernel side
  output logic               ap_start,
  input  logic               ap_ready,
  input  logic               ap_done,
  input  logic               ap_idle,
  input  logic               bus_err,
  output logic [31:0]        in_addr,
  output logic [31:0]        out_addr,
  output logic [31:0]        rounds,
  output logic               interrupt
);

  logic               aw_full, w_full;
  logic [CTRL_AW-1:0] aw_addr;
  logic [31:0]        w_data;
  logic [3:0]         w_strb;
  logic               done_bit, ready_bit, gie, ier, isr, err_bit;

  assign s_axi_awready = !aw_full && !s_axi_bvalid;
  assign s_axi_wready  = !w_full && !s_axi_bvalid;
  assign s_axi_arready = !s_axi_rvalid;
  assign s_axi_bresp   = AXI_RESP_OKAY;
  assign s_axi_rresp   = AXI_RESP_OKAY;
  assign interrupt     = gie && ier && isr;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d, logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? d[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  logic do_write;
  assign do_write = aw_full && w_full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_full      <= 1'b0;
      w_full       <= 1'b0;
      aw_addr      <= '0;
      w_data       <= '0;
      w_strb       <= '0;
      s_axi_bvalid <= 1'b0;
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= '0;
      ap_start     <= 1'b0;
      done_bit     <= 1'b0;
      ready_bit    <= 1'b0;
      gie          <= 1'b0;
      ier          <= 1'b0;
      isr          <= 1'b0;
      err_bit      <= 1'b0;
      in_addr      <= '0;
      out_addr     <= '0;
      rounds       <= ROUNDS_DEFAULT;
    end else begin
      // kernel events
      if (ap_ready) ap_start <= 1'b0;
      ready_bit <= ap_ready;
      if (ap_done) begin
        done_bit <= 1'b1;
        if (ier) isr <= 1'b1;
      end

      // write channel
      if (s_axi_awvalid && s_axi_awready) begin
        aw_full <= 1'b1;
        aw_addr <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_full <= 1'b1;
        w_data <= s_axi_wdata;
        w_strb <= s_axi_wstrb;
      end
      if (do_write) begin
        aw_full      <= 1'b0;
        w_full       <= 1'b0;
        s_axi_bvalid <= 1'b1;
        unique case ({aw_addr[CTRL_AW-1:2], 2'b00})
          REG_AP_CTRL:  if (w_strb[0] && w_data[0]) ap_start <= 1'b1;
          REG_GIE:      if (w_strb[0]) gie <= w_data[0];
          REG_IER:      if (w_strb[0]) ier <= w_data[0];
          REG_ISR:      if (w_strb[0] && w_data[0]) isr <= 1'b0;
          REG_IN_ADDR:  in_addr  <= merge(in_addr,  w_data, w_strb);
          REG_OUT_ADDR: out_addr <= merge(out_addr, w_data, w_strb);
          REG_ROUNDS:   rounds   <= merge(rounds,   w_data, w_strb);
          REG_STATUS:   if (w_strb[0] && w_data[0]) err_bit <= 1'b0;
          default: ;
        endcase
      end
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 1'b0;
      if (bus_err) err_bit <= 1'b1;

      // read channel
      if (s_axi_arvalid && s_axi_arready) begin
        s_axi_rvalid <= 1'b1;
        unique case ({s_axi_araddr[CTRL_AW-1:2], 2'b00})
          REG_AP_CTRL: begin
            s_axi_rdata <= {28'd0, ready_bit, ap_idle, done_bit, ap_start};
            if (!ap_done) done_bit <= 1'b0;      // clear on read
          end
          REG_GIE:      s_axi_rdata <= {31'd0, gie};
          REG_IER:      s_axi_rdata <= {31'd0, ier};
          REG_ISR:      s_axi_rdata <= {31'd0, isr};
          REG_IN_ADDR:  s_axi_rdata <= in_addr;
          REG_OUT_ADDR: s_axi_rdata <= out_addr;
          REG_ROUNDS:   s_axi_rdata <= rounds;
          REG_STATUS:   s_axi_rdata <= {31'd0, err_bit};
          default:      s_axi_rdata <= '0;
        endcase
      end
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 1'b0;
    end
  end

  // AXI rule: a response, once offered, stays until it is taken.
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
    s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata));

endmodule
