// axil_regs: AXI4-Lite register file of the packet-train tester.
//
// Software sets the train (addresses, ports, size, length), the receive filter
// enables and the delay calibration here, starts trains and measurements with
// the self-clearing CTRL bits, and reads back results, counters, the current
// time and the state of the drift correction. In software rate mode the
// processor runs the drift correction itself, as the document's 1 Gb/s
// prototype does: it reads PPS_TS at each PPS interrupt and writes the rate
// back through SW_RATE. The document connects its
// generator and receiver to the processor over AXI4-Lite; the register map
// below is this design's own.
//
//   0x00 CTRL       W  bit0 start train, bit1 arm measurement, bit2 stop (one-clock pulses)
//   0x04 STATUS     R  bit0 generator busy, bit1 measuring, bit2 results valid, bit3 PPS locked
//   0x08 DST_MAC_HI RW [15:0] = MAC[47:32]     0x0C DST_MAC_LO RW MAC[31:0]
//   0x10 SRC_MAC_HI RW                          0x14 SRC_MAC_LO RW
//   0x18 SRC_IP     RW                          0x1C DST_IP     RW
//   0x20 PORTS      RW [31:16] source, [15:0] destination UDP port
//   0x24 FRAME_SIZE RW bytes without preamble/FCS   0x28 TRAIN_LEN RW N
//   0x2C FILT_EN    RW bit0 dst MAC, bit1 src IP, bit2 dst IP, bit3 dst port
//   0x30 CAL_OFFSET RW ns (signed)              0x34 CAL_SLOPE  RW ns/byte, 16.16 signed
//   0x38 SW_RATE_HI RW bit31 software rate mode, [7:0] rate[39:32]
//   0x3C SW_RATE_LO RW rate[31:0]   (ns per clock, 8.32; used while bit31 is set)
//   0x40 RX_COUNT   R   0x44 LOST  R   0x48 OUT_OF_ORDER R
//   0x4C THR_HI R / 0x50 THR_LO R   throughput in bit/s
//   0x54 OWD_MEAN R, 0x58 OWD_MIN R, 0x5C OWD_MAX R  ns, signed, low 32 bits
//   0x60 JITTER R ns   0x64 DISPERSION R ns (low 32 bits)
//   0x68 TX_FRAMES R   0x6C RX_FRAMES R   0x70 RX_DROPPED R
//   0x74 TIME_HI R (latches TIME_LO)   0x78 TIME_LO R   ns
//   0x7C PPS_ERR R ns (signed)   0x80 RATE_HI R [7:0]   0x84 RATE_LO R  rate in use, 8.32
//   0x88 PPS_TS_HI R   0x8C PPS_TS_LO R
// Unmapped addresses read 0; writes to read-only ones are ignored. Responses
// are always OKAY.
//
// Timing: write address and data may arrive in either order or together; the
// write takes effect on the clock edge where both are held and no response is
// pending, and bvalid rises at that edge. A read is answered one clock after
// the address handshake.
module axil_regs
  import ptt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // AXI4-Lite slave
  input  logic [7:0]         s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [31:0]        s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [7:0]         s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [31:0]        s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // to the datapath
  output pkt_cfg_t           cfg,
  output filt_en_t           filt_en,
  output logic signed [31:0] cal_offset,
  output logic signed [31:0] cal_slope,
  output logic               sw_rate_en,
  output logic [RATE_W-1:0]  sw_rate,
  output logic               gen_start,
  output logic               meas_arm,
  output logic               meas_stop,
  // from the datapath
  input  logic               gen_busy,
  input  logic               meas_running,
  input  logic               res_valid,
  input  results_t           res,
  input  logic [31:0]        tx_frames,
  input  logic [31:0]        rx_frames,
  input  logic [31:0]        rx_dropped,
  input  logic [TS_W-1:0]    timestamp,
  input  logic               pps_locked,
  input  logic signed [31:0] pps_err,
  input  logic [RATE_W-1:0]  rate,
  input  logic [TS_W-1:0]    pps_ts
);

  logic        aw_held, w_held;
  logic [7:0]  awaddr_q;
  logic [31:0] wdata_q;
  logic [3:0]  wstrb_q;
  logic        do_write;
  logic [31:0] time_lo_q;
  logic [31:0] mw;

  assign s_axil_awready = !aw_held;
  assign s_axil_wready  = !w_held;
  assign s_axil_arready = !s_axil_rvalid;
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;
  assign do_write       = aw_held && w_held && !s_axil_bvalid;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] strb);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = strb[b] ? nw[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // write channel
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_held       <= 1'b0;
      w_held        <= 1'b0;
      awaddr_q      <= '0;
      wdata_q       <= '0;
      wstrb_q       <= '0;
      s_axil_bvalid <= 1'b0;
      gen_start     <= 1'b0;
      meas_arm      <= 1'b0;
      meas_stop     <= 1'b0;
      cfg.dst_mac   <= 48'h02_00_00_00_00_02;
      cfg.src_mac   <= 48'h02_00_00_00_00_01;
      cfg.src_ip    <= 32'h0A_00_00_01;
      cfg.dst_ip    <= 32'h0A_00_00_02;
      cfg.src_port  <= 16'd5000;
      cfg.dst_port  <= 16'd5001;
      cfg.frame_size <= 16'(MIN_FRAME);
      cfg.train_len <= 32'd100;
      filt_en       <= '1;
      cal_offset    <= '0;
      cal_slope     <= '0;
      sw_rate_en    <= 1'b0;
      sw_rate       <= RATE_W'(64'd10 << RATE_FRAC);
    end else begin
      gen_start <= 1'b0;
      meas_arm  <= 1'b0;
      meas_stop <= 1'b0;
      if (s_axil_awvalid && s_axil_awready) begin aw_held <= 1'b1; awaddr_q <= s_axil_awaddr; end
      if (s_axil_wvalid && s_axil_wready)   begin w_held <= 1'b1; wdata_q <= s_axil_wdata; wstrb_q <= s_axil_wstrb; end
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (do_write) begin
        aw_held       <= 1'b0;
        w_held        <= 1'b0;
        s_axil_bvalid <= 1'b1;
        unique case (awaddr_q[7:2])
          6'h00: if (wstrb_q[0]) begin
                   gen_start <= wdata_q[0];
                   meas_arm  <= wdata_q[1];
                   meas_stop <= wdata_q[2];
                 end
          6'h02: cfg.dst_mac[47:32] <= mw[15:0];
          6'h03: cfg.dst_mac[31:0]  <= mw;
          6'h04: cfg.src_mac[47:32] <= mw[15:0];
          6'h05: cfg.src_mac[31:0]  <= mw;
          6'h06: cfg.src_ip         <= mw;
          6'h07: cfg.dst_ip         <= mw;
          6'h08: {cfg.src_port, cfg.dst_port} <= mw;
          6'h09: cfg.frame_size     <= mw[15:0];
          6'h0A: cfg.train_len      <= mw;
          6'h0B: filt_en            <= mw[3:0];
          6'h0C: cal_offset         <= mw;
          6'h0D: cal_slope          <= mw;
          6'h0E: begin sw_rate_en <= mw[31]; sw_rate[RATE_W-1:32] <= mw[RATE_W-33:0]; end
          6'h0F: sw_rate[31:0]      <= mw;
          default: ;
        endcase
      end
    end
  end

  // register contents by word address
  function automatic logic [31:0] reg_word(input logic [5:0] a);
    logic [31:0] rd;
    unique case (a)
      6'h01: rd = {28'h0, pps_locked, res_valid, meas_running, gen_busy};
      6'h02: rd = {16'h0, cfg.dst_mac[47:32]};
      6'h03: rd = cfg.dst_mac[31:0];
      6'h04: rd = {16'h0, cfg.src_mac[47:32]};
      6'h05: rd = cfg.src_mac[31:0];
      6'h06: rd = cfg.src_ip;
      6'h07: rd = cfg.dst_ip;
      6'h08: rd = {cfg.src_port, cfg.dst_port};
      6'h09: rd = {16'h0, cfg.frame_size};
      6'h0A: rd = cfg.train_len;
      6'h0B: rd = {28'h0, filt_en};
      6'h0C: rd = cal_offset;
      6'h0D: rd = cal_slope;
      6'h0E: rd = {sw_rate_en, 23'h0, sw_rate[RATE_W-1:32]};
      6'h0F: rd = sw_rate[31:0];
      6'h10: rd = res.rx_count;
      6'h11: rd = res.lost;
      6'h12: rd = res.out_of_order;
      6'h13: rd = res.throughput_bps[63:32];
      6'h14: rd = res.throughput_bps[31:0];
      6'h15: rd = res.owd_mean[31:0];
      6'h16: rd = res.owd_min[31:0];
      6'h17: rd = res.owd_max[31:0];
      6'h18: rd = res.jitter_mean[31:0];
      6'h19: rd = res.dispersion[31:0];
      6'h1A: rd = tx_frames;
      6'h1B: rd = rx_frames;
      6'h1C: rd = rx_dropped;
      6'h1D: rd = timestamp[63:32];
      6'h1E: rd = time_lo_q;
      6'h1F: rd = pps_err;
      6'h20: rd = {24'h0, rate[RATE_W-1:32]};
      6'h21: rd = rate[31:0];
      6'h22: rd = pps_ts[63:32];
      6'h23: rd = pps_ts[31:0];
      default: rd = '0;
    endcase
    return rd;
  endfunction

  // write data merged with the current contents under the byte strobes
  always_comb mw = merge(reg_word(awaddr_q[7:2]), wdata_q, wstrb_q);

  // read channel
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      time_lo_q     <= '0;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (s_axil_arvalid && s_axil_arready) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rdata  <= reg_word(s_axil_araddr[7:2]);
        if (s_axil_araddr[7:2] == 6'h1D) time_lo_q <= timestamp[31:0];
      end
    end
  end

  // AXI rule: a response, once valid, stays valid until taken
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata));

endmodule
