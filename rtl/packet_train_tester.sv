// packet_train_tester: FPGA packet-train tester for throughput, delay, jitter and loss.
//
// A packet train is N frames sent back-to-back through a device or network
// path; the spacing of the frames at the far end (their dispersion) gives the
// path's capacity, and timestamps and sequence numbers in the frames give the
// one-way delay, its jitter and the loss. Doing this in logic lets both
// timestamps be taken within a clock of the MAC, which software cannot do at
// multi-Gb/s rates.
//
// Structure (the 1 Gb/s FPGA SoC arrangement of the document, with the
// parameter calculation and drift correction in logic):
//   timestamp_counter  variable-rate ns counter, PPS capture and interrupt
//   drift_correction   trims the counter rate from the PPS error sum; software
//                      may instead write the rate itself (hybrid mode)
//   packet_generator   sends the train on m_axis_tx (to the TX MAC)
//   packet_receiver    timestamps and filters frames from s_axis_rx (RX MAC)
//   net_params_calc    throughput, delay (calibrated), jitter, loss
//   axil_regs          AXI4-Lite registers for the processor
// Transmit and receive use the same clock and the same time counter, so a
// loopback or a device under test between m_axis_tx and s_axis_rx is measured
// directly; two testers in different places agree on time through their GPS
// PPS inputs.
//
// Defaults: 32-bit stream at 100 MHz with 10 ns per clock (the document's
// 1 Gb/s prototype). DATA_W = 256 with NOMINAL_NS_Q32 = 6.4 ns * 2^32 is the
// 10 Gb/s arrangement at 156.25 MHz. The MACs, PHYs, GPS receiver and the
// processor are outside this module.
module packet_train_tester
  import ptt_pkg::*;
#(
  parameter int unsigned       DATA_W         = 32,
  parameter logic [RATE_W-1:0] NOMINAL_NS_Q32 = RATE_W'(64'd10 << RATE_FRAC),
  parameter int unsigned       PPS_PERIOD_NS  = 1_000_000_000,
  parameter int unsigned       GAIN_SHIFT     = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave (processor)
  input  logic [7:0]          s_axil_awaddr,
  input  logic                s_axil_awvalid,
  output logic                s_axil_awready,
  input  logic [31:0]         s_axil_wdata,
  input  logic [3:0]          s_axil_wstrb,
  input  logic                s_axil_wvalid,
  output logic                s_axil_wready,
  output logic [1:0]          s_axil_bresp,
  output logic                s_axil_bvalid,
  input  logic                s_axil_bready,
  input  logic [7:0]          s_axil_araddr,
  input  logic                s_axil_arvalid,
  output logic                s_axil_arready,
  output logic [31:0]         s_axil_rdata,
  output logic [1:0]          s_axil_rresp,
  output logic                s_axil_rvalid,
  input  logic                s_axil_rready,
  // AXI4-Stream to the transmit MAC
  output logic [DATA_W-1:0]   m_axis_tx_tdata,
  output logic [DATA_W/8-1:0] m_axis_tx_tkeep,
  output logic                m_axis_tx_tvalid,
  output logic                m_axis_tx_tlast,
  input  logic                m_axis_tx_tready,
  // AXI4-Stream from the receive MAC
  input  logic [DATA_W-1:0]   s_axis_rx_tdata,
  input  logic [DATA_W/8-1:0] s_axis_rx_tkeep,
  input  logic                s_axis_rx_tvalid,
  input  logic                s_axis_rx_tlast,
  output logic                s_axis_rx_tready,
  // GPS
  input  logic                pps_in,
  output logic                pps_irq
);

  pkt_cfg_t           cfg;
  filt_en_t           filt_en;
  logic signed [31:0] cal_offset, cal_slope;
  logic               gen_start, meas_arm, meas_stop;
  logic               gen_busy, gen_done;
  logic [31:0]        tx_frames, rx_frames, rx_dropped;
  logic [TS_W-1:0]    timestamp, pps_ts;
  logic [RATE_W-1:0]  rate, hw_rate, sw_rate;
  logic               sw_rate_en;
  logic signed [31:0] pps_err;
  logic               pps_locked;
  logic               rec_valid;
  rx_rec_t            rec;
  results_t           res;
  logic               res_valid, res_done, meas_running;

  timestamp_counter u_ts (
    .clk, .rst_n, .rate, .pps_in, .timestamp, .pps_irq, .pps_ts
  );

  drift_correction #(
    .NOMINAL(NOMINAL_NS_Q32), .PPS_PERIOD_NS(PPS_PERIOD_NS), .GAIN_SHIFT(GAIN_SHIFT)
  ) u_drift (
    .clk, .rst_n, .pps_irq, .pps_ts, .rate(hw_rate), .last_err(pps_err), .locked(pps_locked)
  );

  // rate from the logic loop, or from software in the hybrid mode
  assign rate = sw_rate_en ? sw_rate : hw_rate;

  packet_generator #(.DATA_W(DATA_W)) u_gen (
    .clk, .rst_n, .cfg, .start(gen_start), .timestamp,
    .m_axis_tdata(m_axis_tx_tdata), .m_axis_tkeep(m_axis_tx_tkeep),
    .m_axis_tvalid(m_axis_tx_tvalid), .m_axis_tlast(m_axis_tx_tlast),
    .m_axis_tready(m_axis_tx_tready),
    .busy(gen_busy), .done(gen_done), .sent_frames(tx_frames)
  );

  packet_receiver #(.DATA_W(DATA_W)) u_rx (
    .clk, .rst_n,
    .s_axis_tdata(s_axis_rx_tdata), .s_axis_tkeep(s_axis_rx_tkeep),
    .s_axis_tvalid(s_axis_rx_tvalid), .s_axis_tlast(s_axis_rx_tlast),
    .s_axis_tready(s_axis_rx_tready),
    .timestamp, .cfg, .filt_en, .rec_valid, .rec, .rx_frames, .rx_dropped
  );

  net_params_calc u_calc (
    .clk, .rst_n, .arm(meas_arm), .stop(meas_stop), .train_len(cfg.train_len),
    .cal_offset, .cal_slope, .rec_valid, .rec,
    .res, .res_valid, .done(res_done), .running(meas_running)
  );

  axil_regs u_regs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .cfg, .filt_en, .cal_offset, .cal_slope, .sw_rate_en, .sw_rate,
    .gen_start, .meas_arm, .meas_stop,
    .gen_busy, .meas_running, .res_valid, .res,
    .tx_frames, .rx_frames, .rx_dropped,
    .timestamp, .pps_locked, .pps_err, .rate, .pps_ts
  );

endmodule
