// tb_packet_train_tester_10g: the tester in its 10 Gb/s arrangement (256-bit
// stream at 156.25 MHz, 6.4 ns per clock) running the whole evaluation at
// 10 Gb/s: trains of 100 and 1000 frames of 60 to 1514 bytes through a link
// model with 3 us of latency. Every train must arrive complete, read the
// theoretical throughput 1e10 * S / (S + 24) within 0.5 % and a delay within
// 20 ns of the link's. The rate 6.4 ns is rounded to the counter's 2^-32 ns
// step. One PPS pulse is given to see the interrupt.
module tb_packet_train_tester_10g;
  import ptt_pkg::*;

  localparam int  DATA_W       = 256;
  localparam real LINK_BPS     = 1.0e10;
  localparam int  LAT_NS       = 3000;
  localparam int  PS_PER_BYTE  = 800;
  localparam real CLK_NS       = 6.4;
  localparam real OWD_SLACK_NS = 20.0;
  localparam real THR_TOL      = 0.005;

  logic clk = 0, rst_n = 0;
  always #3.2 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] awaddr = 0, araddr = 0; logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0; logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid; logic [1:0] bresp, rresp; logic [31:0] rdata;
  logic [DATA_W-1:0] txd, rxd; logic [DATA_W/8-1:0] txk, rxk;
  logic txv, txl, txr, rxv, rxl, rxr;
  logic pps_in = 0, pps_irq;
  int stalls, frames_in, ldropped, lcorrupted, lswapped, irqs = 0;

  packet_train_tester #(.DATA_W(DATA_W), .NOMINAL_NS_Q32(RATE_W'(64'd27487790694))) dut (
    .clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axis_tx_tdata(txd), .m_axis_tx_tkeep(txk), .m_axis_tx_tvalid(txv), .m_axis_tx_tlast(txl),
    .m_axis_tx_tready(txr),
    .s_axis_rx_tdata(rxd), .s_axis_rx_tkeep(rxk), .s_axis_rx_tvalid(rxv), .s_axis_rx_tlast(rxl),
    .s_axis_rx_tready(rxr),
    .pps_in, .pps_irq);

  ptt_link_model #(.DATA_W(DATA_W), .CLK_PS(6400), .PS_PER_BYTE(PS_PER_BYTE), .LATENCY_NS(LAT_NS)) link (
    .clk, .rst_n, .tx_tdata(txd), .tx_tkeep(txk), .tx_tvalid(txv), .tx_tlast(txl), .tx_tready(txr),
    .rx_tdata(rxd), .rx_tkeep(rxk), .rx_tvalid(rxv), .rx_tlast(rxl),
    .drop_seq(-1), .corrupt_seq(-1), .swap_seq(-1), .stalls, .frames_in, .dropped(ldropped),
    .corrupted(lcorrupted), .swapped(lswapped));

  `include "ptt_tb_tasks.svh"
  `include "ptt_workloads.svh"

  always @(posedge clk) if (rst_n && pps_irq) irqs++;

  initial begin
    #(64'd10 * 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    pps_in <= 1;
    run_workloads(n);
    pps_in <= 0;
    check(n == 14, $sformatf("%0d of 14 workloads run", n));
    check(irqs == 1, $sformatf("PPS interrupts %0d", irqs));
    check(stalls > 0, "MAC back-pressure happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
