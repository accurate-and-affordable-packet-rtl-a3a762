// tb_packet_train_tester: end-to-end test of the packet-train tester (1 Gb/s).
//
// The tester (32-bit stream, 100 MHz, 10 ns per clock) sends trains through
// a behavioural link model back into its own receiver, as in a loopback or
// through a switch, and is driven only over AXI4-Lite. The GPS PPS is
// shortened to a nominal 100 us (PPS_PERIOD_NS = 100000) so the drift loop
// can be seen: the test's PPS comes every 10030 clocks, i.e. the oscillator
// is 3000 ppm fast, and GAIN_SHIFT = 18 scales the loop for 1e4 clocks per
// period. Link latency is 1000 ns at 8 ns per byte.
//   1. 100 frames of 60 B: throughput must be 1e9*60/84 within 1 %, the mean
//      delay (60+8)*8 + 1000 ns plus up to 30 ns of pipeline, no loss.
//   2. 20 frames of 1514 B with one frame lost, one with a wrong UDP port
//      (filtered) and one delivered out of order; ended by the stop bit:
//      17 received, 3 lost, 1 out of order, 1 dropped by the filter.
//   3. 50 frames of 64 B with a calibration offset of 1000 ns and slope
//      8 ns/B: the calibrated delay must be near 64 ns (= 1576 - 1000 - 512).
//   4. The PPS error must settle within 2 ns and the lock bit rise.
//   5. In software rate mode a written rate of 20 ns per clock must drive the
//      time; clearing the mode must return to the logic loop.
// Each mechanism (back-pressure from the MAC, filter drop, loss, reordering,
// stop, calibration, PPS interrupt, drift correction, software rate) is
// counted and must occur at least once.
module tb_packet_train_tester;
  import ptt_pkg::*;

  localparam int DATA_W = 32;
  localparam int LAT_NS = 1000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] awaddr = 0, araddr = 0; logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0; logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid; logic [1:0] bresp, rresp; logic [31:0] rdata;
  logic [DATA_W-1:0] txd, rxd; logic [DATA_W/8-1:0] txk, rxk;
  logic txv, txl, txr, rxv, rxl, rxr;
  logic pps_in = 0, pps_irq;
  int drop_seq = -1, corrupt_seq = -1, swap_seq = -1;
  int stalls, frames_in, ldropped, lcorrupted, lswapped, irqs = 0;

  packet_train_tester #(.DATA_W(DATA_W), .PPS_PERIOD_NS(100_000), .GAIN_SHIFT(18)) dut (
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

  ptt_link_model #(.DATA_W(DATA_W), .CLK_PS(10_000), .PS_PER_BYTE(8_000), .LATENCY_NS(LAT_NS)) link (
    .clk, .rst_n, .tx_tdata(txd), .tx_tkeep(txk), .tx_tvalid(txv), .tx_tlast(txl), .tx_tready(txr),
    .rx_tdata(rxd), .rx_tkeep(rxk), .rx_tvalid(rxv), .rx_tlast(rxl),
    .drop_seq, .corrupt_seq, .swap_seq, .stalls, .frames_in, .dropped(ldropped),
    .corrupted(lcorrupted), .swapped(lswapped));

  `include "ptt_tb_tasks.svh"

  // GPS PPS, 3000 ppm slow against the local clock
  initial begin
    @(posedge rst_n);
    forever begin
      repeat (10_020) @(posedge clk);
      pps_in <= 1;
      repeat (10) @(posedge clk);
      pps_in <= 0;
    end
  end
  always @(posedge clk) if (rst_n && pps_irq) irqs++;

  initial begin
    #(10 * 400_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, rxc, lost, ooo, rxdrop, st;
    logic [63:0] thr, rate, t1, t2;
    int owd, jit;
    bit ok;
    int n_stall, n_filter, n_loss, n_ooo, n_stop, n_cal, n_irq, n_drift, n_sw;
    real exp_thr;

    repeat (5) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);

    // ---- 1: clean train of 100 x 60 B ----
    start_train(60, 100);
    wait_results(100_000, ok);
    check(ok, "train 1 finished");
    axil_read(8'h40, rxc); axil_read(8'h44, lost); axil_read64(8'h4C, thr);
    axil_read(8'h54, d); owd = int'(d); axil_read(8'h60, d); jit = int'(d);
    exp_thr = 1.0e9 * 60.0 / 84.0;
    check(rxc == 100 && lost == 0, $sformatf("train 1: %0d received, %0d lost", rxc, lost));
    check(real'(thr) > 0.99 * exp_thr && real'(thr) < 1.01 * exp_thr,
          $sformatf("train 1 throughput %0d, theory %0.0f", thr, exp_thr));
    check(owd >= (60 + 8) * 8 + LAT_NS && owd <= (60 + 8) * 8 + LAT_NS + 30,
          $sformatf("train 1 mean delay %0d ns", owd));
    check(jit <= 10, $sformatf("train 1 jitter %0d ns", jit));
    $display("train 1: throughput %0d bit/s, delay %0d ns, jitter %0d ns", thr, owd, jit);
    axil_read(8'h68, d);
    check(d == 100, $sformatf("tx frames %0d", d));
    n_stall = stalls;

    // ---- 2: 20 x 1514 B with loss, filter drop and reordering, ended by stop ----
    drop_seq = 5; corrupt_seq = 9; swap_seq = 12;
    start_train(1514, 20);
    repeat (20 * 1300 + 400) @(posedge clk);
    axil_read(8'h04, st);
    check(st[1] && !st[2], "train 2 still measuring before stop");
    axil_write(8'h00, 32'h4);   // stop
    wait_results(2000, ok);
    check(ok, "train 2 finished after stop");
    axil_read(8'h40, rxc); axil_read(8'h44, lost); axil_read(8'h48, ooo); axil_read(8'h70, rxdrop);
    check(rxc == 18 && lost == 2, $sformatf("train 2: %0d received, %0d lost", rxc, lost));
    check(ooo == 1, $sformatf("train 2 out of order %0d", ooo));
    check(rxdrop == 1, $sformatf("train 2 filtered %0d", rxdrop));
    n_stop = ok; n_loss = lost; n_ooo = ooo; n_filter = rxdrop;
    drop_seq = -1; corrupt_seq = -1; swap_seq = -1;

    // ---- 3: calibrated delay ----
    axil_write(8'h30, 32'(LAT_NS));
    axil_write(8'h34, 32'(8 << 16));
    start_train(64, 50);
    wait_results(100_000, ok);
    check(ok, "train 3 finished");
    axil_read(8'h54, d); owd = int'(d);
    check(owd >= 8 * 8 && owd <= 8 * 8 + 30, $sformatf("train 3 calibrated delay %0d ns", owd));
    n_cal = (owd < LAT_NS);
    axil_write(8'h30, 0); axil_write(8'h34, 0);

    // ---- 4: drift correction ----
    while (irqs < 14) @(posedge clk);
    repeat (10) @(posedge clk);
    axil_read(8'h7C, d);
    check($signed(d) >= -2 && $signed(d) <= 2, $sformatf("PPS error %0d ns", $signed(d)));
    axil_read(8'h04, st);
    check(st[3], "PPS locked");
    axil_read64(8'h80, rate);
    check(rate < (64'd10 << 32) && real'(rate) / 2.0**32 > 9.96, $sformatf("rate %f ns/clock", real'(rate) / 2.0**32));
    n_irq = irqs; n_drift = (rate != (64'd10 << 32));

    // ---- 5: hybrid mode, software writes the rate (20 ns per clock) ----
    axil_write(8'h3C, 32'h0);
    axil_write(8'h38, 32'h8000_0014);
    axil_read64(8'h74, t1);
    repeat (1000) @(posedge clk);
    axil_read64(8'h74, t2);
    check(t2 - t1 >= 20 * 1000 && t2 - t1 <= 20 * 1100, $sformatf("software rate: %0d ns in 1000+ clocks", t2 - t1));
    axil_write(8'h38, 32'h0000_0014);
    axil_read64(8'h80, rate);
    check(rate < (64'd10 << 32), "back to the hardware loop");
    n_sw = (t2 - t1 >= 20 * 1000);

    $display("mechanisms: stalls=%0d filter=%0d loss=%0d ooo=%0d stop=%0d cal=%0d pps=%0d drift=%0d swrate=%0d",
             n_stall, n_filter, n_loss, n_ooo, n_stop, n_cal, n_irq, n_drift, n_sw);
    check(n_stall > 0, "MAC back-pressure happened");
    check(n_filter > 0, "filter drop happened");
    check(n_loss > 0, "loss happened");
    check(n_ooo > 0, "reordering happened");
    check(n_stop > 0, "stop-ended measurement happened");
    check(n_cal > 0, "calibration applied");
    check(n_irq > 0, "PPS interrupt happened");
    check(n_drift > 0, "drift correction changed the rate");
    check(n_sw > 0, "software rate mode used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
