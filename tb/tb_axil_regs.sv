// tb_axil_regs: self-checking test of the AXI4-Lite register file.
//
// Writes every configuration register through the bus (address and data
// together, address first, data first), reads them back, checks that the
// values reach the cfg/filter/calibration outputs, that byte strobes merge,
// that CTRL bits give one-clock pulses, that the software rate is set, that read-only registers show their
// inputs, that TIME_LO is the value latched by the TIME_HI read and that
// unmapped addresses read 0. Responses are checked to wait for bready/rready.
module tb_axil_regs;
  import ptt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [7:0] awaddr = 0, araddr = 0; logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = 0; logic [3:0] wstrb = 0;
  logic awready, wready, bvalid, arready, rvalid; logic [1:0] bresp, rresp; logic [31:0] rdata;
  pkt_cfg_t cfg; filt_en_t filt_en; logic signed [31:0] cal_offset, cal_slope;
  logic gen_start, meas_arm, meas_stop, sw_rate_en; logic [RATE_W-1:0] sw_rate;
  results_t res; logic [TS_W-1:0] timestamp, pps_ts; logic [RATE_W-1:0] rate;

  axil_regs dut (.clk, .rst_n,
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .cfg, .filt_en, .cal_offset, .cal_slope, .sw_rate_en, .sw_rate, .gen_start, .meas_arm, .meas_stop,
    .gen_busy(1'b1), .meas_running(1'b0), .res_valid(1'b1), .res,
    .tx_frames(32'd11), .rx_frames(32'd22), .rx_dropped(32'd33),
    .timestamp, .pps_locked(1'b1), .pps_err(-32'sd7), .rate, .pps_ts);

  always_ff @(posedge clk) timestamp <= rst_n ? timestamp + 10 : 64'h0000_0001_FFFF_FF00;

  int starts, arms, stops;
  always @(posedge clk) if (rst_n) begin starts += int'(gen_start); arms += int'(meas_arm); stops += int'(meas_stop); end

  // order: 0 together, 1 address one clock before data, 2 data one clock before address
  task automatic wr(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s, input int order);
    bit aw_done, w_done;
    @(negedge clk);
    if (order != 2) begin awaddr = a; awvalid = 1; end
    if (order != 1) begin wdata = d; wstrb = s; wvalid = 1; end
    aw_done = 0; w_done = 0;
    while (!(aw_done && w_done)) begin
      @(posedge clk);
      if (awvalid && awready) aw_done = 1;
      if (wvalid && wready)   w_done = 1;
      @(negedge clk);
      if (aw_done) awvalid = 0;
      if (w_done)  wvalid = 0;
      if (order == 1 && !w_done) begin wdata = d; wstrb = s; wvalid = 1; end
      if (order == 2 && !aw_done) begin awaddr = a; awvalid = 1; end
    end
  endtask

  task automatic wait_b(input int delay);
    repeat (delay) @(negedge clk);
    while (!bvalid) @(negedge clk);
    check(bresp == 2'b00, "bresp OKAY");
    bready = 1;
    @(negedge clk) bready = 0;
  endtask

  task automatic w(input logic [7:0] a, input logic [31:0] d, input logic [3:0] s = 4'hF, input int order = 0);
    wr(a, d, s, order);
    wait_b($urandom % 3);
  endtask

  task automatic r(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk) araddr = a; arvalid = 1;
    @(posedge clk iff arready);
    @(negedge clk) arvalid = 0;
    repeat ($urandom % 3) begin @(negedge clk); check(rvalid, "rvalid held until rready"); end
    while (!rvalid) @(negedge clk);
    d = rdata;
    check(rresp == 2'b00, "rresp OKAY");
    rready = 1;
    @(negedge clk) rready = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, hi;
    res = '0;
    res.rx_count = 100; res.lost = 2; res.out_of_order = 3; res.throughput_bps = 64'h0000_0001_2345_6789;
    res.owd_mean = -64'sd12; res.owd_min = 64'sd5; res.owd_max = 64'sd9; res.jitter_mean = 4; res.dispersion = 1234;
    rate = 40'hAB_1234_5678; pps_ts = 64'h0000_0042_0000_0099;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    r(8'h24, d); check(d == 60, $sformatf("reset frame size %0d", d));
    r(8'h28, d); check(d == 100, $sformatf("reset train length %0d", d));
    w(8'h08, 32'h0000_0A1B, 4'hF, 0);
    w(8'h0C, 32'h2C3D_4E5F, 4'hF, 1);
    w(8'h10, 32'h0000_0011, 4'hF, 2);
    w(8'h14, 32'h2233_4455);
    w(8'h18, 32'hC0A8_0101);
    w(8'h1C, 32'hC0A8_0202);
    w(8'h20, {16'd1234, 16'd4321});
    w(8'h24, 32'd1514);
    w(8'h28, 32'd1000);
    w(8'h2C, 32'h5);
    w(8'h30, -32'sd918);
    w(8'h34, 32'd327949);
    check(cfg.dst_mac == 48'h0A1B_2C3D_4E5F && cfg.src_mac == 48'h0011_2233_4455, "MACs reach cfg");
    check(cfg.src_ip == 32'hC0A8_0101 && cfg.dst_ip == 32'hC0A8_0202, "IPs reach cfg");
    check(cfg.src_port == 1234 && cfg.dst_port == 4321, "ports reach cfg");
    check(cfg.frame_size == 1514 && cfg.train_len == 1000, "size and length reach cfg");
    check(filt_en == 4'h5 && cal_offset == -918 && cal_slope == 327949, "filter and calibration");
    r(8'h0C, d); check(d == 32'h2C3D_4E5F, "read back DST_MAC_LO");
    r(8'h30, d); check(d == -32'sd918, "read back CAL_OFFSET");
    // software rate
    check(!sw_rate_en && sw_rate == 40'h0A_0000_0000, "software rate off, 10 ns, after reset");
    w(8'h3C, 32'h8000_0000);
    w(8'h38, 32'h8000_0009);
    check(sw_rate_en && sw_rate == 40'h09_8000_0000, $sformatf("software rate %h", sw_rate));
    r(8'h38, d); check(d == 32'h8000_0009, "read back SW_RATE_HI");
    // byte strobes
    w(8'h18, 32'hFFFF_FF77, 4'b0001);
    r(8'h18, d); check(d == 32'hC0A8_0177, $sformatf("strobe merge %h", d));
    // control pulses
    w(8'h00, 32'h1); w(8'h00, 32'h2); w(8'h00, 32'h4); w(8'h00, 32'h7);
    repeat (2) @(posedge clk);
    check(starts == 2 && arms == 2 && stops == 2, $sformatf("pulses %0d %0d %0d", starts, arms, stops));
    // read-only registers
    r(8'h04, d); check(d == 32'b1101, $sformatf("STATUS %b", d));
    r(8'h40, d); check(d == 100, "RX_COUNT");
    r(8'h44, d); check(d == 2, "LOST");
    r(8'h48, d); check(d == 3, "OUT_OF_ORDER");
    r(8'h4C, d); check(d == 1, "THR_HI");
    r(8'h50, d); check(d == 32'h2345_6789, "THR_LO");
    r(8'h54, d); check(d == -32'sd12, "OWD_MEAN");
    r(8'h58, d); check(d == 5, "OWD_MIN");
    r(8'h5C, d); check(d == 9, "OWD_MAX");
    r(8'h60, d); check(d == 4, "JITTER");
    r(8'h64, d); check(d == 1234, "DISPERSION");
    r(8'h68, d); check(d == 11, "TX_FRAMES");
    r(8'h6C, d); check(d == 22, "RX_FRAMES");
    r(8'h70, d); check(d == 33, "RX_DROPPED");
    r(8'h7C, d); check(d == -32'sd7, "PPS_ERR");
    r(8'h80, d); check(d == 32'hAB, "RATE_HI");
    r(8'h84, d); check(d == 32'h1234_5678, "RATE_LO");
    r(8'h88, d); check(d == 32'h42, "PPS_TS_HI");
    r(8'h8C, d); check(d == 32'h99, "PPS_TS_LO");
    r(8'hFC, d); check(d == 0, "unmapped reads 0");
    // 64-bit time: HI then the latched LO must form one consistent sample
    r(8'h74, hi);
    r(8'h78, d);
    check({hi, d} <= timestamp && timestamp - {hi, d} < 200 && {hi, d} >= 64'h0000_0001_FFFF_FF00,
          $sformatf("time sample %h vs %h", {hi, d}, timestamp));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
