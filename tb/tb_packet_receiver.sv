// tb_packet_receiver: self-checking test of the receiver's timestamping and filter.
//
// The testbench builds frames itself (Ethernet/IPv4/UDP with a sequence number
// and a transmit timestamp), sends them back-to-back into two receivers with
// 32-bit and 256-bit streams, and checks each record: sequence number,
// transmit timestamp, length, and a receive timestamp equal to the time at
// which the first beat went in. Some frames break one filter rule each (wrong
// destination MAC, source IP, destination IP, destination port, not UDP, not
// IPv4, too short) and must be dropped, and one rule is then disabled so that
// its frame passes. rec_valid must rise at the second clock edge after the
// edge that accepts the last beat.
module tb_packet_receiver;
  import ptt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic [TS_W-1:0] now;
  always_ff @(posedge clk) now <= rst_n ? now + 10 : 0;

  pkt_cfg_t cfg;
  filt_en_t fen;

  logic [31:0] d32 = '0; logic [3:0] k32 = '0; logic v32 = 0, l32 = 0, rdy32;
  logic [255:0] d256 = '0; logic [31:0] k256 = '0; logic v256 = 0, l256 = 0, rdy256;
  logic rv32, rv256; rx_rec_t rec32, rec256; logic [31:0] fr32, dr32, fr256, dr256;

  packet_receiver #(.DATA_W(32)) r32 (.clk, .rst_n, .s_axis_tdata(d32), .s_axis_tkeep(k32),
    .s_axis_tvalid(v32), .s_axis_tlast(l32), .s_axis_tready(rdy32), .timestamp(now),
    .cfg, .filt_en(fen), .rec_valid(rv32), .rec(rec32), .rx_frames(fr32), .rx_dropped(dr32));
  packet_receiver #(.DATA_W(256)) r256 (.clk, .rst_n, .s_axis_tdata(d256), .s_axis_tkeep(k256),
    .s_axis_tvalid(v256), .s_axis_tlast(l256), .s_axis_tready(rdy256), .timestamp(now),
    .cfg, .filt_en(fen), .rec_valid(rv256), .rec(rec256), .rx_frames(fr256), .rx_dropped(dr256));

  typedef struct { logic [31:0] seq; logic [63:0] txts; logic [63:0] rxts; int len; int last_cycle; } exp_t;
  exp_t exp32[$], exp256[$];
  int cycle;

  // frame kinds: 0 good, 1 bad dst mac, 2 bad src ip, 3 bad dst ip, 4 bad port, 5 TCP, 6 ARP, 7 short
  function automatic void build(output byte unsigned f[$], input int kind, input int size,
                                input logic [31:0] seq, input logic [63:0] txts);
    logic [47:0] dm; logic [31:0] sip, dip; logic [15:0] dp;
    dm = (kind == 1) ? cfg.dst_mac ^ 48'h1 : cfg.dst_mac;
    sip = (kind == 2) ? cfg.src_ip + 1 : cfg.src_ip;
    dip = (kind == 3) ? cfg.dst_ip + 1 : cfg.dst_ip;
    dp  = (kind == 4) ? cfg.dst_port + 1 : cfg.dst_port;
    f.delete();
    for (int i = 5; i >= 0; i--) f.push_back(dm[8*i +: 8]);
    for (int i = 5; i >= 0; i--) f.push_back(cfg.src_mac[8*i +: 8]);
    f.push_back(kind == 6 ? 8'h08 : 8'h08); f.push_back(kind == 6 ? 8'h06 : 8'h00);
    f.push_back(8'h45); f.push_back(0); f.push_back(8'((size - 14) >> 8)); f.push_back(8'(size - 14));
    f.push_back(0); f.push_back(0); f.push_back(8'h40); f.push_back(0);
    f.push_back(64); f.push_back(kind == 5 ? 8'd6 : 8'd17); f.push_back(0); f.push_back(0);
    for (int i = 3; i >= 0; i--) f.push_back(sip[8*i +: 8]);
    for (int i = 3; i >= 0; i--) f.push_back(dip[8*i +: 8]);
    f.push_back(8'(cfg.src_port >> 8)); f.push_back(8'(cfg.src_port));
    f.push_back(8'(dp >> 8)); f.push_back(8'(dp));
    f.push_back(8'((size - 34) >> 8)); f.push_back(8'(size - 34)); f.push_back(0); f.push_back(0);
    for (int i = 3; i >= 0; i--) f.push_back(seq[8*i +: 8]);
    for (int i = 7; i >= 0; i--) f.push_back(txts[8*i +: 8]);
    while (f.size() < size) f.push_back(8'($urandom));
    if (kind == 7) while (f.size() > 50) void'(f.pop_back());
  endfunction

  // drive one frame on both streams in parallel, back-to-back with the previous
  task automatic send(input byte unsigned f[$], input bit good, input logic [31:0] seq, input logic [63:0] txts);
    int n32, n256, b; exp_t e32, e256;
    n32 = (f.size() + 3) / 4; n256 = (f.size() + 31) / 32;
    for (b = 0; b < (n32 > n256 ? n32 : n256); b++) begin
      @(negedge clk);
      v32 = (b < n32); v256 = (b < n256);
      for (int j = 0; j < 4; j++) begin k32[j] = (4*b + j) < f.size(); d32[8*j +: 8] = k32[j] ? f[4*b + j] : 8'h0; end
      for (int j = 0; j < 32; j++) begin k256[j] = (32*b + j) < f.size(); d256[8*j +: 8] = k256[j] ? f[32*b + j] : 8'h0; end
      l32 = (b == n32 - 1); l256 = (b == n256 - 1);
      if (b == 0) begin e32.rxts = now; e256.rxts = now; end
      if (good && b == n32 - 1)  begin e32.seq = seq; e32.txts = txts; e32.len = f.size(); e32.last_cycle = cycle + 1; exp32.push_back(e32); end
      if (good && b == n256 - 1) begin e256.seq = seq; e256.txts = txts; e256.len = f.size(); e256.last_cycle = cycle + 1; exp256.push_back(e256); end
    end
    // the 256-bit stream idles while the 32-bit one finishes; both end valid low
    @(negedge clk); v32 = 0; v256 = 0; l32 = 0; l256 = 0;
  endtask

  int got32, got256;
  always @(posedge clk) begin
    cycle++;
    if (rst_n && rv32) begin
      exp_t e;
      got32++;
      if (exp32.size() == 0) check(0, "w32 unexpected record");
      else begin
        e = exp32.pop_front();
        check(rec32.seq == e.seq && rec32.tx_ts == e.txts && 32'(rec32.len) == 32'(e.len),
              $sformatf("w32 record seq %0d/%0d len %0d/%0d", rec32.seq, e.seq, rec32.len, e.len));
        check(rec32.rx_ts == e.rxts, $sformatf("w32 rx_ts %0d expected %0d", rec32.rx_ts, e.rxts));
        check(cycle == e.last_cycle + 2, $sformatf("w32 record latency %0d", cycle - e.last_cycle));
      end
    end
    if (rst_n && rv256) begin
      exp_t e;
      got256++;
      if (exp256.size() == 0) check(0, "w256 unexpected record");
      else begin
        e = exp256.pop_front();
        check(rec256.seq == e.seq && rec256.tx_ts == e.txts && 32'(rec256.len) == 32'(e.len),
              $sformatf("w256 record seq %0d/%0d", rec256.seq, e.seq));
        check(rec256.rx_ts == e.rxts, $sformatf("w256 rx_ts %0d expected %0d", rec256.rx_ts, e.rxts));
        check(cycle == e.last_cycle + 2, $sformatf("w256 record latency %0d", cycle - e.last_cycle));
      end
    end
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    byte unsigned f[$];
    int ngood;
    cfg = '0;
    cfg.dst_mac = 48'h0A1B2C3D4E5F; cfg.src_mac = 48'h001122334455;
    cfg.src_ip = 32'hC0A80101; cfg.dst_ip = 32'hC0A80202;
    cfg.src_port = 16'd1234; cfg.dst_port = 16'd4321;
    fen = '1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    ngood = 0;
    // good frames of several sizes, back-to-back
    for (int i = 0; i < 8; i++) begin
      int sz; sz = (i == 5) ? 1514 : 60 + 13 * i;
      build(f, 0, sz, 32'(i), 64'h1000 + 64'(i));
      send(f, 1, 32'(i), 64'h1000 + 64'(i));
      ngood++;
    end
    // one frame of each rejected kind
    for (int kind = 1; kind <= 7; kind++) begin
      build(f, kind, 80, 32'(100 + kind), 64'h5);
      send(f, 0, 0, 0);
    end
    // destination port rule off: a wrong port now passes
    fen.dst_port = 1'b0;
    build(f, 4, 70, 32'd77, 64'h77);
    send(f, 1, 32'd77, 64'h77);
    ngood++;
    repeat (5) @(posedge clk);
    check(got32 == ngood && got256 == ngood, $sformatf("records %0d/%0d expected %0d", got32, got256, ngood));
    check(fr32 == 16 && fr256 == 16, $sformatf("frames counted %0d/%0d", fr32, fr256));
    check(dr32 == 7 && dr256 == 7, $sformatf("dropped %0d/%0d expected 7", dr32, dr256));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
