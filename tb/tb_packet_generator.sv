// tb_packet_generator: self-checking test of the packet-train generator.
//
// Two generators run side by side, one with a 32-bit stream (1 Gb/s
// arrangement) and one with 256 bits (10 Gb/s). Each sends trains whose
// frames the testbench collects byte by byte and checks against the layout
// worked out here: addresses, ports, lengths, a valid IPv4 header checksum
// (the 16-bit one's complement sum over the header must be 0xFFFF), the
// sequence numbers 0..N-1 and the transmit timestamp, which must equal the
// time at which the first beat of the frame was accepted. With tready held
// high the train must take exactly N*ceil(S/bytes_per_beat) clocks; a second
// train with random back-pressure checks that beats are held while stalled.
module tb_packet_generator;
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
  logic start;

  // ---- 32-bit instance ----
  logic [31:0] d32; logic [3:0] k32; logic v32, l32, r32, busy32, done32; logic [31:0] sent32;
  packet_generator #(.DATA_W(32)) g32 (.clk, .rst_n, .cfg, .start, .timestamp(now),
    .m_axis_tdata(d32), .m_axis_tkeep(k32), .m_axis_tvalid(v32), .m_axis_tlast(l32),
    .m_axis_tready(r32), .busy(busy32), .done(done32), .sent_frames(sent32));
  // ---- 256-bit instance ----
  logic [255:0] d256; logic [31:0] k256; logic v256, l256, r256, busy256, done256; logic [31:0] sent256;
  packet_generator #(.DATA_W(256)) g256 (.clk, .rst_n, .cfg, .start, .timestamp(now),
    .m_axis_tdata(d256), .m_axis_tkeep(k256), .m_axis_tvalid(v256), .m_axis_tlast(l256),
    .m_axis_tready(r256), .busy(busy256), .done(done256), .sent_frames(sent256));

  // frame collectors
  byte unsigned f32[$], f256[$];
  logic [63:0] ts32, ts256;
  int nfr32, nfr256, beats32, beats256;
  bit stall_seen32, hold_ok32 = 1;
  logic [31:0] prev_d32; bit prev_stall32;

  task automatic check_frame(input byte unsigned f[$], input int seq, input logic [63:0] ts, input string tag);
    int sz; int unsigned sum; logic [63:0] got_ts; logic [31:0] got_seq;
    sz = (cfg.frame_size < 60) ? 60 : (cfg.frame_size > 1514) ? 1514 : int'(cfg.frame_size);
    check(f.size() == sz, $sformatf("%s frame %0d size %0d expected %0d", tag, seq, f.size(), sz));
    if (f.size() < 54) return;
    check({f[0],f[1],f[2],f[3],f[4],f[5]} == cfg.dst_mac, {tag, " dst mac"});
    check({f[6],f[7],f[8],f[9],f[10],f[11]} == cfg.src_mac, {tag, " src mac"});
    check({f[12],f[13]} == 16'h0800 && f[14] == 8'h45 && f[23] == 8'd17, {tag, " ethertype/IP/UDP"});
    check({f[16],f[17]} == 16'(sz - 14), {tag, " IP total length"});
    check({f[38],f[39]} == 16'(sz - 34), {tag, " UDP length"});
    check({f[26],f[27],f[28],f[29]} == cfg.src_ip && {f[30],f[31],f[32],f[33]} == cfg.dst_ip, {tag, " IPs"});
    check({f[34],f[35]} == cfg.src_port && {f[36],f[37]} == cfg.dst_port, {tag, " ports"});
    sum = 0;
    for (int i = 14; i < 34; i += 2) sum += {f[i], f[i+1]};
    while (sum >> 16) sum = (sum & 32'hFFFF) + (sum >> 16);
    check(sum == 32'hFFFF, $sformatf("%s IP checksum sum %h", tag, sum));
    got_seq = {f[42],f[43],f[44],f[45]};
    check(got_seq == 32'(seq), $sformatf("%s seq %0d expected %0d", tag, got_seq, seq));
    got_ts = {f[46],f[47],f[48],f[49],f[50],f[51],f[52],f[53]};
    check(got_ts == ts, $sformatf("%s tx timestamp %0d expected %0d", tag, got_ts, ts));
    for (int i = 54; i < f.size(); i++) if (f[i] != 0) begin check(0, {tag, " padding not zero"}); break; end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (v32 && r32) begin
      if (f32.size() == 0) ts32 = now;
      for (int j = 0; j < 4; j++) if (k32[j]) f32.push_back(d32[8*j +: 8]);
      beats32++;
      if (l32) begin check_frame(f32, nfr32, ts32, "w32"); f32.delete(); nfr32++; end
    end
    if (v256 && r256) begin
      if (f256.size() == 0) ts256 = now;
      for (int j = 0; j < 32; j++) if (k256[j]) f256.push_back(d256[8*j +: 8]);
      beats256++;
      if (l256) begin check_frame(f256, nfr256, ts256, "w256"); f256.delete(); nfr256++; end
    end
    // AXI4-Stream hold rule on the 32-bit stream
    if (prev_stall32 && !(v32 && d32 == prev_d32)) hold_ok32 = 0;
    prev_stall32 = v32 && !r32;
    if (v32 && !r32) stall_seen32 = 1;
    prev_d32 = d32;
  end

  task automatic run_train(input int size, input int n, input bit backpressure);
    int t0, cyc32, cyc256; bit d32seen, d256seen;
    cfg.frame_size = 16'(size);
    cfg.train_len  = 32'(n);
    nfr32 = 0; nfr256 = 0; beats32 = 0; beats256 = 0;
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    t0 = 0; cyc32 = 0; cyc256 = 0; d32seen = 0; d256seen = 0;
    while (!(d32seen && d256seen)) begin
      @(posedge clk);
      t0++;
      if (done32 && !d32seen) begin d32seen = 1; cyc32 = t0; end
      if (done256 && !d256seen) begin d256seen = 1; cyc256 = t0; end
      if (backpressure) begin r32 <= ($urandom % 3) != 0; r256 <= ($urandom % 2) != 0; end
    end
    r32 <= 1; r256 <= 1;
    check(nfr32 == n && nfr256 == n, $sformatf("frames %0d/%0d expected %0d", nfr32, nfr256, n));
    check(sent32 == 32'(n) && sent256 == 32'(n), "sent_frames counter");
    if (!backpressure) begin
      int sz; sz = (size < 60) ? 60 : (size > 1514) ? 1514 : size;
      check(beats32 == n * ((sz + 3) / 4), $sformatf("w32 beats %0d", beats32));
      check(cyc32 == n * ((sz + 3) / 4) + 1, $sformatf("w32 train took %0d clocks, expected %0d",
            cyc32 - 1, n * ((sz + 3) / 4)));
      check(cyc256 == n * ((sz + 31) / 32) + 1, $sformatf("w256 train took %0d clocks, expected %0d",
            cyc256 - 1, n * ((sz + 31) / 32)));
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    cfg.dst_mac = 48'h0A1B2C3D4E5F; cfg.src_mac = 48'h001122334455;
    cfg.src_ip = 32'hC0A80101; cfg.dst_ip = 32'hC0A80202;
    cfg.src_port = 16'd1234; cfg.dst_port = 16'd4321;
    start = 0; r32 = 1; r256 = 1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run_train(60, 10, 0);
    run_train(64, 5, 0);
    run_train(1514, 3, 0);
    run_train(137, 7, 1);     // odd size, random back-pressure
    run_train(20, 2, 0);      // below minimum: sent as 60 bytes
    check(stall_seen32 && hold_ok32, "beats held stable under back-pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
