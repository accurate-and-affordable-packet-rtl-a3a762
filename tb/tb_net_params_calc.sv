// tb_net_params_calc: self-checking test of the network parameters calculator.
//
// Records are fed directly, as if a train of S-byte frames had crossed a
// 1 Gb/s link back-to-back: frame i arrives at t0 + i * 8 * (S + 24) ns, and
// its delay varies by a known pattern. Expected throughput, mean, min and max
// delay, mean jitter, loss and out-of-order counts are computed here from the
// same records. Cases: a full train with no calibration; a train with frames
// missing and two swapped, ended by stop, with a calibration applied; a train
// at the 10 Gb/s frame spacing. done must rise at the 200th clock edge after
// the edge that takes the last record or the stop pulse.
module tb_net_params_calc;
  import ptt_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic arm = 0, stop = 0, rec_valid = 0, done, res_valid, running;
  logic [31:0] train_len;
  logic signed [31:0] cal_offset = 0, cal_slope = 0;
  rx_rec_t rec;
  results_t res;

  net_params_calc dut (.clk, .rst_n, .arm, .stop, .train_len, .cal_offset, .cal_slope,
                       .rec_valid, .rec, .res, .res_valid, .done, .running);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // size S, N frames, per-frame spacing in ps (8000 ps per byte at 1 Gb/s)
  task automatic run(input int S, input int N, input int ps_per_byte, input bit lossy,
                     input int off, input int slope_q16, input string tag);
    longint owd[$], rx[$], seqs[$], lens[$];
    longint sum, mn, mx, jit, first_rx, last_rx, bytes, last_len, thr, mean, jmean, cal;
    int ooo, maxseq, n, wait_cyc;
    // build the records
    for (int i = 0; i < N; i++) begin
      if (lossy && (i == 3 || i == 7)) continue;          // lost frames
      seqs.push_back(i);
      rx.push_back(1000000 + (longint'(i) * (S + 24) * ps_per_byte) / 1000);
      owd.push_back(5149 + ((i * 37) % 11) - 5);
      lens.push_back(S);
    end
    if (lossy) begin                                       // swap two neighbours
      longint t; t = seqs[4]; seqs[4] = seqs[5]; seqs[5] = t;
    end
    // reference results (delays after calibration)
    n = seqs.size(); sum = 0; jit = 0; ooo = 0; bytes = 0;
    for (int i = 0; i < n; i++) begin
      cal = owd[i] - off - ((longint'(slope_q16) * lens[i]) >>> 16);
      if (i == 0) begin mn = cal; mx = cal; maxseq = int'(seqs[0]); end
      else begin
        longint pc; pc = owd[i-1] - off - ((longint'(slope_q16) * lens[i-1]) >>> 16);
        jit += (cal > pc) ? cal - pc : pc - cal;
        if (cal < mn) mn = cal;
        if (cal > mx) mx = cal;
        if (seqs[i] <= maxseq) ooo++; else maxseq = int'(seqs[i]);
      end
      sum += cal; bytes += lens[i];
    end
    first_rx = rx[0]; last_rx = rx[n-1]; last_len = lens[n-1];
    thr   = ((bytes - last_len) * 8 * 1000000000) / (last_rx - first_rx);
    mean  = sum / n;
    jmean = jit / (n - 1);

    train_len = 32'(N); cal_offset = off; cal_slope = slope_q16;
    @(negedge clk) arm = 1;
    @(negedge clk) arm = 0;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      rec_valid = 1;
      rec.seq = 32'(seqs[i]); rec.rx_ts = 64'(rx[i]); rec.tx_ts = 64'(rx[i] - owd[i]); rec.len = 16'(lens[i]);
      if (($urandom % 4) == 0 && i != n - 1) begin @(negedge clk) rec_valid = 0; end
    end
    @(negedge clk) rec_valid = 0;
    if (lossy) begin check(running, {tag, " still waiting for lost frames"}); stop = 1; @(negedge clk) stop = 0; end
    wait_cyc = 0;
    while (!done && wait_cyc < 1000) begin @(posedge clk); wait_cyc++; end
    #1;
    // done is sampled one edge after it rises: 201 here means the 200th edge
    check(wait_cyc == 201, $sformatf("%s results at edge %0d after the end, expected 200", tag, wait_cyc - 1));
    check(res_valid, {tag, " res_valid"});
    check(res.rx_count == 32'(n), $sformatf("%s rx_count %0d expected %0d", tag, res.rx_count, n));
    check(res.lost == 32'(N - n), $sformatf("%s lost %0d expected %0d", tag, res.lost, N - n));
    check(res.out_of_order == 32'(ooo), $sformatf("%s ooo %0d expected %0d", tag, res.out_of_order, ooo));
    check(res.throughput_bps == 64'(thr), $sformatf("%s throughput %0d expected %0d", tag, res.throughput_bps, thr));
    check(res.owd_mean == mean, $sformatf("%s owd mean %0d expected %0d", tag, res.owd_mean, mean));
    check(res.owd_min == mn && res.owd_max == mx, $sformatf("%s owd min/max %0d/%0d expected %0d/%0d", tag, res.owd_min, res.owd_max, mn, mx));
    check(res.jitter_mean == 64'(jmean), $sformatf("%s jitter %0d expected %0d", tag, res.jitter_mean, jmean));
    $display("%s: throughput %0d bit/s, owd %0d ns, jitter %0d ns, lost %0d", tag, res.throughput_bps, res.owd_mean, res.jitter_mean, res.lost);
  endtask

  initial begin
    rec = '0; train_len = 100;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    run(60, 100, 8000, 0, 0, 0, "1G 60B x100");
    // theoretical 1 Gb/s train of 60-byte frames: 1e9 * 60 / 84
    check(res.throughput_bps == 64'd714285714, $sformatf("60 B at 1 Gb/s reads %0d", res.throughput_bps));
    run(1514, 20, 8000, 1, 900, 327949, "1G 1514B lossy+cal");
    run(64, 50, 800, 0, 0, 0, "10G 64B x50");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
