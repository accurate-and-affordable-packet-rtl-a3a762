// ptt_workloads.svh: the train workloads of the evaluation, shared by the
// full-size testbenches. Frame sizes 60, 64, 128, 256, 512, 1024 and 1514
// bytes (without preamble and FCS), trains of 100 and 1000 frames, each sent
// through the link model and measured. For a back-to-back train the expected
// throughput is R * S / (S + 24) for link rate R, and the expected delay is
// the link latency plus the wire time of frame and preamble, 8*(S+8) bits,
// plus up to THR_SLACK_NS of pipeline.
// Needs: LINK_BPS (real), LAT_NS, PS_PER_BYTE, CLK_NS, OWD_SLACK_NS, THR_TOL.

task automatic run_workloads(output int n_done);
  int sizes[7] = '{60, 64, 128, 256, 512, 1024, 1514};
  int lens[2]  = '{100, 1000};
  logic [31:0] rxc, lost, d;
  logic [63:0] thr;
  int owd, jit;
  real exp_thr, exp_owd;
  bit ok;
  n_done = 0;
  foreach (lens[li]) foreach (sizes[si]) begin
    start_train(sizes[si], lens[li]);
    wait_results(int'(real'(lens[li]) * real'(sizes[si] + 24) * real'(PS_PER_BYTE) / (1000.0 * CLK_NS)) + 20_000, ok);
    check(ok, $sformatf("%0d x %0d B finished", lens[li], sizes[si]));
    axil_read(8'h40, rxc); axil_read(8'h44, lost); axil_read64(8'h4C, thr);
    axil_read(8'h54, d); owd = int'(d); axil_read(8'h60, d); jit = int'(d);
    exp_thr = LINK_BPS * real'(sizes[si]) / real'(sizes[si] + 24);
    exp_owd = real'(LAT_NS) + real'((sizes[si] + 8) * PS_PER_BYTE) / 1000.0;
    check(rxc == 32'(lens[li]) && lost == 0, $sformatf("%0d x %0d B: %0d received, %0d lost", lens[li], sizes[si], rxc, lost));
    check(real'(thr) > (1.0 - THR_TOL) * exp_thr && real'(thr) < (1.0 + THR_TOL) * exp_thr,
          $sformatf("%0d x %0d B: throughput %0d, theory %0.0f", lens[li], sizes[si], thr, exp_thr));
    check(real'(owd) >= exp_owd - 1.0 && real'(owd) <= exp_owd + OWD_SLACK_NS,
          $sformatf("%0d x %0d B: delay %0d ns, link %0.1f ns", lens[li], sizes[si], owd, exp_owd));
    $display("%4d x %4d B: throughput %11d bit/s (theory %11.0f)  delay %5d ns  jitter %2d ns",
             lens[li], sizes[si], thr, exp_thr, owd, jit);
    n_done++;
  end
endtask
