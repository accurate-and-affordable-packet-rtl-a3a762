// tb_owd_calibration: checks the linear delay calibration.
//
// Random delays, sizes and coefficients are compared with a reference worked
// out here in 64-bit integer arithmetic. Then a calibration line is fitted to
// two loopback delays of the 1 Gb/s prototype (1890 ns at 60 bytes and
// 20798 ns at 1514 bytes) minus the ideal frame time 8 ns * (size + 24), and
// applied to the other loopback delays measured there (64, 128, 256, 512 and
// 1024 bytes); each corrected delay must come within 10 ns of the ideal.
module tb_owd_calibration;
  logic signed [63:0] owd, owd_cal;
  logic [15:0] len;
  logic signed [31:0] offset, slope;
  int checks = 0, failures = 0;

  owd_calibration dut (.owd, .len, .offset, .slope, .owd_cal);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint p, expv;
    int sizes[5]  = '{64, 128, 256, 512, 1024};
    int meas[5]   = '{1941, 2772, 4437, 7763, 14423};
    real slope_r, off_r;
    // zero coefficients: unchanged
    owd = 64'sd12345; len = 16'd60; offset = 0; slope = 0;
    #1 check(owd_cal == 64'sd12345, "zero calibration passes the delay through");
    // random vectors
    for (int i = 0; i < 200; i++) begin
      owd    = $signed({32'($urandom), 32'($urandom)}) >>> 20;
      len    = 16'($urandom_range(1514, 60));
      offset = $signed(32'($urandom)) >>> 8;
      slope  = $signed(32'($urandom)) >>> 8;
      #1;
      p = longint'(slope) * longint'(len);
      expv = longint'(owd) - longint'(offset) - (p >>> 16);
      check(owd_cal == expv, $sformatf("owd %0d len %0d off %0d slope %0d: got %0d expected %0d",
            owd, len, offset, slope, owd_cal, expv));
    end
    // calibration from two loopback points of the 1 Gb/s prototype
    slope_r = (20798.0 - 1890.0) / (1514.0 - 60.0) - 8.0;
    off_r   = 1890.0 - 8.0 * (60 + 24) - slope_r * 60.0;
    slope   = 32'($rtoi(slope_r * 65536.0 + 0.5));
    offset  = 32'($rtoi(off_r + 0.5));
    for (int i = 0; i < 5; i++) begin
      longint ideal;
      owd = 64'(meas[i]); len = 16'(sizes[i]);
      ideal = 8 * (sizes[i] + 24);
      #1 check(owd_cal - ideal <= 10 && ideal - owd_cal <= 10,
               $sformatf("size %0d: calibrated %0d ns, ideal %0d ns", sizes[i], owd_cal, ideal));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
