// ptt_link_model: behavioural model of a MAC pair and a link or device under
// test, for the packet-train tester testbenches (not synthesizable).
//
// Transmit side: accepts frames from the tester's AXI4-Stream at full bus
// speed but holds tready low between frames, so that frame k goes on the wire
// exactly at the end of frame k-1 on a wire of PS_PER_BYTE picoseconds per
// byte, counting 24 bytes of preamble, FCS and inter-frame gap per frame; a
// frame may be accepted up to one clock before its wire time.
// Receive side: each frame is handed back on the receive AXI4-Stream, at full
// bus speed, LATENCY_NS after the frame and its 8-byte preamble have crossed
// the wire. The frame whose
// sequence number equals drop_seq is lost, the one equal to corrupt_seq gets
// a wrong destination UDP port, and the one equal to swap_seq is held back and
// delivered after the next frame. stalls counts clocks with tvalid high and
// tready low.
module ptt_link_model #(
  parameter int unsigned DATA_W      = 32,
  parameter int unsigned CLK_PS      = 10_000,
  parameter int unsigned PS_PER_BYTE = 8_000,
  parameter int unsigned LATENCY_NS  = 1_000
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   tx_tdata,
  input  logic [DATA_W/8-1:0] tx_tkeep,
  input  logic                tx_tvalid,
  input  logic                tx_tlast,
  output logic                tx_tready,
  output logic [DATA_W-1:0]   rx_tdata,
  output logic [DATA_W/8-1:0] rx_tkeep,
  output logic                rx_tvalid,
  output logic                rx_tlast,
  input  int                  drop_seq,
  input  int                  corrupt_seq,
  input  int                  swap_seq,
  output int                  stalls,
  output int                  frames_in,
  output int                  dropped,
  output int                  corrupted,
  output int                  swapped
);
  localparam int BPB = DATA_W / 8;

  typedef struct { byte unsigned b[$]; longint deliver_ps; } frame_t;
  frame_t q[$];
  frame_t held;
  bit     have_held;
  byte unsigned cur[$];
  longint now_ps, start_ps, next_start_ps;
  bit in_frame;
  frame_t out; bit sending; int out_off;

  function automatic int seq_of(input byte unsigned b[$]);
    return int'({b[42], b[43], b[44], b[45]});
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      now_ps = 0; next_start_ps = 0; in_frame = 0; sending = 0; have_held = 0;
      stalls = 0; frames_in = 0; dropped = 0; corrupted = 0; swapped = 0;
      tx_tready <= 1; rx_tvalid <= 0; rx_tlast <= 0; rx_tdata <= '0; rx_tkeep <= '0;
      q.delete(); cur.delete();
    end else begin
      // ---- transmit side ----
      if (tx_tvalid && !tx_tready) stalls++;
      if (tx_tvalid && tx_tready) begin
        if (!in_frame) begin in_frame = 1; start_ps = now_ps; end
        for (int j = 0; j < BPB; j++) if (tx_tkeep[j]) cur.push_back(tx_tdata[8*j +: 8]);
        if (tx_tlast) begin
          frame_t f;
          int s;
          in_frame = 0;
          // the MAC buffers up to one clock, so the wire start is exact
          if (next_start_ps > start_ps) start_ps = next_start_ps;
          next_start_ps = start_ps + (longint'(cur.size()) + 24) * PS_PER_BYTE;
          f.b = cur;
          f.deliver_ps = start_ps + (longint'(cur.size()) + 8) * PS_PER_BYTE + longint'(LATENCY_NS) * 1000;
          cur.delete();
          frames_in++;
          s = (f.b.size() >= 46) ? seq_of(f.b) : -1;
          if (s == drop_seq) dropped++;
          else begin
            if (s == corrupt_seq) begin f.b[37] = f.b[37] ^ 8'h01; corrupted++; end
            if (s == swap_seq) begin held = f; have_held = 1; swapped++; end
            else begin
              q.push_back(f);
              if (have_held) begin held.deliver_ps = f.deliver_ps; q.push_back(held); have_held = 0; end
            end
          end
        end
      end
      tx_tready <= in_frame || (now_ps + 2 * CLK_PS > next_start_ps);
      // ---- receive side ----
      if (!sending && q.size() > 0 && q[0].deliver_ps <= now_ps) begin
        out = q.pop_front(); sending = 1; out_off = 0;
      end
      if (sending) begin
        logic [DATA_W-1:0] d; logic [BPB-1:0] k;
        d = '0; k = '0;
        for (int j = 0; j < BPB; j++)
          if (out_off + j < out.b.size()) begin d[8*j +: 8] = out.b[out_off + j]; k[j] = 1; end
        rx_tdata <= d; rx_tkeep <= k; rx_tvalid <= 1;
        rx_tlast <= (out_off + BPB >= out.b.size());
        out_off += BPB;
        if (out_off >= out.b.size()) sending = 0;
      end else begin
        rx_tvalid <= 0; rx_tlast <= 0;
      end
      now_ps += longint'(CLK_PS);
    end
  end
endmodule
