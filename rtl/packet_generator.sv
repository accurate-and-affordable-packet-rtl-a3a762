// packet_generator: sends a packet train on an AXI4-Stream master.
//
// A start pulse latches the configuration and sends train_len frames of
// frame_size bytes back-to-back: tvalid stays high from the first beat of the
// first frame to the last beat of the last, so only the MAC's tready paces the
// train. Each frame is Ethernet II / IPv4 / UDP with the configured addresses
// and ports (the fields the document lists as user options), a 32-bit sequence
// number (0 for the first frame) at byte 42 and a 64-bit transmit timestamp at
// byte 46; the rest of the payload is zero. The IPv4 header checksum is
// computed here, the UDP checksum is sent as 0 (allowed for UDP over IPv4).
//
// The transmit timestamp is the time of the clock edge at which the MAC accepts
// the first beat of the frame, as near to the PHY as this block can see; it is
// written into a later beat of the same frame, which requires
// DATA_W <= 8*OFF_TS (368 bits). frame_size is clamped to 60..1514.
//
// Interface: byte k of a beat is tdata[8k+7:8k]; tkeep marks the valid bytes
// of the last beat. A frame of S bytes takes ceil(S/(DATA_W/8)) beats, so with
// tready held high a train of N frames takes N*ceil(S/(DATA_W/8)) clocks.
// busy is high from the clock after start to the last beat; done pulses with
// the acceptance of the last beat. start is ignored while busy.
// The fields and back-to-back sending follow the document; the frame layout,
// the header constants (TTL 64, DF set, ID 0) and the handshake are this
// design's choices.
module packet_generator
  import ptt_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  pkt_cfg_t            cfg,
  input  logic                start,
  input  logic [TS_W-1:0]     timestamp,
  output logic [DATA_W-1:0]   m_axis_tdata,
  output logic [DATA_W/8-1:0] m_axis_tkeep,
  output logic                m_axis_tvalid,
  output logic                m_axis_tlast,
  input  logic                m_axis_tready,
  output logic                busy,
  output logic                done,
  output logic [31:0]         sent_frames
);

  localparam int unsigned BPB = DATA_W / 8;

  pkt_cfg_t         cfg_q;
  logic [15:0]      size_q;       // clamped frame size
  logic [15:0]      off_q;        // byte offset of the current beat
  logic [31:0]      seq_q;
  logic [TS_W-1:0]  ts_q;
  logic [15:0]      ip_csum_q;
  logic [7:0]       hdr [HDR_BYTES];
  logic             beat_ok, last_beat;
  logic [15:0]      remain;

  initial begin
    assert (DATA_W % 8 == 0 && DATA_W >= 8 && DATA_W <= 8 * OFF_TS)
      else $error("packet_generator: DATA_W must be a multiple of 8 in 8..%0d", 8 * OFF_TS);
  end

  // One's complement checksum of the IPv4 header for a given frame size
  function automatic logic [15:0] ip_checksum(input pkt_cfg_t c, input logic [15:0] size);
    logic [19:0] s;
    s = 20'h4500 + 20'(size - 16'd14) + 20'h0000 + 20'h4000 + 20'h4011
      + 20'(c.src_ip[31:16]) + 20'(c.src_ip[15:0])
      + 20'(c.dst_ip[31:16]) + 20'(c.dst_ip[15:0]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    s = 20'(s[15:0]) + 20'(s[19:16]);
    return ~s[15:0];
  endfunction

  // Header bytes of the current frame
  always_comb begin
    logic [15:0] ip_len, udp_len;
    ip_len  = size_q - 16'd14;
    udp_len = size_q - 16'd34;
    for (int i = 0; i < 6; i++) begin
      hdr[i]     = cfg_q.dst_mac[47-8*i -: 8];
      hdr[6 + i] = cfg_q.src_mac[47-8*i -: 8];
    end
    hdr[12] = ETHERTYPE_IPV4[15:8];  hdr[13] = ETHERTYPE_IPV4[7:0];
    hdr[14] = 8'h45;                 hdr[15] = 8'h00;          // version/IHL, TOS
    hdr[16] = ip_len[15:8];          hdr[17] = ip_len[7:0];
    hdr[18] = 8'h00;                 hdr[19] = 8'h00;          // identification
    hdr[20] = 8'h40;                 hdr[21] = 8'h00;          // DF, offset 0
    hdr[22] = 8'd64;                 hdr[23] = IP_PROTO_UDP;   // TTL, protocol
    hdr[24] = ip_csum_q[15:8];       hdr[25] = ip_csum_q[7:0];
    for (int i = 0; i < 4; i++) begin
      hdr[26 + i] = cfg_q.src_ip[31-8*i -: 8];
      hdr[30 + i] = cfg_q.dst_ip[31-8*i -: 8];
      hdr[OFF_SEQ + i] = seq_q[31-8*i -: 8];
    end
    hdr[34] = cfg_q.src_port[15:8];  hdr[35] = cfg_q.src_port[7:0];
    hdr[36] = cfg_q.dst_port[15:8];  hdr[37] = cfg_q.dst_port[7:0];
    hdr[38] = udp_len[15:8];         hdr[39] = udp_len[7:0];
    hdr[40] = 8'h00;                 hdr[41] = 8'h00;          // UDP checksum unused
    for (int i = 0; i < 8; i++) hdr[OFF_TS + i] = ts_q[63-8*i -: 8];
  end

  // Beat assembly
  always_comb begin
    remain    = size_q - off_q;
    last_beat = (remain <= 16'(BPB));
    for (int j = 0; j < BPB; j++) begin
      m_axis_tdata[8*j +: 8] = ((32'(off_q) + j) < HDR_BYTES) ? hdr[32'(off_q) + j] : 8'h00;
      m_axis_tkeep[j]        = (16'(j) < remain);
    end
    m_axis_tlast = last_beat;
    m_axis_tvalid = busy;
    beat_ok = busy && m_axis_tready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      cfg_q       <= '0;
      size_q      <= 16'(MIN_FRAME);
      off_q       <= '0;
      seq_q       <= '0;
      ts_q        <= '0;
      ip_csum_q   <= '0;
      sent_frames <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start && cfg.train_len != 0) begin
          logic [15:0] sz;
          sz = (cfg.frame_size < 16'(MIN_FRAME)) ? 16'(MIN_FRAME) :
               (cfg.frame_size > 16'(MAX_FRAME)) ? 16'(MAX_FRAME) : cfg.frame_size;
          cfg_q       <= cfg;
          size_q      <= sz;
          ip_csum_q   <= ip_checksum(cfg, sz);
          off_q       <= '0;
          seq_q       <= '0;
          sent_frames <= '0;
          busy        <= 1'b1;
        end
      end else if (beat_ok) begin
        if (off_q == 0) ts_q <= timestamp;
        if (last_beat) begin
          off_q       <= '0;
          seq_q       <= seq_q + 1;
          sent_frames <= sent_frames + 1;
          if (seq_q + 1 == cfg_q.train_len) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          off_q <= off_q + 16'(BPB);
        end
      end
    end
  end

  // AXI4-Stream rule: once valid, the beat is held until accepted
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (m_axis_tvalid && !m_axis_tready) |=> (m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast));
  endproperty
  a_hold: assert property (p_hold);

endmodule
