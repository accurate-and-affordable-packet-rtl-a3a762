// ptt_pkg: types and constants shared by the packet-train tester.
//
// A test frame is Ethernet II + IPv4 (20 bytes, no options) + UDP, followed by a
// 32-bit sequence number and a 64-bit transmit timestamp in nanoseconds. The
// field offsets below are this design's own layout; the document only says that
// every generated packet carries a sequence number and a timestamp. Frame sizes
// count bytes without preamble and FCS, as in the document's experiments
// (60 to 1514 bytes). All multi-byte fields are sent big-endian (network order).
package ptt_pkg;

  localparam int unsigned TS_W      = 64;   // time in ns
  localparam int unsigned RATE_W    = 40;   // ns per clock, 8 integer + 32 fraction bits
  localparam int unsigned RATE_FRAC = 32;

  // Byte offsets inside a test frame
  localparam int unsigned OFF_ETYPE  = 12;
  localparam int unsigned OFF_IP     = 14;
  localparam int unsigned OFF_PROTO  = 23;
  localparam int unsigned OFF_SRC_IP = 26;
  localparam int unsigned OFF_DST_IP = 30;
  localparam int unsigned OFF_UDP    = 34;
  localparam int unsigned OFF_DPORT  = 36;
  localparam int unsigned OFF_SEQ    = 42;
  localparam int unsigned OFF_TS     = 46;
  localparam int unsigned HDR_BYTES  = 54;  // headers + sequence + timestamp

  localparam int unsigned MIN_FRAME  = 60;
  localparam int unsigned MAX_FRAME  = 1514;

  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IP_PROTO_UDP   = 8'd17;

  // Settings of one train (generator) and the values the receiver filters on
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [15:0] frame_size;  // bytes, without preamble and FCS
    logic [31:0] train_len;   // N
  } pkt_cfg_t;

  // Receiver filter rule enables
  typedef struct packed {
    logic dst_port;
    logic dst_ip;
    logic src_ip;
    logic dst_mac;
  } filt_en_t;

  // One record per accepted frame
  typedef struct packed {
    logic [31:0]     seq;
    logic [TS_W-1:0] tx_ts;
    logic [TS_W-1:0] rx_ts;
    logic [15:0]     len;
  } rx_rec_t;

  // Results of one train
  typedef struct packed {
    logic [31:0]        rx_count;
    logic [31:0]        lost;
    logic [31:0]        out_of_order;
    logic [63:0]        throughput_bps;
    logic signed [63:0] owd_mean;      // ns, calibrated
    logic signed [63:0] owd_min;
    logic signed [63:0] owd_max;
    logic [63:0]        jitter_mean;   // ns, mean |owd(i) - owd(i-1)|
    logic [63:0]        dispersion;    // ns, rx(last) - rx(first)
  } results_t;

endpackage
