// packet_receiver: timestamps, filters and parses the frames of a packet train.
//
// Frames arrive on an AXI4-Stream slave that never stalls (tready = 1). The
// receive timestamp is taken at the clock edge that accepts the first beat,
// the same point at which the generator takes the transmit timestamp. The
// first 54 bytes (headers, sequence number, transmit timestamp) are stored
// and the frame length is counted. One clock after the last beat the filter
// decides: the frame must be IPv4 carrying UDP and at least 54 bytes long,
// and, for each enabled rule, its destination MAC, source IP, destination IP
// and destination UDP port must equal the configured values. An accepted
// frame produces a one-clock rec_valid with sequence number, transmit and
// receive timestamps and length; a rejected one increments rx_dropped.
// The document gives the block's job (receive, filter by user rules); the
// rules, the record and the timing are this design's choices.
//
// Timing: the clock edge after the one that accepts the tlast beat evaluates
// the filter and registers the record, so rec_valid is high in the second
// clock after the last beat. Frames may follow each other with no gap.
module packet_receiver
  import ptt_pkg::*;
#(
  parameter int unsigned DATA_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [DATA_W-1:0]   s_axis_tdata,
  input  logic [DATA_W/8-1:0] s_axis_tkeep,
  input  logic                s_axis_tvalid,
  input  logic                s_axis_tlast,
  output logic                s_axis_tready,
  input  logic [TS_W-1:0]     timestamp,
  input  pkt_cfg_t            cfg,
  input  filt_en_t            filt_en,
  output logic                rec_valid,
  output rx_rec_t             rec,
  output logic [31:0]         rx_frames,
  output logic [31:0]         rx_dropped
);

  localparam int unsigned BPB = DATA_W / 8;

  logic [7:0]      hdr [HDR_BYTES];
  logic [15:0]     off_q;        // byte offset of the next beat
  logic [TS_W-1:0] rx_ts_q;
  logic [15:0]     len_q;        // length of the completed frame
  logic            eval_q;       // a frame ended in the previous clock
  logic            beat;
  logic [15:0]     beat_bytes;
  logic            pass;

  assign s_axis_tready = 1'b1;
  assign beat = s_axis_tvalid;

  always_comb begin
    beat_bytes = '0;
    for (int j = 0; j < BPB; j++) beat_bytes += 16'(s_axis_tkeep[j]);
  end

  // Field extraction from the stored header bytes
  function automatic logic [31:0] get32(input int unsigned o);
    return {hdr[o], hdr[o+1], hdr[o+2], hdr[o+3]};
  endfunction

  always_comb begin
    logic [47:0] dmac;
    logic [15:0] dport;
    logic [15:0] etype;
    dmac  = {hdr[0], hdr[1], hdr[2], hdr[3], hdr[4], hdr[5]};
    etype = {hdr[OFF_ETYPE], hdr[OFF_ETYPE+1]};
    dport = {hdr[OFF_DPORT], hdr[OFF_DPORT+1]};
    pass = (len_q >= 16'(HDR_BYTES)) && (etype == ETHERTYPE_IPV4)
        && (hdr[OFF_IP] == 8'h45) && (hdr[OFF_PROTO] == IP_PROTO_UDP)
        && (!filt_en.dst_mac  || dmac == cfg.dst_mac)
        && (!filt_en.src_ip   || get32(OFF_SRC_IP) == cfg.src_ip)
        && (!filt_en.dst_ip   || get32(OFF_DST_IP) == cfg.dst_ip)
        && (!filt_en.dst_port || dport == cfg.dst_port);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < HDR_BYTES; i++) hdr[i] <= '0;
      off_q      <= '0;
      rx_ts_q    <= '0;
      len_q      <= '0;
      eval_q     <= 1'b0;
      rec_valid  <= 1'b0;
      rec        <= '0;
      rx_frames  <= '0;
      rx_dropped <= '0;
    end else begin
      rec_valid <= 1'b0;
      eval_q    <= 1'b0;
      // decide on the frame that ended in the previous clock
      if (eval_q) begin
        rx_frames <= rx_frames + 1;
        if (pass) begin
          rec_valid <= 1'b1;
          rec.seq   <= get32(OFF_SEQ);
          rec.tx_ts <= {get32(OFF_TS), get32(OFF_TS + 4)};
          rec.rx_ts <= rx_ts_q;
          rec.len   <= len_q;
        end else begin
          rx_dropped <= rx_dropped + 1;
        end
      end
      if (beat) begin
        if (off_q == 0) rx_ts_q <= timestamp;
        for (int j = 0; j < BPB; j++)
          if ((32'(off_q) + j) < HDR_BYTES && s_axis_tkeep[j])
            hdr[32'(off_q) + j] <= s_axis_tdata[8*j +: 8];
        if (s_axis_tlast) begin
          len_q  <= off_q + beat_bytes;
          off_q  <= '0;
          eval_q <= 1'b1;
        end else if (off_q < 16'hFFFF - 16'(BPB)) begin
          off_q <= off_q + 16'(BPB);
        end
      end
    end
  end

endmodule
