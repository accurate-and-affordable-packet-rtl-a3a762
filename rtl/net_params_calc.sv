// net_params_calc: turns the records of one packet train into network parameters.
//
// arm clears the accumulators and starts a measurement. For every record the
// block calibrates the one-way delay (owd = rx_ts - tx_ts, then owd_calibration)
// and accumulates: frame count, bytes, first and last receive time, sum, min
// and max delay, the sum of |owd(i) - owd(i-1)| over consecutive frames, and
// frames whose sequence number is not above the highest seen so far
// (out of order). The measurement ends when train_len frames have arrived or
// on a stop pulse. Then, with one shared sequential divider:
//   throughput_bps = 8e9 * (bytes of all frames but the last) / (rx_last - rx_first)
//   owd_mean       = sum of delays / frames
//   jitter_mean    = sum of delay differences / (frames - 1)
//   lost           = train_len - frames (0 if more arrived)
// The throughput is the packet-train capacity estimate: the bits of N-1 frames
// over the time from the start of the first to the start of the last, i.e. the
// mean dispersion of the train. Frame bytes exclude preamble and FCS, so a
// back-to-back train of S-byte frames on a link of rate R reads
// R * S / (S + 24). Throughput and jitter are 0 with fewer than 2 frames.
// The parameters measured follow the document; the jitter definition, the
// out-of-order rule and the end condition are this design's choices.
//
// Timing: one record per clock at most. res_valid (held until the next arm)
// and a one-clock done pulse rise at the 200th clock edge after the edge that
// takes the last record or the stop pulse: two clocks of bookkeeping and three
// divisions of 66 clocks each.
module net_params_calc
  import ptt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               arm,
  input  logic               stop,
  input  logic [31:0]        train_len,
  input  logic signed [31:0] cal_offset,
  input  logic signed [31:0] cal_slope,
  input  logic               rec_valid,
  input  rx_rec_t            rec,
  output results_t           res,
  output logic               res_valid,
  output logic               done,
  output logic               running
);

  typedef enum logic [2:0] {S_IDLE, S_RUN, S_END, S_DIV_THR, S_DIV_OWD, S_DIV_JIT, S_DONE} state_t;
  state_t state_q;

  logic [31:0]        count_q, max_seq_q, ooo_q;
  logic [63:0]        bytes_q;
  logic [15:0]        last_len_q;
  logic [TS_W-1:0]    first_rx_q, last_rx_q;
  logic signed [63:0] owd_sum_q, owd_min_q, owd_max_q, prev_owd_q;
  logic [63:0]        jit_sum_q;
  logic               owd_neg_q;

  logic signed [63:0] owd_raw, owd_c, owd_diff;

  logic        div_start, div_busy, div_done;
  logic [63:0] div_a, div_b, div_q, div_r;

  assign owd_raw = $signed(rec.rx_ts - rec.tx_ts);

  owd_calibration u_cal (
    .owd(owd_raw), .len(rec.len), .offset(cal_offset), .slope(cal_slope), .owd_cal(owd_c)
  );

  assign owd_diff = owd_c - prev_owd_q;
  assign running  = (state_q == S_RUN);

  udiv64 u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q), .remainder(div_r)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      count_q    <= '0;
      max_seq_q  <= '0;
      ooo_q      <= '0;
      bytes_q    <= '0;
      last_len_q <= '0;
      first_rx_q <= '0;
      last_rx_q  <= '0;
      owd_sum_q  <= '0;
      owd_min_q  <= '0;
      owd_max_q  <= '0;
      prev_owd_q <= '0;
      jit_sum_q  <= '0;
      owd_neg_q  <= 1'b0;
      res        <= '0;
      res_valid  <= 1'b0;
      done       <= 1'b0;
      div_start  <= 1'b0;
      div_a      <= '0;
      div_b      <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      if (arm) begin
        state_q   <= S_RUN;
        count_q   <= '0;
        max_seq_q <= '0;
        ooo_q     <= '0;
        bytes_q   <= '0;
        owd_sum_q <= '0;
        jit_sum_q <= '0;
        res       <= '0;
        res_valid <= 1'b0;
      end else begin
        unique case (state_q)
          S_IDLE: ;
          S_RUN: begin
            if (rec_valid) begin
              count_q    <= count_q + 1;
              bytes_q    <= bytes_q + 64'(rec.len);
              last_len_q <= rec.len;
              last_rx_q  <= rec.rx_ts;
              owd_sum_q  <= owd_sum_q + owd_c;
              prev_owd_q <= owd_c;
              if (count_q == 0) begin
                first_rx_q <= rec.rx_ts;
                owd_min_q  <= owd_c;
                owd_max_q  <= owd_c;
                max_seq_q  <= rec.seq;
              end else begin
                jit_sum_q <= jit_sum_q + 64'(owd_diff < 0 ? -owd_diff : owd_diff);
                if (owd_c < owd_min_q) owd_min_q <= owd_c;
                if (owd_c > owd_max_q) owd_max_q <= owd_c;
                if (rec.seq <= max_seq_q) ooo_q <= ooo_q + 1;
                else                      max_seq_q <= rec.seq;
              end
              if (count_q + 1 == train_len) state_q <= S_END;
            end
            if (stop) state_q <= S_END;
          end
          S_END: begin
            res.rx_count     <= count_q;
            res.lost         <= (train_len > count_q) ? train_len - count_q : '0;
            res.out_of_order <= ooo_q;
            res.owd_min      <= owd_min_q;
            res.owd_max      <= owd_max_q;
            res.dispersion   <= last_rx_q - first_rx_q;
            div_a            <= (bytes_q - 64'(last_len_q)) * 64'd8_000_000_000;
            div_b            <= last_rx_q - first_rx_q;
            div_start        <= 1'b1;
            state_q          <= S_DIV_THR;
          end
          S_DIV_THR: if (div_done) begin
            res.throughput_bps <= (count_q < 2) ? '0 : div_q;
            owd_neg_q <= owd_sum_q < 0;
            div_a     <= (owd_sum_q < 0) ? 64'(-owd_sum_q) : 64'(owd_sum_q);
            div_b     <= 64'(count_q);
            div_start <= 1'b1;
            state_q   <= S_DIV_OWD;
          end
          S_DIV_OWD: if (div_done) begin
            res.owd_mean <= (count_q == 0) ? '0 : owd_neg_q ? -$signed(div_q) : $signed(div_q);
            div_a     <= jit_sum_q;
            div_b     <= 64'(count_q) - 64'd1;
            div_start <= 1'b1;
            state_q   <= S_DIV_JIT;
          end
          S_DIV_JIT: if (div_done) begin
            res.jitter_mean <= (count_q < 2) ? '0 : div_q;
            state_q   <= S_DONE;
          end
          S_DONE: begin
            res_valid <= 1'b1;
            done      <= 1'b1;
            state_q   <= S_IDLE;
          end
          default: state_q <= S_IDLE;
        endcase
      end
    end
  end

endmodule
