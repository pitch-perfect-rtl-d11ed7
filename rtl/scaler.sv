// scaler: the phase-vocoder pitch shift, applied to one window of polar FFT
// bins (magnitude and phase, Q8.8) at a time.
//
// Analysis pass, for each input bin i = 0 .. 2047 (the bins below Nyquist):
//   1. dphase = phase_cur[i] - phase_prev[i], the phase advance since the
//      previous window (read from the other ping-pong buffer).
//   2. Subtract the advance a tone at the bin's centre would show over a hop
//      of a quarter window, i*pi/2, which modulo 2*pi is (i mod 4) * pi/2, and
//      wrap the difference to [-pi, pi) by bounded add/subtract steps.
//   3. Scale that phase error by 2/pi to get the bin deviation, a fraction of
//      a bin; add i and multiply by the scale amount (Q2.6) to get the
//      synthesis bin as a Q.8 number.
//   4. Round to the nearest bin b. If 0 <= b < 2048, add the magnitude to
//      synth_mags[b] and the rounding remainder (the synthesis bin deviation)
//      to synth_devs[b]. Bins that land outside the range are dropped.
//   Each bin takes four cycles: two for the input read and two for the
//   read-modify-write of the synthesis accumulators. The write of one bin
//   reaches the RAM before the next bin's accumulator read, so bins that land
//   in the same synthesis bin accumulate without forwarding.
// Synthesis pass, for each output bin i = 0 .. 2047:
//   phase_out = wrap(phase_out_prev[i] + dev_i * pi/2 + (i mod 4) * pi/2),
//   where dev_i * pi/2 is taken modulo 2*pi from the two low integer bits of
//   the Q8.8 deviation plus its fraction. mag_out = synth_mags[i]. Both go to
//   the post-scaler pair selected by cur_window; the accumulators are cleared
//   behind the read for the next window. Two cycles per bin.
// go_out pulses after the last bin (about 12,300 cycles after go_in) with
// cur_buf naming the post-scaler pair written. Accumulated magnitudes saturate
// at 32767 and deviations at +/-128 bins.
module scaler
  import pv_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        go_in,
  input  logic        cur_window,
  input  logic [7:0]  scale_amt,
  // pre-scaler magnitude/phase pairs 0 and 1 (read)
  input  logic [15:0] mag_in_buf_0_data,
  input  logic [15:0] mag_in_buf_1_data,
  input  logic [15:0] phase_in_buf_0_data,
  input  logic [15:0] phase_in_buf_1_data,
  output logic [11:0] in_buf_addr,
  // post-scaler magnitude/phase pairs 0 and 1
  input  logic [15:0] phase_out_buf_0_rdata,
  input  logic [15:0] phase_out_buf_1_rdata,
  output logic [11:0] out_buf_raddr,
  output logic [15:0] mag_out_wrdata,
  output logic [15:0] phase_out_wrdata,
  output logic [11:0] out_buf_wraddr,
  output logic        mag_out_buf_0_wren,
  output logic        phase_out_buf_0_wren,
  output logic        mag_out_buf_1_wren,
  output logic        phase_out_buf_1_wren,
  // synthesis accumulators
  input  logic [15:0] synth_mags_rdata,
  input  logic [15:0] synth_devs_rdata,
  output logic [11:0] synth_raddr,
  output logic [15:0] synth_mags_wrdata,
  output logic [15:0] synth_devs_wrdata,
  output logic [11:0] synth_wraddr,
  output logic        synth_wren,
  output logic        cur_buf,
  output logic        go_out,
  output logic        busy
);

  typedef enum logic [3:0] {
    IDLE, A_WAIT, A_CALC, A_WAIT2, A_ACC, S_START, S_WAIT, S_WR, DONE
  } state_t;
  state_t state;

  localparam logic [11:0] LAST_BIN = 12'(WIN_LEN / 2 - 1);

  logic        cur;
  logic [11:0] i;
  logic        out_wren;

  // ---- analysis arithmetic (valid in A_CALC) ----
  q88_t ph_cur, ph_prev, mag_cur;
  logic signed [23:0] dphase_err;
  q88_t               ph_err;
  logic signed [31:0] bin_dev;       // Q.8 bins
  logic signed [31:0] frac_bin;      // Q.8 bins
  logic signed [31:0] new_bin;       // Q.8 bins after scaling
  logic signed [31:0] new_bin_num;   // integer bin
  logic signed [31:0] new_bin_dev;   // Q.8 remainder

  assign ph_cur  = q88_t'(cur ? phase_in_buf_1_data : phase_in_buf_0_data);
  assign ph_prev = q88_t'(cur ? phase_in_buf_0_data : phase_in_buf_1_data);
  assign mag_cur = q88_t'(cur ? mag_in_buf_1_data   : mag_in_buf_0_data);

  always_comb begin
    dphase_err  = 24'(ph_cur) - 24'(ph_prev) - 24'(i[1:0]) * 24'(PHASE_HALF_PI);
    ph_err      = wrap_phase(dphase_err);
    bin_dev     = (32'(ph_err) * 32'(BIN_DEV_MULT)) >>> 8;
    frac_bin    = (32'(i) <<< 8) + bin_dev;
    new_bin     = (frac_bin * $signed({24'd0, scale_amt})) >>> 6;
    new_bin_num = (new_bin + 32'sd128) >>> 8;
    new_bin_dev = new_bin - (new_bin_num <<< 8);
  end

  logic        acc_ok;
  logic [15:0] acc_mag;
  q88_t        acc_dev;

  // ---- synthesis arithmetic (valid in S_WR) ----
  q88_t               sdev, prev_out_phase;
  logic signed [23:0] rem, new_phase_raw;
  q88_t               new_phase;
  assign sdev           = q88_t'(synth_devs_rdata);
  assign prev_out_phase = q88_t'(cur ? phase_out_buf_0_rdata : phase_out_buf_1_rdata);
  always_comb begin
    // (dev * pi/2) mod 2*pi: integer part mod 4 in quarter turns, plus fraction
    rem = 24'(sdev[9:8]) * 24'(PHASE_HALF_PI)
        + ((24'(sdev[7:0]) * 24'(PHASE_HALF_PI)) >>> 8);
    new_phase_raw = 24'(prev_out_phase) + rem + 24'(i[1:0]) * 24'(PHASE_HALF_PI);
    new_phase     = wrap_phase(new_phase_raw);
  end

  logic out_wren_q;
  logic [16:0] mag_sum;
  assign mag_sum              = {1'b0, synth_mags_rdata} + {1'b0, acc_mag};
  assign out_wren             = (state == S_WR);
  assign mag_out_buf_0_wren   = out_wren_q && !cur;
  assign phase_out_buf_0_wren = out_wren_q && !cur;
  assign mag_out_buf_1_wren   = out_wren_q &&  cur;
  assign phase_out_buf_1_wren = out_wren_q &&  cur;

  always_ff @(posedge clk) begin
    if (reset) begin
      state             <= IDLE;
      cur               <= 1'b0;
      cur_buf           <= 1'b0;
      i                 <= '0;
      in_buf_addr       <= '0;
      out_buf_raddr     <= '0;
      synth_raddr       <= '0;
      synth_wraddr      <= '0;
      synth_wren        <= 1'b0;
      synth_mags_wrdata <= '0;
      synth_devs_wrdata <= '0;
      out_buf_wraddr    <= '0;
      mag_out_wrdata    <= '0;
      phase_out_wrdata  <= '0;
      out_wren_q        <= 1'b0;
      go_out            <= 1'b0;
      acc_ok            <= 1'b0;
      acc_mag           <= '0;
      acc_dev           <= '0;
    end else begin
      synth_wren <= 1'b0;
      out_wren_q <= out_wren;
      go_out     <= 1'b0;
      unique case (state)
        IDLE: if (go_in) begin
          cur         <= cur_window;
          i           <= '0;
          in_buf_addr <= '0;
          state       <= A_WAIT;
        end
        A_WAIT: state <= A_CALC;
        A_CALC: begin
          acc_ok      <= (new_bin_num >= 0) && (new_bin_num < 32'(WIN_LEN / 2));
          acc_mag     <= mag_cur;
          acc_dev     <= q88_t'(new_bin_dev);
          synth_raddr <= 12'(new_bin_num);
          state       <= A_WAIT2;
        end
        A_WAIT2: state <= A_ACC;
        A_ACC: begin
          synth_wren        <= acc_ok;
          synth_wraddr      <= synth_raddr;
          synth_mags_wrdata <= (mag_sum > 17'd32767) ? 16'd32767 : mag_sum[15:0];
          synth_devs_wrdata <= sat16(32'(q88_t'(synth_devs_rdata)) + 32'(acc_dev));
          if (i == LAST_BIN) begin
            i             <= '0;
            synth_raddr   <= '0;
            out_buf_raddr <= '0;
            state         <= S_START;
          end else begin
            i           <= i + 12'd1;
            in_buf_addr <= i + 12'd1;
            state       <= A_WAIT;
          end
        end
        S_START: state <= S_WAIT;   // lets the last accumulation land
        S_WAIT:  state <= S_WR;
        S_WR: begin
          out_buf_wraddr    <= i;
          mag_out_wrdata    <= synth_mags_rdata;
          phase_out_wrdata  <= new_phase;
          synth_wren        <= 1'b1;          // clear the accumulators
          synth_wraddr      <= i;
          synth_mags_wrdata <= '0;
          synth_devs_wrdata <= '0;
          if (i == LAST_BIN) begin
            state <= DONE;
          end else begin
            i             <= i + 12'd1;
            synth_raddr   <= i + 12'd1;
            out_buf_raddr <= i + 12'd1;
            state         <= S_WAIT;
          end
        end
        DONE: begin
          go_out  <= 1'b1;
          cur_buf <= cur;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  assign busy = (state != IDLE);

  assert property (@(posedge clk) disable iff (reset) go_in |-> !busy);

endmodule
