// tb_pitch_perfect_top: end-to-end test of the whole pitch shifter at its
// default sizes (4096-point windows, 1024-sample hop, 5120-word rings), with
// behavioural models of the parts the design connects to: the audio core
// (ADC samples arrive on a fixed audio-clock tick and wait in a FIFO; the DAC
// raises ready once per sample period on each channel, slightly faster than
// the ADC so every output block ends before the next one starts), and two
// FFT core models that stall their sinks.
//
// The ADC carries a sine at 1/64 cycle per sample (bin 64 of the 4096-point
// transform, 16 cycles per 1024-sample block). The scale register is written
// with 64 (unity) over the Avalon-MM port, after 12 windows with 128 (one
// octave up) and after 10 more with 32 (one octave down). Checks:
//   * unity: once the pipeline is full, each output block is dominated by
//     the input tone (16 cycles per block) at 50% to 110% of its amplitude
//     and has little energy at twice that frequency;
//   * x2.0 and x0.5: once the old windows have left the overlap, each output
//     block is dominated by 32, then 8, cycles per block;
//   * both DAC channels receive identical streams.
// Mechanisms counted, each a failure if it never happens: every stage's
// finish pulse, both ping-pong banks after cart_to_polar, the input and
// output rings wrapping (window_start 4 followed by 0), FFT sink stalls,
// scaler bins dropped past the top bin at x2.0, the scale register change,
// and DAC playback. Clocks: clk 100 MHz in simulation, audio_clk a quarter
// of it, one ADC sample every 16 audio clocks.
module tb_pitch_perfect_top;
  logic clk = 0, audio_clk = 0, reset = 1, audio_reset = 1;
  logic [7:0] avs_writedata = 0;
  logic avs_write = 0, avs_chipselect = 0;
  logic [2:0] avs_address = 0;
  logic [15:0] left_in_data = 0, right_in_data = 0;
  logic left_in_valid = 0, right_in_valid = 0, left_in_ready, right_in_ready;
  logic [15:0] left_out_data, right_out_data;
  logic left_out_valid, right_out_valid, left_out_ready = 0, right_out_ready = 0;
  logic fft_sink_valid, fft_sink_ready, fft_sink_sop, fft_sink_eop, fft_inverse;
  logic [15:0] fft_sink_real, fft_sink_imag, fft_source_real, fft_source_imag;
  logic [12:0] fft_fftpts, ifft_fftpts;
  logic fft_source_valid, fft_source_ready, fft_source_sop, fft_source_eop;
  logic ifft_sink_valid, ifft_sink_ready, ifft_sink_sop, ifft_sink_eop, ifft_inverse;
  logic [15:0] ifft_sink_real, ifft_sink_imag, ifft_source_real, ifft_source_imag;
  logic ifft_source_valid, ifft_source_ready, ifft_source_sop, ifft_source_eop;
  logic [7:0] stage_done;
  logic emitter_playing;
  int checks = 0, failures = 0;

  pitch_perfect_top dut (.*);

  fft_ip_model #(.LATENCY(100), .STALL_EVERY(11)) u_fft_core (
    .clk, .sink_valid(fft_sink_valid), .sink_ready(fft_sink_ready), .sink_sop(fft_sink_sop),
    .sink_eop(fft_sink_eop), .sink_real(fft_sink_real), .sink_imag(fft_sink_imag),
    .inverse(fft_inverse), .source_valid(fft_source_valid), .source_ready(fft_source_ready),
    .source_sop(fft_source_sop), .source_eop(fft_source_eop), .source_real(fft_source_real),
    .source_imag(fft_source_imag));
  fft_ip_model #(.LATENCY(100), .STALL_EVERY(13)) u_ifft_core (
    .clk, .sink_valid(ifft_sink_valid), .sink_ready(ifft_sink_ready), .sink_sop(ifft_sink_sop),
    .sink_eop(ifft_sink_eop), .sink_real(ifft_sink_real), .sink_imag(ifft_sink_imag),
    .inverse(ifft_inverse), .source_valid(ifft_source_valid), .source_ready(ifft_source_ready),
    .source_sop(ifft_source_sop), .source_eop(ifft_source_eop), .source_real(ifft_source_real),
    .source_imag(ifft_source_imag));

  always #5  clk = ~clk;
  always #20 audio_clk = ~audio_clk;

  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = 8000.0;
  localparam int  SP  = 16;   // audio clocks per ADC sample

  // ---- audio core model: ADC side ----
  int adc_tick = 0, adc_pending = 0, adc_n = 0;
  always @(posedge audio_clk) begin
    left_in_valid  <= 1'b0;
    right_in_valid <= 1'b0;
    if (adc_tick == SP - 1) begin adc_tick = 0; adc_pending++; end
    else adc_tick++;
    if (left_in_ready && adc_pending > 0) begin
      logic [15:0] s;
      s = 16'(int'($floor(AMP * $sin(2.0 * PI * adc_n / 64.0) + 0.5)));
      left_in_valid  <= 1'b1;
      left_in_data   <= s;
      right_in_valid <= 1'b1;
      right_in_data  <= s;
      adc_n++;
      adc_pending--;
    end
  end

  // ---- audio core model: DAC side ----
  int dac_tick = 0;
  int lout [$], rout [$];
  always @(posedge audio_clk) begin
    left_out_ready  <= (dac_tick == 0);
    right_out_ready <= (dac_tick == 3);
    dac_tick = (dac_tick == SP - 3) ? 0 : dac_tick + 1;
    if (!audio_reset && left_out_valid)  lout.push_back(int'($signed(left_out_data)));
    if (!audio_reset && right_out_valid) rout.push_back(int'($signed(right_out_data)));
  end

  // ---- mechanism counters ----
  int stage_cnt [8];
  int bank_seen [2];
  int in_wraps = 0, out_wraps = 0, dropped_bins = 0, scale_changes = 0;
  logic [2:0] last_in_ws = 0, last_out_ws = 0;
  logic [7:0] last_scale = 0;
  always @(posedge clk) if (!reset) begin
    for (int s = 0; s < 8; s++) if (stage_done[s]) stage_cnt[s]++;
    if (stage_done[2]) bank_seen[dut.c2p_cur]++;
    if (stage_done[0]) begin
      if (last_in_ws == 3'd4 && dut.in_window_start == 3'd0) in_wraps++;
      last_in_ws <= dut.in_window_start;
    end
    if (stage_done[7]) begin
      if (last_out_ws == 3'd4 && dut.out_window_start == 3'd0) out_wraps++;
      last_out_ws <= dut.out_window_start;
    end
    if (dut.u_scaler.state == dut.u_scaler.A_ACC && !dut.u_scaler.acc_ok) dropped_bins++;
    if (dut.shift_amt != last_scale) begin
      if (last_scale != 0) scale_changes++;
      last_scale <= dut.shift_amt;
    end
  end

  // magnitude of the k-cycles-per-block component of output block b
  function automatic real tone(input int b, input int k);
    real sr, si;
    sr = 0.0; si = 0.0;
    for (int n = 0; n < 1024; n++) begin
      sr += $itor(lout[b * 1024 + n]) * $cos(2.0 * PI * k * n / 1024.0);
      si += $itor(lout[b * 1024 + n]) * $sin(2.0 * PI * k * n / 1024.0);
    end
    return 2.0 * $sqrt(sr * sr + si * si) / 1024.0;
  endfunction

  task automatic avs_write_scale(input logic [7:0] v);
    @(negedge clk);
    avs_chipselect = 1; avs_write = 1; avs_writedata = v; avs_address = 0;
    @(negedge clk);
    avs_chipselect = 0; avs_write = 0;
  endtask

  task automatic wait_windows(input int n);
    int target;
    target = stage_cnt[7] + n;
    while (stage_cnt[7] < target) @(negedge clk);
  endtask

  task automatic check_blocks(input int first, input int last, input int k, input string what);
    for (int b = first; b <= last; b++) begin
      real a, a2, other;
      a = tone(b, k); a2 = tone(b, 2 * k); other = tone(b, k / 2);
      checks++;
      if (a < 0.5 * AMP || a > 1.1 * AMP || a2 > 0.1 * a || other > 0.1 * a) begin
        failures++;
        $display("FAIL %s block %0d: %0d cycles/block %f, %0d: %f, %0d: %f", what, b, k, a, 2 * k, a2, k / 2, other);
      end else
        $display("%s block %0d: amplitude %0.1f at %0d cycles/block (%0.1f at %0d, %0.1f at %0d)",
                 what, b, a, k, a2, 2 * k, other, k / 2);
    end
  endtask

  int unity_blocks;
  initial begin
    for (int s = 0; s < 8; s++) stage_cnt[s] = 0;
    bank_seen[0] = 0; bank_seen[1] = 0;
    repeat (4) @(posedge audio_clk);
    @(negedge clk) begin reset = 0; audio_reset = 0; end
    avs_write_scale(8'd64);
    // the first three windows are partly silence; allow the overlap to fill
    wait_windows(12);
    wait (!emitter_playing);
    unity_blocks = lout.size() / 1024;
    checks++;
    if (lout.size() % 1024 != 0) begin failures++; $display("FAIL partial block: %0d samples", lout.size()); end
    check_blocks(unity_blocks - 5, unity_blocks - 1, 16, "unity");
    avs_write_scale(8'd128);
    wait_windows(10);
    wait (!emitter_playing);
    check_blocks(lout.size() / 1024 - 4, lout.size() / 1024 - 1, 32, "x2.0");
    avs_write_scale(8'd32);
    wait_windows(8);
    wait (!emitter_playing);
    check_blocks(lout.size() / 1024 - 3, lout.size() / 1024 - 1, 8, "x0.5");
    checks++;
    if (lout.size() != rout.size()) begin failures++; $display("FAIL channel lengths %0d %0d", lout.size(), rout.size()); end
    for (int n = 0; n < lout.size() && n < rout.size(); n++) begin
      checks++;
      if (lout[n] != rout[n]) begin failures++; if (failures < 20) $display("FAIL channels differ at %0d", n); end
    end
    // mechanisms
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (stage_cnt[s] < 20) begin failures++; $display("FAIL stage %0d finished only %0d windows", s, stage_cnt[s]); end
    end
    $display("windows: %0d; banks %0d/%0d; ring wraps in %0d out %0d; FFT stalls %0d/%0d; dropped bins %0d; scale changes %0d; DAC samples %0d",
             stage_cnt[7], bank_seen[0], bank_seen[1], in_wraps, out_wraps, u_fft_core.stalls,
             u_ifft_core.stalls, dropped_bins, scale_changes, lout.size());
    checks += 8;
    if (bank_seen[0] == 0 || bank_seen[1] == 0) begin failures++; $display("FAIL a ping-pong bank was never used"); end
    if (in_wraps == 0)  begin failures++; $display("FAIL input ring never wrapped"); end
    if (out_wraps == 0) begin failures++; $display("FAIL output ring never wrapped"); end
    if (u_fft_core.stalls == 0 || u_ifft_core.stalls == 0) begin failures++; $display("FAIL no FFT stall"); end
    if (dropped_bins == 0) begin failures++; $display("FAIL no scaler bin dropped"); end
    if (scale_changes < 2) begin failures++; $display("FAIL scale never changed"); end
    if (lout.size() == 0) begin failures++; $display("FAIL no DAC output"); end
    if (u_fft_core.packets != stage_cnt[2] || u_ifft_core.packets != stage_cnt[6]) begin
      failures++; $display("FAIL FFT packets %0d/%0d", u_fft_core.packets, u_ifft_core.packets);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
