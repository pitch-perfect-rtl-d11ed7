// tb_fft_roundtrip: runs a 4096-sample window through the forward ffter, the
// spectrum buffers, and the inverse ffter, as the pipeline does without the
// polar stages, and checks that the inverse output reproduces the input. The
// two FFT core models stall their sinks at different rates. The input is a
// sum of five bin-centred tones (bins 3, 64, 200, 1000, 2047) of differing
// amplitudes plus a DC offset, so the 16-bit rounding of the scaled spectrum
// touches only a few bins and the round trip must hold within 6 LSB per sample.
// Three windows are sent back to back to check that the wrappers rearm.
module tb_fft_roundtrip;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int N = 4096;
  localparam real PI = 3.14159265358979323846;

  logic [15:0] x [N];             // input window
  logic [15:0] sre [N], sim [N];  // spectrum buffers
  logic [15:0] y [N];             // round-trip output (real part)
  logic [15:0] yi [N];

  // forward wrapper + core
  logic f_go = 0, f_go_out, f_busy;
  logic [11:0] f_addr; logic [15:0] f_rd;
  logic f_sv, f_sr, f_ss, f_se, f_inv, f_ov, f_ordy, f_os, f_oe;
  logic [15:0] f_sre, f_sim, f_ore, f_oim; logic [12:0] f_pts;
  logic [15:0] f_wrd, f_wid; logic [11:0] f_wra, f_wia; logic f_wrw, f_wiw;
  always @(posedge clk) begin
    f_rd <= x[f_addr];
    if (f_wrw) sre[f_wra] <= f_wrd;
    if (f_wiw) sim[f_wia] <= f_wid;
  end
  ffter #(.INVERSE(1'b0)) u_fwd (.clk, .reset, .go_in(f_go), .in_real_data(f_rd), .in_imag_data(16'd0),
    .in_buf_addr(f_addr), .fft_sink_valid(f_sv), .fft_sink_ready(f_sr), .fft_sink_sop(f_ss),
    .fft_sink_eop(f_se), .fft_sink_real(f_sre), .fft_sink_imag(f_sim), .fft_inverse(f_inv),
    .fft_fftpts(f_pts), .fft_source_valid(f_ov), .fft_source_ready(f_ordy), .fft_source_sop(f_os),
    .fft_source_eop(f_oe), .fft_source_real(f_ore), .fft_source_imag(f_oim), .real_buf_data(f_wrd),
    .real_buf_addr(f_wra), .real_buf_wren(f_wrw), .imag_buf_data(f_wid), .imag_buf_addr(f_wia),
    .imag_buf_wren(f_wiw), .go_out(f_go_out), .busy(f_busy));
  fft_ip_model #(.N(N), .LATENCY(50), .STALL_EVERY(5)) u_fcore (.clk, .sink_valid(f_sv), .sink_ready(f_sr),
    .sink_sop(f_ss), .sink_eop(f_se), .sink_real(f_sre), .sink_imag(f_sim), .inverse(f_inv),
    .source_valid(f_ov), .source_ready(f_ordy), .source_sop(f_os), .source_eop(f_oe),
    .source_real(f_ore), .source_imag(f_oim));

  // inverse wrapper + core, started by the forward wrapper's go_out
  logic i_go_out, i_busy;
  logic [11:0] i_addr; logic [15:0] i_rdr, i_rdi;
  logic i_sv, i_sr, i_ss, i_se, i_inv, i_ov, i_ordy, i_os, i_oe;
  logic [15:0] i_sre, i_sim, i_ore, i_oim; logic [12:0] i_pts;
  logic [15:0] i_wrd, i_wid; logic [11:0] i_wra, i_wia; logic i_wrw, i_wiw;
  always @(posedge clk) begin
    i_rdr <= sre[i_addr];
    i_rdi <= sim[i_addr];
    if (i_wrw) y[i_wra] <= i_wrd;
    if (i_wiw) yi[i_wia] <= i_wid;
  end
  ffter #(.INVERSE(1'b1)) u_inv (.clk, .reset, .go_in(f_go_out), .in_real_data(i_rdr), .in_imag_data(i_rdi),
    .in_buf_addr(i_addr), .fft_sink_valid(i_sv), .fft_sink_ready(i_sr), .fft_sink_sop(i_ss),
    .fft_sink_eop(i_se), .fft_sink_real(i_sre), .fft_sink_imag(i_sim), .fft_inverse(i_inv),
    .fft_fftpts(i_pts), .fft_source_valid(i_ov), .fft_source_ready(i_ordy), .fft_source_sop(i_os),
    .fft_source_eop(i_oe), .fft_source_real(i_ore), .fft_source_imag(i_oim), .real_buf_data(i_wrd),
    .real_buf_addr(i_wra), .real_buf_wren(i_wrw), .imag_buf_data(i_wid), .imag_buf_addr(i_wia),
    .imag_buf_wren(i_wiw), .go_out(i_go_out), .busy(i_busy));
  fft_ip_model #(.N(N), .LATENCY(70), .STALL_EVERY(9)) u_icore (.clk, .sink_valid(i_sv), .sink_ready(i_sr),
    .sink_sop(i_ss), .sink_eop(i_se), .sink_real(i_sre), .sink_imag(i_sim), .inverse(i_inv),
    .source_valid(i_ov), .source_ready(i_ordy), .source_sop(i_os), .source_eop(i_oe),
    .source_real(i_ore), .source_imag(i_oim));

  int tone_bin [5] = '{3, 64, 200, 1000, 2047};
  real amps [5] = '{6000.0, 4000.0, 3000.0, 2000.0, 1000.0};

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 3; w++) begin
      int worst;
      for (int n = 0; n < N; n++) begin
        real v;
        v = 500.0 * (w - 1);
        for (int t = 0; t < 5; t++)
          v += amps[t] * $cos(2.0 * PI * tone_bin[t] * n / N + 0.7 * t + w);
        x[n] = 16'(int'($floor(v + 0.5)));
      end
      @(negedge clk) f_go = 1;
      @(negedge clk) f_go = 0;
      wait (i_go_out);
      @(negedge clk);
      worst = 0;
      for (int n = 0; n < N; n++) begin
        int e, ei;
        e  = int'($signed(y[n])) - int'($signed(x[n]));
        ei = int'($signed(yi[n]));
        if (e < 0) e = -e;
        if (ei < 0) ei = -ei;
        if (e > worst) worst = e;
        checks++;
        if (e > 6 || ei > 6) begin
          failures++;
          if (failures < 10) $display("FAIL window %0d sample %0d: %0d + j%0d, input %0d",
                                      w, n, $signed(y[n]), $signed(yi[n]), $signed(x[n]));
        end
      end
      $display("window %0d: worst round-trip error %0d LSB", w, worst);
    end
    checks++;
    if (u_fcore.stalls == 0 || u_icore.stalls == 0) begin failures++; $display("FAIL no stalls"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
