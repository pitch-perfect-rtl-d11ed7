// tb_ffter: two ffter instances, forward (INVERSE=0) and inverse (INVERSE=1),
// each wrapped around the behavioural FFT core model with sink back-pressure
// (one stall in every 7 words) and source_ready held high as the wrapper
// requires. The forward instance streams a cosine of amplitude 8000 at bin 5
// plus a sine of amplitude 4000 at bin 9 and must write a spectrum with
// 4000 at bins 5 and 4091, -2000j / +2000j at bins 9 / 4087 and near zero
// elsewhere. The inverse instance streams a two-bin spectrum and must write
// the matching time signal. Checks also cover the inverse flag, fftpts,
// sop/eop placement, the write count and go_out.
module tb_ffter;
  logic clk = 0, reset = 1;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  localparam int N = 4096;
  localparam real PI = 3.14159265358979323846;

  logic [15:0] f_re [N], f_im [N], i_re [N], i_im [N];
  logic [15:0] fo_re [N], fo_im [N], io_re [N], io_im [N];
  int f_writes = 0, i_writes = 0;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL %s", msg); end
  endtask

  // one ffter + core model per direction
  `define FFT_DUT(P, INV, INRE, INIM, ORE, OIM, WCNT) \
    logic P``go = 0, P``go_out, P``busy; \
    logic [11:0] P``addr; logic [15:0] P``rdr, P``rdi; \
    logic P``sv, P``sr, P``ss, P``se, P``inv, P``ov, P``ordy, P``os, P``oe; \
    logic [15:0] P``sre, P``sim, P``ore, P``oim; logic [12:0] P``pts; \
    logic [15:0] P``wrd, P``wid; logic [11:0] P``wra, P``wia; logic P``wrw, P``wiw; \
    always @(posedge clk) begin P``rdr <= INRE[P``addr]; P``rdi <= INIM[P``addr]; \
      if (P``wrw) ORE[P``wra] <= P``wrd; if (P``wiw) OIM[P``wia] <= P``wid; \
      if (P``wrw && !reset) WCNT++; end \
    ffter #(.INVERSE(INV)) P``dut (.clk, .reset, .go_in(P``go), .in_real_data(P``rdr), \
      .in_imag_data(P``rdi), .in_buf_addr(P``addr), .fft_sink_valid(P``sv), \
      .fft_sink_ready(P``sr), .fft_sink_sop(P``ss), .fft_sink_eop(P``se), \
      .fft_sink_real(P``sre), .fft_sink_imag(P``sim), .fft_inverse(P``inv), \
      .fft_fftpts(P``pts), .fft_source_valid(P``ov), .fft_source_ready(P``ordy), \
      .fft_source_sop(P``os), .fft_source_eop(P``oe), .fft_source_real(P``ore), \
      .fft_source_imag(P``oim), .real_buf_data(P``wrd), .real_buf_addr(P``wra), \
      .real_buf_wren(P``wrw), .imag_buf_data(P``wid), .imag_buf_addr(P``wia), \
      .imag_buf_wren(P``wiw), .go_out(P``go_out), .busy(P``busy)); \
    fft_ip_model #(.N(N), .LATENCY(40), .STALL_EVERY(7)) P``core (.clk, \
      .sink_valid(P``sv), .sink_ready(P``sr), .sink_sop(P``ss), .sink_eop(P``se), \
      .sink_real(P``sre), .sink_imag(P``sim), .inverse(P``inv), .source_valid(P``ov), \
      .source_ready(P``ordy), .source_sop(P``os), .source_eop(P``oe), \
      .source_real(P``ore), .source_imag(P``oim));

  `FFT_DUT(f_, 1'b0, f_re, f_im, fo_re, fo_im, f_writes)
  `FFT_DUT(i_, 1'b1, i_re, i_im, io_re, io_im, i_writes)

  // sop/eop must mark the first and last word accepted by the core
  int f_sent = 0;
  always @(posedge clk) if (f_sv && f_sr) begin
    chk(f_ss == (f_sent == 0) && f_se == (f_sent == N - 1),
        $sformatf("sop/eop wrong at word %0d", f_sent));
    f_sent = (f_sent + 1) % N;
  end

  function automatic bit near(input logic [15:0] v, input real e, input real tol);
    return ($itor($signed(v)) - e <= tol) && (e - $itor($signed(v)) <= tol);
  endfunction

  initial begin
    for (int n = 0; n < N; n++) begin
      f_re[n] = 16'(int'($floor(8000.0 * $cos(2.0 * PI * 5 * n / N) + 4000.0 * $sin(2.0 * PI * 9 * n / N) + 0.5)));
      f_im[n] = 0;
      i_re[n] = 0; i_im[n] = 0;
    end
    i_re[3] = 100; i_re[N - 3] = 100;         // 200 cos(2 pi 3 n / N)
    i_im[7] = -16'sd50; i_im[N - 7] = 16'sd50;  // 100 sin(2 pi 7 n / N)
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    chk(f_inv == 0 && i_inv == 1, "inverse flag");
    chk(f_pts == 13'd4096 && i_pts == 13'd4096, "fftpts");
    chk(f_ordy && i_ordy, "source_ready");
    chk(!f_busy && !f_go_out, "idle after reset");
    @(negedge clk) begin f_go = 1; i_go = 1; end
    @(negedge clk) begin f_go = 0; i_go = 0; end
    chk(f_busy && i_busy, "busy after go");
    fork
      begin wait (f_go_out); @(negedge clk); chk(f_writes == N, $sformatf("forward writes %0d", f_writes)); end
      begin wait (i_go_out); @(negedge clk); chk(i_writes == N, $sformatf("inverse writes %0d", i_writes)); end
    join
    for (int k = 0; k < N; k++) begin
      real er, ei;
      er = (k == 5 || k == N - 5) ? 4000.0 : 0.0;
      ei = (k == 9) ? -2000.0 : (k == N - 9) ? 2000.0 : 0.0;
      chk(near(fo_re[k], er, 2.0) && near(fo_im[k], ei, 2.0),
          $sformatf("forward bin %0d = %0d j%0d", k, $signed(fo_re[k]), $signed(fo_im[k])));
    end
    for (int n = 0; n < N; n++) begin
      real e;
      e = 200.0 * $cos(2.0 * PI * 3 * n / N) + 100.0 * $sin(2.0 * PI * 7 * n / N);
      chk(near(io_re[n], e, 2.0) && near(io_im[n], 0.0, 2.0),
          $sformatf("inverse sample %0d = %0d", n, $signed(io_re[n])));
    end
    chk(f_core.stalls > 0, "no back-pressure exercised");
    chk(!f_busy && !i_busy, "busy after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
