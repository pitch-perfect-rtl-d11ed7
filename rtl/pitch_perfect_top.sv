// pitch_perfect_top: real-time phase-vocoder pitch shifter. Audio from the
// codec is cut into 4096-sample windows every 1024 samples, Hann windowed,
// transformed, pitch-scaled in the polar domain, transformed back, windowed
// again and overlap-added into the output stream.
//
// Stages, each started by the previous one's go pulse and each moving one
// window between on-chip buffers:
//   sampler (audio clock) -> ring_buf -> first_hannifier -> pre_fft_buf
//   -> ffter (FFT core) -> post_fft_real/imag -> cart_to_polar
//   -> pre_scaler mag/phase pairs 0/1 -> scaler (+ synth_mags/synth_devs)
//   -> post_scaler mag/phase pairs 0/1 -> polar_to_cart -> pre_ifft_real/imag
//   -> ffter, inverse (IFFT core) -> post_ifft_buf -> stitcher -> out ring
//   -> emitter (audio clock)
// The pitch scale comes from software_interface, an Avalon-MM register.
//
// Clocks: clk is the system clock (50 MHz in the design), audio_clk the codec
// clock (12.288 MHz). The two ring buffers cross between them; the go pulses
// cross through pulse_sync and the window_start values they qualify are held
// for a whole hop. Each clock has its own synchronous, active-high reset.
//
// The FFT/IFFT cores, the audio core, its clock and configuration cores and
// the processor are vendor parts; their data ports are the ports of this
// module. The FFT cores must accept and return 4096-word packets (16-bit
// fixed point, natural order). The pipeline finishes a window in roughly
// 40,000 system-clock cycles plus the two FFT latencies, far less than the
// 1024 samples (about a million cycles) between windows.
// Some outputs are constant by design: each core's fftpts (4096), inverse
// flag and source_ready, and fft_sink_imag, which is zero because the input
// audio is real (the forward transform reads no imaginary buffer).
module pitch_perfect_top (
  input  logic        clk,
  input  logic        reset,
  input  logic        audio_clk,
  input  logic        audio_reset,
  // Avalon-MM slave: pitch scale register
  input  logic [7:0]  avs_writedata,
  input  logic        avs_write,
  input  logic        avs_chipselect,
  input  logic [2:0]  avs_address,
  // audio core: ADC channels (Avalon-ST sources of the core)
  input  logic [15:0] left_in_data,
  input  logic        left_in_valid,
  output logic        left_in_ready,
  input  logic [15:0] right_in_data,
  input  logic        right_in_valid,
  output logic        right_in_ready,
  // audio core: DAC channels (Avalon-ST sinks of the core)
  output logic [15:0] left_out_data,
  output logic        left_out_valid,
  input  logic        left_out_ready,
  output logic [15:0] right_out_data,
  output logic        right_out_valid,
  input  logic        right_out_ready,
  // forward FFT core
  output logic        fft_sink_valid,
  input  logic        fft_sink_ready,
  output logic        fft_sink_sop,
  output logic        fft_sink_eop,
  output logic [15:0] fft_sink_real,
  output logic [15:0] fft_sink_imag,
  output logic        fft_inverse,
  output logic [12:0] fft_fftpts,
  input  logic        fft_source_valid,
  output logic        fft_source_ready,
  input  logic        fft_source_sop,
  input  logic        fft_source_eop,
  input  logic [15:0] fft_source_real,
  input  logic [15:0] fft_source_imag,
  // inverse FFT core
  output logic        ifft_sink_valid,
  input  logic        ifft_sink_ready,
  output logic        ifft_sink_sop,
  output logic        ifft_sink_eop,
  output logic [15:0] ifft_sink_real,
  output logic [15:0] ifft_sink_imag,
  output logic        ifft_inverse,
  output logic [12:0] ifft_fftpts,
  input  logic        ifft_source_valid,
  output logic        ifft_source_ready,
  input  logic        ifft_source_sop,
  input  logic        ifft_source_eop,
  input  logic [15:0] ifft_source_real,
  input  logic [15:0] ifft_source_imag,
  // status: one-cycle pulses as each stage finishes a window
  output logic [7:0]  stage_done,
  output logic        emitter_playing
);

  // ---------------- software interface ----------------
  logic [7:0] shift_amt;
  software_interface u_sw (
    .clk, .reset,
    .writedata (avs_writedata),
    .write     (avs_write),
    .chipselect(avs_chipselect),
    .address   (avs_address),
    .shift_amt (shift_amt)
  );

  // ---------------- sampler and input ring ----------------
  logic [15:0] ring_wdata, ring_rdata;
  logic [12:0] ring_waddr, ring_raddr;
  logic        ring_wren;
  logic [2:0]  in_window_start;
  logic        sampler_go_a, sampler_go;

  sampler u_sampler (
    .clk(audio_clk), .reset(audio_reset),
    .left_in_data, .left_in_valid, .left_in_ready,
    .right_in_data, .right_in_valid, .right_in_ready,
    .ring_buf_data(ring_wdata), .ring_buf_addr(ring_waddr), .ring_buf_wren(ring_wren),
    .window_start(in_window_start), .go_out(sampler_go_a)
  );

  ring_buf #(.DEPTH(5120), .WIDTH(16)) u_ring_in (
    .wr_clk(audio_clk), .wren(ring_wren), .waddr(ring_waddr), .wdata(ring_wdata),
    .rd_clk(clk), .raddr(ring_raddr), .rdata(ring_rdata)
  );

  pulse_sync u_sync_in (
    .src_clk(audio_clk), .src_rst(audio_reset), .src_pulse(sampler_go_a),
    .dst_clk(clk), .dst_rst(reset), .dst_pulse(sampler_go)
  );

  // ---------------- Hann ROM (two readers) ----------------
  logic [11:0] hann_addr_a, hann_addr_b;
  logic [15:0] hann_data_a, hann_data_b;
  hann_rom #(.N(4096)) u_hann (
    .clk, .addr_a(hann_addr_a), .data_a(hann_data_a),
    .addr_b(hann_addr_b), .data_b(hann_data_b)
  );

  // ---------------- first Hann stage ----------------
  logic [15:0] pre_fft_wdata, pre_fft_rdata;
  logic [11:0] pre_fft_waddr, pre_fft_raddr;
  logic        pre_fft_wren, hann_go, hann_busy;

  first_hannifier u_hann1 (
    .clk, .reset,
    .window_start(in_window_start), .go_in(sampler_go),
    .ring_buf_data(ring_rdata), .ring_buf_addr(ring_raddr),
    .hann_rom_data(hann_data_a), .hann_rom_addr(hann_addr_a),
    .out_buf_data(pre_fft_wdata), .out_buf_addr(pre_fft_waddr), .out_buf_wren(pre_fft_wren),
    .go_out(hann_go), .busy(hann_busy)
  );

  sdp_ram u_pre_fft_buf (.clk, .wren(pre_fft_wren), .waddr(pre_fft_waddr), .wdata(pre_fft_wdata),
                         .raddr(pre_fft_raddr), .rdata(pre_fft_rdata));

  // ---------------- FFT ----------------
  logic [15:0] pf_re_wdata, pf_im_wdata, pf_re_rdata, pf_im_rdata;
  logic [11:0] pf_re_waddr, pf_im_waddr, pf_raddr_re, pf_raddr_im;
  logic        pf_re_wren, pf_im_wren, fft_go, fft_busy;

  ffter #(.INVERSE(1'b0)) u_fft (
    .clk, .reset, .go_in(hann_go),
    .in_real_data(pre_fft_rdata), .in_imag_data(16'd0), .in_buf_addr(pre_fft_raddr),
    .fft_sink_valid, .fft_sink_ready, .fft_sink_sop, .fft_sink_eop,
    .fft_sink_real, .fft_sink_imag, .fft_inverse, .fft_fftpts,
    .fft_source_valid, .fft_source_ready, .fft_source_sop, .fft_source_eop,
    .fft_source_real, .fft_source_imag,
    .real_buf_data(pf_re_wdata), .real_buf_addr(pf_re_waddr), .real_buf_wren(pf_re_wren),
    .imag_buf_data(pf_im_wdata), .imag_buf_addr(pf_im_waddr), .imag_buf_wren(pf_im_wren),
    .go_out(fft_go), .busy(fft_busy)
  );

  sdp_ram u_post_fft_real (.clk, .wren(pf_re_wren), .waddr(pf_re_waddr), .wdata(pf_re_wdata),
                           .raddr(pf_raddr_re), .rdata(pf_re_rdata));
  sdp_ram u_post_fft_imag (.clk, .wren(pf_im_wren), .waddr(pf_im_waddr), .wdata(pf_im_wdata),
                           .raddr(pf_raddr_im), .rdata(pf_im_rdata));

  // ---------------- rectangular to polar ----------------
  logic [15:0] c2p_mag0_d, c2p_ph0_d, c2p_mag1_d, c2p_ph1_d;
  logic [11:0] c2p_mag0_a, c2p_ph0_a, c2p_mag1_a, c2p_ph1_a;
  logic        c2p_mag0_w, c2p_ph0_w, c2p_mag1_w, c2p_ph1_w;
  logic        c2p_cur, c2p_go, c2p_busy;

  cart_to_polar u_c2p (
    .clk, .reset, .go_in(fft_go),
    .real_buf_data(pf_re_rdata), .real_buf_addr(pf_raddr_re),
    .imag_buf_data(pf_im_rdata), .imag_buf_addr(pf_raddr_im),
    .mag_buf_0_data(c2p_mag0_d), .mag_buf_0_addr(c2p_mag0_a), .mag_buf_0_wren(c2p_mag0_w),
    .phase_buf_0_data(c2p_ph0_d), .phase_buf_0_addr(c2p_ph0_a), .phase_buf_0_wren(c2p_ph0_w),
    .mag_buf_1_data(c2p_mag1_d), .mag_buf_1_addr(c2p_mag1_a), .mag_buf_1_wren(c2p_mag1_w),
    .phase_buf_1_data(c2p_ph1_d), .phase_buf_1_addr(c2p_ph1_a), .phase_buf_1_wren(c2p_ph1_w),
    .cur_buf(c2p_cur), .go_out(c2p_go), .busy(c2p_busy)
  );

  logic [11:0] sc_in_addr;
  logic [15:0] pre_mag0_q, pre_mag1_q, pre_ph0_q, pre_ph1_q;
  sdp_ram u_pre_scaler_mag_0   (.clk, .wren(c2p_mag0_w), .waddr(c2p_mag0_a), .wdata(c2p_mag0_d),
                                .raddr(sc_in_addr), .rdata(pre_mag0_q));
  sdp_ram u_pre_scaler_phase_0 (.clk, .wren(c2p_ph0_w), .waddr(c2p_ph0_a), .wdata(c2p_ph0_d),
                                .raddr(sc_in_addr), .rdata(pre_ph0_q));
  sdp_ram u_pre_scaler_mag_1   (.clk, .wren(c2p_mag1_w), .waddr(c2p_mag1_a), .wdata(c2p_mag1_d),
                                .raddr(sc_in_addr), .rdata(pre_mag1_q));
  sdp_ram u_pre_scaler_phase_1 (.clk, .wren(c2p_ph1_w), .waddr(c2p_ph1_a), .wdata(c2p_ph1_d),
                                .raddr(sc_in_addr), .rdata(pre_ph1_q));

  // ---------------- scaler ----------------
  logic [11:0] sc_out_raddr, sc_out_waddr, sc_synth_raddr, sc_synth_waddr;
  logic [15:0] sc_mag_wdata, sc_ph_wdata, sc_smag_wdata, sc_sdev_wdata;
  logic [15:0] post_ph0_q, post_ph1_q, post_mag0_q, post_mag1_q, smag_q, sdev_q;
  logic        sc_mag0_w, sc_ph0_w, sc_mag1_w, sc_ph1_w, sc_synth_w;
  logic        sc_cur, sc_go, sc_busy;

  scaler u_scaler (
    .clk, .reset, .go_in(c2p_go), .cur_window(c2p_cur), .scale_amt(shift_amt),
    .mag_in_buf_0_data(pre_mag0_q), .mag_in_buf_1_data(pre_mag1_q),
    .phase_in_buf_0_data(pre_ph0_q), .phase_in_buf_1_data(pre_ph1_q),
    .in_buf_addr(sc_in_addr),
    .phase_out_buf_0_rdata(post_ph0_q), .phase_out_buf_1_rdata(post_ph1_q),
    .out_buf_raddr(sc_out_raddr),
    .mag_out_wrdata(sc_mag_wdata), .phase_out_wrdata(sc_ph_wdata), .out_buf_wraddr(sc_out_waddr),
    .mag_out_buf_0_wren(sc_mag0_w), .phase_out_buf_0_wren(sc_ph0_w),
    .mag_out_buf_1_wren(sc_mag1_w), .phase_out_buf_1_wren(sc_ph1_w),
    .synth_mags_rdata(smag_q), .synth_devs_rdata(sdev_q), .synth_raddr(sc_synth_raddr),
    .synth_mags_wrdata(sc_smag_wdata), .synth_devs_wrdata(sc_sdev_wdata),
    .synth_wraddr(sc_synth_waddr), .synth_wren(sc_synth_w),
    .cur_buf(sc_cur), .go_out(sc_go), .busy(sc_busy)
  );

  sdp_ram u_synth_mags_buf (.clk, .wren(sc_synth_w), .waddr(sc_synth_waddr), .wdata(sc_smag_wdata),
                            .raddr(sc_synth_raddr), .rdata(smag_q));
  sdp_ram u_synth_devs_buf (.clk, .wren(sc_synth_w), .waddr(sc_synth_waddr), .wdata(sc_sdev_wdata),
                            .raddr(sc_synth_raddr), .rdata(sdev_q));

  // The post-scaler buffers are read by the scaler (previous synthesis phase)
  // and by polar_to_cart; the two never run at the same time, so the read
  // address is taken from whichever is active.
  logic [11:0] p2c_addr, post_raddr;
  assign post_raddr = sc_busy ? sc_out_raddr : p2c_addr;

  sdp_ram u_post_scaler_mag_0   (.clk, .wren(sc_mag0_w), .waddr(sc_out_waddr), .wdata(sc_mag_wdata),
                                 .raddr(post_raddr), .rdata(post_mag0_q));
  sdp_ram u_post_scaler_phase_0 (.clk, .wren(sc_ph0_w), .waddr(sc_out_waddr), .wdata(sc_ph_wdata),
                                 .raddr(post_raddr), .rdata(post_ph0_q));
  sdp_ram u_post_scaler_mag_1   (.clk, .wren(sc_mag1_w), .waddr(sc_out_waddr), .wdata(sc_mag_wdata),
                                 .raddr(post_raddr), .rdata(post_mag1_q));
  sdp_ram u_post_scaler_phase_1 (.clk, .wren(sc_ph1_w), .waddr(sc_out_waddr), .wdata(sc_ph_wdata),
                                 .raddr(post_raddr), .rdata(post_ph1_q));

  // ---------------- polar to rectangular ----------------
  logic [15:0] pi_re_wdata, pi_im_wdata, pi_re_rdata, pi_im_rdata;
  logic [11:0] pi_re_waddr, pi_im_waddr, pi_raddr;
  logic        pi_re_wren, pi_im_wren, p2c_go, p2c_busy;

  polar_to_cart u_p2c (
    .clk, .reset, .go_in(sc_go), .cur_window(sc_cur),
    .mag_buf_0_data(post_mag0_q), .mag_buf_1_data(post_mag1_q),
    .phase_buf_0_data(post_ph0_q), .phase_buf_1_data(post_ph1_q),
    .in_buf_addr(p2c_addr),
    .real_buf_data(pi_re_wdata), .real_buf_addr(pi_re_waddr), .real_buf_wren(pi_re_wren),
    .imag_buf_data(pi_im_wdata), .imag_buf_addr(pi_im_waddr), .imag_buf_wren(pi_im_wren),
    .go_out(p2c_go), .busy(p2c_busy)
  );

  sdp_ram u_pre_ifft_real_buf (.clk, .wren(pi_re_wren), .waddr(pi_re_waddr), .wdata(pi_re_wdata),
                               .raddr(pi_raddr), .rdata(pi_re_rdata));
  sdp_ram u_pre_ifft_imag_buf (.clk, .wren(pi_im_wren), .waddr(pi_im_waddr), .wdata(pi_im_wdata),
                               .raddr(pi_raddr), .rdata(pi_im_rdata));

  // ---------------- IFFT ----------------
  logic [15:0] po_wdata, po_rdata, po_im_unused;
  logic [11:0] po_waddr, po_raddr, po_im_addr_unused;
  logic        po_wren, po_im_wren_unused, ifft_go, ifft_busy;

  ffter #(.INVERSE(1'b1)) u_ifft (
    .clk, .reset, .go_in(p2c_go),
    .in_real_data(pi_re_rdata), .in_imag_data(pi_im_rdata), .in_buf_addr(pi_raddr),
    .fft_sink_valid(ifft_sink_valid), .fft_sink_ready(ifft_sink_ready),
    .fft_sink_sop(ifft_sink_sop), .fft_sink_eop(ifft_sink_eop),
    .fft_sink_real(ifft_sink_real), .fft_sink_imag(ifft_sink_imag),
    .fft_inverse(ifft_inverse), .fft_fftpts(ifft_fftpts),
    .fft_source_valid(ifft_source_valid), .fft_source_ready(ifft_source_ready),
    .fft_source_sop(ifft_source_sop), .fft_source_eop(ifft_source_eop),
    .fft_source_real(ifft_source_real), .fft_source_imag(ifft_source_imag),
    .real_buf_data(po_wdata), .real_buf_addr(po_waddr), .real_buf_wren(po_wren),
    .imag_buf_data(po_im_unused), .imag_buf_addr(po_im_addr_unused),
    .imag_buf_wren(po_im_wren_unused),
    .go_out(ifft_go), .busy(ifft_busy)
  );

  sdp_ram u_post_ifft_buf (.clk, .wren(po_wren), .waddr(po_waddr), .wdata(po_wdata),
                           .raddr(po_raddr), .rdata(po_rdata));

  // ---------------- stitcher and output ring ----------------
  logic [15:0] or_wdata, or_rdata, or_emit_rdata;
  logic [12:0] or_waddr, or_raddr, or_emit_raddr;
  logic        or_wren, st_go, st_go_a, st_busy;
  logic [2:0]  out_window_start;

  stitcher u_stitcher (
    .clk, .reset, .go_in(ifft_go),
    .in_buf_data(po_rdata), .in_buf_addr(po_raddr),
    .hann_rom_data(hann_data_b), .hann_rom_addr(hann_addr_b),
    .out_buf_rdata(or_rdata), .out_buf_raddr(or_raddr),
    .out_buf_data(or_wdata), .out_buf_addr(or_waddr), .out_buf_wren(or_wren),
    .window_start(out_window_start), .go_out(st_go), .busy(st_busy)
  );

  // The output ring has two read ports: the stitcher's (system clock) and the
  // emitter's (audio clock). They are built as two RAMs written together.
  sdp_ram #(.DEPTH(5120)) u_out_ring_buf (.clk, .wren(or_wren), .waddr(or_waddr), .wdata(or_wdata),
                                          .raddr(or_raddr), .rdata(or_rdata));
  ring_buf #(.DEPTH(5120), .WIDTH(16)) u_out_ring_emit (
    .wr_clk(clk), .wren(or_wren), .waddr(or_waddr), .wdata(or_wdata),
    .rd_clk(audio_clk), .raddr(or_emit_raddr), .rdata(or_emit_rdata)
  );

  pulse_sync u_sync_out (
    .src_clk(clk), .src_rst(reset), .src_pulse(st_go),
    .dst_clk(audio_clk), .dst_rst(audio_reset), .dst_pulse(st_go_a)
  );

  // ---------------- emitter ----------------
  emitter u_emitter (
    .clk(audio_clk), .reset(audio_reset),
    .window_start(out_window_start), .go_in(st_go_a),
    .out_buf_rdata(or_emit_rdata), .out_buf_raddr(or_emit_raddr),
    .left_out_data, .left_out_valid, .left_out_ready,
    .right_out_data, .right_out_valid, .right_out_ready,
    .playing(emitter_playing)
  );

  assign stage_done = {st_go, ifft_go, p2c_go, sc_go, c2p_go, fft_go, hann_go, sampler_go};

  logic unused;
  assign unused = ^{po_im_unused, po_im_addr_unused, po_im_wren_unused,
                    hann_busy, fft_busy, c2p_busy, p2c_busy, ifft_busy, st_busy};

endmodule
