// polar_to_cart: converts the synthesis bins of a window from polar back to
// rectangular form and builds the full 4096-point spectrum for the inverse FFT.
//
// The scaler produces bins 0 .. 2047 only. Because the output audio is real,
// the spectrum is conjugate-symmetric, so the unit walks the output addresses
// k = 0 .. 4095 in order and reads source bin b = k for k < 2048 and
// b = 4096 - k for k > 2048, negating the phase for the upper half; the Nyquist
// bin k = 2048 is set to zero. The pair of magnitude/phase buffers read is the
// one named by cur_window. Each point goes through a pipelined CORDIC
// (cordic_rotation) and is written to pre_ifft_real/imag[k]. One point per
// cycle; go_out pulses 4096 + NSTAGES + 5 cycles after go_in.
module polar_to_cart #(
  parameter int unsigned NSTAGES = 16
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        go_in,
  input  logic        cur_window,
  input  logic [15:0] mag_buf_0_data,
  input  logic [15:0] mag_buf_1_data,
  input  logic [15:0] phase_buf_0_data,
  input  logic [15:0] phase_buf_1_data,
  output logic [11:0] in_buf_addr,
  output logic [15:0] real_buf_data,
  output logic [11:0] real_buf_addr,
  output logic        real_buf_wren,
  output logic [15:0] imag_buf_data,
  output logic [11:0] imag_buf_addr,
  output logic        imag_buf_wren,
  output logic        go_out,
  output logic        busy
);

  logic        issuing, s1, cur;
  logic [11:0] k, k1;
  logic        c_valid;
  logic signed [15:0] c_re, c_im;
  logic [11:0] c_tag;
  logic        wren;
  logic [11:0] waddr;
  logic [15:0] wre, wim;
  logic        last_written;
  logic [5:0]  in_flight;

  logic [15:0] src_mag, src_phase, feed_mag;
  logic signed [15:0] feed_phase;
  assign src_mag    = cur ? mag_buf_1_data   : mag_buf_0_data;
  assign src_phase  = cur ? phase_buf_1_data : phase_buf_0_data;
  assign feed_mag   = (k1 == 12'd2048) ? 16'd0 : src_mag;
  assign feed_phase = (k1 > 12'd2048) ? -$signed(src_phase) : $signed(src_phase);

  // source bin for output address k
  assign in_buf_addr = (k > 12'd2048) ? 12'd0 - k : k;

  cordic_rotation #(.NSTAGES(NSTAGES), .TAGW(12)) u_cordic (
    .clk, .reset,
    .in_valid (s1),
    .in_mag   (feed_mag),
    .in_phase (feed_phase),
    .in_tag   (k1),
    .out_valid(c_valid),
    .out_re   (c_re),
    .out_im   (c_im),
    .out_tag  (c_tag)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      issuing      <= 1'b0;
      s1           <= 1'b0;
      cur          <= 1'b0;
      k            <= '0;
      k1           <= '0;
      wren         <= 1'b0;
      waddr        <= '0;
      wre          <= '0;
      wim          <= '0;
      go_out       <= 1'b0;
      last_written <= 1'b0;
    end else begin
      go_out       <= last_written;
      last_written <= 1'b0;
      if (!issuing && go_in) begin
        issuing <= 1'b1;
        k       <= '0;
        cur     <= cur_window;
      end else if (issuing) begin
        if (k == 12'd4095) issuing <= 1'b0;
        else               k       <= k + 12'd1;
      end
      s1    <= issuing;
      k1    <= k;
      wren  <= c_valid;
      waddr <= c_tag;
      wre   <= c_re;
      wim   <= c_im;
      if (c_valid && c_tag == 12'd4095) last_written <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) in_flight <= '0;
    else in_flight <= in_flight + 6'(issuing) - 6'(wren);
  end

  assign busy          = issuing || (in_flight != '0) || last_written || go_out;
  assign real_buf_data = wre;
  assign imag_buf_data = wim;
  assign real_buf_addr = waddr;
  assign imag_buf_addr = waddr;
  assign real_buf_wren = wren;
  assign imag_buf_wren = wren;

  assert property (@(posedge clk) disable iff (reset) go_in |-> !busy);

endmodule
