// tb_scaler: drives the scaler with pre-scaler banks held in RAM models, and
// the post-scaler phase banks and the synth_mags/synth_devs accumulators in
// sdp_ram instances (as in the top). Five windows alternate cur_window and
// use scale amounts 64 (unity), 32 (x0.5), 128 (x2.0), 100 and 200. Every
// window's 2048 output bins (magnitude and phase, written to the bank named
// by cur_window) are compared with an integer model written here from the
// algorithm description: wrapped phase error, times 2/pi (163/256), plus the
// bin index, times scale/64, rounded to the nearest bin, accumulated with
// saturation; synthesis phase = previous output phase + deviation * pi/2 +
// (i mod 4) * pi/2, wrapped. Independently, window 0 is built so every bin's
// phase advance is within 1/5 bin of its centre, so at unity scale each
// magnitude must come out in its own bin unchanged. The bench also checks
// that some bins are dropped at x2.0, that the accumulators are zero after
// every window, and that each window takes 6 * 2048 + 3 cycles.
module tb_scaler;
  logic clk = 0, reset = 1, go_in = 0, cur_window = 0;
  logic [7:0]  scale_amt = 64;
  logic [15:0] mag_in_buf_0_data, mag_in_buf_1_data, phase_in_buf_0_data, phase_in_buf_1_data;
  logic [11:0] in_buf_addr;
  logic [15:0] phase_out_buf_0_rdata, phase_out_buf_1_rdata;
  logic [11:0] out_buf_raddr;
  logic [15:0] mag_out_wrdata, phase_out_wrdata;
  logic [11:0] out_buf_wraddr;
  logic mag_out_buf_0_wren, phase_out_buf_0_wren, mag_out_buf_1_wren, phase_out_buf_1_wren;
  logic [15:0] synth_mags_rdata, synth_devs_rdata, synth_mags_wrdata, synth_devs_wrdata;
  logic [11:0] synth_raddr, synth_wraddr;
  logic synth_wren, cur_buf, go_out, busy;
  int checks = 0, failures = 0;

  scaler dut (.*);
  always #5 clk = ~clk;

  // pre-scaler banks
  logic [15:0] pm [2][4096], pp [2][4096];
  always @(posedge clk) begin
    mag_in_buf_0_data   <= pm[0][in_buf_addr];
    mag_in_buf_1_data   <= pm[1][in_buf_addr];
    phase_in_buf_0_data <= pp[0][in_buf_addr];
    phase_in_buf_1_data <= pp[1][in_buf_addr];
  end
  // post-scaler phase banks and accumulators, as in the top
  sdp_ram u_ph0 (.clk, .wren(phase_out_buf_0_wren), .waddr(out_buf_wraddr), .wdata(phase_out_wrdata),
                 .raddr(out_buf_raddr), .rdata(phase_out_buf_0_rdata));
  sdp_ram u_ph1 (.clk, .wren(phase_out_buf_1_wren), .waddr(out_buf_wraddr), .wdata(phase_out_wrdata),
                 .raddr(out_buf_raddr), .rdata(phase_out_buf_1_rdata));
  sdp_ram u_sm (.clk, .wren(synth_wren), .waddr(synth_wraddr), .wdata(synth_mags_wrdata),
                .raddr(synth_raddr), .rdata(synth_mags_rdata));
  sdp_ram u_sd (.clk, .wren(synth_wren), .waddr(synth_wraddr), .wdata(synth_devs_wrdata),
                .raddr(synth_raddr), .rdata(synth_devs_rdata));

  // captured outputs
  int om [4096], op [4096], owrites, wrong_bank;
  always @(posedge clk) if (!reset) begin
    if (cur_window ? (mag_out_buf_1_wren && phase_out_buf_1_wren) : (mag_out_buf_0_wren && phase_out_buf_0_wren)) begin
      om[out_buf_wraddr] = int'(mag_out_wrdata);
      op[out_buf_wraddr] = int'($signed(phase_out_wrdata));
      owrites++;
    end
    if (cur_window ? (mag_out_buf_0_wren || phase_out_buf_0_wren) : (mag_out_buf_1_wren || phase_out_buf_1_wren))
      wrong_bank++;
  end

  // reference model state: previous output phases per bank
  int prev_out [2][2048];

  function automatic int wrapi(input int p);
    while (p >= 804) p -= 1608;
    while (p < -804) p += 1608;
    return p;
  endfunction
  function automatic int fdiv(input longint a, input int b);   // floor division
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return int'(q);
  endfunction

  int em [2048], ed [2048], exp_mag [2048], exp_ph [2048], dropped;
  task automatic model(input int c, input int s);
    for (int i = 0; i < 2048; i++) begin em[i] = 0; ed[i] = 0; end
    dropped = 0;
    for (int i = 0; i < 2048; i++) begin
      int d, bd, nb, num, dev;
      d   = wrapi(int'($signed(pp[c][i])) - int'($signed(pp[1-c][i])) - (i % 4) * 402);
      bd  = fdiv(longint'(d) * 163, 256);
      nb  = fdiv(longint'(i * 256 + bd) * s, 64);
      num = fdiv(nb + 128, 256);
      dev = nb - num * 256;
      if (num >= 0 && num < 2048) begin
        em[num] += int'(pm[c][i]); if (em[num] > 32767) em[num] = 32767;
        ed[num] += dev;
        if (ed[num] > 32767) ed[num] = 32767;
        if (ed[num] < -32768) ed[num] = -32768;
      end else dropped++;
    end
    for (int i = 0; i < 2048; i++) begin
      int q, f, rem;
      q = (ed[i] >>> 8) & 3;
      f = ed[i] & 255;
      rem = q * 402 + ((f * 402) >> 8);
      exp_mag[i] = em[i];
      exp_ph[i]  = wrapi(prev_out[1-c][i] + rem + (i % 4) * 402);
      prev_out[c][i] = exp_ph[i];
    end
  endtask

  int scales [5] = '{64, 32, 128, 100, 200};
  int total_dropped = 0;

  initial begin
    for (int b = 0; b < 2; b++) for (int i = 0; i < 2048; i++) prev_out[b][i] = 0;
    for (int i = 0; i < 4096; i++) begin
      pm[1][i] = 16'($urandom_range(0, 3000));
      pp[1][i] = 16'($urandom_range(0, 1607) - 804);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 5; w++) begin
      int c, cycles;
      c = w % 2;
      for (int i = 0; i < 4096; i++) begin
        pm[c][i] = 16'($urandom_range(0, 3000));
        if (w == 0)   // near-centre phase advance: deviation within +/-0.2 bin
          pp[c][i] = 16'(wrapi(int'($signed(pp[1-c][i])) + (i % 4) * 402 + int'($urandom_range(0, 100)) - 50));
        else
          pp[c][i] = 16'($urandom_range(0, 1607) - 804);
      end
      model(c, scales[w]);
      total_dropped += dropped;
      owrites = 0; wrong_bank = 0;
      cur_window = 1'(c);
      scale_amt = 8'(scales[w]);
      @(negedge clk) go_in = 1;
      @(negedge clk) go_in = 0;
      cycles = 1;
      while (!go_out) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 6 * 2048 + 3 || owrites != 2048 || wrong_bank != 0 || cur_buf !== 1'(c)) begin
        failures++;
        $display("FAIL window %0d: %0d cycles, %0d writes, %0d wrong-bank, cur_buf %b", w, cycles, owrites, wrong_bank, cur_buf);
      end
      for (int i = 0; i < 2048; i++) begin
        checks++;
        if (om[i] != exp_mag[i] || op[i] != exp_ph[i]) begin
          failures++;
          if (failures < 10) $display("FAIL window %0d bin %0d: mag %0d phase %0d, expected %0d %0d",
                                      w, i, om[i], op[i], exp_mag[i], exp_ph[i]);
        end
        if (w == 0) begin
          checks++;
          if (om[i] != int'(pm[c][i])) begin
            failures++;
            if (failures < 10) $display("FAIL unity: bin %0d mag %0d, input %0d", i, om[i], pm[c][i]);
          end
        end
      end
      for (int i = 0; i < 2048; i++) begin
        checks++;
        if (u_sm.mem[i] != 0 || u_sd.mem[i] != 0) begin
          failures++;
          if (failures < 10) $display("FAIL accumulator %0d not cleared", i);
        end
      end
      repeat (5) @(negedge clk);
    end
    checks++;
    if (total_dropped == 0) begin failures++; $display("FAIL no bins were dropped"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
