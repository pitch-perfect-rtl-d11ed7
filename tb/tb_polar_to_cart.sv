// tb_polar_to_cart: fills both polar banks with random magnitudes (0..32767)
// and phases (Q8.8 radians in [-pi, pi)), runs polar_to_cart once per bank
// and checks all 4096 written words against a double-precision model of the
// block's rule: output k takes bin b = k for k <= 2048 and b = 4096 - k
// above, with the phase negated above 2048 (conjugate symmetry), and the
// Nyquist bin k = 2048 forced to zero. Real and imaginary parts must be within
// 0.2% of the magnitude + 2 LSB of mag*cos(phase/256), mag*sin(phase/256).
module tb_polar_to_cart;
  logic clk = 0, reset = 1, go_in = 0, cur_window = 0;
  logic [15:0] mag_buf_0_data, mag_buf_1_data, phase_buf_0_data, phase_buf_1_data;
  logic [11:0] in_buf_addr;
  logic [15:0] real_buf_data, imag_buf_data;
  logic [11:0] real_buf_addr, imag_buf_addr;
  logic real_buf_wren, imag_buf_wren, go_out, busy;
  int checks = 0, failures = 0;

  polar_to_cart dut (.*);
  always #5 clk = ~clk;

  logic [15:0] mag [2][4096], ph [2][4096];
  always @(posedge clk) begin
    mag_buf_0_data   <= mag[0][in_buf_addr];
    mag_buf_1_data   <= mag[1][in_buf_addr];
    phase_buf_0_data <= ph[0][in_buf_addr];
    phase_buf_1_data <= ph[1][in_buf_addr];
  end

  int writes;
  always @(posedge clk) if (!reset && real_buf_wren) begin
    int k, b;
    real m, p, er, ei, tol;
    k = int'(real_buf_addr);
    b = (k <= 2048) ? k : 4096 - k;
    m = (k == 2048) ? 0.0 : $itor(mag[cur_window][b]);
    p = $itor($signed(ph[cur_window][b])) / 256.0;
    if (k > 2048) p = -p;
    er = m * $cos(p); ei = m * $sin(p);
    tol = 2.0 + m * 0.002;
    writes++;
    checks++;
    if ($itor($signed(real_buf_data)) - er > tol || er - $itor($signed(real_buf_data)) > tol ||
        $itor($signed(imag_buf_data)) - ei > tol || ei - $itor($signed(imag_buf_data)) > tol ||
        imag_buf_addr !== real_buf_addr || !imag_buf_wren) begin
      failures++;
      if (failures < 10) $display("FAIL k=%0d: %0d %0d expected %f %f", k,
                                  $signed(real_buf_data), $signed(imag_buf_data), er, ei);
    end
  end

  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 4096; i++) begin
        mag[s][i] = 16'($urandom_range(0, 32767) >> $urandom_range(0, 10));
        ph[s][i]  = 16'($urandom_range(0, 1607) - 804);
      end
    ph[0][7] = 16'(-804); ph[0][8] = 16'd803; ph[0][9] = 0; mag[0][9] = 16'd32767;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 2; w++) begin
      cur_window = 1'(w);
      writes = 0;
      @(negedge clk) go_in = 1;
      @(negedge clk) go_in = 0;
      wait (go_out);
      @(negedge clk);
      checks++;
      if (writes != 4096) begin failures++; $display("FAIL bank %0d: %0d writes", w, writes); end
      repeat (3) @(negedge clk);
      checks++;
      if (busy) begin failures++; $display("FAIL still busy"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
