// tb_cart_to_polar: feeds two windows of random complex spectra (a spread of
// magnitudes, every quadrant, the axes and zero) through cart_to_polar from
// RAM models and compares each written bin with sqrt(re^2 + im^2) and
// atan2(im, re) in Q8.8 radians computed here in double precision, the
// magnitude clamped to 32767 as the block saturates it. Magnitude
// must be within 0.2% + 2 LSB; phase within 3 LSB (modulo 2pi) for bins with
// magnitude of at least 64. The first window must land in bank 1 and the
// second in bank 0 (cur_buf toggles at each go), with no writes to the other
// bank, 4096 writes per window, and go_out once each window is complete.
module tb_cart_to_polar;
  logic clk = 0, reset = 1, go_in = 0;
  logic [15:0] real_buf_data, imag_buf_data;
  logic [11:0] real_buf_addr, imag_buf_addr;
  logic [15:0] mag_buf_0_data, phase_buf_0_data, mag_buf_1_data, phase_buf_1_data;
  logic [11:0] mag_buf_0_addr, phase_buf_0_addr, mag_buf_1_addr, phase_buf_1_addr;
  logic mag_buf_0_wren, phase_buf_0_wren, mag_buf_1_wren, phase_buf_1_wren;
  logic cur_buf, go_out, busy;
  int checks = 0, failures = 0;

  cart_to_polar dut (.*);
  always #5 clk = ~clk;

  localparam real PI = 3.14159265358979323846;
  logic [15:0] re_m [4096], im_m [4096];
  always @(posedge clk) begin
    real_buf_data <= re_m[real_buf_addr];
    imag_buf_data <= im_m[imag_buf_addr];
  end

  int expect_bank, writes, wrong_bank;
  always @(posedge clk) if (!reset) begin
    if (mag_buf_0_wren || mag_buf_1_wren) begin
      logic [15:0] m, p;
      logic [11:0] a;
      real x, y, em, ep, dm, dp;
      writes++;
      if (expect_bank == 0 ? mag_buf_1_wren : mag_buf_0_wren) wrong_bank++;
      m = expect_bank ? mag_buf_1_data : mag_buf_0_data;
      p = expect_bank ? phase_buf_1_data : phase_buf_0_data;
      a = expect_bank ? mag_buf_1_addr : mag_buf_0_addr;
      x = $itor($signed(re_m[a])); y = $itor($signed(im_m[a]));
      em = $sqrt(x * x + y * y);
      if (em > 32767.0) em = 32767.0;   // the block saturates the magnitude
      ep = $atan2(y, x) * 256.0;
      dm = $itor(m) - em; if (dm < 0) dm = -dm;
      dp = $itor($signed(p)) - ep; if (dp < 0) dp = -dp;
      if (dp > 804.0) dp = 1608.5 - dp;
      checks++;
      if (dm > 2.0 + em * 0.002 || (em >= 64.0 && dp > 3.0) ||
          (expect_bank ? (phase_buf_1_addr !== a || !phase_buf_1_wren) : (phase_buf_0_addr !== a || !phase_buf_0_wren))) begin
        failures++;
        if (failures < 10) $display("FAIL bin %0d (%0d,%0d): mag %0d phase %0d, expected %f %f",
                                    a, $signed(re_m[a]), $signed(im_m[a]), m, $signed(p), em, ep);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 2; w++) begin
      for (int i = 0; i < 4096; i++) begin
        int sh;
        sh = $urandom_range(0, 14);
        re_m[i] = 16'(($urandom_range(0, 65535) - 32768) >>> sh);
        im_m[i] = 16'(($urandom_range(0, 65535) - 32768) >>> sh);
      end
      re_m[0] = 0; im_m[0] = 0;
      re_m[1] = 16'sd1000; im_m[1] = 0;
      re_m[2] = -16'sd1000; im_m[2] = 0;
      re_m[3] = 0; im_m[3] = 16'sd1000;
      re_m[4] = 0; im_m[4] = -16'sd1000;
      re_m[5] = -16'sd1000; im_m[5] = -16'sd1;
      re_m[6] = 16'sh8000; im_m[6] = 16'sh8000;   // largest magnitude
      expect_bank = (w == 0) ? 1 : 0;
      writes = 0; wrong_bank = 0;
      @(negedge clk) go_in = 1;
      @(negedge clk) go_in = 0;
      wait (go_out);
      @(negedge clk);
      checks++;
      if (writes != 4096 || wrong_bank != 0 || cur_buf !== 1'(expect_bank)) begin
        failures++;
        $display("FAIL window %0d: %0d writes, %0d to the wrong bank, cur_buf %b", w, writes, wrong_bank, cur_buf);
      end
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
