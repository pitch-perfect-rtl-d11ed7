// tb_first_hannifier: fills a ring buffer model with random samples and runs
// windows starting at every slot 0..4 (slot 4 wraps past address 5119). Each
// written word must equal floor(sample * w[n] / 65536), with w[n] taken from a
// table this bench computes itself (and feeds to the unit as its ROM); the
// addresses must cover 0..4095 once, and go_out must follow go_in by exactly
// 4096 + 3 cycles.
module tb_first_hannifier;
  logic clk = 0, reset = 1;
  logic [2:0] window_start = 0;
  logic go_in = 0;
  logic [15:0] ring_buf_data, hann_rom_data;
  logic [12:0] ring_buf_addr;
  logic [11:0] hann_rom_addr;
  logic [15:0] out_buf_data;
  logic [11:0] out_buf_addr;
  logic out_buf_wren, go_out, busy;
  int checks = 0, failures = 0;

  first_hannifier dut (.*);

  always #5 clk = ~clk;

  logic [15:0] ring [5120];
  logic [15:0] hann [4096];
  always @(posedge clk) begin
    ring_buf_data <= ring[ring_buf_addr];
    hann_rom_data <= hann[hann_rom_addr];
  end

  int base, seen;
  bit hit [4096];
  always @(posedge clk) begin
    if (!reset && out_buf_wren) begin
      logic signed [15:0] s;
      longint p;
      s = $signed(ring[(base + out_buf_addr) % 5120]);
      p = (longint'(s) * longint'(hann[out_buf_addr])) >>> 16;
      checks++;
      if (out_buf_data !== 16'(p)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %h expected %h", out_buf_addr, out_buf_data, 16'(p));
      end
      if (hit[out_buf_addr]) begin failures++; $display("FAIL n=%0d written twice", out_buf_addr); end
      hit[out_buf_addr] = 1;
      seen++;
    end
  end

  initial begin
    for (int i = 0; i < 5120; i++) ring[i] = 16'($urandom);
    for (int n = 0; n < 4096; n++) begin
      real s;
      s = $sin(3.14159265358979323846 * n / 4096.0);
      hann[n] = (s * s * 65536.0 > 65535.0) ? 16'hFFFF : 16'(int'(s * s * 65536.0));
    end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 5; w++) begin
      int cycles;
      base = ((w + 4) % 5) * 1024;
      seen = 0;
      for (int n = 0; n < 4096; n++) hit[n] = 0;
      @(negedge clk);
      window_start = 3'((w + 4) % 5);
      go_in = 1;
      @(negedge clk);
      go_in = 0;
      cycles = 1;
      while (!go_out) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 4096 + 3) begin failures++; $display("FAIL window %0d took %0d cycles", w, cycles); end
      checks++;
      if (seen != 4096) begin failures++; $display("FAIL window %0d wrote %0d words", w, seen); end
      repeat (5) @(negedge clk);
    end
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
