// tb_stitcher: runs 7 windows of random IFFT output through the stitcher with
// a 5120-word output ring model. The bench keeps its own ring, computed from
// the overlap-add rule (first 3072 words added to what is there, last 1024
// words overwritten, each contribution = floor(x * w / 2^17) with w computed
// here), and checks every write, address and data, and that window_start
// steps through slots 0,1,2,3,4,0,1 with go_out 4096 + 3 cycles after go_in.
// Saturation is exercised by preloading the ring with 30000 and sending a
// full-scale first window.
module tb_stitcher;
  logic clk = 0, reset = 1;
  logic go_in = 0;
  logic [15:0] in_buf_data, hann_rom_data, out_buf_rdata;
  logic [11:0] in_buf_addr, hann_rom_addr;
  logic [12:0] out_buf_raddr, out_buf_addr;
  logic [15:0] out_buf_data;
  logic out_buf_wren, go_out, busy;
  logic [2:0] window_start;
  int checks = 0, failures = 0;

  stitcher dut (.*);

  always #5 clk = ~clk;

  logic [15:0] inbuf [4096];
  logic [15:0] hann [4096];
  logic [15:0] ring [5120];
  int model [5120];
  always @(posedge clk) begin
    in_buf_data   <= inbuf[in_buf_addr];
    hann_rom_data <= hann[hann_rom_addr];
    out_buf_rdata <= ring[out_buf_raddr];
    if (out_buf_wren) ring[out_buf_addr] <= out_buf_data;
  end

  int cur_slot, nwrites, sat_seen;
  always @(posedge clk) begin
    if (!reset && out_buf_wren) begin
      int n, a, v, e;
      n = nwrites;
      a = (cur_slot * 1024 + n) % 5120;
      v = int'((longint'($signed(inbuf[n])) * longint'(hann[n])) >>> 17);
      e = (n < 3072) ? model[a] + v : v;
      if (e > 32767) begin e = 32767; sat_seen++; end
      if (e < -32768) begin e = -32768; sat_seen++; end
      model[a] = e;
      checks++;
      if (out_buf_addr !== 13'(a) || $signed(out_buf_data) !== 16'(e)) begin
        failures++;
        if (failures < 10)
          $display("FAIL slot %0d n=%0d: addr %0d data %0d, expected addr %0d data %0d",
                   cur_slot, n, out_buf_addr, $signed(out_buf_data), a, e);
      end
      nwrites++;
    end
  end

  initial begin
    for (int n = 0; n < 4096; n++) begin
      real s;
      s = $sin(3.14159265358979323846 * n / 4096.0);
      hann[n] = (s * s * 65536.0 > 65535.0) ? 16'hFFFF : 16'(int'(s * s * 65536.0));
    end
    // preload so window 0's overlap-add runs into the positive limit
    for (int i = 0; i < 5120; i++) begin ring[i] = 16'(30000); model[i] = 30000; end
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int w = 0; w < 7; w++) begin
      int cycles;
      for (int n = 0; n < 4096; n++)
        inbuf[n] = (w == 0) ? 16'h7FFF : (w == 3) ? 16'h8000 : 16'($urandom_range(0, 40000) - 20000);
      cur_slot = w % 5;
      nwrites = 0;
      @(negedge clk) go_in = 1;
      @(negedge clk) go_in = 0;
      cycles = 1;
      while (!go_out) begin @(negedge clk); cycles++; end
      checks++;
      if (cycles != 4096 + 3) begin failures++; $display("FAIL window %0d took %0d cycles", w, cycles); end
      checks++;
      if (window_start !== 3'(w % 5)) begin
        failures++; $display("FAIL window %0d window_start %0d", w, window_start);
      end
      checks++;
      if (nwrites != 4096) begin failures++; $display("FAIL window %0d wrote %0d words", w, nwrites); end
      repeat (4) @(negedge clk);
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL saturation never exercised"); end
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
