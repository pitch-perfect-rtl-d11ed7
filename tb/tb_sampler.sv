// tb_sampler: drives the sampler with a model of the audio core's two ADC
// sources (a sample is presented the cycle after ready, and is available only
// every SPACING cycles) for 6 * 1024 samples. Checks that every left sample is
// written, in order, to consecutive ring addresses wrapping at 5120; that the
// right channel is polled in step; that go_out pulses after every 1024th
// sample with window_start = (slot + 2) mod 5 (the slot three back); and the
// number of cycles per accepted sample when samples are always available.
module tb_sampler;
  logic clk = 0, reset = 1;
  logic [15:0] left_in_data = 0, right_in_data = 0;
  logic left_in_valid = 0, right_in_valid = 0;
  logic left_in_ready, right_in_ready;
  logic [15:0] ring_buf_data;
  logic [12:0] ring_buf_addr;
  logic ring_buf_wren;
  logic [2:0] window_start;
  logic go_out;
  int checks = 0, failures = 0;

  sampler dut (.*);

  always #5 clk = ~clk;

  int spacing = 3;         // cycles between samples becoming available
  int avail_cnt = 0;
  bit avail = 0;
  logic [15:0] next_sample = 16'h1234;
  int sent = 0, written = 0, gos = 0, right_polls = 0, missed_polls = 0;

  // audio core model: ready-latency-1 source
  always @(posedge clk) begin
    left_in_valid  <= 1'b0;
    right_in_valid <= 1'b0;
    if (avail_cnt >= spacing) avail = 1;
    else avail_cnt++;
    if (left_in_ready) begin
      if (avail) begin
        left_in_valid  <= 1'b1;
        left_in_data   <= next_sample;
        right_in_valid <= 1'b1;
        right_in_data  <= ~next_sample;
        next_sample    = next_sample * 16'd31 + 16'd7;
        sent++;
        avail = 0; avail_cnt = 0;
      end else missed_polls++;
    end
    if (right_in_ready) right_polls++;
  end

  // reference of the written stream
  logic [15:0] exp_data;
  initial exp_data = 16'h1234;
  always @(posedge clk) begin
    if (!reset && ring_buf_wren) begin
      checks++;
      if (ring_buf_addr !== 13'(written % 5120) || ring_buf_data !== exp_data) begin
        failures++;
        $display("FAIL write %0d: addr %0d data %h, expected addr %0d data %h",
                 written, ring_buf_addr, ring_buf_data, written % 5120, exp_data);
      end
      exp_data = exp_data * 16'd31 + 16'd7;
      written++;
    end
    if (!reset && go_out) begin
      int slot;
      slot = ((written / 1024) - 1) % 5;
      checks++;
      if (written % 1024 != 0 || window_start !== 3'((slot + 2) % 5)) begin
        failures++;
        $display("FAIL go %0d after %0d writes: window_start %0d expected %0d",
                 gos, written, window_start, (slot + 2) % 5);
      end
      gos++;
    end
  end

  initial begin
    int t0, t1;
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    wait (written == 6 * 1024);
    repeat (10) @(posedge clk);
    checks++;
    if (gos != 6) begin failures++; $display("FAIL %0d go pulses, expected 6", gos); end
    checks++;
    if (right_polls < written) begin failures++; $display("FAIL right channel not drained"); end
    checks++;
    if (missed_polls == 0) begin failures++; $display("FAIL no empty poll was exercised"); end
    // throughput with a sample always available: one sample per 3 cycles
    spacing = 0;
    @(posedge clk);
    t0 = written;
    repeat (300) @(posedge clk);
    t1 = written;
    checks++;
    if (t1 - t0 < 99 || t1 - t0 > 101) begin
      failures++; $display("FAIL %0d samples in 300 cycles, expected 100", t1 - t0);
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
