// tb_emitter: preloads an output ring model with distinct words and starts
// blocks at slots 4 (wrapping past 5119) and 1. A DAC-sink model raises
// left_out_ready and right_out_ready at independent random times; every
// sample must appear once on each channel, in ring order, on a one-cycle valid
// pulse in the cycle after that channel's ready, and no sample may be sent
// before both channels took the previous one. A third block started while one
// is playing must restart at the new slot.
module tb_emitter;
  logic clk = 0, reset = 1;
  logic [2:0] window_start = 0;
  logic go_in = 0;
  logic [15:0] out_buf_rdata;
  logic [12:0] out_buf_raddr;
  logic [15:0] left_out_data, right_out_data;
  logic left_out_valid, right_out_valid, left_out_ready = 0, right_out_ready = 0;
  logic playing;
  int checks = 0, failures = 0;

  emitter dut (.*);

  always #5 clk = ~clk;

  logic [15:0] ring [5120];
  always @(posedge clk) out_buf_rdata <= ring[out_buf_raddr];

  int lcount = 0, rcount = 0, base = 0;
  logic lready_q = 0, rready_q = 0;
  always @(posedge clk) begin
    lready_q <= left_out_ready;
    rready_q <= right_out_ready;
    left_out_ready  <= ($urandom_range(0, 9) == 0);
    right_out_ready <= ($urandom_range(0, 13) == 0);
    if (!reset && left_out_valid) begin
      checks++;
      if (left_out_data !== ring[(base + lcount) % 5120] || !lready_q) begin
        failures++;
        if (failures < 10) $display("FAIL left sample %0d: %h expected %h", lcount, left_out_data, ring[(base + lcount) % 5120]);
      end
      lcount++;
    end
    if (!reset && right_out_valid) begin
      checks++;
      if (right_out_data !== ring[(base + rcount) % 5120] || !rready_q) begin
        failures++;
        if (failures < 10) $display("FAIL right sample %0d: %h expected %h", rcount, right_out_data, ring[(base + rcount) % 5120]);
      end
      rcount++;
    end
    if (!reset && (lcount - rcount > 1 || rcount - lcount > 1)) begin
      failures++; $display("FAIL channels drifted apart: %0d vs %0d", lcount, rcount);
    end
  end

  task automatic start_block(input int slot);
    @(negedge clk);
    window_start = 3'(slot); go_in = 1;
    base = slot * 1024; lcount = 0; rcount = 0;
    @(negedge clk) go_in = 0;
  endtask

  initial begin
    for (int i = 0; i < 5120; i++) ring[i] = 16'(i * 13 + 5);
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (200) @(negedge clk);
    checks++;
    if (lcount != 0 || rcount != 0) begin failures++; $display("FAIL output with no block"); end
    start_block(4);
    wait (!playing);
    repeat (50) @(negedge clk);
    checks++;
    if (lcount != 1024 || rcount != 1024) begin failures++; $display("FAIL block 4 sent %0d/%0d", lcount, rcount); end
    start_block(1);
    wait (lcount == 300);
    start_block(2);       // restart while playing
    wait (!playing);
    repeat (50) @(negedge clk);
    checks++;
    if (lcount != 1024 || rcount != 1024) begin failures++; $display("FAIL block 2 sent %0d/%0d", lcount, rcount); end
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
