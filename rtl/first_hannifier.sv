// first_hannifier: applies the Hann window to one 4096-sample window of the
// input ring buffer and writes the result to the pre-FFT buffer.
//
// On go_in the window's first ring address is window_start * 1024; the unit
// then streams n = 0 .. 4095, reading ring_buf[(start + n) mod 5120] and
// hann_rom[n] together, and writes (sample * w[n]) >> 16 to out_buf[n]: the
// sample is scaled by the Q0.16 coefficient and keeps its 16-bit word format.
// Both memories have one cycle of read latency, so the write for index n
// follows its address by two cycles; one word per cycle, 4096 + 3 cycles from
// go_in to go_out, which pulses once the last word is written. go_in while a
// window is in progress is a protocol error (checked by an assertion).
module first_hannifier
  import pv_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [2:0]  window_start,
  input  logic        go_in,
  input  logic [15:0] ring_buf_data,
  output logic [12:0] ring_buf_addr,
  input  logic [15:0] hann_rom_data,
  output logic [11:0] hann_rom_addr,
  output logic [15:0] out_buf_data,
  output logic [11:0] out_buf_addr,
  output logic        out_buf_wren,
  output logic        go_out,
  output logic        busy
);

  logic        issuing;   // an address pair is being issued this cycle
  logic        s1;        // read data for index n1 is valid this cycle
  logic [11:0] n1;
  logic        last_written;

  logic signed [32:0] product;
  assign product = $signed(ring_buf_data) * $signed({1'b0, hann_rom_data});

  assign busy = issuing || s1 || out_buf_wren || last_written;

  always_ff @(posedge clk) begin
    if (reset) begin
      issuing       <= 1'b0;
      s1            <= 1'b0;
      n1            <= '0;
      ring_buf_addr <= '0;
      hann_rom_addr <= '0;
      out_buf_data  <= '0;
      out_buf_addr  <= '0;
      out_buf_wren  <= 1'b0;
      go_out        <= 1'b0;
      last_written  <= 1'b0;
    end else begin
      go_out       <= last_written;
      last_written <= 1'b0;
      out_buf_wren <= 1'b0;
      if (!issuing && go_in) begin
        issuing       <= 1'b1;
        ring_buf_addr <= 13'(window_start) * 13'(HOP_LEN);
        hann_rom_addr <= '0;
      end else if (issuing) begin
        if (hann_rom_addr == 12'(WIN_LEN - 1)) begin
          issuing <= 1'b0;
        end else begin
          hann_rom_addr <= hann_rom_addr + 12'd1;
          ring_buf_addr <= (ring_buf_addr == 13'(RING_LEN - 1)) ? '0 : ring_buf_addr + 13'd1;
        end
      end
      // stage 1: the memories have latched the address issued last cycle
      s1 <= issuing;
      n1 <= hann_rom_addr;
      // stage 2: write the windowed sample
      if (s1) begin
        out_buf_wren <= 1'b1;
        out_buf_addr <= n1;
        out_buf_data <= product[31:16];
        if (n1 == 12'(WIN_LEN - 1)) last_written <= 1'b1;
      end
    end
  end

  // A new window must not be started while one is being processed.
  assert property (@(posedge clk) disable iff (reset) go_in |-> !busy);

endmodule
