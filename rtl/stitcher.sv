// stitcher: second Hann windowing and overlap-add of the inverse-FFT output
// into the output ring buffer.
//
// The output ring holds 5120 words, five slots of 1024. Window w is placed at
// slot s = w mod 5 (start address s * 1024). On go_in the unit walks
// n = 0 .. 4095, reading in_buf[n] (the IFFT output), hann_rom[n] and
// out_buf[(1024*s + n) mod 5120] together, and writes back
//     v = (x[n] * w[n]) / 2                  (half of the windowed value)
//     out = old + v  for n <  3072           (overlaps earlier windows)
//     out = v        for n >= 3072           (first window to touch this slot)
// with saturation to 16 bits. After the window the first slot of it has
// received all four of its contributions; go_out pulses with window_start = s
// so the emitter plays that slot. One word per cycle (each address is touched
// once per window, so the read-modify-write needs no forwarding); go_out
// follows go_in by 4096 + 3 cycles.
module stitcher
  import pv_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        go_in,
  input  logic [15:0] in_buf_data,
  output logic [11:0] in_buf_addr,
  input  logic [15:0] hann_rom_data,
  output logic [11:0] hann_rom_addr,
  input  logic [15:0] out_buf_rdata,
  output logic [12:0] out_buf_raddr,
  output logic [15:0] out_buf_data,
  output logic [12:0] out_buf_addr,
  output logic        out_buf_wren,
  output logic [2:0]  window_start,
  output logic        go_out,
  output logic        busy
);

  logic        issuing, s1;
  logic [11:0] n;
  logic [11:0] n1;
  logic [12:0] a1;
  logic [2:0]  slot;
  logic        last_written;

  logic signed [32:0] product;
  logic signed [31:0] half, sum;
  assign product = $signed(in_buf_data) * $signed({1'b0, hann_rom_data});
  assign half    = 32'(product >>> 17);
  assign sum     = (n1 < 12'(WIN_LEN - HOP_LEN)) ? 32'($signed(out_buf_rdata)) + half : half;

  assign in_buf_addr   = n;
  assign hann_rom_addr = n;
  assign busy = issuing || s1 || out_buf_wren || last_written;

  always_ff @(posedge clk) begin
    if (reset) begin
      issuing       <= 1'b0;
      s1            <= 1'b0;
      n             <= '0;
      n1            <= '0;
      a1            <= '0;
      slot          <= '0;
      out_buf_raddr <= '0;
      out_buf_data  <= '0;
      out_buf_addr  <= '0;
      out_buf_wren  <= 1'b0;
      window_start  <= '0;
      go_out        <= 1'b0;
      last_written  <= 1'b0;
    end else begin
      go_out       <= last_written;
      last_written <= 1'b0;
      out_buf_wren <= 1'b0;
      if (!issuing && go_in) begin
        issuing       <= 1'b1;
        n             <= '0;
        out_buf_raddr <= 13'(slot) * 13'(HOP_LEN);
      end else if (issuing) begin
        if (n == 12'(WIN_LEN - 1)) begin
          issuing <= 1'b0;
          slot    <= (slot == 3'd4) ? 3'd0 : slot + 3'd1;
        end else begin
          n             <= n + 12'd1;
          out_buf_raddr <= (out_buf_raddr == 13'(RING_LEN - 1)) ? '0 : out_buf_raddr + 13'd1;
        end
      end
      s1 <= issuing;
      n1 <= n;
      a1 <= out_buf_raddr;
      if (s1) begin
        out_buf_wren <= 1'b1;
        out_buf_addr <= a1;
        out_buf_data <= sat16(sum);
        if (n1 == 12'(WIN_LEN - 1)) begin
          last_written <= 1'b1;
          window_start <= (slot == 3'd0) ? 3'd4 : slot - 3'd1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (reset) go_in |-> !busy);

endmodule
