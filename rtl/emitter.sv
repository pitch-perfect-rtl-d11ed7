// emitter: plays each finished block of 1024 output samples to both DAC
// channels of the audio core through its Avalon streaming sinks. Runs in the
// audio clock domain and reads the output ring through its own read port.
//
// On go_in the emitter points its read address at window_start * 1024 and has
// 1024 samples to send. For every sample, each channel's out_ready is watched;
// once it is seen the channel's out_valid is raised for one cycle on the next
// cycle with the sample on out_data. When both channels have taken the sample
// (the codec plays a sample only after both are written), the read address
// advances and the emitter waits two cycles for the RAM output to settle. A
// go_in that arrives while a block is still playing restarts at the new block.
// With no block to play the emitter sends nothing.
module emitter
  import pv_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [2:0]  window_start,
  input  logic        go_in,
  input  logic [15:0] out_buf_rdata,
  output logic [12:0] out_buf_raddr,
  output logic [15:0] left_out_data,
  output logic        left_out_valid,
  input  logic        left_out_ready,
  output logic [15:0] right_out_data,
  output logic        right_out_valid,
  input  logic        right_out_ready,
  output logic        playing
);

  logic [10:0] remaining;
  logic [1:0]  settle;
  logic        left_done, right_done;

  assign playing = (remaining != '0);

  always_ff @(posedge clk) begin
    if (reset) begin
      remaining       <= '0;
      settle          <= '0;
      left_done       <= 1'b0;
      right_done      <= 1'b0;
      out_buf_raddr   <= '0;
      left_out_data   <= '0;
      left_out_valid  <= 1'b0;
      right_out_data  <= '0;
      right_out_valid <= 1'b0;
    end else begin
      left_out_valid  <= 1'b0;
      right_out_valid <= 1'b0;
      if (settle != '0) settle <= settle - 2'd1;
      if (go_in) begin
        out_buf_raddr <= 13'(window_start) * 13'(HOP_LEN);
        remaining     <= 11'(HOP_LEN);
        settle        <= 2'd2;
        left_done     <= 1'b0;
        right_done    <= 1'b0;
      end else if (playing && settle == '0) begin
        if (left_done && right_done) begin
          left_done     <= 1'b0;
          right_done    <= 1'b0;
          remaining     <= remaining - 11'd1;
          out_buf_raddr <= (out_buf_raddr == 13'(RING_LEN - 1)) ? '0 : out_buf_raddr + 13'd1;
          settle        <= 2'd2;
        end else begin
          if (left_out_ready && !left_done) begin
            left_out_valid <= 1'b1;
            left_out_data  <= out_buf_rdata;
            left_done      <= 1'b1;
          end
          if (right_out_ready && !right_done) begin
            right_out_valid <= 1'b1;
            right_out_data  <= out_buf_rdata;
            right_done      <= 1'b1;
          end
        end
      end
    end
  end

endmodule
