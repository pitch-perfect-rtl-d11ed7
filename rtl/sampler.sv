// sampler: takes the left ADC channel from the audio core's Avalon streaming
// sources and writes it into the input ring buffer; starts a window every
// 1024 samples.
//
// Handshake (as the audio core's sources are used in this design): the
// sampler raises left_in_ready and right_in_ready for one audio-clock cycle and
// samples left_in_valid/left_in_data on the following cycle. The right channel
// is drained in step and discarded, so the codec FIFOs never fill. A poll
// therefore takes three cycles; a missing sample simply repeats the poll.
//
// Each accepted sample is written to ring_buf at the next address of a
// 5120-word ring (4096 + 1024: one window plus one hop). When the last sample
// of a 1024-word slot has been written, go_out pulses for one cycle and
// window_start names the slot (0..4, i.e. start address 0, 1024, 2048, 3072 or
// 4096) where the newest 4096-sample window begins: the slot three slots back.
// window_start holds its value until the next pulse. The ring starts zeroed,
// so the first three windows are padded with silence (a choice of this
// implementation). Runs entirely in the audio clock domain.
module sampler
  import pv_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [15:0] left_in_data,
  input  logic        left_in_valid,
  output logic        left_in_ready,
  input  logic [15:0] right_in_data,
  input  logic        right_in_valid,
  output logic        right_in_ready,
  output logic [15:0] ring_buf_data,
  output logic [12:0] ring_buf_addr,
  output logic        ring_buf_wren,
  output logic [2:0]  window_start,
  output logic        go_out
);

  typedef enum logic [1:0] {S_REQ, S_HOLD, S_TAKE} state_t;
  state_t state;

  logic [12:0] wr_ptr;   // next ring address to write
  logic [2:0]  slot;     // slot wr_ptr lies in
  logic [9:0]  in_slot;  // position inside the slot

  logic unused_right;
  assign unused_right = ^{right_in_data, right_in_valid};

  always_ff @(posedge clk) begin
    if (reset) begin
      state          <= S_REQ;
      left_in_ready  <= 1'b0;
      right_in_ready <= 1'b0;
      ring_buf_data  <= '0;
      ring_buf_addr  <= '0;
      ring_buf_wren  <= 1'b0;
      window_start   <= '0;
      go_out         <= 1'b0;
      wr_ptr         <= '0;
      slot           <= '0;
      in_slot        <= '0;
    end else begin
      left_in_ready  <= 1'b0;
      right_in_ready <= 1'b0;
      ring_buf_wren  <= 1'b0;
      go_out         <= 1'b0;
      unique case (state)
        S_REQ: begin
          left_in_ready  <= 1'b1;
          right_in_ready <= 1'b1;
          state          <= S_HOLD;
        end
        S_HOLD: state <= S_TAKE;
        S_TAKE: begin
          state <= S_REQ;
          if (left_in_valid) begin
            ring_buf_data <= left_in_data;
            ring_buf_addr <= wr_ptr;
            ring_buf_wren <= 1'b1;
            in_slot       <= in_slot + 10'd1;
            wr_ptr        <= (wr_ptr == 13'(RING_LEN - 1)) ? '0 : wr_ptr + 13'd1;
            if (in_slot == 10'(HOP_LEN - 1)) begin
              go_out       <= 1'b1;
              window_start <= (slot >= 3'd3) ? slot - 3'd3 : slot + 3'd2;
              slot         <= (slot == 3'd4) ? 3'd0 : slot + 3'd1;
            end
          end
        end
        default: state <= S_REQ;
      endcase
    end
  end

endmodule
