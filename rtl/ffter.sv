// ffter: connects a pair of buffers to the FFT core (an Intel FFT II core,
// 4096 points, variable streaming, natural input and output order, 16-bit
// fixed-point data) and back. The same wrapper serves as the FFT-er
// (INVERSE = 0) and the IFFT-er (INVERSE = 1): the two differ only in the
// core's inverse input.
//
// On go_in the wrapper streams words 0 .. 4095 of the input buffers (real and
// imaginary parts share one read address; the forward instance ties the
// imaginary input to zero) to the core's Avalon streaming sink, with
// start/end-of-packet on the first and last word and fftpts = 4096. It accepts
// the core's output packet on the source side, always ready, and writes word k
// of it to address k of the real and imaginary output buffers (the inverse
// instance uses only the real part). go_out pulses one cycle after the last
// output word has been written. The core's latency is whatever it takes; the
// wrapper only follows the packet flags. The core's ports are brought out
// because the core itself is vendor IP.
module ffter #(
  parameter bit          INVERSE = 1'b0,
  parameter int unsigned N       = 4096,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          go_in,
  // read the input buffers
  input  logic [15:0]   in_real_data,
  input  logic [15:0]   in_imag_data,
  output logic [AW-1:0] in_buf_addr,
  // FFT core sink (data into the core)
  output logic          fft_sink_valid,
  input  logic          fft_sink_ready,
  output logic          fft_sink_sop,
  output logic          fft_sink_eop,
  output logic [15:0]   fft_sink_real,
  output logic [15:0]   fft_sink_imag,
  output logic          fft_inverse,
  output logic [AW:0]   fft_fftpts,
  // FFT core source (data out of the core)
  input  logic          fft_source_valid,
  output logic          fft_source_ready,
  input  logic          fft_source_sop,
  input  logic          fft_source_eop,
  input  logic [15:0]   fft_source_real,
  input  logic [15:0]   fft_source_imag,
  // write the output buffers
  output logic [15:0]   real_buf_data,
  output logic [AW-1:0] real_buf_addr,
  output logic          real_buf_wren,
  output logic [15:0]   imag_buf_data,
  output logic [AW-1:0] imag_buf_addr,
  output logic          imag_buf_wren,
  output logic          go_out,
  output logic          busy
);

  logic          send_active, send_done;
  logic [31:0]   send_data;
  logic [AW-1:0] out_idx;
  logic          receiving;
  logic          wrote_last;

  assign fft_inverse = INVERSE;
  assign fft_fftpts  = (AW+1)'(N);

  ram_to_stream #(.N(N), .DW(32)) u_send (
    .clk, .reset,
    .start    (go_in),
    .raddr    (in_buf_addr),
    .rdata    ({in_real_data, in_imag_data}),
    .src_valid(fft_sink_valid),
    .src_ready(fft_sink_ready),
    .src_data (send_data),
    .src_sop  (fft_sink_sop),
    .src_eop  (fft_sink_eop),
    .done     (send_done),
    .active   (send_active)
  );
  assign fft_sink_real = send_data[31:16];
  assign fft_sink_imag = send_data[15:0];

  assign fft_source_ready = 1'b1;
  assign busy = send_active || receiving || wrote_last || real_buf_wren;

  logic unused_done;
  assign unused_done = send_done;

  always_ff @(posedge clk) begin
    if (reset) begin
      out_idx       <= '0;
      receiving     <= 1'b0;
      wrote_last    <= 1'b0;
      go_out        <= 1'b0;
      real_buf_data <= '0;
      real_buf_addr <= '0;
      real_buf_wren <= 1'b0;
      imag_buf_data <= '0;
      imag_buf_addr <= '0;
      imag_buf_wren <= 1'b0;
    end else begin
      real_buf_wren <= 1'b0;
      imag_buf_wren <= 1'b0;
      wrote_last    <= 1'b0;
      go_out        <= wrote_last;
      if (go_in && !send_active) receiving <= 1'b1;
      if (fft_source_valid && receiving) begin
        real_buf_data <= fft_source_real;
        imag_buf_data <= fft_source_imag;
        real_buf_addr <= fft_source_sop ? '0 : out_idx;
        imag_buf_addr <= fft_source_sop ? '0 : out_idx;
        real_buf_wren <= 1'b1;
        imag_buf_wren <= 1'b1;
        out_idx       <= fft_source_sop ? AW'(1) : out_idx + AW'(1);
        if (fft_source_eop) begin
          receiving  <= 1'b0;
          wrote_last <= 1'b1;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (reset) go_in |-> !busy);
  // The core must deliver exactly N words per packet.
  assert property (@(posedge clk) disable iff (reset)
                   (fft_source_valid && fft_source_eop) |-> (out_idx == AW'(N - 1)));

endmodule
