// cart_to_polar: converts the 4096 complex FFT bins of a window from
// rectangular to polar form and writes them into one of two ping-pong pairs of
// magnitude/phase buffers.
//
// On go_in the unit flips cur_buf and streams addresses 0 .. 4095 of the
// post-FFT real and imaginary buffers into a pipelined CORDIC
// (cordic_vectoring), one bin per cycle; each bin's address rides through the
// pipeline with it and the result is written to mag_buf_<cur_buf>[k] and
// phase_buf_<cur_buf>[k]. The other pair keeps the previous window, which the
// scaler needs for its phase differences. go_out pulses one cycle after the
// last bin is written, with cur_buf naming the pair just filled. Magnitude is
// Q8.8 (saturated at 32767), phase Q8.8 radians in [-pi, pi). Latency from
// go_in to go_out: 4096 + NSTAGES + 5 cycles.
module cart_to_polar #(
  parameter int unsigned NSTAGES = 16
) (
  input  logic        clk,
  input  logic        reset,
  input  logic        go_in,
  input  logic [15:0] real_buf_data,
  output logic [11:0] real_buf_addr,
  input  logic [15:0] imag_buf_data,
  output logic [11:0] imag_buf_addr,
  output logic [15:0] mag_buf_0_data,
  output logic [11:0] mag_buf_0_addr,
  output logic        mag_buf_0_wren,
  output logic [15:0] phase_buf_0_data,
  output logic [11:0] phase_buf_0_addr,
  output logic        phase_buf_0_wren,
  output logic [15:0] mag_buf_1_data,
  output logic [11:0] mag_buf_1_addr,
  output logic        mag_buf_1_wren,
  output logic [15:0] phase_buf_1_data,
  output logic [11:0] phase_buf_1_addr,
  output logic        phase_buf_1_wren,
  output logic        cur_buf,
  output logic        go_out,
  output logic        busy
);

  logic        issuing, s1;
  logic [11:0] addr, a1;
  logic        c_valid;
  logic [15:0] c_mag;
  logic signed [15:0] c_phase;
  logic [11:0] c_tag;
  logic        wren;
  logic [11:0] waddr;
  logic [15:0] wmag, wphase;
  logic        last_written;
  logic [5:0]  in_flight;   // bins issued but not yet written

  assign real_buf_addr = addr;
  assign imag_buf_addr = addr;

  cordic_vectoring #(.NSTAGES(NSTAGES), .TAGW(12)) u_cordic (
    .clk, .reset,
    .in_valid (s1),
    .in_x     (real_buf_data),
    .in_y     (imag_buf_data),
    .in_tag   (a1),
    .out_valid(c_valid),
    .out_mag  (c_mag),
    .out_phase(c_phase),
    .out_tag  (c_tag)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      issuing      <= 1'b0;
      s1           <= 1'b0;
      addr         <= '0;
      a1           <= '0;
      cur_buf      <= 1'b0;
      go_out       <= 1'b0;
      wren         <= 1'b0;
      waddr        <= '0;
      wmag         <= '0;
      wphase       <= '0;
      last_written <= 1'b0;
    end else begin
      go_out       <= last_written;
      last_written <= 1'b0;
      if (!issuing && go_in) begin
        issuing <= 1'b1;
        addr    <= '0;
        cur_buf <= ~cur_buf;
      end else if (issuing) begin
        if (addr == 12'd4095) issuing <= 1'b0;
        else                  addr    <= addr + 12'd1;
      end
      s1 <= issuing;
      a1 <= addr;
      wren   <= c_valid;
      waddr  <= c_tag;
      wmag   <= c_mag;
      wphase <= c_phase;
      if (c_valid && c_tag == 12'd4095) last_written <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (reset) in_flight <= '0;
    else in_flight <= in_flight + 6'(issuing) - 6'(wren);
  end

  assign busy = issuing || (in_flight != '0) || last_written || go_out;

  assign mag_buf_0_data   = wmag;
  assign mag_buf_1_data   = wmag;
  assign phase_buf_0_data = wphase;
  assign phase_buf_1_data = wphase;
  assign mag_buf_0_addr   = waddr;
  assign mag_buf_1_addr   = waddr;
  assign phase_buf_0_addr = waddr;
  assign phase_buf_1_addr = waddr;
  assign mag_buf_0_wren   = wren && !cur_buf;
  assign phase_buf_0_wren = wren && !cur_buf;
  assign mag_buf_1_wren   = wren &&  cur_buf;
  assign phase_buf_1_wren = wren &&  cur_buf;

  assert property (@(posedge clk) disable iff (reset) go_in |-> !busy);

endmodule
