// pulse_sync: carries a one-cycle pulse from one clock domain to another.
// The source pulse flips a toggle register; the destination passes the toggle
// through two flip-flops and emits a one-cycle pulse on each change. Pulses must
// be at least three destination cycles apart. Latency: two to three
// destination cycles.
module pulse_sync (
  input  logic src_clk,
  input  logic src_rst,
  input  logic src_pulse,
  input  logic dst_clk,
  input  logic dst_rst,
  output logic dst_pulse
);

  logic toggle_src;
  logic [2:0] sync_dst;

  always_ff @(posedge src_clk) begin
    if (src_rst)        toggle_src <= 1'b0;
    else if (src_pulse) toggle_src <= ~toggle_src;
  end

  always_ff @(posedge dst_clk) begin
    if (dst_rst) sync_dst <= '0;
    else         sync_dst <= {sync_dst[1:0], toggle_src};
  end

  assign dst_pulse = sync_dst[2] ^ sync_dst[1];

endmodule
