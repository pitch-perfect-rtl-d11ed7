// sdp_ram: single-clock two-port RAM (one write port, one read port), the
// building block of every intermediary buffer of the pipeline (pre-FFT,
// post-FFT real/imag, the ping-pong magnitude/phase buffers, the scaler's
// synthesis accumulators and the IFFT buffers).
//
// The design keeps these buffers in on-chip block RAM, 4096 words of 16 bits
// each. Reads are synchronous: rdata shows mem[raddr] one clock after raddr is
// presented. A read of the address being written in the same cycle returns the
// old word. The contents start at zero, as the block RAMs of an FPGA can be
// initialised at configuration; the pipeline relies on this for the "previous
// window" buffers of the first window.
module sdp_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             wren,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (wren) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
