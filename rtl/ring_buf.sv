// ring_buf: two-clock RAM for the audio ring buffers (4096 + 1024 = 5120 words
// of 16 bits). The write port runs on the codec's audio clock, the read port
// on the system clock, as in the design's input ring buffer; the output ring
// buffer's emitter copy is the same RAM with the clocks swapped.
//
// Reads are synchronous to rd_clk with one cycle of latency. Writer and reader
// never touch the same 1024-word slot at the same time (the ring holds one
// slot more than a window), so no read/write collision logic is needed. The
// contents start at zero.
module ring_buf #(
  parameter int unsigned DEPTH = 5120,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             wr_clk,
  input  logic             wren,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd_clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge wr_clk) begin
    if (wren && (waddr < AW'(DEPTH))) mem[waddr] <= wdata;
  end

  always_ff @(posedge rd_clk) begin
    rdata <= (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
  end

endmodule
