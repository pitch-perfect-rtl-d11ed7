// hann_rom: the Hann window coefficients, w[n] = 0.5 * (1 - cos(2*pi*n/N))
// = sin^2(pi*n/N), for n = 0 .. N-1, stored as 16-bit unsigned fractions
// (all 16 bits fractional, so 1.0 is clipped to 65535).
//
// The table is computed when the ROM is elaborated, not read from a file.
// Two synchronous read ports (reader_a for the first Hann stage, reader_b for
// the stitcher's second Hann stage) share the one table; each returns the word
// one clock after its address.
module hann_rom #(
  parameter int unsigned N = 4096,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic [AW-1:0] addr_a,
  output logic [15:0]   data_a,
  input  logic [AW-1:0] addr_b,
  output logic [15:0]   data_b
);

  function automatic logic [15:0] hann_coef(input int n);
    real w;
    w = 0.5 * (1.0 - $cos(2.0 * 3.14159265358979323846 * real'(n) / real'(N)));
    w = w * 65536.0 + 0.5;
    if (w > 65535.0) return 16'hFFFF;
    return 16'(longint'(w));
  endfunction

  logic [15:0] rom [N];

  initial begin
    for (int i = 0; i < int'(N); i++) rom[i] = hann_coef(i);
  end

  always_ff @(posedge clk) begin
    data_a <= rom[addr_a];
    data_b <= rom[addr_b];
  end

endmodule
