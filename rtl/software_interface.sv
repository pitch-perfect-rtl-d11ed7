// software_interface: Avalon memory-mapped slave through which the processor
// sets the pitch scale amount.
//
// A write with chipselect asserted stores writedata[7:0] as shift_amt, an
// 8-bit unsigned fixed-point factor with 6 fractional bits (64 = 1.0, no pitch
// change; 128 = one octave up; 32 = one octave down). The register is written
// whatever the word address; it is not readable. The one-cycle write has no
// wait states. After reset shift_amt is 64, so audio passes at its original
// pitch until software writes a new value (this reset value is a choice of
// this implementation).
module software_interface (
  input  logic       clk,
  input  logic       reset,
  input  logic [7:0] writedata,
  input  logic       write,
  input  logic       chipselect,
  input  logic [2:0] address,
  output logic [7:0] shift_amt
);

  localparam logic [7:0] UNITY = 8'd64;

  logic unused_addr;
  assign unused_addr = ^address;

  always_ff @(posedge clk) begin
    if (reset)                   shift_amt <= UNITY;
    else if (chipselect && write) shift_amt <= writedata;
  end

endmodule
