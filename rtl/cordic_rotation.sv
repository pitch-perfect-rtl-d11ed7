// cordic_rotation: pipelined CORDIC in rotation mode, converting magnitude and
// angle to a point (re, im) = mag * (cos phase, sin phase).
//
// Stage 0 folds angles beyond +/- 90 degrees by pi (and remembers to negate the
// result), and pre-multiplies the magnitude by the CORDIC gain correction
// 0.607253 so the rotated vector comes out at the right length. Each of the
// NSTAGES iterations rotates by +/- atan(2^-k) towards z = 0 with shifts and
// adds. The last stage rounds and saturates.
//
// Inputs: mag, 16-bit (Q8.8, treated as unsigned), phase, Q8.8 radians in
// [-pi, pi]. Outputs: re, im, 16-bit signed Q8.8. A TAGW-bit tag travels with
// each point. One point per cycle; latency NSTAGES + 2 cycles.
module cordic_rotation #(
  parameter int unsigned NSTAGES = 16,
  parameter int unsigned TAGW    = 12
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              in_valid,
  input  logic [15:0]       in_mag,
  input  logic signed [15:0] in_phase,
  input  logic [TAGW-1:0]   in_tag,
  output logic              out_valid,
  output logic signed [15:0] out_re,
  output logic signed [15:0] out_im,
  output logic [TAGW-1:0]   out_tag
);

  localparam int W  = 23;   // 17 bits + 2 guard + 4 fraction
  localparam int ZW = 20;
  localparam logic signed [ZW-1:0] Z_PI      = ZW'(51472);
  localparam logic signed [ZW-1:0] Z_HALF_PI = ZW'(25736);

  function automatic logic signed [ZW-1:0] atan_q14(input int k);
    return ZW'(longint'($atan(2.0 ** (-k)) * 16384.0 + 0.5));
  endfunction

  logic signed [W-1:0]  xs [NSTAGES+1];
  logic signed [W-1:0]  ys [NSTAGES+1];
  logic signed [ZW-1:0] zs [NSTAGES+1];
  logic                 vs [NSTAGES+1];
  logic                 ns [NSTAGES+1];
  logic [TAGW-1:0]      ts [NSTAGES+1];

  logic signed [ZW-1:0] z_in;
  logic signed [33:0]   x_scaled;
  assign z_in     = ZW'(in_phase) <<< 6;
  assign x_scaled = $signed({1'b0, in_mag}) * $signed(18'sd39797);   // mag * 0.607253 * 2^16

  always_ff @(posedge clk) begin
    if (reset) begin
      vs[0] <= 1'b0; ns[0] <= 1'b0;
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      xs[0] <= W'((x_scaled + 34'sd2048) >>> 12);   // keep 4 fraction bits
      ys[0] <= '0;
      if (z_in > Z_HALF_PI) begin
        zs[0] <= z_in - Z_PI;  ns[0] <= 1'b1;
      end else if (z_in < -Z_HALF_PI) begin
        zs[0] <= z_in + Z_PI;  ns[0] <= 1'b1;
      end else begin
        zs[0] <= z_in;         ns[0] <= 1'b0;
      end
    end
  end

  for (genvar k = 0; k < int'(NSTAGES); k++) begin : g_stage
    localparam logic signed [ZW-1:0] ANGLE = atan_q14(k);
    always_ff @(posedge clk) begin
      if (reset) begin
        vs[k+1] <= 1'b0; ns[k+1] <= 1'b0;
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0; ts[k+1] <= '0;
      end else begin
        vs[k+1] <= vs[k];
        ns[k+1] <= ns[k];
        ts[k+1] <= ts[k];
        if (zs[k][ZW-1]) begin  // negative residual angle: rotate clockwise
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + ANGLE;
        end else begin
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - ANGLE;
        end
      end
    end
  end

  function automatic logic signed [15:0] round_sat(input logic signed [W-1:0] v, input logic neg);
    logic signed [W-1:0] r;
    r = (v + W'(8)) >>> 4;
    if (neg) r = -r;
    if (r > W'(32767))       return 16'sd32767;
    else if (r < -W'(32768)) return -16'sd32768;
    else                     return 16'(r);
  endfunction

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= vs[NSTAGES];
      out_tag   <= ts[NSTAGES];
      out_re    <= round_sat(xs[NSTAGES], ns[NSTAGES]);
      out_im    <= round_sat(ys[NSTAGES], ns[NSTAGES]);
    end
  end

endmodule
