// cordic_vectoring: pipelined CORDIC in vectoring mode, converting a point
// (x, y) to magnitude and angle.
//
// Stage 0 reflects points with x < 0 through the origin and starts the angle
// at +pi or -pi, so the iterations only need to cover +/- 90 degrees. Each of
// the NSTAGES iterations then rotates the point by +/- atan(2^-k) towards the
// x axis using shifts and adds only, accumulating the rotation in z. The last
// stage removes the CORDIC gain (x * 0.607253) and rounds.
//
// Inputs: 16-bit signed x, y (Q8.8). Outputs: mag, 16-bit (Q8.8, saturated to
// 32767), and phase, Q8.8 radians in [-pi, pi). A TAGW-bit tag travels with
// each point. One point per cycle; latency NSTAGES + 2 cycles. Internally the
// data carries 2 guard bits and 4 extra fraction bits, and the angle 14
// fraction bits.
module cordic_vectoring #(
  parameter int unsigned NSTAGES = 16,
  parameter int unsigned TAGW    = 12
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              in_valid,
  input  logic signed [15:0] in_x,
  input  logic signed [15:0] in_y,
  input  logic [TAGW-1:0]   in_tag,
  output logic              out_valid,
  output logic [15:0]       out_mag,
  output logic signed [15:0] out_phase,
  output logic [TAGW-1:0]   out_tag
);

  localparam int W  = 22;   // 16 bits + 2 guard + 4 fraction
  localparam int ZW = 20;   // angle, 14 fraction bits
  localparam logic signed [ZW-1:0] Z_PI = ZW'(51472);  // round(pi * 2^14)

  function automatic logic signed [ZW-1:0] atan_q14(input int k);
    return ZW'(longint'($atan(2.0 ** (-k)) * 16384.0 + 0.5));
  endfunction

  logic signed [W-1:0]  xs [NSTAGES+1];
  logic signed [W-1:0]  ys [NSTAGES+1];
  logic signed [ZW-1:0] zs [NSTAGES+1];
  logic                 vs [NSTAGES+1];
  logic [TAGW-1:0]      ts [NSTAGES+1];

  logic signed [W-1:0] ex, ey;
  assign ex = {{2{in_x[15]}}, in_x, 4'b0};
  assign ey = {{2{in_y[15]}}, in_y, 4'b0};

  always_ff @(posedge clk) begin
    if (reset) begin
      vs[0] <= 1'b0;
      xs[0] <= '0; ys[0] <= '0; zs[0] <= '0; ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (in_x[15]) begin
        xs[0] <= -ex;
        ys[0] <= -ey;
        zs[0] <= in_y[15] ? -Z_PI : Z_PI;
      end else begin
        xs[0] <= ex;
        ys[0] <= ey;
        zs[0] <= '0;
      end
    end
  end

  for (genvar k = 0; k < int'(NSTAGES); k++) begin : g_stage
    localparam logic signed [ZW-1:0] ANGLE = atan_q14(k);
    always_ff @(posedge clk) begin
      if (reset) begin
        vs[k+1] <= 1'b0;
        xs[k+1] <= '0; ys[k+1] <= '0; zs[k+1] <= '0; ts[k+1] <= '0;
      end else begin
        vs[k+1] <= vs[k];
        ts[k+1] <= ts[k];
        if (ys[k][W-1]) begin   // below the axis: rotate counter-clockwise
          xs[k+1] <= xs[k] - (ys[k] >>> k);
          ys[k+1] <= ys[k] + (xs[k] >>> k);
          zs[k+1] <= zs[k] - ANGLE;
        end else begin          // on or above the axis: rotate clockwise
          xs[k+1] <= xs[k] + (ys[k] >>> k);
          ys[k+1] <= ys[k] - (xs[k] >>> k);
          zs[k+1] <= zs[k] + ANGLE;
        end
      end
    end
  end

  // Gain removal, rounding to Q8.8 and angle wrap.
  logic signed [W+17-1:0] scaled;
  logic signed [W+17-1:0] mag_r;
  logic signed [ZW-1:0]   z_r;
  logic signed [15:0]     ph_r;
  assign scaled = $signed(xs[NSTAGES]) * $signed(18'sd39797);   // 0.607253 * 2^16
  assign mag_r  = (scaled + (W+17)'(1 <<< 19)) >>> 20;          // 16 + 4 fraction bits
  assign z_r    = (zs[NSTAGES] + ZW'(32)) >>> 6;
  always_comb begin
    ph_r = 16'(z_r);
    if (ph_r >= 16'sd804)  ph_r = ph_r - 16'sd1608;
    if (ph_r < -16'sd804)  ph_r = ph_r + 16'sd1608;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      out_valid <= 1'b0;
      out_mag   <= '0;
      out_phase <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= vs[NSTAGES];
      out_tag   <= ts[NSTAGES];
      out_mag   <= (mag_r > (W+17)'(32767)) ? 16'd32767 : 16'(mag_r);
      out_phase <= ph_r;
    end
  end

endmodule
