// cordic: iterative CORDIC in rotation mode. Given a signed magnitude r and an angle theta it
// returns r*cos(theta) and r*sin(theta) using only shifts, adds and a 16-entry arctangent ROM,
// one micro-rotation per clock.
//
// Angles are binary angles: AW = 16 bits span one full turn (65536 = 360 degrees). Angles in
// the left half-plane (90..270 degrees) are folded by 180 degrees and the magnitude negated, so
// the iteration only ever sees |theta| <= 90 degrees. The CORDIC gain K = 1.6468 is removed
// before the iteration by multiplying r with round(2^16 / K) = 39797. The ROM holds
// round(atan(2^-i) * 2^20 / (2*pi)) for i = 0..15: the angle accumulator and the x/y datapath
// carry 4 guard bits each to limit rounding; results are rounded back to W bits.
//
// Interface: pulse start_i for one cycle with r_i and theta_i valid. busy_o is high for ITER
// cycles, then done_o pulses for one cycle and cos_o / sin_o hold the result until the next
// start. Latency from start to done is ITER + 1 cycles.
//
// The rotation method follows the shift-and-add CORDIC the architecture uses for its
// trigonometric functions; widths, iteration count and the gain handling are this design's own.
module cordic #(
  parameter int unsigned W    = 18,  // data width (signed)
  parameter int unsigned ITER = 16   // micro-rotations, at most 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start_i,
  input  logic signed [W-1:0] r_i,
  input  logic [15:0]         theta_i,
  output logic                busy_o,
  output logic                done_o,
  output logic signed [W-1:0] cos_o,
  output logic signed [W-1:0] sin_o
);
  localparam int unsigned AW = 16;      // angle width at the ports
  localparam int unsigned ZW = AW + 4;  // angle width inside (4 guard bits)
  localparam int unsigned G  = 4;       // guard bits on x and y
  localparam int unsigned XW = W + G;
  localparam logic [16:0] KINV = 17'd39797;
  localparam logic [ZW-1:0] ATAN [16] = '{
    20'd131072, 20'd77376, 20'd40884, 20'd20753, 20'd10417, 20'd5213, 20'd2607, 20'd1304,
    20'd652,    20'd326,   20'd163,   20'd81,    20'd41,    20'd20,   20'd10,   20'd5};

  logic signed [XW-1:0] x_q, y_q;
  logic signed [ZW-1:0] z_q;
  logic [4:0]           i_q;
  logic                 busy_q, done_q;

  // Start-up values: fold the angle, remove the gain.
  logic                 fold;
  logic signed [W-1:0]  r_f;
  logic signed [W+17:0] r_scaled;
  assign fold     = theta_i[AW-1] ^ theta_i[AW-2];
  assign r_f      = fold ? -r_i : r_i;
  assign r_scaled = (W+18)'(r_f) * $signed({1'b0, KINV});

  // One micro-rotation.
  logic signed [XW-1:0] x_sh, y_sh;
  assign x_sh = x_q >>> i_q;
  assign y_sh = y_q >>> i_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '0;
      y_q    <= '0;
      z_q    <= '0;
      i_q    <= '0;
      busy_q <= 1'b0;
      done_q <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (start_i) begin
        x_q    <= XW'(r_scaled >>> (16 - G));
        y_q    <= '0;
        z_q    <= $signed({fold ? (theta_i ^ 16'h8000) : theta_i, 4'd0});
        i_q    <= '0;
        busy_q <= 1'b1;
      end else if (busy_q) begin
        if (z_q >= 0) begin
          x_q <= x_q - y_sh;
          y_q <= y_q + x_sh;
          z_q <= z_q - $signed(ATAN[i_q[3:0]]);
        end else begin
          x_q <= x_q + y_sh;
          y_q <= y_q - x_sh;
          z_q <= z_q + $signed(ATAN[i_q[3:0]]);
        end
        i_q <= i_q + 5'd1;
        if (i_q == 5'(ITER - 1)) begin
          busy_q <= 1'b0;
          done_q <= 1'b1;
        end
      end
    end
  end

  assign busy_o = busy_q;
  assign done_o = done_q;
  // Drop the guard bits with rounding.
  logic signed [XW-1:0] x_r, y_r;
  assign x_r    = x_q + XW'(1 << (G - 1));
  assign y_r    = y_q + XW'(1 << (G - 1));
  assign cos_o  = W'(x_r >>> G);
  assign sin_o  = W'(y_r >>> G);

  initial begin
    assert (ITER >= 1 && ITER <= 16) else $error("cordic: ITER must be 1..16");
  end
endmodule
