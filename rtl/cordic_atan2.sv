// cordic_atan2 - sequential vectoring-mode CORDIC returning atan2(y, x) in degrees.
//
// The vector (x, y) is first folded into the right half plane (x >= 0) by a
// rotation of 180 degrees, then rotated towards the positive x axis by the
// elementary angles atan(2^-i), one per cycle, while the rotations are summed
// in z. The result ang is the angle in degrees with doa_pkg::CORDIC_AF
// fraction bits, in (-180, 180]. x and y only need a common scale.
// Timing: start is taken in any cycle; done pulses ITER+1 cycles later with
// ang valid; ang holds until the next result. The CORDIC is this
// implementation's choice for the phase and arc-cosine of stage 5.
module cordic_atan2 #(
  parameter int W    = 16,   // width of x and y
  parameter int ITER = 16,   // micro-rotations (at most doa_pkg::CORDIC_MAX_ITER)
  parameter int AW   = 26    // width of the signed angle (9 integer bits + 16 fraction + sign)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [W-1:0]  x,
  input  logic signed [W-1:0]  y,
  output logic                 busy,
  output logic                 done,
  output logic signed [AW-1:0] ang
);
  import doa_pkg::*;

  localparam int G  = 3;            // guard bits below the input LSB
  localparam int XW = W + 2 + G;    // room for negation, CORDIC gain and guard bits
  localparam int CW = $clog2(ITER + 1);
  localparam logic signed [AW-1:0] DEG180 = AW'(180) <<< CORDIC_AF;

  initial begin
    assert (ITER <= CORDIC_MAX_ITER) else $error("cordic_atan2: ITER too large");
  end

  logic signed [XW-1:0] xr, yr;
  logic signed [AW-1:0] z;
  logic        [CW-1:0] i;
  logic signed [XW-1:0] xe, ye;
  logic signed [AW-1:0] step;

  always_comb begin
    xe   = XW'(x) <<< G;
    ye   = XW'(y) <<< G;
    step = $signed(AW'(atan_deg16(int'(i))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; ang <= '0;
      xr <= '0; yr <= '0; z <= '0; i <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        i    <= '0;
        if (x < 0) begin
          xr <= -xe;
          yr <= -ye;
          z  <= (y < 0) ? -DEG180 : DEG180;
        end else begin
          xr <= xe;
          yr <= ye;
          z  <= '0;
        end
      end else if (busy) begin
        if (int'(i) < ITER) begin
          if (yr >= 0) begin
            xr <= xr + (yr >>> i);
            yr <= yr - (xr >>> i);
            z  <= z + step;
          end else begin
            xr <= xr - (yr >>> i);
            yr <= yr + (xr >>> i);
            z  <= z - step;
          end
          i <= i + 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          ang  <= z;
        end
      end
    end
  end
endmodule
