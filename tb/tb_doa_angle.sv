// tb_doa_angle - self-checking test of stage 5 (angle from eigenvalue phase).
//
// Eigenvalues r exp(-j pi cos(theta)) with random theta in [5, 175] degrees
// and random modulus r in [0.5, 1.5] are quantised to the 16/8 format. The
// returned angles (degrees, 7 fraction bits) are compared with
// acos(-atan2(im, re)/pi) evaluated in double precision on the quantised
// value (tolerance 0.15 degree, wider near 0 and 180 degrees where acos is
// steep). One-source frames must flag only lane 0. The latency is checked.
module tb_doa_angle;
  import tb_doa_pkg::*;

  localparam int WL = 16, IWL = 8, FRAC = WL - IWL, K = 2, ITER = 16, ANG_FRAC = 7;
  localparam int LAT = 2 * ITER + 14 + 11;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, two_src;
  logic signed [WL-1:0] gam_re [K];
  logic signed [WL-1:0] gam_im [K];
  logic [15:0] theta [K];
  logic [K-1:0] src_valid;

  doa_angle #(.WL(WL), .IWL(IWL), .ITER(ITER), .ANG_W(16), .ANG_FRAC(ANG_FRAC)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real expd [K];

  initial begin
    int t0;
    logic two;
    in_valid = 0; out_ready = 0; two_src = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 60; f++) begin
      two = (f % 4 != 3);
      two_src = two;
      for (int k = 0; k < K; k++) begin
        real th, r, a, gr, gi;
        th = 5.0 + 170.0 * (urand() + 1.0) / 2.0;
        r  = 1.0 + 0.5 * urand();
        a  = -PI * $cos(th * PI / 180.0);
        gam_re[k] = WL'(to_fx(r * $cos(a), FRAC, WL));
        gam_im[k] = WL'(to_fx(r * $sin(a), FRAC, WL));
        gr = from_fx(gam_re[k], FRAC);
        gi = from_fx(gam_im[k], FRAC);
        expd[k] = $acos(-$atan2(gi, gr) / PI) * 180.0 / PI;
      end
      in_valid = 1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      t0 = cyc;
      in_valid = 0; two_src = ~two_src;
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (cyc - t0 != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t0, LAT);
      end
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      checks++;
      if (src_valid != {two, 1'b1}) begin
        failures++;
        $display("frame %0d src_valid %b", f, src_valid);
      end
      for (int k = 0; k < (two ? 2 : 1); k++) begin
        real got, tol;
        got = real'(theta[k]) / (2.0 ** ANG_FRAC);
        tol = (expd[k] < 10.0 || expd[k] > 170.0) ? 0.6 : 0.15;
        checks++;
        if (got - expd[k] > tol || expd[k] - got > tol) begin
          failures++;
          $display("frame %0d lane %0d theta %f expected %f", f, k, got, expd[k]);
        end
      end
      out_ready = 1; @(posedge clk); #1; out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
