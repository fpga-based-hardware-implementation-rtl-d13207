// tb_chol_decomp - self-checking test of stage 2, Cholesky decomposition.
//
// Builds covariance matrices of a 4-element ULA with two random sources and
// noise in double precision, quantises them to the 16/8 format, and compares
// the first two columns of L returned by the block with a double-precision
// Cholesky factorisation of the same quantised matrix (tolerance 2 LSB plus 3 LSB divided by the column's pivot, since the
// pivot division magnifies the rounding of the numerator).
// Also checks the fixed latency from the accepting edge to out_valid and that
// the result holds while out_ready is low.
module tb_chol_decomp;
  import tb_doa_pkg::*;

  localparam int M = 4, WL = 16, IWL = 8, FRAC = WL - IWL, K = 2;
  localparam int LAT = 2 * (WL + 1) + 2 * ((WL + FRAC) / 2 + 1) + 9;
  localparam real TOL = 0.02;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready;
  logic signed [WL-1:0] r_re [M][M];
  logic signed [WL-1:0] r_im [M][M];
  logic signed [WL-1:0] ls_re [M][K];
  logic signed [WL-1:0] ls_im [M][K];

  chol_decomp #(.M(M), .WL(WL), .IWL(IWL)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t R [M][M];
  cplx_t L [M][M];
  real   D [M];

  task automatic make_cov(input real th0, input real th1, input real sigma);
    real th[2], ph[2];
    cplx_t x [M];
    th[0] = th0; th[1] = th1;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) R[i][j] = cx(0, 0);
    for (int t = 0; t < 200; t++) begin
      ph[0] = PI * urand(); ph[1] = PI * urand();
      for (int m = 0; m < M; m++) x[m] = ula_sample(m, 2, th, ph, sigma);
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++)
        R[i][j] = cadd(R[i][j], cscale(cmul(x[i], cconj(x[j])), 1.0 / 200.0));
    end
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin
      r_re[i][j] = WL'(to_fx(R[i][j].re, FRAC, WL));
      r_im[i][j] = WL'(to_fx(R[i][j].im, FRAC, WL));
      R[i][j] = cx(from_fx(r_re[i][j], FRAC), from_fx(r_im[i][j], FRAC));
    end
  endtask

  // Double-precision reference of the first two columns.
  task automatic reference();
    cplx_t acc;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) L[i][j] = cx(0, 0);
    for (int j = 0; j < K; j++) begin
      // l_jj = sqrt(r_jj - sum |l_jk|^2) ; l_ij = (r_ij - sum l_ik conj(l_jk)) / l_jj
      D[j] = R[j][j].re;
      for (int k = 0; k < j; k++) D[j] -= cabs2(L[j][k]);
      L[j][j] = cx($sqrt(D[j]), 0);
      for (int i = j + 1; i < M; i++) begin
        acc = R[i][j];
        for (int k = 0; k < j; k++) acc = csub(acc, cmul(L[i][k], cconj(L[j][k])));
        L[i][j] = cscale(acc, 1.0 / L[j][j].re);
      end
    end
  endtask

  initial begin
    int t0;
    in_valid = 0; out_ready = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 8; f++) begin
      make_cov(20.0 + 140.0 * (urand() + 1.0) / 2.0 * 0.4, 90.0 + 70.0 * (urand() + 1.0) / 2.0, 0.1 + 0.2 * (urand() + 1.0));
      reference();
      in_valid = 1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      t0 = cyc;
      in_valid = 0;
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (cyc - t0 != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t0, LAT);
      end
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < K; j++) begin
          real er, ei, tol;
          er = from_fx(ls_re[i][j], FRAC) - L[i][j].re;
          ei = from_fx(ls_im[i][j], FRAC) - L[i][j].im;
          checks++;
          tol = (2.0 + 3.0 / L[j][j].re) / 256.0;
          if (er > tol || er < -tol || ei > tol || ei < -tol) begin
            failures++;
            $display("frame %0d L[%0d][%0d] = %f,%f expected %f,%f", f, i, j,
                     from_fx(ls_re[i][j], FRAC), from_fx(ls_im[i][j], FRAC), L[i][j].re, L[i][j].im);
          end
        end

      out_ready = 1; @(posedge clk); #1; out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
