// tb_eig2x2 - self-checking test of stage 4 (eigenvalues of a 2x2 complex matrix).
//
// Lambda is built as T^-1 diag(g1, g2) T with random unit-modulus g1, g2 and a
// random well-conditioned T (the form it takes in the DOA pipeline), or as a
// fully random matrix, quantised to the 16/8 format. The two eigenvalues from
// the block are compared, as an unordered pair, with m +/- sqrt(((a-d)/2)^2 + bc)
// evaluated in double precision on the quantised matrix (tolerance 0.03).
// One-source frames must return a itself. The fixed latency is checked too.
module tb_eig2x2;
  import tb_doa_pkg::*;

  localparam int WL = 16, IWL = 8, FRAC = WL - IWL, K = 2;
  localparam int LAT = (WL + FRAC) / 2 + 8 + WL + 10;
  localparam real TOL = 0.03;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, two_src;
  logic signed [WL-1:0] lam_re [K][K];
  logic signed [WL-1:0] lam_im [K][K];
  logic signed [WL-1:0] gam_re [K];
  logic signed [WL-1:0] gam_im [K];

  eig2x2 #(.WL(WL), .IWL(IWL)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t A [K][K];
  cplx_t E [K];

  function automatic real cdist(cplx_t a, cplx_t b);
    return $sqrt(cabs2(csub(a, b)));
  endfunction

  task automatic make_lam(input bit structured);
    cplx_t T [K][K];
    cplx_t Ti [K][K];
    cplx_t g [K];
    cplx_t det;
    real   ph;
    if (structured) begin
      for (int p = 0; p < K; p++) for (int q = 0; q < K; q++) T[p][q] = cx(0.5 * urand(), 0.5 * urand());
      T[0][0] = cadd(T[0][0], cx(1.0, 0)); T[1][1] = cadd(T[1][1], cx(1.0, 0));
      det = csub(cmul(T[0][0], T[1][1]), cmul(T[0][1], T[1][0]));
      Ti[0][0] = cdiv(T[1][1], det); Ti[1][1] = cdiv(T[0][0], det);
      Ti[0][1] = cdiv(cscale(T[0][1], -1.0), det); Ti[1][0] = cdiv(cscale(T[1][0], -1.0), det);
      for (int k = 0; k < K; k++) begin
        ph = PI * urand();
        g[k] = cx($cos(ph), $sin(ph));
      end
      for (int p = 0; p < K; p++)
        for (int q = 0; q < K; q++)
          A[p][q] = cadd(cmul(cmul(Ti[p][0], g[0]), T[0][q]), cmul(cmul(Ti[p][1], g[1]), T[1][q]));
    end else begin
      for (int p = 0; p < K; p++) for (int q = 0; q < K; q++) A[p][q] = cx(1.5 * urand(), 1.5 * urand());
    end
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++) begin
        lam_re[p][q] = WL'(to_fx(A[p][q].re, FRAC, WL));
        lam_im[p][q] = WL'(to_fx(A[p][q].im, FRAC, WL));
        A[p][q] = cx(from_fx(lam_re[p][q], FRAC), from_fx(lam_im[p][q], FRAC));
      end
  endtask

  task automatic reference(input logic two);
    cplx_t m, h, s;
    if (!two) begin
      E[0] = A[0][0]; E[1] = cx(0, 0);
      return;
    end
    m = cscale(cadd(A[0][0], A[1][1]), 0.5);
    h = cscale(csub(A[0][0], A[1][1]), 0.5);
    s = csqrt(cadd(cmul(h, h), cmul(A[0][1], A[1][0])));
    E[0] = cadd(m, s); E[1] = csub(m, s);
  endtask

  initial begin
    int t0;
    cplx_t g0, g1;
    in_valid = 0; out_ready = 0; two_src = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 40; f++) begin
      two_src = (f % 5 != 4);
      make_lam(f % 2 == 0);
      reference(two_src);
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
      g0 = cx(from_fx(gam_re[0], FRAC), from_fx(gam_im[0], FRAC));
      g1 = cx(from_fx(gam_re[1], FRAC), from_fx(gam_im[1], FRAC));
      checks++;
      if (!((cdist(g0, E[0]) < TOL && cdist(g1, E[1]) < TOL) ||
            (cdist(g0, E[1]) < TOL && cdist(g1, E[0]) < TOL))) begin
        failures++;
        $display("frame %0d eig = (%f,%f) (%f,%f) expected (%f,%f) (%f,%f)", f,
                 g0.re, g0.im, g1.re, g1.im, E[0].re, E[0].im, E[1].re, E[1].im);
      end
      out_ready = 1; @(posedge clk); #1; out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
