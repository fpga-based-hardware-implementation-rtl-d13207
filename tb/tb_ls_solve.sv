// tb_ls_solve - self-checking test of stage 3 (least-squares rotation matrix).
//
// Ls is built as A(theta) T plus a small perturbation, with A the 4 x 2
// steering matrix of two random directions and T a random 2 x 2 matrix, then
// quantised to the 16/8 format. Lambda from the block is compared with the
// double-precision (Ls1^H Ls1)^-1 Ls1^H Ls2 of the same quantised Ls
// (tolerance 0.04); in one-source frames with h11/g11. The fixed latency and
// the zeroing of unused entries in one-source mode are checked too.
module tb_ls_solve;
  import tb_doa_pkg::*;

  localparam int M = 4, WL = 16, IWL = 8, FRAC = WL - IWL, K = 2;
  localparam int LAT = WL + 5;
  localparam real TOL = 0.04;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, two_src;
  logic signed [WL-1:0] ls_re [M][K];
  logic signed [WL-1:0] ls_im [M][K];
  logic signed [WL-1:0] lam_re [K][K];
  logic signed [WL-1:0] lam_im [K][K];

  ls_solve #(.M(M), .WL(WL), .IWL(IWL)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t Ls [M][K];
  cplx_t G [K][K];
  cplx_t H [K][K];
  cplx_t Lam [K][K];

  task automatic make_ls();
    real th[2];
    cplx_t T [K][K];
    cplx_t a;
    th[0] = 20.0 + 60.0 * (urand() + 1.0) / 2.0;
    th[1] = 100.0 + 60.0 * (urand() + 1.0) / 2.0;
    for (int p = 0; p < K; p++) for (int q = 0; q < K; q++) T[p][q] = cx(0.6 * urand(), 0.6 * urand());
    T[0][0] = cadd(T[0][0], cx(1.0, 0)); T[1][1] = cadd(T[1][1], cx(0.8, 0));
    for (int m = 0; m < M; m++)
      for (int q = 0; q < K; q++) begin
        Ls[m][q] = cx(0.02 * urand(), 0.02 * urand());
        for (int k = 0; k < K; k++) begin
          a = cx($cos(-PI * m * $cos(th[k] * PI / 180.0)), $sin(-PI * m * $cos(th[k] * PI / 180.0)));
          Ls[m][q] = cadd(Ls[m][q], cmul(a, T[k][q]));
        end
        ls_re[m][q] = WL'(to_fx(Ls[m][q].re, FRAC, WL));
        ls_im[m][q] = WL'(to_fx(Ls[m][q].im, FRAC, WL));
        Ls[m][q] = cx(from_fx(ls_re[m][q], FRAC), from_fx(ls_im[m][q], FRAC));
      end
  endtask

  task automatic reference(input logic two);
    cplx_t det, inv [K][K];
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++) begin
        G[p][q] = cx(0, 0); H[p][q] = cx(0, 0); Lam[p][q] = cx(0, 0);
        for (int i = 0; i < M - 1; i++) begin
          G[p][q] = cadd(G[p][q], cmul(cconj(Ls[i][p]), Ls[i][q]));
          H[p][q] = cadd(H[p][q], cmul(cconj(Ls[i][p]), Ls[i+1][q]));
        end
      end
    if (!two) begin
      Lam[0][0] = cdiv(H[0][0], G[0][0]);
      return;
    end
    det = csub(cmul(G[0][0], G[1][1]), cmul(G[0][1], G[1][0]));
    inv[0][0] = cdiv(G[1][1], det);
    inv[1][1] = cdiv(G[0][0], det);
    inv[0][1] = cdiv(cscale(G[0][1], -1.0), det);
    inv[1][0] = cdiv(cscale(G[1][0], -1.0), det);
    for (int p = 0; p < K; p++)
      for (int q = 0; q < K; q++)
        Lam[p][q] = cadd(cmul(inv[p][0], H[0][q]), cmul(inv[p][1], H[1][q]));
  endtask

  initial begin
    int t0;
    in_valid = 0; out_ready = 0; two_src = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 30; f++) begin
      two_src = (f % 3 != 2);
      make_ls();
      reference(two_src);
      in_valid = 1;
      while (!in_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      t0 = cyc;
      in_valid = 0; two_src = ~two_src;   // must have been latched
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (cyc - t0 != LAT) begin
        failures++;
        $display("latency %0d, expected %0d", cyc - t0, LAT);
      end
      repeat ($urandom_range(0, 3)) begin @(posedge clk); #1; end
      for (int p = 0; p < K; p++)
        for (int q = 0; q < K; q++) begin
          real er, ei;
          er = from_fx(lam_re[p][q], FRAC) - Lam[p][q].re;
          ei = from_fx(lam_im[p][q], FRAC) - Lam[p][q].im;
          checks++;
          if (er > TOL || er < -TOL || ei > TOL || ei < -TOL) begin
            failures++;
            $display("frame %0d Lambda[%0d][%0d] = %f,%f expected %f,%f", f, p, q,
                     from_fx(lam_re[p][q], FRAC), from_fx(lam_im[p][q], FRAC), Lam[p][q].re, Lam[p][q].im);
          end
        end
      out_ready = 1; @(posedge clk); #1; out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
