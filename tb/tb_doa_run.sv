// tb_doa_run - drives one doa_top configuration through a set of frames.
//
// Used by tb_doa_configs. Streams NF frames of NSNAP snapshots of two sources
// at th0/th1 degrees (one source at th0 in every fourth frame, or in all
// frames when ONE_SRC is set; LDL and Cholesky alternate) with noise of rms SIGMA per element, quantised to the
// WL/IWL format, and compares each estimate with the true directions within
// TOL_DEG. Reports its counts and the mean absolute error on its ports.
module tb_doa_run #(
  parameter int  M       = 4,
  parameter int  WL      = 16,
  parameter int  IWL     = 8,
  parameter int  NF      = 8,
  parameter real TH0     = 105.0,
  parameter real TH1     = 150.0,
  parameter real SIGMA   = 0.3,
  parameter real TOL_DEG = 3.0,
  parameter int  NSNAP   = 100,
  parameter bit  ONE_SRC = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output real  mean_err,
  output logic finished
);
  import tb_doa_pkg::*;

  localparam int FRAC = WL - IWL, K = 2, ANG_FRAC = 7;

  logic s_valid, s_ready, use_chol, two_src, doa_valid, doa_ready, doa_chol;
  logic signed [WL-1:0] s_re [M];
  logic signed [WL-1:0] s_im [M];
  logic [15:0] theta [K];
  logic [K-1:0] src_valid;

  doa_top #(.M(M), .WL(WL), .IWL(IWL), .NSNAP(NSNAP)) dut (.*);

  function automatic bit two_of(int f); return !ONE_SRC && (f % 4 != 3); endfunction

  // cycles from the last snapshot of frame 0 being accepted to its estimate
  int n_in2 = 0, n_snap = 0, cyc = 0, t_last = 0;
  int unsigned latency0 = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.r_valid && dut.r_ready) n_in2 <= n_in2 + 1;
    if (s_valid && s_ready) begin
      n_snap <= n_snap + 1;
      if (n_snap == NSNAP - 1) t_last <= cyc;
    end
    if (doa_valid && latency0 == 0) latency0 <= cyc - t_last;
  end
  assign use_chol = n_in2[0];
  assign two_src  = two_of(n_in2);
  assign doa_ready = 1'b1;

  initial begin
    real th[2], ph[2];
    cplx_t x;
    s_valid = 0;
    for (int i = 0; i < M; i++) begin s_re[i] = '0; s_im[i] = '0; end
    wait (!rst_n); wait (rst_n);
    @(posedge clk); #1;
    th[0] = TH0; th[1] = TH1;
    for (int f = 0; f < NF; f++)
      for (int t = 0; t < NSNAP; t++) begin
        ph[0] = PI * urand(); ph[1] = PI * urand();
        for (int m = 0; m < M; m++) begin
          x = ula_sample(m, two_of(f) ? 2 : 1, th, ph, SIGMA);
          s_re[m] = WL'(to_fx(x.re, FRAC, WL));
          s_im[m] = WL'(to_fx(x.im, FRAC, WL));
        end
        s_valid = 1;
        while (!s_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        s_valid = 0;
      end
  end

  function automatic real absr(real v); return v < 0.0 ? -v : v; endfunction

  initial begin
    int n_got, n_err;
    real sum_err, a0, a1, e;
    checks = 0; failures = 0; finished = 0; mean_err = 0.0;
    n_got = 0; n_err = 0; sum_err = 0.0;
    wait (!rst_n); wait (rst_n);
    while (n_got < NF) begin
      @(posedge clk); #1;
      if (doa_valid) begin
        a0 = real'(theta[0]) / (2.0 ** ANG_FRAC);
        a1 = real'(theta[1]) / (2.0 ** ANG_FRAC);
        if (two_of(n_got)) begin
          e = (absr(a0 - TH0) + absr(a1 - TH1) < absr(a1 - TH0) + absr(a0 - TH1)) ?
              (absr(a0 - TH0) + absr(a1 - TH1)) / 2.0 : (absr(a1 - TH0) + absr(a0 - TH1)) / 2.0;
        end else begin
          e = absr(a0 - TH0);
        end
        sum_err += e; n_err++;
        checks++;
        if (e >= TOL_DEG) begin
          failures++;
          $display("M=%0d %0d/%0d N=%0d frame %0d: est %f %f, error %f deg", M, WL, IWL, NSNAP, n_got, a0, a1, e);
        end
        checks++;
        if (doa_chol != n_got[0]) begin
          failures++;
          $display("M=%0d %0d/%0d N=%0d frame %0d: wrong method tag", M, WL, IWL, NSNAP, n_got);
        end
        n_got++;
      end
    end
    mean_err = sum_err / n_err;
    finished = 1;
  end
endmodule
