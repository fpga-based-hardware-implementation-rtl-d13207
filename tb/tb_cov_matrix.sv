// tb_cov_matrix - self-checking test of stage 1 (sample covariance).
//
// Streams three frames of random snapshots, with random gaps in s_valid and
// a held-back out_ready, and compares every entry of the matrix with the
// double-precision average of x x^H (tolerance 1 LSB). Checks the Hermitian
// symmetry and that out_valid rises exactly 3 cycles after the last
// snapshot of a frame is accepted.
module tb_cov_matrix;
  import tb_doa_pkg::*;

  localparam int M = 4, WL = 16, IWL = 8, FRAC = WL - IWL, NSNAP = 12;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic s_valid, s_ready, out_valid, out_ready;
  logic signed [WL-1:0] x_re [M];
  logic signed [WL-1:0] x_im [M];
  logic signed [WL-1:0] r_re [M][M];
  logic signed [WL-1:0] r_im [M][M];

  cov_matrix #(.M(M), .WL(WL), .IWL(IWL), .NSNAP(NSNAP)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired: state %0d", dut.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t ref_r [M][M];
  int    last_acc;

  initial begin
    s_valid = 0; out_ready = 0;
    for (int i = 0; i < M; i++) begin x_re[i] = '0; x_im[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) ref_r[i][j] = cx(0, 0);
      for (int t = 0; t < NSNAP; t++) begin
        // random idle cycles between snapshots
        while ($urandom_range(0, 2) == 0) begin
          s_valid = 0; @(posedge clk); #1;
        end
        for (int i = 0; i < M; i++) begin
          x_re[i] = WL'(to_fx(2.0 * urand(), FRAC, WL));
          x_im[i] = WL'(to_fx(2.0 * urand(), FRAC, WL));
        end
        for (int i = 0; i < M; i++)
          for (int j = 0; j < M; j++)
            ref_r[i][j] = cadd(ref_r[i][j], cmul(cx(from_fx(x_re[i], FRAC), from_fx(x_im[i], FRAC)),
                                                 cconj(cx(from_fx(x_re[j], FRAC), from_fx(x_im[j], FRAC)))));
        s_valid = 1;
        while (!s_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
        last_acc = cyc;
      end
      s_valid = 0;
      while (!out_valid) begin @(posedge clk); #1; end
      checks++;
      if (cyc - last_acc != 3) begin
        failures++;
        $display("latency %0d, expected 3", cyc - last_acc);
      end
      // hold the result back for a few cycles
      repeat ($urandom_range(0, 4)) begin @(posedge clk); #1; end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          real er, ei;
          er = from_fx(r_re[i][j], FRAC) - ref_r[i][j].re / NSNAP;
          ei = from_fx(r_im[i][j], FRAC) - ref_r[i][j].im / NSNAP;
          checks++;
          if ((er > 1.01 / 256.0) || (er < -1.01 / 256.0) || (ei > 1.01 / 256.0) || (ei < -1.01 / 256.0)) begin
            failures++;
            $display("frame %0d r[%0d][%0d] = %f,%f, expected %f,%f", f, i, j,
                     from_fx(r_re[i][j], FRAC), from_fx(r_im[i][j], FRAC),
                     ref_r[i][j].re / NSNAP, ref_r[i][j].im / NSNAP);
          end
          checks++;
          if (r_re[i][j] != r_re[j][i] || r_im[i][j] != -r_im[j][i]) begin
            failures++;
            $display("not Hermitian at %0d,%0d", i, j);
          end
        end
      out_ready = 1; @(posedge clk); #1; out_ready = 0;
      checks++;
      if (out_valid) begin failures++; $display("out_valid not cleared"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
