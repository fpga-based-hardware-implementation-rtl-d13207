// tb_doa_configs - the pipeline in the other configurations evaluated for it.
//
// The word-length comparison: two sources at 105 and 150 degrees, SNR 10 dB,
// 100 snapshots per estimate, through the 4-element pipeline built with
// 12/6, 16/8 and 20/10 fixed point. Beside it, the 8-element array with two
// sources at 70 and 120 degrees, and a single source at 20 degrees estimated
// from 500 snapshots. Every estimate must lie within the configuration's
// tolerance of the true directions; the mean absolute error of each
// configuration is printed for comparison. The 8-element pipeline and the
// 500-snapshot one must take the same number of cycles from the last
// snapshot to the estimate as the 4-element, 100-snapshot one. All runs share one clock and
// reset and proceed in parallel.
module tb_doa_configs;
  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  int  c [5];
  int  f [5];
  real e [5];
  logic fin [5];

  tb_doa_run #(.M(4), .WL(12), .IWL(6), .TOL_DEG(6.0)) r12 (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .mean_err(e[0]), .finished(fin[0]));
  tb_doa_run #(.M(4), .WL(16), .IWL(8), .TOL_DEG(3.0)) r16 (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .mean_err(e[1]), .finished(fin[1]));
  tb_doa_run #(.M(4), .WL(20), .IWL(10), .TOL_DEG(3.0)) r20 (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .mean_err(e[2]), .finished(fin[2]));
  tb_doa_run #(.M(8), .WL(16), .IWL(8), .TH0(70.0), .TH1(120.0), .TOL_DEG(2.0)) r8 (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .mean_err(e[3]), .finished(fin[3]));
  tb_doa_run #(.M(4), .WL(16), .IWL(8), .TH0(20.0), .NSNAP(500), .ONE_SRC(1'b1), .NF(4), .TOL_DEG(2.0)) r500 (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .mean_err(e[4]), .finished(fin[4]));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    $display("mean abs error: M=4 12/6 %.3f deg, M=4 16/8 %.3f deg, M=4 20/10 %.3f deg, M=8 16/8 %.3f deg, N=500 %.3f deg",
             e[0], e[1], e[2], e[3], e[4]);
    $display("frame-0 latency (cycles): M=4 12/6 %0d, 16/8 %0d, 20/10 %0d, M=8 16/8 %0d, N=500 %0d",
             r12.latency0, r16.latency0, r20.latency0, r8.latency0, r500.latency0);
    // the array size must not change the cycle count, nor the snapshot count
    // the time from the last snapshot to the estimate
    checks += 2;
    if (r8.latency0 != r16.latency0) begin
      failures++;
      $display("8-element latency differs from 4-element latency");
    end
    if (r500.latency0 != r16.latency0) begin
      failures++;
      $display("500-snapshot latency differs from 100-snapshot latency");
    end
    for (int i = 0; i < 5; i++) begin
      checks += c[i];
      failures += f[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
