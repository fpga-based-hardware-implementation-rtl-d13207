// tb_doa_top - end-to-end test of the DOA pipeline at its default parameters
// (4-element ULA, 100 snapshots per estimate, 16/8 fixed point).
//
// Snapshots of one or two far-field sources plus noise (SNR 20 dB per
// source) are generated from the ULA model and streamed in. Each frame's
// method (LDL or Cholesky) and source count are applied when its covariance
// matrix enters stage 2. Every estimate must lie within TOL_DEG of the true
// directions (matched as an unordered pair) and report the right method.
// Phase A sends isolated frames and checks the end-to-end latency from the
// last snapshot to the estimate. Phase B streams frames back to back while
// the estimate consumer holds each result for up to 1500 cycles, so that back-pressure reaches every
// stage and the snapshot queue; the test counts each mechanism (both methods,
// both source counts, method switches between frames, stage stalls, queue
// full, output held) and fails if any never happened.
module tb_doa_top;
  import tb_doa_pkg::*;

  localparam int M = 4, WL = 16, FRAC = 8, NSNAP = 100, K = 2, ANG_FRAC = 7;
  localparam int NA = 4, NF = 16;          // phase-A frames, all frames
  localparam real TOL_DEG = 2.5;
  localparam real SIGMA = 0.1;             // noise rms per element (SNR 20 dB)
  // Latency from the last snapshot of a frame to its estimate on an idle
  // pipeline: stage 1 (3) + stage 2 + stage 3 (WL+5) + stage 4 (46) +
  // stage 5 (57) + one cycle per hand-over between the five stages.
  localparam int LAT_LDL  = 3 + (2 * (WL + 1) + 5) + (WL + 5) + 46 + 57 + 4;
  localparam int LAT_CHOL = 3 + (2 * (WL + 1) + 2 * ((WL + FRAC) / 2 + 1) + 9) + (WL + 5) + 46 + 57 + 4;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic s_valid, s_ready, use_chol, two_src, doa_valid, doa_ready, doa_chol;
  logic signed [WL-1:0] s_re [M];
  logic signed [WL-1:0] s_im [M];
  logic [15:0] theta [K];
  logic [K-1:0] src_valid;

  doa_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Frame descriptors.
  real th0 [NF];
  real th1 [NF];
  bit  chol [NF];
  bit  two [NF];

  initial begin
    real pairs [6][2] = '{'{55.0, 130.0}, '{70.0, 110.0}, '{90.0, 120.0},
                          '{100.0, 135.0}, '{105.0, 150.0}, '{60.0, 125.0}};
    for (int f = 0; f < NF; f++) begin
      th0[f]  = pairs[f % 6][0];
      th1[f]  = pairs[f % 6][1];
      chol[f] = (f < NA) ? bit'(f % 2) : bit'((f / 2) % 2);
      two[f]  = (f < NA) ? (f < 2) : (f % 5 != 1);
      if (!two[f]) th0[f] = (f % 2) ? 20.0 : 55.0;
    end
  end

  // Mode for the frame that next enters stage 2.
  int n_in2 = 0;
  always @(posedge clk) if (dut.r_valid && dut.r_ready) n_in2 <= n_in2 + 1;
  assign use_chol = chol[(n_in2 < NF) ? n_in2 : NF - 1];
  assign two_src  = two[(n_in2 < NF) ? n_in2 : NF - 1];

  // End of each frame's snapshots at the covariance stage.
  int n_snap = 0;
  int t_end [NF];
  always @(posedge clk) if (dut.q_valid && dut.q_ready) begin
    if ((n_snap + 1) % NSNAP == 0 && (n_snap + 1) / NSNAP <= NF) t_end[(n_snap + 1) / NSNAP - 1] <= cyc + 1;
    n_snap <= n_snap + 1;
  end

  // Mechanism counters.
  int n_ldl = 0, n_chol = 0, n_one = 0, n_two = 0, n_switch = 0;
  int n_stall = 0, n_qfull = 0, n_hold = 0;
  logic prev_chol = 0;
  always @(posedge clk) if (rst_n) begin
    if ((dut.r_valid && !dut.r_ready) || (dut.l_valid && !dut.l_ready) ||
        (dut.lam_valid && !dut.lam_ready) || (dut.g_valid && !dut.g_ready)) n_stall <= n_stall + 1;
    if (s_valid && !s_ready) n_qfull <= n_qfull + 1;
    if (doa_valid && !doa_ready) n_hold <= n_hold + 1;
    if (dut.r_valid && dut.r_ready) begin
      if (n_in2 > 0 && use_chol != prev_chol) n_switch <= n_switch + 1;
      prev_chol <= use_chol;
    end
  end

  // Snapshot source.
  bit phase_b = 0;
  int sent_frames = 0;
  initial begin
    real th[2], ph[2];
    cplx_t x;
    s_valid = 0;
    for (int i = 0; i < M; i++) begin s_re[i] = '0; s_im[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int f = 0; f < NF; f++) begin
      if (f == NA) phase_b = 1;
      th[0] = th0[f]; th[1] = th1[f];
      for (int t = 0; t < NSNAP; t++) begin
        ph[0] = PI * urand(); ph[1] = PI * urand();
        for (int m = 0; m < M; m++) begin
          x = ula_sample(m, two[f] ? 2 : 1, th, ph, SIGMA);
          s_re[m] = WL'(to_fx(x.re, FRAC, WL));
          s_im[m] = WL'(to_fx(x.im, FRAC, WL));
        end
        s_valid = 1;
        while (!s_ready) begin @(posedge clk); #1; end
        @(posedge clk); #1;
      end
      s_valid = 0;
      sent_frames++;
      // phase A: wait until the frame has left the pipeline
      if (!phase_b) wait (n_got == f + 1);
      @(posedge clk); #1;
    end
  end

  // Estimate sink.
  int n_got = 0;
  initial begin
    doa_ready = 1;
    wait (rst_n);
    while (n_got < NF) begin
      @(posedge clk); #1;
      // phase B: hold each estimate back for a random time
      if (phase_b && doa_valid) begin
        doa_ready = 0;
        repeat ($urandom_range(0, 1500)) begin @(posedge clk); #1; end
        doa_ready = 1;
      end
      if (doa_valid && doa_ready) begin
        int f;
        real a0, a1;
        f  = n_got;
        a0 = real'(theta[0]) / (2.0 ** ANG_FRAC);
        a1 = real'(theta[1]) / (2.0 ** ANG_FRAC);
        $display("frame %2d %s %0d src: est %7.2f %7.2f  true %7.2f %7.2f", f,
                 doa_chol ? "CHOL" : "LDL ", two[f] ? 2 : 1, a0, two[f] ? a1 : 0.0,
                 th0[f], two[f] ? th1[f] : 0.0);
        checks++;
        if (doa_chol != chol[f]) begin failures++; $display("  wrong method tag"); end
        checks++;
        if (src_valid != {two[f], 1'b1}) begin failures++; $display("  wrong src_valid"); end
        checks++;
        if (two[f]) begin
          if (!((abs_r(a0 - th0[f]) < TOL_DEG && abs_r(a1 - th1[f]) < TOL_DEG) ||
                (abs_r(a1 - th0[f]) < TOL_DEG && abs_r(a0 - th1[f]) < TOL_DEG))) begin
            failures++; $display("  estimate outside %.1f deg", TOL_DEG);
          end
        end else if (abs_r(a0 - th0[f]) >= TOL_DEG) begin
          failures++; $display("  estimate outside %.1f deg", TOL_DEG);
        end
        if (!phase_b) begin
          int lat;
          lat = cyc - t_end[f];
          $display("  latency %0d cycles (expected %0d)", lat, chol[f] ? LAT_CHOL : LAT_LDL);
          checks++;
          if (lat != (chol[f] ? LAT_CHOL : LAT_LDL)) begin failures++; $display("  wrong latency"); end
        end
        if (chol[f]) n_chol++; else n_ldl++;
        if (two[f]) n_two++; else n_one++;
        n_got++;
      end
    end
    $display("mechanisms: LDL %0d, Cholesky %0d, one-source %0d, two-source %0d, method switches %0d,",
             n_ldl, n_chol, n_one, n_two, n_switch);
    $display("            stage stall cycles %0d, queue-full cycles %0d, output-held cycles %0d",
             n_stall, n_qfull, n_hold);
    check_seen("LDL frames", n_ldl);
    check_seen("Cholesky frames", n_chol);
    check_seen("one-source frames", n_one);
    check_seen("two-source frames", n_two);
    check_seen("method switches", n_switch);
    check_seen("stage stalls", n_stall);
    check_seen("queue full", n_qfull);
    check_seen("output held", n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real abs_r(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check_seen(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask
endmodule
