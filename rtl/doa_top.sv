// doa_top - five-stage DOA estimation pipeline for a uniform linear array.
//
// Estimates the directions of arrival of up to two far-field narrowband
// sources from snapshots of an M-element half-wavelength ULA:
//   queue   snapshot_fifo  buffers snapshots from the host link
//   stage 1 cov_matrix     Rxx = (1/N) sum x x^H over NSNAP snapshots
//   stage 2 ldl_decomp or chol_decomp   first two columns Ls of L
//   stage 3 ls_solve       Lambda = (Ls1^H Ls1)^-1 Ls1^H Ls2
//   stage 4 eig2x2         eigenvalues of Lambda
//   stage 5 doa_angle      theta_k = acos(-arg(g_k)/pi)
// Each stage takes one frame on a valid/ready handshake, computes, and holds
// its result until the next stage takes it, so up to five frames are in
// flight and a slow stage stalls the ones before it. use_chol selects the
// decomposition (0: LDL, method 1; 1: Cholesky, method 2) and two_src the
// number of sources (0: one, 1: two); both are sampled when a covariance
// matrix enters stage 2 and travel with that frame as a tag, so every result
// reports the method that produced it (doa_chol). Stage 2 takes a new matrix
// only when both decomposers are idle, which keeps frames in order.
// Outputs: theta (degrees, unsigned, ANG_FRAC fraction bits) with src_valid
// per source, offered on doa_valid/doa_ready.
// The stage structure, the two decompositions and the fixed-point data size
// (16-bit words, 8 integer bits) follow the method; the handshakes, the tag
// and the queue depth are this implementation's choices.
module doa_top #(
  parameter int M          = 4,     // array elements
  parameter int WL         = 16,    // word length
  parameter int IWL        = 8,     // integer length
  parameter int NSNAP      = 100,   // snapshots per estimate
  parameter int FIFO_DEPTH = 128,   // snapshot queue entries
  parameter int ANG_FRAC   = 7      // output angle fraction bits
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // snapshot stream from the host
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic signed [WL-1:0] s_re [M],
  input  logic signed [WL-1:0] s_im [M],
  // mode
  input  logic                 use_chol,
  input  logic                 two_src,
  // estimates
  output logic                 doa_valid,
  input  logic                 doa_ready,
  output logic [15:0]          theta [doa_pkg::NSRC],
  output logic [doa_pkg::NSRC-1:0] src_valid,
  output logic                 doa_chol
);
  import doa_pkg::*;

  localparam int K = NSRC;

  // queue -> stage 1
  logic                 q_valid, q_ready, q_full;
  logic signed [WL-1:0] q_re [M];
  logic signed [WL-1:0] q_im [M];

  snapshot_fifo #(.M(M), .WL(WL), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid(s_valid), .in_ready(s_ready), .in_re(s_re), .in_im(s_im),
    .out_valid(q_valid), .out_ready(q_ready), .out_re(q_re), .out_im(q_im),
    .full(q_full));

  // stage 1
  logic                 r_valid, r_ready;
  logic signed [WL-1:0] r_re [M][M];
  logic signed [WL-1:0] r_im [M][M];

  cov_matrix #(.M(M), .WL(WL), .IWL(IWL), .NSNAP(NSNAP)) u_cov (
    .clk, .rst_n,
    .s_valid(q_valid), .s_ready(q_ready), .x_re(q_re), .x_im(q_im),
    .out_valid(r_valid), .out_ready(r_ready), .r_re, .r_im);

  // stage 2: both decompositions, one used per frame
  frame_tag_t tag2, tag3, tag4, tag5;
  logic ldl_in_ready, chol_in_ready, ldl_out_valid, chol_out_valid;
  logic signed [WL-1:0] ldl_re [M][K];
  logic signed [WL-1:0] ldl_im [M][K];
  logic signed [WL-1:0] ldl_d [K];
  logic signed [WL-1:0] chol_re [M][K];
  logic signed [WL-1:0] chol_im [M][K];
  logic                 l_valid, l_ready;
  logic signed [WL-1:0] l_re [M][K];
  logic signed [WL-1:0] l_im [M][K];

  assign r_ready = ldl_in_ready && chol_in_ready;

  ldl_decomp #(.M(M), .WL(WL), .IWL(IWL)) u_ldl (
    .clk, .rst_n,
    .in_valid(r_valid && r_ready && !use_chol), .in_ready(ldl_in_ready),
    .r_re, .r_im,
    .out_valid(ldl_out_valid), .out_ready(l_ready && tag2.method == METH_LDL),
    .ls_re(ldl_re), .ls_im(ldl_im), .d_diag(ldl_d));

  chol_decomp #(.M(M), .WL(WL), .IWL(IWL)) u_chol (
    .clk, .rst_n,
    .in_valid(r_valid && r_ready && use_chol), .in_ready(chol_in_ready),
    .r_re, .r_im,
    .out_valid(chol_out_valid), .out_ready(l_ready && tag2.method == METH_CHOL),
    .ls_re(chol_re), .ls_im(chol_im));

  always_comb begin
    l_valid = (tag2.method == METH_CHOL) ? chol_out_valid : ldl_out_valid;
    l_re    = (tag2.method == METH_CHOL) ? chol_re : ldl_re;
    l_im    = (tag2.method == METH_CHOL) ? chol_im : ldl_im;
  end

  // stage 3
  logic                 lam_valid, lam_ready;
  logic signed [WL-1:0] lam_re [K][K];
  logic signed [WL-1:0] lam_im [K][K];

  ls_solve #(.M(M), .WL(WL), .IWL(IWL)) u_ls (
    .clk, .rst_n,
    .in_valid(l_valid), .in_ready(l_ready), .two_src(tag2.two_src),
    .ls_re(l_re), .ls_im(l_im),
    .out_valid(lam_valid), .out_ready(lam_ready), .lam_re, .lam_im);

  // stage 4
  logic                 g_valid, g_ready;
  logic signed [WL-1:0] gam_re [K];
  logic signed [WL-1:0] gam_im [K];

  eig2x2 #(.WL(WL), .IWL(IWL)) u_eig (
    .clk, .rst_n,
    .in_valid(lam_valid), .in_ready(lam_ready), .two_src(tag3.two_src),
    .lam_re, .lam_im,
    .out_valid(g_valid), .out_ready(g_ready), .gam_re, .gam_im);

  // stage 5
  doa_angle #(.WL(WL), .IWL(IWL), .ANG_W(16), .ANG_FRAC(ANG_FRAC)) u_ang (
    .clk, .rst_n,
    .in_valid(g_valid), .in_ready(g_ready), .two_src(tag4.two_src),
    .gam_re, .gam_im,
    .out_valid(doa_valid), .out_ready(doa_ready), .theta, .src_valid);

  assign doa_chol = (tag5.method == METH_CHOL);

  // Frame tags follow the frames from stage to stage.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag2 <= '0; tag3 <= '0; tag4 <= '0; tag5 <= '0;
    end else begin
      if (r_valid && r_ready)     tag2 <= '{method: use_chol ? METH_CHOL : METH_LDL, two_src: two_src};
      if (l_valid && l_ready)     tag3 <= tag2;
      if (lam_valid && lam_ready) tag4 <= tag3;
      if (g_valid && g_ready)     tag5 <= tag4;
    end
  end

  // Stage 2 holds at most one frame.
  a_one_decomp: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(ldl_out_valid && chol_out_valid));
endmodule
