// eig2x2 - pipeline stage 4: eigenvalues of the 2x2 complex matrix Lambda.
//
// The eigenvalues of Lambda = [a b; c d] are the roots of
// det(Lambda - g I) = 0, i.e. g = m +/- s with m = (a + d)/2 and
// s = sqrt(((a - d)/2)^2 + b c). The discriminant is formed at full
// precision and rounded to WL bits plus ZG = 4 guard bits below the LSB
// (close eigenvalues make it small); its complex square root is taken as
//   |z| = sqrt(x^2 + y^2),  Re s = sqrt((|z| + x)/2),
//   Im s = sign(y) sqrt((|z| - x)/2)
// with one square-root unit for |z| and two more, in parallel, for the real
// and imaginary parts. With two_src = 0 Lambda is a scalar and the single
// eigenvalue is a itself (gam(2) is then zero).
// Interface: in_valid/in_ready take Lambda and the source count; out_valid
// holds the eigenvalues until out_ready.
// Timing: out_valid rises (WL+FRAC)/2 + 2*ZG + WL + 10 cycles after the
// accepting edge (46 for 16/8). The method only asks for the eigenvalues of Lambda
// (det(A - gI) = 0); the closed-form 2x2 solution is this implementation's.
module eig2x2 #(
  parameter int WL  = 16,
  parameter int IWL = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 two_src,
  input  logic signed [WL-1:0] lam_re [doa_pkg::NSRC][doa_pkg::NSRC],
  input  logic signed [WL-1:0] lam_im [doa_pkg::NSRC][doa_pkg::NSRC],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [WL-1:0] gam_re [doa_pkg::NSRC],
  output logic signed [WL-1:0] gam_im [doa_pkg::NSRC]
);
  import doa_pkg::*;

  localparam int FRAC = WL - IWL;
  localparam int ZG   = 4;                                // guard bits on the discriminant
  localparam int ZW   = WL + ZG;                          // discriminant width
  localparam int ZF   = FRAC + ZG;                        // discriminant fraction bits
  localparam int IW1  = 2 * ZW + 2;                       // |z|^2 radicand width
  localparam int IW2  = ((ZW + ZF + 2 + 1) / 2) * 2;      // (|z| +/- x)/2 radicand width

  typedef enum logic [2:0] {IDLE, DISC, SQA, WAITA, SQB, WAITB, FIN, DONE} state_e;
  state_e state;

  logic                 two_r;
  logic signed [WL-1:0] a_re, a_im, b_re, b_im, c_re, c_im, d_re, d_im;
  logic signed [WL-1:0] m_re, m_im;
  logic signed [ZW-1:0] z_re, z_im;
  logic        [ZW:0]   mag;

  // m = (a + d)/2 and z = ((a - d)/2)^2 + b c = ((a - d)^2 + 4 b c) / 4.
  acc_t e_re, e_im, t_re, t_im;
  always_comb begin
    e_re = acc_t'(a_re) - acc_t'(d_re);
    e_im = acc_t'(a_im) - acc_t'(d_im);
    t_re = e_re * e_re - e_im * e_im + 4 * (acc_t'(b_re) * c_re - acc_t'(b_im) * c_im);
    t_im = 2 * e_re * e_im + 4 * (acc_t'(b_re) * c_im + acc_t'(b_im) * c_re);
  end

  logic               sa_start, sa_busy, sa_done;
  logic [IW1-1:0]     sa_x;
  logic [IW1/2-1:0]   sa_root;
  assign sa_start = (state == SQA);
  assign sa_x     = IW1'($unsigned(acc_t'(z_re) * z_re + acc_t'(z_im) * z_im));
  fx_sqrt #(.IW(IW1)) u_sq_mag (
    .clk, .rst_n, .start(sa_start), .x(sa_x), .busy(sa_busy), .done(sa_done), .root(sa_root));

  // (|z| + x)/2 and (|z| - x)/2 with 2*FRAC fraction bits, clamped at zero.
  acc_t rp, rq;
  always_comb begin
    rp = (acc_t'(mag) + acc_t'(z_re)) <<< (ZF - 1);
    rq = (acc_t'(mag) - acc_t'(z_re)) <<< (ZF - 1);
    if (rp < 0) rp = '0;
    if (rq < 0) rq = '0;
  end

  logic               sb_start, sr_busy, sr_done, si_busy, si_done;
  logic [IW2/2-1:0]   sr_root, si_root;
  assign sb_start = (state == SQB);
  fx_sqrt #(.IW(IW2)) u_sq_re (
    .clk, .rst_n, .start(sb_start), .x(IW2'($unsigned(rp))), .busy(sr_busy), .done(sr_done), .root(sr_root));
  fx_sqrt #(.IW(IW2)) u_sq_im (
    .clk, .rst_n, .start(sb_start), .x(IW2'($unsigned(rq))), .busy(si_busy), .done(si_done), .root(si_root));

  acc_t s_re, s_im;
  always_comb begin
    s_re = rnd(acc_t'(sr_root), ZG);
    s_im = (z_im < 0) ? -rnd(acc_t'(si_root), ZG) : rnd(acc_t'(si_root), ZG);
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; two_r <= 1'b0;
      a_re <= '0; a_im <= '0; b_re <= '0; b_im <= '0;
      c_re <= '0; c_im <= '0; d_re <= '0; d_im <= '0;
      m_re <= '0; m_im <= '0; z_re <= '0; z_im <= '0; mag <= '0;
      for (int k = 0; k < 2; k++) begin
        gam_re[k] <= '0; gam_im[k] <= '0;
      end
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          two_r <= two_src;
          a_re <= lam_re[0][0]; a_im <= lam_im[0][0];
          b_re <= lam_re[0][1]; b_im <= lam_im[0][1];
          c_re <= lam_re[1][0]; c_im <= lam_im[1][0];
          d_re <= lam_re[1][1]; d_im <= lam_im[1][1];
          state <= DISC;
        end
        DISC: begin
          m_re  <= WL'(sat(rnd(acc_t'(a_re) + acc_t'(d_re), 1), WL));
          m_im  <= WL'(sat(rnd(acc_t'(a_im) + acc_t'(d_im), 1), WL));
          z_re  <= ZW'(sat(rnd(t_re, FRAC + 2 - ZG), ZW));
          z_im  <= ZW'(sat(rnd(t_im, FRAC + 2 - ZG), ZW));
          state <= SQA;
        end
        SQA:   state <= WAITA;
        WAITA: if (sa_done) begin
          mag   <= (ZW+1)'(sa_root);
          state <= SQB;
        end
        SQB:   state <= WAITB;
        WAITB: if (sr_done) state <= FIN;
        FIN: begin
          if (two_r) begin
            gam_re[0] <= WL'(sat(acc_t'(m_re) + s_re, WL));
            gam_im[0] <= WL'(sat(acc_t'(m_im) + s_im, WL));
            gam_re[1] <= WL'(sat(acc_t'(m_re) - s_re, WL));
            gam_im[1] <= WL'(sat(acc_t'(m_im) - s_im, WL));
          end else begin
            gam_re[0] <= a_re; gam_im[0] <= a_im;
            gam_re[1] <= '0;   gam_im[1] <= '0;
          end
          state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_sq_sync: assert property (@(posedge clk) disable iff (!rst_n) sr_done |-> si_done);
endmodule
