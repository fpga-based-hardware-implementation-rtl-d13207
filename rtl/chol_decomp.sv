// chol_decomp - pipeline stage 2 (method 2): Cholesky decomposition of the covariance matrix.
//
// Factors the Hermitian matrix Rxx = L L^H (L lower triangular with a real
// positive diagonal) and returns the signal-subspace block Ls = L(:, 1:2),
// the M x 2 matrix the later stages use. Only the first two columns are
// formed because only they are used:
//   l11 = sqrt(r11),               l_i1 = r_i1 / l11
//   l22 = sqrt(r22 - |l21|^2),     l_i2 = (r_i2 - l_i1 conj(l21)) / l22
// (1-based indices as in the method's equations). Each column runs a square
// root, then divides its M-1 (then M-2) complex entries in parallel by the
// real diagonal with a bank of 2(M-1) sequential dividers. Every
// intermediate is rounded and saturated to the WL/IWL fixed-point format. A
// radicand that quantisation makes zero or negative is replaced by one LSB.
// Interface: in_valid/in_ready take the matrix (only its lower triangle is
// read); out_valid holds Ls until out_ready. The entries fixed by the
// structure (the zero above the diagonal, the zero imaginary part of the
// real diagonal) are constants; they keep Ls in its full M x 2 shape.
// Timing: out_valid rises 2*(WL+1) + 2*((WL+FRAC)/2+1) + 9 cycles after the
// accepting edge (69 for 16/8): per column one square root of WL+FRAC bits,
// then one division, the two columns one after the other.
// The equations follow the method; the column schedule,
// square-root unit and divider bank are this implementation's choices.
module chol_decomp #(
  parameter int M   = 4,
  parameter int WL  = 16,
  parameter int IWL = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [WL-1:0] r_re [M][M],
  input  logic signed [WL-1:0] r_im [M][M],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [WL-1:0] ls_re [M][doa_pkg::NSRC],
  output logic signed [WL-1:0] ls_im [M][doa_pkg::NSRC]
);
  import doa_pkg::*;

  localparam int FRAC = WL - IWL;
  localparam int ND   = 2 * (M - 1);
  localparam int SIW  = ((WL + FRAC + 1) / 2) * 2;   // even radicand width

  typedef enum logic [3:0] {IDLE, SQ0, SWAIT0, COL0, WAIT0, UPD1, SQ1, SWAIT1, COL1, WAIT1, DONE} state_e;
  state_e state;

  logic signed [WL-1:0] c_re [M][2];
  logic signed [WL-1:0] c_im [M][2];
  logic signed [WL-1:0] s0, s1;        // radicands of the two diagonal entries
  logic signed [WL-1:0] l00, l11;      // diagonal entries
  logic signed [WL-1:0] l0_re [M];
  logic signed [WL-1:0] l0_im [M];
  logic signed [WL-1:0] l1_re [M];
  logic signed [WL-1:0] l1_im [M];
  logic signed [WL-1:0] n_re [M];
  logic signed [WL-1:0] n_im [M];

  // Square-root unit: sqrt(s) with FRAC fraction bits from s * 2^FRAC.
  logic            sq_start, sq_busy, sq_done;
  logic [SIW-1:0]  sq_x;
  logic [SIW/2-1:0] sq_root;
  assign sq_start = (state == SQ0) || (state == SQ1);
  assign sq_x     = SIW'($unsigned((state == SQ1) ? s1 : s0)) << FRAC;

  fx_sqrt #(.IW(SIW)) u_sqrt (
    .clk, .rst_n, .start(sq_start), .x(sq_x),
    .busy(sq_busy), .done(sq_done), .root(sq_root));

  logic                 div_start;
  logic signed [WL-1:0] div_num [ND];
  logic        [WL-1:0] div_den;
  logic                 div_done [ND];
  logic                 div_busy [ND];
  logic signed [WL-1:0] div_quo [ND];

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign div_start = (state == COL0) || (state == COL1);

  always_comb begin
    div_den = (state == COL1) ? l11 : l00;
    for (int k = 0; k < M - 1; k++) begin
      div_num[2*k]   = (state == COL1) ? n_re[k+1] : c_re[k+1][0];
      div_num[2*k+1] = (state == COL1) ? n_im[k+1] : c_im[k+1][0];
    end
  end

  for (genvar g = 0; g < ND; g++) begin : g_div
    fx_div #(.NW(WL), .QW(WL), .FRAC(FRAC)) u_div (
      .clk, .rst_n, .start(div_start), .num(div_num[g]), .den(div_den),
      .busy(div_busy[g]), .done(div_done[g]), .quo(div_quo[g]));
  end

  // Column-1 radicand and numerators.
  acc_t t_abs;
  acc_t t_pre [M];
  acc_t t_pim [M];
  logic signed [WL-1:0] s1_next;
  logic signed [WL-1:0] n_re_next [M];
  logic signed [WL-1:0] n_im_next [M];
  always_comb begin
    t_abs   = sat(rnd(acc_t'(l0_re[1]) * l0_re[1] + acc_t'(l0_im[1]) * l0_im[1], FRAC), WL);
    s1_next = WL'(sat(acc_t'(c_re[1][1]) - t_abs, WL));
    if (s1_next <= 0) s1_next = WL'(1);
    for (int i = 0; i < M; i++) begin
      t_pre[i] = sat(rnd(acc_t'(l0_re[i]) * l0_re[1] + acc_t'(l0_im[i]) * l0_im[1], FRAC), WL);
      t_pim[i] = sat(rnd(acc_t'(l0_im[i]) * l0_re[1] - acc_t'(l0_re[i]) * l0_im[1], FRAC), WL);
      n_re_next[i] = WL'(sat(acc_t'(c_re[i][1]) - t_pre[i], WL));
      n_im_next[i] = WL'(sat(acc_t'(c_im[i][1]) - t_pim[i], WL));
    end
  end

  // Root of a positive WL-bit number stays below 2^(IWL/2+1): it always fits.
  logic signed [WL-1:0] root_q;
  assign root_q = (sq_root == 0) ? WL'(1) : WL'(sq_root);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      s0 <= '0; s1 <= '0; l00 <= '0; l11 <= '0;
      for (int i = 0; i < M; i++) begin
        c_re[i][0] <= '0; c_re[i][1] <= '0; c_im[i][0] <= '0; c_im[i][1] <= '0;
        l0_re[i] <= '0; l0_im[i] <= '0; l1_re[i] <= '0; l1_im[i] <= '0;
        n_re[i] <= '0; n_im[i] <= '0;
      end
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          for (int i = 0; i < M; i++) begin
            c_re[i][0] <= r_re[i][0]; c_im[i][0] <= r_im[i][0];
            c_re[i][1] <= r_re[i][1]; c_im[i][1] <= r_im[i][1];
          end
          s0    <= (r_re[0][0] > 0) ? r_re[0][0] : WL'(1);
          state <= SQ0;
        end
        SQ0:    state <= SWAIT0;
        SWAIT0: if (sq_done) begin
          l00   <= root_q;
          state <= COL0;
        end
        COL0:   state <= WAIT0;
        WAIT0:  if (div_done[0]) begin
          l0_re[0] <= l00; l0_im[0] <= '0;
          for (int k = 0; k < M - 1; k++) begin
            l0_re[k+1] <= div_quo[2*k];
            l0_im[k+1] <= div_quo[2*k+1];
          end
          state <= UPD1;
        end
        UPD1: begin
          s1 <= s1_next;
          for (int i = 0; i < M; i++) begin
            n_re[i] <= n_re_next[i];
            n_im[i] <= n_im_next[i];
          end
          state <= SQ1;
        end
        SQ1:    state <= SWAIT1;
        SWAIT1: if (sq_done) begin
          l11   <= root_q;
          state <= COL1;
        end
        COL1:   state <= WAIT1;
        WAIT1:  if (div_done[0]) begin
          l1_re[0] <= '0;  l1_im[0] <= '0;
          l1_re[1] <= l11; l1_im[1] <= '0;
          for (int k = 1; k < M - 1; k++) begin
            l1_re[k+1] <= div_quo[2*k];
            l1_im[k+1] <= div_quo[2*k+1];
          end
          state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      ls_re[i][0] = l0_re[i]; ls_im[i][0] = l0_im[i];
      ls_re[i][1] = l1_re[i]; ls_im[i][1] = l1_im[i];
    end
  end

  a_div_sync: assert property (@(posedge clk) disable iff (!rst_n)
                               div_done[0] |-> !div_busy[ND-1]);
  a_sq_order: assert property (@(posedge clk) disable iff (!rst_n)
                               div_start |-> !sq_busy);
endmodule
