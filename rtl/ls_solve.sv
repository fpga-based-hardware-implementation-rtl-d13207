// ls_solve - pipeline stage 3: least-squares solution for the rotation matrix Lambda.
//
// Ls (M x 2) is split into Ls1 = Ls(1:M-1, :) and Ls2 = Ls(2:M, :), two
// shifted copies of the same signal subspace related by Ls2 = Ls1 * Lambda.
// The least-squares solution Lambda = (Ls1^H Ls1)^-1 Ls1^H Ls2 is formed in
// three steps: the Gram matrix G = Ls1^H Ls1 and the cross matrix
// H = Ls1^H Ls2 (sums over M-1 rows, rounded to WL bits plus GB = 4 guard
// bits below the LSB, since G is often ill-conditioned); then
// P = adj(G) * H and det(G) at full precision; then Lambda = P / det(G) with
// eight parallel sequential dividers (real and imaginary parts of the four
// entries). When two_src is 0 only the first column of Ls is used and
// Lambda reduces to the scalar h11 / g11, returned in lam(1,1) with the other
// entries zero. A non-positive determinant is replaced by one LSB.
// Interface: in_valid/in_ready take Ls and the source count; out_valid holds
// Lambda until out_ready.
// Timing: out_valid rises WL+5 cycles after the accepting edge (21 for
// WL = 16). The LS formula follows the method; the explicit 2x2 adjugate
// inverse and the divider bank are this implementation's choices.
module ls_solve #(
  parameter int M   = 4,
  parameter int WL  = 16,
  parameter int IWL = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 two_src,
  input  logic signed [WL-1:0] ls_re [M][doa_pkg::NSRC],
  input  logic signed [WL-1:0] ls_im [M][doa_pkg::NSRC],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [WL-1:0] lam_re [doa_pkg::NSRC][doa_pkg::NSRC],
  output logic signed [WL-1:0] lam_im [doa_pkg::NSRC][doa_pkg::NSRC]
);
  import doa_pkg::*;

  localparam int FRAC = WL - IWL;
  localparam int GB   = 4;            // guard bits kept on G and H
  localparam int GW   = WL + GB;      // width of G and H entries
  localparam int GF   = FRAC + GB;    // fraction bits of G and H
  localparam int PW   = 2 * GW + 4;   // width of det(G) and adj(G)*H

  typedef enum logic [2:0] {IDLE, GRAM, ADJ, DIV, WAIT, DONE} state_e;
  state_e state;

  logic                 two_r;
  logic signed [WL-1:0] l_re [M][2];
  logic signed [WL-1:0] l_im [M][2];
  logic signed [GW-1:0] g00, g11, g01_re, g01_im;
  logic signed [GW-1:0] h_re [2][2];
  logic signed [GW-1:0] h_im [2][2];
  logic signed [PW-1:0] det;
  logic signed [PW-1:0] p_re [2][2];
  logic signed [PW-1:0] p_im [2][2];

  // Gram and cross matrices (conj(a) * b summed over the M-1 row pairs).
  acc_t sg00, sg11, sg01r, sg01i;
  acc_t shr [2][2];
  acc_t shi [2][2];
  always_comb begin
    sg00 = '0; sg11 = '0; sg01r = '0; sg01i = '0;
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++) begin
        shr[p][q] = '0; shi[p][q] = '0;
      end
    for (int i = 0; i < M - 1; i++) begin
      sg00  += acc_t'(l_re[i][0]) * l_re[i][0] + acc_t'(l_im[i][0]) * l_im[i][0];
      sg11  += acc_t'(l_re[i][1]) * l_re[i][1] + acc_t'(l_im[i][1]) * l_im[i][1];
      sg01r += acc_t'(l_re[i][0]) * l_re[i][1] + acc_t'(l_im[i][0]) * l_im[i][1];
      sg01i += acc_t'(l_re[i][0]) * l_im[i][1] - acc_t'(l_im[i][0]) * l_re[i][1];
      for (int p = 0; p < 2; p++)
        for (int q = 0; q < 2; q++) begin
          shr[p][q] += acc_t'(l_re[i][p]) * l_re[i+1][q] + acc_t'(l_im[i][p]) * l_im[i+1][q];
          shi[p][q] += acc_t'(l_re[i][p]) * l_im[i+1][q] - acc_t'(l_im[i][p]) * l_re[i+1][q];
        end
    end
  end

  // det(G) and adj(G) * H, adj(G) = [g11, -g01; -conj(g01), g00].
  acc_t a_det;
  acc_t a_pr [2][2];
  acc_t a_pi [2][2];
  always_comb begin
    a_det = acc_t'(g00) * g11 - acc_t'(g01_re) * g01_re - acc_t'(g01_im) * g01_im;
    for (int q = 0; q < 2; q++) begin
      // row 0: g11 * h0q - g01 * h1q
      a_pr[0][q] = acc_t'(g11) * h_re[0][q]
                 - (acc_t'(g01_re) * h_re[1][q] - acc_t'(g01_im) * h_im[1][q]);
      a_pi[0][q] = acc_t'(g11) * h_im[0][q]
                 - (acc_t'(g01_re) * h_im[1][q] + acc_t'(g01_im) * h_re[1][q]);
      // row 1: -conj(g01) * h0q + g00 * h1q
      a_pr[1][q] = acc_t'(g00) * h_re[1][q]
                 - (acc_t'(g01_re) * h_re[0][q] + acc_t'(g01_im) * h_im[0][q]);
      a_pi[1][q] = acc_t'(g00) * h_im[1][q]
                 - (acc_t'(g01_re) * h_im[0][q] - acc_t'(g01_im) * h_re[0][q]);
    end
    if (!two_r) begin
      a_det = acc_t'(g00) <<< GF;
      for (int p = 0; p < 2; p++)
        for (int q = 0; q < 2; q++) begin
          a_pr[p][q] = '0; a_pi[p][q] = '0;
        end
      a_pr[0][0] = acc_t'(h_re[0][0]) <<< GF;
      a_pi[0][0] = acc_t'(h_im[0][0]) <<< GF;
    end
    if (a_det <= 0) a_det = acc_t'(1);
  end

  // Eight dividers: index 4*p + 2*q + {0: re, 1: im}.
  logic                 div_start;
  logic signed [PW-1:0] div_num [8];
  logic                 div_done [8];
  logic                 div_busy [8];
  logic signed [WL-1:0] div_quo [8];
  assign div_start = (state == DIV);
  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int q = 0; q < 2; q++) begin
        div_num[4*p+2*q]   = p_re[p][q];
        div_num[4*p+2*q+1] = p_im[p][q];
      end
  end
  for (genvar g = 0; g < 8; g++) begin : g_div
    fx_div #(.NW(PW), .QW(WL), .FRAC(FRAC)) u_div (
      .clk, .rst_n, .start(div_start), .num(div_num[g]), .den(PW'($unsigned(det))),
      .busy(div_busy[g]), .done(div_done[g]), .quo(div_quo[g]));
  end

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      two_r <= 1'b0;
      g00 <= '0; g11 <= '0; g01_re <= '0; g01_im <= '0; det <= '0;
      for (int i = 0; i < M; i++)
        for (int c = 0; c < 2; c++) begin
          l_re[i][c] <= '0; l_im[i][c] <= '0;
        end
      for (int p = 0; p < 2; p++)
        for (int q = 0; q < 2; q++) begin
          h_re[p][q] <= '0; h_im[p][q] <= '0;
          p_re[p][q] <= '0; p_im[p][q] <= '0;
          lam_re[p][q] <= '0; lam_im[p][q] <= '0;
        end
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          two_r <= two_src;
          for (int i = 0; i < M; i++)
            for (int c = 0; c < 2; c++) begin
              l_re[i][c] <= ls_re[i][c]; l_im[i][c] <= ls_im[i][c];
            end
          state <= GRAM;
        end
        GRAM: begin
          g00    <= GW'(sat(rnd(sg00,  FRAC - GB), GW));
          g11    <= GW'(sat(rnd(sg11,  FRAC - GB), GW));
          g01_re <= GW'(sat(rnd(sg01r, FRAC - GB), GW));
          g01_im <= GW'(sat(rnd(sg01i, FRAC - GB), GW));
          for (int p = 0; p < 2; p++)
            for (int q = 0; q < 2; q++) begin
              h_re[p][q] <= GW'(sat(rnd(shr[p][q], FRAC - GB), GW));
              h_im[p][q] <= GW'(sat(rnd(shi[p][q], FRAC - GB), GW));
            end
          state <= ADJ;
        end
        ADJ: begin
          det <= PW'(sat(a_det, PW));
          for (int p = 0; p < 2; p++)
            for (int q = 0; q < 2; q++) begin
              p_re[p][q] <= PW'(sat(a_pr[p][q], PW));
              p_im[p][q] <= PW'(sat(a_pi[p][q], PW));
            end
          state <= DIV;
        end
        DIV: state <= WAIT;
        WAIT: if (div_done[0]) begin
          for (int p = 0; p < 2; p++)
            for (int q = 0; q < 2; q++) begin
              lam_re[p][q] <= div_quo[4*p+2*q];
              lam_im[p][q] <= div_quo[4*p+2*q+1];
            end
          state <= DONE;
        end
        DONE: if (out_ready) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  a_div_sync: assert property (@(posedge clk) disable iff (!rst_n)
                               div_done[0] |-> !div_busy[7]);
endmodule
