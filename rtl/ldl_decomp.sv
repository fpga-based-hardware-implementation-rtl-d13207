// ldl_decomp - pipeline stage 2 (method 1): LDL^H decomposition of the covariance matrix.
//
// Factors the Hermitian matrix Rxx = L D L^H (L unit lower triangular, D
// real diagonal) and returns the signal-subspace block Ls = L(:, 1:2), the
// M x 2 matrix from which the later stages extract the directions. Only the
// first two columns of L are formed because only they are used:
//   D1   = r11,                l_i1 = r_i1 / D1
//   D2   = r22 - |l21|^2 D1,   l_i2 = (r_i2 - l_i1 conj(l21) D1) / D2
// (1-based indices as in the method's equations). Each column's M-1 (then
// M-2) complex entries are found in parallel by a bank of 2(M-1) sequential
// dividers, which divide by the real pivot directly. Every intermediate is
// rounded and saturated to the WL/IWL fixed-point format. A pivot that
// quantisation makes zero or negative is replaced by one LSB.
// Interface: in_valid/in_ready take the matrix (only its lower triangle is
// read); out_valid holds Ls and the pivots D1, D2 until out_ready. The
// entries fixed by the structure (the unit diagonal and the zero above it)
// are constants; they are kept so that Ls has the full M x 2 shape.
// Timing: out_valid rises 2*(WL+1)+5 cycles after the accepting edge
// (39 for WL = 16), the two columns being computed one after the other.
// The equations follow the method; the column schedule and the divider
// bank are this implementation's choices.
module ldl_decomp #(
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
  output logic signed [WL-1:0] ls_im [M][doa_pkg::NSRC],
  output logic signed [WL-1:0] d_diag [doa_pkg::NSRC]
);
  import doa_pkg::*;

  localparam int FRAC = WL - IWL;
  localparam int ND   = 2 * (M - 1);
  localparam logic signed [WL-1:0] ONE = WL'(1) <<< FRAC;

  typedef enum logic [2:0] {IDLE, COL0, WAIT0, UPD1, COL1, WAIT1, DONE} state_e;
  state_e state;

  // Latched columns 0 and 1 of Rxx.
  logic signed [WL-1:0] c_re [M][2];
  logic signed [WL-1:0] c_im [M][2];
  logic signed [WL-1:0] d0, d1;
  logic signed [WL-1:0] l0_re [M];
  logic signed [WL-1:0] l0_im [M];
  logic signed [WL-1:0] l1_re [M];
  logic signed [WL-1:0] l1_im [M];
  logic signed [WL-1:0] n_re [M];
  logic signed [WL-1:0] n_im [M];

  logic                 div_start;
  logic signed [WL-1:0] div_num [ND];
  logic        [WL-1:0] div_den;
  logic                 div_done [ND];
  logic                 div_busy [ND];
  logic signed [WL-1:0] div_quo [ND];

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  assign div_start = (state == COL0) || (state == COL1);

  // Divider operands: column 0 divides r_i1 by D1, column 1 the numerators by D2.
  always_comb begin
    div_den = (state == COL1) ? d1 : d0;
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

  // Column-1 pivot and numerators from column 0 (full precision, then rounded).
  acc_t t_abs, t_d1;
  acc_t t_pre [M];
  acc_t t_pim [M];
  logic signed [WL-1:0] d1_next;
  logic signed [WL-1:0] n_re_next [M];
  logic signed [WL-1:0] n_im_next [M];
  always_comb begin
    t_abs   = sat(rnd(acc_t'(l0_re[1]) * l0_re[1] + acc_t'(l0_im[1]) * l0_im[1], FRAC), WL);
    t_d1    = sat(rnd(t_abs * d0, FRAC), WL);
    d1_next = WL'(sat(acc_t'(c_re[1][1]) - t_d1, WL));
    if (d1_next <= 0) d1_next = WL'(1);
    for (int i = 0; i < M; i++) begin
      // l_i0 * conj(l_10) * D0
      t_pre[i] = sat(rnd(acc_t'(l0_re[i]) * l0_re[1] + acc_t'(l0_im[i]) * l0_im[1], FRAC), WL);
      t_pim[i] = sat(rnd(acc_t'(l0_im[i]) * l0_re[1] - acc_t'(l0_re[i]) * l0_im[1], FRAC), WL);
      t_pre[i] = sat(rnd(t_pre[i] * d0, FRAC), WL);
      t_pim[i] = sat(rnd(t_pim[i] * d0, FRAC), WL);
      n_re_next[i] = WL'(sat(acc_t'(c_re[i][1]) - t_pre[i], WL));
      n_im_next[i] = WL'(sat(acc_t'(c_im[i][1]) - t_pim[i], WL));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      d0 <= '0; d1 <= '0;
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
          d0    <= (r_re[0][0] > 0) ? r_re[0][0] : WL'(1);
          state <= COL0;
        end
        COL0: state <= WAIT0;
        WAIT0: if (div_done[0]) begin
          l0_re[0] <= ONE; l0_im[0] <= '0;
          for (int k = 0; k < M - 1; k++) begin
            l0_re[k+1] <= div_quo[2*k];
            l0_im[k+1] <= div_quo[2*k+1];
          end
          state <= UPD1;
        end
        UPD1: begin
          d1 <= d1_next;
          for (int i = 0; i < M; i++) begin
            n_re[i] <= n_re_next[i];
            n_im[i] <= n_im_next[i];
          end
          state <= COL1;
        end
        COL1: state <= WAIT1;
        WAIT1: if (div_done[0]) begin
          l1_re[0] <= '0;  l1_im[0] <= '0;
          l1_re[1] <= ONE; l1_im[1] <= '0;
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
    d_diag[0] = d0;
    d_diag[1] = d1;
  end

  // A division must never still be running when its result is collected.
  a_div_sync: assert property (@(posedge clk) disable iff (!rst_n)
                               div_done[0] |-> !div_busy[ND-1]);
endmodule
