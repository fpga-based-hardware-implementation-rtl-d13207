// cov_matrix - pipeline stage 1: sample covariance matrix of N array snapshots.
//
// Computes Rxx = (1/N) * sum_t x(t) x(t)^H (eq. 7 of the method) for an
// M-element array. One snapshot (M complex samples, fixed point WL/IWL) is
// accepted per cycle on a valid/ready handshake; the M(M+1)/2 lower-triangle
// products x_i x_j^* are accumulated in parallel at full precision. After the
// N-th snapshot three cycles finish the frame: the sums are latched, scaled by
// the constant 1/N (a multiplication by round(2^SH/N)), and rounded and
// saturated to WL bits. The upper triangle is filled as the conjugate of the
// lower one, so r_re/r_im hold the full Hermitian matrix.
// Timing: out_valid rises 3 cycles after the N-th snapshot is accepted (the
// stage-1 count of the method's cycle table) and holds, with the matrix, until
// out_ready; only then does the stage accept the next frame's snapshots.
// The method prescribes the formula and the 3-cycle stage; the parallel
// accumulators and the reciprocal constant are this implementation's choices.
module cov_matrix #(
  parameter int M     = 4,    // array elements
  parameter int WL    = 16,   // word length
  parameter int IWL   = 8,    // integer length (sign included)
  parameter int NSNAP = 100   // snapshots per covariance estimate
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic signed [WL-1:0] x_re [M],
  input  logic signed [WL-1:0] x_im [M],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [WL-1:0] r_re [M][M],
  output logic signed [WL-1:0] r_im [M][M]
);
  import doa_pkg::*;

  localparam int FRAC = WL - IWL;
  localparam int AW   = 2 * WL + $clog2(NSNAP + 1) + 1;  // accumulator width
  localparam int SH   = 18;                               // reciprocal precision
  localparam int CNTW = $clog2(NSNAP + 1);
  localparam longint INV_N = ((longint'(1) << SH) + longint'(NSNAP) / 2) / longint'(NSNAP);

  typedef enum logic [2:0] {ACC, LATCH, SCALE, ROUND, DONE} state_e;
  state_e state;

  logic signed [AW-1:0] acc_re [M][M];
  logic signed [AW-1:0] acc_im [M][M];
  logic signed [AW-1:0] hold_re [M][M];
  logic signed [AW-1:0] hold_im [M][M];
  acc_t                 scl_re [M][M];
  acc_t                 scl_im [M][M];
  logic [CNTW-1:0]      cnt;

  assign s_ready   = (state == ACC);
  assign out_valid = (state == DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ACC;
      cnt   <= '0;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          acc_re[i][j] <= '0; acc_im[i][j] <= '0;
          hold_re[i][j] <= '0; hold_im[i][j] <= '0;
          scl_re[i][j] <= '0; scl_im[i][j] <= '0;
          r_re[i][j] <= '0; r_im[i][j] <= '0;
        end
    end else begin
      case (state)
        ACC: if (s_valid) begin
          for (int i = 0; i < M; i++)
            for (int j = 0; j <= i; j++) begin
              acc_re[i][j] <= acc_re[i][j] + AW'(x_re[i]) * AW'(x_re[j]) + AW'(x_im[i]) * AW'(x_im[j]);
              acc_im[i][j] <= acc_im[i][j] + AW'(x_im[i]) * AW'(x_re[j]) - AW'(x_re[i]) * AW'(x_im[j]);
            end
          if (cnt == CNTW'(NSNAP - 1)) begin
            cnt   <= '0;
            state <= LATCH;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        LATCH: begin
          for (int i = 0; i < M; i++)
            for (int j = 0; j <= i; j++) begin
              hold_re[i][j] <= acc_re[i][j];
              hold_im[i][j] <= acc_im[i][j];
              acc_re[i][j]  <= '0;
              acc_im[i][j]  <= '0;
            end
          state <= SCALE;
        end
        SCALE: begin
          for (int i = 0; i < M; i++)
            for (int j = 0; j <= i; j++) begin
              scl_re[i][j] <= acc_t'(hold_re[i][j]) * acc_t'(INV_N);
              scl_im[i][j] <= acc_t'(hold_im[i][j]) * acc_t'(INV_N);
            end
          state <= ROUND;
        end
        ROUND: begin
          for (int i = 0; i < M; i++)
            for (int j = 0; j <= i; j++) begin
              r_re[i][j] <= WL'(sat(rnd(scl_re[i][j], SH + FRAC), WL));
              r_im[i][j] <= WL'(sat(rnd(scl_im[i][j], SH + FRAC), WL));
              if (j != i) begin
                r_re[j][i] <= WL'(sat(rnd(scl_re[i][j], SH + FRAC), WL));
                r_im[j][i] <= WL'(sat(-rnd(scl_im[i][j], SH + FRAC), WL));
              end
            end
          state <= DONE;
        end
        DONE: if (out_ready) state <= ACC;
        default: state <= ACC;
      endcase
    end
  end

  // The matrix must stay stable while it is offered.
  property p_hold;
    @(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(r_re[0][0]);
  endproperty
  a_hold: assert property (p_hold);
endmodule
