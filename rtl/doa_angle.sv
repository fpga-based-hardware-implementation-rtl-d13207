// doa_angle - pipeline stage 5: direction of arrival from each eigenvalue.
//
// For a half-wavelength ULA each eigenvalue is ideally g = exp(-j pi cos(theta)),
// so theta = acos(-arg(g) / pi). Per source lane the stage
//   1. finds arg(g) in degrees with a vectoring CORDIC (atan2),
//   2. forms u = -arg(g)/180 in [-1, 1] (UF fraction bits) by a constant
//      multiplication, and w = sqrt(1 - u^2) with a square-root unit,
//   3. finds theta = atan2(w, u) in [0, 180] degrees with a second CORDIC,
// and rounds theta to an unsigned ANG_W-bit number of degrees with ANG_FRAC
// fraction bits. The two lanes run in parallel; with two_src = 0 only lane 0
// is meaningful and src_valid[1] is 0.
// Interface: in_valid/in_ready take the eigenvalues and the source count;
// out_valid holds the angles until out_ready.
// Timing: out_valid rises 2*ITER + UF + 11 cycles after the accepting edge
// (57 with the defaults). The acos of the normalised phase follows the
// method (its sign follows the steering vector exp(-j pi m cos(theta)));
// the CORDIC and square-root evaluation is this implementation's choice.
module doa_angle #(
  parameter int WL       = 16,
  parameter int IWL      = 8,
  parameter int ITER     = 16,   // CORDIC micro-rotations
  parameter int ANG_W    = 16,   // output angle width
  parameter int ANG_FRAC = 7     // output angle fraction bits (degrees)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic                    two_src,
  input  logic signed [WL-1:0]    gam_re [doa_pkg::NSRC],
  input  logic signed [WL-1:0]    gam_im [doa_pkg::NSRC],
  output logic                    out_valid,
  input  logic                    out_ready,
  output logic [ANG_W-1:0]        theta [doa_pkg::NSRC],
  output logic [doa_pkg::NSRC-1:0] src_valid
);
  import doa_pkg::*;

  localparam int UF  = 14;             // fraction bits of u and w
  localparam int UW  = UF + 2;
  localparam int AW  = CORDIC_AF + 10; // CORDIC angle width
  localparam int S   = 30;
  localparam longint INV180 = ((64'd1 << S) + 64'd90) / 64'd180;
  localparam acc_t ONE2 = acc_t'(1) <<< (2 * UF);

  typedef enum logic [2:0] {IDLE, ATAN, WAIT1, UCALC, SQ, WAIT2, ACOS, WAIT3} state_e;
  state_e state;
  logic   done_r;
  logic   two_r;

  logic signed [WL-1:0] g_re [NSRC];
  logic signed [WL-1:0] g_im [NSRC];
  logic signed [UW-1:0] u [NSRC];
  logic signed [UW-1:0] w [NSRC];

  logic                 c1_done [NSRC];
  logic                 c1_busy [NSRC];
  logic signed [AW-1:0] phi [NSRC];
  logic                 sq_done [NSRC];
  logic                 sq_busy [NSRC];
  logic [UF:0]          sq_root [NSRC];
  logic                 c2_done [NSRC];
  logic                 c2_busy [NSRC];
  logic signed [AW-1:0] ang [NSRC];
  logic signed [UW-1:0] u_next [NSRC];
  logic [2*UF+1:0]      w2 [NSRC];

  for (genvar k = 0; k < NSRC; k++) begin : g_lane
    cordic_atan2 #(.W(WL), .ITER(ITER), .AW(AW)) u_arg (
      .clk, .rst_n, .start(state == ATAN), .x(g_re[k]), .y(g_im[k]),
      .busy(c1_busy[k]), .done(c1_done[k]), .ang(phi[k]));

    // u = -phi / 180, clamped to [-1, 1]
    acc_t uu;
    always_comb begin
      uu = rnd(-(acc_t'(phi[k]) * acc_t'(INV180)), S + CORDIC_AF - UF);
      if (uu > (acc_t'(1) <<< UF))  uu = acc_t'(1) <<< UF;
      if (uu < -(acc_t'(1) <<< UF)) uu = -(acc_t'(1) <<< UF);
      u_next[k] = UW'(uu);
      w2[k]     = (2*UF+2)'(ONE2 - acc_t'(u[k]) * u[k]);
    end

    fx_sqrt #(.IW(2*UF+2)) u_w (
      .clk, .rst_n, .start(state == SQ), .x(w2[k]),
      .busy(sq_busy[k]), .done(sq_done[k]), .root(sq_root[k]));

    cordic_atan2 #(.W(UW), .ITER(ITER), .AW(AW)) u_acos (
      .clk, .rst_n, .start(state == ACOS), .x(u[k]), .y(w[k]),
      .busy(c2_busy[k]), .done(c2_done[k]), .ang(ang[k]));
  end

  assign in_ready  = (state == IDLE) && !done_r;
  assign out_valid = done_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; done_r <= 1'b0; two_r <= 1'b0; src_valid <= '0;
      for (int k = 0; k < NSRC; k++) begin
        g_re[k] <= '0; g_im[k] <= '0; u[k] <= '0; w[k] <= '0; theta[k] <= '0;
      end
    end else begin
      if (done_r && out_ready) done_r <= 1'b0;
      case (state)
        IDLE: if (in_valid && !done_r) begin
          two_r <= two_src;
          for (int k = 0; k < NSRC; k++) begin
            g_re[k] <= gam_re[k]; g_im[k] <= gam_im[k];
          end
          state <= ATAN;
        end
        ATAN:  state <= WAIT1;
        WAIT1: if (c1_done[0]) state <= UCALC;
        UCALC: begin
          for (int k = 0; k < NSRC; k++) u[k] <= u_next[k];
          state <= SQ;
        end
        SQ:    state <= WAIT2;
        WAIT2: if (sq_done[0]) begin
          for (int k = 0; k < NSRC; k++) w[k] <= UW'(sq_root[k]);
          state <= ACOS;
        end
        ACOS:  state <= WAIT3;
        WAIT3: if (c2_done[0]) begin
          for (int k = 0; k < NSRC; k++)
            theta[k] <= ANG_W'(sat(rnd(acc_t'(ang[k]), CORDIC_AF - ANG_FRAC), ANG_W + 1));
          src_valid <= {two_r, 1'b1};
          done_r    <= 1'b1;
          state     <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  a_lanes: assert property (@(posedge clk) disable iff (!rst_n) c2_done[0] |-> c2_done[NSRC-1]);
endmodule
