// fx_div - sequential fixed-point divider (restoring, one quotient bit per cycle).
//
// Computes quo = sign(num) * floor(|num| * 2^FRAC / den) for a positive
// denominator, i.e. the quotient of two numbers at the same scale returned
// with FRAC fraction bits, saturated to +/-(2^(QW-1)-1). A zero denominator
// or a quotient that does not fit gives the saturated value. The magnitude
// of num is shifted left by FRAC; the bits above the low QW bits form the
// initial remainder (an overflow if it already reaches den), and the QW low
// bits are then shifted in one per cycle.
// Timing: start is taken in any cycle (it restarts a running division);
// done pulses for one cycle QW+1 cycles later with quo valid, and quo holds
// until the next result. This unit is part of this implementation's own
// arithmetic; the stages that use it follow the paper's equations.
module fx_div #(
  parameter int NW   = 16,   // width of num and den
  parameter int QW   = 16,   // width of the signed quotient
  parameter int FRAC = 8     // fraction bits added to the quotient
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic signed [NW-1:0] num,
  input  logic        [NW-1:0] den,
  output logic                 busy,
  output logic                 done,
  output logic signed [QW-1:0] quo
);
  localparam int DW = NW + FRAC;        // dividend width
  localparam int CW = $clog2(QW + 1);

  initial begin
    assert (DW > QW) else $error("fx_div: NW+FRAC must exceed QW");
  end

  logic [NW:0]    rem;
  logic [QW-1:0]  dsh;
  logic [QW-1:0]  q;
  logic [NW-1:0]  den_r;
  logic [CW-1:0]  cnt;
  logic           neg, ovf;

  logic [NW:0]    mag;
  logic [DW:0]    dvd;
  logic [NW+1:0]  trial;

  always_comb begin
    mag   = num[NW-1] ? (NW+1)'(-{num[NW-1], num}) : (NW+1)'({1'b0, num});
    dvd   = (DW+1)'(mag) << FRAC;
    trial = {rem, dsh[QW-1]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; quo <= '0;
      rem <= '0; dsh <= '0; q <= '0; den_r <= '0; cnt <= '0; neg <= 1'b0; ovf <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy  <= 1'b1;
        den_r <= den;
        rem   <= (NW+1)'(dvd >> QW);
        dsh   <= dvd[QW-1:0];
        ovf   <= ((dvd >> QW) >= (DW+1)'(den));
        neg   <= num[NW-1];
        q     <= '0;
        cnt   <= CW'(QW);
      end else if (busy) begin
        if (cnt != 0) begin
          if (!ovf && trial >= (NW+2)'(den_r)) begin
            rem <= (NW+1)'(trial - (NW+2)'(den_r));
            q   <= {q[QW-2:0], 1'b1};
          end else begin
            rem <= trial[NW:0];
            q   <= {q[QW-2:0], 1'b0};
          end
          dsh <= dsh << 1;
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          if (ovf || q[QW-1])
            quo <= neg ? -$signed({1'b0, {(QW-1){1'b1}}}) : $signed({1'b0, {(QW-1){1'b1}}});
          else
            quo <= neg ? -$signed(q) : $signed(q);
        end
      end
    end
  end
endmodule
