// fx_sqrt - sequential integer square root (digit by digit, one root bit per cycle).
//
// Returns root = floor(sqrt(x)) for an unsigned IW-bit input (IW even). Used
// on fixed-point numbers: an input with 2F fraction bits gives a root with F
// fraction bits. Two input bits are brought down per cycle and the trial
// subtrahend (root<<2)|1 is compared with the partial remainder.
// Timing: start is taken in any cycle; done pulses IW/2+1 cycles later with
// root valid; root holds until the next result. This unit is part of this
// implementation's own arithmetic (the paper names only the square roots).
module fx_sqrt #(
  parameter int IW = 24
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [IW-1:0]     x,
  output logic              busy,
  output logic              done,
  output logic [IW/2-1:0]   root
);
  localparam int RW = IW / 2;
  localparam int CW = $clog2(RW + 1);

  initial begin
    assert (IW % 2 == 0) else $error("fx_sqrt: IW must be even");
  end

  logic [IW-1:0] xs;
  logic [RW:0]   rem;
  logic [RW-1:0] r;
  logic [CW-1:0] cnt;
  logic [RW+2:0] cur, trial;

  always_comb begin
    cur   = {rem, xs[IW-1:IW-2]};
    trial = {1'b0, r, 2'b01};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; root <= '0;
      xs <= '0; rem <= '0; r <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        xs   <= x;
        rem  <= '0;
        r    <= '0;
        cnt  <= CW'(RW);
      end else if (busy) begin
        if (cnt != 0) begin
          if (cur >= trial) begin
            rem <= (RW+1)'(cur - trial);
            r   <= {r[RW-2:0], 1'b1};
          end else begin
            rem <= cur[RW:0];
            r   <= {r[RW-2:0], 1'b0};
          end
          xs  <= xs << 2;
          cnt <= cnt - 1'b1;
        end else begin
          busy <= 1'b0;
          done <= 1'b1;
          root <= r;
        end
      end
    end
  end
endmodule
