// snapshot_fifo - input queue of array snapshots between the host link and the pipeline.
//
// Snapshots (M complex samples in the WL/IWL fixed-point format) arrive from
// the host controller's DMA stream and are stored in a DEPTH-entry circular
// buffer, one snapshot per entry, so that a burst from the host is absorbed
// while stage 1 is busy or holding a finished matrix. Both sides use a
// valid/ready handshake; in_ready is low when the buffer is full (the host
// then waits) and out_valid is high whenever an entry is stored. The output
// is the oldest entry (first-word fall-through); a write and a read may
// happen in the same cycle. The queue between host and FPGA follows the
// method's system; its depth and the handshake are this implementation's.
module snapshot_fifo #(
  parameter int M     = 4,
  parameter int WL    = 16,
  parameter int DEPTH = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [WL-1:0] in_re [M],
  input  logic signed [WL-1:0] in_im [M],
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic signed [WL-1:0] out_re [M],
  output logic signed [WL-1:0] out_im [M],
  output logic                 full
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int CW = $clog2(DEPTH + 1);
  localparam int EW = 2 * M * WL;

  logic [EW-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [CW-1:0] count;
  logic          push, pop;
  logic [EW-1:0] wr_word, rd_word;

  assign full      = (count == CW'(DEPTH));
  assign in_ready  = !full;
  assign out_valid = (count != 0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_comb begin
    for (int i = 0; i < M; i++) begin
      wr_word[2*i*WL +: WL]     = in_re[i];
      wr_word[(2*i+1)*WL +: WL] = in_im[i];
    end
    rd_word = mem[rd_ptr];
    for (int i = 0; i < M; i++) begin
      out_re[i] = rd_word[2*i*WL +: WL];
      out_im[i] = rd_word[(2*i+1)*WL +: WL];
    end
  end

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= wr_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0; rd_ptr <= '0; count <= '0;
    end else begin
      if (push) wr_ptr <= inc(wr_ptr);
      if (pop)  rd_ptr <= inc(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) full |-> !push);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) (count == 0) |-> !pop);
endmodule
