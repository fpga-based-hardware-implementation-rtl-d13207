// tb_snapshot_fifo - self-checking test of the snapshot queue.
//
// Pushes numbered snapshots with random valid/ready patterns on both sides
// (bursts that fill the queue and stretches that drain it) and checks that
// they come out complete and in order, that in_ready drops exactly when
// DEPTH entries are stored, and that the queue both filled and emptied.
module tb_snapshot_fifo;
  localparam int M = 4, WL = 16, DEPTH = 8;

  logic clk = 0, rst_n = 1;
  initial begin #1 rst_n = 0; end
  always #5 clk = ~clk;

  logic in_valid, in_ready, out_valid, out_ready, full;
  logic signed [WL-1:0] in_re [M];
  logic signed [WL-1:0] in_im [M];
  logic signed [WL-1:0] out_re [M];
  logic signed [WL-1:0] out_im [M];

  snapshot_fifo #(.M(M), .WL(WL), .DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int sent = 0, got = 0, level = 0, n_full = 0, n_empty = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [WL-1:0] word(int n, int i, bit im);
    return WL'(n * 13 + i * 3 + (im ? 1000 : 0));
  endfunction

  initial begin
    in_valid = 0; out_ready = 0;
    for (int i = 0; i < M; i++) begin in_re[i] = '0; in_im[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int c = 0; c < 3000; c++) begin
      // phases: 0 = mostly push, 1 = mostly pop
      int ph;
      logic push, pop;
      ph = (c / 200) % 2;
      in_valid  = (sent < 2000) && ($urandom_range(0, 9) < (ph ? 3 : 8));
      out_ready = ($urandom_range(0, 9) < (ph ? 8 : 3));
      for (int i = 0; i < M; i++) begin
        in_re[i] = word(sent, i, 0);
        in_im[i] = word(sent, i, 1);
      end
      checks++;
      if (in_ready != (level < DEPTH) || out_valid != (level > 0)) begin
        failures++;
        $display("cycle %0d level %0d in_ready %b out_valid %b", c, level, in_ready, out_valid);
      end
      if (level == DEPTH) n_full++;
      if (level == 0) n_empty++;
      push = in_valid && in_ready;
      pop  = out_valid && out_ready;
      if (pop) begin
        for (int i = 0; i < M; i++) begin
          checks++;
          if (out_re[i] != word(got, i, 0) || out_im[i] != word(got, i, 1)) begin
            failures++;
            $display("entry %0d element %0d wrong", got, i);
          end
        end
        got++;
      end
      @(posedge clk); #1;
      if (push) sent++;
      level += int'(push) - int'(pop);
    end
    checks++;
    if (n_full == 0 || n_empty == 0 || got < 500) begin
      failures++;
      $display("coverage: full %0d empty %0d delivered %0d", n_full, n_empty, got);
    end
    $display("queue full in %0d cycles, empty in %0d, %0d snapshots delivered", n_full, n_empty, got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
