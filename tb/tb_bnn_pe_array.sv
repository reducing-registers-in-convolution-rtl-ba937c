// Self-checking testbench for bnn_pe_array.
//
// Plays the controller's part: for several output tiles it feeds, slice by
// slice, one random input slice followed by Q kernel slices on consecutive
// cycles (the input is loaded on the first of them only), with random empty
// cycles before new input slices. Kernels stay the same for all tiles, as
// they would while cached on chip. For every PE, kernel and tile the
// expected count of agreeing bits is computed directly from the convolution
// definition (output row r, column c of a tile reads input rows r..r+K-1 and
// columns c..c+K-1), and the result must appear exactly c+2 cycles after the
// last slice of that kernel was fed.
module tb_bnn_pe_array;
  import bnn_pkg::*;
  localparam int unsigned K = 3, DU = 6, X = 4, Y = 4, Q = 2, NS = 3, TILES = 4;
  localparam int unsigned P = Y / 2, MAXC = K + X - 1, ROWS = Y + K - 1;
  localparam int unsigned ACC_W = acc_width(K * K * DU * NS);

  logic clk = 0, rst_n = 0;
  logic [P-1:0][K:0][MAXC-1:0][DU-1:0] feed_win;
  logic feed_ld_win;
  logic [K-1:0][K-1:0][DU-1:0] feed_k;
  ktag_t feed_tag;
  logic [Y-1:0][X-1:0] res_valid;
  logic [Y-1:0][X-1:0][0:0] res_q;
  logic [Y-1:0][X-1:0][ACC_W-1:0] res_sum;

  bnn_pe_array #(.K(K), .DU(DU), .X(X), .Y(Y), .Q(Q), .ACC_W(ACC_W)) dut (.*);

  typedef struct { int cyc; int q; int sum; } exp_t;
  exp_t expq [Y][X][$];

  logic [DU-1:0] img [NS][ROWS][MAXC];
  logic [DU-1:0] wk  [Q][NS][K][K];
  int cyc = 0, checks = 0, failures = 0, bubbles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_count(int r, int c, int q);
    int n = 0;
    for (int d = 0; d < NS; d++)
      for (int ky = 0; ky < K; ky++)
        for (int kx = 0; kx < K; kx++)
          n += DU - $countones(img[d][r + ky][c + kx] ^ wk[q][d][ky][kx]);
    return n;
  endfunction

  // result monitor
  always @(posedge clk) begin
    #1;
    for (int r = 0; r < Y; r++)
      for (int c = 0; c < X; c++) begin
        if (res_valid[r][c]) begin
          checks++;
          if (expq[r][c].size() == 0) begin
            failures++; $display("FAIL unexpected result at PE %0d,%0d", r, c);
          end else begin
            exp_t e;
            e = expq[r][c].pop_front();
            if (e.cyc != cyc || e.q != int'(res_q[r][c]) || e.sum != int'(res_sum[r][c])) begin
              failures++;
              $display("FAIL PE %0d,%0d cyc %0d/%0d q %0d/%0d sum %0d/%0d", r, c,
                       cyc, e.cyc, res_q[r][c], e.q, res_sum[r][c], e.sum);
            end
          end
        end else if (expq[r][c].size() != 0 && expq[r][c][0].cyc <= cyc) begin
          failures++; checks++;
          $display("FAIL missing result at PE %0d,%0d cyc %0d", r, c, cyc);
          void'(expq[r][c].pop_front());
        end
      end
  end

  initial begin
    feed_win = '0; feed_ld_win = 0; feed_k = '0; feed_tag = '0;
    foreach (wk[q, d, ky, kx]) wk[q][d][ky][kx] = DU'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < TILES; t++) begin
      foreach (img[d, r, j]) img[d][r][j] = DU'($urandom);
      for (int d = 0; d < NS; d++)
        for (int q = 0; q < Q; q++) begin
          @(negedge clk);
          if (q == 0)
            while ($urandom_range(2) == 0) begin
              feed_tag = '0; feed_ld_win = 0; feed_win = {8{$urandom}};
              bubbles++;
              @(negedge clk);
            end
          feed_ld_win = (q == 0);
          for (int p = 0; p < P; p++)
            for (int r = 0; r <= K; r++)
              for (int j = 0; j < MAXC; j++)
                feed_win[p][r][j] = (q == 0) ? img[d][2 * p + r][j] : DU'($urandom);
          for (int ky = 0; ky < K; ky++)
            for (int kx = 0; kx < K; kx++) feed_k[ky][kx] = wk[q][d][ky][kx];
          feed_tag = '0;
          feed_tag.valid = 1; feed_tag.q = QIDX_W'(q);
          feed_tag.first = (d == 0); feed_tag.last = (d == NS - 1);
          if (d == NS - 1)
            for (int r = 0; r < Y; r++)
              for (int c = 0; c < X; c++)
              begin
                exp_t e;
                e.cyc = cyc + 2 + c; e.q = q; e.sum = ref_count(r, c, q);
                expq[r][c].push_back(e);
              end
        end
    end
    @(negedge clk);
    feed_tag = '0; feed_ld_win = 0;
    repeat (X + 4) @(negedge clk);
    for (int r = 0; r < Y; r++)
      for (int c = 0; c < X; c++)
        if (expq[r][c].size() != 0) begin
          failures++; $display("FAIL PE %0d,%0d left %0d results", r, c, expq[r][c].size());
        end
    if (bubbles == 0) begin failures++; $display("FAIL no bubbles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
