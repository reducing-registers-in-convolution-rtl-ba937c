// Testbench helper: runs one small convolution layer through a bnn_rb_top
// of a given configuration and checks every sum.
//
// The helper holds a behavioural external memory (random H x W x IN_CH input
// and Q*GROUPS random kernels), answers the chip's kernel-word and
// input-slice requests with random gaps, and compares each returned sum with
// a direct evaluation of the convolution. It also checks that every PE
// delivered all its sums, that kernels were read once and inputs once per
// group, and that the register bits held in the bridge registers equal the
// architecture's formulas: X*Y*K*K*d/2 for kernels and C*Y*(K+1)*d/2 for
// input data, with C = X*(K + (X-1)/2) columns per pair row. It starts the
// layer itself after reset and raises finished when done; checks and
// failures are reported on its outputs.
module bnn_tb_layer
  import bnn_pkg::*;
#(
  parameter int unsigned K = 3, DU = 6, X = 4, Y = 6, Q = 4, IN_CH = 128,
  parameter int H = 10, W = 11, GROUPS = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned NS = num_slices(IN_CH, DU), NK = K * K * IN_CH;
  localparam int unsigned ACC_W = acc_width(NK), P = Y / 2, MAXC = K + X - 1;
  localparam int unsigned SW = (NS > 1) ? $clog2(NS) : 1;
  localparam int OUT = Q * GROUPS, OH = H - K + 1, OW = W - K + 1;
  localparam int TX = (OW + X - 1) / X, TY = (OH + Y - 1) / Y;

  logic start = 0;
  logic [15:0] cfg_groups = 16'(GROUPS), cfg_tiles_x = 16'(TX), cfg_tiles_y = 16'(TY);
  logic busy, done, kw_ready, kw_valid, in_ready, in_valid, stall;
  logic [15:0] kw_kernel, in_tx, in_ty;
  logic [SW-1:0] kw_d, in_d;
  logic [K-1:0][K-1:0][DU-1:0] kw_data;
  logic [P-1:0][K:0][MAXC-1:0][DU-1:0] in_win;
  logic [Y-1:0][X-1:0] res_valid;
  logic [Y-1:0][X-1:0][((Q > 1) ? $clog2(Q) : 1)-1:0] res_q;
  logic [Y-1:0][X-1:0][ACC_W-1:0] res_sum;

  bnn_rb_top #(.K(K), .DU(DU), .X(X), .Y(Y), .Q(Q), .IN_CH(IN_CH)) dut (.*);

  logic [IN_CH-1:0] img [H][W];
  logic [IN_CH-1:0] wts [OUT][K][K];
  int n_res [Y][X];
  int kw_reads = 0, in_reads = 0, checked_outputs = 0;

  always_comb begin
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        for (int ch = 0; ch < DU; ch++) begin
          int cha;
          cha = int'(kw_d) * DU + ch;
          kw_data[ky][kx][ch] = (cha < IN_CH && int'(kw_kernel) < OUT)
                                ? wts[int'(kw_kernel)][ky][kx][cha] : 1'b1;
        end
    for (int p = 0; p < P; p++)
      for (int r = 0; r <= K; r++)
        for (int j = 0; j < MAXC; j++)
          for (int ch = 0; ch < DU; ch++) begin
            int y, x, cha;
            y = int'(in_ty) * Y + 2 * p + r;
            x = int'(in_tx) * X + j;
            cha = int'(in_d) * DU + ch;
            in_win[p][r][j][ch] = (y < H && x < W && cha < IN_CH) ? img[y][x][cha] : 1'b0;
          end
  end

  function automatic int ref_sum(int x, int y, int no);
    int n = 0;
    for (int ky = 0; ky < K; ky++)
      for (int kx = 0; kx < K; kx++)
        n += $countones(~(img[y + ky][x + kx] ^ wts[no][ky][kx]));
    return n;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      kw_valid <= ($urandom_range(3) != 0);
      in_valid <= ($urandom_range(3) != 0);
      if (kw_ready && kw_valid) kw_reads++;
      if (in_ready && in_valid) in_reads++;
    end
  end

  task automatic fail(string msg);
    failures++;
    $display("FAIL [K=%0d X=%0d Y=%0d Q=%0d] %s", K, X, Y, Q, msg);
  endtask

  always @(posedge clk) begin
    #1;
    for (int r = 0; r < Y; r++)
      for (int c = 0; c < X; c++)
        if (res_valid[r][c]) begin
          int n, q, tile, g, x, y;
          n = n_res[r][c];
          q = n % Q; tile = (n / Q) % (TX * TY); g = n / (Q * TX * TY);
          x = (tile % TX) * X + c; y = (tile / TX) * Y + r;
          n_res[r][c] = n + 1;
          checks++;
          if (int'(res_q[r][c]) != q || g >= GROUPS)
            fail($sformatf("PE %0d,%0d result %0d: kernel index %0d", r, c, n, res_q[r][c]));
          else if (x < OW && y < OH) begin
            int e;
            e = ref_sum(x, y, g * Q + q);
            checked_outputs++;
            if (int'(res_sum[r][c]) != e)
              fail($sformatf("out x=%0d y=%0d no=%0d got %0d exp %0d", x, y, g * Q + q,
                             res_sum[r][c], e));
          end
        end
  end

  initial begin
    int cols2;
    finished = 0; checks = 0; failures = 0;
    kw_valid = 0; in_valid = 0;
    foreach (n_res[r, c]) n_res[r][c] = 0;
    foreach (img[y, x]) img[y][x] = IN_CH'({$urandom, $urandom, $urandom, $urandom});
    foreach (wts[o, ky, kx]) wts[o][ky][kx] = IN_CH'({$urandom, $urandom, $urandom, $urandom});
    // register-bit formulas (doubled to stay in integers)
    cols2 = 0;
    for (int c = 0; c < X; c++) cols2 += 2 * breg_cols(K, X, c);
    checks++;
    if (cols2 != X * (2 * K + X - 1))
      fail($sformatf("input columns per pair row %0d/2, formula %0d/2", cols2, X * (2 * K + X - 1)));
    checks++;
    if ($bits(dut.u_array.g_pair[0].g_col[0].u_breg.k_q) * X * (Y / 2) != X * Y * K * K * DU / 2)
      fail("kernel register bits differ from X*Y*K*K*d/2");
    @(posedge rst_n);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    foreach (n_res[r, c]) begin
      checks++;
      if (n_res[r][c] != GROUPS * TX * TY * Q)
        fail($sformatf("PE %0d,%0d delivered %0d sums", r, c, n_res[r][c]));
    end
    checks++;
    if (checked_outputs != OUT * OH * OW)
      fail($sformatf("checked %0d outputs exp %0d", checked_outputs, OUT * OH * OW));
    checks++;
    if (kw_reads != OUT * NS || in_reads != GROUPS * TX * TY * NS)
      fail($sformatf("traffic kernel words %0d input slices %0d", kw_reads, in_reads));
    $display("config K=%0d d=%0d %0dx%0d Q=%0d: %0d outputs checked, %0d failures",
             K, DU, X, Y, Q, checked_outputs, failures);
    finished = 1;
  end
endmodule
