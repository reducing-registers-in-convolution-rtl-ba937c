// End-to-end testbench for bnn_rb_top at its default sizes (3x3 kernels,
// 128 input channels in slices of 6, a 4 x 6 PE array, 4 kernels at a time).
//
// A behavioural external memory holds a random binarized input (H x W x 128)
// and OUT = 4*GROUPS random kernels. It answers the chip's kernel-word and
// input-slice requests, with random gaps, padding channels past 128 with 1 in
// kernels and 0 in inputs, and pixels past the input edge with 0. Every sum
// the array returns is checked against a direct evaluation of the
// convolution: for output (x, y) and kernel no, the number of agreeing bits
// over the 3 x 3 x 128 window. Sums for outputs past the edge of the output
// map are produced by edge tiles and ignored.
//
// Mechanisms counted (each must occur): input stalls (bubbles in the array),
// gaps in the kernel load, kernel-buffer reloads for a new group of kernels,
// moves to a new output tile, padded last slices and edge-tile outputs.
// The traffic is checked against the loop order: every kernel word is read
// once per layer, every input slice once per group of kernels.
module tb_bnn_rb_top;
  import bnn_pkg::*;
  localparam int unsigned K = 3, DU = 6, X = 4, Y = 6, Q = 4, IN_CH = 128;
  localparam int unsigned NS = num_slices(IN_CH, DU), NK = K * K * IN_CH;
  localparam int unsigned ACC_W = acc_width(NK), P = Y / 2, MAXC = K + X - 1;
  localparam int unsigned SW = $clog2(NS);
  // layer shape for this run
  localparam int H = 10, W = 11, GROUPS = 2;
  localparam bit GAPS = 1'b1;
  localparam int OUT = Q * GROUPS, OH = H - K + 1, OW = W - K + 1;
  localparam int TX = (OW + X - 1) / X, TY = (OH + Y - 1) / Y;
  localparam int MAX_CYCLES = 4 * GROUPS * (Q * NS + 1 + TX * TY * NS * Q) + 1000;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] cfg_groups = 16'(GROUPS), cfg_tiles_x = 16'(TX), cfg_tiles_y = 16'(TY);
  logic busy, done, kw_ready, kw_valid, in_ready, in_valid, stall;
  logic [15:0] kw_kernel, in_tx, in_ty;
  logic [SW-1:0] kw_d, in_d;
  logic [K-1:0][K-1:0][DU-1:0] kw_data;
  logic [P-1:0][K:0][MAXC-1:0][DU-1:0] in_win;
  logic [Y-1:0][X-1:0] res_valid;
  logic [Y-1:0][X-1:0][$clog2(Q)-1:0] res_q;
  logic [Y-1:0][X-1:0][ACC_W-1:0] res_sum;

  bnn_rb_top dut (.*);

  // external memory contents
  logic [IN_CH-1:0] img [H][W];
  logic [IN_CH-1:0] wts [OUT][K][K];

  int cyc = 0, checks = 0, failures = 0;
  int n_res [Y][X];
  int busy_cycles = 0, kw_reads = 0, in_reads = 0;
  int cnt_stall = 0, cnt_kw_gap = 0, cnt_reload = 0, cnt_tile = 0, cnt_pad = 0, cnt_edge = 0;
  int checked_outputs = 0;
  logic [15:0] last_tx, last_ty;

  always #5 clk = ~clk;

  initial begin
    repeat (MAX_CYCLES) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // behavioural external memory: data follows the requested address
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
    cyc <= cyc + 1;
    if (rst_n) begin
      kw_valid <= GAPS ? ($urandom_range(3) != 0) : 1'b1;
      in_valid <= GAPS ? ($urandom_range(3) != 0) : 1'b1;
      if (busy) busy_cycles++;
      if (stall) cnt_stall++;
      if (kw_ready && !kw_valid) cnt_kw_gap++;
      if (kw_ready && kw_valid) begin
        kw_reads++;
        if (kw_kernel % Q == 0 && kw_d == 0) cnt_reload++;
      end
      if (in_ready && in_valid) begin
        in_reads++;
        if (in_d == SW'(NS - 1) && NS * DU > IN_CH) cnt_pad++;
        if (in_tx != last_tx || in_ty != last_ty) cnt_tile++;
        last_tx <= in_tx; last_ty <= in_ty;
      end
    end
  end

  // result checker
  always @(posedge clk) begin
    #1;
    for (int r = 0; r < Y; r++)
      for (int c = 0; c < X; c++)
        if (res_valid[r][c]) begin
          int n, q, tile, g, tx, ty, x, y;
          n = n_res[r][c];
          q = n % Q; tile = (n / Q) % (TX * TY); g = n / (Q * TX * TY);
          tx = tile % TX; ty = tile / TX;
          x = tx * X + c; y = ty * Y + r;
          n_res[r][c] = n + 1;
          checks++;
          if (int'(res_q[r][c]) != q) begin
            failures++;
            $display("FAIL PE %0d,%0d result %0d kernel index %0d exp %0d", r, c, n, res_q[r][c], q);
          end else if (g >= GROUPS) begin
            failures++;
            $display("FAIL PE %0d,%0d extra result", r, c);
          end else if (x < OW && y < OH) begin
            int e;
            e = ref_sum(x, y, g * Q + q);
            checked_outputs++;
            if (int'(res_sum[r][c]) != e) begin
              failures++;
              $display("FAIL out x=%0d y=%0d no=%0d got %0d exp %0d", x, y, g * Q + q,
                       res_sum[r][c], e);
            end
          end else cnt_edge++;
        end
  end

  task automatic need(int v, string what);
    checks++;
    if (v == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    kw_valid = 0; in_valid = 0; last_tx = '1; last_ty = '1;
    foreach (n_res[r, c]) n_res[r][c] = 0;
    foreach (img[y, x]) img[y][x] = {$urandom, $urandom, $urandom, $urandom};
    foreach (wts[o, ky, kx]) wts[o][ky][kx] = {$urandom, $urandom, $urandom, $urandom};
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
    // every PE delivered every sum
    foreach (n_res[r, c]) begin
      checks++;
      if (n_res[r][c] != GROUPS * TX * TY * Q) begin
        failures++;
        $display("FAIL PE %0d,%0d delivered %0d sums exp %0d", r, c, n_res[r][c],
                 GROUPS * TX * TY * Q);
      end
    end
    checks++;
    if (checked_outputs != OUT * OH * OW) begin
      failures++;
      $display("FAIL checked %0d outputs exp %0d", checked_outputs, OUT * OH * OW);
    end
    // traffic: kernels once per layer, inputs once per group of Q kernels
    checks++;
    if (kw_reads != OUT * NS || in_reads != GROUPS * TX * TY * NS) begin
      failures++;
      $display("FAIL traffic kernel words %0d exp %0d, input slices %0d exp %0d",
               kw_reads, OUT * NS, in_reads, GROUPS * TX * TY * NS);
    end
    if (!GAPS) begin
      checks++;
      if (busy_cycles != GROUPS * (Q * NS + 1 + TX * TY * NS * Q) + X + 2) begin
        failures++;
        $display("FAIL busy cycles %0d exp %0d", busy_cycles,
                 GROUPS * (Q * NS + 1 + TX * TY * NS * Q) + X + 2);
      end
    end else begin
      need(cnt_stall, "input stall");
      need(cnt_kw_gap, "kernel load gap");
    end
    need(cnt_reload, "kernel buffer load");
    need(GROUPS > 1 ? cnt_reload - 1 : 1, "kernel buffer reload");
    need(cnt_tile - 1, "new output tile");
    need(cnt_pad, "padded last slice");
    need(cnt_edge, "edge-tile output");
    $display("outputs %0d, cycles %0d, stalls %0d, kernel gaps %0d, loads %0d, tiles %0d, padded slices %0d, edge sums %0d",
             checked_outputs, busy_cycles, cnt_stall, cnt_kw_gap, cnt_reload, cnt_tile, cnt_pad, cnt_edge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
