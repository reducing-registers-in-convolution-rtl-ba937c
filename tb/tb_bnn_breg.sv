// Self-checking testbench for bnn_breg.
//
// Chains a feed-side bridge register (DROP=0, full width) and a following
// one (DROP=1, one column fewer), as at the start of a row of the array.
// Random windows, kernels and tags go in; the feed-side register loads its
// window only when ld_win is high. A model of the two registers' contents
// (hold or load, then drop the first column on the way to the second)
// checks every output: the neighbour bus including its zero padding, the
// kernel and tag, and the upper (rows 0..K-1) and lower (rows 1..K) PE views.
module tb_bnn_breg;
  import bnn_pkg::*;
  localparam int unsigned K = 3, DU = 6, MAXC = 6;

  typedef logic [K:0][MAXC-1:0][DU-1:0] bus_t;
  typedef logic [K-1:0][K-1:0][DU-1:0]  kw_t;

  logic  clk = 0, rst_n = 0;
  logic  ld_win;
  bus_t  win_in, w0, w1;
  kw_t   k_in, k0, k1, up0, dn0, up1, dn1;
  ktag_t tag_in, t0, t1;
  int checks = 0, failures = 0, holds = 0;

  // model state
  logic [DU-1:0] m0 [K+1][MAXC];
  logic [DU-1:0] m1 [K+1][MAXC];
  kw_t   mk0, mk1;
  ktag_t mt0, mt1;

  bnn_breg #(.K(K), .DU(DU), .MAXC(MAXC), .COLS(MAXC), .DROP(1'b0)) u0 (
    .clk, .rst_n, .ld_win, .ld_k(1'b1), .win_in, .k_in, .tag_in,
    .win_q(w0), .k_q(k0), .tag_q(t0), .up_win(up0), .dn_win(dn0));
  bnn_breg #(.K(K), .DU(DU), .MAXC(MAXC), .COLS(MAXC - 1), .DROP(1'b1)) u1 (
    .clk, .rst_n, .ld_win(1'b1), .ld_k(1'b1), .win_in(w0), .k_in(k0), .tag_in(t0),
    .win_q(w1), .k_q(k1), .tag_q(t1), .up_win(up1), .dn_win(dn1));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [1023:0] got, logic [1023:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    ld_win = 0; win_in = '0; k_in = '0; tag_in = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1;
    // tags are cleared by reset
    expect_eq(1024'(t0.valid), 0, "reset tag");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      ld_win = (n == 0) || ($urandom_range(2) == 0);
      for (int r = 0; r <= K; r++)
        for (int j = 0; j < MAXC; j++) win_in[r][j] = DU'($urandom);
      k_in = {$urandom, $urandom};
      tag_in = ktag_t'($urandom);
      if (!ld_win) holds++;
      @(posedge clk);
      // model update: second register takes the first's old contents
      for (int r = 0; r <= K; r++)
        for (int j = 0; j < MAXC - 1; j++) m1[r][j] = m0[r][j + 1];
      mk1 = mk0; mt1 = mt0;
      if (ld_win)
        for (int r = 0; r <= K; r++)
          for (int j = 0; j < MAXC; j++) m0[r][j] = win_in[r][j];
      mk0 = k_in; mt0 = tag_in;
      #1;
      if (n > 0) begin
        bus_t e0, e1;
        kw_t  eu0, ed0, eu1, ed1;
        e0 = '0; e1 = '0;
        for (int r = 0; r <= K; r++)
          for (int j = 0; j < MAXC; j++) begin
            e0[r][j] = m0[r][j];
            if (j < MAXC - 1) e1[r][j] = m1[r][j];
          end
        for (int r = 0; r < K; r++)
          for (int j = 0; j < K; j++) begin
            eu0[r][j] = m0[r][j]; ed0[r][j] = m0[r + 1][j];
            eu1[r][j] = m1[r][j]; ed1[r][j] = m1[r + 1][j];
          end
        expect_eq(1024'(w0), 1024'(e0), "w0");
        expect_eq(1024'(k0), 1024'(mk0), "k0");
        expect_eq(1024'(t0), 1024'(mt0), "t0");
        expect_eq(1024'(up0), 1024'(eu0), "up0");
        expect_eq(1024'(dn0), 1024'(ed0), "dn0");
        if (n > 1) begin
          expect_eq(1024'(w1), 1024'(e1), "w1");
          expect_eq(1024'(k1), 1024'(mk1), "k1");
          expect_eq(1024'(t1), 1024'(mt1), "t1");
          expect_eq(1024'(up1), 1024'(eu1), "up1");
          expect_eq(1024'(dn1), 1024'(ed1), "dn1");
        end
      end
    end
    if (holds == 0) begin failures++; $display("FAIL no hold cycles"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
