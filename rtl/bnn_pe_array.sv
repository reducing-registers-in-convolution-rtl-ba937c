// Array of X x Y processing elements joined by bridge registers.
//
// Loop-3 (the output's x and y) is unrolled X times across and Y times down
// (Y even), so the array computes an X-wide, Y-tall tile of output pixels.
// The PEs are grouped in Y/2 vertical pairs per column; each pair shares one
// bridge register (bnn_breg) that holds the pair's kernel slice and its K+1
// input rows. Pair row p serves output rows 2p and 2p+1 of the tile.
//
// Along each pair row the bridge registers form a shift chain. The feed side
// is column c = 0; it receives a window K+X-1 columns wide, uses its first K
// columns, and hands the rest on, one column fewer per step, so column c
// holds K+X-1-c columns and computes output column c of the tile. Kernel
// slices and their tags travel down the same chain, so column c works on
// the same kernel c cycles after column 0. All pair rows receive the same
// kernel stream and tags at the same time and their own input windows.
// This arrangement follows the architecture's register-bridge layout; which
// edge is called column 0 is only a naming choice.
//
// Interface: feed_win[p] is the window for pair row p, loaded into column 0
// when feed_ld_win is high; feed_k/feed_tag is the kernel slice, loaded on
// every cycle. Results leave PE (row r, column c) on res_*[r][c], one cycle
// after the PE read its last slice, i.e. c+2 cycles after the last slice
// was fed.
module bnn_pe_array
  import bnn_pkg::*;
#(
  parameter  int unsigned K     = 3,
  parameter  int unsigned DU    = 6,
  parameter  int unsigned X     = 4,
  parameter  int unsigned Y     = 6,
  parameter  int unsigned Q     = 4,
  parameter  int unsigned ACC_W = 11,
  localparam int unsigned P     = Y / 2,       // PE pairs per column
  localparam int unsigned MAXC  = K + X - 1,   // columns fed to column 0
  localparam int unsigned QW    = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [P-1:0][K:0][MAXC-1:0][DU-1:0]    feed_win,
  input  logic                                   feed_ld_win,
  input  logic [K-1:0][K-1:0][DU-1:0]            feed_k,
  input  ktag_t                                  feed_tag,
  output logic [Y-1:0][X-1:0]                    res_valid,
  output logic [Y-1:0][X-1:0][QW-1:0]            res_q,
  output logic [Y-1:0][X-1:0][ACC_W-1:0]         res_sum
);

  // PEs share bridge registers in vertical pairs, so Y must be even.
  if (Y % 2 != 0 || Y == 0) begin : g_bad_y
    $error("bnn_pe_array: Y must be a positive even number");
  end

  // Neighbour buses: bus index c is the output of column c-1 (index 0 is the
  // feed).
  logic  [K:0][MAXC-1:0][DU-1:0] wbus [P][X+1];
  logic  [K-1:0][K-1:0][DU-1:0]  kbus [P][X+1];
  ktag_t                         tbus [P][X+1];

  for (genvar p = 0; p < P; p++) begin : g_pair
    assign wbus[p][0] = feed_win[p];
    assign kbus[p][0] = feed_k;
    assign tbus[p][0] = feed_tag;

    for (genvar c = 0; c < X; c++) begin : g_col
      logic [K-1:0][K-1:0][DU-1:0] up_win, dn_win;

      bnn_breg #(
        .K    (K),
        .DU   (DU),
        .MAXC (MAXC),
        .COLS (breg_cols(K, X, c)),
        .DROP (c != 0)
      ) u_breg (
        .clk    (clk),
        .rst_n  (rst_n),
        .ld_win ((c == 0) ? feed_ld_win : 1'b1),
        .ld_k   (1'b1),
        .win_in (wbus[p][c]),
        .k_in   (kbus[p][c]),
        .tag_in (tbus[p][c]),
        .win_q  (wbus[p][c+1]),
        .k_q    (kbus[p][c+1]),
        .tag_q  (tbus[p][c+1]),
        .up_win (up_win),
        .dn_win (dn_win)
      );

      bnn_pe #(.K(K), .DU(DU), .Q(Q), .ACC_W(ACC_W)) u_pe_up (
        .clk       (clk),
        .rst_n     (rst_n),
        .win       (up_win),
        .kern      (kbus[p][c+1]),
        .tag       (tbus[p][c+1]),
        .res_valid (res_valid[2*p][c]),
        .res_q     (res_q[2*p][c]),
        .res_sum   (res_sum[2*p][c])
      );

      bnn_pe #(.K(K), .DU(DU), .Q(Q), .ACC_W(ACC_W)) u_pe_dn (
        .clk       (clk),
        .rst_n     (rst_n),
        .win       (dn_win),
        .kern      (kbus[p][c+1]),
        .tag       (tbus[p][c+1]),
        .res_valid (res_valid[2*p+1][c]),
        .res_q     (res_q[2*p+1][c]),
        .res_sum   (res_sum[2*p+1][c])
      );
    end
  end

endmodule
