// Binarized-CNN convolution engine on a register-bridge PE array.
//
// The chip computes one binarized convolution layer: every input activation
// and weight is one bit (+1 = 1, -1 = 0), so each product is an XNOR and each
// sum is a count of ones. It consists of
//   * bnn_ctrl      the loop sequencer and external-memory handshakes,
//   * bnn_ocb       the on-chip buffer that caches the Q kernels in use,
//   * bnn_pe_array  X x Y PEs in vertical pairs around shared bridge
//                   registers, computing an X x Y tile of outputs for Q
//                   kernels at a time.
// Kernels are read from external memory exactly once per layer; input data
// is not buffered and streams in once per group of Q kernels. The block
// structure (PE array with bridge registers, kernel-only on-chip buffer,
// external memory) and the default sizes K = 3, d = 6, 24 PEs, Nk = 3x3x128
// follow the architecture. X = 4 by Y = 6 is one of the evaluated Loop-3
// unrollings and Q = 4 the largest evaluated kernel concurrency; the ports
// and the feed format are this design's choices.
//
// Interface:
//   start/cfg_*      cfg_groups groups of Q kernels (Loop-4 = Q*cfg_groups),
//                    cfg_tiles_x x cfg_tiles_y output tiles; busy, done.
//   kw_*             kernel slice kw_data = weights [ky][kx][ch] of kernel
//                    kw_kernel, channels kw_d*d .. kw_d*d+d-1. Channels past
//                    IN_CH must be padded with 1.
//   in_*             input slice for tile (in_tx, in_ty), slice in_d:
//                    in_win[p][r][j][ch] is the activation at row
//                    in_ty*Y + 2p + r, column in_tx*X + j, channel
//                    in_d*d + ch. Channels past IN_CH, and pixels outside the
//                    input, must be padded with 0 (padding of 0 against a
//                    weight of 1 adds nothing to the count).
//   res_*[r][c]      sum for output row tile_y*Y + r, column tile_x*X + c and
//                    kernel res_q of the current group: the number of
//                    matching bit pairs (0..Nk); the +-1 sum is 2*res_sum-Nk.
// Each PE produces Q sums per tile, one per cycle, during the last Q cycles
// of the tile's stream plus c+2 cycles of pipeline delay.
module bnn_rb_top
  import bnn_pkg::*;
#(
  parameter  int unsigned K     = 3,     // kernel width and height
  parameter  int unsigned DU    = 6,     // Loop-2 unrolling d
  parameter  int unsigned X     = 4,     // Loop-3 unrolling across
  parameter  int unsigned Y     = 6,     // Loop-3 unrolling down (even)
  parameter  int unsigned Q     = 4,     // kernels computed concurrently
  parameter  int unsigned IN_CH = 128,   // input channels
  localparam int unsigned NS    = num_slices(IN_CH, DU),
  localparam int unsigned NK    = K * K * IN_CH,
  localparam int unsigned ACC_W = acc_width(NK),
  localparam int unsigned P     = Y / 2,
  localparam int unsigned MAXC  = K + X - 1,
  localparam int unsigned SW    = (NS > 1) ? $clog2(NS) : 1,
  localparam int unsigned QW    = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 start,
  input  logic [15:0]                          cfg_groups,
  input  logic [15:0]                          cfg_tiles_x,
  input  logic [15:0]                          cfg_tiles_y,
  output logic                                 busy,
  output logic                                 done,
  // kernel stream from external memory
  output logic                                 kw_ready,
  input  logic                                 kw_valid,
  output logic [15:0]                          kw_kernel,
  output logic [SW-1:0]                        kw_d,
  input  logic [K-1:0][K-1:0][DU-1:0]          kw_data,
  // input-slice stream from external memory
  output logic                                 in_ready,
  input  logic                                 in_valid,
  output logic [15:0]                          in_tx,
  output logic [15:0]                          in_ty,
  output logic [SW-1:0]                        in_d,
  input  logic [P-1:0][K:0][MAXC-1:0][DU-1:0]  in_win,
  output logic                                 stall,
  // results
  output logic [Y-1:0][X-1:0]                  res_valid,
  output logic [Y-1:0][X-1:0][QW-1:0]          res_q,
  output logic [Y-1:0][X-1:0][ACC_W-1:0]       res_sum
);

  localparam int unsigned DEPTH = Q * NS;
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic                        ocb_we;
  logic [AW-1:0]               ocb_waddr, ocb_raddr;
  logic [K*K*DU-1:0]           ocb_rdata;
  ktag_t                       feed_tag;
  logic                        feed_ld_win;

  bnn_ctrl #(.X(X), .Q(Q), .NS(NS)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .cfg_groups  (cfg_groups),
    .cfg_tiles_x (cfg_tiles_x),
    .cfg_tiles_y (cfg_tiles_y),
    .busy        (busy),
    .done        (done),
    .kw_ready    (kw_ready),
    .kw_valid    (kw_valid),
    .kw_kernel   (kw_kernel),
    .kw_d        (kw_d),
    .in_ready    (in_ready),
    .in_valid    (in_valid),
    .in_tx       (in_tx),
    .in_ty       (in_ty),
    .in_d        (in_d),
    .stall       (stall),
    .ocb_we      (ocb_we),
    .ocb_waddr   (ocb_waddr),
    .ocb_raddr   (ocb_raddr),
    .feed_tag    (feed_tag),
    .feed_ld_win (feed_ld_win)
  );

  bnn_ocb #(.WORD_W(K * K * DU), .DEPTH(DEPTH)) u_ocb (
    .clk   (clk),
    .we    (ocb_we),
    .waddr (ocb_waddr),
    .wdata (kw_data),
    .raddr (ocb_raddr),
    .rdata (ocb_rdata)
  );

  bnn_pe_array #(
    .K(K), .DU(DU), .X(X), .Y(Y), .Q(Q), .ACC_W(ACC_W)
  ) u_array (
    .clk         (clk),
    .rst_n       (rst_n),
    .feed_win    (in_win),
    .feed_ld_win (feed_ld_win),
    .feed_k      (ocb_rdata),
    .feed_tag    (feed_tag),
    .res_valid   (res_valid),
    .res_q       (res_q),
    .res_sum     (res_sum)
  );

endmodule
