// Processing element (PE) of the register-bridge binarized-CNN array.
//
// In one clock cycle the PE reads a K x K x d window of input bits and a
// K x K x d kernel slice from the bridge register it shares with its
// neighbour, multiplies them bit by bit with XNOR, counts the ones and adds
// the count to one of Q accumulator registers. The Q registers let the PE
// work on Q kernels (Loop-4 iterations) at once in time-sharing: slices of
// kernels W0..W(Q-1) arrive on consecutive cycles for the same input slice,
// and each goes to its own accumulator. This datapath (XNOR, popcount, adder,
// Q registers of ceil(log2(Nk+1)) bits) follows the architecture.
//
// The kernel index and the first/last-slice flags arrive in a tag that
// travels with the kernel slice (this design's choice for the PE's control).
// On a tag with first set the accumulator restarts from the count; on a tag
// with last set the finished sum is also presented on res_sum with res_valid
// high for one cycle, one cycle after the slice was read.
//
// Timing: one slice per cycle, no stalls; an invalid tag leaves all
// accumulators unchanged. Accumulators reset to zero (synchronous, active-low rst_n).
module bnn_pe
  import bnn_pkg::*;
#(
  parameter  int unsigned K     = 3,
  parameter  int unsigned DU    = 6,   // Loop-2 unrolling d
  parameter  int unsigned Q     = 4,   // kernels computed concurrently
  parameter  int unsigned ACC_W = 11,  // ceil(log2(Nk+1))
  localparam int unsigned N     = K * K * DU,
  localparam int unsigned CW    = $clog2(N + 1),
  localparam int unsigned QW    = (Q > 1) ? $clog2(Q) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [K-1:0][K-1:0][DU-1:0]     win,     // [row][col][channel]
  input  logic [K-1:0][K-1:0][DU-1:0]     kern,    // same layout as win
  input  ktag_t                           tag,
  output logic                            res_valid,
  output logic [QW-1:0]                   res_q,
  output logic [ACC_W-1:0]                res_sum
);

  logic [CW-1:0]    cnt;
  logic [ACC_W-1:0] acc [Q];
  logic [ACC_W-1:0] sum;
  logic [QW-1:0]    qi;

  bnn_xnor_popcount #(.N(N)) u_fu (
    .a   (win),
    .w   (kern),
    .cnt (cnt)
  );

  assign qi  = tag.q[QW-1:0];
  assign sum = (tag.first ? '0 : acc[qi]) + ACC_W'(cnt);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < Q; i++) acc[i] <= '0;
      res_valid <= 1'b0;
      res_q     <= '0;
      res_sum   <= '0;
    end else begin
      res_valid <= 1'b0;
      if (tag.valid) begin
        acc[qi] <= sum;
        if (tag.last) begin
          res_valid <= 1'b1;
          res_q     <= qi;
          res_sum   <= sum;
        end
      end
    end
  end

  // The controller never issues a kernel index outside 0..Q-1.
  a_q_range : assert property (@(posedge clk) disable iff (!rst_n)
                               tag.valid |-> (tag.q < QIDX_W'(Q)));

endmodule
