// On-chip buffer (OCB) for the kernels in use.
//
// Kernels are read once from external memory and kept on chip for as long
// as the array works with them, so the same kernel is never fetched twice
// while the array sweeps all output tiles. The buffer holds Q kernels of NS
// slices each; one word is one K x K x d kernel slice, the amount a PE
// consumes per cycle. Word address = q * NS + slice. Input data is not
// buffered here. Keeping only kernels on chip follows the architecture; the
// word organisation, the single write port and the one-cycle synchronous
// read are this design's choices.
//
// Interface: write port (we, waddr, wdata); read port (raddr, rdata) with
// rdata valid one cycle after raddr. A read of the address written in the
// same cycle returns the old word.
module bnn_ocb #(
  parameter  int unsigned WORD_W = 54,      // K*K*d
  parameter  int unsigned DEPTH  = 88,      // Q * number of slices
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [WORD_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [WORD_W-1:0] rdata
);

  logic [WORD_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
