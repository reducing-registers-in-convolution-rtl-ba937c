// Shared types and size formulas for the register-bridge binarized-CNN array.
//
// A convolution layer is computed by a row-of-columns systolic array. Every
// kernel slice that enters the array carries a small tag (ktag_t) that tells
// each processing element which of the Q concurrently computed kernels the
// slice belongs to and whether it is the first or last Loop-2 slice of a
// sum. The size functions give the register widths the architecture needs:
// the accumulator width ceil(log2(Nk+1)) for a kernel of Nk weights, and the
// number of input columns held by the bridge register of column c, which is
// K + (X-1) - c when X PEs sit in a row and c counts columns from the side
// the data enters. The formulas follow the register-count analysis of the
// architecture; the tag and its field widths are this design's own choice.
package bnn_pkg;

  // Width of the kernel index carried in a tag (allows up to 256 kernels in
  // flight at once, far more than any configuration uses).
  localparam int unsigned QIDX_W = 8;

  typedef struct packed {
    logic              valid;  // a kernel slice is present
    logic [QIDX_W-1:0] q;      // which of the Q concurrent kernels
    logic              first;  // first Loop-2 slice: start a new sum
    logic              last;   // last Loop-2 slice: the sum is complete
  } ktag_t;

  // Bits of one accumulator for a kernel of nk binary weights.
  function automatic int unsigned acc_width(input int unsigned nk);
    return $clog2(nk + 1);
  endfunction

  // Input columns held by the bridge register in column c of a row of x PEs
  // with a k-wide kernel (c = 0 is where data enters the row).
  function automatic int unsigned breg_cols(input int unsigned k, input int unsigned x,
                                            input int unsigned c);
    return k + x - 1 - c;
  endfunction

  // Number of Loop-2 slices of depth d needed for in_ch input channels.
  function automatic int unsigned num_slices(input int unsigned in_ch, input int unsigned d);
    return (in_ch + d - 1) / d;
  endfunction

endpackage
