// Binary multiply-and-sum unit of a processing element.
//
// With +1 coded as logic 1 and -1 as logic 0, the product of a binarized
// activation and a binarized weight is their XNOR, and the sum of N such
// products is fixed by the number of ones among the XNOR results: the +-1 sum
// equals 2*cnt - N. The unit therefore forms the N XNORs and counts the ones.
// Both the XNOR product and the popcount follow the architecture's
// functional unit; the flat adder chain is this design's choice and is left
// to synthesis to restructure.
//
// Interface: a and w are N-bit vectors (bit i of a pairs with bit i of w);
// cnt is the number of positions where they agree. Purely combinational.
module bnn_xnor_popcount #(
  parameter  int unsigned N  = 54,
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  w,
  output logic [CW-1:0] cnt
);

  logic [N-1:0] prod;

  assign prod = ~(a ^ w);

  always_comb begin
    cnt = '0;
    for (int i = 0; i < N; i++) cnt += CW'(prod[i]);
  end

endmodule
