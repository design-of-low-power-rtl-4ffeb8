// pp_gen: partial-product generator of the WIDTH x WIDTH array multiplier.
//
// Forms every partial-product bit pp[j][k] = a[k] & b[j], the a_k*b_j terms
// that enter the array cells. Row j of pp is the multiplicand gated by
// multiplier bit b[j]; column k is multiplier b gated by multiplicand bit
// a[k]. Purely combinational.
module pp_gen #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]             a,
  input  logic [WIDTH-1:0]             b,
  output logic [WIDTH-1:0][WIDTH-1:0]  pp   // pp[j][k] = a[k] & b[j]
);
  always_comb begin
    for (int j = 0; j < WIDTH; j++)
      pp[j] = a & {WIDTH{b[j]}};
  end
endmodule
