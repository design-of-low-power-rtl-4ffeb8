// mult2d_bypass: low-power WIDTH x WIDTH unsigned array multiplier with
// two-dimensional bypassing.
//
// p = a * b, computed combinationally by a Braun array: a partial-product
// generator (pp_gen), a carry-save array of adder cells (bypass_array) and a
// final ripple-carry row (merge_adder). Each array cell is switched off and
// bypassed when its partial product a_k*b_j and its incoming carry are both
// 0, so zero bits in the multiplicand (columns) and in the multiplier (rows)
// both save adder activity, while the product stays exact. The 4x4 default,
// the Braun array and the HA/FA arrangement follow the published
// schematics; the widening to any WIDTH >= 2 is this design's own.
//
// Interface: a (multiplicand) and b (multiplier), WIDTH bits each; p,
// 2*WIDTH bits; cell_bypassed[j][k], 1 when array cell (k,j) is bypassed
// for the present operands (an observation port; it drives nothing).
// Timing: purely combinational, no clock or reset; p is valid one
// combinational path delay after a and b settle.
module mult2d_bypass #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0]            a,
  input  logic [WIDTH-1:0]            b,
  output logic [2*WIDTH-1:0]          p,
  output logic [WIDTH-1:1][WIDTH-2:0] cell_bypassed
);
  logic [WIDTH-1:0][WIDTH-1:0] pp;
  logic [WIDTH-1:1]            p_mid;
  logic [WIDTH-2:0]            last_y;
  logic [WIDTH-2:0]            last_c;
  logic [WIDTH-2:0]            merge_sum;
  logic                        merge_cout;

  pp_gen #(.WIDTH(WIDTH)) u_pp (
    .a (a),
    .b (b),
    .pp(pp)
  );

  bypass_array #(.WIDTH(WIDTH)) u_array (
    .pp      (pp),
    .p_mid   (p_mid),
    .last_y  (last_y),
    .last_c  (last_c),
    .bypassed(cell_bypassed)
  );

  merge_adder #(.BITS(WIDTH-1)) u_merge (
    .x   (last_c),
    .y   (last_y),
    .sum (merge_sum),
    .cout(merge_cout)
  );

  assign p = {merge_cout, merge_sum, p_mid, pp[0][0]};
endmodule
