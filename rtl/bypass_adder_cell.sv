// bypass_adder_cell: adder cell (AC) of the two-dimensional bypassing array.
//
// The cell at column k, row j of the array adds its partial-product bit
// pp = a_k*b_j to the sum bit s_in arriving from the row above and, in all
// but the first row, to the carry bit c_in from the cell above it.
// Whenever pp is 0 and c_in is 0 the addition cannot change anything: the
// cell is bypassed. Its adder inputs are then forced to 0 (operand
// isolation, so the adder sees no switching), and two 2:1 multiplexers
// steer the incoming sum and carry straight to the outputs (s_out = s_in,
// c_out = c_in = 0). Otherwise the adder is enabled and its result is taken.
//
// pp is 0 when the multiplicand bit a_k is 0 (column bypass) or when the
// multiplier bit b_j is 0 (row bypass); a carry of 1 coming in forbids the
// bypass, which keeps the product exact. The mux structure (adder output on
// the "1" input, incoming sum and carry on the "0" input) follows the
// row-bypassing adding cell; using the combined enable pp | c_in in place
// of a single multiplier bit is how this design realises the 2-D bypass
// condition. The three-state input buffers of the classic adding cell are
// replaced by AND gating, which has the same effect on switching and stays
// synthesizable.
//
// HAS_CIN = 0 builds the first-row variant around a half adder; the first
// row receives no carries, so c_in must then be tied to 0 (asserted).
// Interface: pp, s_in, c_in in; s_out, c_out, bypassed out. Combinational.
module bypass_adder_cell #(
  parameter bit HAS_CIN = 1'b1
) (
  input  logic pp,
  input  logic s_in,
  input  logic c_in,
  output logic s_out,
  output logic c_out,
  output logic bypassed
);
  logic en;       // adder enabled
  logic add_s;    // adder sum
  logic add_c;    // adder carry

  assign en = pp | c_in;

  if (HAS_CIN) begin : g_fa
    full_adder u_fa (
      .x   (pp   & en),
      .y   (s_in & en),
      .cin (c_in & en),
      .s   (add_s),
      .cout(add_c)
    );
  end else begin : g_ha
    half_adder u_ha (
      .x(pp   & en),
      .y(s_in & en),
      .s(add_s),
      .c(add_c)
    );
    always_comb begin
      assert (c_in == 1'b0)
        else $error("bypass_adder_cell: carry into a half-adder cell");
    end
  end

  assign c_out    = en ? add_c : c_in;
  assign s_out    = en ? add_s : s_in;
  assign bypassed = ~en;
endmodule
