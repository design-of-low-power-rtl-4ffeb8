// merge_adder: final carry-propagate row of the array multiplier.
//
// A BITS-wide ripple-carry adder that merges the carry and sum vectors left
// by the carry-save array into the upper product bits: bit 0 is a half
// adder, the others are full adders, and the carry ripples from bit 0
// upwards to cout. This is the bottom row (HA, FA, FA for a 4x4 multiplier)
// of the Braun schematics. Combinational.
module merge_adder #(
  parameter int unsigned BITS = 3
) (
  input  logic [BITS-1:0] x,
  input  logic [BITS-1:0] y,
  output logic [BITS-1:0] sum,
  output logic            cout
);
  logic [BITS:0] carry;   // carry[i]: carry into bit i

  assign carry[0] = 1'b0;

  for (genvar i = 0; i < BITS; i++) begin : g_bit
    if (i == 0) begin : g_ha
      half_adder u_ha (.x(x[i]), .y(y[i]), .s(sum[i]), .c(carry[i+1]));
    end else begin : g_fa
      full_adder u_fa (.x(x[i]), .y(y[i]), .cin(carry[i]), .s(sum[i]), .cout(carry[i+1]));
    end
  end

  assign cout = carry[BITS];
endmodule
