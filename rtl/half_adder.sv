// half_adder: one-bit half adder, the HA cell of the multiplier array.
//
// Adds two bits x and y and returns their sum bit s and carry bit c
// (s = x xor y, c = x and y). Purely combinational, no clock. It is the
// textbook cell drawn in the first array row and at the start of the final
// carry-propagate row of the Braun multiplier; written in data-flow style.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
