// full_adder: one-bit full adder, the FA cell of the multiplier array.
//
// Adds three bits x, y and cin and returns sum s and carry-out cout
// (s = x xor y xor cin, cout = majority of the three). Purely combinational,
// no clock. Written in data-flow style, as the array's leaf cells are.
module full_adder (
  input  logic x,
  input  logic y,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = x ^ y ^ cin;
  assign cout = (x & y) | (x & cin) | (y & cin);
endmodule
