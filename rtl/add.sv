// One-bit full adder: the 3:2 counter cell of the multiplier.
//
// Adds the two operand bits a and b and the incoming carry cin, and returns
// the sum bit and the carry-out bit (the carry is set when two or three of
// the inputs are 1). It is purely combinational. The Wallace tree and the
// ripple-carry final adder are built from this one cell, as the multiplier's
// description builds everything from repeated instances of a single full
// adder named `add`.
module add (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end

endmodule
