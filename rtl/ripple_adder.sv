// Ripple-carry adder: the final carry-propagate adder of the multiplier.
//
// Once the Wallace tree has left only two rows, an ordinary adder finishes
// the product. This one chains WIDTH full adders (the same `add` cell as the
// tree), the carry rippling from bit 0 upwards. sum and cout together form
// the WIDTH+1-bit result of a + b + cin.
//
// Combinational, no clock; the delay grows linearly with WIDTH. The
// description only asks for "an ordinary adder"; the ripple-carry form is
// this design's choice, as the simplest adder built from the full-adder
// cell.
module ripple_adder #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH:0] c;
  assign c[0] = cin;

  for (genvar j = 0; j < WIDTH; j++) begin : g_fa
    add u_add (
      .a   (a[j]),
      .b   (b[j]),
      .cin (c[j]),
      .sum (sum[j]),
      .cout(c[j+1])
    );
  end

  assign cout = c[WIDTH];

endmodule
