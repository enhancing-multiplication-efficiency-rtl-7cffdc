// Carry-save adder row (3:2 compressor over a whole word).
//
// Three WIDTH-bit rows x, y and z are added bit by bit with WIDTH full
// adders. The sum bits form one output row; the carry bits, which weigh
// twice as much, form the other row, shifted left by one bit. The carry out
// of the top bit is dropped, so sum + carry equals x + y + z modulo
// 2^WIDTH, which is all the multiplier needs since its product is taken
// modulo 2^WIDTH as well.
//
// Combinational, no clock. This is one reduction cell of the Wallace tree:
// "three partial products are added to produce two outputs".
module csa_row #(
  parameter int unsigned WIDTH = 64
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic [WIDTH-1:0] z,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] carry
);

  logic [WIDTH-1:0] c;

  for (genvar j = 0; j < WIDTH; j++) begin : g_fa
    add u_add (
      .a   (x[j]),
      .b   (y[j]),
      .cin (z[j]),
      .sum (sum[j]),
      .cout(c[j])
    );
  end

  // c[WIDTH-1] weighs 2^WIDTH and falls outside the result.
  assign carry = {c[WIDTH-2:0], 1'b0};

endmodule
