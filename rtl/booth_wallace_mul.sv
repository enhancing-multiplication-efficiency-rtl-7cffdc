// Signed multiplier with radix-4 Booth recoding and a Wallace tree.
//
// The product of two WIDTH-bit two's-complement numbers is formed in three
// combinational steps:
//   1. booth_encoder recodes the multiplier I_mul_2 into WIDTH/2 digits in
//      {-2, -1, 0, +1, +2}, halving the number of partial products;
//   2. booth_pp_gen turns each digit into a partial product from the
//      multiplicand I_mul_1 (0, A, 2A or their one's complements), aligned
//      and sign-extended to 2*WIDTH bits, plus one row of +1 corrections for
//      the negated digits;
//   3. wallace_tree adds those WIDTH/2 + 1 rows in carry-save form down to
//      two rows, and ripple_adder adds the last two.
// O_dataout is the full 2*WIDTH-bit signed product; the adder's carry out
// (bit 2*WIDTH of the internal 2*WIDTH+1-bit sum) lies beyond the product
// and is not used.
//
// Interface: I_mul_1, I_mul_2 signed WIDTH-bit operands; O_dataout signed
// 2*WIDTH-bit product. There is no clock: the product follows the operands
// after the combinational delay. Port names, the 32-bit default and the
// Booth / Wallace / full-adder structure follow the multiplier's
// description; the parameterised width, the correction row and the
// ripple-carry final adder are this design's choices.
module booth_wallace_mul
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic signed [WIDTH-1:0]   I_mul_1,
  input  logic signed [WIDTH-1:0]   I_mul_2,
  output logic signed [2*WIDTH-1:0] O_dataout
);

  localparam int unsigned NPP = WIDTH / 2;
  localparam int unsigned PW  = 2 * WIDTH;

  booth_sel_t [NPP-1:0]      sel;
  logic [NPP:0][PW-1:0]      S_data_n;   // partial products + correction row
  logic [PW-1:0]             S_data_s;   // Wallace tree sum row
  logic [PW-1:0]             S_data_c;   // Wallace tree carry row
  logic [PW:0]               S_sum;      // final sum with its carry out

  booth_encoder #(.WIDTH(WIDTH)) u_enc (
    .mul2(I_mul_2),
    .sel (sel)
  );

  booth_pp_gen #(.WIDTH(WIDTH)) u_ppg (
    .mul1(I_mul_1),
    .sel (sel),
    .rows(S_data_n)
  );

  wallace_tree #(.N_ROWS(NPP + 1), .WIDTH(PW)) u_tree (
    .rows     (S_data_n),
    .sum_row  (S_data_s),
    .carry_row(S_data_c)
  );

  ripple_adder #(.WIDTH(PW)) u_cpa (
    .a   (S_data_s),
    .b   (S_data_c),
    .cin (1'b0),
    .sum (S_sum[PW-1:0]),
    .cout(S_sum[PW])
  );

  assign O_dataout = S_sum[PW-1:0];

endmodule
