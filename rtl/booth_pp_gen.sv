// Booth partial product generator.
//
// For every Booth group i the generator picks a multiple of the signed
// multiplicand A (mul1): 0, A or 2A, and for the subtracting groups the
// one's complement of that value. A and 2A are formed as WIDTH+1-bit signed
// values (2A is A shifted left by one bit), so the selected row is exact
// before it is sign-extended to the 2*WIDTH-bit product width and shifted
// left by 2*i bits. The +1 that turns each one's complement into a two's
// complement is not added here: it is collected, one bit per group at bit
// position 2*i, into one extra correction row, which the Wallace tree adds
// together with the partial products.
//
// Interface: rows[i] for i < WIDTH/2 is partial product i, already aligned
// and sign-extended; rows[WIDTH/2] is the correction row. The sum of all
// rows modulo 2^(2*WIDTH) is the signed product. Combinational, no clock.
// Inverting A and A shifted left by one bit for the subtracting groups
// follows the multiplier's description; sign extension to the full width
// and the separate correction row are this design's choices.
module booth_pp_gen
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]                  mul1,
  input  booth_sel_t [WIDTH/2-1:0]          sel,
  output logic [WIDTH/2:0][2*WIDTH-1:0]     rows
);

  localparam int unsigned NPP = WIDTH / 2;
  localparam int unsigned PW  = 2 * WIDTH;

  // Candidate multiples, WIDTH+1 bits wide.
  logic [WIDTH:0] a_x1, a_x2, a_x1_inv, a_x2_inv;
  assign a_x1     = {mul1[WIDTH-1], mul1};
  assign a_x2     = {mul1, 1'b0};
  assign a_x1_inv = ~a_x1;
  assign a_x2_inv = ~a_x2;

  logic [NPP-1:0] neg_bits;

  for (genvar i = 0; i < NPP; i++) begin : g_pp
    logic [WIDTH:0] pick;
    logic [PW-1:0]  ext;

    always_comb begin
      unique case ({sel[i].neg, sel[i].two, sel[i].one})
        3'b001:  pick = a_x1;
        3'b010:  pick = a_x2;
        3'b101:  pick = a_x1_inv;
        3'b110:  pick = a_x2_inv;
        default: pick = '0;
      endcase
    end

    // Sign-extend the WIDTH+1-bit row to the product width, then align it.
    assign ext          = {{(PW - WIDTH - 1){pick[WIDTH]}}, pick};
    assign rows[i]      = ext << (2 * i);
    assign neg_bits[i]  = sel[i].neg;
  end

  // Correction row: the +1 of each negated row, at that row's weight.
  always_comb begin
    rows[NPP] = '0;
    for (int i = 0; i < NPP; i++) begin
      rows[NPP][2*i] = neg_bits[i];
    end
  end

endmodule
