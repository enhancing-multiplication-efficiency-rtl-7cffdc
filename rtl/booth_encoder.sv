// Radix-4 Booth encoder for the multiplier operand.
//
// The WIDTH-bit two's-complement multiplier is split into WIDTH/2
// overlapping three-bit groups: group i is {b[2i+1], b[2i], b[2i-1]}, with a
// 0 appended below bit 0 for the first group. Each group is decoded into a
// booth_sel_t (one / two / neg) that tells the partial product generator
// which multiple of the multiplicand to use: 0, +A, +2A, -A or -2A. Because
// the top group reads the sign bit b[WIDTH-1] with weight -2, the recoded
// digits sum to the signed value of b, so no extra group is needed.
//
// Interface: mul2 is the multiplier; sel[i] is the selection for partial
// product i, whose weight is 4^i. Combinational, no clock.
// The grouping follows the multiplier's description (groups taken at odd
// bit positions 1, 3, ... 31); WIDTH must be even.
module booth_encoder
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]                 mul2,
  output booth_sel_t [WIDTH/2-1:0]         sel
);

  // Multiplier with the implicit 0 appended below bit 0.
  logic [WIDTH:0] ext;
  assign ext = {mul2, 1'b0};

  for (genvar i = 0; i < WIDTH / 2; i++) begin : g_grp
    assign sel[i] = booth_decode(ext[2*i+2 -: 3]);
  end

  initial begin
    assert (WIDTH % 2 == 0 && WIDTH >= 4)
      else $error("booth_encoder: WIDTH must be even and at least 4");
  end

endmodule
