// Wallace tree: reduces N_ROWS addend rows to two rows in parallel.
//
// At every level the rows are taken three at a time and each triple is
// replaced by a sum row and a carry row (csa_row, a word of full adders);
// the one or two rows left over at a level pass straight to the next. A
// level with n rows thus leaves 2*floor(n/3) + n mod 3 rows, and levels are
// added until two rows remain. For the 32-bit multiplier the 16 Booth
// partial products plus the correction row give 17 rows, reduced through
// 12, 8, 6, 4 and 3 to 2 rows in six full-adder levels.
//
// Interface: rows[r] are the inputs, all WIDTH bits and already aligned;
// sum_row + carry_row equals the sum of all rows modulo 2^WIDTH.
// Combinational, no clock. The 3-to-2 reduction per level follows the
// multiplier's description; grouping rows in index order at every level
// is this design's choice.
module wallace_tree #(
  parameter int unsigned N_ROWS = 17,
  parameter int unsigned WIDTH  = 64
) (
  input  logic [N_ROWS-1:0][WIDTH-1:0] rows,
  output logic [WIDTH-1:0]             sum_row,
  output logic [WIDTH-1:0]             carry_row
);

  // Number of rows present at the input of level lvl.
  function automatic int unsigned rows_at(input int unsigned lvl);
    int unsigned n = N_ROWS;
    for (int unsigned k = 0; k < lvl; k++) begin
      if (n > 2) n = 2 * (n / 3) + (n % 3);
    end
    return n;
  endfunction

  // Number of levels needed to reach two rows.
  function automatic int unsigned num_levels();
    int unsigned n = N_ROWS;
    int unsigned l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned N  = rows_at(l);
    localparam int unsigned G  = N / 3;
    localparam int unsigned NN = rows_at(l + 1);

    logic [WIDTH-1:0] cur [N];
    logic [WIDTH-1:0] nxt [NN];

    if (l == 0) begin : g_in
      for (genvar r = 0; r < N; r++) begin : g_r
        assign cur[r] = rows[r];
      end
    end else begin : g_prev
      for (genvar r = 0; r < N; r++) begin : g_r
        assign cur[r] = g_lvl[l-1].nxt[r];
      end
    end

    for (genvar k = 0; k < G; k++) begin : g_csa
      csa_row #(.WIDTH(WIDTH)) u_csa (
        .x    (cur[3*k]),
        .y    (cur[3*k+1]),
        .z    (cur[3*k+2]),
        .sum  (nxt[2*k]),
        .carry(nxt[2*k+1])
      );
    end

    for (genvar r = 0; r < N - 3 * G; r++) begin : g_pass
      assign nxt[2*G+r] = cur[3*G+r];
    end
  end

  assign sum_row   = g_lvl[LEVELS-1].nxt[0];
  assign carry_row = g_lvl[LEVELS-1].nxt[1];

  initial begin
    assert (N_ROWS >= 3) else $error("wallace_tree: N_ROWS must be at least 3");
  end

endmodule
