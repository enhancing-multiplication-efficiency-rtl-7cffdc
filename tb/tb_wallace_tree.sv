// Self-checking testbench for wallace_tree.
//
// Seventeen random 64-bit rows (the multiplier's configuration: sixteen
// Booth partial products and one correction row) are applied; the two
// output rows must add up to the sum of the inputs modulo 2^64. Rows of all
// ones, single set bits and zeros are applied too.
module tb_wallace_tree;

  localparam int unsigned N_ROWS = 17;
  localparam int unsigned WIDTH  = 64;

  logic [N_ROWS-1:0][WIDTH-1:0] rows;
  logic [WIDTH-1:0]             sum_row, carry_row;
  int checks = 0;
  int failures = 0;

  wallace_tree #(.N_ROWS(N_ROWS), .WIDTH(WIDTH)) dut (
    .rows(rows), .sum_row(sum_row), .carry_row(carry_row)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_rows();
    logic [WIDTH-1:0] total;
    #1;
    total = '0;
    for (int r = 0; r < N_ROWS; r++) total += rows[r];
    checks++;
    if (WIDTH'(sum_row + carry_row) != total) begin
      failures++;
      $display("FAIL sum_row=%h carry_row=%h expected total %h", sum_row, carry_row, total);
    end
  endtask

  initial begin
    for (int r = 0; r < N_ROWS; r++) rows[r] = '1;
    check_rows();
    for (int r = 0; r < N_ROWS; r++) rows[r] = '0;
    check_rows();
    // One set bit in a single row at a time: tests every row's path.
    for (int r = 0; r < N_ROWS; r++) begin
      for (int q = 0; q < N_ROWS; q++) rows[q] = '0;
      rows[r] = WIDTH'(1) << (r * 3);
      check_rows();
    end
    for (int n = 0; n < 1000; n++) begin
      for (int r = 0; r < N_ROWS; r++) rows[r] = {$urandom, $urandom};
      check_rows();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
