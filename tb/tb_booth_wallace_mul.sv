// End-to-end self-checking testbench for the 32-bit signed multiplier.
//
// The multiplier runs at its default width. A free-running clock paces the
// test as a source of operands: at every rising edge new operands are
// applied, and since the multiplier is combinational the product is
// checked half a period later, against the testbench's own 64-bit signed
// multiplication. The sequence is: the six operand pairs of a published
// simulation trace, corner cases (most negative and most positive values,
// zero, one, minus one), alternating bit patterns, then random operands.
//
// Coverage counters: every kind of Booth digit (0, +1, +2, -1, -2 and the
// 111 group) must appear in the multiplier operand, every combination of
// operand signs must occur, and the corner cases most-negative squared and
// a zero operand must be hit; one that never happens counts as a failure.
module tb_booth_wallace_mul;

  localparam int unsigned WIDTH    = 32;
  localparam int unsigned NPP      = WIDTH / 2;
  localparam int unsigned N_RANDOM = 20000;

  logic signed [WIDTH-1:0]   I_mul_1, I_mul_2;
  logic signed [2*WIDTH-1:0] O_dataout;
  logic clk = 1'b0;
  int checks = 0;
  int failures = 0;
  int cycles = 0;

  int seen_digit [6];  // 0, +1, +2, -1, -2, group 111
  int seen_sign  [4];  // {sign A, sign B}
  int seen_min_sq = 0;
  int seen_zero   = 0;

  booth_wallace_mul dut (
    .I_mul_1  (I_mul_1),
    .I_mul_2  (I_mul_2),
    .O_dataout(O_dataout)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (N_RANDOM + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [WIDTH-1:0] a, input logic [WIDTH-1:0] b);
    longint expected;
    logic [WIDTH:0] ext;
    @(posedge clk);
    I_mul_1 = a;
    I_mul_2 = b;
    @(negedge clk);
    expected = longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (O_dataout !== expected) begin
      failures++;
      $display("FAIL %0d * %0d = %0d, expected %0d",
               $signed(a), $signed(b), O_dataout, expected);
    end
    ext = {b, 1'b0};
    for (int i = 0; i < NPP; i++) begin
      case (ext[2*i+2 -: 3])
        3'b000:          seen_digit[0]++;
        3'b001, 3'b010:  seen_digit[1]++;
        3'b011:          seen_digit[2]++;
        3'b101, 3'b110:  seen_digit[3]++;
        3'b100:          seen_digit[4]++;
        default:         seen_digit[5]++;
      endcase
    end
    seen_sign[{a[WIDTH-1], b[WIDTH-1]}]++;
    if (a == {1'b1, {(WIDTH-1){1'b0}}} && b == a) seen_min_sq++;
    if (a == '0 || b == '0) seen_zero++;
  endtask

  localparam logic [WIDTH-1:0] MINV = {1'b1, {(WIDTH-1){1'b0}}};
  localparam logic [WIDTH-1:0] MAXV = {1'b0, {(WIDTH-1){1'b1}}};

  initial begin
    int start_cycle;
    foreach (seen_digit[k]) seen_digit[k] = 0;
    foreach (seen_sign[k]) seen_sign[k] = 0;
    I_mul_1 = 2;
    I_mul_2 = 2;

    // Operand pairs of the published trace.
    apply(-32'sd487095099,  -32'sd720121174);
    apply( 32'sd1924134885, -32'sd1143836041);
    apply(-32'sd1993157102,  32'sd1206705039);
    apply( 32'sd2033215986, -32'sd411658546);
    apply(-32'sd201295128,  -32'sd490058043);
    apply( 32'sd777537884,  -32'sd561108803);

    // Corner cases.
    apply(MINV, MINV);
    apply(MINV, MAXV);
    apply(MAXV, MAXV);
    apply(MINV, '1);
    apply('1, MINV);
    apply('1, '1);
    apply('0, MINV);
    apply(MAXV, '0);
    apply(32'd1, MINV);
    apply(32'h5555_5555, 32'hAAAA_AAAA);
    apply(32'hAAAA_AAAA, 32'h3333_3333);
    apply(32'hCCCC_CCCC, 32'h5555_5555);

    start_cycle = cycles;
    for (int n = 0; n < N_RANDOM; n++) begin
      apply($urandom, $urandom);
    end
    // One new product per clock: the loop must take exactly N_RANDOM cycles.
    checks++;
    if (cycles - start_cycle != N_RANDOM) begin
      failures++;
      $display("FAIL %0d products took %0d cycles", N_RANDOM, cycles - start_cycle);
    end

    foreach (seen_digit[k]) begin
      checks++;
      if (seen_digit[k] == 0) begin
        failures++;
        $display("FAIL Booth digit kind %0d never occurred", k);
      end
    end
    foreach (seen_sign[k]) begin
      checks++;
      if (seen_sign[k] == 0) begin
        failures++;
        $display("FAIL sign combination %0d never occurred", k);
      end
    end
    checks++;
    if (seen_min_sq == 0 || seen_zero == 0) begin
      failures++;
      $display("FAIL corner cases not reached");
    end
    $display("Booth digits: 0=%0d +1=%0d +2=%0d -1=%0d -2=%0d g111=%0d",
             seen_digit[0], seen_digit[1], seen_digit[2], seen_digit[3],
             seen_digit[4], seen_digit[5]);
    $display("signs ++=%0d +-=%0d -+=%0d --=%0d, min*min=%0d, zero operand=%0d",
             seen_sign[0], seen_sign[1], seen_sign[2], seen_sign[3],
             seen_min_sq, seen_zero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
