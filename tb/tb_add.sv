// Self-checking testbench for the one-bit full adder `add`.
//
// All eight input combinations are applied; the expected sum and carry are
// the two bits of the integer count of ones among a, b and cin.
module tb_add;

  logic a, b, cin, sum, cout;
  int   checks = 0;
  int   failures = 0;

  add dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, cin} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} != 2'(ones)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
