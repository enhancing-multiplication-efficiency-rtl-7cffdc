// Self-checking testbench for ripple_adder.
//
// Random and corner-case operands with both carry-in values; {cout, sum}
// must equal the 65-bit sum a + b + cin.
module tb_ripple_adder;

  localparam int unsigned WIDTH = 64;

  logic [WIDTH-1:0] a, b, sum;
  logic             cin, cout;
  int checks = 0;
  int failures = 0;

  ripple_adder #(.WIDTH(WIDTH)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_add(input logic [WIDTH-1:0] x, input logic [WIDTH-1:0] y, input logic c);
    logic [WIDTH:0] expected;
    a = x; b = y; cin = c;
    #1;
    expected = {1'b0, x} + {1'b0, y} + {{WIDTH{1'b0}}, c};
    checks++;
    if ({cout, sum} != expected) begin
      failures++;
      $display("FAIL a=%h b=%h cin=%0b got %h expected %h", x, y, c, {cout, sum}, expected);
    end
  endtask

  initial begin
    check_add('1, '0, 1'b1);
    check_add('1, '1, 1'b1);
    check_add('0, '0, 1'b0);
    check_add({1'b1, {(WIDTH-1){1'b0}}}, {1'b1, {(WIDTH-1){1'b0}}}, 1'b0);
    for (int n = 0; n < 2000; n++) check_add({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
