// Self-checking testbench for csa_row, the word-wide 3:2 compressor.
//
// For random rows x, y, z the outputs must satisfy sum + carry == x + y + z
// modulo 2^64, sum must be the bitwise parity and carry must have a zero
// least significant bit.
module tb_csa_row;

  localparam int unsigned WIDTH = 64;

  logic [WIDTH-1:0] x, y, z, sum, carry;
  int checks = 0;
  int failures = 0;

  csa_row #(.WIDTH(WIDTH)) dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      if (n == 0) begin
        x = '1; y = '1; z = '1;
      end else begin
        x = {$urandom, $urandom};
        y = {$urandom, $urandom};
        z = {$urandom, $urandom};
      end
      #1;
      checks++;
      if (WIDTH'(sum + carry) != WIDTH'(x + y + z) || sum != (x ^ y ^ z) || carry[0] != 1'b0) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h sum=%h carry=%h", x, y, z, sum, carry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
