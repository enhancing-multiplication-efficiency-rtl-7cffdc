// Self-checking testbench for booth_pp_gen.
//
// The Booth controls are formed in the testbench from the multiplier's bits
// (not by booth_encoder). For each row i the expected value is
// d_i * A * 4^i modulo 2^64, with d_i the Booth digit; the generator's row
// plus its correction bit at position 2i must equal it. The sum of all rows
// must equal the signed product A * B.
module tb_booth_pp_gen;
  import booth_pkg::*;

  localparam int unsigned WIDTH = 32;
  localparam int unsigned NPP   = WIDTH / 2;
  localparam int unsigned PW    = 2 * WIDTH;

  logic [WIDTH-1:0]        mul1;
  booth_sel_t [NPP-1:0]    sel;
  logic [NPP:0][PW-1:0]    rows;
  int checks = 0;
  int failures = 0;

  booth_pp_gen #(.WIDTH(WIDTH)) dut (.mul1(mul1), .sel(sel), .rows(rows));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_pair(input logic [WIDTH-1:0] a, input logic [WIDTH-1:0] b);
    int          d [NPP];
    logic [PW-1:0] total;
    logic [PW-1:0] expect_row;
    longint      prod;
    for (int i = 0; i < NPP; i++) begin
      int bm1;
      bm1  = (i == 0) ? 0 : int'(b[2*i-1]);
      d[i] = -2 * int'(b[2*i+1]) + int'(b[2*i]) + bm1;
      sel[i].one = (d[i] == 1) || (d[i] == -1);
      sel[i].two = (d[i] == 2) || (d[i] == -2);
      sel[i].neg = (d[i] < 0);
    end
    mul1 = a;
    #1;
    total = '0;
    for (int i = 0; i <= NPP; i++) total += rows[i];
    for (int i = 0; i < NPP; i++) begin
      expect_row = PW'(longint'(d[i]) * longint'($signed(a))) << (2 * i);
      checks++;
      if (rows[i] + (PW'(rows[NPP][2*i]) << (2 * i)) != expect_row) begin
        failures++;
        $display("FAIL a=%h b=%h row %0d = %h corr=%0b expected %h",
                 a, b, i, rows[i], rows[NPP][2*i], expect_row);
      end
    end
    prod = longint'($signed(a)) * longint'($signed(b));
    checks++;
    if (total != PW'(prod)) begin
      failures++;
      $display("FAIL a=%h b=%h row sum %h expected %h", a, b, total, prod);
    end
  endtask

  initial begin
    check_pair(32'h8000_0000, 32'h8000_0000);
    check_pair(32'h7FFF_FFFF, 32'h8000_0000);
    check_pair(32'hFFFF_FFFF, 32'h8000_0000);
    check_pair(32'h0000_0000, 32'hFFFF_FFFF);
    check_pair(32'h1234_5678, 32'hAAAA_AAAA);
    for (int n = 0; n < 1000; n++) check_pair($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
