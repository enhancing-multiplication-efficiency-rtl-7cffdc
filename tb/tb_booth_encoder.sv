// Self-checking testbench for booth_encoder.
//
// For random and corner-case multipliers the expected Booth digit of every
// group is worked out arithmetically, d = -2*b[2i+1] + b[2i] + b[2i-1], and
// compared with the encoder's one / two / neg controls. The digits are also
// summed with their weights 4^i and compared with the signed value of the
// multiplier. Each kind of digit (0, +1, +2, -1, -2 and the 111 group) is
// counted, and one that never occurs counts as a failure.
module tb_booth_encoder;
  import booth_pkg::*;

  localparam int unsigned WIDTH = 32;
  localparam int unsigned NPP   = WIDTH / 2;

  logic [WIDTH-1:0]        mul2;
  booth_sel_t [NPP-1:0]    sel;
  int checks = 0;
  int failures = 0;
  int seen [6];  // 0, +1, +2, -1, -2, group 111

  booth_encoder #(.WIDTH(WIDTH)) dut (.mul2(mul2), .sel(sel));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input logic [WIDTH-1:0] v);
    longint total;
    mul2 = v;
    #1;
    total = 0;
    for (int i = 0; i < NPP; i++) begin
      int d;
      int bm1;
      bm1 = (i == 0) ? 0 : int'(v[2*i-1]);
      d = -2 * int'(v[2*i+1]) + int'(v[2*i]) + bm1;
      total += longint'(d) * (longint'(1) << (2 * i));
      case (d)
        0:  seen[({v[2*i+1], v[2*i], 1'(bm1)} == 3'b111) ? 5 : 0]++;
        1:  seen[1]++;
        2:  seen[2]++;
        -1: seen[3]++;
        -2: seen[4]++;
        default: ;
      endcase
      checks++;
      if (sel[i].one != (d == 1 || d == -1) ||
          sel[i].two != (d == 2 || d == -2) ||
          sel[i].neg != (d < 0)) begin
        failures++;
        $display("FAIL mul2=%h group %0d digit %0d got one=%0b two=%0b neg=%0b",
                 v, i, d, sel[i].one, sel[i].two, sel[i].neg);
      end
    end
    checks++;
    if (total != longint'($signed(v))) begin
      failures++;
      $display("FAIL mul2=%h digit sum %0d", v, total);
    end
  endtask

  initial begin
    foreach (seen[k]) seen[k] = 0;
    check_one('0);
    check_one('1);
    check_one({1'b1, {(WIDTH-1){1'b0}}});
    check_one({1'b0, {(WIDTH-1){1'b1}}});
    check_one(32'h5555_5555);
    check_one(32'hAAAA_AAAA);
    check_one(32'h3333_3333);
    check_one(32'hCCCC_CCCC);
    for (int n = 0; n < 2000; n++) check_one($urandom);
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL digit kind %0d never occurred", k);
      end
    end
    $display("digit counts: 0=%0d +1=%0d +2=%0d -1=%0d -2=%0d g111=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
