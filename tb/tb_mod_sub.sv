// tb_mod_sub: self-checking test of the modular subtracter.
//
// Applies the published test vectors and 2,000 random operand pairs (half of
// them pushed near or above the prime) and compares out, one clock later,
// with (a - b) mod P worked out with wide integer arithmetic.
module tb_mod_sub;
  import tb_nitroecc_pkg::*;

  logic  clock = 1'b0;
  u256_t a, b, out;
  int    checks = 0, failures = 0;

  mod_sub dut (.clock(clock), .a(a), .b(b), .out(out));

  always #5 clock = !clock;

  task automatic check(u256_t x, u256_t y, u256_t expected);
    @(negedge clock); a = x; b = y;
    @(negedge clock);                       // one rising edge later
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h out=%h expected=%h", x, y, out, expected);
    end
  endtask

  initial begin
    // vectors with their published differences
    check(256'h09cc57f2ca39c2d81aed7e3d82af0b5711863bd3403bb8f024c4c3b4ecf9652a,
          256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
          256'hF9FC09229F4A6B5F7BDA6B6701339CB8F0368DEEDA19118F3E328D75D4B5AD97);
    check(256'hD32E1674426BB9251DF6E79F80D4518A2EBA853F9E0009656F2A2A56964903E4,
          256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
          256'hC35DC7A4177C61AC7EE3D4C8FF58E2EC0D6AD75B37DD62048897F4187E055022);
    // edge cases
    check('0, '0, '0);
    check(256'd1, 256'd2, P - 1);
    check(P - 1, P - 1, '0);
    check('1, '1, submod('1, '1));
    check('1, 256'hFF04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
          submod('1, 256'hFF04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2));
    for (int i = 0; i < 2000; i++) begin
      automatic u256_t x = rand256(), y = rand256();
      if (i % 2 === 1) begin x = P - (x >> 200); y = ~(y >> 220); end
      check(x, y, submod(x, y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
