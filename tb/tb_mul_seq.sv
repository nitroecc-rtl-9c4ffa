// tb_mul_seq: self-checking test of the sequential modular multiplier.
//
// Runs the published test vectors and 200 random operand pairs. For each it
// pulses start, counts the clocks until out_valid, and compares the product
// with (a * b) mod P computed with a 512-bit product and remainder. The
// latency must be exactly 256 clocks. It also checks that ready/busy frame
// the computation, that a start while busy is ignored and that invalidate
// clears out_valid.
module tb_mul_seq;
  import tb_nitroecc_pkg::*;

  logic  clock = 1'b0, reset = 1'b1, start = 1'b0, invalidate = 1'b0;
  u256_t a, b, out;
  logic  ready, busy, out_valid;
  int    checks = 0, failures = 0;

  mul_seq dut (.clock(clock), .reset(reset), .start(start), .invalidate(invalidate),
               .multiplicand(a), .multiplier(b), .out(out),
               .ready(ready), .busy(busy), .out_valid(out_valid));

  always #5 clock = !clock;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(u256_t x, u256_t y, u256_t expected);
    int lat = 0;
    @(negedge clock); a = x; b = y; start = 1'b1;
    @(negedge clock); start = 1'b0;
    lat = 1;
    expect_true(busy && !ready && !out_valid, "busy after start");
    // change operands mid-way: the latched copies must be used
    a = rand256(); b = rand256();
    while (!out_valid && lat < 400) begin
      // a second start while busy must be ignored
      if (lat === 100) start = 1'b1; else start = 1'b0;
      @(negedge clock); lat++;
    end
    start = 1'b0;
    expect_true(lat - 1 === 256, $sformatf("latency %0d, expected 256", lat - 1));
    expect_true(ready && !busy, "ready after product");
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL %h * %h = %h, expected %h", x, y, out, expected);
    end
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 1'b0;
    run(256'h09cc57f2ca39c2d81aed7e3d82af0b5711863bd3403bb8f024c4c3b4ecf9652a,
        256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
        256'h98C40E99542A11A9EBB084E21DA7CB9397443C6A026097A892294AB8352668A1);
    run(256'hD32E1674426BB9251DF6E79F80D4518A2EBA853F9E0009656F2A2A56964903E4,
        256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
        256'h16E6559E8DEC319CAEFF16BD2FD4854FC5B51D92BD1FA9BE933ED17223728F4E);
    run('1, '1, mulmod('1, '1));
    run(P - 1, P - 1, 256'd1);
    run(P, 256'd5, '0);
    run('0, rand256(), '0);
    for (int i = 0; i < 200; i++) begin
      automatic u256_t x = rand256(), y = rand256();
      run(x, y, mulmod(x, y));
    end
    // invalidate clears the valid flag
    @(negedge clock); invalidate = 1'b1;
    @(negedge clock); invalidate = 1'b0;
    expect_true(!out_valid, "invalidate clears out_valid");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
