// tb_div_seq: self-checking test of the sequential divider.
//
// Runs the published test vectors, division by zero and 200 random pairs
// (divisors of random width so that quotients of every size occur). Quotient
// and remainder are compared with the / and % operators, and the latency from
// start to out_valid must be exactly 256 clocks.
module tb_div_seq;
  import tb_nitroecc_pkg::*;

  logic  clock = 1'b0, reset = 1'b1, start = 1'b0, invalidate = 1'b0;
  u256_t a, b, q, r;
  logic  ready, busy, out_valid;
  int    checks = 0, failures = 0;

  div_seq dut (.clock(clock), .reset(reset), .start(start), .invalidate(invalidate),
               .a(a), .b(b), .q(q), .r(r),
               .ready(ready), .busy(busy), .out_valid(out_valid));

  always #5 clock = !clock;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run(u256_t x, u256_t y, u256_t eq, u256_t er);
    int lat;
    @(negedge clock); a = x; b = y; start = 1'b1;
    @(negedge clock); start = 1'b0; lat = 1;
    expect_true(busy && !out_valid, "busy after start");
    a = rand256(); b = rand256();
    while (!out_valid && lat < 400) begin @(negedge clock); lat++; end
    expect_true(lat - 1 === 256, $sformatf("latency %0d, expected 256", lat - 1));
    checks++;
    if (q !== eq || r !== er) begin
      failures++;
      $display("FAIL %h / %h: q=%h r=%h, expected q=%h r=%h", x, y, q, r, eq, er);
    end
  endtask

  initial begin
    repeat (3) @(negedge clock);
    reset = 1'b0;
    run(256'h09cc57f2ca39c2d81aed7e3d82af0b5711863bd3403bb8f024c4c3b4ecf9652a,
        256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
        256'h0,
        256'h09CC57F2CA39C2D81AED7E3D82AF0B5711863BD3403BB8F024C4C3B4ECF9652A);
    run(256'hD32E1674426BB9251DF6E79F80D4518A2EBA853F9E0009656F2A2A56964903E4,
        256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2,
        256'h0D,
        256'h059A15E21444480509FEF2BAED8FB3827DAEB0A66E3D8979B9BD692F5AD8E30A);
    run(256'd12345, 256'd0, '1, 256'd12345);
    run('1, 256'd1, '1, '0);
    for (int i = 0; i < 200; i++) begin
      automatic u256_t x = rand256(), y = rand256() >> ($urandom % 256);
      if (y === 0) y = 256'd3;
      run(x, y, x / y, x % y);
    end
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
