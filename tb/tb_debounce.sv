// tb_debounce: self-checking test of the switch debouncer (COUNT reduced to
// 50 clocks).
//
// Checks that reset copies the input at once, that bursts of bounces shorter
// than the count never reach the output, and that a level held steady reaches
// the output exactly COUNT + 2 clocks after it is applied.
module tb_debounce;
  localparam int COUNT = 50;
  logic clock = 1'b0, reset = 1'b0, noisy = 1'b0, clean;
  int   checks = 0, failures = 0;

  debounce #(.COUNT(COUNT)) dut (.clock(clock), .reset(reset), .noisy(noisy), .clean(clean));

  always #5 clock = !clock;

  task automatic expect_clean(logic v, string what);
    checks++;
    if (clean !== v) begin failures++; $display("FAIL %s: clean=%b", what, clean); end
  endtask

  // hold noisy at v and return the clocks until clean === v
  task automatic settle(logic v, output int n);
    if (noisy === v) begin noisy = !v; @(negedge clock); end
    noisy = v; n = 0;
    while (clean !== v && n < 10 * COUNT) begin @(negedge clock); n++; end
  endtask

  initial begin
    int n;
    @(negedge clock); reset = 1; noisy = 1;
    @(negedge clock); reset = 0;
    expect_clean(1, "reset copies input");
    noisy = 0;
    @(negedge clock); reset = 1;
    @(negedge clock); reset = 0;
    expect_clean(0, "reset copies input low");
    for (int t = 0; t < 20; t++) begin
      // bounce: toggles closer together than COUNT
      repeat (1 + $urandom % 8) begin
        noisy = !noisy;
        repeat (1 + $urandom % (COUNT - 5)) @(negedge clock);
        expect_clean(t % 2 === 0 ? 0 : 1, "bounce filtered");
      end
      settle(t % 2 === 0 ? 1 : 0, n);
      checks++;
      if (n !== COUNT + 2) begin failures++; $display("FAIL settle took %0d clocks", n); end
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
