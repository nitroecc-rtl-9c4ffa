// debounce: filters a bouncing switch input.
//
// The last raw level seen is kept in a register; every change restarts a
// counter, and only when the raw level has stayed unchanged for COUNT clocks
// is it copied to the clean output. reset loads the raw level straight into
// both registers, so a switch that is itself wired to reset takes effect at
// once when it goes high (and is filtered when it goes low).
//
// Interface: clock, reset (synchronous, active high), noisy in, clean out.
// Timing: a level held steady shows on clean COUNT + 2 clocks after it is
// applied (one clock to sample it, COUNT to count, one to copy it).
//
// From the design: the algorithm and the count of 1,000,000 clocks (about
// 67 ms at the board's 15 MHz clock).
module debounce #(
  parameter int unsigned COUNT = 1_000_000
) (
  input  logic clock,
  input  logic reset,
  input  logic noisy,
  output logic clean
);

  localparam int unsigned CNT_W = $clog2(COUNT + 1);

  logic             last;
  logic [CNT_W-1:0] count;

  always_ff @(posedge clock) begin
    if (reset) begin
      last  <= noisy;
      clean <= noisy;
      count <= '0;
    end else if (noisy != last) begin
      last  <= noisy;
      count <= '0;
    end else if (count == CNT_W'(COUNT)) begin
      clean <= last;
    end else begin
      count <= count + 1'b1;
    end
  end

endmodule
