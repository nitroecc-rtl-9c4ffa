// tb_bram_sp: self-checking test of the single-port block RAM at its full
// 10,240 x 64 size.
//
// Writes random words to random addresses, keeping a copy in a testbench
// array, then reads them back and checks the one-clock read latency, the
// read-before-write behaviour and that dout holds while en is low.
module tb_bram_sp;
  logic        clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [13:0] addr = '0;
  logic [63:0] din = '0, dout;
  logic [63:0] model [10240];
  bit          written [10240];
  int          checks = 0, failures = 0;

  bram_sp dut (.clk(clk), .en(en), .we(we), .addr(addr), .din(din), .dout(dout));

  always #5 clk = !clk;

  task automatic chk(logic [63:0] expected, string what);
    checks++;
    if (dout !== expected) begin
      failures++;
      $display("FAIL %s: dout=%h expected=%h", what, dout, expected);
    end
  endtask

  initial begin
    // fill every word once, so reads are defined
    for (int i = 0; i < 10240; i++) begin
      @(negedge clk); en = 1; we = 1; addr = 14'(i); din = {$urandom, $urandom};
      model[i] = din;
    end
    // random read / write mix
    for (int i = 0; i < 20000; i++) begin
      automatic int a = $urandom % 10240;
      automatic bit w = ($urandom % 3) === 0;
      automatic logic [63:0] old = model[a];
      @(negedge clk); en = 1; we = w; addr = 14'(a); din = {$urandom, $urandom};
      if (w) model[a] = din;
      @(negedge clk); en = 0; we = 0;
      chk(old, "read (old contents on write)");
      // en low: output holds
      addr = 14'($urandom % 10240);
      @(negedge clk);
      chk(old, "hold while en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
