// tb_nitroecc_system: end-to-end test of the processor with its full-size
// memories (10,240 words each), driven only through the host port.
//
// For each example program (basic arithmetic, Schnorr signature generation,
// Jacobian point double of the secp256k1 generator) and a set of random
// programs, the host writes the program into the instruction memory, releases
// the memories, resets the core and raises execute, waits for halt, then reads
// the stack back word by word through the host port and compares it with the
// reference model. Clock counts are checked against the instruction timing
// table; some runs pause execution on the way.
module tb_nitroecc_system;
  import tb_nitroecc_pkg::*;

  logic        clock = 1'b0, reset = 1'b1, execute = 1'b0, halt;
  logic        host_sel = 1'b1, host_instr_we = 1'b0, host_stack_we = 1'b0;
  logic [13:0] host_instr_addr = '0, host_stack_addr = '0, instr_ptr, stack_ptr;
  mword_t      host_instr_wdata = '0, host_stack_wdata = '0, instr_dout, stack_dout;
  int          checks = 0, failures = 0, n_pauses = 0;

  nitroecc_system dut (
    .clock(clock), .reset(reset), .execute(execute), .halt(halt),
    .host_sel(host_sel), .host_instr_we(host_instr_we), .host_instr_addr(host_instr_addr),
    .host_instr_wdata(host_instr_wdata), .host_stack_we(host_stack_we),
    .host_stack_addr(host_stack_addr), .host_stack_wdata(host_stack_wdata),
    .instr_dout(instr_dout), .stack_dout(stack_dout),
    .instr_ptr(instr_ptr), .stack_ptr(stack_ptr)
  );

  always #5 clock = !clock;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic host_read_word(int e, output u256_t v);
    for (int k = 0; k < 4; k++) begin
      @(negedge clock); host_stack_addr = 14'(4 * e + k);
      @(negedge clock); v[64*(3-k) +: 64] = stack_dout;
    end
  endtask

  task automatic run(program_c pg, bit pause, string name, output ref_model_c m, output u256_t st[]);
    longint unsigned ran = 0;
    int n;
    m = new(10240 / 4, 10240);
    m.run(pg.words);
    // load the program and clear the part of the stack the program can reach
    @(negedge clock); host_sel = 1;
    for (int i = 0; i <= pg.words.size(); i++) begin
      host_instr_we = 1; host_instr_addr = 14'(i);
      host_instr_wdata = (i < pg.words.size()) ? pg.words[i] : '1;
      host_stack_we = 1; host_stack_addr = 14'(i); host_stack_wdata = '0;
      @(negedge clock);
    end
    host_instr_we = 0; host_stack_we = 0;
    host_sel = 0; reset = 1;
    @(negedge clock); reset = 0; execute = 1;
    while (!halt && ran < 1000000) begin
      if (pause && ($urandom % 40) === 0) begin
        execute = 0; n_pauses++;
        repeat (1 + $urandom % 6) @(negedge clock);
        execute = 1;
      end
      @(negedge clock); ran++;
    end
    expect_true(ran === m.cycles + 1, $sformatf("%s: %0d clocks, expected %0d", name, ran, m.cycles + 1));
    execute = 0; host_sel = 1;
    n = (pg.words.size() + 1) / 4;
    if (n > 40) n = 40;
    st = new[n];
    for (int e = 0; e < n; e++) begin
      host_read_word(e, st[e]);
      checks++;
      if (st[e] !== m.stack[e]) begin
        failures++;
        $display("FAIL %s: stack word %0d = %h, expected %h", name, e, st[e], m.stack[e]);
      end
    end
  endtask

  initial begin
    program_c   pg;
    ref_model_c m;
    u256_t      st[];
    u256_t      zi;
    automatic u256_t a0 = 256'h09cc57f2ca39c2d81aed7e3d82af0b5711863bd3403bb8f024c4c3b4ecf9652a;
    automatic u256_t b0 = 256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2;

    repeat (3) @(negedge clock);

    pg = new; prog_basic(pg, a0, b0); run(pg, 1, "basic", m, st);
    expect_true(st[1] === submod(a0, b0) && st[2] === mulmod(a0, b0), "basic results");

    pg = new; prog_schnorr(pg, a0, b0, GY); run(pg, 0, "schnorr", m, st);
    expect_true(st[2] === submod(GY, mulmod(a0, b0)), "schnorr result");

    pg = new; prog_point_double(pg, GX, GY, 256'd1); run(pg, 1, "point double", m, st);
    zi = invmod(st[11]);
    expect_true(mulmod(st[5], mulmod(zi, zi)) === G2X, "2G x");
    expect_true(mulmod(st[9], mulmod(zi, mulmod(zi, zi))) === G2Y, "2G y");

    // a second doubling, from the Jacobian result of the first: 4G
    begin
      automatic u256_t x2 = st[5], y2 = st[9], z2 = st[11], x4, y4, z4, s, mm;
      pg = new; prog_point_double(pg, x2, y2, z2); run(pg, 0, "point double of 2G", m, st);
      // Jacobian doubling by formula (a = 0): S = 4XY^2, M = 3X^2, Z' = 2YZ
      s  = mulmod(256'd4, mulmod(x2, mulmod(y2, y2)));
      mm = mulmod(256'd3, mulmod(x2, x2));
      x4 = submod(mulmod(mm, mm), mulmod(256'd2, s));
      y4 = submod(mulmod(mm, submod(s, x4)), mulmod(256'd8, mulmod(mulmod(y2, y2), mulmod(y2, y2))));
      z4 = mulmod(256'd2, mulmod(y2, z2));
      // the program uses M = 3X^2 (no Z^4 term) and Z' = 2Y*Z
      expect_true(st[5] === x4 && st[9] === y4 && st[11] === z4, "second doubling by formula");
    end

    for (int t = 0; t < 20; t++) begin
      pg = new;
      repeat (4) pg.dat(rand256());
      repeat (30) begin
        automatic int r = $urandom % 10;
        case (r)
          0, 1, 2: pg.op(8'(POPAA + $urandom % 8));
          3, 4:    pg.op(8'(PUSHAO + $urandom % 5));
          5:       pg.op(SWAP);
          6:       pg.op((($urandom % 2) !== 0) ? MUL : DIV);
          7:       pg.dat(rand256());
          8:       pg.op(DROP);
          default: pg.op(FORWARD);
        endcase
      end
      pg.op(HALT);
      run(pg, t % 3 === 0, $sformatf("random %0d", t), m, st);
    end
    expect_true(n_pauses > 0, "paused at least once");
    $display("pauses=%0d", n_pauses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
