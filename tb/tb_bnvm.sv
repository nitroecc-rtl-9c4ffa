// tb_bnvm: self-checking test of the NitroECC processor with its two memories
// (a 512-word instruction memory and a 64-word stack memory, 16 stack words,
// so that the stack-full cases are quick to reach).
//
// Each test loads a program into the instruction memory, clears the stack
// memory, resets the core, runs it to halt and then compares
//   * every stack word in memory with the reference model's stack,
//   * the number of clocks the core ran with the model's count, which adds
//     up the per-instruction timing of the instruction set (2 clocks for
//     drop/forward, 3 for halt, 6 for data/pop/push, 18 for swap, 258 for
//     mul/div), plus the one start-up clock after reset.
// Programs: the three example programs (basic arithmetic, Schnorr signature,
// Jacobian point double of the secp256k1 generator, checked against the known
// 2G), hand-made programs for each halt condition, and random programs over
// the whole instruction set. About half the runs pause execution at random
// times, which must change nothing but the wall-clock time.
module tb_bnvm;
  import tb_nitroecc_pkg::*;

  localparam int IMEM_DEPTH  = 512;
  localparam int STACK_DEPTH = 64;
  localparam int ENTRIES     = STACK_DEPTH / 4;

  logic        clock = 1'b0, reset = 1'b1, execute = 1'b0;
  logic        halt, instr_ena, stack_ena, stack_we;
  logic [13:0] instr_ptr, stack_ptr;
  mword_t      instr_data, stack_data, wstack_data;
  int          checks = 0, failures = 0;
  int          n_pauses = 0, n_error_halts = 0, n_runs = 0;
  int unsigned op_seen [256];

  bnvm #(.IMEM_DEPTH(IMEM_DEPTH), .STACK_DEPTH(STACK_DEPTH)) dut (
    .clock(clock), .reset(reset), .execute(execute), .halt(halt),
    .instr_ptr(instr_ptr), .instr_ena(instr_ena), .instr_data(instr_data),
    .stack_ptr_out(stack_ptr), .stack_ena(stack_ena), .stack_we(stack_we),
    .stack_data(stack_data), .wstack_data(wstack_data)
  );

  bram_sp #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk(clock), .en(instr_ena), .we(1'b0), .addr(instr_ptr), .din('0), .dout(instr_data));
  bram_sp #(.DEPTH(STACK_DEPTH)) u_smem (
    .clk(clock), .en(stack_ena), .we(stack_we), .addr(stack_ptr), .din(wstack_data),
    .dout(stack_data));

  always #5 clock = !clock;

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic u256_t stack_word(int e);
    return {u_smem.mem[4*e], u_smem.mem[4*e+1], u_smem.mem[4*e+2], u_smem.mem[4*e+3]};
  endfunction

  // load, run to halt, compare with the model; returns the model
  task automatic run_program(program_c pg, bit pause, string name, output ref_model_c m);
    longint unsigned ran = 0;
    m = new(ENTRIES, IMEM_DEPTH);
    m.run(pg.words);
    for (int i = 0; i < IMEM_DEPTH; i++)
      u_imem.mem[i] = (i < pg.words.size()) ? pg.words[i] : '1;
    for (int i = 0; i < STACK_DEPTH; i++) u_smem.mem[i] = '0;
    @(negedge clock); reset = 1; execute = 0;
    @(negedge clock); @(negedge clock);
    reset = 0;
    // stays idle until execute
    repeat (3) @(negedge clock);
    expect_true(!halt && instr_ptr === 0, {name, ": idle before execute"});
    execute = 1;
    while (!halt && ran < 200000) begin
      if (pause && ($urandom % 50) === 0) begin
        execute = 0; n_pauses++;
        repeat (1 + $urandom % 5) @(negedge clock);
        execute = 1;
      end
      @(negedge clock);
      ran++;
    end
    n_runs++;
    if (m.error_halt) n_error_halts++;
    foreach (m.n_exec[i]) op_seen[i] += m.n_exec[i];
    expect_true(halt, {name, ": reached halt"});
    expect_true(ran === m.cycles + 1,
                $sformatf("%s: ran %0d clocks, expected %0d", name, ran, m.cycles + 1));
    for (int e = 0; e < ENTRIES; e++) begin
      checks++;
      if (stack_word(e) !== m.stack[e]) begin
        failures++;
        $display("FAIL %s: stack word %0d = %h, expected %h", name, e, stack_word(e), m.stack[e]);
      end
    end
    // halt persists whatever execute does
    execute = 0; repeat (3) @(negedge clock);
    execute = 1; repeat (3) @(negedge clock);
    expect_true(halt, {name, ": halt persists"});
  endtask

  initial begin
    program_c   pg;
    ref_model_c m;
    u256_t      a0, b0, x, y, z, zi;

    repeat (3) @(negedge clock);

    // --- example programs -------------------------------------------------
    a0 = 256'h09cc57f2ca39c2d81aed7e3d82af0b5711863bd3403bb8f024c4c3b4ecf9652a;
    b0 = 256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2;
    for (int p = 0; p < 2; p++) begin
      pg = new; prog_basic(pg, a0, b0);
      run_program(pg, p === 1, "basic", m);
      expect_true(stack_word(0) === b0, "basic: first input kept");
      expect_true(stack_word(1) === 256'hF9FC09229F4A6B5F7BDA6B6701339CB8F0368DEEDA19118F3E328D75D4B5AD97,
                  "basic: difference");
      expect_true(stack_word(2) === 256'h98C40E99542A11A9EBB084E21DA7CB9397443C6A026097A892294AB8352668A1,
                  "basic: product");
    end

    pg = new; prog_schnorr(pg, a0, b0, GY);
    run_program(pg, 1'b0, "schnorr", m);
    expect_true(stack_word(2) === submod(GY, mulmod(a0, b0)), "schnorr: s = k - m*a");

    pg = new; prog_point_double(pg, GX, GY, 256'd1);
    run_program(pg, 1'b1, "point double", m);
    x = stack_word(5); y = stack_word(9); z = stack_word(11);
    zi = invmod(z);
    expect_true(mulmod(x, mulmod(zi, zi)) === G2X, "point double: affine x of 2G");
    expect_true(mulmod(y, mulmod(zi, mulmod(zi, zi))) === G2Y, "point double: affine y of 2G");

    // --- each halt condition -----------------------------------------------
    pg = new; pg.op(POPAA); run_program(pg, 0, "pop on empty stack", m);
    expect_true(m.error_halt, "pop on empty: model halts too");
    pg = new; pg.op(DROP); run_program(pg, 0, "drop on empty stack", m);
    pg = new; pg.dat(256'd7); pg.op(SWAP); run_program(pg, 0, "swap with one word", m);
    pg = new; pg.words.push_back(64'h0000_0100_0000_0002); run_program(pg, 0, "bad opcode word", m);
    pg = new; pg.op(8'h14); run_program(pg, 0, "unknown opcode", m);
    pg = new; for (int i = 0; i < ENTRIES; i++) pg.dat(256'(i + 1));
    pg.op(PUSHAO); run_program(pg, 0, "push on full stack", m);
    expect_true(m.error_halt, "push on full: model halts too");
    pg = new; for (int i = 0; i < ENTRIES + 1; i++) pg.dat(256'(i + 1));
    run_program(pg, 0, "data on full stack", m);
    pg = new; for (int i = 0; i < ENTRIES; i++) pg.dat(256'(i + 1));
    pg.op(FORWARD); run_program(pg, 0, "forward on full stack", m);
    // no halt instruction: runs to the end of instruction memory
    pg = new; repeat (IMEM_DEPTH) pg.op(DROP);
    pg.words[0] = 64'd0; pg.words[1] = 64'd1; pg.words[2] = 64'd2; pg.words[3] = 64'd3; pg.words[4] = 64'd4;
    for (int i = 5; i < IMEM_DEPTH; i++) pg.words[i] = ((i % 2) !== 0) ? {56'd0, FORWARD} : {56'd0, DROP};
    run_program(pg, 0, "end of instruction memory", m);
    expect_true(m.error_halt, "end of memory: model halts too");

    // --- random programs ----------------------------------------------------
    for (int t = 0; t < 200; t++) begin
      automatic int depth = 0;
      pg = new;
      repeat (3) begin pg.dat((($urandom % 4) === 0) ? P - 256'($urandom % 3) : rand256()); depth++; end
      for (int i = 0; i < 25 + $urandom % 20; i++) begin
        automatic int r = $urandom % 100;
        if (r < 15 && depth < ENTRIES) begin pg.dat(rand256() >> ($urandom % 200)); depth++; end
        else if (r < 45) pg.op(8'(POPAA + $urandom % 8));
        else if (r < 65 && depth < ENTRIES) begin pg.op(8'(PUSHAO + $urandom % 5)); depth++; end
        else if (r < 72 && depth > 1) begin pg.op(DROP); depth--; end
        else if (r < 76 && depth < ENTRIES) begin pg.op(FORWARD); depth++; end
        else if (r < 86) pg.op(SWAP);
        else if (r < 92) pg.op(MUL);
        else if (r < 96) pg.op(DIV);
      end
      pg.op(HALT);
      run_program(pg, t % 2 === 1, $sformatf("random %0d", t), m);
      if (t < 3) $display("random %0d: %0d words, %0d clocks, error halt %0d", t, pg.words.size(), m.cycles, m.error_halt);
    end

    // every instruction, pauses and error halts must have occurred
    for (int c = 0; c <= 8'h13; c++) begin
      checks++;
      if (op_seen[c] === 0) begin failures++; $display("FAIL opcode %02h never executed", c); end
    end
    expect_true(n_pauses > 0, "execution was paused");
    expect_true(n_error_halts >= 9, $sformatf("%0d error halts", n_error_halts));
    $display("runs=%0d pauses=%0d error_halts=%0d", n_runs, n_pauses, n_error_halts);
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
