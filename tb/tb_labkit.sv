// tb_labkit: end-to-end test of the board top with every parameter at its
// default (1,000,000-clock debouncers, 10,240-word memories).
//
// The host port loads a program while SW[7] (reset) is up; then reset is
// released and execute switched on, with some bouncing first, and the program
// runs once the debouncers settle. After halt the testbench reads the results
// through the host port and compares them with the reference model, checks
// that execute dropped by itself and walks the LED selector through each
// kind of display. Three programs run this way: the basic arithmetic example,
// the Schnorr signature and the secp256k1 point double (checked against 2G),
// followed by a program that halts on a stack-bounds error. The UART manager
// exchanges bytes with a model of the UART core meanwhile. Each mechanism
// (every opcode, the pause-free run, error halt, bounce filtering, the LED
// modes, UART receive and transmit) is counted and must occur.
module tb_labkit;
  import tb_nitroecc_pkg::*;

  logic        SYSCLK = 1'b0;
  logic [7:0]  SW = 8'h80, LED;
  logic        host_sel = 1'b1, host_instr_we = 1'b0, host_stack_we = 1'b0, halt;
  logic [13:0] host_instr_addr = '0, host_stack_addr = '0;
  logic [63:0] host_instr_wdata = '0, host_stack_wdata = '0, host_stack_rdata;
  logic [7:0]  uart_tx_byte = '0, uart_rx_byte;
  logic        uart_tx_data = 1'b0, uart_rx_data, uart_tx_full;
  logic [3:0]  araddr, awaddr, wstrb;
  logic        arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  logic [31:0] rdata, wdata;
  logic [1:0]  rresp, bresp;
  logic        rx_push = 1'b0, tx_drain = 1'b1, tx_out;
  logic [7:0]  rx_push_byte = '0, tx_out_byte;
  int          tx_errors;

  int checks = 0, failures = 0;
  int n_led_modes = 0, n_bounce_filtered = 0, n_error_halt = 0, n_exec_clear = 0;
  int n_uart_rx = 0, n_uart_tx = 0;
  int unsigned op_seen [256];

  localparam int DB = 1_000_000;

  labkit dut (
    .SYSCLK(SYSCLK), .SW(SW), .LED(LED),
    .host_sel(host_sel), .host_instr_we(host_instr_we), .host_instr_addr(host_instr_addr),
    .host_instr_wdata(host_instr_wdata), .host_stack_we(host_stack_we),
    .host_stack_addr(host_stack_addr), .host_stack_wdata(host_stack_wdata),
    .host_stack_rdata(host_stack_rdata), .halt(halt),
    .uart_tx_byte(uart_tx_byte), .uart_tx_data(uart_tx_data), .uart_rx_byte(uart_rx_byte),
    .uart_rx_data(uart_rx_data), .uart_tx_full(uart_tx_full),
    .m_axi_araddr(araddr), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_awaddr(awaddr), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready));

  axi_uartlite_model uart (
    .clk(SYSCLK), .resetn(!SW[7]),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .rx_push(rx_push), .rx_push_byte(rx_push_byte), .tx_drain(tx_drain),
    .tx_out(tx_out), .tx_out_byte(tx_out_byte), .tx_errors(tx_errors));

  always #33.333 SYSCLK = !SYSCLK;   // 15 MHz board clock

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clocks(int n);
    repeat (n) @(negedge SYSCLK);
  endtask

  task automatic read_word(int e, output u256_t v);
    host_sel = 1;
    for (int k = 0; k < 4; k++) begin
      @(negedge SYSCLK); host_stack_addr = 14'(4 * e + k);
      @(negedge SYSCLK); v[64*(3-k) +: 64] = host_stack_rdata;
    end
  endtask

  // set the LED selector and wait for its debouncers
  task automatic show(logic [4:0] sel);
    SW[4:0] = sel;
    clocks(DB + 4);
  endtask

  // reset, load, release, run to halt; compares the stack with the model
  task automatic run(program_c pg, string name, output ref_model_c m, output u256_t st[]);
    int n, waited;
    m = new(10240 / 4, 10240);
    m.run(pg.words);
    foreach (m.n_exec[i]) op_seen[i] += m.n_exec[i];
    if (m.error_halt) n_error_halt++;
    SW[7] = 1; SW[6] = 0; host_sel = 1;
    clocks(2);
    for (int i = 0; i <= pg.words.size(); i++) begin
      host_instr_we = 1; host_instr_addr = 14'(i);
      host_instr_wdata = (i < pg.words.size()) ? pg.words[i] : '1;
      @(negedge SYSCLK);
    end
    host_instr_we = 0;
    // clear the stack words that are compared afterwards
    for (int i = 0; i < 4 * 16; i++) begin
      host_stack_we = 1; host_stack_addr = 14'(i); host_stack_wdata = '0;
      @(negedge SYSCLK);
    end
    host_instr_we = 0; host_stack_we = 0; host_sel = 0;
    // release reset; bounce the execute switch before it settles on
    SW[7] = 0;
    repeat (5) begin
      SW[6] = !SW[6];
      clocks(DB / 10);
    end
    n_bounce_filtered += (dut.execute === 0);
    expect_true(dut.execute === 0, {name, ": bouncing switch did not start the core"});
    SW[6] = 1;
    waited = 0;
    while (!halt && waited < 3 * DB) begin @(negedge SYSCLK); waited++; end
    expect_true(halt, {name, ": halted"});
    clocks(3);
    n_exec_clear += (dut.execute === 0);
    expect_true(dut.execute === 0, {name, ": execute cleared on halt"});
    n = (pg.words.size() + 1) / 4;
    if (n > 16) n = 16;
    st = new[n];
    for (int e = 0; e < n; e++) begin
      read_word(e, st[e]);
      checks++;
      if (st[e] !== m.stack[e]) begin
        failures++;
        $display("FAIL %s: stack word %0d = %h, expected %h", name, e, st[e], m.stack[e]);
      end
    end
  endtask

  // UART traffic in the background
  initial begin
    clocks(10);
    forever begin
      clocks(200 + $urandom % 200);
      if (!SW[7]) begin
        @(negedge SYSCLK); rx_push = 1; rx_push_byte = 8'($urandom);
        @(negedge SYSCLK); rx_push = 0;
        if (!uart_tx_full) begin
          uart_tx_data = 1; uart_tx_byte = 8'($urandom);
          @(negedge SYSCLK); uart_tx_data = 0;
        end
      end
    end
  end
  always @(negedge SYSCLK) begin
    if (uart_rx_data) n_uart_rx++;
    if (tx_out) n_uart_tx++;
  end

  initial begin
    program_c   pg;
    ref_model_c m;
    u256_t      st[], zi;
    automatic u256_t a0 = 256'h09cc57f2ca39c2d81aed7e3d82af0b5711863bd3403bb8f024c4c3b4ecf9652a;
    automatic u256_t b0 = 256'h0fd04ed02aef57789f1312d6817b6e9e214fade46622a760e692363e1843b3c2;

    clocks(5);
    // 1. basic arithmetic, then the LED displays
    pg = new; prog_basic(pg, a0, b0); run(pg, "basic", m, st);
    expect_true(st[2] === 256'h98C40E99542A11A9EBB084E21DA7CB9397443C6A026097A892294AB8352668A1,
                "basic: product");
    // put stack word 2, memory word 3 (least significant 64 bits) on the read port
    host_sel = 1; host_stack_addr = 14'(4 * 2 + 3); clocks(2);
    show(5'd0);  expect_true(LED === st[2][7:0], "LED: stack data byte 0");      n_led_modes++;
    show(5'd7);  expect_true(LED === st[2][63:56], "LED: stack data byte 7");    n_led_modes++;
    host_sel = 0; clocks(2);
    show(5'd8);  expect_true(LED === dut.stack_ptr[7:0], "LED: stack address");  n_led_modes++;
    show(5'd18); expect_true(LED === dut.instr_ptr[7:0] && LED !== 0, "LED: instruction address"); n_led_modes++;
    show(5'd10); expect_true(LED === dut.instr_dout[7:0], "LED: instruction data"); n_led_modes++;
    show(5'd20); expect_true(LED === 8'b0000_0001, "LED: execute=0, halt=1");   n_led_modes++;

    // 2. Schnorr signature
    pg = new; prog_schnorr(pg, a0, b0, GY); run(pg, "schnorr", m, st);
    expect_true(st[2] === submod(GY, mulmod(a0, b0)), "schnorr: s");

    // 3. point double of G
    pg = new; prog_point_double(pg, GX, GY, 256'd1); run(pg, "point double", m, st);
    zi = invmod(st[11]);
    expect_true(mulmod(st[5], mulmod(zi, zi)) === G2X, "point double: x of 2G");
    expect_true(mulmod(st[9], mulmod(zi, mulmod(zi, zi))) === G2Y, "point double: y of 2G");

    // 4. stack-bounds error, with the adder, divider and forward on the way
    pg = new; pg.dat(256'd1000); pg.dat(256'd7);
    pg.op(POPAA); pg.op(POPDB); pg.op(DROP); pg.op(POPAB); pg.op(POPDA);
    pg.op(FORWARD); pg.op(PUSHAO); pg.op(DIV); pg.op(PUSHDQ); pg.op(PUSHDR);
    pg.op(DROP); pg.op(DROP); pg.op(DROP); pg.op(DROP); pg.op(DROP); pg.op(DROP);
    pg.op(HALT);
    run(pg, "stack underflow", m, st);
    expect_true(st[2] === 256'd1007 && st[3] === 256'd142 && st[4] === 256'd6, "add and div results");

    // mechanisms
    for (int c = 0; c <= 8'h13; c++) begin
      checks++;
      if (op_seen[c] === 0) begin failures++; $display("FAIL opcode %02h never ran", c); end
    end
    expect_true(n_error_halt > 0, "error halt happened");
    expect_true(n_bounce_filtered === 4, "bounces filtered in every run");
    expect_true(n_exec_clear === 4, "execute cleared on every halt");
    expect_true(n_led_modes === 6, "all LED modes shown");
    expect_true(n_uart_rx > 0 && n_uart_tx > 0, "UART bytes received and sent");
    $display("error_halts=%0d bounces_filtered=%0d exec_clears=%0d led_modes=%0d uart_rx=%0d uart_tx=%0d",
             n_error_halt, n_bounce_filtered, n_exec_clear, n_led_modes, n_uart_rx, n_uart_tx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000_000) @(posedge SYSCLK);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
