// tb_axi_uart_manager: self-checking test of the UART manager against a
// register-level model of the AXI UART-Lite core.
//
// The testbench feeds 300 bytes into the model's receive FIFO at random times
// and checks that the manager delivers each of them once, in order, on
// rx_byte/rx_data. At the same time it offers 300 bytes for sending whenever
// tx_full is low, and drains the model's transmit FIFO slowly so that it fills
// up; every byte the model accepted must come out in order, each byte the
// model refused (error response) is offered again, and the TX-full path must
// have been taken at least once.
module tb_axi_uart_manager;
  logic        clock = 1'b0, resetn = 1'b0;
  logic [7:0]  tx_byte = '0, rx_byte;
  logic        tx_data = 1'b0, rx_data, tx_full;
  logic [3:0]  araddr, awaddr, wstrb;
  logic        arvalid, arready, rvalid, rready, awvalid, awready, wvalid, wready, bvalid, bready;
  logic [31:0] rdata, wdata;
  logic [1:0]  rresp, bresp;
  logic        rx_push = 1'b0, tx_drain = 1'b0, tx_out;
  logic [7:0]  rx_push_byte = '0, tx_out_byte;
  int          tx_errors;
  int          checks = 0, failures = 0;
  int          rx_sent = 0, rx_got = 0, tx_offered = 0, tx_got = 0, full_clocks = 0;
  logic [7:0]  rx_expect [$], tx_expect [$];

  axi_uart_manager dut (
    .clock(clock), .resetn(resetn), .tx_byte(tx_byte), .tx_data(tx_data),
    .rx_byte(rx_byte), .rx_data(rx_data), .tx_full(tx_full),
    .m_axi_araddr(araddr), .m_axi_arvalid(arvalid), .m_axi_arready(arready),
    .m_axi_rdata(rdata), .m_axi_rresp(rresp), .m_axi_rvalid(rvalid), .m_axi_rready(rready),
    .m_axi_awaddr(awaddr), .m_axi_awvalid(awvalid), .m_axi_awready(awready),
    .m_axi_wdata(wdata), .m_axi_wstrb(wstrb), .m_axi_wvalid(wvalid), .m_axi_wready(wready),
    .m_axi_bresp(bresp), .m_axi_bvalid(bvalid), .m_axi_bready(bready));

  axi_uartlite_model uart (
    .clk(clock), .resetn(resetn),
    .s_axi_araddr(araddr), .s_axi_arvalid(arvalid), .s_axi_arready(arready),
    .s_axi_rdata(rdata), .s_axi_rresp(rresp), .s_axi_rvalid(rvalid), .s_axi_rready(rready),
    .s_axi_awaddr(awaddr), .s_axi_awvalid(awvalid), .s_axi_awready(awready),
    .s_axi_wdata(wdata), .s_axi_wstrb(wstrb), .s_axi_wvalid(wvalid), .s_axi_wready(wready),
    .s_axi_bresp(bresp), .s_axi_bvalid(bvalid), .s_axi_bready(bready),
    .rx_push(rx_push), .rx_push_byte(rx_push_byte), .tx_drain(tx_drain),
    .tx_out(tx_out), .tx_out_byte(tx_out_byte), .tx_errors(tx_errors));

  always #5 clock = !clock;

  // received bytes must arrive in order
  always @(negedge clock) if (resetn && rx_data) begin
    checks++; rx_got++;
    if (rx_expect.size() === 0 || rx_byte !== rx_expect[0]) begin
      failures++; $display("FAIL rx byte %h", rx_byte);
    end
    if (rx_expect.size() !== 0) void'(rx_expect.pop_front());
  end

  // transmitted bytes must leave in order
  always @(negedge clock) if (resetn && tx_out) begin
    checks++; tx_got++;
    if (tx_expect.size() === 0 || tx_out_byte !== tx_expect[0]) begin
      failures++; $display("FAIL tx byte %h", tx_out_byte);
    end
    if (tx_expect.size() !== 0) void'(tx_expect.pop_front());
  end

  always @(negedge clock) if (tx_full) full_clocks++;

  initial begin
    repeat (4) @(negedge clock);
    resetn = 1;
    fork
      // receive stimulus: never overflow the model's 16-byte FIFO
      begin
        while (rx_sent < 300) begin
          @(negedge clock);
          rx_push = 0;
          if (($urandom % 25) === 0 && (rx_sent - rx_got) < 12) begin
            rx_push = 1; rx_push_byte = 8'($urandom); rx_expect.push_back(rx_push_byte);
            rx_sent++;
          end
        end
        @(negedge clock); rx_push = 0;
      end
      // transmit stimulus: offer a byte whenever the manager can take one
      begin
        while (tx_offered < 300) begin
          @(negedge clock);
          tx_data = 0;
          if (!tx_full && ($urandom % 2) === 0) begin
            automatic int errs = tx_errors;
            tx_data = 1; tx_byte = 8'($urandom); tx_expect.push_back(tx_byte);
            @(negedge clock); tx_data = 0;
            // wait for the write to finish, then see whether it was refused
            while (tx_full && tx_errors === errs) @(negedge clock);
            repeat (2) @(negedge clock);
            if (tx_errors === errs) tx_offered++;
            else void'(tx_expect.pop_back());   // refused: the model dropped it
          end
        end
      end
      // slow drain, fast after the first 150 bytes
      begin
        while (tx_got < 300) begin
          @(negedge clock);
          tx_drain = (tx_got < 150) ? (($urandom % 300) === 0) : (($urandom % 4) === 0);
        end
      end
    join_any
    wait (rx_got === 300 && tx_got === 300);
    repeat (10) @(negedge clock);
    checks++;
    if (rx_expect.size() !== 0 || tx_expect.size() !== 0) begin
      failures++; $display("FAIL bytes left over");
    end
    checks++;
    if (full_clocks === 0) begin failures++; $display("FAIL tx_full never seen"); end
    $display("rx=%0d tx=%0d tx_refused=%0d clocks_full=%0d", rx_got, tx_got, tx_errors, full_clocks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clock);
    failures++;
    $display("watchdog expired rx=%0d tx=%0d", rx_got, tx_got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
