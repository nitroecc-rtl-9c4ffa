// labkit: FPGA board top of the NitroECC system.
//
// Eight slide switches drive the board: SW[7] is reset, SW[6] is execute and
// SW[4:0] pick what the eight LEDs show. Every switch passes through a
// debouncer, whose own reset is the raw SW[7], so reset acts at once and is
// released only after the switch has been low for DEBOUNCE_COUNT clocks.
// The execute register is cleared by reset, set when the debounced execute
// switch is on, and cleared again when the processor halts, so a program runs
// once per reset. The LED multiplexer shows, by the value of SW[4:0]:
//   0-7    stack memory read data, byte 0 (bits 7:0) up to byte 7
//   8, 9   stack memory address, bits 7:0 and 13:8
//   10-17  instruction memory read data, byte 0 up to byte 7
//   18, 19 instruction memory address, bits 7:0 and 13:8
//   20     {6'b0, execute, halt}
//   other  LEDs keep their last value
//
// Besides the switches and LEDs, two groups of ports are brought out. The
// host port of nitroecc_system loads programs and reads results (the board
// otherwise relies on a memory image, IMEM_INIT). The AXI4-Lite master of the
// UART manager, with its byte-side signals, goes to an AXI UART-Lite core
// outside this module; the manager is reset by SW[7] too.
//
// Timing: one clock domain, SYSCLK (15 MHz on the board).
//
// From the design: the switch and LED assignment, the debouncers, the execute
// register and its clearing on halt. The host port, the INIT parameter and
// wiring out the UART manager are this implementation's own.
module labkit
  import nitroecc_pkg::*;
#(
  parameter int unsigned DEBOUNCE_COUNT = 1_000_000,
  parameter string       IMEM_INIT      = ""
) (
  input  logic        SYSCLK,
  input  logic [7:0]  SW,
  output logic [7:0]  LED,
  // host port
  input  logic        host_sel,
  input  logic        host_instr_we,
  input  logic [13:0] host_instr_addr,
  input  logic [63:0] host_instr_wdata,
  input  logic        host_stack_we,
  input  logic [13:0] host_stack_addr,
  input  logic [63:0] host_stack_wdata,
  output logic [63:0] host_stack_rdata,
  output logic        halt,
  // UART manager, byte side
  input  logic [7:0]  uart_tx_byte,
  input  logic        uart_tx_data,
  output logic [7:0]  uart_rx_byte,
  output logic        uart_rx_data,
  output logic        uart_tx_full,
  // UART manager, AXI4-Lite master to the UART core
  output logic [3:0]  m_axi_araddr,
  output logic        m_axi_arvalid,
  input  logic        m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0]  m_axi_rresp,
  input  logic        m_axi_rvalid,
  output logic        m_axi_rready,
  output logic [3:0]  m_axi_awaddr,
  output logic        m_axi_awvalid,
  input  logic        m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0]  m_axi_wstrb,
  output logic        m_axi_wvalid,
  input  logic        m_axi_wready,
  input  logic [1:0]  m_axi_bresp,
  input  logic        m_axi_bvalid,
  output logic        m_axi_bready
);

  logic       clean_reset, clean_execute;
  logic [4:0] clean_sw;
  logic       execute;

  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_reset (
    .clock(SYSCLK), .reset(SW[7]), .noisy(SW[7]), .clean(clean_reset));
  debounce #(.COUNT(DEBOUNCE_COUNT)) u_db_execute (
    .clock(SYSCLK), .reset(SW[7]), .noisy(SW[6]), .clean(clean_execute));

  for (genvar i = 0; i < 5; i++) begin : g_db_sel
    debounce #(.COUNT(DEBOUNCE_COUNT)) u_db (
      .clock(SYSCLK), .reset(SW[7]), .noisy(SW[i]), .clean(clean_sw[i]));
  end

  always_ff @(posedge SYSCLK) begin
    if (clean_reset)                     execute <= 1'b0;
    else if (clean_execute && !execute && !halt) execute <= 1'b1;
    else if (halt && execute)            execute <= 1'b0;
  end

  mword_t      instr_dout, stack_dout;
  logic [13:0] instr_ptr, stack_ptr;

  nitroecc_system #(.IMEM_INIT(IMEM_INIT)) u_sys (
    .clock(SYSCLK), .reset(clean_reset), .execute(execute), .halt(halt),
    .host_sel(host_sel),
    .host_instr_we(host_instr_we), .host_instr_addr(host_instr_addr),
    .host_instr_wdata(host_instr_wdata),
    .host_stack_we(host_stack_we), .host_stack_addr(host_stack_addr),
    .host_stack_wdata(host_stack_wdata),
    .instr_dout(instr_dout), .stack_dout(stack_dout),
    .instr_ptr(instr_ptr), .stack_ptr(stack_ptr)
  );

  assign host_stack_rdata = stack_dout;

  always_ff @(posedge SYSCLK) begin
    if (clean_sw <= 5'd7)
      LED <= stack_dout[8*clean_sw[2:0] +: 8];
    else if (clean_sw >= 5'd10 && clean_sw <= 5'd17)
      LED <= instr_dout[8*3'(clean_sw - 5'd10) +: 8];
    else if (clean_sw == 5'd8)  LED <= stack_ptr[7:0];
    else if (clean_sw == 5'd9)  LED <= {2'b00, stack_ptr[13:8]};
    else if (clean_sw == 5'd18) LED <= instr_ptr[7:0];
    else if (clean_sw == 5'd19) LED <= {2'b00, instr_ptr[13:8]};
    else if (clean_sw == 5'd20) LED <= {6'd0, execute, halt};
  end

  axi_uart_manager u_uart (
    .clock(SYSCLK), .resetn(!SW[7]),
    .tx_byte(uart_tx_byte), .tx_data(uart_tx_data),
    .rx_byte(uart_rx_byte), .rx_data(uart_rx_data), .tx_full(uart_tx_full),
    .m_axi_araddr(m_axi_araddr), .m_axi_arvalid(m_axi_arvalid),
    .m_axi_arready(m_axi_arready), .m_axi_rdata(m_axi_rdata),
    .m_axi_rresp(m_axi_rresp), .m_axi_rvalid(m_axi_rvalid),
    .m_axi_rready(m_axi_rready),
    .m_axi_awaddr(m_axi_awaddr), .m_axi_awvalid(m_axi_awvalid),
    .m_axi_awready(m_axi_awready), .m_axi_wdata(m_axi_wdata),
    .m_axi_wstrb(m_axi_wstrb), .m_axi_wvalid(m_axi_wvalid),
    .m_axi_wready(m_axi_wready), .m_axi_bresp(m_axi_bresp),
    .m_axi_bvalid(m_axi_bvalid), .m_axi_bready(m_axi_bready)
  );

endmodule
