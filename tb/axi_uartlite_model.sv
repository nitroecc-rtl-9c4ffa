// axi_uartlite_model: behavioural, register-level model of an AXI UART-Lite
// core, for testbenches only. The serial line itself is not modelled: bytes
// "received" are pushed into the RX FIFO by the testbench, and bytes written
// to the TX FIFO are handed back to the testbench when it drains them.
//
// Registers (AXI4-Lite slave, 4-bit address): 0x0 RX FIFO (read pops),
// 0x4 TX FIFO (write pushes), 0x8 status {.., tx_full(3), tx_empty(2),
// rx_full(1), rx_valid(0)}, 0xC control (writes ignored). FIFOs are 16 deep.
// A write to a full TX FIFO is dropped and answered with SLVERR, and a read of
// an empty RX FIFO returns 0 with SLVERR, so that error paths can be tested.
// Ready signals and responses come after random delays.
module axi_uartlite_model (
  input  logic        clk,
  input  logic        resetn,
  input  logic [3:0]  s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready,
  input  logic [3:0]  s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  // testbench side
  input  logic        rx_push,
  input  logic [7:0]  rx_push_byte,
  input  logic        tx_drain,
  output logic        tx_out,
  output logic [7:0]  tx_out_byte,
  output int          tx_errors
);

  logic [7:0] rxq [$];
  logic [7:0] txq [$];
  logic [3:0] awaddr_q;
  logic [31:0] wdata_q;
  logic [3:0] araddr_q;
  bit          have_aw, have_w, have_ar;


  always_ff @(posedge clk) begin
    if (!resetn) begin
      s_axi_arready <= 0; s_axi_rvalid <= 0; s_axi_rdata <= 0; s_axi_rresp <= 0;
      s_axi_awready <= 0; s_axi_wready <= 0; s_axi_bvalid <= 0; s_axi_bresp <= 0;
      have_aw <= 0; have_w <= 0; have_ar <= 0; tx_out <= 0; tx_out_byte <= 0; tx_errors <= 0;
      rxq.delete(); txq.delete();
    end else begin
      tx_out <= 0;
      if (rx_push && rxq.size() < 16) rxq.push_back(rx_push_byte);
      if (tx_drain && txq.size() !== 0) begin
        tx_out <= 1; tx_out_byte <= txq.pop_front();
      end
      // read channel
      s_axi_arready <= 0;
      if (s_axi_rvalid && s_axi_rready) s_axi_rvalid <= 0;
      // address accepted first, data returned one or more clocks later
      if (s_axi_arvalid && !s_axi_arready && !have_ar && !s_axi_rvalid && ($urandom % 3) === 0) begin
        s_axi_arready <= 1; have_ar <= 1; araddr_q <= s_axi_araddr;
      end
      if (have_ar && !s_axi_rvalid && ($urandom % 2) === 0) begin
        have_ar      <= 0;
        s_axi_rvalid <= 1;
        s_axi_rresp  <= 2'b00;
        case (araddr_q)
          4'h0: if (rxq.size() !== 0) s_axi_rdata <= {24'd0, rxq.pop_front()};
                else begin s_axi_rdata <= 0; s_axi_rresp <= 2'b10; end
          4'h8: s_axi_rdata <= {28'd0, txq.size() >= 16, txq.size() === 0,
                                rxq.size() >= 16, rxq.size() !== 0};
          default: s_axi_rdata <= 0;
        endcase
      end
      // write channel
      s_axi_awready <= 0; s_axi_wready <= 0;
      if (s_axi_bvalid && s_axi_bready) s_axi_bvalid <= 0;
      if (s_axi_awvalid && !s_axi_awready && !have_aw && ($urandom % 2) === 0) begin
        s_axi_awready <= 1; have_aw <= 1; awaddr_q <= s_axi_awaddr;
      end
      if (s_axi_wvalid && !s_axi_wready && !have_w && ($urandom % 2) === 0) begin
        s_axi_wready <= 1; have_w <= 1; wdata_q <= s_axi_wdata;
      end
      if (have_aw && have_w && !s_axi_bvalid && ($urandom % 2) === 0) begin
        have_aw <= 0; have_w <= 0; s_axi_bvalid <= 1; s_axi_bresp <= 2'b00;
        if (awaddr_q === 4'h4) begin
          if (txq.size() < 16) txq.push_back(wdata_q[7:0]);
          else begin s_axi_bresp <= 2'b10; tx_errors <= tx_errors + 1; end
        end
      end
    end
  end

endmodule
