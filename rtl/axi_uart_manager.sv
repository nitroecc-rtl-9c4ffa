// axi_uart_manager: byte-level front end for an AXI UART-Lite serial port.
//
// An AXI4-Lite master that drives the UART core's four registers: RX FIFO
// (0x0), TX FIFO (0x4), status (0x8; bit 0 = RX FIFO holds data, bit 3 = TX
// FIFO full). Two independent state machines share the bus:
//   * receive: read the status register; if bit 0 is set, read the RX FIFO
//     and present its low byte on rx_byte with a one-clock rx_data pulse;
//     then poll again. Every status read also refreshes the TX-full flag.
//   * transmit: while idle and not full, a one-clock tx_data pulse writes
//     tx_byte into the TX FIFO; a write answered with an error response
//     marks the FIFO full until a status read says otherwise.
// Each AXI valid is held until its ready arrives; bready and rready are held
// until the response arrives.
//
// Interface: clock, resetn (active-low, as the AXI convention and the design's
// manager use), the byte-side signals, and the AXI4-Lite master channels
// (m_axi_*) with 4-bit addresses. tx_full is high while a byte cannot be
// taken: FIFO full or a write still in progress.
//
// From the design: the register addresses and status bits, the polling of
// status then RX FIFO, the byte-side port names and the handling of an error
// write response as "full". This implementation's own: separate handshake
// states for each channel, tx_full also covering a write in progress, and
// keeping the polling loop running only while resetn is high.
module axi_uart_manager (
  input  logic       clock,
  input  logic       resetn,
  // byte side
  input  logic [7:0] tx_byte,
  input  logic       tx_data,
  output logic [7:0] rx_byte,
  output logic       rx_data,
  output logic       tx_full,
  // AXI4-Lite master: read address / read data
  output logic [3:0] m_axi_araddr,
  output logic       m_axi_arvalid,
  input  logic       m_axi_arready,
  input  logic [31:0] m_axi_rdata,
  input  logic [1:0] m_axi_rresp,
  input  logic       m_axi_rvalid,
  output logic       m_axi_rready,
  // AXI4-Lite master: write address / write data / write response
  output logic [3:0] m_axi_awaddr,
  output logic       m_axi_awvalid,
  input  logic       m_axi_awready,
  output logic [31:0] m_axi_wdata,
  output logic [3:0] m_axi_wstrb,
  output logic       m_axi_wvalid,
  input  logic       m_axi_wready,
  input  logic [1:0] m_axi_bresp,
  input  logic       m_axi_bvalid,
  output logic       m_axi_bready
);

  localparam logic [3:0] RX_FIFO_REG = 4'h0;
  localparam logic [3:0] TX_FIFO_REG = 4'h4;
  localparam logic [3:0] STAT_REG    = 4'h8;
  localparam int unsigned STAT_RX_VALID = 0;
  localparam int unsigned STAT_TX_FULL  = 3;
  localparam logic [1:0] RESP_OKAY   = 2'b00;

  typedef enum logic [1:0] {RX_ADDR, RX_DATA, RX_CHECK} rx_state_t;
  typedef enum logic [1:0] {TX_IDLE, TX_SEND, TX_RESP} tx_state_t;

  rx_state_t  rx_state;
  tx_state_t  tx_state;
  logic       reading_fifo;   // current read is of the RX FIFO, not status
  logic [31:0] rd_word;
  logic       rd_ok;
  logic       fifo_full;
  logic       aw_done, w_done;

  assign tx_full = fifo_full || (tx_state != TX_IDLE);
  assign m_axi_wstrb = 4'b0001;

  // receive side: status poll, then FIFO read when data is waiting
  always_ff @(posedge clock) begin
    if (!resetn) begin
      rx_state      <= RX_ADDR;
      reading_fifo  <= 1'b0;
      m_axi_araddr  <= STAT_REG;
      m_axi_arvalid <= 1'b0;
      m_axi_rready  <= 1'b0;
      rd_word       <= '0;
      rd_ok         <= 1'b0;
      rx_byte       <= '0;
      rx_data       <= 1'b0;
    end else begin
      rx_data <= 1'b0;
      unique case (rx_state)
        RX_ADDR: begin
          m_axi_araddr  <= reading_fifo ? RX_FIFO_REG : STAT_REG;
          m_axi_arvalid <= 1'b1;
          m_axi_rready  <= 1'b1;
          if (m_axi_arvalid && m_axi_arready) begin
            m_axi_arvalid <= 1'b0;
            rx_state      <= RX_DATA;
          end
        end
        RX_DATA: begin
          if (m_axi_rvalid && m_axi_rready) begin
            m_axi_rready <= 1'b0;
            rd_word      <= m_axi_rdata;
            rd_ok        <= (m_axi_rresp == RESP_OKAY);
            rx_state     <= RX_CHECK;
          end
        end
        default: begin  // RX_CHECK
          rx_state <= RX_ADDR;
          if (reading_fifo) begin
            if (rd_ok) begin
              rx_byte <= rd_word[7:0];
              rx_data <= 1'b1;
            end
            reading_fifo <= 1'b0;
          end else if (rd_ok) begin
            reading_fifo <= rd_word[STAT_RX_VALID];
          end
        end
      endcase
    end
  end

  // transmit side: one write per accepted byte
  always_ff @(posedge clock) begin
    if (!resetn) begin
      tx_state      <= TX_IDLE;
      m_axi_awaddr  <= TX_FIFO_REG;
      m_axi_awvalid <= 1'b0;
      m_axi_wdata   <= '0;
      m_axi_wvalid  <= 1'b0;
      m_axi_bready  <= 1'b0;
      aw_done       <= 1'b0;
      w_done        <= 1'b0;
      fifo_full     <= 1'b0;
    end else begin
      unique case (tx_state)
        TX_IDLE: begin
          if (tx_data && !fifo_full) begin
            m_axi_awaddr  <= TX_FIFO_REG;
            m_axi_awvalid <= 1'b1;
            m_axi_wdata   <= {24'd0, tx_byte};
            m_axi_wvalid  <= 1'b1;
            m_axi_bready  <= 1'b1;
            aw_done       <= 1'b0;
            w_done        <= 1'b0;
            tx_state      <= TX_SEND;
          end
        end
        TX_SEND: begin
          if (m_axi_awvalid && m_axi_awready) begin
            m_axi_awvalid <= 1'b0;
            aw_done       <= 1'b1;
          end
          if (m_axi_wvalid && m_axi_wready) begin
            m_axi_wvalid <= 1'b0;
            w_done       <= 1'b1;
          end
          if ((aw_done || (m_axi_awvalid && m_axi_awready)) &&
              (w_done  || (m_axi_wvalid  && m_axi_wready)))
            tx_state <= TX_RESP;
        end
        default: begin  // TX_RESP
          if (m_axi_bvalid && m_axi_bready) begin
            m_axi_bready <= 1'b0;
            if (m_axi_bresp != RESP_OKAY) fifo_full <= 1'b1;
            tx_state <= TX_IDLE;
          end
        end
      endcase
      // a status read refreshes the full flag (not in the clock a write fails)
      if (rx_state == RX_CHECK && !reading_fifo && rd_ok &&
          !(tx_state == TX_RESP && m_axi_bvalid && m_axi_bresp != RESP_OKAY))
        fifo_full <= rd_word[STAT_TX_FULL];
    end
  end

  // AXI rule: a valid, once raised, stays up until its handshake.
  a_arvalid_stable: assert property (@(posedge clock) disable iff (!resetn)
      (m_axi_arvalid && !m_axi_arready) |=> m_axi_arvalid);
  a_awvalid_stable: assert property (@(posedge clock) disable iff (!resetn)
      (m_axi_awvalid && !m_axi_awready) |=> m_axi_awvalid);
  a_wvalid_stable: assert property (@(posedge clock) disable iff (!resetn)
      (m_axi_wvalid && !m_axi_wready) |=> (m_axi_wvalid && $stable(m_axi_wdata)));

endmodule
