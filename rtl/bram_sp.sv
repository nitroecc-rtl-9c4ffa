// bram_sp: single-port synchronous block RAM, one read/write port.
//
// The NitroECC system uses two of these: the instruction memory and the stack
// memory, each 10,240 words of 64 bits addressed by 14 bits. A read returns
// the addressed word on dout one clock after the address is presented with
// en high; a write stores din at the address on the same edge, and dout then
// shows the old contents (read-before-write). With en low nothing is read or
// written and dout holds its value, which lets the processor pause without
// losing a word in flight.
//
// Interface: clk, en, we, addr, din, dout. Timing: 1-clock read latency.
//
// From the design: 64-bit words, 10,240 words deep, one port (clka, ena, wea,
// addra, dina, douta), built on FPGA block RAM. The read-before-write mode and
// the single-clock latency are this implementation's choice. The optional
// INIT_FILE (hex, one word per line) stands in for an FPGA memory image.
module bram_sp #(
  parameter int unsigned WIDTH     = 64,
  parameter int unsigned DEPTH     = 10240,
  parameter int unsigned ADDR_W    = 14,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              en,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [WIDTH-1:0]  din,
  output logic [WIDTH-1:0]  dout
);

  localparam int unsigned IDX_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  always_ff @(posedge clk) begin
    if (en) begin
      if (int'(addr) < DEPTH) begin
        dout <= mem[IDX_W'(addr)];
        if (we) mem[IDX_W'(addr)] <= din;
      end else begin
        dout <= '0;
      end
    end
  end

endmodule
