// nitroecc_system: the NitroECC processor with its two memories, plus a host
// port through which a program is loaded and results are read back.
//
// The processor (bnvm) reads 64-bit instruction words from the instruction
// memory and keeps its 256-bit stack words in the stack memory, four 64-bit
// memory words each; both memories are single-port block RAMs of IMEM_DEPTH
// and STACK_DEPTH words. While host_sel is high the two memory ports belong to
// the host instead: it may write instruction words (to load a program and its
// data) and read or write stack memory words (to collect results, the most
// significant 64 bits of a stack word at the lowest of its four addresses).
// Both read ports return their word one clock after the address.
//
// Typical use: hold host_sel high and load the program; drop host_sel, pulse
// reset, raise execute; wait for halt; raise host_sel and read the stack.
// The host should take the ports only while the processor is halted, held in
// reset or not yet started, since a word the processor has in flight would
// otherwise be lost.
//
// From the design: the pairing of the processor with an instruction memory
// and a stack memory of 10,240 64-bit words and 14-bit addresses, and loading
// by an external circuit at run time. The host port and its multiplexing are
// this implementation's own.
module nitroecc_system
  import nitroecc_pkg::*;
#(
  parameter u256_t       P           = SECP256K1_P,
  parameter int unsigned ADDR_W      = 14,
  parameter int unsigned IMEM_DEPTH  = 10240,
  parameter int unsigned STACK_DEPTH = 10240,
  parameter string       IMEM_INIT   = ""
) (
  input  logic              clock,
  input  logic              reset,
  input  logic              execute,
  output logic              halt,
  // host access to the memories
  input  logic              host_sel,
  input  logic              host_instr_we,
  input  logic [ADDR_W-1:0] host_instr_addr,
  input  mword_t            host_instr_wdata,
  input  logic              host_stack_we,
  input  logic [ADDR_W-1:0] host_stack_addr,
  input  mword_t            host_stack_wdata,
  // memory read data and the processor's pointers (for the host and for display)
  output mword_t            instr_dout,
  output mword_t            stack_dout,
  output logic [ADDR_W-1:0] instr_ptr,
  output logic [ADDR_W-1:0] stack_ptr
);

  logic              core_instr_ena, core_stack_ena, core_stack_we;
  logic [ADDR_W-1:0] core_stack_ptr;
  mword_t            core_stack_wdata;

  logic              im_en, im_we, sm_en, sm_we;
  logic [ADDR_W-1:0] im_addr, sm_addr;
  mword_t            im_din, sm_din;

  bnvm #(
    .P(P), .ADDR_W(ADDR_W), .IMEM_DEPTH(IMEM_DEPTH), .STACK_DEPTH(STACK_DEPTH)
  ) u_core (
    .clock(clock), .reset(reset), .execute(execute), .halt(halt),
    .instr_ptr(instr_ptr), .instr_ena(core_instr_ena), .instr_data(instr_dout),
    .stack_ptr_out(core_stack_ptr), .stack_ena(core_stack_ena),
    .stack_we(core_stack_we), .stack_data(stack_dout),
    .wstack_data(core_stack_wdata)
  );

  assign stack_ptr = core_stack_ptr;

  always_comb begin
    if (host_sel) begin
      im_en = 1'b1;  im_we = host_instr_we; im_addr = host_instr_addr; im_din = host_instr_wdata;
      sm_en = 1'b1;  sm_we = host_stack_we; sm_addr = host_stack_addr; sm_din = host_stack_wdata;
    end else begin
      im_en = core_instr_ena; im_we = 1'b0;          im_addr = instr_ptr;      im_din = '0;
      sm_en = core_stack_ena; sm_we = core_stack_we; sm_addr = core_stack_ptr; sm_din = core_stack_wdata;
    end
  end

  bram_sp #(.WIDTH(MEM_W), .DEPTH(IMEM_DEPTH), .ADDR_W(ADDR_W), .INIT_FILE(IMEM_INIT)) u_instr_mem (
    .clk(clock), .en(im_en), .we(im_we), .addr(im_addr), .din(im_din), .dout(instr_dout)
  );

  bram_sp #(.WIDTH(MEM_W), .DEPTH(STACK_DEPTH), .ADDR_W(ADDR_W)) u_stack_mem (
    .clk(clock), .en(sm_en), .we(sm_we), .addr(sm_addr), .din(sm_din), .dout(stack_dout)
  );

endmodule
